// lupin_act_buffer: on-chip store of one encoded activation block.
//
// One entry holds one PE row of the block: COLS/2 Outlier-First pair bytes, so
// the whole block is ROWS entries. The host (the external-memory side) writes
// whole rows; the controller reads one row per cycle while it loads the block
// into the array. The read is synchronous: rd_data holds the row addressed in
// the previous cycle's rd_en. Reading and writing the same row in one cycle
// returns the old contents.
//
// The buffer's existence and place above the array follow the published block
// diagram; its organisation, one array row per entry, is this design's own.
module lupin_act_buffer
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  localparam int unsigned PAIRS = COLS / 2,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  pair_t            wr_data [PAIRS],
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output pair_t            rd_data [PAIRS]
);

  logic [PAIRS*PAIR_W-1:0] mem [ROWS];
  logic [PAIRS*PAIR_W-1:0] wr_flat, rd_q;

  for (genvar p = 0; p < PAIRS; p++) begin : g_pack
    assign wr_flat[p*PAIR_W +: PAIR_W] = wr_data[p];
    assign rd_data[p]                  = rd_q[p*PAIR_W +: PAIR_W];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_flat;
    if (rd_en) rd_q <= mem[rd_row];
  end

endmodule
