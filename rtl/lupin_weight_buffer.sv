// lupin_weight_buffer: on-chip store of INT4 weight vectors and the systolic
// row skew in front of the array.
//
// Entry n holds weight vector n: one INT4 weight for each array row (each
// reduction index). The host writes whole vectors. During computation the
// controller issues one vector per cycle (issue, issue_addr). The read is
// synchronous, and row r of the read vector is then delayed by r further
// cycles, so a vector issued in cycle t reaches w_o[r] in cycle t + 1 + r.
// When nothing is issued the rows are fed zero weights, which add nothing to
// any partial sum.
//
// The buffer and its place left of the array follow the published block
// diagram; its depth and the zero fill are this design's own.
module lupin_weight_buffer
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  wgt_t              wr_data [ROWS],
  input  logic              issue,
  input  logic [ADDR_W-1:0] issue_addr,
  output wgt_t              w_o [ROWS]
);

  logic [ROWS*WGT_W-1:0] mem [DEPTH];
  logic [ROWS*WGT_W-1:0] wr_flat, rd_q;

  for (genvar r = 0; r < ROWS; r++) begin : g_pack
    assign wr_flat[r*WGT_W +: WGT_W] = wr_data[r];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_flat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_q <= '0;
    else if (issue) rd_q <= mem[issue_addr];
    else            rd_q <= '0;
  end

  // skew: row r passes through r registers
  assign w_o[0] = wgt_t'(rd_q[0 +: WGT_W]);
  for (genvar r = 1; r < ROWS; r++) begin : g_skew
    wgt_t dly_q [r];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < r; k++) dly_q[k] <= '0;
      end else begin
        dly_q[0] <= wgt_t'(rd_q[r*WGT_W +: WGT_W]);
        for (int k = 1; k < r; k++) dly_q[k] <= dly_q[k-1];
      end
    end
    assign w_o[r] = dly_q[r-1];
  end

endmodule
