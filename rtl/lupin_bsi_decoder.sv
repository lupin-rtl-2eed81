// lupin_bsi_decoder: outlier index store and HP_EN generator for one activation
// block.
//
// The outlier positions of a block are kept in Block Sparse Index form: a list
// of relative distances. Entry 0 is the element index of the first outlier in
// the block (elements numbered row by row, e = r * COLS + c); entry i > 0 is the
// distance from outlier i-1 to outlier i. idx_count says how many entries the
// block has. The host writes the list through the idx_wr_* port.
//
// After start the decoder walks the list and hands out the block one PE row at
// a time: each cycle it folds at most one outlier into the current row's HP_EN
// bits, and it presents the row (row_valid, row_idx, row_hp) in the cycle in
// which the row's last outlier is folded in. A row with zero or one outlier thus
// takes one cycle, a row with k > 1 outliers takes k cycles. The controller
// loads the matching activation row in parallel, so HP_EN arrives in the array
// together with the activations it governs. done pulses with the last row.
//
// The relative-distance index and its decoding in parallel with block loading
// follow the published architecture; the entry format, the one-outlier-per-cycle
// rate and the register-file store are this design's own.
module lupin_bsi_decoder
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  localparam int unsigned ELEMS = ROWS * COLS,
  localparam int unsigned DIST_W = $clog2(ELEMS),       // one entry can reach any element
  localparam int unsigned CNT_W  = $clog2(ELEMS + 1),
  localparam int unsigned ADDR_W = $clog2(ELEMS),
  localparam int unsigned POS_W  = DIST_W + 2,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned COL_W  = $clog2(COLS),
  localparam int unsigned PAIRS  = COLS / 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              idx_wr_en,
  input  logic [ADDR_W-1:0] idx_wr_addr,
  input  logic [DIST_W-1:0] idx_wr_data,
  input  logic [CNT_W-1:0]  idx_count,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // decoded rows
  output logic              row_valid,
  output logic [ROW_W-1:0]  row_idx,
  output hp_en_t            row_hp [PAIRS]
);

  logic [DIST_W-1:0] idx_mem [ELEMS];

  always_ff @(posedge clk) begin
    if (idx_wr_en) idx_mem[idx_wr_addr] <= idx_wr_data;
  end

  logic              run_q;
  logic [CNT_W-1:0]  cnt_q;     // entries in this block
  logic [CNT_W-1:0]  i_q;       // index of the next outlier to fold in
  logic [POS_W-1:0]  pos_q;     // absolute element index of outlier i_q
  logic [ROW_W-1:0]  row_q;
  logic [COLS-1:0]   bits_q;

  // combinational walk step
  logic              in_row, next_in_row, row_done;
  logic [POS_W-1:0]  next_pos;
  logic [COLS-1:0]   bits_now;
  logic [CNT_W-1:0]  i_next;

  always_comb begin
    in_row   = (i_q < cnt_q) && (pos_q[POS_W-1:COL_W] == (POS_W-COL_W)'(row_q));
    i_next   = i_q + CNT_W'(1);
    next_pos = pos_q + POS_W'(idx_mem[ADDR_W'(i_next)]);
    bits_now = bits_q;
    if (in_row) bits_now[pos_q[COL_W-1:0]] = 1'b1;
    next_in_row = in_row && (i_next < cnt_q) &&
                  (next_pos[POS_W-1:COL_W] == (POS_W-COL_W)'(row_q));
    row_done = run_q && !next_in_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      cnt_q  <= '0;
      i_q    <= '0;
      pos_q  <= '0;
      row_q  <= '0;
      bits_q <= '0;
    end else if (start && !run_q) begin
      run_q  <= 1'b1;
      cnt_q  <= idx_count;
      i_q    <= '0;
      pos_q  <= POS_W'(idx_mem[0]);
      row_q  <= '0;
      bits_q <= '0;
    end else if (run_q) begin
      if (in_row) begin
        i_q   <= i_next;
        pos_q <= next_pos;
      end
      if (row_done) begin
        bits_q <= '0;
        row_q  <= row_q + ROW_W'(1);
        if (row_q == ROW_W'(ROWS - 1)) run_q <= 1'b0;
      end else begin
        bits_q <= bits_now;
      end
    end
  end

  assign busy      = run_q;
  assign row_valid = row_done;
  assign row_idx   = row_q;
  assign done      = row_done && (row_q == ROW_W'(ROWS - 1));

  for (genvar p = 0; p < PAIRS; p++) begin : g_hp
    assign row_hp[p] = {bits_now[2*p+1], bits_now[2*p]};
  end

endmodule
