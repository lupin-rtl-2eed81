// lupin_pe_array: the input-stationary systolic array of Lupin paired MAC units.
//
// ROWS rows by COLS columns of 4-bit PEs, built from ROWS x COLS/2 paired units.
// The array holds one activation block stationary: PE (r, c) keeps element
// (r, c), where r is the reduction index and c the output column; horizontally
// neighbouring PEs 2p and 2p+1 form Outlier-First pair p of row r. The block is
// loaded one row per cycle through a broadcast row bus and a row select
// (ld_en, ld_row), with the row's HP_EN bits alongside.
//
// Weights enter each row on the left (w_in[r]) and move one PE to the right per
// cycle; partial sums enter the top row as zero and move one row down per cycle.
// For a weight vector w (one INT4 weight per row) entering row r at cycle t0 + r,
// column c leaves the bottom at psum_o[c] in cycle t0 + ROWS + 1 + c holding
// sum_r w[r] * x(r, c), with x the activation value the pair format represents.
// The weight buffer applies the row skew and the output buffer removes the
// column skew. One weight vector can enter per cycle whatever the outliers.
//
// Weight and partial-sum directions follow the published dataflow figure; the
// row-select load port and the sizes are this design's own.
module lupin_pe_array
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ACC_W = 24,
  localparam int unsigned PAIRS = COLS / 2,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ld_en,
  input  logic [ROW_W-1:0]        ld_row,
  input  pair_t                   ld_pairs [PAIRS],
  input  hp_en_t                  ld_hp    [PAIRS],
  input  wgt_t                    w_in     [ROWS],
  output logic signed [ACC_W-1:0] psum_o   [COLS]
);

  // psum[r][c]: partial sum entering row r of column c; psum[ROWS] is the output
  logic signed [ACC_W-1:0] psum [ROWS+1][COLS];
  // wpipe[r][p]: weight entering pair p of row r; wpipe[r][PAIRS] leaves the row
  wgt_t                    wpipe [ROWS][PAIRS+1];

  for (genvar c = 0; c < COLS; c++) begin : g_top
    assign psum[0][c] = '0;
    assign psum_o[c]  = psum[ROWS][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign wpipe[r][0] = w_in[r];
    logic row_ld;
    assign row_ld = ld_en && (ld_row == ROW_W'(r));
    for (genvar p = 0; p < PAIRS; p++) begin : g_pair
      logic signed [ACC_W-1:0] pin  [2];
      logic signed [ACC_W-1:0] pout [2];
      assign pin[0] = psum[r][2*p];
      assign pin[1] = psum[r][2*p+1];
      assign psum[r+1][2*p]   = pout[0];
      assign psum[r+1][2*p+1] = pout[1];
      lupin_paired_mac #(.ACC_W(ACC_W)) u_mac (
        .clk     (clk),
        .rst_n   (rst_n),
        .ld_en   (row_ld),
        .ld_pair (ld_pairs[p]),
        .ld_hp   (ld_hp[p]),
        .w_in    (wpipe[r][p]),
        .w_out   (wpipe[r][p+1]),
        .psum_i  (pin),
        .acc_q_o (pout)
      );
    end
  end

  // The weight leaving the right edge of each row is not used.
  wgt_t w_edge_unused [ROWS];
  for (genvar r = 0; r < ROWS; r++) begin : g_edge
    assign w_edge_unused[r] = wpipe[r][PAIRS];
  end

endmodule
