// lupin_top: the Lupin mixed-precision accelerator core.
//
// Computes Y = W * X for one activation block X (ROWS reduction indices by COLS
// output columns, stored in Outlier-First pair bytes with a Block Sparse Index
// of its outliers) and up to WB_DEPTH INT4 weight vectors W. Result row n,
// column c is sum_r W[n][r] * X[r][c], with X as the pair format represents it:
// INT4 normals, INT8 outliers beside a pruned normal, and outlier pairs kept as
// their 4 MSBs times 16.
//
// Blocks: activation buffer (stationary operands), BSI decoder (outlier index
// store and HP_EN generator), controller, weight buffer (INT4 weight vectors
// plus row skew), the ROWS x COLS input-stationary array of paired MAC units,
// and the output buffer (column deskew and result store). The external memory
// is not part of the core: its side is the three host write ports and the
// output read port.
//
// Use: write the block's rows (act_wr_*), its index list and count (idx_wr_*,
// idx_count), the weight vectors (wgt_wr_*), then pulse start with n_vec. The
// run takes ROWS cycles plus one per extra outlier sharing a row to load, n_vec
// cycles to stream the weights and ROWS + COLS + 1 cycles to drain; done then
// pulses and the results can be read one row per cycle (out_rd_addr, one cycle
// latency). With acc_mode high, results are added to the stored rows.
//
// The block structure follows the published architecture diagram; the host
// ports, sizes and buffer depths are this design's own.
module lupin_top
  import lupin_pkg::*;
#(
  parameter int unsigned ROWS     = 16,
  parameter int unsigned COLS     = 16,
  parameter int unsigned ACC_W    = 24,
  parameter int unsigned OUT_W    = 32,
  parameter int unsigned WB_DEPTH = 64,
  localparam int unsigned PAIRS   = COLS / 2,
  localparam int unsigned ELEMS   = ROWS * COLS,
  localparam int unsigned ROW_W   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned WA_W    = $clog2(WB_DEPTH),
  localparam int unsigned NV_W    = $clog2(WB_DEPTH + 1),
  localparam int unsigned DIST_W  = $clog2(ELEMS),
  localparam int unsigned IA_W    = $clog2(ELEMS),
  localparam int unsigned CNT_W   = $clog2(ELEMS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // activation block writes
  input  logic                    act_wr_en,
  input  logic [ROW_W-1:0]        act_wr_row,
  input  pair_t                   act_wr_data [PAIRS],
  // outlier index (BSI) writes
  input  logic                    idx_wr_en,
  input  logic [IA_W-1:0]         idx_wr_addr,
  input  logic [DIST_W-1:0]       idx_wr_data,
  input  logic [CNT_W-1:0]        idx_count,
  // weight vector writes
  input  logic                    wgt_wr_en,
  input  logic [WA_W-1:0]         wgt_wr_addr,
  input  wgt_t                    wgt_wr_data [ROWS],
  // command and status
  input  logic                    start,
  input  logic [NV_W-1:0]         n_vec,
  input  logic                    acc_mode,
  output logic                    busy,
  output logic                    done,
  output logic                    in_load,
  output logic                    in_compute,
  // results
  input  logic [WA_W-1:0]         out_rd_addr,
  output logic signed [OUT_W-1:0] out_rd_data [COLS]
);

  // decoder <-> controller
  logic              dec_start, dec_busy, dec_done, dec_row_valid;
  logic [ROW_W-1:0]  dec_row_idx;
  hp_en_t            dec_row_hp [PAIRS];
  // activation path
  logic              act_rd_en;
  logic [ROW_W-1:0]  act_rd_row;
  pair_t             act_rd_data [PAIRS];
  logic              arr_ld_en;
  logic [ROW_W-1:0]  arr_ld_row;
  hp_en_t            arr_ld_hp [PAIRS];
  // weight / result path
  logic              issue, acc_mode_run, out_wr_valid;
  logic [WA_W-1:0]   issue_addr;
  wgt_t              w_row [ROWS];
  logic signed [ACC_W-1:0] psum [COLS];

  lupin_bsi_decoder #(.ROWS(ROWS), .COLS(COLS)) u_bsi (
    .clk        (clk),
    .rst_n      (rst_n),
    .idx_wr_en  (idx_wr_en),
    .idx_wr_addr(idx_wr_addr),
    .idx_wr_data(idx_wr_data),
    .idx_count  (idx_count),
    .start      (dec_start),
    .busy       (dec_busy),
    .done       (dec_done),
    .row_valid  (dec_row_valid),
    .row_idx    (dec_row_idx),
    .row_hp     (dec_row_hp)
  );

  lupin_controller #(.ROWS(ROWS), .COLS(COLS), .WB_DEPTH(WB_DEPTH)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .n_vec        (n_vec),
    .acc_mode_i   (acc_mode),
    .busy         (busy),
    .done         (done),
    .dec_start    (dec_start),
    .dec_row_valid(dec_row_valid),
    .dec_row_idx  (dec_row_idx),
    .dec_row_hp   (dec_row_hp),
    .dec_done     (dec_done),
    .act_rd_en    (act_rd_en),
    .act_rd_row   (act_rd_row),
    .arr_ld_en    (arr_ld_en),
    .arr_ld_row   (arr_ld_row),
    .arr_ld_hp    (arr_ld_hp),
    .issue        (issue),
    .issue_addr   (issue_addr),
    .acc_mode_o   (acc_mode_run),
    .out_wr_valid (out_wr_valid),
    .in_load      (in_load),
    .in_compute   (in_compute)
  );

  lupin_act_buffer #(.ROWS(ROWS), .COLS(COLS)) u_abuf (
    .clk    (clk),
    .wr_en  (act_wr_en),
    .wr_row (act_wr_row),
    .wr_data(act_wr_data),
    .rd_en  (act_rd_en),
    .rd_row (act_rd_row),
    .rd_data(act_rd_data)
  );

  lupin_weight_buffer #(.ROWS(ROWS), .DEPTH(WB_DEPTH)) u_wbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (wgt_wr_en),
    .wr_addr   (wgt_wr_addr),
    .wr_data   (wgt_wr_data),
    .issue     (issue),
    .issue_addr(issue_addr),
    .w_o       (w_row)
  );

  lupin_pe_array #(.ROWS(ROWS), .COLS(COLS), .ACC_W(ACC_W)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .ld_en   (arr_ld_en),
    .ld_row  (arr_ld_row),
    .ld_pairs(act_rd_data),
    .ld_hp   (arr_ld_hp),
    .w_in    (w_row),
    .psum_o  (psum)
  );

  lupin_output_buffer #(.ROWS(ROWS), .COLS(COLS), .DEPTH(WB_DEPTH),
                        .ACC_W(ACC_W), .OUT_W(OUT_W)) u_obuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_mode  (acc_mode_run),
    .issue     (issue),
    .issue_addr(issue_addr),
    .psum_i    (psum),
    .wr_valid  (out_wr_valid),
    .rd_addr   (out_rd_addr),
    .rd_data   (out_rd_data)
  );

  // The decoder's busy flag duplicates the controller's load phase.
  assert property (@(posedge clk) disable iff (!rst_n) dec_busy |-> in_load)
    else $error("BSI decoder running outside the load phase");

endmodule
