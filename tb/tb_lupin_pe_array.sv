// tb_lupin_pe_array: self-checking test of the input-stationary paired-MAC array.
//
// Several rounds, each loading a random encoded activation block (random mix of
// all pair formats) row by row, then streaming NV random INT4 weight vectors,
// one per cycle with the row skew applied here, and checking every column
// result at the cycle the array's timing promises (vector n, column c in cycle
// n + ROWS + 1 + c after row 0's first weight). The expected results are
// sums of original-value products with the encoding's effect on each element.
module tb_lupin_pe_array;
  import lupin_pkg::*;
  import lupin_ref_pkg::*;

  localparam int unsigned ROWS  = 5;
  localparam int unsigned COLS  = 6;
  localparam int unsigned ACC_W = 24;
  localparam int unsigned PAIRS = COLS / 2;
  localparam int unsigned NV    = 12;
  localparam int unsigned ROW_W = $clog2(ROWS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ld_en = 1'b0;
  logic [ROW_W-1:0] ld_row = '0;
  pair_t  ld_pairs [PAIRS];
  hp_en_t ld_hp    [PAIRS];
  wgt_t   w_in     [ROWS];
  logic signed [ACC_W-1:0] psum_o [COLS];

  int checks = 0, failures = 0;
  int xv  [ROWS][COLS];   // effective activation values
  int wv  [NV][ROWS];
  int outliers = 0, pruned = 0;

  lupin_pe_array #(.ROWS(ROWS), .COLS(COLS), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_row(ld_row), .ld_pairs(ld_pairs),
    .ld_hp(ld_hp), .w_in(w_in), .psum_o(psum_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_block();
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      ld_en  = 1'b1;
      ld_row = ROW_W'(r);
      for (int p = 0; p < PAIRS; p++) begin
        bit o0, o1;
        int v0, v1;
        o0 = ($urandom_range(3) == 0);
        o1 = ($urandom_range(3) == 0);
        v0 = o0 ? rand_outlier() : rand_normal();
        v1 = o1 ? rand_outlier() : rand_normal();
        ld_pairs[p] = encode_pair(v0, v1, o0, o1);
        ld_hp[p]    = {o1, o0};
        xv[r][2*p]   = effective_value(v0, v1, o0, o1, 0);
        xv[r][2*p+1] = effective_value(v0, v1, o0, o1, 1);
        outliers += int'(o0) + int'(o1);
        pruned   += int'(o0 ^ o1);
      end
    end
    @(negedge clk);
    ld_en = 1'b0;
  endtask

  task automatic stream_and_check();
    for (int n = 0; n < NV; n++)
      for (int r = 0; r < ROWS; r++) wv[n][r] = rand_weight();
    // cycle k: drive w_in[r] = wv[k-r][r]; sample column c for vector k-ROWS-1-c
    for (int k = 0; k < NV + ROWS + COLS + 2; k++) begin
      for (int c = 0; c < COLS; c++) begin
        int n;
        n = k - int'(ROWS) - 1 - c;
        if (n >= 0 && n < int'(NV)) begin
          int e;
          e = 0;
          for (int r = 0; r < ROWS; r++) e += wv[n][r] * xv[r][c];
          checks++;
          if (int'(psum_o[c]) != e) begin
            failures++;
            $display("FAIL vector %0d column %0d: got %0d expected %0d", n, c, psum_o[c], e);
          end
        end
      end
      for (int r = 0; r < ROWS; r++) begin
        int n;
        n = k - r;
        w_in[r] = (n >= 0 && n < int'(NV)) ? wgt_t'(wv[n][r]) : '0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) w_in[r] = '0;
    for (int p = 0; p < PAIRS; p++) begin
      ld_pairs[p] = '0;
      ld_hp[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      load_block();
      stream_and_check();
    end
    checks++;
    if (outliers == 0 || pruned == 0) begin
      failures++;
      $display("FAIL no outliers or no pruned normals exercised");
    end
    $display("outliers=%0d pruned normals=%0d", outliers, pruned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
