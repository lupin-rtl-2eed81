// tb_lupin_top: end-to-end test of the Lupin core at its default sizes.
//
// Computes Y = W * X for a layer slice whose reduction length spans several
// activation blocks: each block of X (ROWS x COLS activations, quantized,
// outlier-flagged and packed with Outlier-First Encoding, outlier positions as
// relative distances) is written into the core with the weight vectors of its
// reduction slice, and the first block overwrites the output rows while the
// later ones accumulate onto them (acc_mode). Blocks range from outlier-free to
// very dense, with rows holding several outliers. The results are checked
// against sums of products of the original values as the encoding represents
// them, and every run's length is checked against the core's cycle budget:
// load = one cycle per row plus one per extra outlier in a row, then exactly
// one cycle per weight vector (no stall for any pair format), then
// ROWS + COLS + 1 cycles of drain and one for done.
// The test counts each mechanism: the four pair formats, multi-outlier rows,
// outlier-free blocks, accumulation and an empty (n_vec = 0) run.
module tb_lupin_top;
  import lupin_pkg::*;
  import lupin_ref_pkg::*;

  localparam int unsigned ROWS     = 16;
  localparam int unsigned COLS     = 16;
  localparam int unsigned WB_DEPTH = 64;
  localparam int unsigned OUT_W    = 32;
  localparam int unsigned PAIRS  = COLS / 2;
  localparam int unsigned ELEMS  = ROWS * COLS;
  localparam int unsigned ROW_W  = $clog2(ROWS);
  localparam int unsigned WA_W   = $clog2(WB_DEPTH);
  localparam int unsigned NV_W   = $clog2(WB_DEPTH + 1);
  localparam int unsigned DIST_W = $clog2(ELEMS);
  localparam int unsigned IA_W   = $clog2(ELEMS);
  localparam int unsigned CNT_W  = $clog2(ELEMS + 1);
  localparam int unsigned KBLK   = 4;                 // reduction length 4 * ROWS

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic act_wr_en = 1'b0, idx_wr_en = 1'b0, wgt_wr_en = 1'b0;
  logic [ROW_W-1:0] act_wr_row = '0;
  pair_t act_wr_data [PAIRS];
  logic [IA_W-1:0] idx_wr_addr = '0;
  logic [DIST_W-1:0] idx_wr_data = '0;
  logic [CNT_W-1:0] idx_count = '0;
  logic [WA_W-1:0] wgt_wr_addr = '0, out_rd_addr = '0;
  wgt_t wgt_wr_data [ROWS];
  logic start = 1'b0, acc_mode = 1'b0;
  logic [NV_W-1:0] n_vec = '0;
  logic busy, done, in_load, in_compute;
  logic signed [OUT_W-1:0] out_rd_data [COLS];

  int checks = 0, failures = 0;
  // mechanism counters
  int cnt_nn = 0, cnt_on0 = 0, cnt_on1 = 0, cnt_oo = 0;
  int cnt_multi_rows = 0, cnt_clean_blocks = 0, cnt_acc_runs = 0, cnt_empty_runs = 0;
  int cnt_stall_free_runs = 0;

  int xeff [KBLK*ROWS][COLS];
  int wv   [WB_DEPTH][KBLK*ROWS];
  longint yref [WB_DEPTH][COLS];

  lupin_top dut (
    .clk(clk), .rst_n(rst_n),
    .act_wr_en(act_wr_en), .act_wr_row(act_wr_row), .act_wr_data(act_wr_data),
    .idx_wr_en(idx_wr_en), .idx_wr_addr(idx_wr_addr), .idx_wr_data(idx_wr_data),
    .idx_count(idx_count),
    .wgt_wr_en(wgt_wr_en), .wgt_wr_addr(wgt_wr_addr), .wgt_wr_data(wgt_wr_data),
    .start(start), .n_vec(n_vec), .acc_mode(acc_mode), .busy(busy), .done(done),
    .in_load(in_load), .in_compute(in_compute),
    .out_rd_addr(out_rd_addr), .out_rd_data(out_rd_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Quantize, encode and write activation block b (rows b*ROWS ..) with the
  // given outlier probability in percent; returns the expected load cycles.
  task automatic write_block(input int b, input int density, output int load_cycles);
    bit outl [ELEMS];
    int vals [ELEMS];
    int cnt, prev, nout;
    load_cycles = 0;
    nout = 0;
    for (int e = 0; e < int'(ELEMS); e++) begin
      outl[e] = (int'($urandom_range(99)) < density);
      vals[e] = outl[e] ? rand_outlier() : rand_normal();
    end
    // a dense row now and then
    if (density > 0 && $urandom_range(1) == 1) begin
      int r;
      r = int'($urandom_range(ROWS - 1));
      for (int c = 0; c < 5; c++) begin
        outl[r*COLS + c] = 1'b1;
        vals[r*COLS + c] = rand_outlier();
      end
    end
    for (int r = 0; r < int'(ROWS); r++) begin
      int k;
      @(negedge clk);
      act_wr_en = 1'b1;
      act_wr_row = ROW_W'(r);
      k = 0;
      for (int p = 0; p < int'(PAIRS); p++) begin
        int e0, e1;
        e0 = r*COLS + 2*p;
        e1 = e0 + 1;
        act_wr_data[p] = encode_pair(vals[e0], vals[e1], outl[e0], outl[e1]);
        xeff[b*ROWS + r][2*p]   = effective_value(vals[e0], vals[e1], outl[e0], outl[e1], 0);
        xeff[b*ROWS + r][2*p+1] = effective_value(vals[e0], vals[e1], outl[e0], outl[e1], 1);
        unique case ({outl[e1], outl[e0]})
          2'b00: cnt_nn++;
          2'b01: cnt_on0++;
          2'b10: cnt_on1++;
          default: cnt_oo++;
        endcase
        k += int'(outl[e0]) + int'(outl[e1]);
      end
      nout += k;
      if (k > 1) cnt_multi_rows++;
      load_cycles += (k > 1) ? k : 1;
    end
    if (nout == 0) cnt_clean_blocks++;
    @(negedge clk);
    act_wr_en = 1'b0;
    cnt = 0;
    prev = 0;
    for (int e = 0; e < int'(ELEMS); e++) begin
      if (outl[e]) begin
        @(negedge clk);
        idx_wr_en = 1'b1;
        idx_wr_addr = IA_W'(cnt);
        idx_wr_data = DIST_W'((cnt == 0) ? e : e - prev);
        prev = e;
        cnt++;
      end
    end
    @(negedge clk);
    idx_wr_en = 1'b0;
    idx_count = CNT_W'(cnt);
  endtask

  task automatic write_weights(input int b, input int nv);
    for (int n = 0; n < nv; n++) begin
      @(negedge clk);
      wgt_wr_en = 1'b1;
      wgt_wr_addr = WA_W'(n);
      for (int r = 0; r < int'(ROWS); r++) wgt_wr_data[r] = wgt_t'(wv[n][b*ROWS + r]);
    end
    @(negedge clk);
    wgt_wr_en = 1'b0;
  endtask

  // start a run and check its length against the cycle budget
  task automatic run(input int nv, input bit accm, input int load_cycles);
    int cyc, compute_cycles, expect_total;
    @(negedge clk);
    start = 1'b1;
    n_vec = NV_W'(nv);
    acc_mode = accm;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    compute_cycles = 0;
    while (!done && cyc < 10000) begin
      if (in_compute) compute_cycles++;
      @(negedge clk);
      cyc++;
    end
    expect_total = (nv == 0) ? 1 + load_cycles
                             : 1 + load_cycles + nv + int'(ROWS + COLS + 1);
    check(cyc == expect_total,
          $sformatf("run of %0d vectors took %0d cycles, budget %0d", nv, cyc, expect_total));
    check(compute_cycles == nv,
          $sformatf("%0d compute cycles for %0d vectors", compute_cycles, nv));
    if (nv > 0 && compute_cycles == nv) cnt_stall_free_runs++;
    if (accm) cnt_acc_runs++;
    if (nv == 0) cnt_empty_runs++;
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  task automatic check_outputs(input int nv, input int nblk);
    for (int n = 0; n < nv; n++)
      for (int c = 0; c < int'(COLS); c++) begin
        yref[n][c] = 0;
        for (int k = 0; k < nblk * int'(ROWS); k++) yref[n][c] += longint'(wv[n][k] * xeff[k][c]);
      end
    for (int n = 0; n < nv; n++) begin
      out_rd_addr = WA_W'(n);
      @(negedge clk);
      for (int c = 0; c < int'(COLS); c++) begin
        checks++;
        if (longint'(out_rd_data[c]) != yref[n][c]) begin
          failures++;
          if (failures < 20)
            $display("FAIL Y[%0d][%0d] = %0d expected %0d", n, c, out_rd_data[c], yref[n][c]);
        end
      end
    end
  endtask

  // one layer slice: KBLK activation blocks accumulated into nv output rows
  task automatic layer(input int nv, input int density);
    int lc;
    for (int n = 0; n < int'(WB_DEPTH); n++)
      for (int k = 0; k < int'(KBLK*ROWS); k++) wv[n][k] = rand_weight();
    for (int b = 0; b < int'(KBLK); b++) begin
      write_block(b, (b == 0) ? 0 : density, lc);
      write_weights(b, nv);
      run(nv, b != 0, lc);
    end
    check_outputs(nv, KBLK);
  endtask

  initial begin
    for (int p = 0; p < int'(PAIRS); p++) act_wr_data[p] = '0;
    for (int r = 0; r < int'(ROWS); r++) wgt_wr_data[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    layer(int'(WB_DEPTH), 8);
    layer(7, 30);
    layer(1, 100);
    begin
      int lc;
      write_block(0, 10, lc);
      run(0, 1'b0, lc);
    end
    layer(int'(WB_DEPTH), 3);

    $display("pairs NN=%0d ON0=%0d ON1=%0d OO=%0d, multi-outlier rows=%0d, outlier-free blocks=%0d",
             cnt_nn, cnt_on0, cnt_on1, cnt_oo, cnt_multi_rows, cnt_clean_blocks);
    $display("accumulating runs=%0d, empty runs=%0d, stall-free runs=%0d",
             cnt_acc_runs, cnt_empty_runs, cnt_stall_free_runs);
    check(cnt_nn > 0,  "normal-normal pairs exercised");
    check(cnt_on0 > 0, "outlier-normal pairs exercised");
    check(cnt_on1 > 0, "normal-outlier pairs exercised");
    check(cnt_oo > 0,  "outlier-outlier pairs exercised");
    check(cnt_multi_rows > 0, "rows with several outliers exercised");
    check(cnt_clean_blocks > 0, "outlier-free blocks exercised");
    check(cnt_acc_runs > 0, "accumulating runs exercised");
    check(cnt_empty_runs > 0, "empty run exercised");
    check(cnt_stall_free_runs > 0, "stall-free runs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
