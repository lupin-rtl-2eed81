// tb_lupin_controller: self-checking test of the run sequencer.
//
// Plays the BSI decoder (rows with random gaps and random HP_EN bits) and the
// output buffer (a write pulse a fixed latency after each issue). Checks that
// every decoded row is read from the activation buffer in the same cycle and
// written into the array one cycle later with its own HP_EN bits; that the
// weight vectors 0..n_vec-1 are issued on consecutive cycles, starting the cycle
// after the last row was decoded (no stall); that done pulses one cycle after
// the last result row is written; and that acc_mode is held for the run.
module tb_lupin_controller;
  import lupin_pkg::*;

  localparam int unsigned ROWS     = 4;
  localparam int unsigned COLS     = 6;
  localparam int unsigned WB_DEPTH = 16;
  localparam int unsigned PAIRS  = COLS / 2;
  localparam int unsigned ROW_W  = $clog2(ROWS);
  localparam int unsigned ADDR_W = $clog2(WB_DEPTH);
  localparam int unsigned NV_W   = $clog2(WB_DEPTH + 1);
  localparam int unsigned OLAT   = 9;     // output latency played here

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, acc_mode_i = 1'b0;
  logic [NV_W-1:0] n_vec = '0;
  logic busy, done, dec_start, act_rd_en, arr_ld_en, issue, acc_mode_o;
  logic in_load, in_compute;
  logic dec_row_valid = 1'b0, dec_done = 1'b0, out_wr_valid = 1'b0;
  logic [ROW_W-1:0] dec_row_idx = '0, act_rd_row, arr_ld_row;
  hp_en_t dec_row_hp [PAIRS];
  hp_en_t arr_ld_hp [PAIRS];
  logic [ADDR_W-1:0] issue_addr;

  int checks = 0, failures = 0;

  lupin_controller #(.ROWS(ROWS), .COLS(COLS), .WB_DEPTH(WB_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .n_vec(n_vec), .acc_mode_i(acc_mode_i),
    .busy(busy), .done(done), .dec_start(dec_start), .dec_row_valid(dec_row_valid),
    .dec_row_idx(dec_row_idx), .dec_row_hp(dec_row_hp), .dec_done(dec_done),
    .act_rd_en(act_rd_en), .act_rd_row(act_rd_row), .arr_ld_en(arr_ld_en),
    .arr_ld_row(arr_ld_row), .arr_ld_hp(arr_ld_hp), .issue(issue),
    .issue_addr(issue_addr), .acc_mode_o(acc_mode_o), .out_wr_valid(out_wr_valid),
    .in_load(in_load), .in_compute(in_compute)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run(input int nv, input bit accm);
    hp_en_t prev_hp [PAIRS];
    int prev_row, n_issued, n_written, k, last_wr, done_cycle;
    bit prev_ld;
    int iss_cycle [$];
    @(negedge clk);
    check(!busy, "busy before start");
    start = 1'b1;
    n_vec = NV_W'(nv);
    acc_mode_i = accm;
    #1;
    check(dec_start, "decoder start with command");
    @(negedge clk);
    start = 1'b0;
    acc_mode_i = !accm;   // must not matter any more
    // load phase
    prev_ld = 1'b0;
    for (int r = 0; r < int'(ROWS); r++) begin
      while ($urandom_range(2) == 0) begin
        dec_row_valid = 1'b0;
        #1;
        check(in_load && !issue, "load phase while rows pending");
        check(act_rd_en == 1'b0, "no activation read without a decoded row");
        check(arr_ld_en == prev_ld, "array load one cycle after read");
        prev_ld = 1'b0;
        @(negedge clk);
      end
      dec_row_valid = 1'b1;
      dec_row_idx = ROW_W'(r);
      dec_done = (r == int'(ROWS) - 1);
      for (int p = 0; p < int'(PAIRS); p++) dec_row_hp[p] = hp_en_t'($urandom_range(3));
      #1;
      check(act_rd_en && act_rd_row == ROW_W'(r), "activation read with decoded row");
      check(arr_ld_en == prev_ld, "array load one cycle after read");
      if (prev_ld) check(arr_ld_row == ROW_W'(prev_row) && arr_ld_hp == prev_hp,
                         "array load carries the row's HP_EN bits");
      prev_ld = 1'b1;
      prev_row = r;
      prev_hp = dec_row_hp;
      @(negedge clk);
    end
    dec_row_valid = 1'b0;
    dec_done = 1'b0;
    check(arr_ld_en && arr_ld_row == ROW_W'(prev_row) && arr_ld_hp == prev_hp,
          "last row loaded into the array");
    // compute and drain
    n_issued = 0;
    n_written = 0;
    last_wr = -1;
    done_cycle = -1;
    k = 0;
    while (k < 200 && done_cycle < 0) begin
      out_wr_valid = (iss_cycle.size() > 0 && iss_cycle[0] + int'(OLAT) == k);
      if (out_wr_valid) begin
        void'(iss_cycle.pop_front());
        n_written++;
        last_wr = k;
      end
      if (k < nv) check(issue && issue_addr == ADDR_W'(k) && in_compute,
                        "vector issued every cycle, in order");
      else        check(!issue, "no issue after n_vec vectors");
      check(acc_mode_o == accm, "acc_mode held for the run");
      if (issue) begin
        iss_cycle.push_back(k);
        n_issued++;
      end
      if (done) done_cycle = k;
      @(negedge clk);
      out_wr_valid = 1'b0;
      k++;
    end
    if (nv == 0) check(done_cycle == 0, "empty run ends after loading");
    else         check(done_cycle == last_wr + 1 && n_written == nv && n_issued == nv,
                       $sformatf("done one cycle after last write (done %0d, last write %0d)",
                                 done_cycle, last_wr));
    check(!busy, "idle after done");
  endtask

  initial begin
    for (int p = 0; p < int'(PAIRS); p++) dec_row_hp[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 1'b0);
    run(1, 1'b1);
    run(int'(WB_DEPTH), 1'b0);
    for (int i = 0; i < 40; i++) run(int'($urandom_range(WB_DEPTH)), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
