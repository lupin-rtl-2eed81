// tb_lupin_output_buffer: self-checking test of the output deskew and store.
//
// Plays the array's side: for a row issued in cycle t it presents column c's
// value in cycle t + ROWS + 2 + c and random junk in every other cycle. First
// every row is written once (overwrite mode), then rows are issued again, some
// twice, with acc_mode high. After each phase all rows are read back and
// compared; wr_valid must pulse exactly ROWS + COLS + 1 cycles after each issue.
module tb_lupin_output_buffer;

  localparam int unsigned ROWS   = 3;
  localparam int unsigned COLS   = 5;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned ACC_W  = 24;
  localparam int unsigned OUT_W  = 32;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned LAT    = ROWS + COLS + 1;
  localparam int unsigned NCYC   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic acc_mode = 1'b0, issue = 1'b0;
  logic [ADDR_W-1:0] issue_addr = '0, rd_addr = '0;
  logic signed [ACC_W-1:0] psum_i [COLS];
  logic wr_valid;
  logic signed [OUT_W-1:0] rd_data [COLS];

  int checks = 0, failures = 0;
  longint model [DEPTH][COLS];
  int sched_v [NCYC + 64][COLS];
  bit sched_on [NCYC + 64][COLS];
  bit iss [NCYC + 64];

  lupin_output_buffer #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH), .ACC_W(ACC_W),
                        .OUT_W(OUT_W)) dut (
    .clk(clk), .rst_n(rst_n), .acc_mode(acc_mode), .issue(issue),
    .issue_addr(issue_addr), .psum_i(psum_i), .wr_valid(wr_valid),
    .rd_addr(rd_addr), .rd_data(rd_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue the listed addresses, one every `gap`+1 cycles, and play the array
  task automatic play(input int addrs [$], input bit accumulate);
    int k, next;
    for (int j = 0; j < NCYC + 64; j++) begin
      iss[j] = 1'b0;
      for (int c = 0; c < int'(COLS); c++) sched_on[j][c] = 1'b0;
    end
    acc_mode = accumulate;
    k = 0;
    next = 0;
    while (k < int'(NCYC)) begin
      // outputs for this cycle
      for (int c = 0; c < int'(COLS); c++)
        psum_i[c] = sched_on[k][c] ? ACC_W'(sched_v[k][c]) : ACC_W'($urandom);
      checks++;
      if (wr_valid != ((k >= int'(LAT)) && iss[k - LAT])) begin
        failures++;
        $display("FAIL wr_valid=%0b in cycle %0d", wr_valid, k);
      end
      issue = 1'b0;
      if (next < addrs.size() && $urandom_range(2) != 0) begin
        int a;
        a = addrs[next++];
        issue = 1'b1;
        issue_addr = ADDR_W'(a);
        iss[k] = 1'b1;
        for (int c = 0; c < int'(COLS); c++) begin
          int v;
          v = int'($urandom_range(2000000)) - 1000000;
          sched_v[k + ROWS + 2 + c][c]  = v;
          sched_on[k + ROWS + 2 + c][c] = 1'b1;
          model[a][c] = (accumulate ? model[a][c] : 0) + longint'(v);
        end
      end
      @(negedge clk);
      k++;
    end
    issue = 1'b0;
  endtask

  task automatic read_all();
    for (int a = 0; a < int'(DEPTH); a++) begin
      rd_addr = ADDR_W'(a);
      @(negedge clk);
      for (int c = 0; c < int'(COLS); c++) begin
        checks++;
        if (longint'(rd_data[c]) != model[a][c]) begin
          failures++;
          $display("FAIL row %0d column %0d: %0d expected %0d", a, c, rd_data[c], model[a][c]);
        end
      end
    end
  endtask

  initial begin
    int q [$];
    for (int c = 0; c < int'(COLS); c++) psum_i[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    q = {};
    for (int a = 0; a < int'(DEPTH); a++) q.push_back(a);
    q.shuffle();
    play(q, 1'b0);
    read_all();
    q = {};
    for (int i = 0; i < 3 * int'(DEPTH); i++) q.push_back(int'($urandom_range(DEPTH - 1)));
    play(q, 1'b1);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
