// tb_lupin_bsi_decoder: self-checking test of the Block Sparse Index decoder.
//
// For many random blocks (from no outliers to dense rows, including outliers in
// the first and last element) it writes the relative-distance list, starts the
// decoder and checks that rows come out in order, that each row's HP_EN bits
// match the outlier set, and that the number of cycles equals the rate the
// decoder promises: one cycle per row, plus one for each extra outlier beyond
// the first in a row.
module tb_lupin_bsi_decoder;
  import lupin_pkg::*;

  localparam int unsigned ROWS  = 6;
  localparam int unsigned COLS  = 8;
  localparam int unsigned ELEMS = ROWS * COLS;
  localparam int unsigned PAIRS = COLS / 2;
  localparam int unsigned DIST_W = $clog2(ELEMS);
  localparam int unsigned CNT_W  = $clog2(ELEMS + 1);
  localparam int unsigned ADDR_W = $clog2(ELEMS);
  localparam int unsigned ROW_W  = $clog2(ROWS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic idx_wr_en = 1'b0;
  logic [ADDR_W-1:0] idx_wr_addr = '0;
  logic [DIST_W-1:0] idx_wr_data = '0;
  logic [CNT_W-1:0]  idx_count = '0;
  logic start = 1'b0;
  logic busy, done, row_valid;
  logic [ROW_W-1:0] row_idx;
  hp_en_t row_hp [PAIRS];

  int checks = 0, failures = 0;
  int multi_rows = 0, empty_rows = 0;
  bit outl [ELEMS];

  lupin_bsi_decoder #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .idx_wr_en(idx_wr_en), .idx_wr_addr(idx_wr_addr),
    .idx_wr_data(idx_wr_data), .idx_count(idx_count), .start(start), .busy(busy),
    .done(done), .row_valid(row_valid), .row_idx(row_idx), .row_hp(row_hp)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int density);
    int cnt, prev, expect_cycles, cycles, next_row;
    bit seen_done;
    cnt = 0;
    prev = 0;
    expect_cycles = 0;
    for (int e = 0; e < int'(ELEMS); e++) begin
      outl[e] = (int'($urandom_range(99)) < density);
      if (outl[e]) begin
        @(negedge clk);
        idx_wr_en   = 1'b1;
        idx_wr_addr = ADDR_W'(cnt);
        idx_wr_data = DIST_W'((cnt == 0) ? e : e - prev);
        prev = e;
        cnt++;
      end
    end
    for (int r = 0; r < int'(ROWS); r++) begin
      int k;
      k = 0;
      for (int c = 0; c < int'(COLS); c++) k += int'(outl[r*COLS+c]);
      expect_cycles += (k > 1) ? k : 1;
      if (k > 1) multi_rows++;
      if (k == 0) empty_rows++;
    end
    @(negedge clk);
    idx_wr_en = 1'b0;
    idx_count = CNT_W'(cnt);
    start     = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    next_row = 0;
    seen_done = 1'b0;
    while (!seen_done && cycles < 1000) begin
      cycles++;
      if (row_valid) begin
        checks++;
        if (int'(row_idx) != next_row) begin
          failures++;
          $display("FAIL row order: got %0d expected %0d", row_idx, next_row);
        end
        for (int p = 0; p < int'(PAIRS); p++) begin
          hp_en_t e;
          e = {outl[next_row*COLS + 2*p + 1], outl[next_row*COLS + 2*p]};
          checks++;
          if (row_hp[p] != e) begin
            failures++;
            $display("FAIL row %0d pair %0d: HP_EN %b expected %b", next_row, p, row_hp[p], e);
          end
        end
        next_row++;
      end
      seen_done = done;
      @(negedge clk);
    end
    checks++;
    if (cycles != expect_cycles || next_row != int'(ROWS) || busy) begin
      failures++;
      $display("FAIL block with %0d outliers: %0d cycles, %0d rows (expected %0d cycles)",
               cnt, cycles, next_row, expect_cycles);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_block(0);
    run_block(100);
    for (int i = 0; i < 300; i++) run_block(int'($urandom_range(40)));
    checks++;
    if (multi_rows == 0 || empty_rows == 0) begin
      failures++;
      $display("FAIL dense or empty rows never exercised");
    end
    $display("rows with several outliers=%0d empty rows=%0d", multi_rows, empty_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
