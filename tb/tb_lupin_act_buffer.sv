// tb_lupin_act_buffer: self-checking test of the activation block buffer.
//
// Writes random rows, reads them back in random order with the one-cycle read
// latency, checks that the read register holds while rd_en is low, and that a
// same-cycle read and write of one row returns the old contents.
module tb_lupin_act_buffer;
  import lupin_pkg::*;

  localparam int unsigned ROWS  = 8;
  localparam int unsigned COLS  = 6;
  localparam int unsigned PAIRS = COLS / 2;
  localparam int unsigned ROW_W = $clog2(ROWS);

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [ROW_W-1:0] wr_row = '0, rd_row = '0;
  pair_t wr_data [PAIRS];
  pair_t rd_data [PAIRS];
  pair_t model [ROWS][PAIRS];
  int checks = 0, failures = 0;

  lupin_act_buffer #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .wr_en(wr_en), .wr_row(wr_row), .wr_data(wr_data),
    .rd_en(rd_en), .rd_row(rd_row), .rd_data(rd_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int r);
    for (int p = 0; p < int'(PAIRS); p++) begin
      checks++;
      if (rd_data[p] != model[r][p]) begin
        failures++;
        $display("FAIL row %0d pair %0d: %h expected %h", r, p, rd_data[p], model[r][p]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < int'(PAIRS); p++) wr_data[p] = '0;
    for (int r = 0; r < int'(ROWS); r++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_row = ROW_W'(r);
      for (int p = 0; p < int'(PAIRS); p++) begin
        wr_data[p] = pair_t'($urandom);
        model[r][p] = wr_data[p];
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < 500; i++) begin
      int r;
      pair_t old [PAIRS];
      r = int'($urandom_range(ROWS - 1));
      rd_en = 1'b1;
      rd_row = ROW_W'(r);
      // now and then overwrite the row in the cycle it is read
      if ($urandom_range(3) == 0) begin
        wr_en = 1'b1;
        wr_row = ROW_W'(r);
        for (int p = 0; p < int'(PAIRS); p++) wr_data[p] = pair_t'($urandom);
      end
      @(negedge clk);
      check_row(r);
      old = model[r];
      if (wr_en) for (int p = 0; p < int'(PAIRS); p++) model[r][p] = wr_data[p];
      wr_en = 1'b0;
      rd_en = 1'b0;
      rd_row = ROW_W'(r + 1);
      @(negedge clk);
      // rd_en low: the read register must hold the previous result
      for (int p = 0; p < int'(PAIRS); p++) begin
        checks++;
        if (rd_data[p] != old[p]) begin
          failures++;
          $display("FAIL read data changed without rd_en");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
