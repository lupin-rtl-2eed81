// tb_lupin_weight_buffer: self-checking test of the weight buffer and row skew.
//
// Writes random INT4 weight vectors, then issues random addresses in bursts with
// gaps, and checks every cycle that row r carries weight r of the vector issued
// r + 1 cycles earlier, or zero when nothing was issued then.
module tb_lupin_weight_buffer;
  import lupin_pkg::*;

  localparam int unsigned ROWS   = 7;
  localparam int unsigned DEPTH  = 16;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned HIST   = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0, issue = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, issue_addr = '0;
  wgt_t wr_data [ROWS];
  wgt_t w_o [ROWS];
  int model [DEPTH][ROWS];
  int iss_addr [HIST];     // address issued in cycle k, or -1
  int checks = 0, failures = 0;

  lupin_weight_buffer #(.ROWS(ROWS), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .issue(issue), .issue_addr(issue_addr), .w_o(w_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < int'(ROWS); r++) wr_data[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = ADDR_W'(a);
      for (int r = 0; r < int'(ROWS); r++) begin
        model[a][r] = int'($urandom_range(15)) - 8;
        wr_data[r] = wgt_t'(model[a][r]);
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    // cycle k: check outputs against issues of cycle k-1-r, then drive issue
    for (int k = 0; k < 2000; k++) begin
      for (int r = 0; r < int'(ROWS); r++) begin
        int j, e;
        j = k - 1 - r;
        e = (j >= 0 && iss_addr[j] >= 0) ? model[iss_addr[j]][r] : 0;
        if (j >= 0) begin
          checks++;
          if (int'(w_o[r]) != e) begin
            failures++;
            $display("FAIL cycle %0d row %0d: %0d expected %0d", k, r, w_o[r], e);
          end
        end
      end
      issue = ((k / 40) % 2 == 0) ? 1'b1 : ($urandom_range(2) == 0);
      issue_addr = ADDR_W'($urandom_range(DEPTH - 1));
      iss_addr[k] = issue ? int'(issue_addr) : -1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
