// tb_lupin_paired_mac: self-checking test of one paired MAC unit.
//
// Each test loads a random pair (normal-normal, outlier-normal in either
// position, or outlier-outlier), shifts two different random weights into the
// unit's weight registers, applies random incoming partial sums and checks both
// accumulators one cycle later against products formed from the original
// values. Covers all four HP_EN patterns and the extreme INT8 x INT4 products.
module tb_lupin_paired_mac;
  import lupin_pkg::*;
  import lupin_ref_pkg::*;

  localparam int unsigned ACC_W = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ld_en = 1'b0;
  pair_t ld_pair = '0;
  hp_en_t ld_hp = '0;
  wgt_t w_in = '0, w_out;
  logic signed [ACC_W-1:0] psum_i [2];
  logic signed [ACC_W-1:0] acc [2];

  int checks = 0, failures = 0;
  int mode_seen [4];

  lupin_paired_mac #(.ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_pair(ld_pair), .ld_hp(ld_hp),
    .w_in(w_in), .w_out(w_out), .psum_i(psum_i), .acc_q_o(acc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int v0, input int v1, input bit o0, input bit o1,
                         input int wa, input int wb, input int p0, input int p1);
    int e0, e1, exp0, exp1;
    @(negedge clk);
    ld_en   = 1'b1;
    ld_pair = encode_pair(v0, v1, o0, o1);
    ld_hp   = {o1, o0};
    w_in    = wgt_t'(wa);
    @(negedge clk);
    ld_en   = 1'b0;
    w_in    = wgt_t'(wb);
    @(negedge clk);                // now PE0 holds wb, PE1 holds wa
    if (w_out !== wgt_t'(wa)) begin
      failures++;
      $display("FAIL weight pipeline: w_out=%0d expected %0d", w_out, wa);
    end
    checks++;
    psum_i[0] = ACC_W'(p0);
    psum_i[1] = ACC_W'(p1);
    w_in      = '0;
    e0 = effective_value(v0, v1, o0, o1, 0);
    e1 = effective_value(v0, v1, o0, o1, 1);
    exp0 = p0 + e0 * wb;
    exp1 = p1 + e1 * wa;
    @(negedge clk);
    if (int'(acc[0]) != exp0 || int'(acc[1]) != exp1) begin
      failures++;
      $display("FAIL v=(%0d,%0d) o=(%0b,%0b) w=(%0d,%0d) psum=(%0d,%0d): acc=(%0d,%0d) expected (%0d,%0d)",
               v0, v1, o0, o1, wb, wa, p0, p1, acc[0], acc[1], exp0, exp1);
    end
    checks++;
    mode_seen[{o1, o0}]++;
  endtask

  initial begin
    psum_i[0] = '0;
    psum_i[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corner products: largest INT8 x INT4 magnitudes in every format
    run_one(-128, 3, 1'b1, 1'b0, 5, -8, 0, 0);
    run_one(2, 127, 1'b0, 1'b1, -8, 7, 0, 0);
    run_one(-128, -128, 1'b1, 1'b1, -8, -8, 0, 0);
    run_one(-8, -8, 1'b0, 1'b0, -8, -8, 0, 0);
    run_one(-19, -33, 1'b1, 1'b1, 1, 1, 0, 0);
    for (int i = 0; i < 4000; i++) begin
      bit o0, o1;
      int v0, v1;
      o0 = ($urandom_range(2) == 0);
      o1 = ($urandom_range(2) == 0);
      v0 = o0 ? rand_outlier() : rand_normal();
      v1 = o1 ? rand_outlier() : rand_normal();
      run_one(v0, v1, o0, o1, rand_weight(), rand_weight(),
              int'($urandom_range(200000)) - 100000, int'($urandom_range(200000)) - 100000);
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL pair mode %0d never exercised", m);
      end
    end
    $display("pair modes exercised: NN=%0d ON0=%0d ON1=%0d OO=%0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
