// lupin_paired_mac: one Lupin paired MAC unit, i.e. two neighbouring 4-bit
// processing elements (PE0 on the left, PE1 on the right) of the input-stationary
// array, which hold one Outlier-First pair.
//
// Each PE has a stationary activation nibble, an INT4 weight register that is
// part of the row's left-to-right weight pipeline, a 4-bit multiplier and an
// accumulator register that adds its product to the partial sum arriving from
// the PE above. The pair's two HP_EN bits pick one of three one-cycle dataflows:
//
//   normal-normal   both PEs work independently: acc_i = psum_i + a_i * w_i.
//   outlier-outlier both PEs work independently on the 4 MSBs of their outlier
//                   and shift the product left by 4 to restore its magnitude.
//   outlier-normal  the pruned PE's multiplier is taken over: both multipliers
//                   use the outlier PE's weight, the left one on the outlier's
//                   signed high nibble, the right one on its unsigned low nibble.
//                   The high product is shifted by 4, added to the low product,
//                   and the sum goes to the outlier PE's accumulator. The pruned
//                   PE's accumulator passes its partial sum through unchanged.
//
// The four parts are (A) weight and activation registers, (B) multiply and
// shift under HP_EN, (C) partial-product summation and (D) accumulator input
// selection, as in the published unit. So an INT4 x INT8 product completes in
// one cycle and the array never stalls on an outlier.
//
// Own choices: the byte layout (see lupin_pkg), the 5-bit signed multiplier
// operand that lets the right multiplier take the unsigned low nibble, the
// partial-sum width and the load port.
//
// Timing: ld_en writes the stationary byte and HP_EN at the clock edge. Weight
// registers shift every cycle (w_in -> PE0 -> PE1 -> w_out). acc_q_o is registered:
// acc_q_o = psum_i + product computed from this cycle's weight registers.
module lupin_paired_mac
  import lupin_pkg::*;
#(
  parameter int unsigned ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // stationary operand load
  input  logic                    ld_en,
  input  pair_t                   ld_pair,
  input  hp_en_t                  ld_hp,
  // weight pipeline
  input  wgt_t                    w_in,
  output wgt_t                    w_out,
  // partial sums: [0] is PE0's column, [1] is PE1's column
  input  logic signed [ACC_W-1:0] psum_i [2],
  output logic signed [ACC_W-1:0] acc_q_o [2]
);

  // (A) registers
  pair_t  act_q;
  hp_en_t hp_q;
  wgt_t   w0_q, w1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0;
      hp_q  <= '0;
      w0_q  <= '0;
      w1_q  <= '0;
    end else begin
      if (ld_en) begin
        act_q <= ld_pair;
        hp_q  <= ld_hp;
      end
      w0_q <= w_in;
      w1_q <= w0_q;
    end
  end

  assign w_out = w1_q;

  pair_mode_e mode;
  assign mode = pair_mode(hp_q);

  // weight selection: the pruned PE borrows the outlier PE's weight
  wgt_t w_sel0, w_sel1;
  always_comb begin
    w_sel0 = (mode == PAIR_ON1) ? w1_q : w0_q;
    w_sel1 = (mode == PAIR_ON0) ? w0_q : w1_q;
  end

  // activation operands: the low nibble is unsigned only when it carries an
  // outlier's LSBs
  logic signed [ACT_NIB_W:0] a0, a1;
  always_comb begin
    a0 = {act_q[7], act_q[7:4]};
    if (mode == PAIR_ON0 || mode == PAIR_ON1) a1 = {1'b0, act_q[3:0]};
    else                                      a1 = {act_q[3], act_q[3:0]};
  end

  // (B) multiply and shift
  logic signed [ACT_NIB_W+WGT_W:0] p0, p1;
  logic signed [PROD_W-1:0]        s0, s1;
  assign p0 = a0 * w_sel0;
  assign p1 = a1 * w_sel1;

  always_comb begin
    s0 = PROD_W'(p0);
    s1 = PROD_W'(p1);
    if (mode != PAIR_NN) s0 = s0 <<< MSB_SHIFT;  // high nibble is an MSB nibble
    if (mode == PAIR_OO) s1 = s1 <<< MSB_SHIFT;
  end

  // (C) partial-product summation
  logic signed [PROD_W-1:0] sum;
  assign sum = s0 + s1;

  // (D) accumulator input selection
  logic signed [PROD_W-1:0] in0, in1;
  always_comb begin
    unique case (mode)
      PAIR_ON0: begin in0 = sum; in1 = '0;  end
      PAIR_ON1: begin in0 = '0;  in1 = sum; end
      default:  begin in0 = s0;  in1 = s1;  end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q_o[0] <= '0;
      acc_q_o[1] <= '0;
    end else begin
      acc_q_o[0] <= psum_i[0] + ACC_W'(in0);
      acc_q_o[1] <= psum_i[1] + ACC_W'(in1);
    end
  end

endmodule
