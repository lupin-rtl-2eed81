// lupin_ref_pkg: reference model of Outlier-First Encoding for the testbenches.
//
// encode_pair() packs two quantized activations, with their outlier flags, into
// one pair byte the way the accelerator expects it: two INT4 normals; one INT8
// outlier that takes the whole byte and prunes its normal partner; or two
// outliers kept as their 4 most significant bits, rounded to nearest
// (e.g. -19 -> -1, shown as -16; -33 -> -2, shown as -32).
// effective_value() gives, from the original value alone, what the hardware
// must compute with: the value itself, 0 for a pruned normal, or the rounded
// MSBs times 16. It never looks at the byte, so it is independent of the
// decoding in the RTL.
package lupin_ref_pkg;

  function automatic int clamp(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // nearest integer of v/16, halves away from zero, limited to INT4
  function automatic int msb4(input int v);
    int q;
    q = (v >= 0) ? (v + 8) / 16 : -((-v + 8) / 16);
    return clamp(q, -8, 7);
  endfunction

  function automatic logic [7:0] encode_pair(input int v0, input int v1,
                                             input bit o0, input bit o1);
    logic [3:0] n0, n1;
    if (o0 && o1) begin
      n0 = 4'(msb4(v0));
      n1 = 4'(msb4(v1));
      return {n0, n1};
    end
    if (o0) return 8'(clamp(v0, -128, 127));
    if (o1) return 8'(clamp(v1, -128, 127));
    n0 = 4'(clamp(v0, -8, 7));
    n1 = 4'(clamp(v1, -8, 7));
    return {n0, n1};
  endfunction

  // value element `which` (0 or 1) of the pair stands for after encoding
  function automatic int effective_value(input int v0, input int v1,
                                         input bit o0, input bit o1, input int which);
    int v;
    bit o, po;
    v  = (which == 0) ? v0 : v1;
    o  = (which == 0) ? o0 : o1;
    po = (which == 0) ? o1 : o0;
    if (o && po) return 16 * msb4(v);
    if (o)       return clamp(v, -128, 127);
    if (po)      return 0;
    return clamp(v, -8, 7);
  endfunction

  // a random activation: normals are INT4, outliers lie outside the INT4 range
  function automatic int rand_normal();
    return int'($urandom_range(15)) - 8;
  endfunction

  function automatic int rand_outlier();
    int m;
    m = int'($urandom_range(120)) + 8;          // 8 .. 128
    if ($urandom_range(1) == 1) return -m;      // -8 .. -128
    return (m > 127) ? 127 : m;
  endfunction

  function automatic int rand_weight();
    return int'($urandom_range(15)) - 8;
  endfunction

endpackage
