// rmul_ref_pkg: reference models for the multiplier testbenches.
//
// The models use algorithms different from the circuits they check:
//   clmul       carry-less product by shift-and-XOR over the bits of b
//   xpow_mod    x^k mod (x^N + p) by repeated multiplication by x
//   gf_reduce   q mod (x^N + p) as the XOR of x^k mod g over the set bits of q
//   gf_mul      a * b in GF(2^N) by the shift-and-add ("xtime") method
//   expected_m  the multiplier output for a given mode
// All functions work on 8-bit operands (the default width).
package rmul_ref_pkg;

  localparam int unsigned RN = 8;

  function automatic logic [2*RN-2:0] clmul(logic [RN-1:0] a, logic [RN-1:0] b);
    logic [2*RN-2:0] r = '0;
    for (int i = 0; i < RN; i++)
      if (b[i]) r ^= (2*RN-1)'(a) << i;
    return r;
  endfunction

  function automatic logic [RN-1:0] xpow_mod(int k, logic [RN-1:0] p);
    logic [RN-1:0] r = 1;
    for (int i = 0; i < k; i++) begin
      logic top = r[RN-1];
      r = r << 1;
      if (top) r ^= p;
    end
    return r;
  endfunction

  function automatic logic [RN-1:0] gf_reduce(logic [2*RN-2:0] q, logic [RN-1:0] p);
    logic [RN-1:0] r = '0;
    for (int k = 0; k < 2*RN-1; k++)
      if (q[k]) r ^= xpow_mod(k, p);
    return r;
  endfunction

  function automatic logic [RN-1:0] gf_mul(logic [RN-1:0] a, logic [RN-1:0] b, logic [RN-1:0] p);
    logic [RN-1:0] r = '0;
    logic [RN-1:0] t = a;
    for (int i = 0; i < RN; i++) begin
      logic top;
      if (b[i]) r ^= t;
      top = t[RN-1];
      t = t << 1;
      if (top) t ^= p;
    end
    return r;
  endfunction

  // conf = 1: unsigned product; conf = 0: {0, high part of the carry-less
  // product, field product}.
  function automatic logic [2*RN-1:0] expected_m(logic [RN-1:0] a, logic [RN-1:0] b,
                                                 logic [RN-1:0] p, logic conf);
    logic [2*RN-2:0] q;
    if (conf) return (2*RN)'(a) * (2*RN)'(b);
    q = clmul(a, b);
    return {1'b0, q[2*RN-2:RN], gf_mul(a, b, p)};
  endfunction

endpackage
