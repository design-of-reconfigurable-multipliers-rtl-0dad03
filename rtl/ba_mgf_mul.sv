// ba_mgf_mul: reconfigurable integer / GF(2^N) multiplier on a Braun array of
// Shannon-adder cells (BA&MGF).
//
// Same scheme as the carry-save version, with the smaller Braun array: its
// first partial-product row and leftmost column enter as sums through AND
// gates, so it needs (N-1)^2 cells and an (N-1)-bit merging adder. The array's
// sum vector goes through a demultiplexer:
//   conf = 1 (integer): the high sums and the last row's carries are merged by
//     an (N-1)-bit ripple carry adder whose carry out is product bit 2N-1;
//     m = a * b (unsigned, 2N bits).
//   conf = 0 (GF): the sum vector is the carry-less product q(x) = a(x) b(x);
//     the reduction array computes q(x) mod (x^N + p(x));
//     m[N-1:0] is that field element and m[2N-1:N] = {0, q[2N-2:N]}.
// A multiplexer on conf selects the result. The structure is the original design's;
// what fills m[2N-1:N] in GF mode matches the original design's simulation
// values.
//
// Interface: a, b, p (N bits), conf in; m (2N bits) out. Purely
// combinational.
module ba_mgf_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   p,
  input  logic           conf,
  output logic [2*N-1:0] m
);

  logic [2*N-2:0] pps_s;    // array sums
  logic [N-2:0]   pps_c;    // last-row carries, weights N..2N-2
  logic [2*N-2:0] gf_q;     // demux output to the GF path
  logic [2*N-2:0] int_s;    // demux output to the integer path
  logic [N-2:0]   hi_sum;   // product bits N..2N-2
  logic           hi_cout;  // product bit 2N-1
  logic [N-1:0]   gf_c;     // reduced field element
  logic [2*N-1:0] m_int, m_gf;

  ba_pps #(.N(N)) u_pps (.a(a), .b(b), .conf(conf), .s(pps_s), .c(pps_c));

  conf_demux #(.W(2*N-1)) u_demux (.i(pps_s), .conf(conf), .o0(gf_q), .o1(int_s));

  ripple_carry_adder #(.W(N-1)) u_adder (
    .x  (int_s[2*N-2:N]),
    .y  (pps_c),
    .cin(1'b0),
    .s  (hi_sum),
    .cout(hi_cout)
  );

  gf_modulo #(.N(N)) u_modulo (.q(gf_q), .p(p), .c(gf_c));

  assign m_int = {hi_cout, hi_sum, int_s[N-1:0]};
  assign m_gf  = {1'b0, gf_q[2*N-2:N], gf_c};

  conf_mux #(.W(2*N)) u_mux (.d0(m_gf), .d1(m_int), .s(conf), .o(m));

endmodule
