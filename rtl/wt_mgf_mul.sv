// wt_mgf_mul: reconfigurable integer / GF(2^8) multiplier with a Wallace tree
// of Shannon-adder cells (WT&MGF).
//
// The tree adds partial-product rows in parallel rather than through an array,
// so the cells cannot simply have their carries switched off. Instead the
// partial-product stage produces the rows for the tree and a vector s that is
// row 0 in integer mode and the carry-less product in GF mode; s goes through
// a demultiplexer:
//   conf = 1 (integer): s and the other rows enter the Wallace tree;
//     m = a * b (unsigned, 16 bits).
//   conf = 0 (GF): s = q(x) = a(x) b(x) enters the reduction array, which
//     computes q(x) mod (x^8 + p(x)); m[7:0] is that field element and
//     m[15:8] = {0, q[14:8]}.
// A multiplexer on conf selects the result. The block structure follows the
// original design. The split between partial-product stage and tree, and the
// content of m[15:8] in GF mode, are read from its schematic and simulation
// values.
// The tree is defined for eight rows, so N must be 8.
//
// Interface: a, b, p (N bits), conf in; m (2N bits) out. Purely
// combinational.
module wt_mgf_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   p,
  input  logic           conf,
  output logic [2*N-1:0] m
);

  logic [N-1:0]   rows [1:N-1];  // partial-product rows M1..M(N-1)
  logic [2*N-2:0] pps_s;         // row M0 or carry-less product
  logic [2*N-2:0] gf_q;          // demux output to the GF path
  logic [2*N-2:0] int_s;         // demux output to the integer path
  logic [N-1:0]   gf_c;          // reduced field element
  logic [2*N-1:0] m_int, m_gf;

  wt_pps #(.N(N)) u_pps (.a(a), .b(b), .conf(conf), .c(rows), .s(pps_s));

  conf_demux #(.W(2*N-1)) u_demux (.i(pps_s), .conf(conf), .o0(gf_q), .o1(int_s));

  wallace_tree #(.N(N)) u_tree (.s(int_s), .c(rows), .m(m_int));

  gf_modulo #(.N(N)) u_modulo (.q(gf_q), .p(p), .c(gf_c));

  assign m_gf = {1'b0, gf_q[2*N-2:N], gf_c};

  conf_mux #(.W(2*N)) u_mux (.d0(m_gf), .d1(m_int), .s(conf), .o(m));

endmodule
