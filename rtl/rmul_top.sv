// rmul_top: the three reconfigurable integer / GF(2^8) multipliers side by
// side.
//
// The carry-save array (CSA&MGF), Braun array (BA&MGF) and Wallace tree
// (WT&MGF) versions are alternative structures for the same function, each
// built from Shannon-adder cells. Each has its own operand bundle
// (a, b, p, conf) and its own result, so they can be driven and compared
// independently:
//   conf = 1: m = a * b, unsigned, 16 bits
//   conf = 0: m[7:0] = a(x) b(x) mod (x^8 + p(x)), m[15:8] = high part of the
//             carry-less product a(x) b(x)
// Placing the three side by side is this implementation's choice.
//
// Interface: csa_in / ba_in / wt_in (rmul_pkg::rmul_in_t) in; csa_m / ba_m /
// wt_m (16 bits) out. Purely combinational.
module rmul_top
  import rmul_pkg::*;
#(
  parameter int unsigned N = WIDTH
) (
  input  rmul_in_t       csa_in,
  output logic [2*N-1:0] csa_m,
  input  rmul_in_t       ba_in,
  output logic [2*N-1:0] ba_m,
  input  rmul_in_t       wt_in,
  output logic [2*N-1:0] wt_m
);

  if (N != WIDTH) begin : g_check
    $error("rmul_top: N must equal rmul_pkg::WIDTH, the operand width of rmul_in_t");
  end

  csa_mgf_mul #(.N(N)) u_csa_mgf (
    .a(csa_in.a), .b(csa_in.b), .p(csa_in.p), .conf(csa_in.conf), .m(csa_m));

  ba_mgf_mul #(.N(N)) u_ba_mgf (
    .a(ba_in.a), .b(ba_in.b), .p(ba_in.p), .conf(ba_in.conf), .m(ba_m));

  wt_mgf_mul #(.N(N)) u_wt_mgf (
    .a(wt_in.a), .b(wt_in.b), .p(wt_in.p), .conf(wt_in.conf), .m(wt_m));

endmodule
