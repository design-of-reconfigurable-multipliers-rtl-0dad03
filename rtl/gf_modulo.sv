// gf_modulo: reduction of a carry-less product modulo a generic polynomial.
//
// Computes c(x) = q(x) mod g(x) with g(x) = x^N + p(x), where q has degree at
// most 2N-2 and p = {g_{N-1}, ..., g_0} is an input, so one circuit serves
// every field GF(2^N). The circuit is an array of N-1 rows of AND-XOR cells,
// one row per coefficient q_{2N-2} down to q_N. The row for q_k replaces
// q_k x^k by q_k x^{k-N} p(x): it XORs (q_k & p_j) into bit k-N+j for
// j = 0..N-1. Rows run from the highest coefficient down, so each row sees the
// bits the rows above it have already changed. This follows the original design's
// reduction array; the cell is "so = c' ^ (c & p)".
//
// Interface: q (2N-1 bits), p (N bits) in; c (N bits) out. Combinational,
// N-1 AND-XOR levels deep.
module gf_modulo #(
  parameter int unsigned N = 8
) (
  input  logic [2*N-2:0] q,
  input  logic [N-1:0]   p,
  output logic [N-1:0]   c
);

  // One iteration of the outer loop is one row of the array; row k removes
  // the coefficient of x^k. The bits a row changes all lie below k, so r[k]
  // is read before any change.
  always_comb begin
    logic [2*N-2:0] r;  // partial remainder
    r = q;
    for (int k = 2*N-2; k >= int'(N); k--) begin
      for (int j = 0; j < N; j++) begin
        r[k-N+j] = r[k-N+j] ^ (r[k] & p[j]);
      end
    end
    c = r[N-1:0];
  end

endmodule
