// rcfg_cell: reconfigurable cell of the integer / GF array multipliers.
//
// The cell forms the partial-product bit a & b and adds it, with a Shannon full
// adder, to the sum si coming from the cell above and to the carry ci. The
// carry is first ANDed with conf, so one extra gate turns the cell into the
// AND-XOR cell of a carry-less (GF) multiplier:
//   conf = 1: {co, so} = si + (a & b) + ci         (integer)
//   conf = 0:      so  = si ^ (a & b)              (GF, carry ignored)
// co is left ungated; in GF mode every consumer of co gates or ignores it.
//
// Interface: si, a, b, ci, conf in; so, co out. Purely combinational.
module rcfg_cell (
  input  logic si,
  input  logic a,
  input  logic b,
  input  logic ci,
  input  logic conf,
  output logic so,
  output logic co
);

  logic pp;        // partial-product bit
  logic ci_gated;  // carry input seen by the adder

  always_comb begin
    pp       = a & b;
    ci_gated = ci & conf;
  end

  shannon_fa u_fa (
    .a   (si),
    .b   (pp),
    .cin (ci_gated),
    .sum (so),
    .cout(co)
  );

endmodule
