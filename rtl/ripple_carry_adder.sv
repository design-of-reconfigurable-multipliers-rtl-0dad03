// ripple_carry_adder: W-bit carry-propagate adder built from Shannon full
// adders.
//
// It is the vector-merging adder at the bottom of the array multipliers and the
// last stage of the Wallace tree: bit k adds x[k], y[k] and the carry of bit
// k-1. Using the Shannon full adder as the adder cell follows the design;
// a plain ripple chain is the simplest form of the adder it draws.
//
// Interface: x, y (W bits), cin in; s (W bits), cout out. Combinational, the
// delay grows linearly with W.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] carry;  // carry[k] enters bit k

  assign carry[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    shannon_fa u_fa (
      .a   (x[k]),
      .b   (y[k]),
      .cin (carry[k]),
      .sum (s[k]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[W];

endmodule
