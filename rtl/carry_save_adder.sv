// carry_save_adder: one W-bit carry-save stage of the Wallace tree.
//
// W independent Shannon full adders reduce three vectors of equal weight to a
// sum vector s (same weight) and a carry vector c (one place more significant),
// so x + y + z = s + 2*c. No carry travels between the bits. The stage widths
// used in the tree (10, 11, 13, 15 and 16 bits) are the original design's; a row of
// independent full adders is the standard form of such a stage.
//
// Interface: x, y, z in; s, c out, all W bits. Combinational, one full-adder
// delay.
module carry_save_adder #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar k = 0; k < W; k++) begin : g_bit
    shannon_fa u_fa (
      .a   (x[k]),
      .b   (y[k]),
      .cin (z[k]),
      .sum (s[k]),
      .cout(c[k])
    );
  end

endmodule
