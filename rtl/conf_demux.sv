// conf_demux: routes the partial-product sum to the GF or the integer path.
//
// conf = 0 (GF) drives o0, which feeds the modulo reduction; conf = 1
// (integer) drives o1, which feeds the carry-propagate adder or Wallace tree.
// The output that is not selected is held at zero, so the idle path sees
// constant inputs; the zero value is this implementation's choice.
//
// Interface: i (W bits), conf in; o0, o1 (W bits) out. Combinational.
module conf_demux #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] i,
  input  logic         conf,
  output logic [W-1:0] o0,
  output logic [W-1:0] o1
);

  always_comb begin
    o0 = conf ? '0 : i;
    o1 = conf ? i  : '0;
  end

endmodule
