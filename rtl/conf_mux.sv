// conf_mux: selects the multiplier result by mode.
//
// s = 0 (GF mode) passes d0, the GF result; s = 1 (integer mode) passes d1, the
// integer product.
//
// Interface: d0, d1 (W bits), s in; o (W bits) out. Combinational.
module conf_mux #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] o
);

  always_comb o = s ? d1 : d0;

endmodule
