// rmul_pkg: types and constants shared by the reconfigurable integer / GF(2^N)
// multipliers.
//
// Every multiplier in this library takes two N-bit operands a and b, an N-bit
// generator polynomial p (the coefficients g_0..g_{N-1}; the leading x^N term is
// implicit) and a mode bit conf. conf = 1 selects unsigned integer
// multiplication, conf = 0 selects multiplication in GF(2^N). The default width
// of 8 bits and the example polynomial x^8 + x^4 + x^3 + x^2 + 1 are the ones the
// design was characterised with; the polynomial is an input, not a constant.
package rmul_pkg;

  // Operand width of the multipliers (also the degree of the field).
  localparam int unsigned WIDTH = 8;

  // x^8 + x^4 + x^3 + x^2 + 1 without its x^8 term.
  localparam logic [WIDTH-1:0] POLY_X8_X4_X3_X2_1 = 8'h1D;

  // Meaning of the conf input.
  typedef enum logic {
    MODE_GF  = 1'b0,  // carries disabled: carry-less product, then reduction
    MODE_INT = 1'b1   // carries enabled: unsigned integer product
  } mode_e;

  // One multiplier's input bundle, used on the top level.
  typedef struct packed {
    logic [WIDTH-1:0] a;
    logic [WIDTH-1:0] b;
    logic [WIDTH-1:0] p;
    logic             conf;
  } rmul_in_t;

endpackage
