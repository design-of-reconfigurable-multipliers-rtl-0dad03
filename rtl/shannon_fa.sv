// shannon_fa: one-bit full adder written as a Shannon expansion.
//
// Both outputs are expanded around the carry input: each is the choice between
// its cofactor with cin = 0 and its cofactor with cin = 1,
//   sum  = ~cin & (a ^ b)  |  cin & ~(a ^ b)
//   cout = ~cin & (a & b)  |  cin &  (a | b)
// so the carry input, which arrives last in an array, only drives the final
// selection and not a chain of XOR gates. The carry form equals the usual
// majority a&b | a&cin | b&cin. The Shannon form is the original design's;
// expanding around cin (rather than a or b) is this implementation's choice.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module shannon_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic sum_c0, sum_c1;    // cofactors of sum for cin = 0 / 1
  logic cout_c0, cout_c1;  // cofactors of cout for cin = 0 / 1

  always_comb begin
    sum_c0  = a ^ b;
    sum_c1  = ~(a ^ b);
    cout_c0 = a & b;
    cout_c1 = a | b;
    sum     = (~cin & sum_c0)  | (cin & sum_c1);
    cout    = (~cin & cout_c0) | (cin & cout_c1);
  end

endmodule
