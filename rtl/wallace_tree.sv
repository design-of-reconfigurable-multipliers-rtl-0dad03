// wallace_tree: eight-row Wallace tree of the WT&MGF multiplier.
//
// Adds the eight partial-product rows M0..M7 (row Mj has weight j) with a tree
// of carry-save stages instead of row by row, so the carries of all stages
// travel in parallel and only the last adder propagates a carry:
//   A: 10-bit CSA on M2, M1, M0          (weights 0..9)
//   B: 10-bit CSA on M5, M4, M3          (weights 3..12)
//   C: 11-bit CSA on M7, M6, carry of B  (weights 4..14)
//   D: 13-bit CSA on sum of B, sum and carry of A        (weights 0..12)
//   E: 15-bit CSA on sum and carry of D, sum of C        (weights 0..14)
//   F: 16-bit CSA on sum and carry of E, carry of C      (weights 0..15)
//   G: 17-bit ripple carry adder on sum and carry of F
// The stages and their widths are the original design's; which output of a stage feeds
// which later stage is chosen here so that each stage spans exactly its width.
// The tree is drawn for eight rows, so N must be 8. Bit 16 of the last adder
// is always zero and is dropped.
//
// Interface: s (row M0, 2N-1 bits, only the low N bits are non-zero in integer
// mode), c[1..N-1] (rows M1..M7, N bits each) in; m (2N bits) out.
// Combinational: five CSA levels plus a 17-bit ripple.
module wallace_tree #(
  parameter int unsigned N = 8
) (
  input  logic [2*N-2:0] s,
  input  logic [N-1:0]   c [1:N-1],
  output logic [2*N-1:0] m
);

  if (N != 8) begin : g_check
    $error("wallace_tree: the tree is defined for N = 8 only");
  end

  localparam int unsigned VW = 17;  // weights 0..16

  // Rows and intermediate vectors, all indexed by weight.
  logic [VW-1:0] row [8];
  logic [VW-1:0] sa, ca, sb, cb, sc, cc, sd, cd, se, ce, sf, cf;
  logic [VW-1:0] total;
  logic          cout_unused;

  always_comb begin
    row[0] = VW'(s[N-1:0]);
    for (int j = 1; j < 8; j++) row[j] = VW'(c[j]) << j;
  end

  // Each stage: inputs sliced at offset LO, sum written at LO, carry at LO+1.
  // Bits a stage does not write are zero.
  carry_save_adder #(.W(10)) u_csa_a (
    .x(row[0][9:0]), .y(row[1][9:0]), .z(row[2][9:0]),
    .s(sa[9:0]), .c(ca[10:1]));
  assign sa[VW-1:10] = '0;
  assign ca[0]       = 1'b0;
  assign ca[VW-1:11] = '0;

  carry_save_adder #(.W(10)) u_csa_b (
    .x(row[3][12:3]), .y(row[4][12:3]), .z(row[5][12:3]),
    .s(sb[12:3]), .c(cb[13:4]));
  assign sb[2:0]     = '0;
  assign sb[VW-1:13] = '0;
  assign cb[3:0]     = '0;
  assign cb[VW-1:14] = '0;

  carry_save_adder #(.W(11)) u_csa_c (
    .x(row[6][14:4]), .y(row[7][14:4]), .z(cb[14:4]),
    .s(sc[14:4]), .c(cc[15:5]));
  assign sc[3:0]     = '0;
  assign sc[VW-1:15] = '0;
  assign cc[4:0]     = '0;
  assign cc[VW-1:16] = '0;

  carry_save_adder #(.W(13)) u_csa_d (
    .x(sb[12:0]), .y(sa[12:0]), .z(ca[12:0]),
    .s(sd[12:0]), .c(cd[13:1]));
  assign sd[VW-1:13] = '0;
  assign cd[0]       = 1'b0;
  assign cd[VW-1:14] = '0;

  carry_save_adder #(.W(15)) u_csa_e (
    .x(sd[14:0]), .y(cd[14:0]), .z(sc[14:0]),
    .s(se[14:0]), .c(ce[15:1]));
  assign se[VW-1:15] = '0;
  assign ce[0]       = 1'b0;
  assign ce[VW-1:16] = '0;

  carry_save_adder #(.W(16)) u_csa_f (
    .x(se[15:0]), .y(ce[15:0]), .z(cc[15:0]),
    .s(sf[15:0]), .c(cf[16:1]));
  assign sf[VW-1:16] = '0;
  assign cf[0]       = 1'b0;

  ripple_carry_adder #(.W(VW)) u_rca (
    .x(sf), .y(cf), .cin(1'b0), .s(total), .cout(cout_unused));

  assign m = total[2*N-1:0];

endmodule
