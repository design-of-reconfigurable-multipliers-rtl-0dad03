// wt_pps: partial-product stage of the WT&MGF multiplier.
//
// Forms the partial-product rows c[j] = a & {N{b_j}} for j = 1..N-1, which go
// straight to the Wallace tree, and a vector s that goes through the mode
// demultiplexer. In integer mode s is row 0 (a & {N{b_0}}), so s and c[1..N-1]
// together are the N rows the tree adds. In GF mode the other rows are XORed
// into s at their weights by AND-XOR steps, so s is the carry-less product
// a(x) * b(x). The XOR terms are gated by ~conf, the same one-gate
// reconfiguration as in the array cell. This split of the work between the
// stage and the tree is this implementation's reading of the original design's block
// diagram.
//
// Interface: a, b (N bits), conf in; c (N-1 rows of N bits), s (2N-1 bits)
// out. Combinational.
module wt_pps #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           conf,
  output logic [N-1:0]   c [1:N-1],
  output logic [2*N-2:0] s
);

  for (genvar j = 1; j < N; j++) begin : g_rows
    assign c[j] = a & {N{b[j]}};
  end

  always_comb begin
    s = {{(N-1){1'b0}}, a & {N{b[0]}}};
    for (int j = 1; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        s[i+j] = s[i+j] ^ (a[i] & b[j] & ~conf);
      end
    end
  end

endmodule
