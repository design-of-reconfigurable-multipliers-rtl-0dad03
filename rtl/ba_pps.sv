// ba_pps: reconfigurable Braun array (partial-product summation of the
// BA&MGF multiplier).
//
// The Braun array saves one row and one column of cells against the plain
// carry-save array: the first partial-product row a & b_0 and the partial
// products a_{N-1} & b_j of the leftmost column enter the array as sums through
// plain AND gates. Rows j = 1..N-1 hold N-1 rcfg_cells each; cell (i, j) has
// weight i+j, adds a_i & b_j to the sum above it (same weight) and to the
// carry of cell (i, j-1). The sums of weights N..2N-2 and the carries of
// weights N..2N-2 left after the last row go to a carry-propagate adder.
//   conf = 1: a*b = s[N-1:0] + ((s[2N-2:N] + c) << N)
//   conf = 0: carries are gated off, s is the carry-less product of a and b.
// The layout follows the original design's Braun array; the ports are this
// implementation's.
//
// Interface: a, b (N bits), conf in; s (2N-1 bits), c (N-1 bits) out.
// Combinational, N-1 cell delays deep.
module ba_pps #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           conf,
  output logic [2*N-2:0] s,
  output logic [N-2:0]   c
);

  // Cell outputs, indexed [row j][column i]; row 0 has no cells.
  logic [N-2:0] so [N];
  logic [N-2:0] co [N];

  // Row 0: the first partial-product row, as sums of weight i.
  logic [N-1:0] row0;
  always_comb row0 = a & {N{b[0]}};

  assign so[0] = row0[N-1:1];
  assign co[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N-1; i++) begin : g_col
      logic si_in;
      if (i == N-2) begin : g_left
        // leftmost partial product of the row above enters as a sum
        assign si_in = a[N-1] & b[j-1];
      end else begin : g_mid
        assign si_in = (j == 1) ? row0[i+1] : so[j-1][i+1];
      end
      rcfg_cell u_cell (
        .si  (si_in),
        .a   (a[i]),
        .b   (b[j]),
        .ci  (co[j-1][i]),
        .conf(conf),
        .so  (so[j][i]),
        .co  (co[j][i])
      );
    end
  end

  assign s[0] = row0[0];
  for (genvar j = 1; j < N; j++) begin : g_low
    assign s[j] = so[j][0];
  end
  if (N > 2) begin : g_high
    assign s[2*N-3:N] = so[N-1][N-2:1];
  end
  assign s[2*N-2] = a[N-1] & b[N-1];
  assign c        = co[N-1];

endmodule
