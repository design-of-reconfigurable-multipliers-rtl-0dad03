// csa_pps: reconfigurable carry-save array (partial-product summation of the
// CSA&MGF multiplier).
//
// N rows of N rcfg_cells. Cell (i, j) has weight i+j and adds a_i & b_j to the
// sum of cell (i+1, j-1) (same weight) and to the carry of cell (i, j-1) (one
// weight lower); the top row and the leftmost cell of each row receive 0. The
// rightmost cell of row j delivers product bit j. After the last row the sums
// of weights N..2N-2 and the carries of weights N..2N-1 are left for a
// carry-propagate adder.
//   conf = 1: a*b = s[N-1:0] + ((s[2N-2:N] + c) << N)
//   conf = 0: every carry is gated off inside the cells, so s is the carry-less
//             product of a and b; c must then be ignored.
// The leftmost column has no sum input, so its cells never produce a carry:
// c[N-1] (weight 2N-1) is always 0. It is kept so that the merging adder sees
// the array's full carry row.
// The layout follows the original design's array; the ports are this implementation's.
//
// Interface: a, b (N bits), conf in; s (2N-1 bits), c (N bits) out.
// Combinational, N cell delays deep.
module csa_pps #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           conf,
  output logic [2*N-2:0] s,
  output logic [N-1:0]   c
);

  // Cell outputs, indexed [row j][column i].
  logic [N-1:0] so [N];
  logic [N-1:0] co [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic si_in, ci_in;
      if (j == 0) begin : g_top
        assign si_in = 1'b0;
        assign ci_in = 1'b0;
      end else begin : g_inner
        if (i == N-1) begin : g_left
          assign si_in = 1'b0;
        end else begin : g_mid
          assign si_in = so[j-1][i+1];
        end
        assign ci_in = co[j-1][i];
      end
      rcfg_cell u_cell (
        .si  (si_in),
        .a   (a[i]),
        .b   (b[j]),
        .ci  (ci_in),
        .conf(conf),
        .so  (so[j][i]),
        .co  (co[j][i])
      );
    end
    assign s[j] = so[j][0];
  end

  assign s[2*N-2:N] = so[N-1][N-1:1];
  assign c          = co[N-1];

endmodule
