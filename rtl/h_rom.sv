// h_rom: connection and edge-weight ROMs of the parity-check matrix H.
//
// For an N x N degree-3 Latin-square H it holds, per slot j,
//   col[j][c]   variable node joined to check node c by its slot-j edge,
//   row[j][v]   check node joined to variable node v by its slot-j edge,
//   negc[j][c]  sign of the weight of edge (c, j), indexed by check node,
//   negv[j][v]  the same sign, indexed by variable node,
// the magnitude being HBAR[j]. As in the document, connections are kept
// both ways and weights separately. The contents are filled at start-up
// from the construction in ldlc_pkg (affine column permutations and a
// sign hash), a choice of this design. Three combinational read ports:
// port A by check node, ports B and C by variable node.
module h_rom
  import ldlc_pkg::*;
#(
  parameter int N  = 1000,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0] a_c,
  output logic [AW-1:0] a_col  [D],
  output logic          a_neg  [D],
  input  logic [AW-1:0] b_v,
  output logic [AW-1:0] b_row  [D],
  output logic          b_neg  [D],
  input  logic [AW-1:0] c_v,
  output logic [AW-1:0] c_row  [D]
);

  logic [AW-1:0] col  [D][N];
  logic [AW-1:0] row  [D][N];
  logic          negc [D][N];
  logic          negv [D][N];

  initial begin
    for (int j = 0; j < D; j++) begin
      for (int c = 0; c < N; c++) begin
        int v;
        v             = perm_col(j, c, N);
        col[j][c]     = AW'(v);
        row[j][v]     = AW'(c);
        negc[j][c]    = sign_neg(j, c);
        negv[j][v]    = sign_neg(j, c);
      end
    end
  end

  always_comb begin
    for (int j = 0; j < D; j++) begin
      a_col[j] = col[j][a_c];
      a_neg[j] = negc[j][a_c];
      b_row[j] = row[j][b_v];
      b_neg[j] = negv[j][b_v];
      c_row[j] = row[j][c_v];
    end
  end

endmodule
