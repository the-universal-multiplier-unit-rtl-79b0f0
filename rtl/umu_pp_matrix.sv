// umu_pp_matrix: partial products of the extended two's complement matrix.
//
// Operands are (N+1)-bit two's complement numbers xe and ye, whose bit N is
// the extra (sign) position. Their product, modulo 2**(2N+2), is the sum of
//   - XiYj at weight 2**(i+j) for i, j < N             (N rows, plain AND),
//   - NOT(XiYn) at weight 2**(i+N) for i < N           (one row),
//   - NOT(XnYj) at weight 2**(j+N) for j < N, XnYn at 2**(2N) and a constant
//     one at 2**(2N+1)                                  (one row),
//   - a constant one at 2**(N+1)                        (one row).
// The complemented terms and the two ones replace the negative weights of
// the sign row and column (the two's complement identity -v = ~v + 1 - 2**N,
// with -2**(2N+1) = +2**(2N+1) modulo 2**(2N+2)). The rows follow the layout
// of the worked n = 4 matrix: AND rows first, then the NOT(XiYn) row, then
// the row holding XnYn, NOT(XnYj) and the upper one, with the lower one in
// column N+1.
//
// Interface: rows[r] is a 2N+2 bit vector already shifted to its weight,
// unused positions zero. ROWS = N+3. Combinational.
module umu_pp_matrix #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]                    xe,
  input  logic [N:0]                    ye,
  output logic [N+2:0][2*N+1:0]         rows
);

  localparam int unsigned W = 2*N + 2;

  always_comb begin
    rows = '0;
    // Plain partial products XiYj, i, j < N.
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        rows[j][i+j] = xe[i] & ye[j];
      end
    end
    // Sign row of Y: NOT(Xi Yn).
    for (int i = 0; i < N; i++) begin
      rows[N][i+N] = ~(xe[i] & ye[N]);
    end
    // Sign column of X: NOT(Xn Yj), plus Xn Yn and the one at 2N+1.
    for (int j = 0; j < N; j++) begin
      rows[N+1][j+N] = ~(xe[N] & ye[j]);
    end
    rows[N+1][2*N]   = xe[N] & ye[N];
    rows[N+1][W-1]   = 1'b1;
    // Correction one at weight 2**(N+1).
    rows[N+2][N+1]   = 1'b1;
  end

endmodule
