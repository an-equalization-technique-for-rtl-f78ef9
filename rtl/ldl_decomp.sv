// LDL^T / LU factorisation of the symmetric positive-definite TEQ matrix A.
//
// With L unit lower triangular, U = D*L^T upper triangular and D = diag(U),
// row i of U is u(i,j) = a(i,j) - sum_{k<i} l(i,k)*u(k,j) for j >= i, and
// column i of L follows from the symmetry, l(j,i) = u(i,j) / u(i,i). Only U
// needs its own multiply-accumulates, which halves the work of a plain LU
// factorisation. No pivoting is done: A is symmetric positive definite.
//
// Per row the unit spends two cycles: ROW computes every u(i,j) of the row
// in parallel (one dot product per column), PIV divides the row by its pivot
// u(i,i) in N parallel dividers to form column i of L. Running all columns
// of a row at once is this design's choice, made to fit the solve into one
// OFDM symbol. Latency from start to done: 2*N + 1 cycles.
// ovf is set if a quotient saturated (A badly conditioned).
module ldl_decomp
  import teq_pkg::*;
#(
  parameter int unsigned N = TEQ_P + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  a   [N][N],
  output fx_t  u   [N][N],   // upper triangle, diagonal = D
  output fx_t  l   [N][N],   // strictly lower part; unit diagonal implied
  output logic busy,
  output logic done,
  output logic ovf
);
  typedef enum logic [1:0] {S_IDLE, S_ROW, S_PIV} state_t;
  state_t state;
  int     row;

  fx_t  quo  [N];
  logic qovf [N];

  for (genvar g = 0; g < int'(N); g++) begin : g_div
    fx_div u_div (
      .num (u[row][g]),
      .den (u[row][row]),
      .q   (quo[g]),
      .ovf (qovf[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= 0;
      done  <= 1'b0;
      ovf   <= 1'b0;
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          u[i][j] <= '0;
          l[i][j] <= '0;
        end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ROW;
          row   <= 0;
          ovf   <= 1'b0;
          for (int i = 0; i < int'(N); i++)
            for (int j = 0; j < int'(N); j++) begin
              u[i][j] <= '0;
              l[i][j] <= '0;
            end
        end
        S_ROW: begin
          for (int j = 0; j < int'(N); j++) begin
            if (j >= row) begin
              logic signed [23:0] s;
              s = 24'(a[row][j]);
              for (int k = 0; k < int'(N); k++)
                if (k < row) s = s - 24'(fx_mul(l[row][k], u[k][j]));
              u[row][j] <= fx_sat(64'(s));
            end
          end
          state <= S_PIV;
        end
        S_PIV: begin
          for (int j = 0; j < int'(N); j++)
            if (j > row) begin
              l[j][row] <= quo[j];
              if (qovf[j]) ovf <= 1'b1;
            end
          if (row == int'(N) - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            row   <= row + 1;
            state <= S_ROW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
