// Backward substitution U * w = y for an upper-triangular U.
//
// w(N-1) = y(N-1)/u(N-1,N-1) and w(i) = (y(i) - sum_{j>i} u(i,j)*w(j)) /
// u(i,i), i = N-2 .. 0. Because U = D*L^T already carries the diagonal of
// the LDL^T factorisation, this one pass replaces the separate diagonal and
// L^T steps. One fixed-point divider forms the quotient of each row.
// One row per cycle, last row first; w is complete N cycles after start,
// with a one-cycle done pulse. Products truncate to Q3.13; sums saturate.
// ovf is set if a quotient saturated.
module bwd_subst
  import teq_pkg::*;
#(
  parameter int unsigned N = TEQ_P + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  u   [N][N],
  input  fx_t  y   [N],
  output fx_t  w   [N],
  output logic busy,
  output logic done,
  output logic ovf
);
  int   row;
  fx_t  num, quo;
  logic qovf;

  always_comb begin
    logic signed [23:0] s;
    s = 24'(y[row]);
    for (int j = 0; j < int'(N); j++)
      if (j > row) s = s - 24'(fx_mul(u[row][j], w[j]));
    num = fx_sat(64'(s));
  end

  fx_div u_div (.num(num), .den(u[row][row]), .q(quo), .ovf(qovf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      ovf  <= 1'b0;
      row  <= 0;
      for (int i = 0; i < int'(N); i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ovf  <= 1'b0;
          row  <= int'(N) - 1;
        end
      end else begin
        w[row] <= quo;
        if (qovf) ovf <= 1'b1;
        if (row == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row - 1;
        end
      end
    end
  end
endmodule
