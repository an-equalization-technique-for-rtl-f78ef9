// Forward substitution L * y = b for a unit lower-triangular L.
//
// y(0) = b(0) and y(i) = b(i) - sum_{j<i} l(i,j)*y(j). For the TEQ the right
// side is b = Hre^T * d = [h0, 0, ..., 0], so y(0) = h0 and the later terms
// reduce to minus the dot product; the unit still takes a general b.
// One row per cycle: the dot product of a row is formed in parallel, so the
// result is ready N cycles after start, with a one-cycle done pulse.
// Products are truncated to Q3.13; sums saturate.
module fwd_subst
  import teq_pkg::*;
#(
  parameter int unsigned N = TEQ_P + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  l [N][N],
  input  fx_t  b [N],
  output fx_t  y [N],
  output logic busy,
  output logic done
);
  int row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      row  <= 0;
      for (int i = 0; i < int'(N); i++) y[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          row  <= 0;
        end
      end else begin
        logic signed [23:0] s;
        s = 24'(b[row]);
        for (int j = 0; j < int'(N); j++)
          if (j < row) s = s - 24'(fx_mul(l[row][j], y[j]));
        y[row] <= fx_sat(64'(s));
        if (row == int'(N) - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row + 1;
        end
      end
    end
  end
endmodule
