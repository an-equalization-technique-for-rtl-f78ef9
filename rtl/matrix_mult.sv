// Builds the TEQ normal-equation matrix A = Hre^T * Hre + gamma2 * I.
//
// Hre is the convolution matrix of the channel h (M+1 samples) with a
// (P+1)-tap filter, with rows 2 .. NG+1 removed, so A only penalises the
// effective-channel energy that falls outside the first NG+1 samples. A is
// symmetric and Toeplitz-like: a(i+1,j+1) = a(i,j) + h[NG-i]*h[NG-j]
// (0-based), except that a(0,0) also holds h0^2. The unit therefore runs one
// multiply-accumulate lane per diagonal d = j-i (P+1 lanes). Each lane walks
// r = M, M-1, ... and adds h[r]*h[r-d]. After r = NG+1 the lane holds the
// first-row element a(0,d); every further step (r = NG, NG-1, ...) yields the
// next element a(i,i+d) down that diagonal, so one multiply and one add per
// element, as the design intends. gamma2 is added on the main diagonal.
//
// For P > NG+1 the walk continues below r = 0, where the channel reads as
// zero, until the last main-diagonal element a(P,P) is done.
//
// Timing: start is sampled in IDLE; the run takes M-NG+P cycles (13 with the
// defaults); done pulses for one cycle when A is complete and A holds its
// value until the next start. Each product is truncated to Q3.13 before it is
// accumulated; sums saturate.
module matrix_mult
  import teq_pkg::*;
#(
  parameter int unsigned M  = H_LEN - 1,  // channel order (samples - 1)
  parameter int unsigned P  = TEQ_P,      // TEQ order
  parameter int unsigned NG = CP_LEN      // samples kept free of the penalty
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  h      [M+1],
  input  fx_t  gamma2,
  output fx_t  a      [P+1][P+1],
  output logic busy,
  output logic done
);
  localparam int R_LAST = int'(NG) + 1 - int'(P);
  initial assert (M >= NG + 1)
    else $error("matrix_mult: needs M >= NG+1");

  logic signed [19:0] acc [P+1];
  int                 r;
  fx_t                h0sq;

  assign h0sq = fx_mul(h[0], h[0]);

  function automatic fx_t hs(input int idx);
    if (idx < 0 || idx > int'(M)) return '0;
    return h[idx];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      r    <= 0;
      for (int d = 0; d <= int'(P); d++) acc[d] <= '0;
      for (int i = 0; i <= int'(P); i++)
        for (int j = 0; j <= int'(P); j++) a[i][j] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          r    <= int'(M);
          for (int d = 0; d <= int'(P); d++) acc[d] <= '0;
        end
      end else begin
        for (int d = 0; d <= int'(P); d++) begin
          logic signed [19:0] nxt;
          int                 i;
          fx_t                v;
          nxt = acc[d] + 20'(fx_mul(hs(r), hs(r - d)));
          acc[d] <= nxt;
          if (r <= int'(NG) + 1) begin
            i = int'(NG) + 1 - r;
            if (i + d <= int'(P)) begin
              if (d == 0)
                v = fx_sat(64'(nxt) + 64'(gamma2) + ((i == 0) ? 64'(h0sq) : 64'sd0));
              else
                v = fx_sat(64'(nxt));
              a[i][i+d] <= v;
              a[i+d][i] <= v;
            end
          end
        end
        if (r == R_LAST) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          r <= r - 1;
        end
      end
    end
  end
endmodule
