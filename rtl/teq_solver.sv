// TEQ coefficient solver: optimum MMSE time-domain equalizer taps.
//
// Given the channel impulse response h (M+1 samples, 15 by default) it finds the P+1 taps w
// that make the effective channel h*w as close as possible to [1, X.., 0..]:
// a leading 1, anything inside the cyclic prefix, zeros after it. That is
// w = (Hre^T Hre + gamma2 I)^-1 Hre^T d with d = [1,0,...,0], Hre being the
// convolution matrix of h with the rows that fall inside the prefix removed.
// The solver never inverts a matrix. The chain is:
//   matrix_mult  A = Hre^T Hre + gamma2 I  (diagonal-increment rule)
//   ldl_decomp   A = L*U, U = D*L^T, dividing by each pivot
//   fwd_subst    L y = B, B = Hre^T d = [h0, 0, ..., 0]
//   bwd_subst    U w = y
// gamma2 = 1/SNR regularises A for a noisy channel; 0 gives the noise-free
// solution. Interface: raise enable for one cycle (or hold it) while idle;
// busy is high while solving; done pulses once and w then holds the taps.
// With the defaults the solve takes 49 cycles from enable to done, within
// the 55-cycle budget the design sets for one OFDM symbol at 16 MHz.
module teq_solver
  import teq_pkg::*;
#(
  parameter int unsigned M  = H_LEN - 1,
  parameter int unsigned P  = TEQ_P,
  parameter int unsigned NG = CP_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  fx_t  h      [M+1],
  input  fx_t  gamma2,
  output fx_t  w      [P+1],
  output logic busy,
  output logic done,
  output logic ovf
);
  localparam int unsigned N = P + 1;

  fx_t  a   [N][N];
  fx_t  u   [N][N];
  fx_t  l   [N][N];
  fx_t  y   [N];
  fx_t  b   [N];
  logic mm_busy, mm_done, ld_busy, ld_done, fw_busy, fw_done, bw_busy, bw_done;
  logic run, ld_ovf, bw_ovf;

  always_comb begin
    for (int i = 0; i < int'(N); i++) b[i] = '0;
    b[0] = h[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              run <= 1'b0;
    else if (enable && !run) run <= 1'b1;
    else if (bw_done)        run <= 1'b0;
  end

  matrix_mult #(.M(M), .P(P), .NG(NG)) u_mm (
    .clk, .rst_n, .start(enable && !run), .h, .gamma2, .a,
    .busy(mm_busy), .done(mm_done)
  );

  ldl_decomp #(.N(N)) u_ldl (
    .clk, .rst_n, .start(mm_done), .a, .u, .l,
    .busy(ld_busy), .done(ld_done), .ovf(ld_ovf)
  );

  fwd_subst #(.N(N)) u_fwd (
    .clk, .rst_n, .start(ld_done), .l, .b, .y,
    .busy(fw_busy), .done(fw_done)
  );

  bwd_subst #(.N(N)) u_bwd (
    .clk, .rst_n, .start(fw_done), .u, .y, .w,
    .busy(bw_busy), .done(bw_done), .ovf(bw_ovf)
  );

  assign busy = run;

  // every unit works only inside a solve
  assert property (@(posedge clk) disable iff (!rst_n)
                   (mm_busy | ld_busy | fw_busy | bw_busy) |-> run);
  assign ovf  = ld_ovf | bw_ovf;
  assign done = bw_done;
endmodule
