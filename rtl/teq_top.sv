// Time-domain equalizer with zero-forcing compensation for an OFDM receiver
// (IEEE 802.11a numerology: 64-point FFT, 8-sample cyclic prefix target).
//
// A setup pass, started with start once the channel response h is known:
//   1. teq_solver finds the TEQ taps w that squeeze h*w into the prefix;
//   2. the taps are loaded into teq_fir, which then filters the received
//      sample stream (rx_*), shortening the channel seen by the receiver;
//   3. p2s_loader sends h, then w, zero padded, as two back-to-back frames
//      through fft64_r4mdc;
//   4. zfe_coef multiplies FFT(h) by FFT(w) and inverts each bin, giving the
//      zero-forcing coefficients; ready then rises;
//   5. zfe_apply multiplies each demodulated sub-carrier (sc_*) by its
//      coefficient.
// The controller (an FSM here) sequences steps 1-4. Setup takes about 270
// cycles with the defaults; the coefficient solve itself 49.
// The OFDM demodulator between the TEQ output and the sub-carrier input
// (prefix removal and the receive FFT) is outside this block, as is the
// channel estimator that supplies h.
module teq_top
  import teq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // setup
  input  logic       start,
  input  fx_t        h_in [H_LEN],
  input  fx_t        gamma2,
  output fx_t        w_out [TEQ_P+1],
  output logic       busy,
  output logic       ready,
  output logic       solve_done,
  output logic       solve_ovf,
  output logic       fft_ovf,
  output logic       zfe_ovf,
  // received time-domain samples through the TEQ filter
  input  logic       rx_valid,
  input  fx_t        rx_x,
  output logic       teq_valid,
  output fx_t        teq_y,
  output logic       teq_carry,
  // demodulated sub-carriers through the zero-forcing equalizer
  input  logic       sc_valid,
  input  logic [5:0] sc_idx,
  input  cfx_t       sc_data,
  output logic       eq_valid,
  output logic [5:0] eq_idx,
  output cfx_t       eq_out
);
  typedef enum logic [2:0] {C_IDLE, C_SOLVE, C_FFT_H, C_FFT_W, C_WAIT} ctl_t;
  ctl_t ctl;

  // ---------------- coefficient solver ----------------
  logic solver_en, solver_busy;
  teq_solver u_solver (
    .clk, .rst_n, .enable(solver_en), .h(h_in), .gamma2, .w(w_out),
    .busy(solver_busy), .done(solve_done), .ovf(solve_ovf)
  );

  // ---------------- TEQ FIR ----------------
  teq_fir u_fir (
    .clk, .rst_n, .load(solve_done), .w_in(w_out),
    .in_valid(rx_valid), .x(rx_x),
    .out_valid(teq_valid), .y(teq_y), .carry(teq_carry)
  );

  // ---------------- parallel-to-serial and FFT ----------------
  fx_t  p2s_vec [H_LEN];
  logic p2s_start, p2s_v, p2s_busy, p2s_done;
  cfx_t p2s_d;

  // the loader captures h when started from C_SOLVE, the taps from C_FFT_H
  always_comb begin
    for (int i = 0; i < int'(H_LEN); i++)
      p2s_vec[i] = (ctl == C_SOLVE) ? h_in[i] : ((i <= int'(TEQ_P)) ? w_out[i] : '0);
  end

  p2s_loader u_p2s (
    .clk, .rst_n, .start(p2s_start), .vec(p2s_vec),
    .out_valid(p2s_v), .dout(p2s_d), .busy(p2s_busy), .done(p2s_done)
  );

  logic       f_v, f_sop;
  logic [5:0] f_idx;
  cfx_t       f_x;
  fft64_r4mdc u_fft (
    .clk, .rst_n, .in_valid(p2s_v), .xin(p2s_d),
    .out_valid(f_v), .out_sop(f_sop), .out_idx(f_idx), .xout(f_x), .ovf(fft_ovf)
  );

  // ---------------- zero-forcing equalizer ----------------
  logic zsel;
  cfx_t coef [64];
  logic zready;
  zfe_coef u_zcoef (
    .clk, .rst_n, .in_valid(f_v), .sel(zsel), .in_idx(f_idx), .din(f_x),
    .coef, .ready(zready), .ovf(zfe_ovf)
  );

  zfe_apply u_zapply (
    .clk, .rst_n, .coef, .in_valid(sc_valid), .in_idx(sc_idx), .din(sc_data),
    .out_valid(eq_valid), .out_idx(eq_idx), .dout(eq_out)
  );

  // ---------------- setup controller ----------------
  assign solver_en = (ctl == C_IDLE) && start;
  assign p2s_start = (ctl == C_SOLVE && solve_done) || (ctl == C_FFT_H && p2s_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl   <= C_IDLE;
      zsel  <= 1'b0;
      ready <= 1'b0;
    end else begin
      // the first FFT frame after a start is FFT(h), the second FFT(w)
      if (f_v && f_idx == 6'd63) zsel <= ~zsel;
      case (ctl)
        C_IDLE: if (start) begin
          ctl   <= C_SOLVE;
          ready <= 1'b0;
          zsel  <= 1'b0;
        end
        C_SOLVE: if (solve_done)  ctl <= C_FFT_H;
        C_FFT_H: if (p2s_done)    ctl <= C_FFT_W;
        C_FFT_W: if (p2s_done)    ctl <= C_WAIT;
        C_WAIT:  if (zready) begin
          ctl   <= C_IDLE;
          ready <= 1'b1;
        end
        default: ctl <= C_IDLE;
      endcase
    end
  end

  assign busy = (ctl != C_IDLE);

  // the FFT must only ever see the setup frames
  assert property (@(posedge clk) disable iff (!rst_n) (p2s_busy | solver_busy) |-> busy);
  // bins reach zfe_coef in natural order
  assert property (@(posedge clk) disable iff (!rst_n) f_sop |-> (f_v && f_idx == 6'd0));
endmodule
