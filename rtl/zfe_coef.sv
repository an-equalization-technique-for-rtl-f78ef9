// Zero-forcing equalizer coefficient unit.
//
// The effective channel after the TEQ is h*w, so its spectrum is
// Heff(k) = FFT(h)(k) * FFT(w)(k). This unit receives the two 64-bin spectra
// from the FFT, one after the other (sel = 0 while FFT(h) arrives, sel = 1
// while FFT(w) arrives, each bin tagged with its index), stores FFT(h), and
// as each FFT(w) bin arrives forms Heff(k) and its inverse
//   C(k) = 1/Heff(k) = conj(Heff(k)) / |Heff(k)|^2
// with two dividers. |Heff|^2 is kept at full Q6.26 precision so a large
// gain does not overflow before the division. Two pipeline cycles per bin,
// one bin per cycle; ready rises after bin 63 of FFT(w) and stays high until
// the next FFT(h) frame begins. Coefficients saturate at the Q3.13 range;
// ovf records that a bin saturated (a near-null of the effective channel).
module zfe_coef
  import teq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       sel,
  input  logic [5:0] in_idx,
  input  cfx_t       din,
  output cfx_t       coef [64],
  output logic       ready,
  output logic       ovf
);
  cfx_t       hbuf [64];
  cfx_t       heff;
  logic       p_v;
  logic [5:0] p_idx;

  logic signed [33:0] mag2;
  fx_t                cre, cim;
  logic               ore, oim;

  always_comb begin
    mag2 = 34'(heff.re) * 34'(heff.re) + 34'(heff.im) * 34'(heff.im);
  end

  fx_div #(.NUM_W(16), .DEN_W(34), .SHIFT(26), .OUT_W(16)) u_div_re (
    .num(heff.re), .den(mag2), .q(cre), .ovf(ore));
  fx_div #(.NUM_W(17), .DEN_W(34), .SHIFT(26), .OUT_W(16)) u_div_im (
    .num(-17'(heff.im)), .den(mag2), .q(cim), .ovf(oim));

  always_ff @(posedge clk) begin
    if (in_valid && !sel) hbuf[in_idx] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      heff  <= '0;
      p_v   <= 1'b0;
      p_idx <= '0;
      ready <= 1'b0;
      ovf   <= 1'b0;
      for (int k = 0; k < 64; k++) coef[k] <= '0;
    end else begin
      p_v <= in_valid && sel;
      if (in_valid && sel) begin
        heff  <= cfx_mul(hbuf[in_idx], din);
        p_idx <= in_idx;
      end
      if (in_valid && !sel && in_idx == 6'd0) begin
        ready <= 1'b0;
        ovf   <= 1'b0;
      end
      if (p_v) begin
        coef[p_idx] <= '{re: cre, im: cim};
        if (ore || oim) ovf <= 1'b1;
        if (p_idx == 6'd63) ready <= 1'b1;
      end
    end
  end
endmodule
