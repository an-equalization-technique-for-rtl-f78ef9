// Arithmetic element of one radix-4 decimation-in-frequency FFT stage.
//
// Takes four complex samples x0..x3 that are N/4 apart in the sub-sequence
// the stage works on, forms the radix-4 butterfly ("dragonfly")
//   y0 = x0 + x1 + x2 + x3        y1 = x0 - j x1 - x2 + j x3
//   y2 = x0 - x1 + x2 - x3        y3 = x0 + j x1 - x2 - j x3
// using only additions (a product with -j swaps real and imaginary parts)
// and then multiplies output p by its twiddle factor tw[p] (Q2.6). Output 0
// needs no product and passes tw[0] unused; the last stage gives all four
// twiddles as 1. Results are truncated to Q3.13 and saturated, and ovf
// flags a saturation. One register stage: outputs one cycle after in_valid.
module r4_ae
  import teq_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cfx_t x  [4],
  input  ctw_t tw [4],
  output logic out_valid,
  output cfx_t y  [4],
  output logic ovf
);
  typedef logic signed [19:0] acc_t;

  acc_t br [4], bi [4];
  cfx_t yn [4];
  logic on [4];

  always_comb begin
    br[0] = acc_t'(x[0].re) + acc_t'(x[1].re) + acc_t'(x[2].re) + acc_t'(x[3].re);
    bi[0] = acc_t'(x[0].im) + acc_t'(x[1].im) + acc_t'(x[2].im) + acc_t'(x[3].im);
    // -j*(a+jb) = b - ja ; +j*(a+jb) = -b + ja
    br[1] = acc_t'(x[0].re) + acc_t'(x[1].im) - acc_t'(x[2].re) - acc_t'(x[3].im);
    bi[1] = acc_t'(x[0].im) - acc_t'(x[1].re) - acc_t'(x[2].im) + acc_t'(x[3].re);
    br[2] = acc_t'(x[0].re) - acc_t'(x[1].re) + acc_t'(x[2].re) - acc_t'(x[3].re);
    bi[2] = acc_t'(x[0].im) - acc_t'(x[1].im) + acc_t'(x[2].im) - acc_t'(x[3].im);
    br[3] = acc_t'(x[0].re) - acc_t'(x[1].im) - acc_t'(x[2].re) + acc_t'(x[3].im);
    bi[3] = acc_t'(x[0].im) + acc_t'(x[1].re) - acc_t'(x[2].im) - acc_t'(x[3].re);

    for (int p = 0; p < 4; p++) begin
      logic signed [31:0] pr, pi;
      if (p == 0) begin
        pr = 32'(br[p]) <<< TW_F;
        pi = 32'(bi[p]) <<< TW_F;
      end else begin
        pr = 32'(br[p]) * 32'(tw[p].re) - 32'(bi[p]) * 32'(tw[p].im);
        pi = 32'(br[p]) * 32'(tw[p].im) + 32'(bi[p]) * 32'(tw[p].re);
      end
      yn[p].re = fx_sat(64'(pr >>> TW_F));
      yn[p].im = fx_sat(64'(pi >>> TW_F));
      on[p]    = fx_ovf(64'(pr >>> TW_F)) | fx_ovf(64'(pi >>> TW_F));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ovf       <= 1'b0;
      for (int p = 0; p < 4; p++) y[p] <= '0;
    end else begin
      out_valid <= in_valid;
      ovf       <= in_valid & (on[0] | on[1] | on[2] | on[3]);
      if (in_valid)
        for (int p = 0; p < 4; p++) y[p] <= yn[p];
    end
  end
endmodule
