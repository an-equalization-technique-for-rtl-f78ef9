// Shared types, sizes and fixed-point helpers of the OFDM time-domain equalizer.
//
// All data words are 16-bit two's-complement Q3.13 (3 integer bits including
// the sign, 13 fraction bits), as the design uses throughout. FFT twiddle
// factors are 8-bit Q2.6. A product of two Q3.13 words is truncated (the low
// 13 bits are dropped, rounding toward minus infinity) and saturated back to
// 16 bits; saturation instead of wrap-around is a choice of this design.
//
// Default sizes are those of the reference configuration: a 15-sample channel
// impulse response (m = 14), a 7th-order TEQ (8 taps), an 8-sample cyclic
// prefix used as the shortening target and a 64-point FFT.
package teq_pkg;

  localparam int unsigned DW   = 16;  // data word width
  localparam int unsigned FRAC = 13;  // fraction bits of a data word
  localparam int unsigned TW_W = 8;   // twiddle factor width
  localparam int unsigned TW_F = 6;   // twiddle fraction bits

  localparam int unsigned H_LEN  = 15;  // channel impulse response length (m+1)
  localparam int unsigned TEQ_P  = 7;   // TEQ order p, p+1 taps
  localparam int unsigned CP_LEN = 8;   // cyclic prefix length Ng
  localparam int unsigned NFFT   = 64;  // FFT size

  typedef logic signed [DW-1:0]   fx_t;
  typedef logic signed [TW_W-1:0] tw_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cfx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } ctw_t;

  localparam fx_t FX_MAX = fx_t'(16'sh7FFF);
  localparam fx_t FX_MIN = fx_t'(16'sh8000);

  // Saturate a wide signed value to one data word.
  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'sd32767)       return FX_MAX;
    else if (v < -64'sd32768) return FX_MIN;
    else                      return fx_t'(v);
  endfunction

  // True when a wide signed value does not fit a data word.
  function automatic logic fx_ovf(input logic signed [63:0] v);
    return (v > 64'sd32767) || (v < -64'sd32768);
  endfunction

  // Q3.13 x Q3.13 -> Q3.13, truncated then saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [31:0] p;
    p = 32'(a) * 32'(b);
    return fx_sat(64'(p >>> FRAC));
  endfunction

  // Complex Q3.13 multiply, each part truncated and saturated once.
  function automatic cfx_t cfx_mul(input cfx_t a, input cfx_t b);
    logic signed [33:0] re, im;
    cfx_t r;
    re = 34'(a.re) * 34'(b.re) - 34'(a.im) * 34'(b.im);
    im = 34'(a.re) * 34'(b.im) + 34'(a.im) * 34'(b.re);
    r.re = fx_sat(64'(re >>> FRAC));
    r.im = fx_sat(64'(im >>> FRAC));
    return r;
  endfunction

endpackage
