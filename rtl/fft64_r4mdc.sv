// 64-point radix-4 decimation-in-frequency FFT, multi-path delay commutator
// (R4MDC) pipeline.
//
// Three radix-4 stages (log4 64). Each stage is a delay commutator that puts
// the right four samples side by side, and an arithmetic element (butterfly
// plus twiddle products):
//   stage 1: the single input path is tapped at delays 0, 16, 32 and 48, so
//            x(n), x(n+16), x(n+32), x(n+48) meet for n = 0..15; twiddles
//            W64^(p*n) on butterfly output p.
//   stage 2: delay_commutator with D = 4; twiddles W64^(4*q*m), m = 0..3.
//   stage 3: delay_commutator with D = 1; all twiddles are 1.
// Twiddles come from twiddle_rom (8-bit Q2.6). The arithmetic elements run
// 16 of every 64 cycles, the 25% use typical of R4MDC. fft_shuffler returns
// the digit-reversed result to natural order through a ping-pong buffer, so
// 64-sample frames may be fed back to back.
//
// Interface: one complex Q3.13 sample per cycle with in_valid; a frame is 64
// consecutive valid samples (the first after reset is sample 0). The
// spectrum leaves in natural order, bin 0 flagged by out_sop, 85 cycles
// after the frame's first sample went in (the last result bin 148 cycles
// after it). The unscaled forward DFT X(k) = sum x(n) W64^(nk) is computed;
// values saturate at the Q3.13 range and ovf reports any saturation.
module fft64_r4mdc
  import teq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cfx_t       xin,
  output logic       out_valid,
  output logic       out_sop,
  output logic [5:0] out_idx,
  output cfx_t       xout,
  output logic       ovf
);
  // ---------------- stage 1 ----------------
  cfx_t       sr [48];           // input delay line, sr[0] = newest
  logic [5:0] cnt_in;            // sample index within the frame
  logic       ae1_v;
  cfx_t       ae1_x [4];
  ctw_t       ae1_tw [4];
  logic [3:0] n1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_in <= '0;
    else if (in_valid) cnt_in <= cnt_in + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sr[0] <= xin;
      for (int i = 1; i < 48; i++) sr[i] <= sr[i-1];
    end
  end

  assign ae1_v    = in_valid && cnt_in >= 6'd48;
  assign n1       = cnt_in[3:0];
  assign ae1_x[0] = sr[47];
  assign ae1_x[1] = sr[31];
  assign ae1_x[2] = sr[15];
  assign ae1_x[3] = xin;

  assign ae1_tw[0] = '{re: 8'sd64, im: 8'sd0};
  for (genvar p = 1; p < 4; p++) begin : g_tw1
    twiddle_rom u_rom (.k(6'(p * n1)), .w(ae1_tw[p]));
  end

  logic s1_v, s1_ovf;
  cfx_t s1_y [4];
  r4_ae u_ae1 (.clk, .rst_n, .in_valid(ae1_v), .x(ae1_x), .tw(ae1_tw),
               .out_valid(s1_v), .y(s1_y), .ovf(s1_ovf));

  // ---------------- stage 2 ----------------
  logic c2_v;
  cfx_t c2_y [4];
  delay_commutator #(.D(4)) u_dc2 (.clk, .rst_n, .in_valid(s1_v), .din(s1_y),
                                   .out_valid(c2_v), .dout(c2_y));

  logic [3:0] cnt2;
  ctw_t       ae2_tw [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt2 <= '0;
    else if (c2_v) cnt2 <= cnt2 + 1'b1;
  end

  assign ae2_tw[0] = '{re: 8'sd64, im: 8'sd0};
  for (genvar q = 1; q < 4; q++) begin : g_tw2
    twiddle_rom u_rom (.k(6'(4 * q * int'(cnt2[1:0]))), .w(ae2_tw[q]));
  end

  logic s2_v, s2_ovf;
  cfx_t s2_y [4];
  r4_ae u_ae2 (.clk, .rst_n, .in_valid(c2_v), .x(c2_y), .tw(ae2_tw),
               .out_valid(s2_v), .y(s2_y), .ovf(s2_ovf));

  // ---------------- stage 3 ----------------
  logic c3_v;
  cfx_t c3_y [4];
  delay_commutator #(.D(1)) u_dc3 (.clk, .rst_n, .in_valid(s2_v), .din(s2_y),
                                   .out_valid(c3_v), .dout(c3_y));

  ctw_t ae3_tw [4];
  always_comb for (int i = 0; i < 4; i++) ae3_tw[i] = '{re: 8'sd64, im: 8'sd0};

  logic s3_v, s3_ovf;
  cfx_t s3_y [4];
  r4_ae u_ae3 (.clk, .rst_n, .in_valid(c3_v), .x(c3_y), .tw(ae3_tw),
               .out_valid(s3_v), .y(s3_y), .ovf(s3_ovf));

  // ---------------- output shuffler ----------------
  fft_shuffler u_shuf (.clk, .rst_n, .in_valid(s3_v), .din(s3_y),
                       .out_valid, .out_sop, .out_idx, .dout(xout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ovf <= 1'b0;
    else        ovf <= s1_ovf | s2_ovf | s3_ovf;
  end
endmodule
