// Time-domain equalizer FIR filter, y(n) = sum_{i=0..P} w(i) * x(n-i).
//
// Direct form: a shift register holds the last P+1 input samples and P+1
// multipliers feed one adder tree. The taps are written all at once with
// load (from the coefficient solver) and take effect on the next sample.
// Samples and taps are Q3.13; each product is truncated to Q3.13, the sum is
// kept wide and saturated to 16 bits, and carry is raised for a sample whose
// sum did not fit (the overflow pin of the filter). One sample per cycle;
// y and carry are registered, one cycle after in_valid. The filter is
// real-valued; a complex baseband uses one filter per rail.
module teq_fir
  import teq_pkg::*;
#(
  parameter int unsigned P = TEQ_P
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  fx_t  w_in [P+1],
  input  logic in_valid,
  input  fx_t  x,
  output logic out_valid,
  output fx_t  y,
  output logic carry
);
  fx_t w   [P+1];
  fx_t tap [P+1];   // tap[0] = x(n), tap[i] = x(n-i)
  fx_t dly [P];     // x(n-1) .. x(n-P)
  logic signed [19:0] sum;

  always_comb begin
    tap[0] = x;
    for (int i = 1; i <= int'(P); i++) tap[i] = dly[i-1];
    sum = '0;
    for (int i = 0; i <= int'(P); i++) sum = sum + 20'(fx_mul(tap[i], w[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(P); i++) w[i] <= '0;
      for (int i = 0; i < int'(P); i++) dly[i] <= '0;
      out_valid <= 1'b0;
      y         <= '0;
      carry     <= 1'b0;
    end else begin
      if (load) for (int i = 0; i <= int'(P); i++) w[i] <= w_in[i];
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= x;
        for (int i = 1; i < int'(P); i++) dly[i] <= dly[i-1];
        y     <= fx_sat(64'(sum));
        carry <= fx_ovf(64'(sum));
      end
    end
  end
endmodule
