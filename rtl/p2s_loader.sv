// Parallel-to-serial loader for the FFT.
//
// Turns a vector of LEN real Q3.13 values (the channel response h or the TEQ
// taps w) into one 64-sample complex frame: sample n is vec[n] for n < LEN
// and zero afterwards, imaginary parts zero. The vector is captured when
// start is seen while idle, then one sample per cycle leaves for 64 cycles
// with out_valid; done pulses with the last sample.
module p2s_loader
  import teq_pkg::*;
#(
  parameter int unsigned LEN = H_LEN,
  parameter int unsigned NPT = NFFT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  vec [LEN],
  output logic out_valid,
  output cfx_t dout,
  output logic busy,
  output logic done
);
  fx_t buf_q [LEN];
  int  idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
      idx       <= 0;
      for (int i = 0; i < int'(LEN); i++) buf_q[i] <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          idx  <= 0;
          for (int i = 0; i < int'(LEN); i++) buf_q[i] <= vec[i];
        end
      end else begin
        out_valid <= 1'b1;
        dout.im   <= '0;
        dout.re   <= (idx < int'(LEN)) ? buf_q[idx] : '0;
        if (idx == int'(NPT) - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx + 1;
        end
      end
    end
  end
endmodule
