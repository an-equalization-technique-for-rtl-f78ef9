// Zero-forcing equalization of the received sub-carriers.
//
// Each demodulated sub-carrier Y(k) is multiplied by the coefficient
// C(k) = 1/Heff(k) computed by zfe_coef, undoing the amplitude and phase of
// the shortened channel. The caller supplies the sub-carrier index with each
// value. Complex Q3.13 product, truncated and saturated; registered, one
// cycle from in_valid to out_valid.
module zfe_apply
  import teq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cfx_t       coef [64],
  input  logic       in_valid,
  input  logic [5:0] in_idx,
  input  cfx_t       din,
  output logic       out_valid,
  output logic [5:0] out_idx,
  output cfx_t       dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx <= in_idx;
        dout    <= cfx_mul(din, coef[in_idx]);
      end
    end
  end
endmodule
