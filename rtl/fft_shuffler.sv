// Output shuffler of the 64-point R4MDC FFT.
//
// The last arithmetic element delivers the spectrum four bins per cycle in
// digit-reversed order: during the c-th output cycle of a frame
// (c = 4*p + q, c = 0..15) its line k carries bin X(16*k + 4*q + p). The
// shuffler writes those bins into one half of a two-bank buffer at their
// natural addresses and, once the 16 cycles of a frame are in, streams the
// bank out one bin per cycle in natural order 0..63 while the other bank
// takes the next frame (ping-pong), so frames can follow each other without
// a pause. dout is registered: bin 0 appears two cycles after the last write
// of its frame, flagged by out_sop; out_idx is the bin number.
module fft_shuffler
  import teq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cfx_t       din [4],
  output logic       out_valid,
  output logic       out_sop,
  output logic [5:0] out_idx,
  output cfx_t       dout
);
  cfx_t       mem [2][64];
  logic [3:0] wcnt;
  logic       wbank, rbank, rd_act;
  logic [5:0] raddr;

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int k = 0; k < 4; k++)
        mem[wbank][{2'(k), wcnt[1:0], wcnt[3:2]}] <= din[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      rd_act    <= 1'b0;
      raddr     <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_idx   <= '0;
      dout      <= '0;
    end else begin
      if (in_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == 4'd15) begin
          wbank  <= ~wbank;
          rbank  <= wbank;
          rd_act <= 1'b1;
          raddr  <= '0;
        end
      end
      if (rd_act && !(in_valid && wcnt == 4'd15)) begin
        raddr <= raddr + 1'b1;
        if (raddr == 6'd63) rd_act <= 1'b0;
      end
      out_valid <= rd_act;
      out_sop   <= rd_act && raddr == 6'd0;
      out_idx   <= raddr;
      if (rd_act) dout <= mem[rbank][raddr];
    end
  end
endmodule
