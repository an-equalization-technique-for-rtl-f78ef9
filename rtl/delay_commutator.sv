// Four-path delay commutator between two stages of the R4MDC pipeline FFT.
//
// The previous stage delivers four parallel streams; each is a run of four
// blocks of D samples (block b of line p). The next stage needs block p of
// every line side by side, i.e. the 4x4 array of blocks transposed. The
// commutator does this the classic way, without memory addressing:
//   1. line p is delayed by p*D samples,
//   2. a 4x4 switch, stepped every D cycles, sends input line p to output
//      line (t - p) mod 4, t being the block time since the group began,
//   3. output line q is delayed by (3-q)*D samples, plus one output register
//      common to all lines.
// Block b of input line p leaves on line b at block time p+3, so out_valid is
// in_valid delayed by 3*D+1 cycles. Groups of 4*D valid cycles may follow each
// other back to back or with a pause of at least 3*D cycles (the switch is
// still draining the previous group during that time); the block counter
// restarts on each rising edge of in_valid. Delays are shift registers that move every cycle.
module delay_commutator
  import teq_pkg::*;
#(
  parameter int unsigned D = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cfx_t din  [4],
  output logic out_valid,
  output cfx_t dout [4]
);
  localparam int unsigned CW = $clog2(4 * D) + 1;

  // input delays: line p uses p*D stages (line 0 none)
  cfx_t dly_in  [4][3*D+1];
  // output delays: line q uses (3-q)*D stages (line 3 none)
  cfx_t dly_out [4][3*D+1];
  cfx_t sw_in   [4];
  cfx_t sw_out  [4];
  logic [3*D+1:0] vpipe;
  logic         in_valid_q;
  logic [CW-1:0] cnt;
  logic [1:0]    tb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid_q <= 1'b0;
      cnt        <= '0;
      vpipe      <= '0;
    end else begin
      in_valid_q <= in_valid;
      vpipe      <= {vpipe[3*D:0], in_valid};
      if (in_valid && !in_valid_q) cnt <= CW'(1);
      else if (cnt == CW'(4 * D - 1)) cnt <= '0;
      else cnt <= cnt + 1'b1;
    end
  end

  // block time at the switch for the current cycle
  always_comb begin
    if (in_valid && !in_valid_q) tb = 2'd0;
    else                         tb = 2'((int'(cnt) / int'(D)) % 4);
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      dly_in[p][0]  <= din[p];
      dly_out[p][0] <= sw_out[p];
      for (int s = 1; s <= 3 * int'(D); s++) begin
        dly_in[p][s]  <= dly_in[p][s-1];
        dly_out[p][s] <= dly_out[p][s-1];
      end
    end
  end

  always_comb begin
    sw_in[0] = din[0];
    for (int p = 1; p < 4; p++) sw_in[p] = dly_in[p][p*int'(D)-1];
    for (int q = 0; q < 4; q++) sw_out[q] = '0;
    for (int p = 0; p < 4; p++) sw_out[2'(tb - 2'(p))] = sw_in[p];
    for (int q = 0; q < 4; q++) dout[q] = dly_out[q][(3-q)*int'(D)];
  end

  assign out_valid = vpipe[3*D];
endmodule
