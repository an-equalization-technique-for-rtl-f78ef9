// Testbench of fft64_r4mdc: feeds frames back to back (a zero-padded
// channel response, an impulse, a tone and random data), compares every
// output bin with a double-precision DFT and checks the 85-cycle delay from
// a frame's first sample to its bin 0 and the 64-cycle frame period.
module tb_fft64_r4mdc;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  localparam int NFR = 5;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  cfx_t       xin;
  logic       out_valid, out_sop, ovf;
  logic [5:0] out_idx;
  cfx_t       xout;
  int         checks = 0, failures = 0;
  real        fr [NFR][64], fi [NFR][64];
  int         cyc = 0, t_first [NFR], t_sop [NFR];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fft64_r4mdc dut (.clk, .rst_n, .in_valid, .xin, .out_valid, .out_sop, .out_idx, .xout, .ovf);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real h[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < 64; n++) begin
        case (f)
          0: begin fr[f][n] = (n < 15) ? h[n] : 0.0; fi[f][n] = 0.0; end
          1: begin fr[f][n] = (n == 3) ? 1.0 : 0.0; fi[f][n] = 0.0; end
          2: begin
               fr[f][n] = 0.05 * $cos(2.0 * 3.14159265358979 * 5.0 * n / 64.0);
               fi[f][n] = 0.05 * $sin(2.0 * 3.14159265358979 * 5.0 * n / 64.0);
             end
          default: begin
               fr[f][n] = (real'($urandom_range(0, 2000)) - 1000.0) / 20000.0;
               fi[f][n] = (real'($urandom_range(0, 2000)) - 1000.0) / 20000.0;
             end
        endcase
        fr[f][n] = to_r(to_fx(fr[f][n]));
        fi[f][n] = to_r(to_fx(fi[f][n]));
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < 64; n++) begin
        if (n == 0) t_first[f] = cyc;
        in_valid = 1;
        xin.re = to_fx(fr[f][n]);
        xin.im = to_fx(fi[f][n]);
        @(negedge clk);
      end
    in_valid = 0;
  end

  initial begin
    int f = 0;
    while (f < NFR) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        real er, ei, tol;
        int  k;
        k = int'(out_idx);
        if (out_sop) t_sop[f] = cyc;
        dft64(fr[f], fi[f], k, er, ei);
        tol = 0.03 + 0.02 * (absr(er) + absr(ei));
        checks++;
        if (absr(to_r(xout.re) - er) > tol || absr(to_r(xout.im) - ei) > tol) begin
          failures++;
          $display("FAIL frame %0d bin %0d: got %f,%f expected %f,%f", f, k,
                   to_r(xout.re), to_r(xout.im), er, ei);
        end
        if (k == 63) f++;
      end
    end
    for (int g = 0; g < NFR; g++) begin
      checks++;
      if (t_sop[g] - t_first[g] != 85) begin
        failures++;
        $display("FAIL frame %0d latency %0d", g, t_sop[g] - t_first[g]);
      end
    end
    $display("latency %0d cycles", t_sop[0] - t_first[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
