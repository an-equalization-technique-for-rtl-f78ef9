// Testbench of p2s_loader: loads random 15-element vectors and checks the
// 64-sample frame (vector then zeros, imaginary zero), contiguity and done.
module tb_p2s_loader;
  import teq_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  vec [15];
  logic out_valid, busy, done;
  cfx_t dout;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  p2s_loader dut (.clk, .rst_n, .start, .vec, .out_valid, .dout, .busy, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      fx_t ref_v [15];
      int  n;
      for (int i = 0; i < 15; i++) begin
        vec[i]   = fx_t'($urandom);
        ref_v[i] = vec[i];
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < 15; i++) vec[i] = '0;   // captured already
      n = 0;
      while (!out_valid) @(negedge clk);
      while (out_valid) begin
        checks++;
        if (dout.re != ((n < 15) ? ref_v[n] : fx_t'(0)) || dout.im != 0) begin
          failures++;
          $display("FAIL sample %0d = %0d", n, dout.re);
        end
        if (n == 63) begin
          checks++;
          if (!done) begin
            failures++;
            $display("FAIL done missing");
          end
        end
        n++;
        @(negedge clk);
      end
      checks++;
      if (n != 64) begin
        failures++;
        $display("FAIL frame length %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
