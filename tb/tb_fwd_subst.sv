// Testbench of fwd_subst: random unit lower-triangular systems L y = b
// against a double-precision forward substitution; latency N+1 cycles.
module tb_fwd_subst;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  l [8][8];
  fx_t  b [8];
  fx_t  y [8];
  logic busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fwd_subst dut (.clk, .rst_n, .start, .l, .b, .y, .busy, .done);

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
    for (int t = 0; t < 20; t++) begin
      real yr[8];
      int  cyc;
      for (int i = 0; i < 8; i++) begin
        b[i] = to_fx((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
        for (int j = 0; j < 8; j++)
          l[i][j] = (j < i) ? to_fx((real'($urandom_range(0, 600)) - 300.0) / 1000.0) : '0;
      end
      for (int i = 0; i < 8; i++) begin
        yr[i] = to_r(b[i]);
        for (int j = 0; j < i; j++) yr[i] -= to_r(l[i][j]) * yr[j];
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 9) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (absr(yr[i]) < 3.9 && absr(to_r(y[i]) - yr[i]) > 0.005) begin
          failures++;
          $display("FAIL y[%0d] = %f expected %f", i, to_r(y[i]), yr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
