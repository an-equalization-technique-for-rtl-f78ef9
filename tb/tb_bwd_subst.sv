// Testbench of bwd_subst: random upper-triangular systems U w = y with a
// dominant diagonal, against a double-precision back substitution; latency
// N+1 cycles.
module tb_bwd_subst;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  u [8][8];
  fx_t  y [8];
  fx_t  w [8];
  logic busy, done, ovf;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  bwd_subst dut (.clk, .rst_n, .start, .u, .y, .w, .busy, .done, .ovf);

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
      real wr[8];
      int  cyc;
      for (int i = 0; i < 8; i++) begin
        y[i] = to_fx((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
        for (int j = 0; j < 8; j++)
          if (j == i)     u[i][j] = to_fx(0.5 + real'($urandom_range(0, 1000)) / 1000.0);
          else if (j > i) u[i][j] = to_fx((real'($urandom_range(0, 400)) - 200.0) / 1000.0);
          else            u[i][j] = '0;
      end
      for (int i = 7; i >= 0; i--) begin
        real s;
        s = to_r(y[i]);
        for (int j = i + 1; j < 8; j++) s -= to_r(u[i][j]) * wr[j];
        wr[i] = s / to_r(u[i][i]);
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
        if (absr(wr[i]) < 3.9 && absr(to_r(w[i]) - wr[i]) > 0.01) begin
          failures++;
          $display("FAIL w[%0d] = %f expected %f", i, to_r(w[i]), wr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
