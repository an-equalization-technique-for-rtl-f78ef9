// Testbench of teq_solver: solves the reference channel and random channels,
// compares the taps with a double-precision solution of the same normal
// equations, checks the reference taps against the published hardware result
// and checks the solve time against the 55-cycle budget.
module tb_teq_solver;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0;
  fx_t  h [15];
  fx_t  gamma2;
  fx_t  w [8];
  logic busy, done, ovf;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  teq_solver dut (.clk, .rst_n, .enable, .h, .gamma2, .w, .busy, .done, .ovf);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_case(input real hr[15], input real g, input real tol, input bit paper);
    real a[8][8], b[8], x[8], hd[];
    int  cyc;
    // published hardware result for the reference channel
    real pub[8] = '{1.88905660432045, -0.53678706108282, -0.79308852895277,
                    -0.24499303067784, 0.74253305861786, -0.18674375786207,
                    -0.11244022219353, -0.38361822089975};
    hd = new[15];
    for (int i = 0; i < 15; i++) begin
      h[i]  = to_fx(hr[i]);
      hd[i] = to_r(h[i]);
    end
    gamma2 = to_fx(g);
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) a[i][j] = ref_a(hd, 7, 8, to_r(gamma2), i, j);
      b[i] = (i == 0) ? hd[0] : 0.0;
    end
    lin_solve(8, a, b, x);
    @(negedge clk); enable = 1;
    @(negedge clk); enable = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc <= 55, $sformatf("solve took %0d cycles", cyc));
    $display("solve cycles = %0d", cyc);
    for (int i = 0; i < 8; i++) begin
      check(absr(to_r(w[i]) - x[i]) <= tol,
            $sformatf("w[%0d] = %f expected %f", i, to_r(w[i]), x[i]));
      if (paper)
        check(absr(to_r(w[i]) - pub[i]) <= 0.02,
              $sformatf("w[%0d] = %f published %f", i, to_r(w[i]), pub[i]));
    end
  endtask

  initial begin
    real hr[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(hr, 0.0, 0.02, 1);
    run_case(hr, 0.01, 0.02, 0);
    for (int t = 0; t < 6; t++) begin
      real hx[15];
      hx[0] = 0.5 + real'($urandom_range(0, 400)) / 1000.0;
      for (int i = 1; i < 15; i++) hx[i] = (real'($urandom_range(0, 400)) - 200.0) / 1000.0 / (1.0 + 0.2 * real'(i));
      run_case(hx, 0.05, 0.05, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
