// Testbench of matrix_mult: compares every element of A with the
// double-precision value of Hre^T Hre + gamma2 I, for the reference channel
// and random channels, and checks the run length (M-NG+P cycles).
module tb_matrix_mult;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  h [15];
  fx_t  gamma2;
  fx_t  a [8][8];
  logic busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  matrix_mult dut (.clk, .rst_n, .start, .h, .gamma2, .a, .busy, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input real hr[15], input real g);
    real hd[];
    int  cyc;
    hd = new[15];
    for (int i = 0; i < 15; i++) begin
      h[i]  = to_fx(hr[i]);
      hd[i] = to_r(h[i]);
    end
    gamma2 = to_fx(g);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 14) begin
      failures++;
      $display("FAIL run took %0d cycles, expected 14", cyc);
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real e;
        e = ref_a(hd, 7, 8, to_r(gamma2), i, j);
        checks++;
        if (absr(to_r(a[i][j]) - e) > 0.003) begin
          failures++;
          $display("FAIL a[%0d][%0d] = %f expected %f", i, j, to_r(a[i][j]), e);
        end
      end
  endtask

  initial begin
    real hr[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(hr, 0.0);
    for (int t = 0; t < 5; t++) begin
      real hx[15];
      for (int i = 0; i < 15; i++) hx[i] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
      run_case(hx, real'($urandom_range(0, 100)) / 1000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
