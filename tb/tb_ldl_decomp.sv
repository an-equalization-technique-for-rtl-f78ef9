// Testbench of ldl_decomp: factorises random symmetric positive-definite
// matrices built as Hre^T Hre + gamma2 I and checks U against a
// double-precision Doolittle factorisation, L(j,i) = U(i,j)/U(i,i), the
// and the 2N+1 cycle latency.
module tb_ldl_decomp;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  a [8][8];
  fx_t  u [8][8];
  fx_t  l [8][8];
  
  logic busy, done, ovf;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldl_decomp dut (.clk, .rst_n, .start, .a, .u, .l, .busy, .done, .ovf);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input real got, input real exp, input real tol, input string what);
    checks++;
    if (absr(got - exp) > tol) begin
      failures++;
      $display("FAIL %s = %f expected %f", what, got, exp);
    end
  endtask

  task automatic run_case(input real hr[15], input real g);
    real hd[], ar[8][8], ur[8][8], lr[8][8];
    int  cyc;
    hd = new[15];
    for (int i = 0; i < 15; i++) hd[i] = hr[i];
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a[i][j]  = to_fx(ref_a(hd, 7, 8, g, i, j));
        ar[i][j] = to_r(a[i][j]);
      end
    // Doolittle reference
    for (int i = 0; i < 8; i++) begin
      for (int j = i; j < 8; j++) begin
        real s;
        s = ar[i][j];
        for (int k = 0; k < i; k++) s -= lr[i][k] * ur[k][j];
        ur[i][j] = s;
      end
      for (int j = i + 1; j < 8; j++) lr[j][i] = ur[i][j] / ur[i][i];
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 17) begin
      failures++;
      $display("FAIL factorisation took %0d cycles, expected 17", cyc);
    end
    for (int i = 0; i < 8; i++) begin

      for (int j = i; j < 8; j++) chk(to_r(u[i][j]), ur[i][j], 0.01, $sformatf("u[%0d][%0d]", i, j));
      for (int j = i + 1; j < 8; j++) chk(to_r(l[j][i]), lr[j][i], 0.01, $sformatf("l[%0d][%0d]", j, i));
    end
  endtask

  initial begin
    real hr[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(hr, 0.0);
    for (int t = 0; t < 5; t++) begin
      real hx[15];
      hx[0] = 0.6 + real'($urandom_range(0, 300)) / 1000.0;
      for (int i = 1; i < 15; i++) hx[i] = (real'($urandom_range(0, 400)) - 200.0) / 1000.0;
      run_case(hx, 0.05);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
