// Testbench of zfe_coef: sends a random spectrum H then a spectrum W (as the
// FFT would, bins tagged by index) and checks every coefficient against
// 1/(H*W) in double precision, the ready flag and the saturation flag.
module tb_zfe_coef;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0, sel = 0;
  logic [5:0] in_idx;
  cfx_t       din;
  cfx_t       coef [64];
  logic       ready, ovf;
  int         checks = 0, failures = 0;
  real        hr [64], hi [64], wr [64], wi [64];

  always #5 clk = ~clk;

  zfe_coef dut (.clk, .rst_n, .in_valid, .sel, .in_idx, .din, .coef, .ready, .ovf);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit with_null);
    for (int k = 0; k < 64; k++) begin
      hr[k] = to_r(to_fx(0.4 + real'($urandom_range(0, 1600)) / 1000.0));
      hi[k] = to_r(to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0));
      wr[k] = to_r(to_fx(0.5 + real'($urandom_range(0, 1000)) / 1000.0));
      wi[k] = to_r(to_fx((real'($urandom_range(0, 1000)) - 500.0) / 1000.0));
    end
    if (with_null) begin hr[7] = to_r(to_fx(0.05)); hi[7] = 0.0; wr[7] = to_r(to_fx(0.5)); wi[7] = 0.0; end
    sel = 0;
    for (int k = 0; k < 64; k++) begin
      in_valid = 1; in_idx = 6'(k);
      din.re = to_fx(hr[k]); din.im = to_fx(hi[k]);
      @(negedge clk);
    end
    checks++;
    if (ready) begin
      failures++;
      $display("FAIL ready not cleared by a new FFT(h) frame");
    end
    sel = 1;
    for (int k = 0; k < 64; k++) begin
      in_valid = 1; in_idx = 6'(63 - k);   // any bin order is accepted
      din.re = to_fx(wr[63-k]); din.im = to_fx(wi[63-k]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (!ready) begin
      failures++;
      $display("FAIL ready missing");
    end
    for (int k = 0; k < 64; k++) begin
      real pr, pi, m2, cr, ci;
      pr = hr[k] * wr[k] - hi[k] * wi[k];
      pi = hr[k] * wi[k] + hi[k] * wr[k];
      m2 = pr * pr + pi * pi;
      cr = pr / m2;
      ci = -pi / m2;
      checks++;
      if (absr(cr) < 3.9 && absr(ci) < 3.9 &&
          (absr(to_r(coef[k].re) - cr) > 0.01 * (1.0 + absr(cr)) ||
           absr(to_r(coef[k].im) - ci) > 0.01 * (1.0 + absr(ci)))) begin
        failures++;
        $display("FAIL C[%0d] = %f,%f expected %f,%f", k, to_r(coef[k].re), to_r(coef[k].im), cr, ci);
      end
    end
    checks++;
    if (ovf != with_null) begin
      failures++;
      $display("FAIL ovf = %0b", ovf);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // coefficient 1/(0.05*0.5) = 40 cannot be held: saturates
    run(0);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
