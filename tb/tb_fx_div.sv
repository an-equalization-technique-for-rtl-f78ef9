// Testbench of fx_div: Q3.13 quotients of random operands against real
// division (within one LSB plus truncation), saturation and division by zero.
module tb_fx_div;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  fx_t  num, den, q;
  logic ovf;
  int   checks = 0, failures = 0;

  fx_div dut (.num, .den, .q, .ovf);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input fx_t a, input fx_t b);
    real e;
    num = a; den = b;
    #1;
    checks++;
    if (b == 0) begin
      if (!ovf || q != (a < 0 ? FX_MIN : FX_MAX)) begin
        failures++;
        $display("FAIL %0d/0 gave %0d ovf %0b", a, q, ovf);
      end
    end else begin
      e = to_r(a) / to_r(b);
      if (e >= 4.0 || e < -4.0) begin
        if (!ovf || q != (e < 0.0 ? FX_MIN : FX_MAX)) begin
          failures++;
          $display("FAIL %f/%f should saturate, gave %f", to_r(a), to_r(b), to_r(q));
        end
      end else if (ovf || absr(to_r(q) - e) > 1.0 / 8192.0) begin
        failures++;
        $display("FAIL %f/%f = %f expected %f", to_r(a), to_r(b), to_r(q), e);
      end
    end
  endtask

  initial begin
    chk(to_fx(1.0), to_fx(0.5));
    chk(to_fx(-0.75), to_fx(0.25));
    chk(to_fx(0.3), to_fx(-0.6));
    chk(to_fx(3.0), to_fx(0.5));
    chk(to_fx(-1.0), 16'sd0);
    chk(to_fx(1.0), 16'sd0);
    for (int i = 0; i < 2000; i++) chk(fx_t'($urandom), fx_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
