// Testbench of twiddle_rom: all 64 entries against cos/sin rounded to Q2.6.
module tb_twiddle_rom;
  import teq_pkg::*;

  logic [5:0] k;
  ctw_t       w;
  int         checks = 0, failures = 0;

  twiddle_rom dut (.k, .w);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      real ang, er, ei;
      k = 6'(i);
      #1;
      ang = 2.0 * 3.14159265358979323846 * real'(i) / 64.0;
      er = $cos(ang) * 64.0;
      ei = -$sin(ang) * 64.0;
      checks++;
      if ((real'(w.re) - er) > 0.51 || (er - real'(w.re)) > 0.51 ||
          (real'(w.im) - ei) > 0.51 || (ei - real'(w.im)) > 0.51) begin
        failures++;
        $display("FAIL k=%0d got %0d,%0d expected %f,%f", i, w.re, w.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
