// Testbench of zfe_apply: random coefficients and sub-carriers; each output
// must equal Y(k)*C(k) one cycle later with its index.
module tb_zfe_apply;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic [5:0] in_idx, out_idx;
  cfx_t       din, dout;
  cfx_t       coef [64];
  logic       out_valid;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  zfe_apply dut (.clk, .rst_n, .coef, .in_valid, .in_idx, .din, .out_valid, .out_idx, .dout);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      coef[k].re = to_fx((real'($urandom_range(0, 3000)) - 1500.0) / 1000.0);
      coef[k].im = to_fx((real'($urandom_range(0, 3000)) - 1500.0) / 1000.0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 256; t++) begin
      real er, ei;
      int  k;
      k = $urandom_range(0, 63);
      in_valid = 1; in_idx = 6'(k);
      din.re = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      din.im = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      er = to_r(din.re) * to_r(coef[k].re) - to_r(din.im) * to_r(coef[k].im);
      ei = to_r(din.re) * to_r(coef[k].im) + to_r(din.im) * to_r(coef[k].re);
      @(negedge clk);
      checks++;
      if (!out_valid || out_idx != 6'(k) || absr(to_r(dout.re) - er) > 0.0005 ||
          absr(to_r(dout.im) - ei) > 0.0005) begin
        failures++;
        $display("FAIL bin %0d got %f,%f expected %f,%f", k, to_r(dout.re), to_r(dout.im), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
