// Testbench of teq_fir: loads the reference TEQ taps, filters random samples
// and the reference channel, and compares each output with a real-valued
// convolution; drives a large input to check saturation and the carry flag.
module tb_teq_fir;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, in_valid = 0;
  fx_t  w_in [8];
  fx_t  x, y;
  logic out_valid, carry;
  int   checks = 0, failures = 0, carries = 0;
  real  hist [$];

  always #5 clk = ~clk;

  teq_fir dut (.clk, .rst_n, .load, .w_in, .in_valid, .x, .out_valid, .y, .carry);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input real v);
    real e;
    x = to_fx(v);
    hist.push_front(to_r(x));
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    e = 0.0;
    // each product saturates at the Q3.13 range before the sum
    for (int i = 0; i < 8 && i < hist.size(); i++) begin
      real pr;
      pr = to_r(w_in[i]) * hist[i];
      if (pr > 3.9999) pr = 3.9999;
      if (pr < -4.0) pr = -4.0;
      e += pr;
    end
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL no output");
    end else if (e > 3.99 || e < -3.99) begin
      if (!carry || (e > 0 ? y != FX_MAX : y != FX_MIN)) begin
        failures++;
        $display("FAIL expected saturation, y = %f carry %0b", to_r(y), carry);
      end else carries++;
    end else if (carry || absr(to_r(y) - e) > 0.002) begin
      failures++;
      $display("FAIL y = %f expected %f", to_r(y), e);
    end
  endtask

  initial begin
    real wr[8] = '{1.88906, -0.53679, -0.79309, -0.24499, 0.74253, -0.18674, -0.11244, -0.38362};
    real h[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    for (int i = 0; i < 8; i++) w_in[i] = to_fx(wr[i]);
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load = 1;
    @(negedge clk);
    load = 0;
    for (int i = 0; i < 15; i++) push(h[i]);
    for (int i = 0; i < 10; i++) push(0.0);
    for (int i = 0; i < 100; i++) push((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
    push(3.9); push(3.9); push(-3.9); push(-3.9); push(-3.9);
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL carry never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
