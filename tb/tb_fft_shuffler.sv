// Testbench of fft_shuffler: writes three frames of digit-reversed bins
// (line k, cycle 4p+q carries bin 16k+4q+p), the first two back to back,
// and checks that each frame leaves in natural order with out_sop on bin 0
// two cycles after its last write.
module tb_fft_shuffler;
  import teq_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  cfx_t       din [4], dout;
  logic       out_valid, out_sop;
  logic [5:0] out_idx;
  int         checks = 0, failures = 0, cyc = 0, t_last [3], t_sop [3];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fft_shuffler dut (.clk, .rst_n, .in_valid, .din, .out_valid, .out_sop, .out_idx, .dout);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int f);
    for (int c = 0; c < 16; c++) begin
      in_valid = 1;
      for (int k = 0; k < 4; k++) begin
        din[k].re = fx_t'(f * 100 + 16 * k + 4 * (c % 4) + c / 4);
        din[k].im = fx_t'(-f);
      end
      if (c == 15) t_last[f] = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (48) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send(0);
    send(1);
    repeat (30) @(negedge clk);
    send(2);
  end

  initial begin
    int f = 0, n = 0;
    while (f < 3) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (out_sop) t_sop[f] = cyc;
        checks++;
        if (dout.re != fx_t'(f * 100 + n) || dout.im != fx_t'(-f) || out_idx != 6'(n) || out_sop != (n == 0)) begin
          failures++;
          $display("FAIL frame %0d bin %0d got %0d idx %0d", f, n, dout.re, out_idx);
        end
        n++;
        if (n == 64) begin
          n = 0;
          f++;
        end
      end
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (t_sop[g] - t_last[g] != 2) begin
        failures++;
        $display("FAIL frame %0d delay %0d", g, t_sop[g] - t_last[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
