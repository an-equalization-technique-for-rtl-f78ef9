// Testbench of delay_commutator: sends tagged samples (line, block, offset)
// for D = 4 in separate and back-to-back groups and checks that block b of
// input line p leaves on line b at block time p, 3*D+1 cycles later.
module tb_delay_commutator;
  import teq_pkg::*;

  localparam int D = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cfx_t din [4], dout [4];
  logic out_valid;
  int   checks = 0, failures = 0, ngroups = 0;

  always #5 clk = ~clk;

  delay_commutator #(.D(D)) dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tag = group*256 + line*64 + block*16 + offset
  task automatic send_group(input int g);
    for (int c = 0; c < 4 * D; c++) begin
      in_valid = 1;
      for (int p = 0; p < 4; p++) begin
        din[p].re = fx_t'(g * 256 + p * 64 + (c / D) * 16 + (c % D));
        din[p].im = fx_t'(-(g * 256 + p * 64 + (c / D) * 16 + (c % D)));
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    send_group(0);
    repeat (3 * D) @(negedge clk);
    send_group(1);
    send_group(2);
    repeat (20) @(negedge clk);
  end

  initial begin
    int c = 0, g = 0;
    while (g < 3) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        for (int q = 0; q < 4; q++) begin
          int exp;
          exp = g * 256 + (c / D) * 64 + q * 16 + (c % D);
          checks++;
          if (dout[q].re != fx_t'(exp) || dout[q].im != fx_t'(-exp)) begin
            failures++;
            $display("FAIL group %0d cycle %0d line %0d got %0d expected %0d", g, c, q, dout[q].re, exp);
          end
        end
        c++;
        if (c == 4 * D) begin
          c = 0;
          g++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
