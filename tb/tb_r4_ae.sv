// Testbench of r4_ae: random inputs and twiddles; checks each butterfly
// output against the 4-point DFT times its twiddle, and the one-cycle delay.
module tb_r4_ae;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cfx_t x [4];
  ctw_t tw [4];
  logic out_valid, ovf;
  cfx_t y [4];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  r4_ae dut (.clk, .rst_n, .in_valid, .x, .tw, .out_valid, .y, .ovf);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      real xr[4], xi[4], er[4], ei[4];
      for (int i = 0; i < 4; i++) begin
        x[i].re = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        x[i].im = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        xr[i] = to_r(x[i].re);
        xi[i] = to_r(x[i].im);
        tw[i].re = tw_t'($urandom_range(0, 128) - 64);
        tw[i].im = tw_t'($urandom_range(0, 128) - 64);
      end
      // X(p) = sum_l x(l) (-j)^(pl)
      for (int p = 0; p < 4; p++) begin
        real sr, si, tr, ti;
        sr = 0.0; si = 0.0;
        for (int l = 0; l < 4; l++) begin
          case ((p * l) % 4)
            0: begin sr += xr[l]; si += xi[l]; end
            1: begin sr += xi[l]; si -= xr[l]; end
            2: begin sr -= xr[l]; si -= xi[l]; end
            default: begin sr -= xi[l]; si += xr[l]; end
          endcase
        end
        if (p == 0) begin tr = 1.0; ti = 0.0; end
        else begin tr = real'(tw[p].re) / 64.0; ti = real'(tw[p].im) / 64.0; end
        er[p] = sr * tr - si * ti;
        ei[p] = sr * ti + si * tr;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL no output");
        end else if (absr(er[p]) < 3.99 && absr(ei[p]) < 3.99 &&
                     (absr(to_r(y[p].re) - er[p]) > 0.001 || absr(to_r(y[p].im) - ei[p]) > 0.001)) begin
          failures++;
          $display("FAIL y[%0d] = %f,%f expected %f,%f", p, to_r(y[p].re), to_r(y[p].im), er[p], ei[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
