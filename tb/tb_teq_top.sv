// End-to-end testbench of teq_top at its default sizes.
//
// For each of two channels (the reference 15-tap channel, then a random one
// with a noise term gamma2) it runs the setup pass and then a real-valued
// OFDM link: random QPSK sub-carriers with Hermitian symmetry (so the time
// signal is real), 64-point inverse DFT, an 8-sample cyclic prefix, the
// 15-tap channel, the design's TEQ filter, prefix removal and a 64-point DFT
// in the testbench (the receiver demodulator), then the design's zero-forcing
// equalizer. It checks:
//   - the TEQ taps against a double-precision solution, the solve within the
//     55-cycle budget and the whole setup time;
//   - every equalized sub-carrier against Y(k)/(H(k)W(k)) computed in double
//     precision, and the QPSK decisions against the transmitted symbols;
//   - the TEQ filter overflow flag (carry) on an overdriven burst.
// Mechanisms counted (each must happen): solve, coefficient load, ZFE ready,
// FIR carry, setup repeated with a new channel.
module tb_teq_top;
  import teq_pkg::*;
  import teq_ref_pkg::*;

  localparam int NSYM = 6;
  localparam int CP   = 8;

  logic       clk = 0, rst_n = 0, start = 0;
  fx_t        h_in [15];
  fx_t        gamma2;
  fx_t        w_out [8];
  logic       busy, ready, solve_done, solve_ovf, fft_ovf, zfe_ovf;
  logic       rx_valid = 0, teq_valid, teq_carry;
  fx_t        rx_x, teq_y;
  logic       sc_valid = 0, eq_valid;
  logic [5:0] sc_idx, eq_idx;
  cfx_t       sc_data, eq_out;

  int checks = 0, failures = 0;
  int n_solve = 0, n_ready = 0, n_carry = 0, n_setup = 0;
  int n_sym_ok = 0, n_sym = 0;

  always #5 clk = ~clk;

  teq_top dut (
    .clk, .rst_n, .start, .h_in, .gamma2, .w_out, .busy, .ready, .solve_done,
    .solve_ovf, .fft_ovf, .zfe_ovf, .rx_valid, .rx_x, .teq_valid, .teq_y,
    .teq_carry, .sc_valid, .sc_idx, .sc_data, .eq_valid, .eq_idx, .eq_out
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && solve_done) n_solve++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one sample through the TEQ filter; returns the filter output
  task automatic fir_step(input real v, output real yv, output bit carry);
    rx_valid = 1;
    rx_x = to_fx(v);
    @(negedge clk);
    rx_valid = 0;
    yv = to_r(teq_y);
    carry = teq_carry;
  endtask

  task automatic run_channel(input real hr[15], input real g, input real tol);
    real hd[], a[8][8], b[8], x[8];
    real wq[64], wqi[64], hq[64], hqi[64];
    int  t0, t_solve, t_ready;
    // ---- setup ----
    hd = new[15];
    for (int i = 0; i < 15; i++) begin
      h_in[i] = to_fx(hr[i]);
      hd[i]   = to_r(h_in[i]);
    end
    gamma2 = to_fx(g);
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) a[i][j] = ref_a(hd, 7, 8, to_r(gamma2), i, j);
      b[i] = (i == 0) ? hd[0] : 0.0;
    end
    lin_solve(8, a, b, x);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = 1; t_solve = 0;
    while (!ready) begin
      if (solve_done && t_solve == 0) t_solve = t0;
      @(negedge clk);
      t0++;
    end
    t_ready = t0;
    n_ready++;
    n_setup++;
    $display("setup: solve %0d cycles, coefficients ready after %0d cycles", t_solve, t_ready);
    check(t_solve > 0 && t_solve <= 55, $sformatf("solve took %0d cycles", t_solve));
    check(t_ready < 300, $sformatf("setup took %0d cycles", t_ready));
    check(!solve_ovf && !fft_ovf, "overflow during setup");
    for (int i = 0; i < 8; i++)
      check(absr(to_r(w_out[i]) - x[i]) < tol,
            $sformatf("w[%0d] = %f expected %f", i, to_r(w_out[i]), x[i]));
    // reference spectra of h and of the taps the design produced
    for (int n = 0; n < 64; n++) begin
      wq[n] = (n < 8) ? to_r(w_out[n]) : 0.0; wqi[n] = 0.0;
      hq[n] = (n < 15) ? hd[n] : 0.0;         hqi[n] = 0.0;
    end
    // ---- OFDM link ----
    begin
      real tx [NSYM][64][2];     // sub-carrier symbols (re, im)
      real sig [$];              // transmitted real samples with prefixes
      real rxs [$];              // received after channel
      real ys  [$];              // after the TEQ filter
      for (int s = 0; s < NSYM; s++) begin
        real td[64];
        for (int k = 0; k < 64; k++) begin tx[s][k][0] = 0.0; tx[s][k][1] = 0.0; end
        for (int k = 1; k < 32; k++) begin
          tx[s][k][0] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
          tx[s][k][1] = ($urandom_range(0, 1) != 0) ? 0.5 : -0.5;
          tx[s][64-k][0] = tx[s][k][0];
          tx[s][64-k][1] = -tx[s][k][1];
        end
        for (int n = 0; n < 64; n++) begin
          td[n] = 0.0;
          for (int k = 0; k < 64; k++) begin
            real ang;
            ang = 2.0 * 3.14159265358979323846 * real'(n * k) / 64.0;
            td[n] += (tx[s][k][0] * $cos(ang) - tx[s][k][1] * $sin(ang)) / 64.0;
          end
        end
        for (int n = 64 - CP; n < 64; n++) sig.push_back(td[n]);
        for (int n = 0; n < 64; n++) sig.push_back(td[n]);
      end
      for (int n = 0; n < sig.size() + 14; n++) begin
        real acc;
        acc = 0.0;
        for (int i = 0; i < 15; i++)
          if (n - i >= 0 && n - i < sig.size()) acc += hd[i] * sig[n-i];
        rxs.push_back(acc);
      end
      for (int n = 0; n < rxs.size(); n++) begin
        real yv;
        bit  c;
        fir_step(rxs[n], yv, c);
        ys.push_back(yv);
      end
      // demodulate each symbol in the testbench, equalize in the design
      for (int s = 0; s < NSYM; s++) begin
        real yr[64], yi[64], zr[64];
        int  base;
        base = s * (64 + CP) + CP;
        for (int n = 0; n < 64; n++) begin zr[n] = 0.0; yr[n] = ys[base+n]; end
        for (int k = 0; k < 64; k++) begin
          real hr_, hi_, wr_, wi_, pr, pi, m2, er, ei, dr, di;
          dft64(yr, zr, k, dr, di);
          dft64(hq, hqi, k, hr_, hi_);
          dft64(wq, wqi, k, wr_, wi_);
          pr = hr_ * wr_ - hi_ * wi_;
          pi = hr_ * wi_ + hi_ * wr_;
          m2 = pr * pr + pi * pi;
          er = (dr * pr + di * pi) / m2;
          ei = (di * pr - dr * pi) / m2;
          sc_valid = 1;
          sc_idx   = 6'(k);
          sc_data.re = to_fx(dr);
          sc_data.im = to_fx(di);
          @(negedge clk);
          sc_valid = 0;
          check(eq_valid && eq_idx == 6'(k), "equalizer output missing");
          check(absr(to_r(eq_out.re) - er) < 0.03 && absr(to_r(eq_out.im) - ei) < 0.03,
                $sformatf("sym %0d bin %0d: %f,%f expected %f,%f", s, k,
                          to_r(eq_out.re), to_r(eq_out.im), er, ei));
          if (k >= 1 && k < 32 && k != 32) begin
            n_sym++;
            if ((eq_out.re > 0) == (tx[s][k][0] > 0.0) && (eq_out.im > 0) == (tx[s][k][1] > 0.0))
              n_sym_ok++;
          end
        end
      end
    end
    // ---- overdriven burst: the TEQ filter must flag overflow ----
    begin
      real yv;
      bit  c;
      int  seen;
      seen = 0;
      for (int n = 0; n < 8; n++) begin
        fir_step((n % 2 == 0) ? 3.9 : -3.9, yv, c);
        if (c) seen++;
      end
      for (int n = 0; n < 8; n++) fir_step(0.0, yv, c);
      n_carry += seen;
      check(seen > 0, "TEQ filter never reported overflow on an overdriven burst");
    end
  endtask

  initial begin
    real href[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1, -0.15, 0.2, 0.1, 0.2, 0.1};
    real hrand[15];
    rx_x = '0; sc_idx = '0; sc_data = '0; gamma2 = '0;
    for (int i = 0; i < 15; i++) h_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_channel(href, 0.0, 0.02);
    hrand[0] = 0.7;
    for (int i = 1; i < 15; i++) hrand[i] = (real'($urandom_range(0, 500)) - 250.0) / 1000.0 / (1.0 + 0.15 * real'(i));
    run_channel(hrand, 0.01, 0.05);
    $display("mechanisms: solve=%0d ready=%0d setups=%0d fir_carry=%0d qpsk_ok=%0d/%0d",
             n_solve, n_ready, n_setup, n_carry, n_sym_ok, n_sym);
    check(n_solve == 2, "solve count");
    check(n_ready == 2, "ready count");
    check(n_setup >= 2, "setup never repeated");
    check(n_carry > 0, "FIR carry never happened");
    check(n_sym_ok * 100 >= n_sym * 95, $sformatf("QPSK decisions %0d/%0d", n_sym_ok, n_sym));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
