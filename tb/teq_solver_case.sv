// One solver workload for tb_teq_workloads: a teq_solver built for channel
// length M+1, TEQ order P and prefix NG, run once on one of the three
// channel models the equalizer is evaluated with:
//   CH = 1: h1, the 15-sample reference channel;
//   CH = 2: h2, five exponentially decaying paths up to delay 25;
//   CH = 3: h3, eight exponentially decaying paths up to delay 37.
// gamma^2 = 0.01 (20 dB SNR). Once rst_n is high it loads the channel, pulses
// enable and waits for done. It then checks:
//   - that no quotient saturated;
//   - the matrix A against the reference within 0.01;
//   - each tap against a double-precision solve of the same normal equations;
//   - the shortening achieved, SSNR = energy of h*w inside the first NG+1
//     samples over the energy outside, against the exact taps' SSNR;
//   - the solve time against (M-NG+P) + 4(P+1) + 5 cycles from the enable
//     edge to the done cycle (49 for the default sizes): the matrix walk,
//     two cycles per factorisation row, one per substitution row, plus one
//     cycle of hand-over per unit.
// It raises finished and reports its checks, failures and cycle count.
module teq_solver_case
  import teq_pkg::*;
  import teq_ref_pkg::*;
#(
  parameter int unsigned M  = 14,
  parameter int unsigned P  = 7,
  parameter int unsigned NG = 8,
  parameter int          CH = 1,
  parameter real         TOL = 0.05
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int N = int'(P) + 1;
  localparam real G2 = 0.01;

  logic enable, busy, done, ovf;
  fx_t  h [M+1];
  fx_t  gamma2;
  fx_t  w [P+1];

  teq_solver #(.M(M), .P(P), .NG(NG)) dut (
    .clk, .rst_n, .enable, .h, .gamma2, .w, .busy, .done, .ovf
  );

  function automatic void channel(output real hr[]);
    hr = new[M+1];
    foreach (hr[i]) hr[i] = 0.0;
    case (CH)
      1: begin
        real h1[15] = '{0.5, 0.4, 0.1, 0.35, 0.6, 0.2, 0.3, -0.3, -0.2, -0.1,
                        -0.15, 0.2, 0.1, 0.2, 0.1};
        foreach (h1[i]) if (i <= int'(M)) hr[i] = h1[i];
      end
      2: begin
        hr[0] = 0.85; hr[6] = 0.402; hr[14] = 0.19; hr[20] = 0.09; hr[25] = 0.042;
      end
      default: begin
        hr[0] = 0.881; hr[6] = 0.416; hr[11] = 0.197; hr[15] = 0.093;
        hr[18] = 0.044; hr[22] = 0.021; hr[30] = 0.01; hr[37] = 0.005;
      end
    endcase
  endfunction

  // SSNR in dB of the effective channel h*w
  function automatic real ssnr_db(input real hr[], input real wr[]);
    real ein, eout;
    ein = 0.0; eout = 0.0;
    for (int k = 0; k <= int'(M) + int'(P); k++) begin
      real s;
      s = 0.0;
      for (int j = 0; j <= int'(P); j++)
        if (k - j >= 0 && k - j <= int'(M)) s += hr[k-j] * wr[j];
      if (k <= int'(NG)) ein += s * s;
      else               eout += s * s;
    end
    return 10.0 * $log10(ein / eout);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL ch%0d p=%0d: %s", CH, P, what);
    end
  endtask

  initial begin
    real hr[], a[], b[], x[], wh[];
    real s_ref, s_hw;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    cycles   = 0;
    enable   = 1'b0;
    gamma2   = to_fx(G2);
    channel(hr);
    foreach (h[i]) h[i] = to_fx(hr[i]);
    // reference with the quantised channel
    foreach (hr[i]) hr[i] = to_r(h[i]);
    a = new[N*N];
    b = new[N];
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) a[i*N+j] = ref_a(hr, int'(P), int'(NG), to_r(gamma2), i, j);
      b[i] = (i == 0) ? hr[0] : 0.0;
    end
    lin_solve_n(N, a, b, x);

    wait (rst_n);
    @(posedge clk);
    enable <= 1'b1;
    @(posedge clk);
    enable <= 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end

    check(!ovf, "solver overflow flag");
    begin
      real emax;
      emax = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (absr(to_r(dut.a[i][j]) - a[i*N+j]) > emax) emax = absr(to_r(dut.a[i][j]) - a[i*N+j]);
      check(emax <= 0.01, $sformatf("matrix A off by %f", emax));
    end
    wh = new[N];
    for (int i = 0; i < N; i++) begin
      wh[i] = to_r(w[i]);
      check(absr(wh[i] - x[i]) <= TOL,
            $sformatf("w%0d = %f, expected %f", i, wh[i], x[i]));
    end
    s_ref = ssnr_db(hr, x);
    s_hw  = ssnr_db(hr, wh);
    check(s_hw >= s_ref - 3.0 || s_hw >= 30.0,
          $sformatf("SSNR %f dB, exact taps give %f dB", s_hw, s_ref));
    check(cycles == (int'(M) - int'(NG) + int'(P)) + 4 * N + 5,
          $sformatf("solve time %0d cycles", cycles));
    $display("h%0d (%0d samples), order %0d: %0d cycles, SSNR %0.1f dB (exact taps %0.1f dB)",
             CH, M + 1, P, cycles, s_hw, s_ref);
    finished = 1'b1;
  end
endmodule
