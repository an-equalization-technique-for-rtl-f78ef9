// Workload testbench: the coefficient solver at the channel lengths and TEQ
// orders the equalizer is evaluated with in floating-point system studies,
// each in its own teq_solver_case instance (the solver is parameterised; the
// top-level equalizer is built for h1 with order 7, tested elsewhere):
//   h1 (15 samples) with orders 3, 17, 31 and 45 -- the order sweep;
//   h2 (26 samples) with order 7;
//   h3 (38 samples) with order 15.
// All use an 8-sample prefix, so h*w is shortened to 9 samples. The cases run
// in parallel; the test ends when all have finished.
// Taps must match the exact solution within 0.05, except at orders 17, 31
// and 45: there the normal equations are so sensitive that Q3.13 rounding of
// A (changes of a few 1e-4) moves single taps by up to about 0.14, while the
// shortening itself (SSNR) stays within a few dB of the exact taps. Those
// cases allow 0.15 per tap and rely on the SSNR check. Every case also checks
// the matrix A against the reference within 0.01.
module tb_teq_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  localparam int NC = 6;
  logic fin [NC];
  int   ck  [NC];
  int   fl  [NC];
  int   cy  [NC];
  int   checks, failures;

  always #5 clk = ~clk;

  teq_solver_case #(.M(14), .P(3),  .CH(1)) c0 (.clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]));
  teq_solver_case #(.M(14), .P(17), .CH(1), .TOL(0.15)) c1 (.clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]));
  teq_solver_case #(.M(14), .P(31), .CH(1), .TOL(0.15)) c2 (.clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]));
  teq_solver_case #(.M(14), .P(45), .CH(1), .TOL(0.15)) c3 (.clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .cycles(cy[3]));
  teq_solver_case #(.M(25), .P(7),  .CH(2)) c4 (.clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .cycles(cy[4]));
  teq_solver_case #(.M(37), .P(15), .CH(3)) c5 (.clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .cycles(cy[5]));

  function automatic bit all_done();
    foreach (fin[i]) if (!fin[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report(input bit timeout);
    checks   = 0;
    failures = timeout ? 1 : 0;
    for (int i = 0; i < NC; i++) begin
      checks   += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    report(1'b1);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do @(posedge clk); while (!all_done());
    report(1'b0);
  end
endmodule
