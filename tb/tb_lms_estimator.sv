// tb_lms_estimator: presents window sums and checks each LMS step against a floating-point
// evaluation of eps3 = E1 - 2*E2, eps1' = E1/p1 + Vd1, p1 -= mu1*eps1', p3 -= mu3*eps3
// (mu1 = 3113/1024, mu3 = 983/1024, Vd1 = 1/32, windows of 2^10 samples). The sums are
// synthesized from chosen a1, a3 and the current p3 so that the loop is exercised as in
// operation; the test also checks the update latency (56-clock divider plus one clock)
// and that p1 and p3 move towards a1 and a3/a1^3 over 300 steps.
module tb_lms_estimator;
  import mce_pkg::*;
  localparam int unsigned N_LOG2 = 10;
  localparam real VD1 = 1.0 / 32.0;
  localparam real MU1 = 3113.0 / 1024.0;
  localparam real MU3 = 983.0 / 1024.0;
  localparam real A1 = 7.6;
  localparam real P3OPT = -0.46654;
  logic clk = 1'b0, rst_n = 1'b0;
  acc_t s1 = '0, s2 = '0;
  logic sums_valid = 1'b0;
  param_t p1, p3, eps1p, eps3;
  logic upd;
  always #1 clk = ~clk;

  lms_estimator #(.N_LOG2(N_LOG2)) dut (
    .clk(clk), .rst_n(rst_n), .s1(s1), .s2(s2), .sums_valid(sums_valid),
    .p1(p1), .p3(p3), .eps1p(eps1p), .eps3(eps3), .upd(upd)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real pr(param_t p);
    return real'(p) / 16777216.0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pr(p1) == 8.0 && pr(p3) == 0.0, "reset values p1 = 8, p3 = 0");
    for (int k = 0; k < 300; k++) begin
      real e1, e2, q1, p1_old, p3_old, ep1, ep3, want1, want3, noise;
      int lat;
      p1_old = pr(p1);
      p3_old = pr(p3);
      // means as the correlator would see them, with a little noise
      noise = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-7;
      e1 = -A1 * VD1 - 0.75 * A1 * A1 * A1 * VD1 * VD1 * VD1 * (P3OPT - p3_old) * 4.0 / 3.0 + noise;
      e2 = -A1 * VD1 / 2.0 - 0.75 * A1 * A1 * A1 * VD1 * VD1 * VD1 * (P3OPT - p3_old) / 6.0;
      s1 = acc_t'($rtoi(e1 * 65536.0 * real'(1 << N_LOG2)));
      s2 = acc_t'($rtoi(e2 * 65536.0 * real'(1 << N_LOG2)));
      q1 = real'(s1) / 65536.0 / real'(1 << N_LOG2);
      ep3 = q1 - 2.0 * real'(s2) / 65536.0 / real'(1 << N_LOG2);
      ep1 = q1 / p1_old + VD1;
      want1 = p1_old - MU1 * ep1;
      want3 = p3_old - MU3 * ep3;
      sums_valid = 1'b1;
      @(negedge clk);
      sums_valid = 1'b0;
      lat = 0;
      while (!upd) begin @(negedge clk); lat++; end
      check(lat == 57, "update latency");
      check(pr(eps1p) - ep1 < 1e-6 && ep1 - pr(eps1p) < 1e-6, "eps1'");
      check(pr(eps3) - ep3 < 1e-6 && ep3 - pr(eps3) < 1e-6, "eps3");
      check(pr(p1) - want1 < 1e-6 && want1 - pr(p1) < 1e-6, "p1 recursion");
      check(pr(p3) - want3 < 1e-6 && want3 - pr(p3) < 1e-6, "p3 recursion");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("after 300 steps: p1=%f p3=%f", pr(p1), pr(p3));
    check(pr(p1) > 7.55 && pr(p1) < 7.65, "p1 approaches a1");
    check(pr(p3) < -0.3, "p3 moves towards a3/a1^3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
