// tb_mce_correlator: feeds random residues with random dither records through windows of
// random length and compares the two window sums with sums formed in the testbench:
// sum of R*u over the Vd1 samples and over the Vd2 samples, the win_end sample included,
// invalid samples excluded, and the sums restarting after each window.
module tb_mce_correlator;
  import mce_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t u = '0;
  inj_t inj = '0;
  acc_t s1, s2;
  logic sums_valid;
  always #1 clk = ~clk;

  mce_correlator dut (.clk(clk), .rst_n(rst_n), .u(u), .inj(inj), .s1(s1), .s2(s2),
                      .sums_valid(sums_valid));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 60; w++) begin
      longint r1, r2;
      int len;
      r1 = 0;
      r2 = 0;
      len = $urandom_range(2, 300);
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        check(!sums_valid, "no result inside a window");
        u = sample_t'($urandom_range(0, 1 << 20)) - sample_t'(1 << 19);
        inj.valid   = ($urandom_range(0, 9) != 0);
        inj.sign    = 1'($urandom);
        inj.big     = (w % 3 == 2) ? 1'b1 : (t < len / 2);
        inj.win_end = (t == len - 1);
        if (t == len - 1) inj.valid = 1'b1;
        if (inj.valid) begin
          if (inj.big) r1 += inj.sign ? longint'(u) : -longint'(u);
          else         r2 += inj.sign ? longint'(u) : -longint'(u);
        end
      end
      @(negedge clk);
      inj = '0;
      check(sums_valid, "result after the window end");
      check(longint'(s1) == r1, "Vd1 correlation sum");
      check(longint'(s2) == r2, "Vd2 correlation sum");
    end
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
