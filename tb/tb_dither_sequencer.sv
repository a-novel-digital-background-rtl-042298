// tb_dither_sequencer: with windows of 2^4 samples, checks that Vd1 and Vd2 windows
// alternate every 16 samples starting with Vd1, that win_end marks only the last sample of
// each Vd2 window, that the sign follows the x^31 + x^28 + 1 recurrence, and that nothing
// advances while `en` is low.
module tb_dither_sequencer;
  import mce_pkg::*;
  localparam int unsigned N_LOG2 = 4;
  localparam int unsigned N = 1 << N_LOG2;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  inj_t inj;
  always #1 clk = ~clk;

  dither_sequencer #(.N_LOG2(N_LOG2)) dut (.clk(clk), .rst_n(rst_n), .en(en), .inj(inj));

  int checks = 0, failures = 0;
  bit o [2000];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at sample", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!inj.valid, "not valid while disabled");
    en = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      #0;
      o[t] = inj.sign;
      check(inj.valid, "valid");
      check(inj.big == (((t / N) % 2) == 0), "window alternation");
      check(inj.win_end == ((t % (2 * N)) == 2 * N - 1), "window end marker");
      if (t >= 31) check(o[t] == (o[t-31] ^ o[t-28]), "RNG sign sequence");
      if (t == 700) begin
        inj_t hold;
        hold = inj;
        en = 1'b0;
        repeat (5) @(negedge clk);
        check(inj.sign == hold.sign && inj.big == hold.big, "holds while disabled");
        en = 1'b1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
