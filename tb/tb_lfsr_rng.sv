// tb_lfsr_rng: checks the RNG against the recurrence o[t] = o[t-31] xor o[t-28] that a
// maximal-length x^31 + x^28 + 1 sequence obeys, checks that the first 31 outputs are the
// seed (most significant bit first), that `adv` low holds the output, and that the
// sequence is balanced (|ones - zeros| small over 20000 samples).
module tb_lfsr_rng;
  localparam logic [30:0] SEED = 31'h2A5C_93E1;
  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, r;
  always #1 clk = ~clk;

  lfsr_rng #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .adv(adv), .r(r));

  int checks = 0, failures = 0;
  bit o [20000];
  int ones = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    adv = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      o[t] = r;
      ones += int'(r);
      @(negedge clk);
      if (t == 5000) begin
        bit hold;
        hold = r;
        adv = 1'b0;
        repeat (3) @(negedge clk);
        check(r == hold, "output holds while adv is low");
        adv = 1'b1;
      end
    end
    for (int t = 0; t < 31; t++) check(o[t] == SEED[30 - t], "first outputs are the seed");
    for (int t = 31; t < 20000; t++) check(o[t] == (o[t-31] ^ o[t-28]), "LFSR recurrence");
    check(ones > 9500 && ones < 10500, "balanced sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
