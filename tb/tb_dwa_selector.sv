// tb_dwa_selector: replays the two-cycle example of the 2-bit sub-DAC (8 split capacitors):
// d = 2 with Vd2 uses C1..C4 for the code and C5 for the dither; the next sample, d = 1
// with Vd1, uses C6, C7 for the code and C8, C1 for the dither. Then random decisions are
// checked against a ring-pointer reference, and the long-run use of every capacitor is
// checked to be equal within one selection.
module tb_dwa_selector;
  localparam int unsigned N_UNIT = 4;
  localparam int unsigned NCAP = 2 * N_UNIT;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, big = 1'b0;
  logic [1:0] d = '0;
  logic [NCAP-1:0] code_sel, dith_sel;
  logic [2:0] ptr;
  logic wrap;
  always #1 clk = ~clk;

  dwa_selector #(.N_UNIT(N_UNIT)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .big(big),
    .code_sel(code_sel), .dith_sel(dith_sel), .ptr(ptr), .wrap(wrap)
  );

  int checks = 0, failures = 0;
  int use_cnt [NCAP];
  int rp = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (use_cnt[i]) use_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    // cycle 1 of the example (C1 is bit 0)
    d = 2; big = 1'b0; #0.1;
    check(code_sel == 8'b0000_1111, "example cycle 1 code capacitors C1-C4");
    check(dith_sel == 8'b0001_0000, "example cycle 1 dither capacitor C5");
    @(negedge clk);
    d = 1; big = 1'b1; #0.1;
    check(ptr == 3'd5, "example cycle 2 starts at C6");
    check(code_sel == 8'b0110_0000, "example cycle 2 code capacitors C6, C7");
    check(dith_sel == 8'b1000_0001, "example cycle 2 dither capacitors C8, C1");
    @(negedge clk);
    rp = 1;
    for (int t = 0; t < 4000; t++) begin
      logic [NCAP-1:0] ec, ed;
      int nu;
      d = 2'($urandom_range(0, N_UNIT - 1));
      big = 1'($urandom);
      #0.1;
      nu = 2 * d + (big ? 2 : 1);
      ec = '0; ed = '0;
      for (int j = 0; j < nu; j++) begin
        if (j < 2 * d) ec[(rp + j) % NCAP] = 1'b1;
        else           ed[(rp + j) % NCAP] = 1'b1;
      end
      check(int'(ptr) == rp, "pointer");
      check(code_sel == ec && dith_sel == ed, "random selection");
      check(wrap == (rp + nu >= NCAP), "wrap flag");
      for (int j = 0; j < NCAP; j++) use_cnt[j] += int'(ec[j] | ed[j]);
      rp = (rp + nu) % NCAP;
      @(negedge clk);
    end
    begin
      int mn, mx;
      mn = use_cnt[0]; mx = use_cnt[0];
      foreach (use_cnt[i]) begin
        if (use_cnt[i] < mn) mn = use_cnt[i];
        if (use_cnt[i] > mx) mx = use_cnt[i];
      end
      check(mx - mn <= 1, "every capacitor used equally often");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
