// tb_linear_recombine: random decisions k in [-16, 16], dither signs and amplitudes,
// residues and gains p1 in [6, 10]; the output one clock later must equal
// p1 * (k/16 + R*Vd) + Db1 (Vd = 1/32 or 1/64) within 1 LSB of Q.16.
module tb_linear_recombine;
  import mce_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [5:0] k = '0;
  inj_t inj = '0;
  sample_t db1 = '0, dout;
  param_t p1 = '0;
  logic dout_valid;
  always #1 clk = ~clk;

  linear_recombine #(.DELTA_LOG2(4)) dut (
    .clk(clk), .rst_n(rst_n), .k(k), .inj(inj), .db1(db1), .p1(p1),
    .dout(dout), .dout_valid(dout_valid)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      real want, got, vd;
      @(negedge clk);
      k   = 6'($urandom_range(0, 32) - 16);
      inj.valid = 1'($urandom);
      inj.sign = 1'($urandom);
      inj.big  = 1'($urandom);
      db1 = sample_t'($urandom_range(0, 1 << 17)) - sample_t'(1 << 16);
      p1  = param_t'($urandom_range(6 << 20, 10 << 20)) <<< 4;
      vd  = inj.big ? 1.0 / 32.0 : 1.0 / 64.0;
      want = real'(p1) / 16777216.0 * (real'(k) / 16.0 + (inj.sign ? vd : -vd))
             + real'(db1) / 65536.0;
      @(negedge clk);
      got = real'(dout) / 65536.0;
      check(got - want < 1.0 / 65536.0 && want - got < 1.0 / 65536.0, "recombined output");
      check(dout_valid == inj.valid, "valid follows the sample");
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
