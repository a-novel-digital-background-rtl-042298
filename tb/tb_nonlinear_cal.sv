// tb_nonlinear_cal: after reset (p3 = 0) the first table must become active by itself and
// pass the residue unchanged. With p3 set to the document's -0.46654 the new table must not
// be used before `swap`; after the swap the output, one clock after the input, must be the
// root u of u + p3*u^3 = Db (found here by Newton iteration in floating point) for every
// backend code in the monotonic range of the cubic, within 1 LSB of Q.16 plus 2 LSB
// divided by the slope 1 + 3*p3*u^2 (rounding in the evaluation of the cubic is magnified
// where the cubic is flat).
module tb_nonlinear_cal;
  import mce_pkg::*;
  localparam int unsigned DB_W = 11;
  localparam real P3 = -204.8 / (7.6 * 7.6 * 7.6);
  logic clk = 1'b0, rst_n = 1'b0, swap = 1'b0;
  logic signed [DB_W-1:0] db = '0;
  param_t p3 = '0;
  sample_t db1;
  logic busy, swapped;
  always #1 clk = ~clk;

  nonlinear_cal #(.DB_W(DB_W)) dut (
    .clk(clk), .rst_n(rst_n), .db(db), .p3(p3), .swap(swap),
    .db1(db1), .busy(busy), .swapped(swapped)
  );

  int checks = 0, failures = 0, nswap = 0;
  always @(posedge clk) if (swapped) nswap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real root(real dbv, real p);
    real u = dbv;
    for (int i = 0; i < 60; i++) u = u - (u + p * u * u * u - dbv) / (1.0 + 3.0 * p * u * u);
    return u;
  endfunction

  // drive one code, return the output one clock later
  task automatic probe(input int code, output real outv);
    @(negedge clk);
    db = DB_W'(code);
    @(negedge clk);
    outv = real'(db1) / 65536.0;
  endtask

  initial begin
    real o;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #0.1;
    check(busy, "solver starts after reset");
    wait (nswap == 1);
    for (int t = 0; t < 200; t++) begin
      int c = $urandom_range(0, 2046) - 1023;
      probe(c, o);
      check(o == real'(c) / 1024.0, "p3 = 0 table passes the residue");
    end
    // new p3: solved into the inactive bank
    p3 = param_t'($rtoi(P3 * 16777216.0));
    @(negedge clk);
    @(negedge clk);
    check(busy, "solver restarts for a new p3");
    wait (!busy);
    repeat (5) @(negedge clk);
    check(nswap == 1, "no swap without the window boundary");
    for (int t = 0; t < 100; t++) begin
      int c = $urandom_range(0, 1120) - 560;
      probe(c, o);
      check(o == real'(c) / 1024.0, "old table stays active until swap");
    end
    @(negedge clk);
    swap = 1'b1;
    @(negedge clk);
    swap = 1'b0;
    @(negedge clk);
    check(nswap == 2, "swap at the window boundary");
    for (int c = -560; c <= 560; c++) begin
      real pq, r, tol;
      pq = real'(p3 >>> 8) / 65536.0;
      r = root(real'(c) / 1024.0, pq);
      tol = (1.0 + 2.0 / (1.0 + 3.0 * pq * r * r)) / 65536.0;
      probe(c, o);
      if (o - r > tol || r - o > tol) begin
        $display("code %0d: got %f want %f", c, o, r);
        check(0, "linearized residue");
      end else check(1, "linearized residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
