// tb_backend_dec: random 1.5-bit decisions of ten stages; the output one clock later must
// equal sum_i d_i * 2^(10-i) LSB. Also checks the all-(+1) and all-(-1) extremes.
module tb_backend_dec;
  localparam int unsigned N_STG = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_STG-1:0][1:0] code;
  logic signed [N_STG:0] db;
  always #1 clk = ~clk;

  backend_dec #(.N_STG(N_STG)) dut (.clk(clk), .rst_n(rst_n), .code(code), .db(db));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_db(logic [N_STG-1:0][1:0] c);
    int s = 0;
    for (int i = 0; i < N_STG; i++) s += (int'(c[i]) - 1) * (1 << (N_STG - 1 - i));
    return s;
  endfunction

  initial begin
    code = '{default: 2'd1};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3002; t++) begin
      logic [N_STG-1:0][1:0] c;
      if (t == 0)      c = '{default: 2'd2};
      else if (t == 1) c = '{default: 2'd0};
      else for (int i = 0; i < N_STG; i++) c[i] = 2'($urandom_range(0, 2));
      @(negedge clk);
      code = c;
      @(negedge clk);
      check(int'(db) == ref_db(c), "recombined residue");
      if (t == 0) check(int'(db) == 1023, "all +1");
      if (t == 1) check(int'(db) == -1023, "all -1");
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
