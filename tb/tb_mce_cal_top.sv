// tb_mce_cal_top: closed-loop test of the calibration engine with a behavioural model of
// the analog stages (open-loop amplifier a1 = 7.6, a3 = -204.8, so p1,opt = 7.6 and
// p3,opt = a3/a1^3 = -0.46654).
// A near-full-scale sine drives the model. The engine starts from p1 = 8, p3 = 0 and must
// bring both parameters to their optimum; afterwards the calibrated output divided by p1
// must follow the input within a few LSB of a 12-bit converter. The test also counts the
// mechanisms of the scheme (Vd1/Vd2 windows, both dither signs, LMS updates, correction
// table swaps, DWA pointer wrap-arounds) and checks the output latency.
// Finally the amplifier drifts: its linear gain drops to 7.4 while the converter keeps
// running, and the loop must track the new optimum (p1 = 7.4, p3 = -204.8/7.4^3).
// Window length and run length are reduced so that the test runs in seconds.
module tb_mce_cal_top;
  import mce_pkg::*;

  localparam int unsigned N_LOG2  = 12;
  localparam int unsigned LAT     = 6;
  localparam int unsigned OUT_LAT = LAT + 3;
  localparam int unsigned UPDATES = 700;
  localparam int unsigned TRACK_UPDATES = 600;
  localparam real A1_DRIFT = 7.4;
  localparam real P3_DRIFT = -204.8 / (7.4 * 7.4 * 7.4);
  localparam real P1_OPT = 7.6;
  localparam real P3_OPT = -204.8 / (7.6 * 7.6 * 7.6);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  real vin = 0.0;
  logic signed [5:0] s1_code;
  logic [9:0][1:0] be_code;
  logic inj_sign, inj_big;
  logic [65:0] cap_code_sel, cap_dith_sel;
  sample_t dout;
  logic dout_valid, p_update, lut_swap, lut_busy;
  param_t p1, p3, eps1p, eps3;
  real vres;

  pipeline_adc_model #(.LATENCY(LAT)) u_model (
    .clk(clk), .vin(vin), .inj_sign(inj_sign), .inj_big(inj_big), .vd_ext(0.0),
    .s1_code(s1_code), .be_code(be_code), .vres(vres)
  );

  mce_cal_top #(.N_LOG2(N_LOG2), .ADC_LATENCY(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .s1_code(s1_code), .inj_sign(inj_sign), .inj_big(inj_big),
    .cap_code_sel(cap_code_sel), .cap_dith_sel(cap_dith_sel), .be_code(be_code),
    .dout(dout), .dout_valid(dout_valid), .p1(p1), .p3(p3), .p_update(p_update),
    .eps1p(eps1p), .eps3(eps3), .lut_swap(lut_swap), .lut_busy(lut_busy)
  );

  int checks = 0, failures = 0;
  int n_big = 0, n_small = 0, n_pos = 0, n_neg = 0, n_upd = 0, n_swap = 0, n_wrap = 0;
  longint cyc = 0;
  real vin_hist [64];
  logic [31:0] first_valid = 0;
  real err_max = 0.0, err_sq = 0.0;
  int  n_err = 0;
  logic [6:0] ptr_prev = 0;

  function automatic real pr(param_t p);
    return real'(p) / real'(1 << PFRAC);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // stimulus: sine of amplitude 0.97 Vref, incommensurate frequency
  always @(posedge clk) begin
    cyc <= cyc + 1;
    vin <= 0.97 * $sin(2.0 * 3.14159265358979 * 0.0123456789 * real'(cyc));
    vin_hist[cyc % 64] <= u_model.vin_h;  // input of the sample finished at this edge
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (inj_big) n_big++; else n_small++;
    if (inj_sign) n_pos++; else n_neg++;
    if (p_update) begin
      n_upd++;
      if (n_upd % 50 == 0)
        $display("update %0d: p1=%f p3=%f eps1'=%g eps3=%g", n_upd, pr(p1), pr(p3),
                 pr(eps1p), pr(eps3));
    end
    if (lut_swap) n_swap++;
    if (dut.u_dwa.wrap) n_wrap++;
  end

  // latency: the first dout_valid must come OUT_LAT cycles after the first sample
  int first_sample_cyc = -1, first_out_cyc = -1;
  always @(posedge clk) if (rst_n) begin
    if (first_sample_cyc < 0 && dut.inj_now.valid) first_sample_cyc = int'(cyc);
    if (first_out_cyc < 0 && dout_valid) first_out_cyc = int'(cyc);
  end

  // SNDR of the output: fit dout = g*vin + c by least squares over a measurement window;
  // the residual is noise plus distortion. Window 0 is taken before the first LMS update
  // (p1 = 8, p3 = 0: the uncalibrated converter), window 1 after convergence.
  real sx[2], sy[2], sxx[2], syy[2], sxy[2];
  int  sn[2];
  int  win = 0;
  bit  sndr_on = 0;
  initial for (int i = 0; i < 2; i++) begin
    sx[i] = 0; sy[i] = 0; sxx[i] = 0; syy[i] = 0; sxy[i] = 0; sn[i] = 0;
  end
  always @(posedge clk) if (sndr_on && dout_valid) begin
    real x, y;
    x = vin_hist[(cyc - OUT_LAT) % 64];
    y = real'(dout) / real'(1 << FRAC);
    sx[win] += x; sy[win] += y; sxx[win] += x * x; syy[win] += y * y; sxy[win] += x * y;
    sn[win]++;
  end

  function automatic real sndr_db(int i);
    real n, vx, vy, cxy, g, res;
    n   = real'(sn[i]);
    vx  = sxx[i] / n - (sx[i] / n) * (sx[i] / n);
    vy  = syy[i] / n - (sy[i] / n) * (sy[i] / n);
    cxy = sxy[i] / n - (sx[i] / n) * (sy[i] / n);
    g   = cxy / vx;
    res = vy - g * cxy;
    return 10.0 * $log10(g * g * vx / res);
  endfunction

  // output linearity after convergence: dout / p1 against the input of that sample.
  // vin_hist[c] holds the input of the sample that the model finishes, and the engine
  // takes in, at the edge of cycle c; its output is seen OUT_LAT edges later.
  bit measuring = 0;
  always @(posedge clk) if (measuring && dout_valid) begin
    real err;
    err = real'(dout) / real'(1 << FRAC) / pr(p1) - vin_hist[(cyc - OUT_LAT) % 64];
    if (err < 0) err = -err;
    if (err > err_max) err_max = err;
    err_sq += err * err;
    n_err++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // uncalibrated window: the first Vd1/Vd2 window pair, before any update
    wait (dout_valid);
    sndr_on = 1;
    repeat (4000) @(posedge clk);
    sndr_on = 0;
    check(n_upd == 0, "first SNDR window precedes the first update");
    wait (n_upd >= UPDATES);
    $display("final: p1=%f p3=%f", pr(p1), pr(p3));
    check(pr(p1) > P1_OPT - 0.05 && pr(p1) < P1_OPT + 0.05, "p1 converged to a1");
    check(pr(p3) > P3_OPT - 0.08 && pr(p3) < P3_OPT + 0.08, "p3 converged to a3/a1^3");
    measuring = 1;
    win = 1;
    sndr_on = 1;
    repeat (20000) @(posedge clk);
    measuring = 0;
    sndr_on = 0;
    $display("SNDR before calibration %0.1f dB (ENOB %0.2f), after %0.1f dB (ENOB %0.2f)",
             sndr_db(0), (sndr_db(0) - 1.76) / 6.02, sndr_db(1), (sndr_db(1) - 1.76) / 6.02);
    check(sndr_db(0) < 50.0, "uncalibrated converter is far from 12 bits");
    check(sndr_db(1) > 68.0, "calibrated SNDR above 68 dB");
    $display("output error vs input: max %g rms %g (12-bit LSB = %g)", err_max,
             $sqrt(err_sq / n_err), 2.0 / 4096.0);
    check(n_err > 19000, "outputs measured");
    check(err_max < 4.0 * 2.0 / 4096.0, "calibrated output within 4 LSB of the input");
    check(first_out_cyc - first_sample_cyc == int'(OUT_LAT), "output latency");
    $display("mechanisms: vd1=%0d vd2=%0d r+=%0d r-=%0d updates=%0d swaps=%0d dwa_wraps=%0d",
             n_big, n_small, n_pos, n_neg, n_upd, n_swap, n_wrap);
    check(n_big > 0, "Vd1 injection happened");
    check(n_small > 0, "Vd2 injection happened");
    check(n_pos > 0 && n_neg > 0, "both dither signs happened");
    check(n_upd > 0, "LMS update happened");
    check(n_swap > 1, "correction table swap happened");
    check(n_wrap > 0, "DWA pointer wrap happened");
    // amplifier drift: the loop tracks the new optimum
    u_model.a1_now = A1_DRIFT;
    wait (n_upd >= UPDATES + TRACK_UPDATES);
    $display("after drift to a1 = %0.2f: p1=%f p3=%f (optimum %f %f)", A1_DRIFT, pr(p1),
             pr(p3), A1_DRIFT, P3_DRIFT);
    check(pr(p1) > A1_DRIFT - 0.05 && pr(p1) < A1_DRIFT + 0.05, "p1 tracked the gain drift");
    check(pr(p3) > P3_DRIFT - 0.08 && pr(p3) < P3_DRIFT + 0.08, "p3 tracked the gain drift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((UPDATES + TRACK_UPDATES) * (2 << N_LOG2) + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
