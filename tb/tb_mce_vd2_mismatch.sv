// tb_mce_vd2_mismatch: effect of a mismatch between the two dither amplitudes on the
// closed loop, and its removal by data-weighted averaging of the sub-DAC capacitors.
//
// The p3 estimate rests on Vd2 being exactly Vd1/2. If Vd2 is off by alpha (absolute),
// the Vd2 correlation carries an extra -a1*alpha. The cubic error term E1 - 2*E2 then
// settles where
//   -3/4 * a1^3 * Vd1^3 * (p3,opt - p3) + 2*a1*alpha = 0,
// that is, p3 moves by dp3 = -2*a1*alpha / (3/4 * a1^3 * Vd1^3).
// This is a first-order result. The exact cubic inverse reacts more strongly to p3 at
// large residues than its cubic term alone, so the true shift is smaller (about half of
// the first-order value for this amplifier).
// Three copies of the engine (2^14-sample windows, 700 updates each) run side by side on
// the same sine input, each with its own analog model:
//   case 0: Vd2 too large by 0.1 %. Expected: a small p3 shift and a calibrated SNDR
//           still above 70 dB.
//   case 1: the dither always uses the same two half capacitors, with mismatches +0.5 %
//           and -0.5 %. So Vd1 is exact and Vd2 is 0.5 % too large. Expected: p3 settles
//           near p3,opt + dp3 = p3,opt - 0.118, and the SNDR suffers. The p3 error leaves
//           a residual cubic term that also pulls E1, so p1 moves too and is not checked.
//   case 2: the same capacitor ring (those two plus 64 others, +-0.5 % random, zero mean),
//           but the dither is carried by the capacitors that the engine's DWA selector
//           picks (cap_dith_sel). Expected: the mismatch averages out, p3 settles at
//           p3,opt and the SNDR matches the unmismatched converter.
// With DWA the mismatch turns into a small random dither error, which stays in the output
// as noise. Only the dither contribution of each capacitor carries its mismatch. The code
// contribution is kept ideal, so the cases differ only in the dither amplitudes.
module tb_mce_vd2_mismatch;
  import mce_pkg::*;

  localparam int unsigned N_LOG2   = 14;
  localparam int unsigned LAT      = 6;
  localparam int unsigned OUT_LAT  = LAT + 3;
  localparam int unsigned UPDATES  = 700;
  localparam int unsigned AVG_FROM = 500;   // p1/p3 are averaged over updates AVG_FROM..UPDATES
  localparam int unsigned NCAP     = 66;
  localparam int unsigned NCASE    = 3;
  localparam real A1 = 7.6;
  localparam real A3 = -204.8;
  localparam real DELTA = 1.0 / 16.0;
  localparam real P1_OPT = A1;
  localparam real P3_OPT = A3 / (A1 * A1 * A1);
  localparam real ALPHA_SMALL = 0.001;      // case 0, relative to Vd2
  localparam real M_FIX = 0.005;            // case 1/2: mismatch of half capacitors 0 and 1
  localparam real VD1 = DELTA / 2.0;
  localparam real DP3_PRED = -2.0 * A1 * (M_FIX * DELTA / 4.0) / (0.75 * A1 * A1 * A1 * VD1 * VD1 * VD1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  longint cyc = 0;
  real vin = 0.0, vin_d = 0.0;
  real vin_hist [64];
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    vin   <= 0.97 * $sin(2.0 * 3.14159265358979 * 0.0123456789 * real'(cyc));
    vin_d <= vin;
    vin_hist[6'(cyc)] <= vin_d;  // input of the sample the models finish at this edge
  end

  // relative mismatch of each half capacitor of the sub-DAC ring
  real cap_m [NCAP];
  initial begin
    real mean;
    mean = 0.0;
    for (int i = 2; i < NCAP; i++) begin
      cap_m[i] = 0.01 * (real'($urandom % 10001) / 10000.0 - 0.5);
      mean += cap_m[i];
    end
    mean = mean / real'(NCAP - 2);
    for (int i = 2; i < NCAP; i++) cap_m[i] -= mean;
    cap_m[0] = M_FIX;
    cap_m[1] = -M_FIX;
  end

  function automatic real pr(param_t p);
    return real'(p) / real'(1 << PFRAC);
  endfunction

  bit sndr_on = 0;

  for (genvar c = 0; c < NCASE; c++) begin : g
    logic signed [5:0] s1_code;
    logic [9:0][1:0] be_code;
    logic inj_sign, inj_big;
    logic [65:0] cap_code_sel, cap_dith_sel;
    sample_t dout;
    logic dout_valid, p_update, lut_swap, lut_busy;
    param_t p1, p3, eps1p, eps3;
    real vres, vd_act;

    // dither magnitude actually delivered by the capacitors used for this sample;
    // a half capacitor switched from ground to a reference moves the output by delta/4
    always_comb begin
      vd_act = 0.0;
      if (c == 2) begin
        for (int i = 0; i < NCAP; i++)
          if (cap_dith_sel[i]) vd_act += DELTA / 4.0 * (1.0 + cap_m[i]);
      end else begin
        vd_act = inj_big ? DELTA / 4.0 * (2.0 + cap_m[0] + cap_m[1])
                         : DELTA / 4.0 * (1.0 + cap_m[0]);
      end
    end

    pipeline_adc_model #(.LATENCY(LAT), .A1(A1), .A3(A3),
                         .VD2_ERR(c == 0 ? ALPHA_SMALL : 0.0), .EXT_VD(c != 0)) u_model (
      .clk(clk), .vin(vin), .inj_sign(inj_sign), .inj_big(inj_big), .vd_ext(vd_act),
      .s1_code(s1_code), .be_code(be_code), .vres(vres)
    );

    mce_cal_top #(.N_LOG2(N_LOG2), .ADC_LATENCY(LAT)) dut (
      .clk(clk), .rst_n(rst_n), .s1_code(s1_code), .inj_sign(inj_sign), .inj_big(inj_big),
      .cap_code_sel(cap_code_sel), .cap_dith_sel(cap_dith_sel), .be_code(be_code),
      .dout(dout), .dout_valid(dout_valid), .p1(p1), .p3(p3), .p_update(p_update),
      .eps1p(eps1p), .eps3(eps3), .lut_swap(lut_swap), .lut_busy(lut_busy)
    );

    int  n_upd = 0, n_swap = 0, n_wrap = 0, n_big = 0, n_small = 0, n_avg = 0;
    real p1_sum = 0.0, p3_sum = 0.0;
    int  dith_use [NCAP];
    initial for (int i = 0; i < NCAP; i++) dith_use[i] = 0;

    always @(posedge clk) if (rst_n) begin
      if (inj_big) n_big++; else n_small++;
      if (lut_swap) n_swap++;
      if (dut.u_dwa.wrap) n_wrap++;
      for (int i = 0; i < NCAP; i++) if (cap_dith_sel[i]) dith_use[i]++;
      if (p_update) begin
        n_upd++;
        if (n_upd > AVG_FROM && n_upd <= UPDATES) begin
          p1_sum += pr(p1);
          p3_sum += pr(p3);
          n_avg++;
        end
        if (n_upd % 100 == 0)
          $display("case %0d update %0d: p1=%f p3=%f", c, n_upd, pr(p1), pr(p3));
      end
    end

    // SNDR after convergence: least-squares fit of dout against the input
    real sx = 0, sy = 0, sxx = 0, syy = 0, sxy = 0;
    int  sn = 0;
    always @(posedge clk) if (sndr_on && dout_valid) begin
      real x, y;
      x = vin_hist[6'(cyc - longint'(OUT_LAT))];
      y = real'(dout) / real'(1 << FRAC);
      sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
      sn++;
    end

    function automatic real sndr_db();
      real n, vx, vy, cxy, gn, res;
      n   = real'(sn);
      vx  = sxx / n - (sx / n) * (sx / n);
      vy  = syy / n - (sy / n) * (sy / n);
      cxy = sxy / n - (sx / n) * (sy / n);
      gn  = cxy / vx;
      res = vy - gn * cxy;
      return 10.0 * $log10(gn * gn * vx / res);
    endfunction
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real p1a [NCASE], p3a [NCASE], sndr [NCASE];
    int  unused_caps;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g[0].n_upd >= UPDATES && g[1].n_upd >= UPDATES && g[2].n_upd >= UPDATES);
    sndr_on = 1;
    repeat (20000) @(posedge clk);
    sndr_on = 0;

    p1a[0] = g[0].p1_sum / g[0].n_avg;  p3a[0] = g[0].p3_sum / g[0].n_avg;
    p1a[1] = g[1].p1_sum / g[1].n_avg;  p3a[1] = g[1].p3_sum / g[1].n_avg;
    p1a[2] = g[2].p1_sum / g[2].n_avg;  p3a[2] = g[2].p3_sum / g[2].n_avg;
    sndr[0] = g[0].sndr_db();
    sndr[1] = g[1].sndr_db();
    sndr[2] = g[2].sndr_db();
    for (int c = 0; c < NCASE; c++)
      $display("case %0d: mean p1=%f mean p3=%f (p3 - p3,opt = %f)  SNDR %0.1f dB", c,
               p1a[c], p3a[c], p3a[c] - P3_OPT, sndr[c]);
    $display("predicted p3 shift for case 1: %f", DP3_PRED);

    check(p1a[0] > P1_OPT - 0.05 && p1a[0] < P1_OPT + 0.05, "case 0: p1 near optimum");
    check(p1a[2] > P1_OPT - 0.05 && p1a[2] < P1_OPT + 0.05, "case 2: p1 near optimum with DWA");
    // case 0: 0.1 % mismatch is tolerable
    check(p3a[0] > P3_OPT - 0.06 && p3a[0] < P3_OPT + 0.06, "case 0: p3 near optimum");
    check(sndr[0] > 70.0, "case 0: SNDR above 70 dB with 0.1 % Vd2 mismatch");
    // case 1: fixed capacitors, p3 pulled by the predicted amount
    check(p3a[1] - P3_OPT < 0.4 * DP3_PRED && p3a[1] - P3_OPT > 1.25 * DP3_PRED,
          "case 1: p3 shift between 0.4 and 1.25 times the first-order prediction");
    check(sndr[1] < sndr[2] - 3.0, "case 1: mismatch costs SNDR without DWA");
    // case 2: DWA removes the bias
    check(p3a[2] > P3_OPT - 0.06 && p3a[2] < P3_OPT + 0.06, "case 2: p3 near optimum with DWA");
    check(sndr[2] > 70.0, "case 2: calibrated SNDR above 70 dB with DWA");

    // mechanisms
    unused_caps = 0;
    for (int i = 0; i < NCAP; i++) if (g[2].dith_use[i] == 0) unused_caps++;
    $display("case 2: dither use of capacitor 0..3: %0d %0d %0d %0d, DWA wraps %0d",
             g[2].dith_use[0], g[2].dith_use[1], g[2].dith_use[2], g[2].dith_use[3],
             g[2].n_wrap);
    check(unused_caps == 0, "case 2: every capacitor carried the dither");
    check(g[2].n_wrap > 0, "DWA pointer wrap happened");
    check(g[0].n_swap > 1 && g[1].n_swap > 1 && g[2].n_swap > 1, "correction table swaps happened");
    check(g[0].n_big > 0 && g[0].n_small > 0, "Vd1 and Vd2 injection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (UPDATES * (2 << N_LOG2) + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
