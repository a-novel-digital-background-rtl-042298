// mce_cal_top: digital background calibration of the first stage of a pipelined ADC
// with the multi-correlation estimation (MCE) technique.
//
// The first stage has an open-loop residue amplifier Vres = a1*Vx + a3*Vx^3. Every sample,
// the sub-DAC adds a dither +-Vd1 or +-Vd2 (Vd2 = Vd1/2, sign from one RNG, amplitudes in
// alternating windows of 2^N_LOG2 samples). The digital part here
//   * tells the sub-DAC what to inject (inj_sign, inj_big) and which split unit capacitors
//     to use (cap_code_sel, cap_dith_sel; data-weighted averaging over the ring),
//   * recombines the ten 1.5-bit backend decisions into the digitized residue Db,
//   * removes the cubic error with a table e(Db) computed for the current p3,
//   * correlates the linearized residue with the RNG in both windows, forms
//     eps3 = E1 - 2*E2 and eps1' = E1/p1 + Vd1 and updates p1, p3 by LMS once per pair,
//   * outputs Dout = p1*(k*delta + R*Vd) + Db1.
// Only the first stage is calibrated; the backend is taken as ideal, as in the document's
// 12-bit example. The defaults are that example: a (3+1)-bit first stage with step
// delta = 1/16 (decision k in [-16, 16]), ten backend stages, windows of 2^17 samples,
// mu1 = 3.04, mu3 = 0.96, p1 starting at 8.
// Interface and timing (one sample per clock, continuous after reset):
//   * during a cycle the analog stage-1 decision `s1_code` (k) and `inj_*`, `cap_*` refer to
//     the same sample; the DWA pointer advances at the end of the cycle;
//   * `be_code` must carry that sample's backend decisions ADC_LATENCY clocks later
//     (ADC_LATENCY is this design's assumption about the analog pipeline);
//   * `dout` of that sample appears ADC_LATENCY + 3 clocks after its cycle (`dout_valid`);
//   * `p1`, `p3` (Q.24) change together, `p_update` pulses after each change;
//   * `eps1p`, `eps3` hold the last error estimates, `lut_swap` pulses when a correction
//     table for a new p3 becomes active and `lut_busy` is high while one is computed.
module mce_cal_top
  import mce_pkg::*;
#(
  parameter int unsigned N_LOG2      = 17,
  parameter int unsigned DELTA_LOG2  = 4,
  parameter int unsigned BE_STAGES   = 10,
  parameter int unsigned ADC_LATENCY = 6,
  parameter int          MU1_Q10     = 3113,
  parameter int          MU3_Q10     = 983,
  parameter param_t      P1_INIT     = param_t'(8) <<< PFRAC,
  parameter param_t      P3_INIT     = '0,
  parameter logic [30:0] SEED        = 31'h2A5C_93E1,
  localparam int unsigned KW     = DELTA_LOG2 + 2,
  localparam int unsigned K_MAX  = 1 << DELTA_LOG2,
  localparam int unsigned N_UNIT = 2 * K_MAX + 1,
  localparam int unsigned NCAP   = 2 * N_UNIT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // analog stage 1, current sample
  input  logic signed [KW-1:0]      s1_code,
  output logic                      inj_sign,
  output logic                      inj_big,
  output logic [NCAP-1:0]           cap_code_sel,
  output logic [NCAP-1:0]           cap_dith_sel,
  // backend decisions, ADC_LATENCY clocks later
  input  logic [BE_STAGES-1:0][1:0] be_code,
  // calibrated output and parameters
  output sample_t                   dout,
  output logic                      dout_valid,
  output param_t                    p1,
  output param_t                    p3,
  output logic                      p_update,
  output param_t                    eps1p,
  output param_t                    eps3,
  output logic                      lut_swap,
  output logic                      lut_busy
);

  localparam int unsigned BW = $bits(inj_t) + KW;

  inj_t inj_now, inj_db, inj_u;
  logic signed [KW-1:0] k_db, k_u;
  logic signed [BE_STAGES:0] db;
  sample_t db1;
  acc_t    s1, s2;
  logic    sums_valid;
  logic    dwa_wrap;
  logic [$clog2(NCAP)-1:0] dwa_ptr;
  logic    run;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;

  // ---- dither injection and sub-DAC capacitor selection ---------------------------
  dither_sequencer #(.N_LOG2(N_LOG2), .SEED(SEED)) u_seq (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (run),
    .inj  (inj_now)
  );

  assign inj_sign = inj_now.sign;
  assign inj_big  = inj_now.big;

  logic [$clog2(N_UNIT)-1:0] dwa_d;
  assign dwa_d = ($clog2(N_UNIT))'(s1_code + KW'(K_MAX));

  dwa_selector #(.N_UNIT(N_UNIT)) u_dwa (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (run),
    .d       (dwa_d),
    .big     (inj_now.big),
    .code_sel(cap_code_sel),
    .dith_sel(cap_dith_sel),
    .ptr     (dwa_ptr),
    .wrap    (dwa_wrap)
  );

  // ---- align the dither record and decision with the backend code ----------------
  // +1 for the register in backend_dec
  pipe_delay #(.W(BW), .DEPTH(ADC_LATENCY + 1)) u_dly_db (
    .clk  (clk),
    .rst_n(rst_n),
    .din  ({inj_now, s1_code}),
    .dout ({inj_db, k_db})
  );

  backend_dec #(.N_STG(BE_STAGES)) u_dec (
    .clk  (clk),
    .rst_n(rst_n),
    .code (be_code),
    .db   (db)
  );

  // ---- nonlinear correction --------------------------------------------------------
  nonlinear_cal #(.DB_W(BE_STAGES + 1)) u_nl (
    .clk    (clk),
    .rst_n  (rst_n),
    .db     (db),
    .p3     (p3),
    .swap   (inj_db.valid && inj_db.win_end),
    .db1    (db1),
    .busy   (lut_busy),
    .swapped(lut_swap)
  );

  pipe_delay #(.W(BW), .DEPTH(1)) u_dly_u (
    .clk  (clk),
    .rst_n(rst_n),
    .din  ({inj_db, k_db}),
    .dout ({inj_u, k_u})
  );

  // ---- estimation ------------------------------------------------------------------
  mce_correlator u_mce (
    .clk       (clk),
    .rst_n     (rst_n),
    .u         (db1),
    .inj       (inj_u),
    .s1        (s1),
    .s2        (s2),
    .sums_valid(sums_valid)
  );

  lms_estimator #(
    .N_LOG2  (N_LOG2),
    .VD1_LOG2(DELTA_LOG2 + 1),
    .MU1_Q10 (MU1_Q10),
    .MU3_Q10 (MU3_Q10),
    .P1_INIT (P1_INIT),
    .P3_INIT (P3_INIT)
  ) u_lms (
    .clk       (clk),
    .rst_n     (rst_n),
    .s1        (s1),
    .s2        (s2),
    .sums_valid(sums_valid),
    .p1        (p1),
    .p3        (p3),
    .eps1p     (eps1p),
    .eps3      (eps3),
    .upd       (p_update)
  );

  // ---- linear correction and recombination ----------------------------------------
  linear_recombine #(.DELTA_LOG2(DELTA_LOG2)) u_rec (
    .clk       (clk),
    .rst_n     (rst_n),
    .k         (k_u),
    .inj       (inj_u),
    .db1       (db1),
    .p1        (p1),
    .dout      (dout),
    .dout_valid(dout_valid)
  );

  initial assert (N_LOG2 >= 7) else $error("mce_cal_top: windows must outlast the divider");

endmodule
