// pipeline_adc_model: behavioural (real-valued, not synthesizable) model of the analog part
// of the pipelined ADC, for testbenches only.
//
// Stage 1: a sub-ADC with step delta = 2^-DELTA_LOG2 Vref deciding k = round(vin/delta)
// (clipped to +-2^DELTA_LOG2), a sub-DAC that subtracts k*delta plus the dither R*Vd
// (Vd1 = delta/2 or Vd2 = delta/4 times (1 + VD2_ERR), R = +-1), and an open-loop residue
// amplifier Vres = A1*Vx + A3*Vx^3 (defaults 7.6 and -204.8). With EXT_VD set, the dither
// magnitude of each sample is taken from the `vd_ext` input instead (used to model the
// capacitors that actually carry the dither, with their mismatch). The coefficients in use
// are the variables `a1_now` and `a3_now`, initialised from A1 and A3; a testbench may
// change them while running to model drift of the amplifier. Backend: BE_STAGES ideal
// 1.5-bit stages with thresholds +-Vref/4 and residue 2x - d.
// Timing: on every rising edge the model finishes the sample whose decision is on
// `s1_code` using the dither shown on `inj_sign`/`inj_big` in that cycle, pushes its backend
// decisions into a LATENCY-deep delay line (output `be_code`), then samples `vin` for the
// next sample. `vres` shows the residue of the last finished sample.
module pipeline_adc_model #(
  parameter real         A1          = 7.6,
  parameter real         A3          = -204.8,
  parameter real         VD2_ERR     = 0.0,
  parameter int unsigned DELTA_LOG2  = 4,
  parameter int unsigned BE_STAGES   = 10,
  parameter int unsigned LATENCY     = 6,
  parameter bit          EXT_VD      = 1'b0
) (
  input  logic                          clk,
  input  real                           vin,
  input  logic                          inj_sign,
  input  logic                          inj_big,
  input  real                           vd_ext,
  output logic signed [DELTA_LOG2+1:0]  s1_code,
  output logic [BE_STAGES-1:0][1:0]     be_code,
  output real                           vres
);

  localparam real DELTA = 1.0 / real'(1 << DELTA_LOG2);
  localparam int  KMAX  = 1 << DELTA_LOG2;

  real vin_h = 0.0;
  real a1_now = A1;
  real a3_now = A3;
  logic [BE_STAGES-1:0][1:0] dly [LATENCY];

  initial begin
    s1_code = '0;
    vres    = 0.0;
    for (int i = 0; i < LATENCY; i++) dly[i] = '{default: 2'd1};
  end

  assign be_code = dly[LATENCY-1];

  function automatic int quant(real v);
    int k;
    k = $rtoi(v / DELTA + ((v >= 0.0) ? 0.5 : -0.5));
    if (k > KMAX)  k = KMAX;
    if (k < -KMAX) k = -KMAX;
    return k;
  endfunction

  always @(posedge clk) begin
    real vd, vx, x;
    logic [BE_STAGES-1:0][1:0] c;
    if (EXT_VD) vd = vd_ext;
    else        vd = inj_big ? DELTA / 2.0 : DELTA / 4.0 * (1.0 + VD2_ERR);
    vx = vin_h - real'(s1_code) * DELTA - (inj_sign ? vd : -vd);
    x  = a1_now * vx + a3_now * vx * vx * vx;
    vres <= x;
    for (int i = 0; i < BE_STAGES; i++) begin
      if (x > 0.25)       begin c[i] = 2'd2; x = 2.0 * x - 1.0; end
      else if (x < -0.25) begin c[i] = 2'd0; x = 2.0 * x + 1.0; end
      else                begin c[i] = 2'd1; x = 2.0 * x;       end
    end
    dly[0] <= c;
    for (int i = 1; i < LATENCY; i++) dly[i] <= dly[i-1];
    vin_h   <= vin;
    s1_code <= (DELTA_LOG2+2)'(quant(vin));
  end

endmodule
