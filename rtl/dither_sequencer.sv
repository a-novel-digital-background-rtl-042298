// dither_sequencer: alternating injection of the two dither amplitudes.
//
// The multi-correlation estimate needs the residue correlated with the RNG twice: once
// while +-Vd1 is injected and once while +-Vd2 = Vd1/2 is injected. The two amplitudes are
// applied alternately in windows of 2^N_LOG2 samples (2^17 in the document's example):
// first a Vd1 window, then a Vd2 window, after which the correction parameters are
// updated once. The sign of every injected sample is the RNG bit.
// Interface: every cycle with `en` high is one converter sample; `inj` describes the dither
// of the current sample and is meant for the sub-DAC and, after delaying it by the ADC
// latency, for the estimation logic. `inj.win_end` marks the last sample of the Vd2 window.
// Timing: `inj` is a registered state decode, stable for the whole cycle.
// The order Vd1-then-Vd2 is this design's choice; the document allows either order.
module dither_sequencer
  import mce_pkg::*;
#(
  parameter int unsigned  N_LOG2 = 17,
  parameter logic [30:0]  SEED   = 31'h2A5C_93E1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output inj_t inj
);

  logic [N_LOG2-1:0] cnt;
  logic              phase;   // 0: Vd1 window, 1: Vd2 window
  logic              r;

  lfsr_rng #(.SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .adv  (en),
    .r    (r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      phase <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (&cnt) phase <= ~phase;
    end
  end

  always_comb begin
    inj.valid   = en;
    inj.sign    = r;
    inj.big     = ~phase;
    inj.win_end = phase & (&cnt);
  end

endmodule
