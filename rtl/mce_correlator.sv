// mce_correlator: the correlation ("MCE") block of the estimator.
//
// It estimates E[R1*Db1] and E[R2*Db2]: the correlation of the linearized residue with the
// RNG while the large dither Vd1 is injected, and while the small dither Vd2 is injected.
// Because R is +1 or -1 the product is only a conditional negation, and the expectation
// (the low-pass filter of the scheme) is an accumulator over a window of 2^N_LOG2 samples;
// the division by the window length is a shift left to the estimator.
// Interface: `u` is the linearized residue (Q.16) and `inj` its dither record, aligned to
// the same sample. At the sample with `inj.win_end` the two sums (including that sample)
// appear on `s1` (Vd1 window) and `s2` (Vd2 window) with a one-cycle `sums_valid` pulse, and
// both accumulators restart. Samples without `inj.valid` are ignored.
// Timing: `sums_valid` rises on the clock edge that takes in the window's last sample.
module mce_correlator
  import mce_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t u,
  input  inj_t    inj,
  output acc_t    s1,
  output acc_t    s2,
  output logic    sums_valid
);

  acc_t acc1, acc2, term;

  assign term = inj.sign ? acc_t'(u) : -acc_t'(u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1       <= '0;
      acc2       <= '0;
      s1         <= '0;
      s2         <= '0;
      sums_valid <= 1'b0;
    end else begin
      sums_valid <= 1'b0;
      if (inj.valid) begin
        if (inj.win_end) begin
          s1         <= inj.big ? acc1 + term : acc1;
          s2         <= inj.big ? acc2 : acc2 + term;
          sums_valid <= 1'b1;
          acc1       <= '0;
          acc2       <= '0;
        end else if (inj.big) begin
          acc1 <= acc1 + term;
        end else begin
          acc2 <= acc2 + term;
        end
      end
    end
  end

endmodule
