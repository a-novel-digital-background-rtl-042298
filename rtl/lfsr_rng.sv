// lfsr_rng: pseudorandom binary sequence generator (the "RNG" of the calibration scheme).
//
// The scheme needs one equiprobable binary sequence R in {+1,-1} that is uncorrelated with
// the converter input; one generator serves every dither amplitude. How the sequence is
// generated is not specified, so this block uses a 31-bit maximal-length Fibonacci LFSR
// (polynomial x^31 + x^28 + 1, period 2^31 - 1), which is this design's choice.
// Interface: `adv` shifts the register once per converter sample; `r` is the current bit
// (1 means R = +1). Timing: `r` changes on the clock edge after a cycle with `adv` high.
// Reset loads SEED, which must be nonzero.
module lfsr_rng #(
  parameter logic [30:0] SEED = 31'h2A5C_93E1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  output logic r
);

  logic [30:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= SEED;
    else if (adv) state <= {state[29:0], state[30] ^ state[27]};
  end

  assign r = state[30];

  initial assert (SEED != '0) else $error("lfsr_rng: SEED must be nonzero");

endmodule
