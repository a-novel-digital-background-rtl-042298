// linear_recombine: linear gain correction and recombination of the first stage.
//
// Instead of dividing the linearized residue by the estimated stage gain, the first-stage
// decision is multiplied by it: Dout = p1 * D1 + Db1. The output then carries a fixed global
// gain of about a1, which a system with gain control tolerates, and needs no divider.
// D1 is the value the first-stage sub-DAC actually subtracted: the sub-ADC decision k times
// the step delta = 2^-DELTA_LOG2, plus the injected dither R*Vd (Vd = delta/2 or delta/4).
// Adding the dither back digitally is what lets it be injected without disturbing the
// conversion; the document implies this (the two residues of one input give the same
// result once the gains are corrected) without spelling out the sum.
// Interface: `k` signed decision, `inj` its dither record, `db1` linearized residue (Q.16),
// `p1` (Q.24); `dout` is Q.16, in residue units (input times about a1).
// Timing: one register stage.
module linear_recombine
  import mce_pkg::*;
#(
  parameter int unsigned DELTA_LOG2 = 4,
  localparam int unsigned KW = DELTA_LOG2 + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [KW-1:0] k,
  input  inj_t                 inj,
  input  sample_t              db1,
  input  param_t               p1,
  output sample_t              dout,
  output logic                 dout_valid
);

  sample_t d1, vd;
  logic signed [63:0] prod;

  always_comb begin
    vd   = inj.big ? (sample_t'(1) <<< (FRAC - DELTA_LOG2 - 1))
                   : (sample_t'(1) <<< (FRAC - DELTA_LOG2 - 2));
    d1   = (sample_t'(k) <<< (FRAC - DELTA_LOG2)) + (inj.sign ? vd : -vd);
    prod = (64'(p1) * 64'(d1)) >>> PFRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout       <= sample_t'(prod) + db1;
      dout_valid <= inj.valid;
    end
  end

endmodule
