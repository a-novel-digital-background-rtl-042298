// lms_estimator: error extraction and the two LMS recursions for p1 and p3.
//
// From the window sums of the correlator it forms the means E1 = E[R1*Db1] and
// E2 = E[R2*Db2] (a shift by N_LOG2), then
//   eps3  = E1 - 2*E2          proportional to the remaining cubic error (p3,opt - p3),
//   eps1' = E1/p1 + Vd1        zero when p1 equals the linear gain a1,
// and updates  p1 <- p1 - mu1*eps1'  and  p3 <- p3 - mu3*eps3  once per window pair.
// Each recursion is a register and an adder (plus a constant multiply for the step size).
// The division by p1 is done by a sequential divider in NW = 56 clocks after the sums
// arrive; p1 and p3 change together when it completes.
// Step sizes are Q.10 constants: the defaults 3113 and 983 are the document's
// mu1 = 3.04 and mu3 = 0.96. P1_INIT = 8.0 (the ideal gain 2^3) and P3_INIT = 0 are the
// starting points of the document's convergence plots. VD1_LOG2 = 5 gives Vd1 = 2^-5 Vref,
// half of the first-stage sub-ADC step delta = 1/16.
// Interface: `s1`, `s2`, `sums_valid` from mce_correlator; `p1`, `p3` in Q.24; `upd`
// pulses in the cycle after the parameters change; `eps1p`, `eps3` hold the last errors.
module lms_estimator
  import mce_pkg::*;
#(
  parameter int unsigned N_LOG2   = 17,
  parameter int unsigned VD1_LOG2 = 5,
  parameter int          MU1_Q10  = 3113,
  parameter int          MU3_Q10  = 983,
  parameter param_t      P1_INIT  = param_t'(8) <<< PFRAC,
  parameter param_t      P3_INIT  = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  acc_t   s1,
  input  acc_t   s2,
  input  logic   sums_valid,
  output param_t p1,
  output param_t p3,
  output param_t eps1p,
  output param_t eps3,
  output logic   upd
);

  localparam int unsigned NW = 56;
  localparam param_t VD1 = P_ONE >>> VD1_LOG2;

  acc_t   m1, m2;
  param_t e1_abs, den;
  logic   e1_neg;
  logic [NW-1:0] quo;
  logic   div_busy, div_done;
  param_t eps3_pend;
  param_t eps1p_now;
  logic signed [63:0] d1, d3;
  logic   e1_neg_q;

  always_comb begin
    m1     = (s1 <<< (PFRAC - FRAC)) >>> N_LOG2;
    m2     = (s2 <<< (PFRAC - FRAC)) >>> N_LOG2;
    e1_neg = m1[AW-1];
    e1_abs = param_t'(e1_neg ? -m1 : m1);
    den    = (p1 > 0) ? p1 : param_t'(1);
  end

  seq_divider #(.NW(NW), .DW(PW)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(sums_valid),
    .num  ({e1_abs[PW-1:0], {PFRAC{1'b0}}}),
    .den  (den),
    .quo  (quo),
    .busy (div_busy),
    .done (div_done)
  );

  always_comb begin
    eps1p_now = (e1_neg_q ? -param_t'(quo[PW-1:0]) : param_t'(quo[PW-1:0])) + VD1;
    d1        = (64'(eps1p_now) * 64'(MU1_Q10)) >>> 10;
    d3        = (64'(eps3_pend) * 64'(MU3_Q10)) >>> 10;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1        <= P1_INIT;
      p3        <= P3_INIT;
      eps1p     <= '0;
      eps3      <= '0;
      eps3_pend <= '0;
      e1_neg_q  <= 1'b0;
      upd       <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (sums_valid && !div_busy) begin
        eps3_pend <= param_t'(m1 - (m2 <<< 1));
        e1_neg_q  <= e1_neg;
      end
      if (div_done) begin
        p1    <= p1 - param_t'(d1);
        p3    <= p3 - param_t'(d3);
        eps1p <= eps1p_now;
        eps3  <= eps3_pend;
        upd   <= 1'b1;
      end
    end
  end

  // A new pair of sums must not arrive while the previous division runs.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(sums_valid && div_busy))
    else $error("lms_estimator: window shorter than the divider latency");

endmodule
