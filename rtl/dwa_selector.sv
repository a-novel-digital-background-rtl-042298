// dwa_selector: data-weighted-averaging selection for the modified first-stage sub-DAC.
//
// A mismatch between the two dither amplitudes biases the p3 estimate, so the sub-DAC
// capacitors are shuffled. Every unit capacitor of the sub-DAC is split in two, giving
// NCAP = 2*N_UNIT equal capacitors arranged in a ring. For a sub-ADC decision d the
// block selects the 2*d capacitors that follow the ring pointer for the code, then the
// next 2 capacitors (Vd1 injected) or the next 1 capacitor (Vd2 injected) for the dither,
// and moves the pointer past all of them, so that over time every capacitor is used
// equally often. This is the procedure of the document's 2-bit example (N_UNIT = 4,
// eight capacitors), which is the default here; the top uses one unit per sub-ADC level.
// Interface: `d` in [0, N_UNIT-1], `big` selects Vd1; `code_sel` / `dith_sel` are one bit
// per capacitor; `ptr` is the index of the first capacitor used by the current sample.
// Timing: the selections are combinational from `d`, `big` and the pointer; the pointer
// advances on the clock edge ending a cycle with `en` high.
// Which reference a selected capacitor is switched to (it depends on the fully
// differential sub-DAC and on the RNG sign) is left to the analog side.
module dwa_selector #(
  parameter int unsigned N_UNIT = 4,
  localparam int unsigned NCAP  = 2 * N_UNIT,
  localparam int unsigned PW_   = $clog2(NCAP),
  localparam int unsigned DW_   = $clog2(N_UNIT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [DW_-1:0]   d,
  input  logic             big,
  output logic [NCAP-1:0]  code_sel,
  output logic [NCAP-1:0]  dith_sel,
  output logic [PW_-1:0]   ptr,
  output logic             wrap      // pointer passes the end of the ring this cycle
);

  logic [PW_+1:0] ncode, nused, nxt;

  always_comb begin
    ncode = (PW_+2)'(d) << 1;
    nused = ncode + (big ? (PW_+2)'(2) : (PW_+2)'(1));
    for (int unsigned i = 0; i < NCAP; i++) begin
      logic [PW_+1:0] off;
      // distance of capacitor i from the pointer along the ring
      off = (i >= ptr) ? (PW_+2)'(i - ptr) : (PW_+2)'(i + NCAP - ptr);
      code_sel[i] = off < ncode;
      dith_sel[i] = (off >= ncode) && (off < nused);
    end
    nxt  = (PW_+2)'(ptr) + nused;
    wrap = nxt >= (PW_+2)'(NCAP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ptr <= '0;
    else if (en)  ptr <= wrap ? PW_'(nxt - (PW_+2)'(NCAP)) : PW_'(nxt);
  end

  initial assert (N_UNIT >= 2) else $error("dwa_selector: N_UNIT must be at least 2");

  // The 2*d + 2 capacitors of one sample must fit in the ring.
  a_d_range: assert property (@(posedge clk) disable iff (!rst_n) en |-> (32'(d) < N_UNIT))
    else $error("dwa_selector: d out of range");

endmodule
