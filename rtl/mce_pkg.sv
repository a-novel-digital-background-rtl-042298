// mce_pkg: number formats and shared types of the MCE background calibration engine.
//
// All arithmetic is two's-complement fixed point with the converter reference voltage
// Vref = 1.0:
//   * sample_t  - per-sample quantities (digitized residue, linearized residue, the
//                 first-stage decision, calibrated output) with FRAC = 16 fraction bits.
//   * param_t   - the correction parameters p1, p3 and the correlation results with
//                 PFRAC = 24 fraction bits, so that the small LMS increments near
//                 convergence are not lost to truncation.
// inj_t is the per-sample record of what the sub-DAC injected: the RNG sign, which of the
// two dither amplitudes (Vd1 or Vd2) was used, whether it is the last sample of a Vd1/Vd2
// window pair, and a valid flag that marks real samples in the pipeline after reset.
// The word widths are this design's choice; the document gives none.
package mce_pkg;

  localparam int FRAC  = 16;  // fraction bits of sample-domain words
  localparam int SW    = 24;  // sample word width, range +-128
  localparam int PFRAC = 24;  // fraction bits of p1, p3 and correlation results
  localparam int PW    = 32;  // parameter word width, range +-128
  localparam int AW    = 48;  // correlation accumulator width

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [PW-1:0] param_t;
  typedef logic signed [AW-1:0] acc_t;

  // Dither record of one sample.
  typedef struct packed {
    logic valid;    // a real sample (cleared in the pipeline after reset)
    logic sign;     // RNG value: 1 means R = +1, 0 means R = -1
    logic big;      // 1: amplitude Vd1 = delta/2, 0: amplitude Vd2 = delta/4
    logic win_end;  // last sample of a Vd1 window followed by a Vd2 window
  } inj_t;

  // 1.5-bit backend stage decision, as produced by its two comparators.
  typedef enum logic [1:0] {
    BE_M1 = 2'd0,  // -1 : input below -Vref/4
    BE_Z  = 2'd1,  //  0 : input between the thresholds
    BE_P1 = 2'd2   // +1 : input above +Vref/4
  } be_code_t;

  // Fixed-point value of 1.0 in the parameter format.
  localparam param_t P_ONE = param_t'(1) <<< PFRAC;

endpackage
