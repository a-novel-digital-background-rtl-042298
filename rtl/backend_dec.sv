// backend_dec: digital error correction of the 1.5-bit/stage backend pipeline.
//
// The backend quantizes the first-stage residue with N_STG cascaded 1.5-bit stages (ten in
// the document's 12-bit example). Each stage decides -1, 0 or +1 with two comparators at
// +-Vref/4, so comparator offsets up to Vref/4 are absorbed by the overlap of adjacent
// stages. The digitized residue is recovered by shifting each stage's decision by its
// stage number and adding: Db = sum_i d_i * 2^-i (i = 1..N_STG), in units of Vref.
// Interface: `code[i-1]` is the decision of backend stage i, already time-aligned to one
// sample (the alignment registers belong to the analog pipeline timing and are not part of
// this block). `db` is a signed integer in LSBs of 2^-N_STG Vref.
// Timing: one register stage, `db` follows `code` by one clock.
// The code assignment of be_code_t and the treatment of the unused code 2'b11 (counted
// as 0 and flagged by an assertion) are this design's choices.
module backend_dec
  import mce_pkg::*;
#(
  parameter int unsigned N_STG = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_STG-1:0][1:0]         code,
  output logic signed [N_STG:0]         db
);

  logic signed [N_STG:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < N_STG; i++) begin
      // stage i+1 carries weight 2^(N_STG-1-i) LSB
      unique case (be_code_t'(code[i]))
        BE_P1:   sum = sum + ((N_STG+1)'(1) << (N_STG - 1 - i));
        BE_M1:   sum = sum - ((N_STG+1)'(1) << (N_STG - 1 - i));
        default: sum = sum;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) db <= '0;
    else        db <= sum;
  end

  logic code_ok;
  always_comb begin
    code_ok = 1'b1;
    for (int unsigned i = 0; i < N_STG; i++) if (code[i] == 2'b11) code_ok = 1'b0;
  end

  a_code: assert property (@(posedge clk) disable iff (!rst_n) code_ok)
    else $error("backend_dec: invalid stage code");

endmodule
