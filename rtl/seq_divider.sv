// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Used by the LMS estimator to form eps1/p1 once per estimation cycle, where a slow
// divider costs nothing. `start` loads `num` and `den`; NW clocks later `done` pulses and
// `quo` holds floor(num/den). `busy` is high in between; `start` is ignored while busy.
// A zero divisor yields an all-ones quotient.
module seq_divider #(
  parameter int unsigned NW = 56,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quo,
  output logic          busy,
  output logic          done
);

  logic [DW:0]            rem;
  logic [DW-1:0]          dsr;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]            shifted;
  logic [DW+1:0]          diff;

  always_comb begin
    shifted = {rem[DW-1:0], quo[NW-1]};
    diff    = {1'b0, shifted} - {2'b00, dsr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dsr  <= '0;
      quo  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          dsr  <= den;
          quo  <= num;
          cnt  <= ($clog2(NW+1))'(NW);
          busy <= 1'b1;
        end
      end else begin
        // quo doubles as the dividend shift register
        if (!diff[DW+1]) begin
          rem <= diff[DW:0];
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= shifted;
          quo <= {quo[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
