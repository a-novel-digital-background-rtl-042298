// pipe_delay: a W-bit shift register of DEPTH stages, reset to zero.
// Used to carry a sample's dither record and first-stage decision alongside the converter
// latency so that they meet the sample's backend code. DEPTH = 0 is a plain wire.
module pipe_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int unsigned i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end

endmodule
