// nonlinear_cal: correction of the cubic gain error of the open-loop residue amplifier.
//
// The first-stage amplifier is modelled as Vres = a1*Vx + a3*Vx^3. Writing u = a1*Vx, the
// digitized residue is Db = u + p3*u^3 with p3 = a3/a1^3, so the linearized residue is the
// root u of that cubic and the error to remove is e(Db) = Db - u, which depends only on Db
// and p3. As the document suggests, e(Db) is kept in a look-up table with one entry per
// backend code. Because p3 changes only once per estimation cycle, the table is not a
// two-dimensional ROM but a two-bank RAM: the active bank corrects samples while a
// sequential solver fills the other bank for the newest p3, one bisection step per clock
// (17 steps per entry, 2^DB_W entries, about 35k cycles for DB_W = 11). The banks swap at
// the next window boundary (`swap` high), so that one correlation window never sees two
// different tables. The document evaluates the root with a trigonometric formula; the
// bisection on u + p3*u^3 <= Db is this design's choice and gives the same root wherever
// the cubic is monotonic (|u| < sqrt(-1/(3*p3)) for p3 < 0, which covers the residue range
// of the document's example). Outside that range the result saturates.
// Interface: `db` is the backend code (LSB 2^-(DB_W-1) Vref); `p3` is Q.24; `db1` is the
// linearized residue u in Q.16. `swapped` pulses when a new table becomes active.
// Timing: `db1` follows `db` by one clock. After reset no bank is valid and the residue
// passes uncorrected until the first table (for the reset value of p3) is ready.
module nonlinear_cal
  import mce_pkg::*;
#(
  parameter int unsigned DB_W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DB_W-1:0]  db,
  input  param_t                  p3,
  input  logic                    swap,
  output sample_t                 db1,
  output logic                    busy,
  output logic                    swapped
);

  localparam int unsigned DEPTH = 1 << DB_W;
  localparam int unsigned UB    = FRAC + 1;   // bisection bits: u in [-1, 1)
  localparam int unsigned EW    = 20;         // table word, Q.16

  typedef logic signed [EW-1:0] e_t;

  e_t mem [2][DEPTH];

  logic                 act;        // active bank
  logic                 act_valid;  // active bank holds a table
  logic                 ready;      // inactive bank holds a finished table
  logic                 have_done;  // a table has been solved since reset
  logic signed [31:0]   p3_done;    // p3 (Q.16) of the last solved table
  logic signed [31:0]   p3_s;       // p3 (Q.16) being solved for
  logic signed [31:0]   p3_in;
  logic [DB_W-1:0]      addr;
  logic [UB-1:0]        cur;        // offset-binary u, cur = (u + 1) * 2^FRAC
  logic [$clog2(UB)-1:0] bitn;

  // ---- correction path ---------------------------------------------------------------
  function automatic sample_t code_to_q16(logic signed [DB_W-1:0] c);
    return sample_t'(c) <<< (FRAC - (DB_W - 1));
  endfunction

  logic [DB_W-1:0] rd_idx;
  assign rd_idx = {~db[DB_W-1], db[DB_W-2:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) db1 <= '0;
    else if (act_valid) db1 <= code_to_q16(db) - sample_t'(mem[act][rd_idx]);
    else                db1 <= code_to_q16(db);
  end

  // ---- table solver ------------------------------------------------------------------
  assign p3_in = 32'(p3 >>> (PFRAC - FRAC));

  logic [UB-1:0]        trial, cur_nxt;
  logic signed [63:0]   u, u2, u3, f, tgt;
  logic signed [DB_W-1:0] addr_s;

  always_comb begin
    addr_s = {~addr[DB_W-1], addr[DB_W-2:0]};
    trial  = cur | (UB'(1) << bitn);
    u      = 64'(signed'({1'b0, trial})) - (64'sd1 <<< FRAC);
    u2     = (u * u) >>> FRAC;
    u3     = (u2 * u) >>> FRAC;
    f      = u + ((64'(p3_s) * u3) >>> FRAC);
    tgt    = 64'(code_to_q16(addr_s));
    cur_nxt = (f <= tgt) ? trial : cur;
  end

  // table write: last bisection step of an entry
  logic we;
  e_t   wdata;
  assign we    = busy && (bitn == '0);
  assign wdata = e_t'(tgt - (64'(signed'({1'b0, cur_nxt})) - (64'sd1 <<< FRAC)));

  always_ff @(posedge clk)
    if (we) mem[~act][addr] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act       <= 1'b0;
      act_valid <= 1'b0;
      ready     <= 1'b0;
      have_done <= 1'b0;
      p3_done   <= '0;
      p3_s      <= '0;
      busy      <= 1'b0;
      addr      <= '0;
      cur       <= '0;
      bitn      <= '0;
      swapped   <= 1'b0;
    end else begin
      swapped <= 1'b0;
      if (!busy) begin
        if (ready && (swap || !act_valid)) begin
          act       <= ~act;
          act_valid <= 1'b1;
          ready     <= 1'b0;
          swapped   <= 1'b1;
        end else if (!ready && (!have_done || p3_in != p3_done)) begin
          busy <= 1'b1;
          p3_s <= p3_in;
          addr <= '0;
          cur  <= '0;
          bitn <= ($clog2(UB))'(UB - 1);
        end
      end else begin
        if (bitn == '0) begin
          cur  <= '0;
          bitn <= ($clog2(UB))'(UB - 1);
          addr <= addr + 1'b1;
          if (&addr) begin
            busy      <= 1'b0;
            ready     <= 1'b1;
            have_done <= 1'b1;
            p3_done   <= p3_s;
          end
        end else begin
          cur  <= cur_nxt;
          bitn <= bitn - 1'b1;
        end
      end
    end
  end

endmodule
