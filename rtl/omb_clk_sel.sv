// omb_clk_sel: chooses the board clock, TTC clock or local oscillator.
//
// The board runs from the 40 MHz TTC bunch-crossing clock unless Local
// Mode is selected (force_local) or the TTC clock has disappeared; then it
// runs from the 40 MHz local oscillator, and it goes back to the TTC clock
// by itself when that clock is present again. This behaviour is the
// board's; the way it is done here is this design's own:
//  - Presence: a flip-flop toggled by the TTC clock is watched from the
//    local clock domain. No toggle seen for LOST_CYCLES local cycles means
//    the TTC clock is lost; BACK_EDGES toggles seen in a row without such
//    a gap mean it is present again (ttc_present).
//  - Switching: each clock has an enable flip-flop, updated on its falling
//    edge through a two-stage synchroniser, and an enable is only set once
//    the other clock's enable is off. So the output never shows a pulse
//    shorter than either input clock's own low or high phase. As a dead
//    TTC clock cannot clear its own enable, a loss clears it directly.
// clk_out = (ttc_clk & en_ttc) | (local_clk & en_loc); using_ttc reports
// en_ttc. After reset the local clock starts within two local cycles.
// force_local may come from any clock domain.
module omb_clk_sel #(
  parameter int unsigned LOST_CYCLES = 8,
  parameter int unsigned BACK_EDGES  = 16
) (
  input  logic ttc_clk,
  input  logic local_clk,
  input  logic rst_n,
  input  logic force_local,
  output logic clk_out,
  output logic ttc_present,
  output logic using_ttc
);
  localparam int unsigned MW = $clog2(LOST_CYCLES + 1);
  localparam int unsigned GW = $clog2(BACK_EDGES + 1);

  logic          tog;
  logic [2:0]    tog_s;
  logic [MW-1:0] miss;
  logic [GW-1:0] good;
  logic [1:0]    force_s;
  logic          ttc_dead, want_ttc;
  logic          t1, en_ttc, l1, en_loc;

  always_ff @(posedge ttc_clk or negedge rst_n) begin
    if (!rst_n) tog <= 1'b0;
    else        tog <= ~tog;
  end

  always_ff @(posedge local_clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_s <= '0; miss <= '0; good <= '0; ttc_present <= 1'b0;
      ttc_dead <= 1'b1; force_s <= 2'b11; want_ttc <= 1'b0;
    end else begin
      tog_s   <= {tog_s[1:0], tog};
      force_s <= {force_s[0], force_local};
      if (tog_s[2] != tog_s[1]) begin
        miss <= '0;
        if (good != GW'(BACK_EDGES)) good <= good + 1'b1;
        else                         ttc_present <= 1'b1;
      end else if (miss != MW'(LOST_CYCLES)) begin
        miss <= miss + 1'b1;
      end else begin
        good        <= '0;
        ttc_present <= 1'b0;
      end
      ttc_dead <= !ttc_present;
      want_ttc <= ttc_present && !force_s[1];
    end
  end

  always_ff @(negedge ttc_clk or posedge ttc_dead) begin
    if (ttc_dead) begin
      t1     <= 1'b0;
      en_ttc <= 1'b0;
    end else begin
      t1     <= want_ttc && !en_loc;
      en_ttc <= t1;
    end
  end

  always_ff @(negedge local_clk or negedge rst_n) begin
    if (!rst_n) begin
      l1     <= 1'b0;
      en_loc <= 1'b0;
    end else begin
      l1     <= !want_ttc && !en_ttc;
      en_loc <= l1;
    end
  end

  assign clk_out   = (ttc_clk & en_ttc) | (local_clk & en_loc);
  assign using_ttc = en_ttc;

  // the two enables are never on together
  a_one_clock: assert property (@(posedge local_clk) disable iff (!rst_n) !(en_ttc && en_loc));
endmodule
