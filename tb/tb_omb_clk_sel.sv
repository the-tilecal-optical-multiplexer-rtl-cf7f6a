// Testbench for omb_clk_sel: TTC clock 40 MHz (25 ns), local oscillator a
// little faster (24 ns). Checks that the board clock starts on the local
// clock, moves to the TTC clock once it is seen, obeys Local Mode, falls
// back to the local clock when the TTC clock stops (high or low) and
// returns when it restarts, and that it never shows a high or low phase
// shorter than 12 ns (no glitches) across all these switches.
`include "tb/tb_check.svh"
module tb_omb_clk_sel;
  int checks = 0, failures = 0;
  logic ttc_clk = 0, local_clk = 0, rst_n = 0, force_local = 0;
  logic clk_out, ttc_present, using_ttc;
  bit ttc_run = 1;
  bit ttc_stop_level = 1;

  always #12 local_clk = ~local_clk;
  always #12.5 ttc_clk = ttc_run ? ~ttc_clk : ttc_stop_level;

  omb_clk_sel dut (.*);

  realtime last_edge = 0, last_rise = 0, period = 0, min_phase = 1000;
  int n_switch = 0;
  always @(clk_out) begin
    if (rst_n && last_edge > 0 && ($realtime - last_edge) < min_phase) min_phase = $realtime - last_edge;
    last_edge = $realtime;
    if (clk_out) begin
      period = $realtime - last_rise;
      last_rise = $realtime;
    end
  end
  always @(using_ttc) n_switch++;

  task automatic settle(input int ns);
    #(ns);
  endtask

  initial begin
    #30 rst_n = 1;
    #100;
    `CHECK(!using_ttc && period == 24.0, "starts on the local clock")
    settle(2000);
    `CHECK(ttc_present && using_ttc && period == 25.0, "moves to the TTC clock")
    force_local = 1; settle(500);
    `CHECK(!using_ttc && period == 24.0, "Local Mode selects the local clock")
    force_local = 0; settle(500);
    `CHECK(using_ttc && period == 25.0, "back to TTC clock when Local Mode is left")
    ttc_stop_level = 1; ttc_run = 0; settle(600);
    `CHECK(!ttc_present && !using_ttc && period == 24.0, "TTC clock stopped high: local clock used")
    ttc_run = 1; settle(1500);
    `CHECK(ttc_present && using_ttc && period == 25.0, "TTC clock back: TTC clock used again")
    ttc_stop_level = 0; ttc_run = 0; settle(600);
    `CHECK(!using_ttc && period == 24.0, "TTC clock stopped low: local clock used")
    ttc_run = 1; settle(1500);
    `CHECK(using_ttc && period == 25.0, "TTC clock used again")
    `CHECK(n_switch >= 7, $sformatf("clock switched %0d times", n_switch))
    `CHECK(min_phase >= 12.0, $sformatf("no glitch: shortest phase %0.1f ns", min_phase))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
