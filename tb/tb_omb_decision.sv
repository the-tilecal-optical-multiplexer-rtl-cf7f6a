// Testbench for omb_decision (TIMEOUT reduced to 16): choice between the
// links in CRC mode for all CRC outcomes, forced link modes, a missing link
// (forwarded alone after exactly TIMEOUT cycles), a late duplicate
// (discarded), the TTC synchronisation check and the injection modes.
`include "tb/tb_check.svh"
module tb_omb_decision;
  import omb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  omb_mode_e mode;
  logic sync_en;
  logic stat_a_valid, stat_a_ready, stat_b_valid, stat_b_ready;
  pkt_stat_t stat_a, stat_b;
  logic verdict_a_valid, verdict_a_fwd, verdict_a_ready;
  logic verdict_b_valid, verdict_b_fwd, verdict_b_ready;
  logic cmd_valid, cmd_ready;
  src_e cmd_src;
  logic ttc_valid, ttc_ready;
  ttc_info_t ttc;
  logic ev_fwd, ev_crc_err_a, ev_crc_err_b, ev_both_bad, ev_missing, ev_stale, ev_sync_err;

  omb_decision #(.TIMEOUT(16)) dut (.*);

  // observed outputs
  int va[$], vb[$], cmds[$];
  int n_fwd, n_ea, n_eb, n_both, n_miss, n_stale, n_sync;
  assign verdict_a_ready = 1'b1;
  assign verdict_b_ready = 1'b1;
  assign cmd_ready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (verdict_a_valid) va.push_back(verdict_a_fwd);
    if (verdict_b_valid) vb.push_back(verdict_b_fwd);
    if (cmd_valid) cmds.push_back(int'(cmd_src));
    n_fwd += int'(ev_fwd); n_ea += int'(ev_crc_err_a); n_eb += int'(ev_crc_err_b);
    n_both += int'(ev_both_bad); n_miss += int'(ev_missing); n_stale += int'(ev_stale);
    n_sync += int'(ev_sync_err);
    if (stat_a_valid && stat_a_ready) stat_a_valid <= 0;
    if (stat_b_valid && stat_b_ready) stat_b_valid <= 0;
    if (ttc_valid && ttc_ready) ttc_valid <= 0;
  end

  function automatic pkt_stat_t mk(input logic ok, input logic [15:0] ev, input logic [11:0] bc);
    pkt_stat_t s;
    s = '0; s.crc_ok = ok; s.evid = ev; s.bcid = bc; s.nwords = 16'd10;
    return s;
  endfunction

  function automatic bit q1(input int q[$], input int v);
    return q.size() == 1 && q[0] == v;
  endfunction

  task automatic clear();
    va = {}; vb = {}; cmds = {};
    n_fwd = 0; n_ea = 0; n_eb = 0; n_both = 0; n_miss = 0; n_stale = 0; n_sync = 0;
  endtask

  task automatic pair(input logic oka, input logic okb, input logic [15:0] ev);
    stat_a = mk(oka, ev, 12'(ev)); stat_b = mk(okb, ev, 12'(ev));
    stat_a_valid = 1; stat_b_valid = 1;
    repeat (4) @(posedge clk); #1;
  endtask

  initial begin
    int waited;
    mode = MODE_CRC; sync_en = 0; stat_a_valid = 0; stat_b_valid = 0;
    stat_a = '0; stat_b = '0; ttc_valid = 0; ttc = '0;
    clear();
    repeat (3) @(posedge clk); #1; rst_n = 1;

    // CRC mode: both good -> A; A bad -> B; B bad -> A; both bad -> A and counted
    pair(1, 1, 16'd1);
    `CHECK(q1(va, 1) && q1(vb, 0) && q1(cmds, int'(SRC_LINK_A)) && n_fwd == 1, "both good: link A forwarded")
    clear(); pair(0, 1, 16'd2);
    `CHECK(q1(va, 0) && q1(vb, 1) && q1(cmds, int'(SRC_LINK_B)) && n_ea == 1 && n_eb == 0, "A bad: link B forwarded")
    clear(); pair(1, 0, 16'd3);
    `CHECK(q1(va, 1) && q1(vb, 0) && q1(cmds, int'(SRC_LINK_A)) && n_eb == 1, "B bad: link A forwarded")
    clear(); pair(0, 0, 16'd4);
    `CHECK(q1(va, 1) && q1(vb, 0) && n_both == 1 && n_ea == 1 && n_eb == 1, "both bad: counted, A forwarded")

    // forced link B
    mode = MODE_LINK_B;
    clear(); pair(1, 1, 16'd5);
    `CHECK(q1(va, 0) && q1(vb, 1) && q1(cmds, int'(SRC_LINK_B)), "forced link B")
    mode = MODE_CRC;

    // missing link B: A forwarded after the timeout, then late B discarded
    clear();
    stat_a = mk(1, 16'd6, 12'd6); stat_a_valid = 1;
    waited = 0;
    while (stat_a_valid) begin @(posedge clk); #1; waited++; end
    `CHECK(waited == 17, $sformatf("timeout: A taken after TIMEOUT+1 cycles (%0d)", waited))
    repeat (2) @(posedge clk); #1;
    `CHECK(q1(va, 1) && n_miss == 1 && q1(cmds, int'(SRC_LINK_A)), "missing link: A forwarded alone")
    stat_b = mk(1, 16'd6, 12'd6); stat_b_valid = 1;
    repeat (4) @(posedge clk); #1;
    `CHECK(q1(vb, 0) && n_stale == 1 && cmds.size() == 1, "late duplicate on B discarded")

    // sync check: match, then mismatch, then no TTC record
    sync_en = 1;
    clear();
    ttc = '{ttype: 8'h1, bcid: 12'd7, evid: 24'd7}; ttc_valid = 1;
    pair(1, 1, 16'd7);
    `CHECK(n_sync == 0 && !ttc_valid, "sync check: matching TTC record consumed")
    ttc = '{ttype: 8'h1, bcid: 12'd99, evid: 24'd8}; ttc_valid = 1;
    pair(1, 1, 16'd8);
    `CHECK(n_sync == 1, "sync check: BCID mismatch counted")
    pair(1, 1, 16'd9);
    `CHECK(n_sync == 2, "sync check: missing TTC record counted")
    sync_en = 0;

    // injection: link packets discarded, no output command
    mode = MODE_INJ_GEN;
    clear(); pair(1, 1, 16'd10);
    `CHECK(q1(va, 0) && q1(vb, 0) && cmds.size() == 0, "injection mode discards link packets")

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
