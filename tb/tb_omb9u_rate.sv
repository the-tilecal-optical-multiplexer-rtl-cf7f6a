// Full-bandwidth testbench for omb9u_top at its default sizes: all 16 input
// links carry a 397-word packet every 400 clock cycles (the 100 kHz
// Level-1 Accept rate at 40 MHz), which is 16 x 16 bits x 40 MHz = 10.24
// Gbit/s of input. Each pair's second copy lags by 0 to 3 cycles, and a
// few events carry a CRC error on one copy. The board stays in its
// reset configuration (CRC checking, no sync check), so no VME access is
// needed. Checked: all eight output links (5.12 Gbit/s together) carry the
// good copy of every event, in order, and the first word of each output
// packet leaves within LAT_MAX cycles of the pair's later last word.
`include "tb/tb_check.svh"
module tb_omb9u_rate;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int N_EV = 8, SPACING = 400, NPAY = 394, LAT_MAX = 8;

  logic ttc_clk = 0, local_clk = 0, rst_n = 1;   // falls at 1 ns: power-on reset edge
  always #12.5 ttc_clk = ~ttc_clk;
  always #12.45 local_clk = ~local_clk;

  logic ttc_bcr = 0, ttc_ecr = 0, ttc_l1a = 0;
  logic [7:0] ttc_ttype = 0;
  link_word_t glink_rx [16], glink_tx [8];
  logic vme_as_n, vme_write_n, vme_data_oe, vme_dtack_n, vme_gap_n;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o;
  logic [4:0] vme_ga_n;
  logic jtag_tck, jtag_tms, jtag_tdi, jtag_tdo, sys_clk, clk_is_ttc;
  logic ext_trig = 0;

  omb9u_top dut (.*);
  vme_master_bfm bfm (.as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am),
                      .addr(vme_addr), .data_o(vme_data_i), .data_i(vme_data_o),
                      .data_oe(vme_data_oe), .dtack_n(vme_dtack_n));
  assign jtag_tdo  = jtag_tdi;
  assign vme_ga_n  = ~5'd4;
  assign vme_gap_n = ~(^(~5'd4));

  int cyc = 0;
  always @(posedge sys_clk) cyc <= cyc + 1;

  word_q_t outq [8][$], cur [8];
  int sop_cyc [8][$];
  always @(posedge sys_clk) if (rst_n)
    for (int i = 0; i < 8; i++) if (glink_tx[i].valid) begin
      if (glink_tx[i].sop) begin cur[i] = {}; sop_cyc[i].push_back(cyc); end
      cur[i].push_back(glink_tx[i].data);
      if (glink_tx[i].eop) outq[i].push_back(cur[i]);
    end

  word_q_t expq [8][$];
  int last_eop_cyc [8][$];

  // one 400-cycle slot on all links
  task automatic event_slot(input int ev);
    word_q_t p [16];
    int skew [8];
    for (int f = 0; f < 8; f++) begin
      word_q_t base;
      base = make_pkt(16'(ev), 12'(ev * 40 + f), NPAY, 4'h2);
      p[2 * f] = base; p[2 * f + 1] = base;
      skew[f] = (ev + f) % 4;
      if ((ev * 8 + f) % 11 == 3) begin
        p[2 * f][50] ^= 16'h0001; expq[f].push_back(p[2 * f + 1]);
      end else begin
        if ((ev * 8 + f) % 13 == 5) p[2 * f + 1][200] ^= 16'h0800;
        expq[f].push_back(p[2 * f]);
      end
    end
    for (int c = 0; c < SPACING; c++) begin
      for (int f = 0; f < 8; f++) begin
        int kb;
        kb = c - skew[f];
        glink_rx[2 * f] = '0; glink_rx[2 * f + 1] = '0;
        if (c < p[2 * f].size())
          glink_rx[2 * f] = '{valid: 1, sop: c == 0, eop: c == NPAY + 2, data: p[2 * f][c]};
        if (kb >= 0 && kb < p[2 * f + 1].size())
          glink_rx[2 * f + 1] = '{valid: 1, sop: kb == 0, eop: kb == NPAY + 2,
                                  data: p[2 * f + 1][kb]};
        if (kb == NPAY + 2) last_eop_cyc[f].push_back(cyc);
      end
      @(posedge sys_clk); #1;
    end
    foreach (glink_rx[l]) glink_rx[l] = '0;
  endtask

  initial begin
    bit ok, ok_lat;
    int max_lat, lat;
    foreach (glink_rx[l]) glink_rx[l] = '0;
    #1 rst_n = 0;
    #100 rst_n = 1;
    #3000;
    `CHECK(clk_is_ttc, "board runs on the TTC clock")
    @(posedge sys_clk); #1;
    for (int ev = 0; ev < N_EV; ev++) event_slot(ev);
    repeat (2 * SPACING) @(posedge sys_clk); #1;   // the last packet drains
    ok = 1; ok_lat = 1; max_lat = 0;
    for (int f = 0; f < 8; f++) begin
      `CHECK(outq[f].size() == N_EV, $sformatf("output link %0d: %0d of %0d events", f, outq[f].size(), N_EV))
      for (int i = 0; i < N_EV && i < outq[f].size(); i++) ok &= (outq[f][i] == expq[f][i]);
      if (sop_cyc[f].size() < N_EV) ok_lat = 0;
      for (int i = 0; i < N_EV && i < sop_cyc[f].size(); i++) begin
        lat = sop_cyc[f][i] - last_eop_cyc[f][i];
        if (lat > max_lat) max_lat = lat;
        if (lat < 1 || lat > LAT_MAX) ok_lat = 0;
      end
    end
    `CHECK(ok, "every output link carried the good copy of every event, in order")
    $display("last input word to first output word: at most %0d cycles", max_lat);
    `CHECK(ok_lat, $sformatf("latency within %0d cycles on all links (max %0d)", LAT_MAX, max_lat))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    repeat ((N_EV + 6) * SPACING) @(posedge sys_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
