// End-to-end testbench for omb9u_top at its default sizes (8 CRC FPGAs,
// 1024-word link buffers, 4096-word packet memories, 1024-cycle timeout).
// The board is driven only through its pins: TTC signals, the 16 input
// links, the VME bus (board in slot 7) and JTAG. Every mechanism is made to
// happen and counted (after a static test that writes and reads back the
// read/write registers of the CRC FPGAs and the VME FPGA):
//  - CRC mode with the sync check on all eight CRC FPGAs: good pairs, a
//    bad copy on A, on B, on both, a missing copy (forwarded after the
//    timeout), a late copy (discarded), a header out of step with the TTC
//    data; every output link must carry the right copy of every event and
//    the error counters read over VME must match;
//  - injection from the event generator on a TTC L1A (CRC FPGA 0) and from
//    the packet memory, loaded over VME, on a VME-generated trigger and
//    on the external trigger input (1);
//  - loss of the TTC clock (board continues on the local clock) and its
//    return; Local Mode set and cleared over VME;
//  - a JTAG shift through the VME FPGA;
//  - CR/CSR configuration space reads (VME64x ROM signature, BAR).
`include "tb/tb_check.svh"
module tb_omb9u_top;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int SLOT = 7;

  logic ttc_clk = 0, local_clk = 0, rst_n = 1;   // falls at 1 ns: power-on reset edge
  bit ttc_run = 1;
  always #12.5 ttc_clk = ttc_run ? ~ttc_clk : 1'b1;
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
  assign jtag_tdo = jtag_tdi;
  assign vme_ga_n  = ~5'(SLOT);
  assign vme_gap_n = ~(^(~5'(SLOT)));

  // ---------------- mechanism counters ----------------
  typedef enum int {M_GOOD, M_CRC_A, M_CRC_B, M_BOTH, M_MISS, M_STALE, M_SYNC, M_GEN, M_MEM,
                    M_INTTRIG, M_CLKLOSS, M_CLKBACK, M_LOCAL, M_JTAG, M_CRCSR, M_EXTTRIG, M_NUM} mech_e;
  int mech [M_NUM];

  // ---------------- output monitor ----------------
  word_q_t outq [8][$], cur [8];
  always @(posedge sys_clk) if (rst_n)
    for (int i = 0; i < 8; i++) if (glink_tx[i].valid) begin
      if (glink_tx[i].sop) cur[i] = {};
      cur[i].push_back(glink_tx[i].data);
      if (glink_tx[i].eop) outq[i].push_back(cur[i]);
    end

  // reference BCID: cycles since the last BCR, modulo the orbit
  int bc = 0;
  always @(posedge sys_clk) bc <= ttc_bcr ? 0 : (bc + 1) % 3564;

  // ---------------- helpers ----------------
  function automatic logic [23:0] crc_reg(input int f, input int r);
    return 24'((SLOT << 19) | 'h40000 | (f << 15) | (r * 4));
  endfunction
  function automatic logic [23:0] ttc_reg(input int r);
    return 24'((SLOT << 19) | 'h10000 | (r * 4));
  endfunction
  function automatic logic [23:0] own_reg(input int r);
    return 24'((SLOT << 19) | (r * 4));
  endfunction

  task automatic vw(input logic [23:0] a, input logic [31:0] d);
    bit ack;
    bfm.write32(a, d, ack);
    `CHECK(ack, $sformatf("VME write to %h acknowledged", a))
  endtask
  task automatic vr(input logic [23:0] a, output logic [31:0] q);
    bit ack;
    bfm.read32(a, q, ack);
    `CHECK(ack, $sformatf("VME read of %h acknowledged", a))
  endtask

  task automatic cycles(input int n);
    repeat (n) @(posedge sys_clk);
    #1;
  endtask

  task automatic l1a(output int bcid);
    ttc_l1a = 1; ttc_ttype = 8'h21;
    @(posedge sys_clk); bcid = bc; #1;
    ttc_l1a = 0;
  endtask

  // drive packets on all 16 links at once; link 2i+1 starts 2 cycles late
  task automatic drive(input word_q_t p [16], input bit lnk_on [16]);
    int n = 0;
    foreach (p[l]) if (lnk_on[l] && p[l].size() + 2 > n) n = p[l].size() + 2;
    for (int c = 0; c < n; c++) begin
      for (int l = 0; l < 16; l++) begin
        int k = c - (l % 2) * 2;
        glink_rx[l] = '0;
        if (lnk_on[l] && k >= 0 && k < p[l].size())
          glink_rx[l] = '{valid: 1, sop: k == 0, eop: k == p[l].size() - 1, data: p[l][k]};
      end
      @(posedge sys_clk); #1;
    end
    foreach (glink_rx[l]) glink_rx[l] = '0;
  endtask

  word_q_t expq [8][$];

  // one CRC-mode event: per pair, what goes wrong
  typedef enum int {OK, BAD_A, BAD_B, BAD_AB, NO_B, OFF_SYNC} fault_e;
  task automatic crc_event(input int ev, input fault_e f [8]);
    word_q_t p [16], base;
    bit lnk_on [16];
    int bcid;
    l1a(bcid);
    cycles(60);
    for (int i = 0; i < 8; i++) begin
      base = make_pkt(16'(ev), 12'(f[i] == OFF_SYNC ? bcid + 1 : bcid), 20 + i, 4'h1);
      p[2*i] = base; p[2*i+1] = base; lnk_on[2*i] = 1; lnk_on[2*i+1] = (f[i] != NO_B);
      if (f[i] == BAD_A || f[i] == BAD_AB) p[2*i][5] ^= 16'h0004;
      if (f[i] == BAD_B || f[i] == BAD_AB) p[2*i+1][9] ^= 16'h2000;
      expq[i].push_back((f[i] == BAD_A) ? p[2*i+1] : p[2*i]);
      unique case (f[i])
        OK:       mech[M_GOOD]++;
        BAD_A:    mech[M_CRC_A]++;
        BAD_B:    mech[M_CRC_B]++;
        BAD_AB:   mech[M_BOTH]++;
        NO_B:     mech[M_MISS]++;
        OFF_SYNC: mech[M_SYNC]++;
        default: ;
      endcase
    end
    drive(p, lnk_on);
    cycles(80);
  endtask

  initial begin
    fault_e f [8];
    logic [31:0] q;
    word_q_t body, p [16];
    bit lnk_on [16];
    bit ok;
    int bcid, edges;
    foreach (glink_rx[l]) glink_rx[l] = '0;
    foreach (mech[m]) mech[m] = 0;
    #1 rst_n = 0;
    #100 rst_n = 1;
    #3000;
    `CHECK(clk_is_ttc, "board runs on the TTC clock")
    vr(ttc_reg(1), q);
    `CHECK(q == 32'h077C_0003, "TTC FPGA status: clock present and used")
    vr(own_reg(0), q);
    `CHECK(q == {16'h0B9E, 10'd0, 1'b1, 5'(SLOT)}, "VME FPGA board register")
    // static test: every read/write register of the CRC FPGAs and the VME
    // FPGA is written with a value that names it, all are read back, then
    // they are put back to their reset values
    begin
      bit ok_all;
      ok_all = 1;
      for (int i = 0; i < 8; i++)
        for (int r = 2; r <= 6; r++)
          if (r != 4) vw(crc_reg(i, r), 32'((i << 8) | (r << 4) | 1));
      vw(own_reg(1), 32'hA5C3_0F96);
      vw(own_reg(3), 32'd777);
      for (int i = 0; i < 8; i++) begin
        vr(crc_reg(i, 7), q);
        ok_all &= (q == 32'h0C7C_0000);
        for (int r = 2; r <= 6; r++)
          if (r != 4) begin
            vr(crc_reg(i, r), q);
            ok_all &= (q == 32'((i << 8) | (r << 4) | 1));
          end
      end
      vr(own_reg(1), q); ok_all &= (q == 32'hA5C3_0F96);
      vr(own_reg(3), q); ok_all &= (q == 32'd777);
      `CHECK(ok_all, "static test: all registers of the 8 CRC FPGAs and the VME FPGA")
      for (int i = 0; i < 8; i++) begin
        vw(crc_reg(i, 2), 32'd16); vw(crc_reg(i, 3), 32'd0);
        vw(crc_reg(i, 5), 32'd16); vw(crc_reg(i, 6), 32'd1);
      end
      vw(own_reg(3), 32'd400);
    end
    for (int i = 0; i < 8; i++) vw(crc_reg(i, 0), 32'h8);   // CRC mode, sync check on
    ttc_bcr = 1; @(posedge sys_clk); #1; ttc_bcr = 0;
    cycles(200);

    // ---- CRC mode ----
    f = '{OK, BAD_A, BAD_B, BAD_AB, OK, OFF_SYNC, OK, OK};
    crc_event(0, f);
    f = '{OK, OK, OK, OK, NO_B, OK, OK, OK};
    crc_event(1, f);
    cycles(1100);
    // late copy of event 1 on pair 4's B link: discarded
    foreach (lnk_on[l]) begin lnk_on[l] = 0; p[l] = {}; end
    p[9] = make_pkt(16'd1, 12'd0, 24, 4'h1); lnk_on[9] = 1;
    drive(p, lnk_on);
    mech[M_STALE]++;
    cycles(50);
    f = '{OK, OK, OK, OK, OK, OK, OK, OK};
    crc_event(2, f);
    cycles(100);
    ok = 1;
    for (int i = 0; i < 8; i++) begin
      ok &= (outq[i].size() == expq[i].size());
      for (int k = 0; k < expq[i].size() && k < outq[i].size(); k++) ok &= (outq[i][k] == expq[i][k]);
    end
    `CHECK(ok, "every output link carried the right copy of every event")
    vr(crc_reg(1, 'h11), q); `CHECK(q == 1, "CRC FPGA 1: link A CRC error counted")
    vr(crc_reg(2, 'h12), q); `CHECK(q == 1, "CRC FPGA 2: link B CRC error counted")
    vr(crc_reg(3, 'h13), q); `CHECK(q == 1, "CRC FPGA 3: both-bad counted")
    vr(crc_reg(4, 'h14), q); `CHECK(q == 1, "CRC FPGA 4: missing link counted")
    vr(crc_reg(4, 'h15), q); `CHECK(q == 1, "CRC FPGA 4: late copy counted")
    vr(crc_reg(5, 'h16), q); `CHECK(q == 1, "CRC FPGA 5: sync error counted")
    vr(crc_reg(0, 'h10), q); `CHECK(q == 3, "CRC FPGA 0: three packets forwarded")
    vr(crc_reg(6, 'h16), q); `CHECK(q == 0, "CRC FPGA 6: no sync error")

    // ---- injection: generator on CRC FPGA 0, memory on CRC FPGA 1 ----
    for (int i = 0; i < 8; i++) outq[i] = {};
    vw(crc_reg(0, 2), 32'd12);
    vw(crc_reg(0, 0), 32'(MODE_INJ_GEN));
    l1a(bcid);
    cycles(120);
    ok = outq[0].size() == 1;
    if (ok) begin
      body = outq[0][0];
      ok = body.size() == 13 && body[0] == 16'd3 && body[1] == {4'h1, 12'(bcid)};
      body.pop_back();
      ok &= (ref_crc(body) == outq[0][0][12]);
    end
    `CHECK(ok, "generator packet with real TTC data and CRC")
    if (ok) mech[M_GEN]++;
    vw(crc_reg(1, 3), 32'd0);
    body = {};
    for (int i = 0; i < 6; i++) begin body.push_back(16'($urandom)); vw(crc_reg(1, 4), 32'(body[i])); end
    vw(crc_reg(1, 5), 32'd6);
    vw(crc_reg(1, 6), 32'd1);
    vw(crc_reg(1, 0), 32'(MODE_INJ_MEM) | 32'h10);
    vw(own_reg(2), 32'h2);        // one internal trigger
    mech[M_INTTRIG]++;
    cycles(60);
    body.push_back(ref_crc(body));
    `CHECK(outq[1].size() == 1 && outq[1][0] == body, "memory packet on internal trigger")
    if (outq[1].size() == 1 && outq[1][0] == body) mech[M_MEM]++;
    // external trigger input (NIM side) replays the memory packet
    vw(own_reg(2), 32'h4);
    ext_trig = 1; cycles(10); ext_trig = 0;
    cycles(60);
    `CHECK(outq[1].size() == 2 && outq[1][1] == body, "memory packet on external trigger")
    if (outq[1].size() == 2 && outq[1][1] == body) mech[M_EXTTRIG]++;
    vw(own_reg(2), 32'h0);

    // ---- clock: loss of the TTC clock and its return ----
    ttc_run = 0;
    #2000;
    `CHECK(!clk_is_ttc, "TTC clock lost: local clock used")
    edges = 0;
    fork
      begin repeat (1000) @(posedge sys_clk) edges++; end
      #1000;
    join_any
    disable fork;
    `CHECK(edges >= 38, $sformatf("board clock keeps running (%0d edges in 1 us)", edges))
    vr(ttc_reg(1), q);
    `CHECK(q[1:0] == 2'b00, "status shows TTC clock absent")
    if (!clk_is_ttc) mech[M_CLKLOSS]++;
    ttc_run = 1;
    #3000;
    `CHECK(clk_is_ttc, "TTC clock back in lnk_on")
    if (clk_is_ttc) mech[M_CLKBACK]++;
    vw(ttc_reg(0), 32'h1);
    #500;
    `CHECK(!clk_is_ttc, "Local Mode: local clock")
    if (!clk_is_ttc) mech[M_LOCAL]++;
    vw(ttc_reg(0), 32'h0);
    #500;
    `CHECK(clk_is_ttc, "Local Mode left: TTC clock")

    // ---- JTAG through VME ----
    vw(own_reg(8), 32'h0000_0003);
    vw(own_reg(9), 32'h0000_9C5A);
    vw(own_reg('hA), 32'd16);
    #3000;
    vr(own_reg('hB), q);
    `CHECK(q[15:0] == 16'h9C5A, "JTAG shift through VME")
    if (q[15:0] == 16'h9C5A) mech[M_JTAG]++;

    // ---- VME64x CR/CSR space: ROM signature and base address register ----
    begin
      logic [7:0] c, r, bar;
      bit a1, a2, a3;
      bfm.csr_read(SLOT, 'h1F, c, a1);
      bfm.csr_read(SLOT, 'h23, r, a2);
      bfm.csr_read(SLOT, 'h7FFFF, bar, a3);
      `CHECK(a1 && a2 && a3 && c == 8'h43 && r == 8'h52 && bar == 8'(SLOT << 3),
             "CR/CSR signature and BAR")
      if (a1 && c == 8'h43 && r == 8'h52) mech[M_CRCSR]++;
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s happened %0d times", mech_e'(m), mech[m]);
      `CHECK(mech[m] > 0, $sformatf("mechanism %s exercised", mech_e'(m)))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
