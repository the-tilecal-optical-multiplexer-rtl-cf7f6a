// Testbench for omb_crc_fpga (buffers 64 words, memory 256 words, link
// timeout 64 cycles). Configured only through its register bus, it is run
// through all its operating modes:
//  - CRC mode with the synchronisation check on: good/good, bad/good,
//    good/bad and bad/bad pairs, a missing copy, a late copy, an event
//    whose TTC data disagree; the output must carry the right copy, and the
//    error counters must match the injected errors;
//  - forced link B;
//  - injection from the event generator on TTC triggers (header from the
//    TTC data, LFSR payload, appended CRC);
//  - injection from the packet memory on internal triggers.
// Output packets are compared with packets built here.
`include "tb/tb_check.svh"
module tb_omb_crc_fpga;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  link_word_t rx_a, rx_b, tx;
  logic ttc_ser, int_trig;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;

  omb_crc_fpga #(.BUF_DEPTH(64), .MEM_DEPTH(256), .TIMEOUT(64)) dut (.*);

  // collect output packets
  word_q_t outq[$], cur;
  always @(posedge clk) if (rst_n && tx.valid) begin
    if (tx.sop) cur = {};
    cur.push_back(tx.data);
    if (tx.eop) outq.push_back(cur);
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    lb_req = '{stb: 1, we: 1, addr: a, wdata: d};
    @(posedge clk); #1; lb_req = '0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] q);
    lb_req = '{stb: 1, we: 0, addr: a, wdata: 0};
    @(posedge clk); #1; lb_req = '0; q = lb_rsp.rdata;
  endtask

  task automatic ttc_frame(input ttc_info_t t);
    logic [44:0] f;
    f = {1'b1, t};
    for (int i = 44; i >= 0; i--) begin ttc_ser = f[i]; @(posedge clk); #1; end
    ttc_ser = 0;
  endtask

  // send both copies, B starting `skew` cycles after A; either may be left out
  task automatic send_pair(input word_q_t pa, input word_q_t pb, input bit use_a, input bit use_b, input int skew);
    int n = pa.size() + skew;
    for (int c = 0; c < n; c++) begin
      rx_a = '0; rx_b = '0;
      if (use_a && c < pa.size())
        rx_a = '{valid: 1, sop: c == 0, eop: c == pa.size() - 1, data: pa[c]};
      if (use_b && c >= skew && c - skew < pb.size())
        rx_b = '{valid: 1, sop: c == skew, eop: c - skew == pb.size() - 1, data: pb[c - skew]};
      @(posedge clk); #1;
    end
    rx_a = '0; rx_b = '0;
  endtask

  word_q_t expq[$];
  int exp_crc_a = 0, exp_crc_b = 0, exp_both = 0, exp_miss = 0, exp_stale = 0, exp_sync = 0;

  task automatic event_crc(input int ev, input bit bad_a, input bit bad_b, input bit use_a,
                           input bit use_b, input bit ttc_ok, input int exp_link);
    word_q_t p, pa, pb;
    ttc_info_t t;
    p = make_pkt(16'(ev), 12'(ev * 7), 6);
    pa = p; pb = p;
    if (bad_a) pa[3] ^= 16'h0100;
    if (bad_b) pb[4] ^= 16'h8000;
    t = '{ttype: 8'h1, bcid: 12'(ev * 7) ^ (ttc_ok ? 12'd0 : 12'd1), evid: 24'(ev)};
    ttc_frame(t);
    send_pair(pa, pb, use_a, use_b, 3);
    if (exp_link == 0) expq.push_back(pa);
    if (exp_link == 1) expq.push_back(pb);
    repeat (30) @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] q;
    word_q_t body, m0, m1;
    ttc_info_t t;
    logic [15:0] l;
    bit ok;
    rx_a = '0; rx_b = '0; ttc_ser = 0; int_trig = 0; lb_req = '0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    rd(12'h007, q);
    `CHECK(q[31:16] == 16'h0C7C && q[2:0] == 3'(MODE_CRC), "status register, CRC mode after reset")

    // ---- CRC mode with synchronisation check ----
    wr(12'h000, 32'h8);
    event_crc(1, 0, 0, 1, 1, 1, 0);                          // both good -> A
    event_crc(2, 1, 0, 1, 1, 1, 1); exp_crc_a++;             // A bad -> B
    event_crc(3, 0, 1, 1, 1, 1, 0); exp_crc_b++;             // B bad -> A
    event_crc(4, 1, 1, 1, 1, 1, 0); exp_crc_a++; exp_crc_b++; exp_both++;
    event_crc(5, 0, 0, 1, 0, 1, 0); exp_miss++;              // B missing
    repeat (80) @(posedge clk); #1;
    event_crc(6, 0, 0, 1, 1, 0, 0); exp_sync++;              // TTC BCID differs
    // late copy of event 6 on B only: discarded
    body = make_pkt(16'd6, 12'd42, 6);
    send_pair(body, body, 0, 1, 0); exp_stale++;
    repeat (20) @(posedge clk); #1;
    `CHECK(outq.size() == expq.size(), $sformatf("CRC mode: %0d packets out", outq.size()))
    ok = 1;
    for (int i = 0; i < expq.size() && i < outq.size(); i++) ok &= (outq[i] == expq[i]);
    `CHECK(ok, "CRC mode: the right copy of every event forwarded")
    rd(12'h010, q); `CHECK(q == 6, "forwarded counter")
    rd(12'h011, q); `CHECK(q == 32'(exp_crc_a), "CRC error counter link A")
    rd(12'h012, q); `CHECK(q == 32'(exp_crc_b), "CRC error counter link B")
    rd(12'h013, q); `CHECK(q == 32'(exp_both), "both-bad counter")
    rd(12'h014, q); `CHECK(q == 32'(exp_miss), "missing-link counter")
    rd(12'h015, q); `CHECK(q == 32'(exp_stale), "late-copy counter")
    rd(12'h016, q); `CHECK(q == 32'(exp_sync), "sync error counter")
    rd(12'h01D, q); `CHECK(q == 6, "TTC record counter")

    // ---- forced link B ----
    wr(12'h001, 32'h1);
    wr(12'h000, 32'h2);   // sync check off: TTC records of events 7, 8 stay queued ...
    outq = {}; expq = {};
    event_crc(7, 1, 0, 1, 1, 1, 1);
    event_crc(8, 0, 0, 1, 1, 1, 1);
    `CHECK(outq.size() == 2 && outq[0] == expq[0] && outq[1] == expq[1], $sformatf("forced link B (%0d out, first %p)", outq.size(), outq[0]))
    rd(12'h010, q); `CHECK(q == 2, "counters cleared by command")

    // ---- injection from the event generator ----
    wr(12'h002, 32'd10);
    wr(12'h000, 32'(MODE_INJ_GEN));
    outq = {}; expq = {};
    // ... and are dropped by the mode change, so they start no packet
    for (int k = 0; k < 3; k++) begin
      t = '{ttype: 8'h3, bcid: 12'(100 + k), evid: 24'(1000 + k)};
      ttc_frame(t);
      body = {};
      body.push_back(t.evid[15:0]); body.push_back({t.ttype[3:0], t.bcid});
      l = t.evid[15:0] ^ 16'hACE1;
      for (int i = 2; i < 10; i++) begin body.push_back(l); l = ref_lfsr(l); end
      body.push_back(ref_crc(body));
      expq.push_back(body);
    end
    // link traffic is discarded in injection mode
    body = make_pkt(16'd77, 12'd1, 4);
    send_pair(body, body, 1, 1, 0);
    repeat (40) @(posedge clk); #1;
    ok = outq.size() == 3;
    for (int i = 0; i < 3 && ok; i++) ok &= (outq[i] == expq[i]);
    `CHECK(ok, "generator packets with TTC header and CRC")

    // ---- injection from memory on internal triggers ----
    wr(12'h003, 32'd0);
    m0 = {}; m1 = {};
    for (int i = 0; i < 5; i++) begin m0.push_back(16'($urandom)); wr(12'h004, 32'(m0[i])); end
    for (int i = 0; i < 5; i++) begin m1.push_back(16'($urandom)); wr(12'h004, 32'(m1[i])); end
    wr(12'h005, 32'd5);
    wr(12'h006, 32'd2);
    wr(12'h000, 32'(MODE_INJ_MEM) | 32'h10);
    outq = {};
    for (int k = 0; k < 3; k++) begin
      int_trig = 1; @(posedge clk); #1; int_trig = 0;
      repeat (20) @(posedge clk); #1;
    end
    m0.push_back(ref_crc(m0)); m1.push_back(ref_crc(m1));
    `CHECK(outq.size() == 3 && outq[0] == m0 && outq[1] == m1 && outq[2] == m0, "memory packets in turn, with CRC")
    rd(12'h01B, q); `CHECK(q == 6, "injected packet counter")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
