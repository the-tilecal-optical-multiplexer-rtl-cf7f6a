// Testbench for omb_link_rx (buffer depth reduced to 32 words): good and
// corrupted packets, status contents and timing (status one cycle after the
// last word), forwarding with back-pressure, discarding, a stray word
// (framing error) and a packet too long for the buffer (overflow).
`include "tb/tb_check.svh"
module tb_omb_link_rx;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_word_t in_word;
  logic stat_valid, stat_ready, verdict_valid, verdict_fwd, verdict_ready;
  pkt_stat_t stat;
  logic out_valid, out_ready, out_eop, framing_err, ovf_err;
  logic [15:0] out_data;
  int n_frm = 0, n_ovf = 0;

  omb_link_rx #(.DEPTH(32), .STAT_DEPTH(4)) dut (.*);

  always @(posedge clk) begin
    if (rst_n && framing_err) n_frm++;
    if (rst_n && ovf_err) n_ovf++;
  end

  task automatic send(input word_q_t p);
    foreach (p[i]) begin
      in_word.valid = 1; in_word.sop = (i == 0); in_word.eop = (i == p.size() - 1);
      in_word.data = p[i];
      @(posedge clk); #1;
    end
    in_word = '0;
  endtask

  task automatic give_verdict(input logic fwd);
    verdict_valid = 1; verdict_fwd = fwd;
    while (!verdict_ready) @(posedge clk);
    @(posedge clk); #1;
    verdict_valid = 0;
  endtask

  // read a forwarded packet with random back-pressure
  task automatic read_pkt(output word_q_t got);
    bit done = 0;
    got = {};
    while (!done) begin
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        done = out_eop;
      end
      @(posedge clk); #1;
    end
    out_ready = 0;
  endtask

  task automatic take_stat(output pkt_stat_t s);
    s = stat;
    stat_ready = 1; @(posedge clk); #1; stat_ready = 0;
  endtask

  initial begin
    word_q_t p1, p2, p3, got;
    pkt_stat_t s;
    in_word = '0; stat_ready = 0; verdict_valid = 0; verdict_fwd = 0; out_ready = 0;
    repeat (3) @(posedge clk); #1; rst_n = 1; @(posedge clk); #1;

    // good packet: status one cycle after the last word
    p1 = make_pkt(16'h1234, 12'h0AB, 6);
    foreach (p1[i]) begin
      in_word.valid = 1; in_word.sop = (i == 0); in_word.eop = (i == p1.size() - 1);
      in_word.data = p1[i];
      @(posedge clk); #1;
      if (i < p1.size() - 1) `CHECK(!stat_valid, "no status before last word")
    end
    in_word = '0;
    `CHECK(stat_valid, "status the cycle after the last word")
    take_stat(s);
    `CHECK(s.crc_ok && !s.overflow, "good packet passes CRC")
    `CHECK(s.evid == 16'h1234 && s.bcid == 12'h0AB, "header captured")
    `CHECK(s.nwords == 16'(p1.size()), "word count")
    give_verdict(1);
    read_pkt(got);
    `CHECK(got == p1, "forwarded packet equals received packet")

    // corrupted packet then good packet; discard the first, forward the second
    p2 = make_pkt(16'h0002, 12'h111, 5);
    p2[3] ^= 16'h0040;
    p3 = make_pkt(16'h0003, 12'h222, 7);
    send(p2);
    send(p3);
    @(posedge clk); #1;
    take_stat(s);
    `CHECK(!s.crc_ok && s.evid == 16'h0002, "corrupted packet fails CRC")
    take_stat(s);
    `CHECK(s.crc_ok && s.evid == 16'h0003, "following packet passes")
    give_verdict(0);
    give_verdict(1);
    read_pkt(got);
    `CHECK(got == p3, "discarded packet skipped, next one forwarded")
    `CHECK(!out_valid && !stat_valid, "nothing left after reading")

    // stray word outside a packet
    in_word.valid = 1; in_word.sop = 0; in_word.eop = 0; in_word.data = 16'hBEEF;
    @(posedge clk); #1; in_word = '0; @(posedge clk); #1;
    `CHECK(n_frm == 1, $sformatf("framing error on a word outside a packet (%0d seen)", n_frm))
    `CHECK(!stat_valid, "stray word gives no status")

    // overflow: 40-word packet into a 32-word buffer
    p1 = make_pkt(16'h0004, 12'h333, 38);
    send(p1);
    @(posedge clk); #1;
    `CHECK(n_ovf == 1, "overflow reported")
    take_stat(s);
    `CHECK(s.overflow && !s.crc_ok, "overflowed packet marked bad")
    give_verdict(1);
    read_pkt(got);
    `CHECK(got.size() == 32 && got[31] == p1[p1.size()-1], "stored part ends with the last word")
    p2 = make_pkt(16'h0005, 12'h444, 3);
    send(p2);
    @(posedge clk); #1;
    take_stat(s);
    `CHECK(s.crc_ok, "packet after overflow is good")
    give_verdict(1);
    read_pkt(got);
    `CHECK(got == p2, "packet after overflow forwarded intact")

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
