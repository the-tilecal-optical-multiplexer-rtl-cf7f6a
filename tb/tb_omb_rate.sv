// Rate and latency testbench for one CRC FPGA (omb_crc_fpga) at its default
// sizes: 1024-word link buffers, 4096-word packet memory, 1024-cycle
// timeout. It runs the board's working point, one event per 400 clock
// cycles (100 kHz Level-1 Accept rate at 40 MHz), with packets of 397
// words (two header words, 394 payload words, CRC) on both links. That is
// close to the longest packet the 400-cycle spacing allows. Link B lags
// link A by 0 to 3 cycles, and some events carry a CRC error on one of the
// two copies. Every event also gets its TTC record over the serial line,
// and the synchronisation check is on. Checked:
//  - every event leaves on the output link as the good copy, in order;
//  - no buffer overflow, no sync error, no missing or late copy; the
//    error counters match the injected errors;
//  - latency: the first word of each output packet leaves within LAT_MAX
//    cycles of the later of the two last input words (the decision is
//    made when the last word arrives, not after the packet is read back).
`include "tb/tb_check.svh"
module tb_omb_rate;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int N_EV = 30, SPACING = 400, NPAY = 394, LAT_MAX = 8;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  link_word_t rx_a, rx_b, tx;
  logic ttc_ser, int_trig;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;

  omb_crc_fpga dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // output packets and the cycle each one started
  word_q_t outq[$], cur;
  int sop_cyc[$];
  always @(posedge clk) if (rst_n && tx.valid) begin
    if (tx.sop) begin cur = {}; sop_cyc.push_back(cyc); end
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

  word_q_t expq[$];
  int last_eop_cyc[$];
  int exp_crc_a = 0, exp_crc_b = 0;

  // one 400-cycle slot: TTC frame and both link copies start together
  task automatic event_slot(input int ev);
    word_q_t p, pa, pb;
    ttc_info_t t;
    int skew, err, n;
    skew = ev % 4;
    err  = (ev % 5 == 2) ? 1 : (ev % 7 == 3) ? 2 : 0;
    p = make_pkt(16'(ev), 12'((ev * 13) % 3564), NPAY, 4'h5);
    pa = p; pb = p;
    if (err == 1) begin pa[100] ^= 16'h0004; exp_crc_a++; expq.push_back(pb); end
    else begin
      if (err == 2) begin pb[7] ^= 16'h4000; exp_crc_b++; end
      expq.push_back(pa);
    end
    t = '{ttype: 8'h5, bcid: 12'((ev * 13) % 3564), evid: 24'(ev)};
    n = pa.size() + skew;
    fork
      ttc_frame(t);
      begin
        for (int c = 0; c < SPACING; c++) begin
          rx_a = '0; rx_b = '0;
          if (c < pa.size())
            rx_a = '{valid: 1, sop: c == 0, eop: c == pa.size() - 1, data: pa[c]};
          if (c >= skew && c - skew < pb.size())
            rx_b = '{valid: 1, sop: c == skew, eop: c - skew == pb.size() - 1,
                     data: pb[c - skew]};
          if (c == n - 1) last_eop_cyc.push_back(cyc);
          @(posedge clk); #1;
        end
        rx_a = '0; rx_b = '0;
      end
    join
  endtask

  initial begin
    logic [31:0] q;
    int max_lat, lat;
    bit ok, ok_lat;
    rx_a = '0; rx_b = '0; ttc_ser = 0; int_trig = 0; lb_req = '0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    wr(12'h000, 32'h8);                       // CRC mode, sync check on
    for (int ev = 0; ev < N_EV; ev++) event_slot(ev);
    repeat (2 * SPACING) @(posedge clk); #1;   // the last packet drains

    `CHECK(outq.size() == N_EV, $sformatf("%0d of %0d events forwarded", outq.size(), N_EV))
    ok = 1;
    for (int i = 0; i < N_EV && i < outq.size(); i++) ok &= (outq[i] == expq[i]);
    `CHECK(ok, "every event forwarded as its good copy, in order")
    max_lat = 0; ok_lat = 1;
    for (int i = 0; i < N_EV && i < sop_cyc.size(); i++) begin
      lat = sop_cyc[i] - last_eop_cyc[i];
      if (lat > max_lat) max_lat = lat;
      if (lat < 1 || lat > LAT_MAX || sop_cyc.size() < N_EV) ok_lat = 0;
    end
    $display("last input word to first output word: at most %0d cycles", max_lat);
    `CHECK(ok_lat, $sformatf("latency within %0d cycles (max %0d)", LAT_MAX, max_lat))
    rd(12'h010, q); `CHECK(q == N_EV, "forwarded counter")
    rd(12'h011, q); `CHECK(q == 32'(exp_crc_a), "CRC error counter link A")
    rd(12'h012, q); `CHECK(q == 32'(exp_crc_b), "CRC error counter link B")
    rd(12'h013, q); `CHECK(q == 0, "no both-bad event")
    rd(12'h014, q); `CHECK(q == 0, "no missing copy")
    rd(12'h015, q); `CHECK(q == 0, "no late copy")
    rd(12'h016, q); `CHECK(q == 0, "no sync error")
    rd(12'h017, q); `CHECK(q == 0, "no overflow on link A")
    rd(12'h018, q); `CHECK(q == 0, "no overflow on link B")
    rd(12'h01C, q); `CHECK(q == 0, "no TTC record lost")
    rd(12'h01D, q); `CHECK(q == N_EV, "one TTC record per event")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((N_EV + 6) * SPACING) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
