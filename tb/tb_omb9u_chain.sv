// Qualification chain: three boards at their default sizes, set up as in the
// board's qualification test bench. Two boards (0 and 1) in the injection
// mode emulate the front end. On every Level-1 Accept each of their eight
// CRC FPGAs sends a generated packet with the real TTC data and a CRC.
// Board 0's output link i feeds input 2i (link A) of board 2, and board 1's
// output link i feeds input 2i+1 (link B). Board 2 runs the CRC checking
// mode with the synchronisation check on. The links between the boards are
// modelled with a 2 ns delay. They flip one bit in a few packets,
// standing in for transmission errors. All three boards share the TTC
// signals and clock, each has its own VME bus, and the testbench plays the
// ROD. Checked:
//  - boards 0 and 1 send identical packets (same event, BCID, payload);
//  - every packet leaving board 2 has a good CRC, the next event number
//    and the generated content, so each corrupted copy was replaced by
//    the good one from the other board;
//  - board 2's counters: events forwarded, CRC errors per link where bits
//    were flipped, no sync error.
// From the original setup: two injecting boards feeding both links of a
// third board that checks the CRC and forwards to the ROD (the readout
// driver). This design's own choices: the event count, the 300-cycle
// trigger spacing, the 40-word generated packets and which packets get
// a flipped bit. The testbench runs in about a tenth of a second.
`include "tb/tb_check.svh"
module tb_omb9u_chain;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int N_EV = 10, GEN_LEN = 40, SPACING = 300;
  localparam int SLOT [3] = '{3, 4, 5};

  logic ttc_clk = 0, local_clk = 0, rst_n = 1;   // falls at 1 ns: power-on reset edge
  always #12.5 ttc_clk = ~ttc_clk;
  always #12.45 local_clk = ~local_clk;

  logic ttc_bcr = 0, ttc_ecr = 0, ttc_l1a = 0;
  logic [7:0] ttc_ttype = 0;
  logic ext_trig = 0;
  link_word_t rx [3][16], tx [3][8];
  logic [2:0] sys_clk, clk_is_ttc;

  // flip bit 15 of the first word of packet number `pkt` on one link
  int flip_pkt [2][8];
  int pkt_cnt [2][8];

  for (genvar b = 0; b < 3; b++) begin : g_b
    logic vme_as_n, vme_write_n, vme_data_oe, vme_dtack_n, vme_gap_n;
    logic [1:0] vme_ds_n;
    logic [5:0] vme_am;
    logic [23:1] vme_addr;
    logic [31:0] vme_data_i, vme_data_o;
    logic [4:0] vme_ga_n;
    logic jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;
    assign jtag_tdo  = jtag_tdi;
    assign vme_ga_n  = ~5'(SLOT[b]);
    assign vme_gap_n = ~(^(~5'(SLOT[b])));

    omb9u_top dut (
      .ttc_clk, .local_clk, .rst_n, .ttc_bcr, .ttc_ecr, .ttc_l1a, .ttc_ttype,
      .glink_rx(rx[b]), .glink_tx(tx[b]),
      .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_data_i,
      .vme_data_o, .vme_data_oe, .vme_dtack_n, .vme_ga_n, .vme_gap_n,
      .jtag_tck, .jtag_tms, .jtag_tdi, .jtag_tdo, .ext_trig,
      .sys_clk(sys_clk[b]), .clk_is_ttc(clk_is_ttc[b])
    );
    vme_master_bfm bfm (.as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am),
                        .addr(vme_addr), .data_o(vme_data_i), .data_i(vme_data_o),
                        .data_oe(vme_data_oe), .dtack_n(vme_dtack_n));
  end

  // fibres from the two injecting boards to the checking board
  for (genvar s = 0; s < 2; s++) begin : g_src
    for (genvar i = 0; i < 8; i++) begin : g_lnk
      always @(tx[s][i]) begin
        link_word_t w;
        w = tx[s][i];
        if (w.valid && w.sop && $time > 200) begin
          if (pkt_cnt[s][i] == flip_pkt[s][i]) w.data[15] = !w.data[15];
          pkt_cnt[s][i]++;
        end
        rx[2][2 * i + s] <= #2 w;
      end
    end
  end
  initial begin
    for (int l = 0; l < 16; l++) begin rx[0][l] = '0; rx[1][l] = '0; rx[2][l] = '0; end
    for (int s = 0; s < 2; s++) for (int i = 0; i < 8; i++) begin
      pkt_cnt[s][i] = 0; flip_pkt[s][i] = -1;
    end
    flip_pkt[0][2] = 3;     // event 3, link A of CRC FPGA 2
    flip_pkt[1][6] = 5;     // event 5, link B of CRC FPGA 6
    flip_pkt[0][0] = 7;     // event 7, link A of CRC FPGA 0
  end

  // packets leaving each board
  word_q_t outq [3][8][$], cur [3][8];
  bit mon_on = 0;                      // set once the boards are out of reset
  for (genvar b = 0; b < 3; b++) begin : g_mon
    always @(posedge sys_clk[b]) if (mon_on)
      for (int i = 0; i < 8; i++) if (tx[b][i].valid) begin
        if (tx[b][i].sop) cur[b][i] = {};
        cur[b][i].push_back(tx[b][i].data);
        if (tx[b][i].eop) outq[b][i].push_back(cur[b][i]);
      end
  end

  task automatic vw(input int b, input int off, input logic [31:0] d);
    bit ack;
    logic [23:0] a;
    a = 24'((SLOT[b] << 19) | off);
    unique case (b)
      0: g_b[0].bfm.write32(a, d, ack);
      1: g_b[1].bfm.write32(a, d, ack);
      default: g_b[2].bfm.write32(a, d, ack);
    endcase
    `CHECK(ack, $sformatf("board %0d: VME write to %h acknowledged", b, a))
  endtask
  task automatic vr(input int b, input int off, output logic [31:0] q);
    bit ack;
    logic [23:0] a;
    a = 24'((SLOT[b] << 19) | off);
    unique case (b)
      0: g_b[0].bfm.read32(a, q, ack);
      1: g_b[1].bfm.read32(a, q, ack);
      default: g_b[2].bfm.read32(a, q, ack);
    endcase
    `CHECK(ack, $sformatf("board %0d: VME read of %h acknowledged", b, a))
  endtask
  function automatic int crc_off(input int f, input int r);
    return 'h40000 | (f << 15) | (r * 4);
  endfunction

  initial begin
    logic [31:0] q;
    bit ok_same, ok_good, ok_evid, ok_content;
    #1 rst_n = 0;
    #100 rst_n = 1;
    #3000;
    mon_on = 1;
    `CHECK(clk_is_ttc == 3'b111, "all boards run on the TTC clock")
    for (int f = 0; f < 8; f++) begin
      vw(0, crc_off(f, 2), GEN_LEN);
      vw(1, crc_off(f, 2), GEN_LEN);
      vw(0, crc_off(f, 0), 32'(MODE_INJ_GEN));
      vw(1, crc_off(f, 0), 32'(MODE_INJ_GEN));
      vw(2, crc_off(f, 0), 32'h8);               // CRC mode, sync check on
    end
    @(posedge sys_clk[0]); #1;
    ttc_bcr = 1; ttc_ecr = 1;
    @(posedge sys_clk[0]); #1;
    ttc_bcr = 0; ttc_ecr = 0;
    for (int ev = 0; ev < N_EV; ev++) begin
      repeat (SPACING - 1 - 17 * (ev % 3)) @(posedge sys_clk[0]);
      #1 ttc_l1a = 1; ttc_ttype = 8'h0B;
      @(posedge sys_clk[0]); #1 ttc_l1a = 0;
    end
    repeat (2 * SPACING) @(posedge sys_clk[0]); #1;

    ok_same = 1; ok_good = 1; ok_evid = 1; ok_content = 1;
    for (int i = 0; i < 8; i++) begin
      `CHECK(outq[0][i].size() == N_EV && outq[1][i].size() == N_EV && outq[2][i].size() == N_EV,
             $sformatf("CRC FPGA %0d: %0d/%0d injected, %0d checked and forwarded", i,
                       outq[0][i].size(), outq[1][i].size(), outq[2][i].size()))
      for (int e = 0; e < N_EV && e < outq[0][i].size() && e < outq[1][i].size(); e++)
        ok_same &= (outq[0][i][e] == outq[1][i][e]);
      for (int e = 0; e < N_EV && e < outq[2][i].size(); e++) begin
        ok_good &= (ref_crc(outq[2][i][e]) == 16'h0000) && (outq[2][i][e].size() == GEN_LEN + 1);
        ok_evid &= (outq[2][i][e][0] == 16'(e)) && (outq[2][i][e][1][15:12] == 4'hB);
        if (e < outq[0][i].size()) ok_content &= (outq[2][i][e] == outq[0][i][e]);
      end
    end
    `CHECK(ok_same, "both injecting boards send identical packets")
    `CHECK(ok_good, "every packet reaching the ROD has a good CRC and full length")
    `CHECK(ok_evid, "packets reach the ROD in event order with the trigger type")
    `CHECK(ok_content, "forwarded packets carry the generated content")
    for (int f = 0; f < 8; f++) begin
      int ea, eb;
      ea = (f == 2 || f == 0) ? 1 : 0;
      eb = (f == 6) ? 1 : 0;
      vr(2, crc_off(f, 'h10), q); `CHECK(q == N_EV, $sformatf("CRC FPGA %0d forwarded %0d", f, q))
      vr(2, crc_off(f, 'h11), q); `CHECK(q == 32'(ea), $sformatf("CRC FPGA %0d link A errors %0d", f, q))
      vr(2, crc_off(f, 'h12), q); `CHECK(q == 32'(eb), $sformatf("CRC FPGA %0d link B errors %0d", f, q))
      vr(2, crc_off(f, 'h16), q); `CHECK(q == 0, $sformatf("CRC FPGA %0d sync errors %0d", f, q))
      vr(0, crc_off(f, 'h1B), q); `CHECK(q == N_EV, $sformatf("board 0 CRC FPGA %0d injected %0d", f, q))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    repeat ((N_EV + 8) * SPACING) @(posedge ttc_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
