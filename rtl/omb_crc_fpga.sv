// omb_crc_fpga: one CRC FPGA of the board (eight run the same logic).
//
// It receives the two redundant links of one front-end drawer (rx_a, rx_b)
// and drives one output link to the ROD (tx). Each link receiver buffers a
// packet while checking its CRC; the decision logic picks the packet to
// send as soon as the last words have arrived; the output multiplexer sends
// it. In the injection modes the multiplexer instead sends packets made by
// the event generator or read from the packet memory, one per trigger, with
// a CRC appended. Triggers and TTC data (TType, BCID, event ID) come over
// the serial TTC line from the TTC FPGA, or from the VME FPGA's internal
// trigger (int_trig) when selected. Configuration, status and error
// counters sit on the register bus from the VME FPGA; a read answers one
// cycle after the strobe. This structure follows the board; the register
// map below is this design's own.
//
// Register map (word addresses):
//   0x00 CTRL      rw  [2:0] mode (omb_mode_e), [3] sync check enable,
//                      [4] internal trigger select; a write also empties
//                      the queue of trigger records
//   0x01 CMD       w   [0] clear all counters
//   0x02 GEN_LEN   rw  event generator body length in words
//   0x03 MEM_PTR   rw  packet memory write address
//   0x04 MEM_DATA  w   write packet memory at MEM_PTR, then MEM_PTR+1
//   0x05 MEM_PLEN  rw  packet memory body length
//   0x06 MEM_NPKT  rw  number of packets in the packet memory
//   0x07 STATUS    r   [31:16] firmware ID 0x0C7C, [2:0] current mode
//   0x10..0x1D     r   32-bit event counters, in the order of CNT_* below
module omb_crc_fpga import omb_pkg::*; #(
  parameter int unsigned BUF_DEPTH = 1024,
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned TIMEOUT   = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t rx_a,
  input  link_word_t rx_b,
  output link_word_t tx,
  input  logic       ttc_ser,
  input  logic       int_trig,
  input  lbus_req_t  lb_req,
  output lbus_rsp_t  lb_rsp
);
  localparam int unsigned MAW  = $clog2(MEM_DEPTH);
  localparam int unsigned NCNT = 14;
  // counter indices
  localparam int CNT_FWD = 0, CNT_CRC_A = 1, CNT_CRC_B = 2, CNT_BOTH = 3,
                 CNT_MISS = 4, CNT_STALE = 5, CNT_SYNC = 6, CNT_OVF_A = 7,
                 CNT_OVF_B = 8, CNT_FRM_A = 9, CNT_FRM_B = 10, CNT_INJ = 11,
                 CNT_TTC_OVF = 12, CNT_L1A = 13;

  // ---------------- registers ----------------
  omb_mode_e      mode;
  logic           sync_en, int_sel;
  logic [15:0]    gen_len, mem_plen, mem_npkt;
  logic [MAW-1:0] mem_ptr;
  logic [31:0]    cnt [NCNT];
  logic [NCNT-1:0] ev;
  logic           mem_wr;

  logic           ctrl_wr;
  assign ctrl_wr = lb_req.stb && lb_req.we && (lb_req.addr == 12'h000);
  assign mem_wr = lb_req.stb && lb_req.we && (lb_req.addr == 12'h004);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_CRC; sync_en <= 1'b0; int_sel <= 1'b0;
      gen_len <= 16'd16; mem_plen <= 16'd16; mem_npkt <= 16'd1; mem_ptr <= '0;
      lb_rsp <= '0;
      for (int i = 0; i < NCNT; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NCNT; i++) if (ev[i]) cnt[i] <= cnt[i] + 32'd1;
      lb_rsp.ack   <= lb_req.stb;
      lb_rsp.rdata <= '0;
      if (lb_req.stb && lb_req.we) begin
        unique case (lb_req.addr)
          12'h000: begin
            mode    <= omb_mode_e'(lb_req.wdata[2:0]);
            sync_en <= lb_req.wdata[3];
            int_sel <= lb_req.wdata[4];
          end
          12'h001: if (lb_req.wdata[0]) for (int i = 0; i < NCNT; i++) cnt[i] <= '0;
          12'h002: gen_len  <= lb_req.wdata[15:0];
          12'h003: mem_ptr  <= lb_req.wdata[MAW-1:0];
          12'h004: mem_ptr  <= mem_ptr + 1'b1;
          12'h005: mem_plen <= lb_req.wdata[15:0];
          12'h006: mem_npkt <= lb_req.wdata[15:0];
          default: ;
        endcase
      end else if (lb_req.stb) begin
        unique casez (lb_req.addr)
          12'h000: lb_rsp.rdata <= {27'd0, int_sel, sync_en, mode};
          12'h002: lb_rsp.rdata <= {16'd0, gen_len};
          12'h003: lb_rsp.rdata <= 32'(mem_ptr);
          12'h005: lb_rsp.rdata <= {16'd0, mem_plen};
          12'h006: lb_rsp.rdata <= {16'd0, mem_npkt};
          12'h007: lb_rsp.rdata <= {16'h0C7C, 13'd0, mode};
          12'h01?: if (lb_req.addr[3:0] < 4'(NCNT)) lb_rsp.rdata <= cnt[lb_req.addr[3:0]];
          default: ;
        endcase
      end
    end
  end

  // ---------------- datapath ----------------
  logic      sa_v, sa_r, sb_v, sb_r;
  pkt_stat_t sa, sb;
  logic      va_v, va_f, va_r, vb_v, vb_f, vb_r;
  logic [3:0]  s_valid, s_ready, s_eop;
  logic [15:0] s_data [4];
  logic      dcmd_v, dcmd_r;
  src_e      dcmd_src;
  logic      info_v, info_r, dec_ttc_r;
  ttc_info_t info;
  logic      inj_gen, inj_mem, gen_tv, gen_tr, mem_tv, mem_tr, inj_cmd;
  logic      q_ready;
  logic      frm_a, frm_b, ovf_a, ovf_b;

  omb_link_rx #(.DEPTH(BUF_DEPTH)) u_rx_a (
    .clk, .rst_n, .in_word(rx_a),
    .stat_valid(sa_v), .stat_ready(sa_r), .stat(sa),
    .verdict_valid(va_v), .verdict_fwd(va_f), .verdict_ready(va_r),
    .out_valid(s_valid[SRC_LINK_A]), .out_ready(s_ready[SRC_LINK_A]),
    .out_data(s_data[SRC_LINK_A]), .out_eop(s_eop[SRC_LINK_A]),
    .framing_err(frm_a), .ovf_err(ovf_a)
  );
  omb_link_rx #(.DEPTH(BUF_DEPTH)) u_rx_b (
    .clk, .rst_n, .in_word(rx_b),
    .stat_valid(sb_v), .stat_ready(sb_r), .stat(sb),
    .verdict_valid(vb_v), .verdict_fwd(vb_f), .verdict_ready(vb_r),
    .out_valid(s_valid[SRC_LINK_B]), .out_ready(s_ready[SRC_LINK_B]),
    .out_data(s_data[SRC_LINK_B]), .out_eop(s_eop[SRC_LINK_B]),
    .framing_err(frm_b), .ovf_err(ovf_b)
  );

  omb_ttc_rx u_ttc (
    .clk, .rst_n, .ttc_ser, .int_sel, .int_trig, .flush(ctrl_wr),
    .info_valid(info_v), .info_ready(info_r), .info,
    .l1a_seen(ev[CNT_L1A]), .ovf_err(ev[CNT_TTC_OVF])
  );

  omb_decision #(.TIMEOUT(TIMEOUT)) u_dec (
    .clk, .rst_n, .mode, .sync_en,
    .stat_a_valid(sa_v), .stat_a_ready(sa_r), .stat_a(sa),
    .stat_b_valid(sb_v), .stat_b_ready(sb_r), .stat_b(sb),
    .verdict_a_valid(va_v), .verdict_a_fwd(va_f), .verdict_a_ready(va_r),
    .verdict_b_valid(vb_v), .verdict_b_fwd(vb_f), .verdict_b_ready(vb_r),
    .cmd_valid(dcmd_v), .cmd_src(dcmd_src), .cmd_ready(dcmd_r),
    .ttc_valid(info_v), .ttc_ready(dec_ttc_r), .ttc(info),
    .ev_fwd(), .ev_crc_err_a(ev[CNT_CRC_A]), .ev_crc_err_b(ev[CNT_CRC_B]),
    .ev_both_bad(ev[CNT_BOTH]), .ev_missing(ev[CNT_MISS]), .ev_stale(ev[CNT_STALE]),
    .ev_sync_err(ev[CNT_SYNC])
  );

  // injection: each trigger record starts one generator or memory packet
  assign inj_gen = (mode == MODE_INJ_GEN);
  assign inj_mem = (mode == MODE_INJ_MEM);
  assign gen_tv  = inj_gen && info_v && q_ready;
  assign mem_tv  = inj_mem && info_v && q_ready;
  assign inj_cmd = (gen_tv && gen_tr) || (mem_tv && mem_tr);
  assign info_r  = dec_ttc_r || inj_cmd;
  assign dcmd_r  = q_ready;

  omb_event_gen u_gen (
    .clk, .rst_n, .len(gen_len),
    .trig_valid(gen_tv), .trig_ready(gen_tr), .trig(info),
    .o_valid(s_valid[SRC_GEN]), .o_ready(s_ready[SRC_GEN]),
    .o_data(s_data[SRC_GEN]), .o_eop(s_eop[SRC_GEN])
  );

  omb_inject_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n,
    .wr_en(mem_wr), .wr_addr(mem_ptr), .wr_data(lb_req.wdata[15:0]),
    .pkt_len(mem_plen), .num_pkts(mem_npkt),
    .trig_valid(mem_tv), .trig_ready(mem_tr),
    .o_valid(s_valid[SRC_MEM]), .o_ready(s_ready[SRC_MEM]),
    .o_data(s_data[SRC_MEM]), .o_eop(s_eop[SRC_MEM]),
    .pkt_index()
  );

  omb_out_mux u_out (
    .clk, .rst_n,
    .cmd_valid(dcmd_v || inj_cmd), .cmd_ready(q_ready),
    .cmd_src(inj_cmd ? (inj_gen ? SRC_GEN : SRC_MEM) : dcmd_src),
    .s_valid, .s_ready, .s_data, .s_eop,
    .tx, .fwd_done(ev[CNT_FWD]), .inj_done(ev[CNT_INJ])
  );

  assign ev[CNT_OVF_A] = ovf_a;
  assign ev[CNT_OVF_B] = ovf_b;
  assign ev[CNT_FRM_A] = frm_a;
  assign ev[CNT_FRM_B] = frm_b;

  // the decision never issues a command in the injection modes
  a_no_cmd_clash: assert property (@(posedge clk) disable iff (!rst_n) !(dcmd_v && inj_cmd));
endmodule
