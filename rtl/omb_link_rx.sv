// omb_link_rx: receiver for one redundant input link of a CRC FPGA.
//
// Each word of an incoming packet is written into a packet buffer while the
// CRC is accumulated in parallel, one word per cycle. At the packet's last
// word (eop) the CRC result is known at once, so a status record (CRC good,
// overflow, event ID and BCID from the header, word count) is queued for
// the decision logic without waiting for the packet to be read back. This
// store-while-checking scheme is what the board does; the packet layout,
// the CRC and the buffer sizes are this design's choices (see omb_pkg).
//
// Read side: the decision logic hands over one verdict per packet, in
// packet order, through verdict_valid/verdict_ready. A forward verdict
// presents the stored packet on out_* (valid/ready, eop on the last word);
// a discard verdict empties it from the buffer at one word per cycle.
//
// Buffer overflow: a word that is not the last one is stored only if two
// places are free, so the last word of a packet always finds room and the
// buffer never holds a packet without its end. Words dropped this way mark
// the packet as overflowed (its status then fails). A packet of which not
// even the last word fits is lost entirely; ovf_err pulses for both cases.
// A word outside a packet, or a second sop inside one, pulses framing_err;
// the stray sop is stored as an ordinary word (the packet then fails CRC).
module omb_link_rx import omb_pkg::*; #(
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned STAT_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t in_word,
  // packet status, one per received packet
  output logic       stat_valid,
  input  logic       stat_ready,
  output pkt_stat_t  stat,
  // verdicts, one per packet: 1 = forward, 0 = discard
  input  logic       verdict_valid,
  input  logic       verdict_fwd,
  output logic       verdict_ready,
  // forwarded words
  output logic       out_valid,
  input  logic       out_ready,
  output logic [15:0] out_data,
  output logic       out_eop,
  // error pulses
  output logic       framing_err,
  output logic       ovf_err
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  // ---------------- write side: buffer and CRC in parallel ----------------
  logic        in_pkt;
  logic [15:0] crc, crc_base, crc_next;
  logic        ovf;
  logic [15:0] nwords, evid_q;
  logic [11:0] bcid_q;
  logic        buf_wr, buf_full, buf_empty, buf_rd;
  logic [16:0] buf_rdata;
  logic [CW-1:0] buf_count, buf_free;
  logic        starting, accepting, is_last;
  logic        stat_wr, stat_full, stat_empty;
  pkt_stat_t   stat_new;

  assign starting  = in_word.valid && in_word.sop && !in_pkt;
  assign accepting = in_word.valid && (in_pkt || in_word.sop);
  assign is_last   = accepting && in_word.eop;
  assign crc_base  = starting ? CRC_INIT : crc;

  omb_crc16 u_crc (.crc_in(crc_base), .data(in_word.data), .crc_out(crc_next));

  always_comb begin
    buf_wr = 1'b0;
    if (accepting) buf_wr = in_word.eop ? (buf_free >= CW'(1)) : (buf_free >= CW'(2));
  end

  omb_fifo #(.W(17), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(buf_wr), .wdata({in_word.eop, in_word.data}),
    .rd_en(buf_rd), .rdata(buf_rdata),
    .empty(buf_empty), .full(buf_full), .count(buf_count), .free(buf_free)
  );

  // words seen so far in this packet, including the current one
  logic [15:0] nwords_now;
  logic        stored_any_now;
  logic        stored_any;
  assign nwords_now     = starting ? 16'd1 : nwords + 16'd1;
  assign stored_any_now = (starting ? 1'b0 : stored_any) || buf_wr;

  always_comb begin
    stat_new.overflow = starting ? !buf_wr : (ovf || !buf_wr);
    stat_new.crc_ok   = (crc_next == 16'h0000) && !stat_new.overflow;
    stat_new.evid     = starting ? in_word.data : evid_q;
    stat_new.bcid     = (nwords_now == 16'd2) ? in_word.data[11:0] : bcid_q;
    stat_new.nwords   = nwords_now;
  end

  assign stat_wr = is_last && stored_any_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt      <= 1'b0;
      crc         <= CRC_INIT;
      ovf         <= 1'b0;
      nwords      <= '0;
      evid_q      <= '0;
      bcid_q      <= '0;
      stored_any  <= 1'b0;
      framing_err <= 1'b0;
      ovf_err     <= 1'b0;
    end else begin
      framing_err <= in_word.valid && ((!in_pkt && !in_word.sop) || (in_pkt && in_word.sop));
      ovf_err     <= is_last && stat_new.overflow;
      if (accepting) begin
        crc        <= crc_next;
        nwords     <= nwords_now;
        ovf        <= stat_new.overflow;
        stored_any <= stored_any_now;
        if (starting) evid_q <= in_word.data;
        if (nwords_now == 16'd2) bcid_q <= in_word.data[11:0];
        in_pkt     <= !in_word.eop;
      end
    end
  end

  omb_fifo #(.W($bits(pkt_stat_t)), .DEPTH(STAT_DEPTH)) u_stat (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(stat_wr), .wdata(stat_new),
    .rd_en(stat_valid && stat_ready), .rdata(stat),
    .empty(stat_empty), .full(stat_full), .count(), .free()
  );
  assign stat_valid = !stat_empty;

  // ---------------- read side: forward or discard per verdict -------------
  logic verd_v, verd_fwd;
  assign verdict_ready = !verd_v;

  assign out_valid = verd_v && verd_fwd && !buf_empty;
  assign out_data  = buf_rdata[15:0];
  assign out_eop   = buf_rdata[16];
  assign buf_rd    = verd_v && !buf_empty && (!verd_fwd || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      verd_v   <= 1'b0;
      verd_fwd <= 1'b0;
    end else if (!verd_v) begin
      verd_v   <= verdict_valid;
      verd_fwd <= verdict_fwd;
    end else if (buf_rd && buf_rdata[16]) begin
      verd_v   <= 1'b0;
    end
  end

  // the buffer never loses the end of a stored packet
  a_no_full_write: assert property (@(posedge clk) disable iff (!rst_n) !(buf_wr && buf_full));
endmodule
