// omb_decision: event-by-event choice of the link sent to the ROD.
//
// The two link receivers each queue a status record when the last word of
// a packet has arrived. When both records of an event are present the
// decision is immediate, so the chosen packet can start leaving right after
// its last word has come in: in CRC mode the link with the good CRC is
// forwarded (link A if both are good, or if both are bad, which is also
// counted); in the forced modes the chosen link is always forwarded. The
// other packet receives a discard verdict. One record is handled per
// decision; a new decision waits until the previous verdicts and output
// command have been taken (one cycle each when the receivers are idle).
//
// Missing and late links (this design's choice): if only one link has a
// packet and the other one has none for TIMEOUT cycles, the one present is
// forwarded alone and `missing` pulses. A record whose event ID equals the
// last forwarded one is a late duplicate; it is discarded and `stale`
// pulses. In the injection modes all link packets are discarded.
//
// Synchronisation check: with sync_en set, every forwarded packet takes the
// next TTC record (one per Level-1 Accept) and compares event ID[15:0] and
// BCID with the packet header; a mismatch, or no TTC record, pulses
// sync_err. All error outputs are one-cycle pulses for the counters.
// cmd_src only ever names link A or link B (injection commands are issued
// elsewhere in the CRC FPGA), so its upper bit is always 0.
module omb_decision import omb_pkg::*; #(
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  omb_mode_e mode,
  input  logic      sync_en,
  input  logic      stat_a_valid,
  output logic      stat_a_ready,
  input  pkt_stat_t stat_a,
  input  logic      stat_b_valid,
  output logic      stat_b_ready,
  input  pkt_stat_t stat_b,
  output logic      verdict_a_valid,
  output logic      verdict_a_fwd,
  input  logic      verdict_a_ready,
  output logic      verdict_b_valid,
  output logic      verdict_b_fwd,
  input  logic      verdict_b_ready,
  output logic      cmd_valid,
  output src_e      cmd_src,
  input  logic      cmd_ready,
  input  logic      ttc_valid,
  output logic      ttc_ready,
  input  ttc_info_t ttc,
  output logic      ev_fwd,
  output logic      ev_crc_err_a,
  output logic      ev_crc_err_b,
  output logic      ev_both_bad,
  output logic      ev_missing,
  output logic      ev_stale,
  output logic      ev_sync_err
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic          slots_free;
  logic [TW-1:0] timer;
  logic          have_last;
  logic [15:0]   last_evid;
  logic          injecting, a_stale, b_stale;

  // actions decided this cycle
  logic      take_a, take_b, fwd_a, fwd_b, do_fwd, alone, stale_hit;
  pkt_stat_t fwd_stat;

  assign slots_free = !verdict_a_valid && !verdict_b_valid && !cmd_valid;
  assign injecting  = (mode == MODE_INJ_GEN) || (mode == MODE_INJ_MEM);
  assign a_stale    = have_last && (stat_a.evid == last_evid);
  assign b_stale    = have_last && (stat_b.evid == last_evid);

  always_comb begin
    take_a = 1'b0; take_b = 1'b0; fwd_a = 1'b0; fwd_b = 1'b0;
    alone = 1'b0; stale_hit = 1'b0;
    if (slots_free) begin
      if (injecting) begin
        take_a = stat_a_valid;
        take_b = stat_b_valid;
      end else if (stat_a_valid && stat_b_valid) begin
        if (stat_a.evid != stat_b.evid && a_stale) begin
          take_a = 1'b1; stale_hit = 1'b1;
        end else if (stat_a.evid != stat_b.evid && b_stale) begin
          take_b = 1'b1; stale_hit = 1'b1;
        end else begin
          take_a = 1'b1; take_b = 1'b1;
          unique case (mode)
            MODE_LINK_A: fwd_a = 1'b1;
            MODE_LINK_B: fwd_b = 1'b1;
            default: begin
              fwd_a = stat_a.crc_ok || !stat_b.crc_ok;
              fwd_b = !fwd_a;
            end
          endcase
        end
      end else if (stat_a_valid) begin
        take_a = a_stale || (timer >= TW'(TIMEOUT));
        stale_hit = a_stale;
        alone = !a_stale && take_a;
        fwd_a = alone && (mode != MODE_LINK_B);
      end else if (stat_b_valid) begin
        take_b = b_stale || (timer >= TW'(TIMEOUT));
        stale_hit = b_stale;
        alone = !b_stale && take_b;
        fwd_b = alone && (mode != MODE_LINK_A);
      end
    end
    do_fwd   = fwd_a || fwd_b;
    fwd_stat = fwd_a ? stat_a : stat_b;
  end

  assign stat_a_ready = take_a;
  assign stat_b_ready = take_b;
  assign ttc_ready    = do_fwd && sync_en && ttc_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      verdict_a_valid <= 1'b0; verdict_a_fwd <= 1'b0;
      verdict_b_valid <= 1'b0; verdict_b_fwd <= 1'b0;
      cmd_valid <= 1'b0; cmd_src <= SRC_LINK_A;
      timer <= '0; have_last <= 1'b0; last_evid <= '0;
      ev_fwd <= 1'b0; ev_crc_err_a <= 1'b0; ev_crc_err_b <= 1'b0;
      ev_both_bad <= 1'b0; ev_missing <= 1'b0; ev_stale <= 1'b0; ev_sync_err <= 1'b0;
    end else begin
      if (verdict_a_valid && verdict_a_ready) verdict_a_valid <= 1'b0;
      if (verdict_b_valid && verdict_b_ready) verdict_b_valid <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (take_a) begin verdict_a_valid <= 1'b1; verdict_a_fwd <= fwd_a; end
      if (take_b) begin verdict_b_valid <= 1'b1; verdict_b_fwd <= fwd_b; end
      if (do_fwd) begin
        cmd_valid <= 1'b1;
        cmd_src   <= fwd_a ? SRC_LINK_A : SRC_LINK_B;
        have_last <= 1'b1;
        last_evid <= fwd_stat.evid;
      end
      // timer runs while exactly one link waits
      if ((stat_a_valid ^ stat_b_valid) && !take_a && !take_b && !injecting) begin
        if (timer < TW'(TIMEOUT)) timer <= timer + 1'b1;
      end else begin
        timer <= '0;
      end
      ev_fwd       <= do_fwd;
      ev_crc_err_a <= take_a && !stale_hit && !injecting && !stat_a.crc_ok;
      ev_crc_err_b <= take_b && !stale_hit && !injecting && !stat_b.crc_ok;
      ev_both_bad  <= take_a && take_b && !injecting && (mode == MODE_CRC) &&
                      !stat_a.crc_ok && !stat_b.crc_ok;
      ev_missing   <= alone;
      ev_stale     <= stale_hit;
      ev_sync_err  <= do_fwd && sync_en &&
                      (!ttc_valid || (ttc.evid[15:0] != fwd_stat.evid) || (ttc.bcid != fwd_stat.bcid));
    end
  end

  // a decision is only taken when every output slot is free
  a_one_verdict: assert property (@(posedge clk) disable iff (!rst_n)
                                  (take_a || take_b) |-> slots_free);
endmodule
