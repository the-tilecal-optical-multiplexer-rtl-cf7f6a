// omb_ttc_rx: receiving end of the serial TTC line inside a CRC FPGA.
//
// The TTC FPGA sends, for each Level-1 Accept, one frame on a single wire
// clocked by the board clock: a start bit (1) followed by the 44 bits of
// {TType[7:0], BCID[11:0], EvID[23:0]}, most significant bit first; the
// line rests at 0. The frame format is this design's choice. A complete
// frame is queued (DEPTH records) for the decision logic (synchronisation
// check) or the injection sources (trigger). The record is available the
// cycle after its last bit. With int_sel set, frames are ignored and each
// int_trig pulse (the VME FPGA's internal trigger) queues a record with
// TType 0, BCID 0 and a local event number counting from 0. A record that
// finds the queue full is dropped and ovf_err pulses. flush empties the
// queue (used when the operating mode is changed, so that records left from
// the previous mode do not trigger the new one).
module omb_ttc_rx import omb_pkg::*; #(
  parameter int unsigned DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ttc_ser,
  input  logic      int_sel,
  input  logic      int_trig,
  input  logic      flush,
  output logic      info_valid,
  input  logic      info_ready,
  output ttc_info_t info,
  output logic      l1a_seen,
  output logic      ovf_err
);
  localparam int unsigned NB = $bits(ttc_info_t);

  logic                    busy;
  logic [$clog2(NB+1)-1:0] nbits;
  logic [NB-1:0]           sh;
  logic                    frame_done;
  logic [23:0]             int_cnt;
  logic                    push, q_empty, q_full;
  ttc_info_t               push_info;

  assign frame_done = busy && (nbits == ($clog2(NB+1))'(NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; nbits <= '0; sh <= '0;
    end else if (!busy) begin
      if (ttc_ser) begin busy <= 1'b1; nbits <= '0; end
    end else begin
      sh    <= {sh[NB-2:0], ttc_ser};
      nbits <= nbits + 1'b1;
      if (frame_done) busy <= 1'b0;
    end
  end

  always_comb begin
    push      = 1'b0;
    push_info = '0;
    if (int_sel) begin
      push           = int_trig;
      push_info.evid = int_cnt;
    end else begin
      push      = frame_done;
      push_info = {sh[NB-2:0], ttc_ser};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_cnt <= '0; l1a_seen <= 1'b0; ovf_err <= 1'b0;
    end else begin
      if (int_sel && int_trig) int_cnt <= int_cnt + 24'd1;
      l1a_seen <= push;
      ovf_err  <= push && q_full;
    end
  end

  omb_fifo #(.W(NB), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .clr(flush),
    .wr_en(push), .wdata(push_info),
    .rd_en(info_valid && info_ready), .rdata(info),
    .empty(q_empty), .full(q_full), .count(), .free()
  );
  assign info_valid = !q_empty;
endmodule
