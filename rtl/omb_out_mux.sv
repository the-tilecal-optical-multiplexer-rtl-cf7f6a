// omb_out_mux: output stage of a CRC FPGA, feeding the output G-Link.
//
// A small queue of commands names the source of each packet to send: link
// A, link B, the event generator or the packet memory. The stage copies
// that source's words to the output link, one per cycle, as long as the
// source has a word ready; otherwise it sends an idle (valid low) word.
// A forwarded link packet is sent as received, including its own CRC word.
// An injected packet body is followed by a CRC word computed on the fly
// while the body passes (same CRC as the links use), so every packet that
// leaves the board carries a CRC. The output word is registered: a word
// accepted from a source leaves one cycle later. The first word of a
// packet carries sop, the last one eop. Pulses: fwd_done at the end of a
// forwarded packet, inj_done at the end of an injected one.
module omb_out_mux import omb_pkg::*; #(
  parameter int unsigned CMD_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  src_e        cmd_src,
  input  logic [3:0]  s_valid,     // indexed by src_e
  output logic [3:0]  s_ready,
  input  logic [15:0] s_data [4],
  input  logic [3:0]  s_eop,
  output link_word_t  tx,
  output logic        fwd_done,
  output logic        inj_done
);
  typedef enum logic [1:0] {ST_IDLE, ST_SEND, ST_CRC} state_e;

  state_e      st;
  src_e        cur;
  logic        first;
  logic [15:0] crc, crc_next;
  logic        q_empty, q_full, q_pop;
  logic [1:0]  q_src;
  logic        take, inj;

  omb_fifo #(.W(2), .DEPTH(CMD_DEPTH)) u_cmdq (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(cmd_valid), .wdata(cmd_src),
    .rd_en(q_pop), .rdata(q_src),
    .empty(q_empty), .full(q_full), .count(), .free()
  );
  assign cmd_ready = !q_full;
  assign q_pop     = (st == ST_IDLE) && !q_empty;

  assign inj  = (cur == SRC_GEN) || (cur == SRC_MEM);
  assign take = (st == ST_SEND) && s_valid[cur];

  always_comb begin
    s_ready = '0;
    if (st == ST_SEND) s_ready[cur] = 1'b1;
  end

  omb_crc16 u_crc (.crc_in(crc), .data(s_data[cur]), .crc_out(crc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; cur <= SRC_LINK_A; first <= 1'b0; crc <= CRC_INIT;
      tx <= '0; fwd_done <= 1'b0; inj_done <= 1'b0;
    end else begin
      tx       <= '0;
      fwd_done <= 1'b0;
      inj_done <= 1'b0;
      unique case (st)
        ST_IDLE: if (q_pop) begin
          st    <= ST_SEND;
          cur   <= src_e'(q_src);
          first <= 1'b1;
          crc   <= CRC_INIT;
        end
        ST_SEND: if (take) begin
          tx.valid <= 1'b1;
          tx.sop   <= first;
          tx.eop   <= s_eop[cur] && !inj;
          tx.data  <= s_data[cur];
          first    <= 1'b0;
          crc      <= crc_next;
          if (s_eop[cur]) begin
            st       <= inj ? ST_CRC : ST_IDLE;
            fwd_done <= !inj;
          end
        end
        ST_CRC: begin
          tx.valid <= 1'b1;
          tx.sop   <= 1'b0;
          tx.eop   <= 1'b1;
          tx.data  <= crc;
          inj_done <= 1'b1;
          st       <= ST_IDLE;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  a_cmd_not_dropped: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> cmd_ready);
endmodule
