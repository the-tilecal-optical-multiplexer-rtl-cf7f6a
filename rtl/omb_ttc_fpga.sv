// omb_ttc_fpga: the board's TTC FPGA.
//
// From the TTC receiver's outputs (bunch-crossing clock = clk, Bunch
// Counter Reset, Event Counter Reset, Level-1 Accept with its trigger
// type) it builds the bunch-crossing identifier (BCID) and the event
// identifier (EvID) and sends TType, BCID and EvID with every L1A to each
// CRC FPGA over its own serial line. These functions are the board's; the
// details below are this design's choices.
//  - BCID counts clock cycles from 0, wraps after ORBIT cycles (3564
//    bunch crossings in an LHC orbit) and restarts at 0 on BCR. An L1A is
//    given the BCID of its own cycle.
//  - EvID (24 bits) is the number of L1As since the last ECR; the first L1A
//    after ECR gets 0.
//  - Records wait in a FIFO_DEPTH queue (L1As may come in bursts faster
//    than the serial lines can carry them); a record that finds it full is
//    counted and lost. Each frame is a 1 start bit then the 44-bit record,
//    MSB first (45 cycles per L1A, about 0.9 MHz at 40 MHz against the
//    100 kHz average L1A rate). All N_CRC lines carry the same frames.
// It also holds the clock-mode register (Local Mode) used by omb_clk_sel.
//
// Registers (word addresses), read one cycle after the strobe:
//   0x000 CLKCTRL rw  [0] Local Mode (force the local oscillator)
//   0x001 STATUS  r   [31:16] ID 0x077C, [1] board clock is TTC clock,
//                     [0] TTC clock present
//   0x002 L1ACNT  r   L1As received since reset
//   0x003 LOST    r   L1A records lost to a full queue
//   0x004 EVID    r   current event counter
module omb_ttc_fpga import omb_pkg::*; #(
  parameter int unsigned ORBIT      = 3564,
  parameter int unsigned N_CRC      = 8,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bcr,
  input  logic             ecr,
  input  logic             l1a,
  input  logic [7:0]       ttype,
  output logic [N_CRC-1:0] ttc_ser,
  input  lbus_req_t        lb_req,
  output lbus_rsp_t        lb_rsp,
  output logic             force_local,
  input  logic             ttc_present,
  input  logic             using_ttc
);
  localparam int unsigned NB = $bits(ttc_info_t);

  logic [11:0] bcid;
  logic [23:0] evid;
  logic [31:0] l1a_cnt, lost_cnt;
  logic        q_empty, q_full, q_pop;
  ttc_info_t   q_head;
  logic [NB:0] sh;
  logic [5:0]  nleft;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0; evid <= '0; l1a_cnt <= '0; lost_cnt <= '0;
    end else begin
      if (bcr || bcid == 12'(ORBIT - 1)) bcid <= '0;
      else                               bcid <= bcid + 12'd1;
      if (ecr)      evid <= '0;
      else if (l1a) evid <= evid + 24'd1;
      if (l1a) begin
        l1a_cnt <= l1a_cnt + 32'd1;
        if (q_full) lost_cnt <= lost_cnt + 32'd1;
      end
    end
  end

  omb_fifo #(.W(NB), .DEPTH(FIFO_DEPTH)) u_q (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(l1a), .wdata({ttype, bcid, evid}),
    .rd_en(q_pop), .rdata(q_head),
    .empty(q_empty), .full(q_full), .count(), .free()
  );

  // serialiser
  assign q_pop = (nleft == 6'd0) && !q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nleft <= '0; ttc_ser <= '0;
    end else if (q_pop) begin
      ttc_ser <= {N_CRC{1'b1}};
      sh      <= {q_head, 1'b0};
      nleft   <= 6'(NB);
    end else if (nleft != 6'd0) begin
      ttc_ser <= {N_CRC{sh[NB]}};
      sh      <= {sh[NB-1:0], 1'b0};
      nleft   <= nleft - 6'd1;
    end else begin
      ttc_ser <= '0;
    end
  end

  // registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      force_local <= 1'b0; lb_rsp <= '0;
    end else begin
      lb_rsp.ack   <= lb_req.stb;
      lb_rsp.rdata <= '0;
      if (lb_req.stb && lb_req.we) begin
        if (lb_req.addr == 12'h000) force_local <= lb_req.wdata[0];
      end else if (lb_req.stb) begin
        unique case (lb_req.addr)
          12'h000: lb_rsp.rdata <= {31'd0, force_local};
          12'h001: lb_rsp.rdata <= {16'h077C, 14'd0, using_ttc, ttc_present};
          12'h002: lb_rsp.rdata <= l1a_cnt;
          12'h003: lb_rsp.rdata <= lost_cnt;
          12'h004: lb_rsp.rdata <= {8'd0, evid};
          default: ;
        endcase
      end
    end
  end
endmodule
