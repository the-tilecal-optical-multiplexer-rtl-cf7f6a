// omb9u_top: the Optical Multiplexer Board 9U.
//
// The board sits between the calorimeter front end and the Read-Out
// Drivers (RODs). Every front-end drawer sends each event twice, on two
// optical links; the board checks the CRC of both copies and passes on, for
// every event, one copy with a good CRC. It can also act as a data source
// for the RODs, sending generated or preloaded packets on each trigger.
//
// Structure (as on the board): 16 input links in 8 redundant pairs, one
// CRC FPGA per pair driving one of 8 output links; a VME FPGA that gives
// the crate controller access to all registers, the internal trigger and
// the JTAG chain; a TTC FPGA that numbers bunch crossings and events from
// the TTC receiver's signals, sends them serially to the CRC FPGAs and
// selects the board clock (TTC clock, or the local oscillator in Local
// Mode or when the TTC clock is lost).
//
// Ports: the link words are the parallel side of the G-Link chips (16 bits
// plus valid/sop/eop, 40 MHz, see omb_pkg); glink_rx[2*i] and
// glink_rx[2*i+1] are the two copies for CRC FPGA i and glink_tx[i] its
// output. ttc_* are the TTC receiver's outputs, synchronous to ttc_clk;
// vme_* the VME bus with the data lines split into input, output and
// output enable; jtag_* the board JTAG chain; ext_trig the external
// trigger input after its NIM-to-TTL converter (asynchronous). sys_clk is the selected board
// clock, on which the links are sampled and the board works; rst_n is
// asynchronous and released through a two-stage synchroniser.
// Assumption of this design: the link words are synchronous to sys_clk.
module omb9u_top import omb_pkg::*; #(
  parameter int unsigned N_CRC     = 8,
  parameter int unsigned BUF_DEPTH = 1024,
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned TIMEOUT   = 1024,
  parameter int unsigned ORBIT     = 3564
) (
  input  logic        ttc_clk,
  input  logic        local_clk,
  input  logic        rst_n,
  input  logic        ttc_bcr,
  input  logic        ttc_ecr,
  input  logic        ttc_l1a,
  input  logic [7:0]  ttc_ttype,
  input  link_word_t  glink_rx [2*N_CRC],
  output link_word_t  glink_tx [N_CRC],
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  input  logic [4:0]  vme_ga_n,
  input  logic        vme_gap_n,
  output logic        jtag_tck,
  output logic        jtag_tms,
  output logic        jtag_tdi,
  input  logic        jtag_tdo,
  input  logic        ext_trig,
  output logic        sys_clk,
  output logic        clk_is_ttc
);
  logic             force_local, ttc_present;
  logic [1:0]       rst_s;
  logic             srst_n;
  lbus_req_t        crc_req [N_CRC];
  lbus_rsp_t        crc_rsp [N_CRC];
  lbus_req_t        ttc_req;
  lbus_rsp_t        ttc_rsp;
  logic             int_trig;
  logic [N_CRC-1:0] ttc_ser;

  omb_clk_sel u_clk (
    .ttc_clk, .local_clk, .rst_n, .force_local,
    .clk_out(sys_clk), .ttc_present, .using_ttc(clk_is_ttc)
  );

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) rst_s <= '0;
    else        rst_s <= {rst_s[0], 1'b1};
  end
  assign srst_n = rst_s[1];

  omb_ttc_fpga #(.ORBIT(ORBIT), .N_CRC(N_CRC)) u_ttc (
    .clk(sys_clk), .rst_n(srst_n),
    .bcr(ttc_bcr), .ecr(ttc_ecr), .l1a(ttc_l1a), .ttype(ttc_ttype),
    .ttc_ser, .lb_req(ttc_req), .lb_rsp(ttc_rsp),
    .force_local, .ttc_present, .using_ttc(clk_is_ttc)
  );

  omb_vme_fpga #(.N_CRC(N_CRC)) u_vme (
    .clk(sys_clk), .rst_n(srst_n),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_data_i,
    .vme_data_o, .vme_data_oe, .vme_dtack_n, .vme_ga_n, .vme_gap_n,
    .crc_req, .crc_rsp, .ttc_req, .ttc_rsp, .ext_trig, .int_trig,
    .jtag_tck, .jtag_tms, .jtag_tdi, .jtag_tdo
  );

  for (genvar i = 0; i < N_CRC; i++) begin : g_crc
    omb_crc_fpga #(.BUF_DEPTH(BUF_DEPTH), .MEM_DEPTH(MEM_DEPTH), .TIMEOUT(TIMEOUT)) u_crc (
      .clk(sys_clk), .rst_n(srst_n),
      .rx_a(glink_rx[2*i]), .rx_b(glink_rx[2*i+1]), .tx(glink_tx[i]),
      .ttc_ser(ttc_ser[i]), .int_trig,
      .lb_req(crc_req[i]), .lb_rsp(crc_rsp[i])
    );
  end
endmodule
