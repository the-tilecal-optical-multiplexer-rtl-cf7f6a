// omb_vme_fpga: the board's VME FPGA.
//
// It joins the crate's VME bus to the registers held in the eight CRC FPGAs
// and the TTC FPGA, keeps a few board registers of its own, generates the
// internal trigger used in the injection mode and drives the JTAG chain.
// The internal trigger comes from a programmable period, from a register
// write, or from the board's external trigger input (ext_trig, the TTL
// side of the front-panel NIM converter, asynchronous: it passes through
// two flip-flops and each rising edge gives one trigger). The board has
// that input; using it as an injection trigger is this design's reading.
// The VME slave (omb_vme_slave) turns each A24/D32 cycle addressed to the
// board's slot into one local bus request; this module decodes its byte
// offset inside the board's 512 KB window:
//   offset[18] = 1          CRC FPGA number offset[17:15], register offset[13:2]
//   offset[18:16] = 3'b001  TTC FPGA, register offset[13:2]
//   offset[18:16] = 3'b000  this FPGA's registers, offset[13:2]
//   others                  acknowledged, read as 0
// Every target answers one cycle after the strobe, so a VME cycle takes
// about six board clocks after the strobes are seen. The decoding and the
// register map are this design's own.
//
// Own registers (word addresses):
//   0x000 BOARD   r   [31:16] ID 0x0B9E, [5] GA parity good, [4:0] slot
//   0x001 SCRATCH rw
//   0x002 TRIG    rw  [0] periodic internal trigger on; writing [1]=1
//                     gives one trigger now; [2] external trigger on
//                     (each rising edge of ext_trig gives one trigger)
//   0x003 PERIOD  rw  clock cycles between periodic triggers (minimum 1)
//   0x004 TRIGCNT r   internal triggers given, from all sources
//   0x008 JTMS    rw  TMS bits,  0x009 JTDI rw TDI bits
//   0x00A JCTRL   w   [5:0] bit count, starts a JTAG shift; r [0] busy
//   0x00B JTDO    r   captured TDO bits
module omb_vme_fpga import omb_pkg::*; #(
  parameter int unsigned N_CRC = 8
) (
  input  logic        clk,
  input  logic        rst_n,
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
  output lbus_req_t   crc_req [N_CRC],
  input  lbus_rsp_t   crc_rsp [N_CRC],
  output lbus_req_t   ttc_req,
  input  lbus_rsp_t   ttc_rsp,
  input  logic        ext_trig,
  output logic        int_trig,
  output logic        jtag_tck,
  output logic        jtag_tms,
  output logic        jtag_tdi,
  input  logic        jtag_tdo
);
  logic        m_stb, m_we, m_ack;
  logic [16:0] m_addr;            // byte offset [18:2]
  logic [31:0] m_wdata, m_rdata;
  logic [4:0]  ga;
  logic        ga_ok;

  omb_vme_slave u_slave (
    .clk, .rst_n, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr,
    .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n, .vme_ga_n, .vme_gap_n,
    .ga, .ga_ok, .m_stb, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata
  );

  // ---------------- decoding ----------------
  logic        to_crc, to_ttc, to_own;
  logic [2:0]  crc_sel;
  logic [11:0] reg_addr;
  assign to_crc   = m_addr[16];
  assign to_ttc   = (m_addr[16:14] == 3'b001);
  assign to_own   = (m_addr[16:14] == 3'b000);
  assign crc_sel  = m_addr[15:13];
  assign reg_addr = m_addr[11:0];

  always_comb begin
    for (int i = 0; i < N_CRC; i++) begin
      crc_req[i].stb   = m_stb && to_crc && (crc_sel == 3'(i));
      crc_req[i].we    = m_we;
      crc_req[i].addr  = reg_addr;
      crc_req[i].wdata = m_wdata;
    end
    ttc_req.stb   = m_stb && to_ttc;
    ttc_req.we    = m_we;
    ttc_req.addr  = reg_addr;
    ttc_req.wdata = m_wdata;
  end

  // ---------------- own registers ----------------
  logic [31:0] scratch, period, trig_cnt, per_cnt, jtms, jtdi, jtdo;
  logic        trig_on, ext_on, own_ack, other_ack, jbusy, jstart;
  logic        per_fire, sw_fire, ext_fire;
  logic [2:0]  ext_s;             // synchroniser and edge detector

  logic [31:0] own_rdata;
  logic [5:0]  jn;

  assign jstart = m_stb && to_own && m_we && (reg_addr == 12'h00A);
  assign jn     = m_wdata[5:0];

  // trigger sources; coinciding ones give a single trigger
  assign per_fire = trig_on && (per_cnt + 32'd1 >= period);
  assign sw_fire  = m_stb && to_own && m_we && (reg_addr == 12'h002) && m_wdata[1];
  assign ext_fire = ext_on && ext_s[1] && !ext_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scratch <= '0; period <= 32'd400; trig_cnt <= '0; per_cnt <= '0;
      jtms <= '0; jtdi <= '0; trig_on <= 1'b0; ext_on <= 1'b0; int_trig <= 1'b0;
      ext_s <= '0;
      own_ack <= 1'b0; other_ack <= 1'b0; own_rdata <= '0;
    end else begin
      own_ack   <= m_stb && to_own;
      other_ack <= m_stb && !to_own && !to_crc && !to_ttc;
      own_rdata <= '0;
      ext_s     <= {ext_s[1:0], ext_trig};
      int_trig  <= per_fire || sw_fire || ext_fire;
      if (per_fire || sw_fire || ext_fire) trig_cnt <= trig_cnt + 32'd1;
      // periodic trigger
      if (!trig_on || per_fire) per_cnt <= '0;
      else                      per_cnt <= per_cnt + 32'd1;
      if (m_stb && to_own && m_we) begin
        unique case (reg_addr)
          12'h001: scratch <= m_wdata;
          12'h002: begin trig_on <= m_wdata[0]; ext_on <= m_wdata[2]; end
          12'h003: period <= m_wdata;
          12'h008: jtms   <= m_wdata;
          12'h009: jtdi   <= m_wdata;
          default: ;
        endcase
      end else if (m_stb && to_own) begin
        unique case (reg_addr)
          12'h000: own_rdata <= {16'h0B9E, 10'd0, ga_ok, ga};
          12'h001: own_rdata <= scratch;
          12'h002: own_rdata <= {29'd0, ext_on, 1'b0, trig_on};
          12'h003: own_rdata <= period;
          12'h004: own_rdata <= trig_cnt;
          12'h008: own_rdata <= jtms;
          12'h009: own_rdata <= jtdi;
          12'h00A: own_rdata <= {31'd0, jbusy};
          12'h00B: own_rdata <= jtdo;
          default: ;
        endcase
      end
    end
  end

  omb_jtag_master u_jtag (
    .clk, .rst_n, .start(jstart), .nbits(jn), .tms_bits(jtms), .tdi_bits(jtdi),
    .busy(jbusy), .tdo_bits(jtdo),
    .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi), .tdo(jtag_tdo)
  );

  // ---------------- response gathering ----------------
  always_comb begin
    m_ack   = own_ack || other_ack || ttc_rsp.ack;
    m_rdata = own_ack ? own_rdata : (ttc_rsp.ack ? ttc_rsp.rdata : 32'd0);
    for (int i = 0; i < N_CRC; i++) begin
      if (crc_rsp[i].ack) begin
        m_ack   = 1'b1;
        m_rdata = crc_rsp[i].rdata;
      end
    end
  end
endmodule
