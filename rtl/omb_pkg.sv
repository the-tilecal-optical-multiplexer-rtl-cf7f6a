// omb_pkg: types and constants shared by the Optical Multiplexer Board logic.
//
// A link word is one 16-bit G-Link data word at the 40 MHz word rate
// (16 bits x 40 MHz = 640 Mbit/s per link) together with three framing
// flags: valid, start of packet and end of packet. The flags stand for
// what the G-Link control field marks; their exact encoding is this
// design's own choice.
//
// Packet layout used throughout (this design's choice):
//   word 0        event ID [15:0]
//   word 1        {TType[3:0], BCID[11:0]}
//   words 2..N-2  payload
//   word N-1      CRC-16 of words 0..N-2
// The CRC is CRC-16-CCITT (x^16 + x^12 + x^5 + 1), initial value 0xFFFF,
// most significant bit first, no final inversion. With the CRC appended
// the CRC over the whole packet is zero, which is how receivers check it.
//
// The TTC information sent with each Level-1 Accept is the trigger type,
// the bunch-crossing identifier and the 24-bit event identifier.
//
// The register (local) bus joins the VME FPGA to the CRC FPGAs and the
// TTC FPGA: a one-cycle strobe with address, write flag and data; the
// target answers with an acknowledge and read data exactly one cycle
// later.
package omb_pkg;

  typedef struct packed {
    logic        valid;
    logic        sop;
    logic        eop;
    logic [15:0] data;
  } link_word_t;

  typedef struct packed {
    logic [7:0]  ttype;
    logic [11:0] bcid;
    logic [23:0] evid;
  } ttc_info_t;

  // Status of one received packet, produced at its last word.
  typedef struct packed {
    logic        crc_ok;
    logic        overflow;
    logic [15:0] evid;
    logic [11:0] bcid;
    logic [15:0] nwords;
  } pkt_stat_t;

  // Output multiplexer sources.
  typedef enum logic [1:0] {
    SRC_LINK_A = 2'd0,
    SRC_LINK_B = 2'd1,
    SRC_GEN    = 2'd2,
    SRC_MEM    = 2'd3
  } src_e;

  // CRC FPGA operating modes.
  typedef enum logic [2:0] {
    MODE_CRC     = 3'd0,  // check both links, forward the good one
    MODE_LINK_A  = 3'd1,  // always forward link A
    MODE_LINK_B  = 3'd2,  // always forward link B
    MODE_INJ_GEN = 3'd3,  // inject packets from the event generator
    MODE_INJ_MEM = 3'd4   // inject packets from the packet memory
  } omb_mode_e;

  localparam logic [15:0] CRC_POLY = 16'h1021;
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  typedef struct packed {
    logic        stb;
    logic        we;
    logic [11:0] addr;   // word address inside the target
    logic [31:0] wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } lbus_rsp_t;

endpackage
