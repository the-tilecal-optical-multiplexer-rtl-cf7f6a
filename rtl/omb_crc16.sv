// omb_crc16: one 16-bit word step of the packet CRC.
//
// Combinational: crc_out is the CRC register after shifting in the 16 bits
// of `data`, most significant bit first, starting from crc_in. The
// polynomial defaults to CRC-16-CCITT (0x1021); it is this design's choice,
// as is the initial value 0xFFFF applied by the users of this module. The
// receivers use the fact that the CRC over a packet including its appended
// CRC word is zero. No clock, no latency: it sits inside one pipeline stage
// so that a word per cycle (40 MHz, 640 Mbit/s) is checked as it arrives.
module omb_crc16 import omb_pkg::*; #(
  parameter logic [15:0] POLY = CRC_POLY
) (
  input  logic [15:0] crc_in,
  input  logic [15:0] data,
  output logic [15:0] crc_out
);
  always_comb begin
    logic [15:0] c;
    c = crc_in;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = (c << 1) ^ POLY;
      else                 c = c << 1;
    end
    crc_out = c;
  end
endmodule
