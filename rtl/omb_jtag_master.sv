// omb_jtag_master: drives the board's JTAG chain from VME registers, so
// that the FPGA configuration memories can be reprogrammed remotely.
//
// A start pulse with nbits (1..32; 0 counts as 32) shifts that many TCK
// cycles out: bit i of tms_bits and tdi_bits is put on TMS/TDI while TCK
// is low, TDO is sampled into bit i of tdo_bits as TCK rises. TCK runs at
// clk / (2*DIV); each half period lasts DIV clock cycles. busy is high
// from the start pulse until the last TCK falling edge. Remote JTAG access
// over VME is the board's feature; this register-driven shifter is this
// design's own way of providing it (test-logic state changes are done by
// the software through the TMS bits).
module omb_jtag_master #(
  parameter int unsigned DIV = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  nbits,
  input  logic [31:0] tms_bits,
  input  logic [31:0] tdi_bits,
  output logic        busy,
  output logic [31:0] tdo_bits,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);
  localparam int unsigned DW = $clog2(DIV + 1);

  logic [31:0]   tms_q, tdi_q;
  logic [5:0]    idx, last;
  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; tdo_bits <= '0; tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0;
      tms_q <= '0; tdi_q <= '0; idx <= '0; last <= '0; div <= '0;
    end else if (!busy) begin
      tck <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        tms_q <= tms_bits;
        tdi_q <= tdi_bits;
        tms   <= tms_bits[0];
        tdi   <= tdi_bits[0];
        idx   <= '0;
        last  <= (nbits == 6'd0 || nbits > 6'd32) ? 6'd31 : nbits - 6'd1;
        div   <= '0;
      end
    end else if (div != DW'(DIV - 1)) begin
      div <= div + 1'b1;
    end else begin
      div <= '0;
      if (!tck) begin
        tck                <= 1'b1;
        tdo_bits[idx[4:0]] <= tdo;
      end else begin
        tck <= 1'b0;
        if (idx == last) begin
          busy <= 1'b0;
        end else begin
          idx <= idx + 6'd1;
          tms <= tms_q[idx[4:0] + 5'd1];
          tdi <= tdi_q[idx[4:0] + 5'd1];
        end
      end
    end
  end
endmodule
