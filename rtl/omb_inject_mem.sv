// omb_inject_mem: packet memory for the injection mode.
//
// The memory (DEPTH x 16 bits) is filled from the register bus before a
// run: each write puts wr_data at wr_addr. It holds num_pkts packet bodies
// of pkt_len words each (minimum 1), back to back from address 0. Every
// trigger plays the next body in turn, wrapping after the last one, on a
// valid/ready stream with o_eop on its last word; the output multiplexer
// appends the CRC. The read is registered (block RAM with output register)
// and pipelined so that a body streams at one word per cycle; the first
// word appears one cycle after the trigger is taken. That the board keeps
// packets loaded over VME and plays them to the ROD is the board's
// behaviour; the layout and the cyclic order are this design's choice.
module omb_inject_mem #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [15:0]              wr_data,
  input  logic [15:0]              pkt_len,
  input  logic [15:0]              num_pkts,
  input  logic                     trig_valid,
  output logic                     trig_ready,
  output logic                     o_valid,
  input  logic                     o_ready,
  output logic [15:0]              o_data,
  output logic                     o_eop,
  output logic [15:0]              pkt_index
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0]   mem [DEPTH];
  logic          active, rd_go, at_last;
  logic [AW-1:0] base;
  logic [15:0]   idx, len_q;

  assign trig_ready = !active;
  assign rd_go      = active && (!o_valid || o_ready);
  assign at_last    = (idx == len_q - 16'd1);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_go) o_data <= mem[base + AW'(idx)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; base <= '0; idx <= '0; len_q <= 16'd1;
      o_valid <= 1'b0; o_eop <= 1'b0; pkt_index <= '0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (!active) begin
        if (trig_valid) begin
          active <= 1'b1;
          idx    <= '0;
          len_q  <= (pkt_len == 16'd0) ? 16'd1 : pkt_len;
        end
      end else if (rd_go) begin
        o_valid <= 1'b1;
        o_eop   <= at_last;
        idx     <= idx + 16'd1;
        if (at_last) begin
          active <= 1'b0;
          if (pkt_index + 16'd1 >= num_pkts) begin
            pkt_index <= '0;
            base      <= '0;
          end else begin
            pkt_index <= pkt_index + 16'd1;
            base      <= base + AW'(len_q);
          end
        end
      end
    end
  end
endmodule
