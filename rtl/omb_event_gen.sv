// omb_event_gen: internal event generator used in the injection mode.
//
// For each trigger record (one per Level-1 Accept or internal trigger) it
// emits one packet body of `len` words (minimum 2) on a valid/ready stream:
// word 0 is the event ID [15:0], word 1 is {TType[3:0], BCID[11:0]} taken
// from the trigger's TTC information, and the remaining words are a 16-bit
// pseudo-random sequence (Fibonacci LFSR, taps 16/14/13/11) seeded with the
// event ID XOR 0xACE1 (1 if that is zero). o_eop marks the last body word;
// the output multiplexer appends the CRC word. One word per cycle while
// o_ready is high; the next trigger is taken the cycle after a packet
// ends. That the generator copies the TTC information into the header is
// the board's behaviour ("inject data with real TTC information"); the
// payload pattern and header layout are this design's own.
module omb_event_gen import omb_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] len,
  input  logic        trig_valid,
  output logic        trig_ready,
  input  ttc_info_t   trig,
  output logic        o_valid,
  input  logic        o_ready,
  output logic [15:0] o_data,
  output logic        o_eop
);
  logic        busy;
  logic [15:0] idx, last_idx, lfsr;
  ttc_info_t   info;

  function automatic logic [15:0] lfsr_next(input logic [15:0] l);
    return {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
  endfunction

  assign trig_ready = !busy;
  assign o_valid    = busy;
  assign o_eop      = (idx == last_idx);

  always_comb begin
    if (idx == 16'd0)      o_data = info.evid[15:0];
    else if (idx == 16'd1) o_data = {info.ttype[3:0], info.bcid};
    else                   o_data = lfsr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; last_idx <= 16'd1; lfsr <= 16'h1; info <= '0;
    end else if (!busy) begin
      if (trig_valid) begin
        busy     <= 1'b1;
        info     <= trig;
        idx      <= '0;
        last_idx <= (len < 16'd2) ? 16'd1 : len - 16'd1;
        lfsr     <= ((trig.evid[15:0] ^ 16'hACE1) == 16'd0) ? 16'd1 : (trig.evid[15:0] ^ 16'hACE1);
      end
    end else if (o_ready) begin
      idx <= idx + 16'd1;
      if (idx >= 16'd2) lfsr <= lfsr_next(lfsr);
      if (o_eop) busy <= 1'b0;
    end
  end
endmodule
