// Testbench for omb_inject_mem (depth reduced to 256): loads three packet
// bodies, plays them on successive triggers in cyclic order with random
// back-pressure, and checks one word per cycle when always ready and the
// first word one cycle after the trigger is taken.
`include "tb/tb_check.svh"
module tb_omb_inject_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, trig_valid, trig_ready, o_valid, o_ready, o_eop;
  logic [7:0] wr_addr;
  logic [15:0] wr_data, pkt_len, num_pkts, o_data, pkt_index;
  logic [15:0] image [256];

  omb_inject_mem #(.DEPTH(256)) dut (.*);

  task automatic play(input bit bp, output logic [15:0] got[$], output int cyc);
    bit done = 0;
    got = {}; cyc = 0;
    trig_valid = 1;
    @(posedge clk); #1; trig_valid = 0;
    while (!done) begin
      o_ready = bp ? (($urandom % 2) == 0) : 1'b1;
      #1;
      cyc++;
      if (o_valid && o_ready) begin got.push_back(o_data); done = o_eop; end
      @(posedge clk); #1;
    end
    o_ready = 0;
  endtask

  initial begin
    logic [15:0] got[$];
    int cyc;
    bit ok;
    wr_en = 0; wr_addr = 0; wr_data = 0; trig_valid = 0; o_ready = 0;
    pkt_len = 16'd10; num_pkts = 16'd3;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    for (int a = 0; a < 30; a++) begin
      image[a] = 16'($urandom);
      wr_en = 1; wr_addr = 8'(a); wr_data = image[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int round = 0; round < 7; round++) begin
      int k;
      k = round % 3;
      play(round >= 3, got, cyc);
      ok = got.size() == 10;
      for (int i = 0; i < 10 && ok; i++) ok = (got[i] == image[k * 10 + i]);
      `CHECK(ok, $sformatf("play %0d gives stored packet %0d", round, k))
      if (round < 3) `CHECK(cyc == 11, $sformatf("first word one cycle after trigger, then one per cycle (%0d)", cyc))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
