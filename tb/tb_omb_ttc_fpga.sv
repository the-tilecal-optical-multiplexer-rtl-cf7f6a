// Testbench for omb_ttc_fpga (orbit shortened to 100, queue to 4, 3
// serial lines): L1As at known bunch crossings after a BCR, an ECR, and a
// burst that overflows the queue. A reference deserialiser on every line
// checks the frames against BCID and EvID worked out here; the registers
// (Local Mode bit, status, L1A count, lost count, event counter) are read
// over the register bus.
`include "tb/tb_check.svh"
module tb_omb_ttc_fpga;
  import omb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bcr, ecr, l1a, force_local, ttc_present, using_ttc;
  logic [7:0] ttype;
  logic [2:0] ttc_ser;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;

  omb_ttc_fpga #(.ORBIT(100), .N_CRC(3), .FIFO_DEPTH(4)) dut (.*);

  // reference deserialiser on each line
  ttc_info_t rx [3][$];
  for (genvar L = 0; L < 3; L++) begin : g_rx
    initial begin
      logic [43:0] f;
      forever begin
        @(posedge clk);
        if (rst_n && ttc_ser[L]) begin
          for (int i = 43; i >= 0; i--) begin @(posedge clk); f[i] = ttc_ser[L]; end
          rx[L].push_back(f);
        end
      end
    end
  end

  task automatic rd(input logic [11:0] a, output logic [31:0] q);
    lb_req = '{stb: 1, we: 0, addr: a, wdata: 0};
    @(posedge clk); #1; lb_req = '0;
    `CHECK(lb_rsp.ack, "register read acknowledged one cycle after the strobe")
    q = lb_rsp.rdata;
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    lb_req = '{stb: 1, we: 1, addr: a, wdata: d};
    @(posedge clk); #1; lb_req = '0;
  endtask

  ttc_info_t exp_q[$];
  int cyc_since_bcr = 0;
  int ev = 0;
  always @(posedge clk) if (rst_n) cyc_since_bcr <= bcr ? 0 : cyc_since_bcr + 1;

  task automatic trigger(input logic [7:0] tt);
    l1a = 1; ttype = tt;
    exp_q.push_back('{ttype: tt, bcid: 12'((cyc_since_bcr) % 100), evid: 24'(ev)});
    ev++;
    @(posedge clk); #1; l1a = 0;
  endtask

  initial begin
    logic [31:0] q;
    bit same;
    bcr = 0; ecr = 0; l1a = 0; ttype = 0; lb_req = '0; ttc_present = 1; using_ttc = 0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    bcr = 1; @(posedge clk); #1; bcr = 0;
    // spaced L1As at various bunch crossings, spanning orbit wraps
    for (int k = 0; k < 6; k++) begin
      repeat (20 + 37 * k) @(posedge clk); #1;
      trigger(8'(k + 1));
    end
    ecr = 1; @(posedge clk); #1; ecr = 0; ev = 0;
    repeat (60) @(posedge clk); #1;
    trigger(8'h80);
    repeat (60) @(posedge clk); #1;
    for (int i = 0; i < exp_q.size(); i++)
      `CHECK(rx[0].size() > i && rx[0][i] == exp_q[i], $sformatf("frame %0d: TType, BCID and EvID", i))
    same = (rx[1] == rx[0]) && (rx[2] == rx[0]);
    `CHECK(same, "all lines carry the same frames")
    // burst of 8 back-to-back L1As into a queue of 4 (plus one in the serialiser)
    for (int i = 0; i < 8; i++) trigger(8'h40);
    repeat (600) @(posedge clk); #1;
    `CHECK(rx[0].size() == 7 + 5, $sformatf("burst: five frames sent (%0d total)", rx[0].size()))
    rd(12'h003, q);
    `CHECK(q == 3, $sformatf("three L1A records lost (%0d)", q))
    rd(12'h002, q);
    `CHECK(q == 15, "L1A count")
    rd(12'h004, q);
    `CHECK(q == 9, "event counter after ECR")
    wr(12'h000, 32'h1);
    `CHECK(force_local, "Local Mode bit drives the clock selector")
    rd(12'h000, q);
    `CHECK(q == 1, "Local Mode bit reads back")
    rd(12'h001, q);
    `CHECK(q == 32'h077C_0001, "status register")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
