// Testbench for omb_jtag_master: an 8-bit model data register on the JTAG
// pins. Checks the number of TCK pulses, TMS and TDI seen at each rising
// TCK edge, the captured TDO bits (the register's old contents, then TDI
// delayed by 8 bits), the TCK period of 2*DIV clocks and the busy time.
`include "tb/tb_check.svh"
module tb_omb_jtag_master;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, tck, tms, tdi, tdo;
  logic [5:0] nbits;
  logic [31:0] tms_bits, tdi_bits, tdo_bits;

  omb_jtag_master #(.DIV(3)) dut (.*);

  // model device: shift on rising TCK, TDO changes on falling TCK
  logic [7:0] sr;
  logic [31:0] seen_tms, seen_tdi;
  int n_rise = 0;
  realtime last_rise = 0, period = 0;
  always @(posedge tck) begin
    if (n_rise < 32) begin seen_tms[n_rise] = tms; seen_tdi[n_rise] = tdi; end
    n_rise++;
    if (last_rise > 0) period = $realtime - last_rise;
    last_rise = $realtime;
    sr = {tdi, sr[7:1]};
  end
  always @(negedge tck) tdo = sr[0];

  task automatic shift(input int n, input logic [31:0] m, input logic [31:0] d, output int cyc);
    tms_bits = m; tdi_bits = d; nbits = 6'(n);
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
  endtask

  initial begin
    int cyc, nb;
    logic [7:0] init;
    logic [39:0] stream;
    logic [31:0] m, d, expect_tdo;
    start = 0; nbits = 0; tms_bits = 0; tdi_bits = 0;
    init = 8'hA5; sr = init; tdo = init[0];
    repeat (3) @(posedge clk); #1; rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      nb = (t == 0) ? 12 : (t == 1) ? 32 : 5;
      m = $urandom; d = $urandom;
      init = sr; tdo = sr[0];
      n_rise = 0; last_rise = 0;
      shift((t == 1) ? 0 : nb, m, d, cyc);
      stream = {d, init};
      expect_tdo = stream[31:0];
      `CHECK(n_rise == nb, $sformatf("%0d TCK pulses", nb))
      for (int i = 0; i < nb; i++) begin
        `CHECK(seen_tms[i] == m[i] && seen_tdi[i] == d[i], $sformatf("TMS/TDI bit %0d", i))
        `CHECK(tdo_bits[i] == expect_tdo[i], $sformatf("TDO bit %0d", i))
      end
      `CHECK(period == 60.0, "TCK period is 2*DIV clocks")
      `CHECK(cyc == nb * 6, $sformatf("busy for nbits*2*DIV clocks (%0d)", cyc))
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
