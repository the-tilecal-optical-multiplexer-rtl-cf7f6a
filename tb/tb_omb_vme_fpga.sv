// Testbench for omb_vme_fpga: VME cycles to the board (slot 3) reach model
// register targets standing in for the eight CRC FPGAs and the TTC FPGA,
// each at the right address with the right data, and reads return the
// right target's data. Also the board's own registers, the periodic and
// single internal triggers (pulse count and spacing), the external trigger
// input (one trigger per rising edge, only when enabled) and a JTAG shift
// through the registers with TDO looped back to TDI.
`include "tb/tb_check.svh"
module tb_omb_vme_fpga;
  import omb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic vme_as_n, vme_write_n, vme_data_oe, vme_dtack_n, vme_gap_n;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o;
  logic [4:0] vme_ga_n;
  lbus_req_t crc_req [8];
  lbus_rsp_t crc_rsp [8];
  lbus_req_t ttc_req;
  lbus_rsp_t ttc_rsp;
  logic ext_trig = 0;
  logic int_trig, jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;

  omb_vme_fpga dut (.*);
  vme_master_bfm bfm (.as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am),
                      .addr(vme_addr), .data_o(vme_data_i), .data_i(vme_data_o),
                      .data_oe(vme_data_oe), .dtack_n(vme_dtack_n));
  assign jtag_tdo = jtag_tdi;

  // model targets: remember the last write, answer reads with {target, addr}
  logic [31:0] last_wd [9];
  logic [11:0] last_wa [9];
  int n_wr [9];
  always @(posedge clk) begin
    for (int i = 0; i < 8; i++) begin
      crc_rsp[i].ack   <= rst_n && crc_req[i].stb;
      crc_rsp[i].rdata <= {4'(i), 16'd0, crc_req[i].addr};
      if (rst_n && crc_req[i].stb && crc_req[i].we) begin
        last_wd[i] = crc_req[i].wdata; last_wa[i] = crc_req[i].addr; n_wr[i]++;
      end
    end
    ttc_rsp.ack   <= rst_n && ttc_req.stb;
    ttc_rsp.rdata <= {4'hF, 16'd0, ttc_req.addr};
    if (rst_n && ttc_req.stb && ttc_req.we) begin
      last_wd[8] = ttc_req.wdata; last_wa[8] = ttc_req.addr; n_wr[8]++;
    end
  end

  int n_trig = 0;
  realtime t_trig = 0, trig_gap = 0;
  always @(posedge clk) if (rst_n && int_trig) begin
    n_trig++;
    trig_gap = $realtime - t_trig;
    t_trig = $realtime;
  end

  function automatic logic [23:0] badr(input int off);
    return 24'((3 << 19) | off);
  endfunction

  initial begin
    logic [31:0] q;
    bit ack, ok;
    foreach (n_wr[i]) n_wr[i] = 0;
    vme_ga_n = ~5'd3; vme_gap_n = ~(^(~5'd3));
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // each CRC FPGA gets its own write
    for (int i = 0; i < 8; i++) bfm.write32(badr('h40000 | (i << 15) | ('h10 + i) * 4), 32'hA000 + i, ack);
    ok = 1;
    for (int i = 0; i < 8; i++) ok &= (n_wr[i] == 1) && (last_wd[i] == 32'hA000 + i) && (last_wa[i] == 12'(16 + i));
    `CHECK(ok && n_wr[8] == 0, "writes decoded to the eight CRC FPGAs")
    bfm.read32(badr('h40000 | (5 << 15) | 'h0C), q, ack);
    `CHECK(ack && q == {4'd5, 16'd0, 12'h003}, "read from CRC FPGA 5")
    bfm.write32(badr('h10000 | 'h8), 32'h1, ack);
    `CHECK(n_wr[8] == 1 && last_wa[8] == 12'h002, "write to TTC FPGA")
    bfm.read32(badr('h10000 | 'h4), q, ack);
    `CHECK(ack && q == {4'hF, 16'd0, 12'h001}, "read from TTC FPGA")
    // own registers
    bfm.read32(badr('h0), q, ack);
    `CHECK(ack && q == {16'h0B9E, 10'd0, 1'b1, 5'd3}, "board ID and slot")
    bfm.write32(badr('h4), 32'h5A5A_1234, ack);
    bfm.read32(badr('h4), q, ack);
    `CHECK(q == 32'h5A5A_1234, "scratch register")
    bfm.read32(badr('h28000), q, ack);
    `CHECK(ack && q == 0, "unmapped window acknowledged, reads 0")
    // single and periodic internal triggers
    bfm.write32(badr('h8), 32'h2, ack);
    `CHECK(n_trig == 1, "single internal trigger")
    bfm.write32(badr('hC), 32'd20, ack);
    bfm.write32(badr('h8), 32'h1, ack);
    #5000;
    bfm.write32(badr('h8), 32'h0, ack);
    `CHECK(trig_gap == 500.0, $sformatf("periodic trigger every 20 clocks (%0.1f ns)", trig_gap))
    bfm.read32(badr('h10), q, ack);
    `CHECK(q == 32'(n_trig) && n_trig > 5, "trigger count register")
    // external trigger: ignored while disabled, then one trigger per edge
    begin
      int n0;
      n0 = n_trig;
      #20 ext_trig = 1; #200 ext_trig = 0; #200;
      `CHECK(n_trig == n0, "external trigger ignored while disabled")
      bfm.write32(badr('h8), 32'h4, ack);
      bfm.read32(badr('h8), q, ack);
      `CHECK(q == 32'h4, "external trigger enabled")
      n0 = n_trig;
      for (int k = 0; k < 3; k++) begin #37 ext_trig = 1; #300 ext_trig = 0; #300; end
      `CHECK(n_trig == n0 + 3, $sformatf("three external edges, three triggers (%0d)", n_trig - n0))
      bfm.read32(badr('h10), q, ack);
      `CHECK(q == 32'(n_trig), "trigger count includes external triggers")
      bfm.write32(badr('h8), 32'h0, ack);
    end
    // JTAG shift of 16 bits with TDO looped to TDI
    bfm.write32(badr('h20), 32'h0000_8001, ack);
    bfm.write32(badr('h24), 32'h0000_C3A5, ack);
    bfm.write32(badr('h28), 32'd16, ack);
    q = 1;
    for (int i = 0; i < 20 && q[0]; i++) bfm.read32(badr('h28), q, ack);
    `CHECK(q[0] == 0, "JTAG shift finished")
    bfm.read32(badr('h2C), q, ack);
    `CHECK(q[15:0] == 16'hC3A5, "TDO captured")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
