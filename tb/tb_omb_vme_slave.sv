// Testbench for omb_vme_slave: with the board in slot 5, A24/D32 writes and
// reads reach a model register target at the right word offset and are
// acknowledged; cycles for another slot, with another address modifier, or
// with bad geographical-address parity are ignored (no DTACK*, no local
// request). Checks the local-bus request count for each case. In CR/CSR
// space it reads the configuration ROM (signature, IDs, checksum over the
// whole ROM), reads and moves the base address register, and clears and
// sets the module enable bit, checking that the A24 window follows.
`include "tb/tb_check.svh"
module tb_omb_vme_slave;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic vme_as_n, vme_write_n, vme_data_oe, vme_dtack_n, vme_gap_n, ga_ok;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_data_i, vme_data_o, m_wdata, m_rdata;
  logic [4:0] vme_ga_n, ga;
  logic m_stb, m_we, m_ack;
  logic [16:0] m_addr;

  omb_vme_slave dut (.*);
  vme_master_bfm bfm (.as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .am(vme_am),
                      .addr(vme_addr), .data_o(vme_data_i), .data_i(vme_data_o),
                      .data_oe(vme_data_oe), .dtack_n(vme_dtack_n));

  // model target: 256 words, answers one cycle after the strobe
  logic [31:0] regs [256];
  int n_req = 0;
  always @(posedge clk) begin
    m_ack <= m_stb && rst_n;
    if (m_stb && rst_n) begin
      n_req++;
      if (m_we) regs[m_addr[7:0]] <= m_wdata;
      m_rdata <= regs[m_addr[7:0]] ^ {15'd0, m_addr};
    end
  end

  function automatic logic [23:0] badr(input int slot, input int off);
    return 24'((slot << 19) | off);
  endfunction

  initial begin
    logic [31:0] q;
    logic [7:0] b8;
    bit ack;
    vme_ga_n = ~5'd5;
    vme_gap_n = ~(^vme_ga_n);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    `CHECK(ga_ok && ga == 5'd5, "slot 5 decoded, parity good")
    bfm.write32(badr(5, 'h40), 32'hCAFE_0001, ack);
    `CHECK(ack && n_req == 1, "write acknowledged")
    bfm.write32(badr(5, 'h44), 32'h1234_5678, ack);
    bfm.read32(badr(5, 'h40), q, ack);
    `CHECK(ack && q == (32'hCAFE_0001 ^ 32'h10), "read back word 0x10")
    bfm.read32(badr(5, 'h44), q, ack);
    `CHECK(ack && q == (32'h1234_5678 ^ 32'h11), "read back word 0x11")
    `CHECK(n_req == 4, "one request per cycle")
    bfm.write32(badr(6, 'h40), 32'h0, ack);
    `CHECK(!ack && n_req == 4, "other slot ignored")
    bfm.read32(badr(21, 'h40), q, ack);
    `CHECK(!ack && n_req == 4, "slot differing in the top GA bit ignored")
    bfm.cycle(1'b0, badr(5, 'h40), 32'h0, 6'h09, q, ack);
    `CHECK(!ack && n_req == 4, "A32 modifier ignored")
    // CR/CSR space
    begin
      logic [7:0] b, sum;
      logic [7:0] exp_id [11];
      exp_id = '{8'h08, 8'h00, 8'h30, 8'h00, 8'h00, 8'h0B, 8'h9E,
                 8'h00, 8'h00, 8'h00, 8'h01};
      bfm.csr_read(5, 'h1F, b, ack);
      `CHECK(ack && b == 8'h43, "CR signature C")
      bfm.csr_read(5, 'h23, b, ack);
      `CHECK(ack && b == 8'h52, "CR signature R")
      bfm.csr_read(5, 'h1B, b, ack);
      `CHECK(ack && b == 8'h02, "CR/CSR space version")
      for (int k = 0; k < 11; k++) begin
        bfm.csr_read(5, 'h27 + 4 * k, b, ack);
        `CHECK(ack && b == exp_id[k], $sformatf("manufacturer/board/revision byte %0d", k))
      end
      sum = 0;
      for (int k = 0; k < 32; k++) begin
        bfm.csr_read(5, 3 + 4 * k, b, ack);
        sum += b;
      end
      `CHECK(sum == 8'h00, "CR checksum")
      bfm.csr_read(6, 'h1F, b, ack);
      `CHECK(!ack, "CR/CSR of another slot ignored")
      `CHECK(n_req == 4, "CR/CSR cycles make no local request")
      bfm.csr_read(5, 'h7FFFF, b, ack);
      `CHECK(ack && b == 8'd5 << 3, "BAR holds the slot after reset")
      bfm.csr_read(5, 'h7FFFB, b, ack);
      `CHECK(ack && b == 8'h10, "module enabled after reset")
      bfm.csr_write(5, 'h7FFF7, 8'h10, ack);
      `CHECK(ack, "bit clear written")
      bfm.read32(badr(5, 'h40), q, ack);
      `CHECK(!ack && n_req == 4, "disabled module ignores A24 cycles")
      bfm.csr_write(5, 'h7FFFB, 8'h10, ack);
      bfm.read32(badr(5, 'h40), q, ack);
      `CHECK(ack && q == (32'hCAFE_0001 ^ 32'h10) && n_req == 5, "enabled again")
      bfm.csr_write(5, 'h7FFFF, 8'd9 << 3, ack);
      bfm.read32(badr(5, 'h40), q, ack);
      `CHECK(!ack && n_req == 5, "old window left after BAR write")
      bfm.read32(badr(9, 'h44), q, ack);
      `CHECK(ack && q == (32'h1234_5678 ^ 32'h11) && n_req == 6, "window moved to BAR")
      bfm.csr_read(5, 'h7FFFF, b, ack);
      `CHECK(ack && b == 8'd9 << 3, "BAR read back; CR/CSR stays geographical")
    end
    vme_gap_n = ~vme_gap_n;
    #100;
    `CHECK(!ga_ok, "parity error seen")
    bfm.read32(badr(9, 'h40), q, ack);
    `CHECK(!ack && n_req == 6, "bad parity: board does not answer")
    bfm.csr_read(5, 'h1F, b8, ack);
    `CHECK(!ack, "bad parity: CR/CSR not answered")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
