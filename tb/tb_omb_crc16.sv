// Testbench for omb_crc16: compares the one-word CRC step with a bit-serial
// reference written here, checks a fixed vector ("12345678" as four words
// gives 0xA12B from 0xFFFF), and checks that appending the CRC to a random
// message gives a zero CRC over the whole.
`include "tb/tb_check.svh"
module tb_omb_crc16;
  int checks = 0, failures = 0;
  logic [15:0] crc_in, data, crc_out;

  omb_crc16 dut (.crc_in, .data, .crc_out);

  function automatic logic [15:0] ref_step(input logic [15:0] c, input logic [15:0] w);
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  initial begin
    logic [15:0] c, msg [8];
    // random single steps
    for (int k = 0; k < 200; k++) begin
      crc_in = 16'($urandom); data = 16'($urandom);
      #1;
      `CHECK(crc_out == ref_step(crc_in, data), "random step")
    end
    // fixed vector
    c = 16'hFFFF;
    foreach (msg[i]) msg[i] = 16'h3132 + 16'(i) * 16'h0202;
    for (int i = 0; i < 4; i++) begin
      crc_in = c; data = msg[i]; #1; c = crc_out;
    end
    `CHECK(c == 16'hA12B, "fixed vector 12345678")
    // residue over message plus CRC is zero
    for (int t = 0; t < 20; t++) begin
      c = 16'hFFFF;
      for (int i = 0; i < 8; i++) begin
        crc_in = c; data = 16'($urandom); #1; c = crc_out;
      end
      crc_in = c; data = c; #1;
      `CHECK(crc_out == 16'h0000, "zero residue")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
