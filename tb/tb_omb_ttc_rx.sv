// Testbench for omb_ttc_rx (queue depth reduced to 4): frames sent back to
// back and with gaps are decoded into TType/BCID/EvID records, each
// available the cycle after its last bit; a full queue drops a record and
// reports it; in internal-trigger mode pulses become numbered records.
`include "tb/tb_check.svh"
module tb_omb_ttc_rx;
  import omb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ttc_ser, int_sel, int_trig, flush, info_valid, info_ready, l1a_seen, ovf_err;
  ttc_info_t info;
  int n_ovf = 0;

  omb_ttc_rx #(.DEPTH(4)) dut (.*);

  always @(posedge clk) if (rst_n && ovf_err) n_ovf++;

  task automatic send_frame(input ttc_info_t t, output bit avail_next);
    logic [44:0] f;
    f = {1'b1, t};
    for (int i = 44; i >= 0; i--) begin
      ttc_ser = f[i];
      @(posedge clk); #1;
    end
    ttc_ser = 0;
    avail_next = info_valid;
  endtask

  task automatic pop(output ttc_info_t t);
    t = info; info_ready = 1; @(posedge clk); #1; info_ready = 0;
  endtask

  initial begin
    ttc_info_t sent[$], t, got;
    bit av;
    ttc_ser = 0; int_sel = 0; int_trig = 0; info_ready = 0; flush = 0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    // three frames back to back, one after a gap
    for (int k = 0; k < 3; k++) begin
      t = '{ttype: 8'($urandom), bcid: 12'($urandom), evid: 24'($urandom)};
      sent.push_back(t);
      send_frame(t, av);
      if (k == 0) `CHECK(av, "record available the cycle after the last bit")
    end
    repeat (7) @(posedge clk); #1;
    t = '{ttype: 8'hFF, bcid: 12'hFFF, evid: 24'hFFFFFF};
    sent.push_back(t); send_frame(t, av);
    for (int k = 0; k < 4; k++) begin
      pop(got);
      `CHECK(got == sent[k], $sformatf("frame %0d decoded", k))
    end
    `CHECK(!info_valid, "queue empty")
    // overflow: five frames into four places
    for (int k = 0; k < 5; k++) begin
      t = '{ttype: 8'(k), bcid: 12'(k), evid: 24'(k)};
      send_frame(t, av);
    end
    @(posedge clk); #1;
    `CHECK(n_ovf == 1, "fifth record dropped and reported")
    for (int k = 0; k < 4; k++) begin
      pop(got);
      `CHECK(got.evid == 24'(k), "first four records kept")
    end
    // internal triggers
    int_sel = 1;
    for (int k = 0; k < 3; k++) begin
      int_trig = 1; @(posedge clk); #1; int_trig = 0;
      repeat (2) @(posedge clk); #1;
    end
    t = '{ttype: 8'h1, bcid: 12'h1, evid: 24'h1};
    send_frame(t, av);   // ignored in internal mode
    for (int k = 0; k < 3; k++) begin
      pop(got);
      `CHECK(got.evid == 24'(k) && got.bcid == 0 && got.ttype == 0, "internal trigger numbered")
    end
    `CHECK(!info_valid, "serial frame ignored in internal mode")
    int_trig = 1; @(posedge clk); #1; int_trig = 0;
    @(posedge clk); #1;
    `CHECK(info_valid, "record queued")
    flush = 1; @(posedge clk); #1; flush = 0;
    `CHECK(!info_valid, "flush empties the queue")
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
