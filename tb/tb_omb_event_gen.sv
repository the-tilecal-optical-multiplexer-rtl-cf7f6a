// Testbench for omb_event_gen: packet bodies for several triggers compared
// with a reference (header from the trigger's TTC data, LFSR payload seeded
// by the event ID), random back-pressure, the minimum length of two words,
// and a rate of one word per cycle when the output is always ready.
`include "tb/tb_check.svh"
module tb_omb_event_gen;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] len;
  logic trig_valid, trig_ready, o_valid, o_ready, o_eop;
  ttc_info_t trig;
  logic [15:0] o_data;

  omb_event_gen dut (.*);

  function automatic word_q_t expect_body(input ttc_info_t t, input int n);
    word_q_t q;
    logic [15:0] l;
    if (n < 2) n = 2;
    q.push_back(t.evid[15:0]);
    q.push_back({t.ttype[3:0], t.bcid});
    l = t.evid[15:0] ^ 16'hACE1;
    if (l == 0) l = 16'd1;
    for (int i = 2; i < n; i++) begin q.push_back(l); l = ref_lfsr(l); end
    return q;
  endfunction

  task automatic run(input ttc_info_t t, input int n, input bit bp, output word_q_t got, output int cyc);
    bit done = 0;
    got = {}; cyc = 0;
    len = 16'(n); trig = t; trig_valid = 1;
    @(posedge clk); #1; trig_valid = 0;
    while (!done) begin
      o_ready = bp ? (($urandom % 2) == 0) : 1'b1;
      #1;
      if (o_valid && o_ready) begin got.push_back(o_data); done = o_eop; end
      cyc++;
      @(posedge clk); #1;
    end
    o_ready = 0;
  endtask

  initial begin
    word_q_t got;
    int cyc;
    ttc_info_t t;
    trig_valid = 0; o_ready = 0; len = 0; trig = '0;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      t = '{ttype: 8'($urandom), bcid: 12'($urandom), evid: 24'($urandom)};
      run(t, 5 + k * 3, k[0], got, cyc);
      `CHECK(got == expect_body(t, 5 + k * 3), $sformatf("body %0d matches reference", k))
      if (!k[0]) `CHECK(cyc == 5 + k * 3, "one word per cycle")
    end
    t = '{ttype: 8'h5, bcid: 12'h10, evid: 24'hACE1};   // seed would be 0
    run(t, 1, 0, got, cyc);
    `CHECK(got == expect_body(t, 1) && got.size() == 2, "minimum length is two words")
    run(t, 4, 0, got, cyc);
    `CHECK(got == expect_body(t, 4), "zero seed replaced by 1")
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
