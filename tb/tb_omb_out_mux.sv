// Testbench for omb_out_mux: four model sources (two links, generator,
// memory) feed packets with random gaps; a command sequence selects them.
// The output link must carry link packets unchanged and injected bodies
// followed by their CRC, each packet framed by sop/eop, in command order.
// With sources that never stall, a packet of n words leaves in n cycles
// (n+1 for an injected body). Done pulses are counted.
`include "tb/tb_check.svh"
module tb_omb_out_mux;
  import omb_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready;
  src_e cmd_src;
  logic [3:0] s_valid, s_ready, s_eop;
  logic [15:0] s_data [4];
  link_word_t tx;
  logic fwd_done, inj_done;

  omb_out_mux dut (.*);

  logic [16:0] srcq [4][$];   // {eop, data}
  bit gaps = 1;
  logic [3:0] gate;
  always_comb
    for (int s = 0; s < 4; s++) begin
      s_valid[s] = (srcq[s].size() > 0) && gate[s];
      s_data[s]  = (srcq[s].size() > 0) ? srcq[s][0][15:0] : 16'd0;
      s_eop[s]   = (srcq[s].size() > 0) ? srcq[s][0][16] : 1'b0;
    end

  word_q_t outq[$];
  word_q_t cur;
  int n_fwd = 0, n_inj = 0, first_word_t = 0, last_word_t = 0;
  always @(posedge clk) begin
    for (int s = 0; s < 4; s++) if (s_valid[s] && s_ready[s]) void'(srcq[s].pop_front());
    for (int s = 0; s < 4; s++) gate[s] <= gaps ? (($urandom % 4) != 0) : 1'b1;
    if (rst_n) begin
      n_fwd += int'(fwd_done); n_inj += int'(inj_done);
      if (tx.valid) begin
        if (tx.sop) begin cur = {}; first_word_t = $time; end
        cur.push_back(tx.data);
        if (tx.eop) begin outq.push_back(cur); last_word_t = $time; end
      end
    end
  end

  task automatic load(input int s, input word_q_t w);
    foreach (w[i]) srcq[s].push_back({i == w.size() - 1, w[i]});
  endtask

  task automatic command(input src_e s);
    while (!cmd_ready) begin @(posedge clk); #1; end
    cmd_valid = 1; cmd_src = s;
    @(posedge clk); #1; cmd_valid = 0;
  endtask

  initial begin
    word_q_t pa, pb, g, m, expq[$];
    cmd_valid = 0; cmd_src = SRC_LINK_A; gate = '1;
    repeat (3) @(posedge clk); #1; rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      pa = make_pkt(16'(r), 12'(r), 5 + r);
      pb = make_pkt(16'(r + 100), 12'(r), 3);
      g = {}; m = {};
      for (int i = 0; i < 6; i++) g.push_back(16'($urandom));
      for (int i = 0; i < 4 + r; i++) m.push_back(16'($urandom));
      load(0, pa); load(1, pb); load(2, g); load(3, m);
      command(SRC_LINK_A); command(SRC_GEN); command(SRC_LINK_B); command(SRC_MEM);
      expq.push_back(pa);
      g.push_back(ref_crc(g)); expq.push_back(g);
      expq.push_back(pb);
      m.push_back(ref_crc(m)); expq.push_back(m);
    end
    repeat (300) @(posedge clk); #1;
    `CHECK(outq.size() == expq.size(), $sformatf("packet count %0d", outq.size()))
    for (int i = 0; i < expq.size() && i < outq.size(); i++)
      `CHECK(outq[i] == expq[i], $sformatf("output packet %0d", i))
    `CHECK(n_fwd == 6 && n_inj == 6, "done pulses")
    // rate: 12-word injected body without stalls -> 13 output words back to back
    gaps = 0;
    repeat (2) @(posedge clk); #1;
    g = {};
    for (int i = 0; i < 12; i++) g.push_back(16'($urandom));
    load(2, g);
    command(SRC_GEN);
    repeat (30) @(posedge clk); #1;
    `CHECK((last_word_t - first_word_t) / 10 == 12, "13 words in 13 consecutive cycles")
    `CHECK(outq[$].size() == 13 && outq[$][12] == ref_crc(g), "CRC appended to injected body")
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
