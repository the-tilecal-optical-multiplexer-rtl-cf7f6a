// Reference models shared by the testbenches: a bit-serial CRC-16-CCITT
// (MSB first, initial 0xFFFF) and a builder for test packets in the board's
// layout: event ID[15:0], {TType[3:0], BCID}, payload, CRC.
package tb_ref_pkg;
  typedef logic [15:0] word_q_t [$];

  function automatic logic [15:0] ref_crc(input word_q_t w);
    logic [15:0] c = 16'hFFFF;
    foreach (w[k]) begin
      for (int i = 15; i >= 0; i--) begin
        logic fb;
        fb = c[15] ^ w[k][i];
        c  = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h1021;
      end
    end
    return c;
  endfunction

  // packet with header, npay random payload words and a correct CRC
  function automatic word_q_t make_pkt(input logic [15:0] evid, input logic [11:0] bcid,
                                       input int npay, input logic [3:0] ttype = 4'h0);
    word_q_t p;
    p.push_back(evid);
    p.push_back({ttype, bcid});
    for (int i = 0; i < npay; i++) p.push_back(16'($urandom));
    p.push_back(ref_crc(p));
    return p;
  endfunction

  // 16-bit LFSR used by the event generator (taps 16, 14, 13, 11)
  function automatic logic [15:0] ref_lfsr(input logic [15:0] l);
    logic fb;
    fb = l[15] ^ l[13] ^ l[12] ^ l[10];
    return {l[14:0], fb};
  endfunction
endpackage
