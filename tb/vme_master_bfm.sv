// VME bus master model for the testbenches: A24/D32 single cycles with
// address strobe, both data strobes and DTACK* handshake, and CR/CSR
// D08(O) byte cycles (AM 0x2F, DS0* only, byte on D[7:0]). A cycle that
// gets no DTACK* within 200 polling steps is ended and reported as not acknowledged.
module vme_master_bfm (
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic [5:0]  am,
  output logic [23:1] addr,
  output logic [31:0] data_o,
  input  logic [31:0] data_i,
  input  logic        data_oe,
  input  logic        dtack_n
);
  initial begin
    as_n = 1; ds_n = 2'b11; write_n = 1; am = '0; addr = '0; data_o = '0;
  end

  task automatic cycle(input bit wr, input logic [23:0] a, input logic [31:0] d,
                       input logic [5:0] amc, output logic [31:0] q, output bit acked,
                       input logic [1:0] ds = 2'b00);
    am = amc; addr = a[23:1]; write_n = !wr; data_o = d;
    #20 as_n = 0;
    #10 ds_n = ds;
    acked = 0;
    for (int i = 0; i < 200; i++) begin
      #5;
      if (!dtack_n) begin acked = 1; break; end
    end
    #5 q = data_oe ? data_i : 32'hFFFF_FFFF;
    ds_n = 2'b11; as_n = 1;
    for (int i = 0; i < 200 && !dtack_n; i++) #5;
    #20;
  endtask

  task automatic write32(input logic [23:0] a, input logic [31:0] d, output bit acked);
    logic [31:0] q;
    cycle(1'b1, a, d, 6'h39, q, acked);
  endtask

  task automatic read32(input logic [23:0] a, output logic [31:0] q, output bit acked);
    cycle(1'b0, a, 32'd0, 6'h39, q, acked);
  endtask

  // CR/CSR byte at byte offset `off` (4n+3) of the slot's CR/CSR window
  task automatic csr_read(input int slot, input int off, output logic [7:0] q8,
                          output bit acked);
    logic [31:0] q;
    cycle(1'b0, 24'((slot << 19) | off), 32'd0, 6'h2F, q, acked, 2'b10);
    q8 = q[7:0];
  endtask

  task automatic csr_write(input int slot, input int off, input logic [7:0] d8,
                           output bit acked);
    logic [31:0] q;
    cycle(1'b1, 24'((slot << 19) | off), {24'd0, d8}, 6'h2F, q, acked, 2'b10);
  endtask
endmodule
