// omb_vme_slave: VME64x slave front end of the VME FPGA.
//
// The board's base address comes from the backplane geographical address
// pins (GA4*..GA0*, GAP*, active low): the slot number GA selects the
// 512 KB window whose A24 address bits A[23:19] equal GA. The pins are
// accepted only if GA*..GAP* together have odd parity (VME64x rule); ga_ok
// reports it. Two kinds of cycle are answered, both only in that window:
//  - A24 data access (AM 0x39 or 0x3D), 32-bit single reads and writes
//    (both data strobes low). Each one becomes one local bus request
//    (m_stb, m_we, m_addr = byte offset [18:2], m_wdata); when m_ack
//    returns, read data is driven (vme_data_oe) and DTACK* is asserted.
//    Any target on the local bus must acknowledge every request.
//  - CR/CSR access (AM 0x2F), answered here without the local bus. The
//    VME64x configuration ROM and control/status registers are byte wide
//    at every fourth byte (offsets 4n+3), read or written as D08(O)
//    cycles (DS0* only); the byte travels on D[7:0]. A cycle with both
//    strobes low is answered the same way, so a D32 read returns the
//    byte in bits [7:0].
//      CR  0x03       checksum (the bytes 0x03..0x7F sum to 0 mod 256)
//          0x07-0x0F  length of the ROM, 0x000080
//          0x13/0x17  CR and CSR access width 0x81 (D08(O), every 4th byte)
//          0x1B       CR/CSR space version 0x02 (VME64x)
//          0x1F/0x23  ASCII "C", "R"
//          0x27-0x2F  manufacturer ID (MANUF_ID, MSB first)
//          0x33-0x3F  board ID (BOARD_ID), 0x43-0x4F revision (REV_ID)
//      CSR 0x7FFFF    BAR: [7:3] base of the A24 window, GA after reset;
//                     writing it moves the window
//          0x7FFFB    bit set register, 0x7FFF7 bit clear register:
//                     [4] module enable (set after reset); while it is
//                     clear the A24 window is not answered
//    Other CR/CSR bytes read 0 and ignore writes.
// Block transfers and D8/D16 data cycles in A24 space are not answered.
//
// The asynchronous bus strobes are passed through two flip-flops into the
// board clock. DTACK* is held until the master releases the data strobes.
// Geographical addressing and CR/CSR space are the VME64x features the
// board relies on; the subset of cycles, the ROM contents and the enable
// reset value are this design's choice.
module omb_vme_slave #(
  parameter logic [23:0] MANUF_ID = 24'h080030,
  parameter logic [31:0] BOARD_ID = 32'h0000_0B9E,
  parameter logic [31:0] REV_ID   = 32'h0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [31:0] vme_data_i,
  output logic [31:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  input  logic [4:0]  vme_ga_n,
  input  logic        vme_gap_n,
  output logic [4:0]  ga,
  output logic        ga_ok,
  output logic        m_stb,
  output logic        m_we,
  output logic [16:0] m_addr,
  output logic [31:0] m_wdata,
  input  logic        m_ack,
  input  logic [31:0] m_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DTACK, S_SKIP} state_e;

  // configuration ROM, one byte per entry n (byte offset 4n+3), entries
  // 1..31; entry 0, the checksum, makes the sum of entries 0..31 zero
  function automatic logic [7:0] cr_entry(input logic [4:0] n);
    unique case (n)
      5'd3:  return 8'h80;
      5'd4:  return 8'h81;
      5'd5:  return 8'h81;
      5'd6:  return 8'h02;
      5'd7:  return 8'h43;
      5'd8:  return 8'h52;
      5'd9:  return MANUF_ID[23:16];
      5'd10: return MANUF_ID[15:8];
      5'd11: return MANUF_ID[7:0];
      5'd12: return BOARD_ID[31:24];
      5'd13: return BOARD_ID[23:16];
      5'd14: return BOARD_ID[15:8];
      5'd15: return BOARD_ID[7:0];
      5'd16: return REV_ID[31:24];
      5'd17: return REV_ID[23:16];
      5'd18: return REV_ID[15:8];
      5'd19: return REV_ID[7:0];
      default: return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] cr_checksum();
    logic [7:0] sum = 8'h00;
    for (int n = 1; n < 32; n++) sum += cr_entry(5'(n));
    return 8'h00 - sum;
  endfunction

  localparam logic [7:0] CR_SUM = cr_checksum();
  localparam logic [16:0] CSR_BAR = 17'h1FFFF, CSR_SET = 17'h1FFFE,
                          CSR_CLR = 17'h1FFFD;

  state_e     st;
  logic [1:0] as_s;
  logic [3:0] ds_s;     // two stages of the two strobes
  logic       released, in_slot, in_window, am_data, am_crcsr;
  logic       bar_set, mod_en;
  logic [4:0] bar;
  logic [4:0] base;
  logic [16:0] crcsr_off;
  logic [7:0]  crcsr_rd;

  assign ga    = ~vme_ga_n;
  assign ga_ok = ^{vme_ga_n, vme_gap_n};
  assign base  = bar_set ? bar : ga;

  assign released  = (ds_s[3:2] == 2'b11);
  assign am_data   = (vme_am == 6'h39) || (vme_am == 6'h3D);
  assign am_crcsr  = (vme_am == 6'h2F);
  assign in_slot   = ga_ok && (vme_addr[23:19] == ga);
  assign in_window = ga_ok && mod_en && (vme_addr[23:19] == base);
  assign crcsr_off = vme_addr[18:2];

  always_comb begin
    crcsr_rd = 8'h00;
    if (crcsr_off == 17'd0)              crcsr_rd = CR_SUM;
    else if (crcsr_off < 17'd32)         crcsr_rd = cr_entry(crcsr_off[4:0]);
    else if (crcsr_off == CSR_BAR)       crcsr_rd = {base, 3'b000};
    else if (crcsr_off == CSR_SET ||
             crcsr_off == CSR_CLR)       crcsr_rd = {3'b000, mod_en, 4'h0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= 2'b11; ds_s <= 4'hF; st <= S_IDLE;
      vme_dtack_n <= 1'b1; vme_data_oe <= 1'b0; vme_data_o <= '0;
      m_stb <= 1'b0; m_we <= 1'b0; m_addr <= '0; m_wdata <= '0;
      bar_set <= 1'b0; bar <= '0; mod_en <= 1'b1;
    end else begin
      as_s  <= {as_s[0], vme_as_n};
      ds_s  <= {ds_s[1:0], vme_ds_n};
      m_stb <= 1'b0;
      unique case (st)
        // a data cycle waits for both strobes, a CR/CSR cycle for DS0*
        S_IDLE: if (!as_s[1] && ds_s[3:2] != 2'b11) begin
          if (am_crcsr && in_slot && !ds_s[2]) begin
            if (!vme_write_n) begin
              if (crcsr_off == CSR_BAR) begin
                bar <= vme_data_i[7:3]; bar_set <= 1'b1;
              end
              if (crcsr_off == CSR_SET && vme_data_i[4]) mod_en <= 1'b1;
              if (crcsr_off == CSR_CLR && vme_data_i[4]) mod_en <= 1'b0;
            end
            vme_data_o  <= {24'd0, crcsr_rd};
            vme_data_oe <= vme_write_n;
            vme_dtack_n <= 1'b0;
            st          <= S_DTACK;
          end else if (am_data && in_window) begin
            if (ds_s[3:2] == 2'b00) begin
              m_stb   <= 1'b1;
              m_we    <= !vme_write_n;
              m_addr  <= vme_addr[18:2];
              m_wdata <= vme_data_i;
              st      <= S_WAIT;
            end
          end else if (!(am_crcsr && in_slot)) begin
            st <= S_SKIP;
          end
        end
        S_WAIT: if (m_ack) begin
          vme_data_o  <= m_rdata;
          vme_data_oe <= !m_we;
          vme_dtack_n <= 1'b0;
          st          <= S_DTACK;
        end
        S_DTACK: if (released) begin
          vme_dtack_n <= 1'b1;
          vme_data_oe <= 1'b0;
          st          <= S_IDLE;
        end
        S_SKIP: if (released) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // DTACK* is only given while the cycle's data strobes are still held
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                     $fell(vme_dtack_n) |-> (st == S_DTACK));
endmodule
