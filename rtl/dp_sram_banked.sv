// dp_sram_banked: the 120 KB dual-port SRAM shared by the AHB system bus
// (port A, protocol processor and DMA) and the local bus (port B, modem
// controller), partitioned into a 1 KB hot bank and a 119 KB bank with a
// memory selection block per port: only the bank holding the addressed word
// is enabled for an access.
//
// Port A is an AHB slave with zero wait states: the address phase reads the
// bank synchronously, so the word is on HRDATA in the data phase; writes are
// done in the data phase with byte lanes from HSIZE/HADDR, and a read of the
// word being written in the same cycle gets the new data. Port B is the
// local bus port (request, byte strobes, read data one cycle later). The
// two ports writing the same word in the same cycle is not arbitrated: port
// B's write lands last.
//
// Lint note: HBURST is not needed (every beat carries its own address),
// and port B uses only the word-address bits that fit the memory.
module dp_sram_banked
  import wlan_pkg::*;
#(
  parameter int unsigned WORDS       = 30720,  // 120 KB of 32-bit words
  parameter int unsigned BANK1_WORDS = 256     // 1 KB
) (
  input  logic        hclk,
  input  logic        hresetn,
  // port A: AHB slave
  input  logic        hsel,
  input  ahb_m2s_t    m2s,
  input  logic        hready_in,
  output ahb_s2m_t    s2m,
  // port B: local bus
  input  logic        b_req,
  input  logic        b_we,
  input  logic [3:0]  b_be,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata,
  output logic [1:0]  a_bank_en,
  output logic [1:0]  b_bank_en
);
  localparam int unsigned B2 = WORDS - BANK1_WORDS;
  localparam int AW = $clog2(WORDS);

  logic [31:0] bank1 [BANK1_WORDS];
  logic [31:0] bank2 [B2];
  logic [AW-1:0] b_wa;

  // ---- port A address/data phase
  logic          a_req, a_wr_q;
  logic [AW-1:0] a_wa, a_wa_q;
  logic [3:0]    a_be, a_be_q;
  logic [31:0]   a_rdata;
  logic          a_fwd;
  logic [3:0]    fwd_be_q;
  logic [31:0]   fwd_dat_q;

  assign a_req = hsel && hready_in && m2s.htrans[1];
  assign a_wa  = m2s.haddr[AW+1:2];
  always_comb begin
    case (m2s.hsize)
      3'd0:    a_be = 4'b0001 << m2s.haddr[1:0];
      3'd1:    a_be = m2s.haddr[1] ? 4'b1100 : 4'b0011;
      default: a_be = 4'b1111;
    endcase
  end

  // enable only the addressed bank: a read in the address phase, a write in the data phase
  logic [AW-1:0] a_idx;
  logic          a_do_rd;
  assign a_do_rd   = a_req && !m2s.hwrite;
  assign a_idx     = a_wr_q ? a_wa_q : a_wa;
  assign a_bank_en = (a_wr_q || a_do_rd) ? ((32'(a_idx) >= BANK1_WORDS) ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      a_wr_q <= 1'b0; a_wa_q <= '0; a_be_q <= '0; a_fwd <= 1'b0;
      fwd_be_q <= '0; fwd_dat_q <= '0;
    end else begin
      if (hready_in) begin
        a_wr_q <= a_req && m2s.hwrite;
        a_wa_q <= a_wa;
        a_be_q <= a_be;
        a_fwd  <= a_do_rd && a_wr_q && (a_wa == a_wa_q);
        fwd_be_q  <= a_be_q;
        fwd_dat_q <= m2s.hwdata;
      end
    end
  end

  // the data-phase write and the next address-phase read share a cycle; when
  // they address the same word the written bytes are forwarded to HRDATA
  always_ff @(posedge hclk) begin
    if (a_do_rd) begin
      if (32'(a_wa) >= BANK1_WORDS) a_rdata <= bank2[32'(a_wa) - BANK1_WORDS];
      else                          a_rdata <= bank1[32'(a_wa)];
    end
    if (a_wr_q) begin
      for (int b = 0; b < 4; b++) if (a_be_q[b]) begin
        if (32'(a_wa_q) >= BANK1_WORDS) bank2[32'(a_wa_q) - BANK1_WORDS][8*b +: 8] <= m2s.hwdata[8*b +: 8];
        else                            bank1[32'(a_wa_q)][8*b +: 8] <= m2s.hwdata[8*b +: 8];
      end
    end
    // port B
    if (b_bank_en[0]) begin
      for (int b = 0; b < 4; b++) if (b_we && b_be[b]) bank1[32'(b_wa)][8*b +: 8] <= b_wdata[8*b +: 8];
      if (!b_we) b_rdata <= bank1[32'(b_wa)];
    end
    if (b_bank_en[1]) begin
      for (int b = 0; b < 4; b++) if (b_we && b_be[b]) bank2[32'(b_wa) - BANK1_WORDS][8*b +: 8] <= b_wdata[8*b +: 8];
      if (!b_we) b_rdata <= bank2[32'(b_wa) - BANK1_WORDS];
    end
  end

  logic [31:0] fwd_word;
  always_comb begin
    fwd_word = a_rdata;
    for (int b = 0; b < 4; b++) if (fwd_be_q[b]) fwd_word[8*b +: 8] = fwd_dat_q[8*b +: 8];
  end

  // ---- port B
  assign b_wa      = b_addr[AW+1:2];
  assign b_bank_en = b_req ? ((32'(b_wa) >= BANK1_WORDS) ? 2'b10 : 2'b01) : 2'b00;

  assign s2m.hrdata = a_fwd ? fwd_word : a_rdata;
  assign s2m.hready = 1'b1;
  assign s2m.hresp  = 2'b00;
endmodule
