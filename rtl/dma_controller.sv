// dma_controller: block-transfer DMA engine, an AHB master (the
// highest-priority one) plus an AHB slave for its registers. It copies LEN
// 32-bit words from SRC to DST, e.g. the protocol code from Flash to SDRAM
// at start-up or frames between host memory and the MAC accelerator, so
// the processors do not move the data themselves.
//
// Each word is one single read transfer followed by one single write
// transfer (NONSEQ, word size); the bus is requested for the whole block.
// Static address translation: an address whose top nibble equals XLT_FROM
// is issued with that nibble replaced by XLT_TO (both programmable), so
// software can use one view of memory while the DMA reaches another.
//
// Registers (word offsets): 0x00 SRC, 0x04 DST, 0x08 LEN (words),
// 0x0C CTRL (bit0 start, self-clearing; bit1 interrupt enable; bit2
// translation enable), 0x10 STATUS (bit0 busy, bit1 done, write 1 to clear
// done), 0x14 XLT ({XLT_TO, XLT_FROM} in bits [7:4], [3:0]).
// `irq` is done AND interrupt enable.
//
// Lint note: the register port ignores HSIZE/HBURST (word registers only),
// and the master port ignores HRESP (an ERROR response is not reported to
// software).
module dma_controller
  import wlan_pkg::*;
(
  input  logic     hclk,
  input  logic     hresetn,
  // slave port (registers)
  input  logic     s_hsel,
  input  ahb_m2s_t s_m2s,
  input  logic     s_hready_in,
  output ahb_s2m_t s_s2m,
  // master port
  output logic     m_hbusreq,
  input  logic     m_hgrant,
  output ahb_m2s_t m_m2s,
  input  ahb_s2m_t m_s2m,
  output logic     irq
);
  typedef enum logic [2:0] {D_IDLE, D_RA, D_RD, D_WA, D_WD} dstate_t;

  logic [31:0] src, dst, len, cur_s, cur_d, remaining, data_q;
  logic        ien, xen, done;
  logic [7:0]  xlt;
  dstate_t     st;

  function automatic logic [31:0] xlate(logic [31:0] a);
    return (xen && a[31:28] == xlt[3:0]) ? {xlt[7:4], a[27:0]} : a;
  endfunction

  // ---------------- register slave
  logic        r_wr_q;
  logic [4:0]  r_off_q;
  logic        start;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      r_wr_q <= 1'b0; r_off_q <= '0;
    end else if (s_hready_in) begin
      r_wr_q  <= s_hsel && s_m2s.htrans[1] && s_m2s.hwrite;
      r_off_q <= s_m2s.haddr[4:0];
    end
  end

  assign start = r_wr_q && r_off_q == 5'h0C && s_m2s.hwdata[0];

  always_comb begin
    case (r_off_q)
      5'h00:   s_s2m.hrdata = src;
      5'h04:   s_s2m.hrdata = dst;
      5'h08:   s_s2m.hrdata = len;
      5'h0C:   s_s2m.hrdata = {29'd0, xen, ien, 1'b0};
      5'h10:   s_s2m.hrdata = {30'd0, done, st != D_IDLE};
      5'h14:   s_s2m.hrdata = {24'd0, xlt};
      default: s_s2m.hrdata = '0;
    endcase
  end
  assign s_s2m.hready = 1'b1;
  assign s_s2m.hresp  = 2'b00;
  assign irq = done && ien;

  // ---------------- transfer engine
  assign m_hbusreq = (st != D_IDLE);

  always_comb begin
    m_m2s        = '0;
    m_m2s.hsize  = 3'd2;
    m_m2s.hwdata = data_q;
    case (st)
      D_RA: begin m_m2s.htrans = HT_NONSEQ; m_m2s.haddr = xlate(cur_s); end
      D_WA: begin m_m2s.htrans = HT_NONSEQ; m_m2s.haddr = xlate(cur_d); m_m2s.hwrite = 1'b1; end
      default: m_m2s.htrans = HT_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      src <= '0; dst <= '0; len <= '0; ien <= 1'b0; xen <= 1'b0; xlt <= '0; done <= 1'b0;
      cur_s <= '0; cur_d <= '0; remaining <= '0; data_q <= '0; st <= D_IDLE;
    end else begin
      if (r_wr_q) begin
        case (r_off_q)
          5'h00: src <= s_m2s.hwdata;
          5'h04: dst <= s_m2s.hwdata;
          5'h08: len <= s_m2s.hwdata;
          5'h0C: begin ien <= s_m2s.hwdata[1]; xen <= s_m2s.hwdata[2]; end
          5'h10: if (s_m2s.hwdata[1]) done <= 1'b0;
          5'h14: xlt <= s_m2s.hwdata[7:0];
          default: ;
        endcase
      end
      case (st)
        D_IDLE: if (start && len != 0) begin
          cur_s <= src; cur_d <= dst; remaining <= len; done <= 1'b0; st <= D_RA;
        end
        D_RA: if (m_hgrant && m_s2m.hready) st <= D_RD;
        D_RD: if (m_s2m.hready) begin data_q <= m_s2m.hrdata; st <= D_WA; end
        D_WA: if (m_hgrant && m_s2m.hready) st <= D_WD;
        D_WD: if (m_s2m.hready) begin
          cur_s <= cur_s + 32'd4; cur_d <= cur_d + 32'd4;
          remaining <= remaining - 32'd1;
          if (remaining == 32'd1) begin st <= D_IDLE; done <= 1'b1; end
          else st <= D_RA;
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
