// timer_wdt_intc: timer, watchdog and interrupt controller of the protocol
// processor, one AHB slave (zero wait states).
//
// Timer: counts down from LOAD at one step per clock when enabled; on
// reaching zero it latches its interrupt and either reloads (periodic) or
// stops. Watchdog: counts down from WDT_LOAD when enabled; any write to
// WDT_KICK reloads it; reaching zero pulses `wdt_reset` for one cycle.
// Interrupt controller: source 0 is the latched timer interrupt, sources
// 1..NIRQ-1 are level inputs; STATUS = RAW & ENABLE, `irq` is the OR of
// STATUS; writing 1 to bit 0 of CLEAR clears the timer interrupt.
//
// Registers: 0x00 LOAD, 0x04 VALUE (ro), 0x08 CTRL (bit0 enable, bit1
// periodic), 0x10 WDT_LOAD, 0x14 WDT_KICK (wo), 0x18 WDT_CTRL (bit0
// enable), 0x20 RAW (ro), 0x24 ENABLE, 0x28 STATUS (ro), 0x2C CLEAR (wo).
//
// Lint note: all registers are 32-bit words, so the HSIZE/HBURST bits of the
// bus request are unused.
module timer_wdt_intc
  import wlan_pkg::*;
#(
  parameter int unsigned NIRQ = 8
) (
  input  logic            hclk,
  input  logic            hresetn,
  input  logic            hsel,
  input  ahb_m2s_t        m2s,
  input  logic            hready_in,
  output ahb_s2m_t        s2m,
  input  logic [NIRQ-1:1] irq_src,
  output logic            irq,
  output logic            wdt_reset
);
  logic [31:0] t_load, t_val, w_load, w_val;
  logic        t_en, t_per, w_en, t_irq;
  logic [NIRQ-1:0] raw, en;
  logic        wr_q;
  logic [5:0]  off_q;
  logic [31:0] wd;

  assign wd  = m2s.hwdata;
  assign raw = {irq_src, t_irq};
  assign irq = |(raw & en);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_q <= 1'b0; off_q <= '0;
    end else if (hready_in) begin
      wr_q  <= hsel && m2s.htrans[1] && m2s.hwrite;
      off_q <= m2s.haddr[5:0];
    end
  end

  always_comb begin
    case (off_q)
      6'h00:   s2m.hrdata = t_load;
      6'h04:   s2m.hrdata = t_val;
      6'h08:   s2m.hrdata = {30'd0, t_per, t_en};
      6'h10:   s2m.hrdata = w_load;
      6'h18:   s2m.hrdata = {31'd0, w_en};
      6'h1C:   s2m.hrdata = w_val;
      6'h20:   s2m.hrdata = 32'(raw);
      6'h24:   s2m.hrdata = 32'(en);
      6'h28:   s2m.hrdata = 32'(raw & en);
      default: s2m.hrdata = '0;
    endcase
  end
  assign s2m.hready = 1'b1;
  assign s2m.hresp  = 2'b00;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      t_load <= '0; t_val <= '0; t_en <= 1'b0; t_per <= 1'b0; t_irq <= 1'b0;
      w_load <= '1; w_val <= '1; w_en <= 1'b0; en <= '0; wdt_reset <= 1'b0;
    end else begin
      wdt_reset <= 1'b0;
      // timer
      if (t_en) begin
        if (t_val == 32'd0) begin
          t_irq <= 1'b1;
          if (t_per) t_val <= t_load; else t_en <= 1'b0;
        end else t_val <= t_val - 32'd1;
      end
      // watchdog
      if (w_en) begin
        if (w_val == 32'd0) begin wdt_reset <= 1'b1; w_val <= w_load; end
        else w_val <= w_val - 32'd1;
      end
      if (wr_q) begin
        case (off_q)
          6'h00: begin t_load <= wd; t_val <= wd; end
          6'h08: begin t_en <= wd[0]; t_per <= wd[1]; end
          6'h10: begin w_load <= wd; w_val <= wd; end
          6'h14: w_val <= w_load;
          6'h18: w_en <= wd[0];
          6'h24: en <= wd[NIRQ-1:0];
          6'h2C: if (wd[0]) t_irq <= 1'b0;
          default: ;
        endcase
      end
    end
  end
endmodule
