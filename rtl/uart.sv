// uart: UART serial interface, 8 data bits, no parity, one stop bit,
// as an AHB slave (zero wait states). The bit time is DIV+1 clocks
// (programmable). The transmitter shifts out one byte from a one-byte
// holding register; the receiver samples the middle of each bit after
// detecting a start bit, and holds the received byte until it is read.
//
// Registers: 0x00 DATA (write: send a byte if TX is idle; read: received
// byte, clears RX-valid), 0x04 STATUS (bit0 TX busy, bit1 RX valid, bit2
// RX overrun), 0x08 DIV. `irq` = RX valid.
//
// Lint note: all registers are 32-bit words, so the HSIZE/HBURST bits of the
// bus request are unused.
module uart
  import wlan_pkg::*;
(
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_m2s_t m2s,
  input  logic     hready_in,
  output ahb_s2m_t s2m,
  output logic     txd,
  input  logic     rxd,
  output logic     irq
);
  logic [15:0] div;
  logic        wr_q, rd_q;
  logic [3:0]  off_q;
  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  // receiver
  logic [1:0]  rx_sync;
  logic        rx_busy, rx_vld, rx_ovr;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_sh, rx_data;

  assign irq = rx_vld;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_q <= 1'b0; rd_q <= 1'b0; off_q <= '0;
    end else if (hready_in) begin
      wr_q  <= hsel && m2s.htrans[1] && m2s.hwrite;
      rd_q  <= hsel && m2s.htrans[1] && !m2s.hwrite;
      off_q <= m2s.haddr[3:0];
    end
  end

  always_comb begin
    case (off_q)
      4'h0:    s2m.hrdata = {24'd0, rx_data};
      4'h4:    s2m.hrdata = {29'd0, rx_ovr, rx_vld, tx_bits != 4'd0};
      4'h8:    s2m.hrdata = {16'd0, div};
      default: s2m.hrdata = '0;
    endcase
  end
  assign s2m.hready = 1'b1;
  assign s2m.hresp  = 2'b00;
  assign txd = tx_sh[0];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      div <= 16'd15; tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0;
      rx_sync <= 2'b11; rx_busy <= 1'b0; rx_vld <= 1'b0; rx_ovr <= 1'b0;
      rx_bits <= '0; rx_cnt <= '0; rx_sh <= '0; rx_data <= '0;
    end else begin
      // ---- transmitter
      if (tx_bits != 4'd0) begin
        if (tx_cnt == div) begin
          tx_cnt <= '0;
          tx_sh  <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 4'd1;
        end else tx_cnt <= tx_cnt + 16'd1;
      end else if (wr_q && off_q == 4'h0) begin
        tx_sh <= {1'b1, m2s.hwdata[7:0], 1'b0};
        tx_bits <= 4'd10;
        tx_cnt <= '0;
      end
      if (wr_q && off_q == 4'h8) div <= m2s.hwdata[15:0];
      // ---- receiver
      rx_sync <= {rx_sync[0], rxd};
      if (rd_q && off_q == 4'h0) begin rx_vld <= 1'b0; rx_ovr <= 1'b0; end
      if (!rx_busy) begin
        if (!rx_sync[1]) begin rx_busy <= 1'b1; rx_cnt <= div >> 1; rx_bits <= 4'd0; end
      end else if (rx_cnt == 16'd0) begin
        rx_cnt <= div;
        if (rx_bits == 4'd0) begin
          if (rx_sync[1]) rx_busy <= 1'b0;            // false start bit
          else rx_bits <= 4'd1;
        end else if (rx_bits <= 4'd8) begin
          rx_sh <= {rx_sync[1], rx_sh[7:1]};
          rx_bits <= rx_bits + 4'd1;
        end else begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_data <= rx_sh;
            if (rx_vld && !(rd_q && off_q == 4'h0)) rx_ovr <= 1'b1;
            rx_vld <= 1'b1;
          end
        end
      end else rx_cnt <= rx_cnt - 16'd1;
    end
  end
endmodule
