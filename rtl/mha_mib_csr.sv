// mha_mib_csr: management information base (MIB) counters and command/status
// register of the MAC hardware accelerator, read by the protocol processor
// over AHB. Each counter counts one-cycle event pulses from the accelerator
// and saturates at its maximum.
// Register map (word offsets; all read-only except CTRL):
//   0x00 RX_OK       frames received with a good FCS
//   0x04 FCS_ERR     frames received with a bad FCS or length
//   0x08 ACK_REQ     ACKs requested (frames for this station)
//   0x0C CTS_REQ     CTSs requested (RTS for this station)
//   0x10 DUP         duplicate frames detected
//   0x14 ACCEPT      frames accepted for this station
//   0x18 STATUS      bit0 medium busy, bit1 NAV busy, bit2 receive FIFO overflow
//   0x1C CTRL        write bit0 = 1: clear all counters
// The counter set is a small subset of the IEEE 802.11 MIB.
//
// Lint note: all registers are 32-bit words, so the HSIZE/HBURST bits of the
// bus request are unused, as are the write data bits other than bit 0.
module mha_mib_csr
  import wlan_pkg::*;
(
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_m2s_t m2s,
  input  logic     hready_in,
  output ahb_s2m_t s2m,
  input  logic     ev_rx_ok,
  input  logic     ev_rx_err,
  input  logic     ev_ack,
  input  logic     ev_cts,
  input  logic     ev_dup,
  input  logic     ev_accept,
  input  logic     medium_busy,
  input  logic     nav_busy,
  input  logic     rxf_overflow
);
  localparam int NC = 6;
  logic [31:0] cnt [NC];
  logic [NC-1:0] ev;
  logic        wr_q;
  logic [4:0]  off_q;

  assign ev = {ev_accept, ev_dup, ev_cts, ev_ack, ev_rx_err, ev_rx_ok};

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_q <= 1'b0; off_q <= '0;
    end else if (hready_in) begin
      wr_q  <= hsel && m2s.htrans[1] && m2s.hwrite;
      off_q <= m2s.haddr[4:0];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      for (int i = 0; i < NC; i++) cnt[i] <= '0;
    end else if (wr_q && off_q == 5'h1C && m2s.hwdata[0]) begin
      for (int i = 0; i < NC; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NC; i++) if (ev[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 32'd1;
    end
  end

  always_comb begin
    if (off_q[4:2] < 3'(NC)) s2m.hrdata = cnt[off_q[4:2]];
    else if (off_q == 5'h18) s2m.hrdata = {29'd0, rxf_overflow, nav_busy, medium_busy};
    else                     s2m.hrdata = '0;
  end
  assign s2m.hready = 1'b1;
  assign s2m.hresp  = 2'b00;
endmodule
