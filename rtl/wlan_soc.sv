// wlan_soc: dual-standard (HIPERLAN/2 / IEEE 802.11a) WLAN system-on-chip.
//
// Two processors share the work: the protocol processor on the AMBA AHB
// system bus runs the DLC/MAC protocol stack, the modem controller on a
// separate local bus drives the baseband modem and lower MAC in real time.
// Both processors are external to this RTL: their bus ports are the top's
// ports. Around them:
//  * AHB: fixed-priority arbiter (master 0 protocol processor, master 1
//    local-bus bridge port, master 2 DMA = highest priority), address
//    decoder, read-data/response multiplexer and a default slave that
//    answers unmapped addresses with a two-cycle ERROR response.
//    Slaves: dual-port SRAM (port A), timers/watchdog/interrupt controller,
//    DMA registers, UART.
//  * Local bus: its address lines are Gray coded and its data lines (both
//    directions) bus-invert coded between the master port and the slaves,
//    the two low-power bus codes; slaves are the banked 16 KB SRAM at
//    0x0000_0000 and port B of the banked 120 KB dual-port SRAM at
//    0x1000_0000. Read data returns one cycle after the request.
//  * Baseband modem: transmit path fed from the MAC accelerator's tx_data
//    octets (serialised least significant bit first), receive path whose
//    decoded bits are packed into octets for the accelerator's rx_data.
//  * MAC hardware accelerator: tx_data (FCS, timestamp), rx_data (CRC and
//    length check), rx_filter (address/duplicate filtering, ACK/CTS
//    requests, NAV), rx_ctrl (ACK/CTS frame bodies, on the ctl_* ports),
//    the transmit FIFO in front of tx_data, the receive FIFO for payload
//    octets (rxf_* ports), chan_state
//    (CCA + NAV -> DIFS/EIFS, slot pulses) and tx_bkoff (random backoff).
// Everything runs on one clock (80 MHz: one 4 us OFDM symbol is 320
// cycles, the FFT budget); PHY-header contents (length, rate) and the
// transmit/receive start commands come in as ports, as do the signals of
// blocks not included (tx_ctrl, MIB registers, synchroniser).
//
// Lint note: the bank enables, `tx_pad`, the CRC/length error flags and the
// MSB of the deserialiser are observation points for simulation and are
// not routed to pins.
module wlan_soc
  import wlan_pkg::*;
#(
  parameter int unsigned DPRAM_WORDS = 30720,   // 120 KB
  parameter int unsigned DPRAM_BANK1 = 256,     // 1 KB
  parameter int unsigned SPRAM_WORDS = 4096,    // 16 KB
  parameter int unsigned SPRAM_BANK1 = 870,     // 3.4 KB
  parameter int unsigned CYC_PER_US  = 80,    // 80 MHz system clock
  parameter int unsigned VIT_DEPTH   = 64,
  parameter int unsigned RXF_DEPTH   = 64,     // receive FIFO octets (size not given)
  parameter int unsigned TXF_DEPTH   = 64      // transmit FIFO octets (size not given)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB master 0: protocol processor
  input  logic        cpu_hbusreq,
  output logic        cpu_hgrant,
  input  ahb_m2s_t    cpu_m2s,
  // AHB master 1: local-bus bridge port
  input  logic        brg_hbusreq,
  output logic        brg_hgrant,
  input  ahb_m2s_t    brg_m2s,
  output ahb_s2m_t    ahb_s2m,       // shared response to the AHB masters
  output logic        irq,
  output logic        wdt_reset,
  input  logic [4:0]  irq_ext,
  output logic        uart_txd,
  input  logic        uart_rxd,
  // local bus master port (modem controller)
  input  logic        lb_req,
  input  logic        lb_we,
  input  logic [3:0]  lb_be,
  input  logic [31:0] lb_addr,
  input  logic [31:0] lb_wdata,
  output logic [31:0] lb_rdata,
  // modem configuration (per PDU train)
  input  mod_t        modulation,
  input  crate_t      rate,
  input  logic [6:0]  scr_seed,
  // MAC accelerator transmit: MPDU octets in, baseband samples out
  input  logic        phy_tx_start,
  input  logic        mpdu_valid,
  output logic        mpdu_ready,
  input  logic [7:0]  mpdu_data,
  input  logic        mpdu_last,
  input  logic        ts_insert,
  input  logic [63:0] tsf,
  output logic        tx_valid,
  input  logic        tx_ready,
  output cplx16_t     tx_sample,
  output logic        tx_sym_first,
  // receive: aligned baseband samples in
  input  logic        phy_rx_start,
  input  logic [11:0] rx_len_octets,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  cplx16_t     rx_sample,
  input  logic        rx_sym_start,
  // MAC accelerator status
  input  logic [47:0] my_addr,
  input  logic        cca_busy,
  input  logic        bkoff_start,
  input  logic [9:0]  bkoff_cw,
  output logic        bkoff_done,
  output logic        medium_busy,
  output logic        rx_frame_end,
  output logic        rx_frame_ok,
  output logic        rx_accept,
  output logic        rx_dup,
  output logic        ack_req,
  output logic        cts_req,
  output logic [47:0] resp_addr,
  output logic        nav_busy,
  // ACK/CTS frame bodies from rx_ctrl, meant for tx_data (the transmit
  // controller that would merge them with host frames is not built)
  output logic        ctl_valid,
  input  logic        ctl_ready,
  output logic [7:0]  ctl_data,
  output logic        ctl_last,
  // received payload octets through the receive FIFO (towards defragmentation
  // and the system bus; those stages are not built)
  input  logic        rxf_clear,
  output logic        rxf_valid,
  input  logic        rxf_ready,
  output logic [7:0]  rxf_data,
  output logic        rxf_overflow
);
  localparam int NM = 3;
  localparam int NS = 5;

  // ================================================================ AHB
  logic [NM-1:0]  hbusreq, hgrant;
  logic [1:0]     hmaster, hmaster_d;
  ahb_m2s_t       m2s [NM];
  ahb_m2s_t       bus;               // address phase from hmaster, data from hmaster_d
  logic [NS-1:0]  hsel, sel_d;
  logic           hsel_def, def_d;
  ahb_s2m_t       s2m [NS];
  ahb_s2m_t       s2m_def;
  logic           hready;
  logic           dma_busreq;
  ahb_m2s_t       dma_m2s;
  logic           dma_irq, uart_irq;

  assign hbusreq = {dma_busreq, brg_hbusreq, cpu_hbusreq};
  assign m2s[0]  = cpu_m2s;
  assign m2s[1]  = brg_m2s;
  assign m2s[2]  = dma_m2s;
  assign cpu_hgrant = hgrant[0];
  assign brg_hgrant = hgrant[1];

  ahb_arbiter #(.NM(NM)) u_arb (.hclk(clk), .hresetn(rst_n), .hbusreq, .hready, .hgrant, .hmaster);

  always_comb begin
    bus        = m2s[hmaster];
    bus.hwdata = m2s[hmaster_d].hwdata;
  end

  // slaves: DP SRAM, timers/WDT/INTC, DMA, UART, MAC accelerator MIB/CSR
  ahb_decoder #(.NS(NS)) u_dec (.haddr(bus.haddr), .hsel, .hsel_default(hsel_def));

  // default slave: two-cycle ERROR response to any transfer it gets
  logic def_err1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hmaster_d <= '0; sel_d <= '0; def_d <= 1'b0; def_err1 <= 1'b0;
    end else begin
      def_err1 <= 1'b0;
      if (hready) begin
        hmaster_d <= hmaster;
        sel_d     <= hsel;
        def_d     <= hsel_def && bus.htrans[1];
        if (hsel_def && bus.htrans[1]) def_err1 <= 1'b1;
      end
    end
  end
  always_comb begin
    s2m_def        = '0;
    s2m_def.hready = !def_err1;
    s2m_def.hresp  = def_d ? 2'b01 : 2'b00;
  end

  always_comb begin
    ahb_s2m = s2m_def;
    if (!def_d)
      for (int s = 0; s < NS; s++) if (sel_d[s]) ahb_s2m = s2m[s];
  end
  assign hready = ahb_s2m.hready;

  // ================================================================ local bus
  // master side: Gray-coded address, bus-invert-coded write data
  logic [31:0] lb_addr_g, lb_addr_s, lb_wd_bus, lb_wd_s;
  logic        lb_wd_inv;
  gray_codec #(.W(32), .DECODE(1'b0)) u_genc (.in_bus(lb_addr), .out_bus(lb_addr_g));
  bus_invert_codec #(.W(32), .DECODE(1'b0)) u_wenc (.clk, .rst_n, .valid(lb_req && lb_we),
      .in_bus(lb_wdata), .in_inv(1'b0), .out_bus(lb_wd_bus), .out_inv(lb_wd_inv));
  // slave side
  logic        wdec_inv_unused;
  gray_codec #(.W(32), .DECODE(1'b1)) u_gdec (.in_bus(lb_addr_g), .out_bus(lb_addr_s));
  bus_invert_codec #(.W(32), .DECODE(1'b1)) u_wdec (.clk, .rst_n, .valid(1'b0),
      .in_bus(lb_wd_bus), .in_inv(lb_wd_inv), .out_bus(lb_wd_s), .out_inv(wdec_inv_unused));

  logic        sel_sp, sel_dp, rsel_dp, rd_q;
  logic [31:0] sp_rdata, dp_rdata, lb_rd_raw, lb_rd_bus;
  logic        lb_rd_inv, rdec_inv_unused;
  logic [1:0]  sp_bank_en, dpa_bank_en, dpb_bank_en;
  assign sel_sp = lb_req && (lb_addr_s[31:28] == 4'h0);
  assign sel_dp = lb_req && (lb_addr_s[31:28] == 4'h1);

  sp_sram_banked #(.WORDS(SPRAM_WORDS), .BANK1_WORDS(SPRAM_BANK1)) u_lsram (
      .clk, .req(sel_sp), .we(lb_we), .be(lb_be), .addr(lb_addr_s), .wdata(lb_wd_s),
      .rdata(sp_rdata), .bank_en(sp_bank_en));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rsel_dp <= 1'b0; rd_q <= 1'b0; end
    else begin rsel_dp <= sel_dp; rd_q <= lb_req && !lb_we; end
  end
  assign lb_rd_raw = rsel_dp ? dp_rdata : sp_rdata;
  // read data travels back bus-invert coded as well
  bus_invert_codec #(.W(32), .DECODE(1'b0)) u_renc (.clk, .rst_n, .valid(rd_q),
      .in_bus(lb_rd_raw), .in_inv(1'b0), .out_bus(lb_rd_bus), .out_inv(lb_rd_inv));
  bus_invert_codec #(.W(32), .DECODE(1'b1)) u_rdec (.clk, .rst_n, .valid(1'b0),
      .in_bus(lb_rd_bus), .in_inv(lb_rd_inv), .out_bus(lb_rdata), .out_inv(rdec_inv_unused));

  // ================================================================ AHB slaves
  dp_sram_banked #(.WORDS(DPRAM_WORDS), .BANK1_WORDS(DPRAM_BANK1)) u_dpram (
      .hclk(clk), .hresetn(rst_n), .hsel(hsel[0]), .m2s(bus), .hready_in(hready), .s2m(s2m[0]),
      .b_req(sel_dp), .b_we(lb_we), .b_be(lb_be), .b_addr(lb_addr_s), .b_wdata(lb_wd_s),
      .b_rdata(dp_rdata), .a_bank_en(dpa_bank_en), .b_bank_en(dpb_bank_en));

  timer_wdt_intc #(.NIRQ(8)) u_tmr (.hclk(clk), .hresetn(rst_n), .hsel(hsel[1]), .m2s(bus),
      .hready_in(hready), .s2m(s2m[1]), .irq_src({irq_ext, uart_irq, dma_irq}), .irq, .wdt_reset);

  dma_controller u_dma (.hclk(clk), .hresetn(rst_n), .s_hsel(hsel[2]), .s_m2s(bus), .s_hready_in(hready),
      .s_s2m(s2m[2]), .m_hbusreq(dma_busreq), .m_hgrant(hgrant[2]), .m_m2s(dma_m2s), .m_s2m(ahb_s2m),
      .irq(dma_irq));

  uart u_uart (.hclk(clk), .hresetn(rst_n), .hsel(hsel[3]), .m2s(bus), .hready_in(hready), .s2m(s2m[3]),
      .txd(uart_txd), .rxd(uart_rxd), .irq(uart_irq));

  // ================================================================ MAC accelerator, transmit
  logic       txd_v, txd_r, txd_l;
  logic [7:0] txd_d;
  // transmit FIFO: host MPDU octets with their last flag, towards tx_data
  logic       txf_v, txf_r, txf_l, txf_ovf_unused;
  logic [7:0] txf_d;
  logic [$clog2(TXF_DEPTH+1)-1:0] txf_level_unused;
  mha_fifo #(.W(9), .DEPTH(TXF_DEPTH)) u_txf_fifo (.clk, .rst_n, .clear(1'b0), .in_valid(mpdu_valid),
      .in_ready(mpdu_ready), .in_data({mpdu_last, mpdu_data}), .out_valid(txf_v), .out_ready(txf_r),
      .out_data({txf_l, txf_d}), .level(txf_level_unused), .overflow(txf_ovf_unused));

  mha_tx_data u_txd (.clk, .rst_n, .ts_insert, .tsf, .in_valid(txf_v), .in_ready(txf_r),
      .in_data(txf_d), .in_last(txf_l), .out_valid(txd_v), .out_ready(txd_r),
      .out_data(txd_d), .out_last(txd_l));

  // octet -> bit serialiser, least significant bit first
  logic [2:0] ser_idx;
  logic       m_in_r;
  assign txd_r = m_in_r && (ser_idx == 3'd7);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    ser_idx <= '0;
    else if (phy_tx_start)         ser_idx <= '0;
    else if (txd_v && m_in_r)      ser_idx <= ser_idx + 3'd1;
  end

  logic tx_pad;
  ofdm_tx u_mtx (.clk, .rst_n, .start(phy_tx_start), .seed(scr_seed), .modulation, .rate,
      .in_valid(txd_v), .in_ready(m_in_r), .in_bit(txd_d[ser_idx]), .in_last(txd_l && ser_idx == 3'd7),
      .out_valid(tx_valid), .out_ready(tx_ready), .out_sample(tx_sample), .out_first(tx_sym_first),
      .pad_active(tx_pad));

  // ================================================================ modem receive
  logic rb_v, rb_b, rb_l;
  ofdm_rx #(.VIT_DEPTH(VIT_DEPTH)) u_mrx (.clk, .rst_n, .start(phy_rx_start), .seed(scr_seed),
      .modulation, .rate, .n_bits({1'b0, rx_len_octets, 3'b000}), .in_valid(rx_valid), .in_ready(rx_ready),
      .in_sample(rx_sample), .sym_start(rx_sym_start), .out_valid(rb_v), .out_bit(rb_b), .out_last(rb_l));

  // bit -> octet packer
  logic [7:0] des_sh;
  logic [2:0] des_idx;
  logic       oct_v, oct_l;
  logic [7:0] oct_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      des_sh <= '0; des_idx <= '0; oct_v <= 1'b0; oct_l <= 1'b0; oct_d <= '0;
    end else begin
      oct_v <= 1'b0;
      if (phy_rx_start) des_idx <= '0;
      else if (rb_v) begin
        des_sh[des_idx] <= rb_b;
        des_idx <= des_idx + 3'd1;
        if (des_idx == 3'd7) begin
          oct_v <= 1'b1;
          oct_d <= {rb_b, des_sh[6:0]};
          oct_l <= rb_l;
        end
      end
    end
  end

  // ================================================================ MAC accelerator, receive
  logic        hdr_v, pay_v, crc_err, len_err;
  logic [4:0]  hdr_i;
  logic [7:0]  hdr_d, pay_d;
  logic [11:0] flen_unused;
  mha_rx_data u_rxd (.clk, .rst_n, .in_valid(oct_v), .in_data(oct_d), .in_last(oct_l),
      .hdr_valid(hdr_v), .hdr_idx(hdr_i), .hdr_data(hdr_d), .pay_valid(pay_v), .pay_data(pay_d),
      .frame_end(rx_frame_end), .frame_ok(rx_frame_ok), .crc_err, .len_err, .frame_len(flen_unused));

  logic       rxf_in_ready_unused;
  logic [$clog2(RXF_DEPTH+1)-1:0] rxf_level_unused;
  mha_fifo #(.W(8), .DEPTH(RXF_DEPTH)) u_rxf_fifo (.clk, .rst_n, .clear(rxf_clear), .in_valid(pay_v),
      .in_ready(rxf_in_ready_unused), .in_data(pay_d), .out_valid(rxf_valid), .out_ready(rxf_ready),
      .out_data(rxf_data), .level(rxf_level_unused), .overflow(rxf_overflow));

  logic        us_tick;
  logic [15:0] resp_dur, nav_unused;
  mha_rx_filter u_rxf (.clk, .rst_n, .my_addr, .hdr_valid(hdr_v), .hdr_idx(hdr_i), .hdr_data(hdr_d),
      .frame_end(rx_frame_end), .frame_ok(rx_frame_ok), .us_tick, .accept(rx_accept), .dup(rx_dup),
      .ack_req, .cts_req, .resp_addr, .resp_dur, .nav_busy, .nav(nav_unused));

  logic ctl_busy_unused;
  mha_rx_ctrl u_rxc (.clk, .rst_n, .us_tick, .ack_req, .cts_req, .resp_addr, .resp_dur,
      .out_valid(ctl_valid), .out_ready(ctl_ready), .out_data(ctl_data), .out_last(ctl_last),
      .busy(ctl_busy_unused));

  mha_mib_csr u_mib (.hclk(clk), .hresetn(rst_n), .hsel(hsel[4]), .m2s(bus), .hready_in(hready),
      .s2m(s2m[4]), .ev_rx_ok(rx_frame_end && rx_frame_ok), .ev_rx_err(rx_frame_end && !rx_frame_ok),
      .ev_ack(ack_req), .ev_cts(cts_req), .ev_dup(rx_dup), .ev_accept(rx_accept),
      .medium_busy, .nav_busy, .rxf_overflow);

  logic ifs_done, slot_tick;
  mha_chan_state #(.CYC_PER_US(CYC_PER_US)) u_chs (.clk, .rst_n, .cca_busy, .nav_busy,
      .tx_active(tx_valid), .rx_error(rx_frame_end && !rx_frame_ok), .rx_ok(rx_frame_end && rx_frame_ok),
      .medium_busy, .ifs_done, .slot_tick, .us_tick);

  logic       bk_active_unused;
  logic [9:0] bk_count_unused;
  mha_tx_bkoff u_bko (.clk, .rst_n, .start(bkoff_start), .cw(bkoff_cw), .slot_tick, .ifs_done,
      .medium_busy, .active(bk_active_unused), .count(bk_count_unused), .done(bkoff_done));
endmodule
