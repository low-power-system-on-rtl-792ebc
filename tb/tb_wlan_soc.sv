// tb_wlan_soc: end-to-end test of the WLAN system-on-chip at its default
// (full) sizes: 120 KB dual-port SRAM, 16 KB local SRAM, 80 MHz clock,
// Viterbi depth 64. The testbench plays the protocol processor (AHB
// master 0) and the modem controller (local-bus master) and loops the
// modem's transmit samples straight back into its receiver.
//
// Phases and what they exercise:
//  1. AHB: CPU writes to the dual-port SRAM, an unmapped access gets the
//     default slave's ERROR response.
//  2. DMA copies a block inside the dual-port SRAM while the CPU keeps
//     asking for the bus; the DMA (highest priority) must hold it off.
//     The modem controller then reads the copy over the local bus (port B)
//     through the Gray and bus-invert codecs.
//  3. Local SRAM: sequential and random local-bus writes/reads over both
//     banks.
//  4. Timer interrupt, watchdog reset, UART loopback through the interrupt
//     controller.
//  5. MAC + modem: MPDUs go through the MAC transmit framer (FCS added),
//     the OFDM transmitter, back through the OFDM receiver into the MAC
//     receive path: a data frame to this station (ACK request), its retry
//     (duplicate), an RTS (CTS request), a beacon with timestamp
//     insertion (group frame), a frame to another station (NAV set), and a
//     frame corrupted on the air (CRC error, EIFS). Several modulation and
//     code-rate modes are used. Every ACK/CTS request must produce one
//     control-frame body on the ctl_* ports, and every payload octet
//     must come out of the receive FIFO.
//  6. Backoff after the medium goes idle; then the CPU reads the MIB
//     counters over the AHB and compares them with the events seen.
// Each mechanism is counted and the counts are printed and checked.
`include "tb/tb_util.svh"
module tb_wlan_soc
  import wlan_pkg::*;
;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(3000000)

  // ---------------------------------------------------------------- DUT
  logic        cpu_hbusreq, cpu_hgrant, brg_hgrant;
  ahb_m2s_t    cpu_m2s;
  ahb_s2m_t    ahb_s2m;
  logic        irq, wdt_reset, uart_txd;
  logic        lb_req, lb_we;
  logic [3:0]  lb_be;
  logic [31:0] lb_addr, lb_wdata, lb_rdata;
  mod_t        modulation;
  crate_t      rate;
  logic        phy_tx_start, mpdu_valid, mpdu_ready, mpdu_last, ts_insert;
  logic [7:0]  mpdu_data;
  logic [63:0] tsf;
  logic        tx_valid, tx_sym_first, phy_rx_start, rx_ready;
  cplx16_t     tx_sample, rx_sample;
  logic [11:0] rx_len_octets;
  logic [47:0] my_addr, resp_addr;
  logic        cca_busy, bkoff_start, bkoff_done, medium_busy;
  logic [9:0]  bkoff_cw;
  logic        rx_frame_end, rx_frame_ok, rx_accept, rx_dup, ack_req, cts_req, nav_busy;
  logic        ctl_valid, ctl_last;
  logic [7:0]  ctl_data, rxf_data;
  logic        rxf_valid, rxf_overflow;
  logic        corrupt;

  wlan_soc u_dut (
    .clk, .rst_n,
    .cpu_hbusreq, .cpu_hgrant, .cpu_m2s,
    .brg_hbusreq(1'b0), .brg_hgrant, .brg_m2s('0),
    .ahb_s2m, .irq, .wdt_reset, .irq_ext(5'd0), .uart_txd, .uart_rxd(uart_txd),
    .lb_req, .lb_we, .lb_be, .lb_addr, .lb_wdata, .lb_rdata,
    .modulation, .rate, .scr_seed(7'h5D),
    .phy_tx_start, .mpdu_valid, .mpdu_ready, .mpdu_data, .mpdu_last, .ts_insert, .tsf,
    .tx_valid, .tx_ready(rx_ready), .tx_sample, .tx_sym_first,
    .phy_rx_start, .rx_len_octets, .rx_valid(tx_valid), .rx_ready, .rx_sample,
    .rx_sym_start(tx_sym_first),
    .my_addr, .cca_busy, .bkoff_start, .bkoff_cw, .bkoff_done, .medium_busy,
    .rx_frame_end, .rx_frame_ok, .rx_accept, .rx_dup, .ack_req, .cts_req, .resp_addr, .nav_busy,
    .ctl_valid, .ctl_ready(1'b1), .ctl_data, .ctl_last,
    .rxf_clear(1'b0), .rxf_valid, .rxf_ready(1'b1), .rxf_data, .rxf_overflow);

  // the air: loop-back, optionally replacing one symbol's samples with noise
  int air_cnt;
  always @(posedge clk) if (phy_tx_start) air_cnt <= 0; else if (tx_valid && rx_ready) air_cnt <= air_cnt + 1;
  always_comb begin
    rx_sample = tx_sample;
    if (corrupt && air_cnt >= 160 && air_cnt < 400) begin
      rx_sample.re = 16'($urandom);
      rx_sample.im = 16'($urandom);
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_dma_preempt, n_inv, n_gray_steps, n_gray_1hot, gray_toggles, bin_toggles;
  int n_sp_b1, n_sp_b2, n_dp_b1, n_dp_b2, n_err, n_tmr_irq, n_wdt, n_uart;
  int n_ctl_ack, n_ctl_cts, n_ctl_whole, ctl_pos, n_rxf, n_rxf_exp;
  int n_pad, n_flush, n_crc_ok, n_crc_bad, n_ack, n_cts, n_dup, n_accept, n_nav, n_eifs, n_bkoff;
  logic [31:0] prev_ag, prev_a;
  logic        prev_lb, eifs_q, nav_q, flush_q;

  // sampled just after the falling edge, when both the design's registers
  // and the testbench's drive values are settled
  always @(negedge clk) begin
   #1;
   if (rst_n) begin
    if (cpu_hbusreq && !cpu_hgrant && u_dut.hmaster == 2'd2) n_dma_preempt++;
    if (lb_req && lb_we && u_dut.lb_wd_inv) n_inv++;
    if (u_dut.rd_q && u_dut.lb_rd_inv) n_inv++;
    if (lb_req) begin
      if (prev_lb && lb_addr == prev_a + 32'd4) begin   // next word after the last access
        n_gray_steps++;
        if ($countones(u_dut.lb_addr_g ^ prev_ag) == 1) n_gray_1hot++;
        gray_toggles += $countones(u_dut.lb_addr_g ^ prev_ag);
        bin_toggles  += $countones(lb_addr ^ prev_a);
      end
      prev_ag = u_dut.lb_addr_g; prev_a = lb_addr;
    end
    if (lb_req) prev_lb = 1'b1;
    if (u_dut.sp_bank_en[0]) n_sp_b1++;
    if (u_dut.sp_bank_en[1]) n_sp_b2++;
    if (u_dut.dpa_bank_en[0] || u_dut.dpb_bank_en[0]) n_dp_b1++;
    if (u_dut.dpa_bank_en[1] || u_dut.dpb_bank_en[1]) n_dp_b2++;
    if (wdt_reset) n_wdt++;
    if (u_dut.tx_pad) n_pad++;
    if (u_dut.u_mrx.u_vit.flushing && !flush_q) n_flush++;
    flush_q = u_dut.u_mrx.u_vit.flushing;
    if (rx_frame_end) begin if (rx_frame_ok) n_crc_ok++; else n_crc_bad++; end
    if (ack_req) n_ack++;
    if (cts_req) n_cts++;
    if (rxf_valid) n_rxf++;   // rxf_ready is tied high
    if (ctl_valid) begin   // ctl_ready is tied high: every valid cycle is an octet
      if (ctl_pos == 0 && ctl_data == 8'hD4) n_ctl_ack++;
      if (ctl_pos == 0 && ctl_data == 8'hC4) n_ctl_cts++;
      ctl_pos++;
      if (ctl_last) begin if (ctl_pos == 10) n_ctl_whole++; ctl_pos = 0; end
    end
    if (rx_dup) n_dup++;
    if (rx_accept) n_accept++;
    if (nav_busy && !nav_q) n_nav++;
    nav_q = nav_busy;
    if (u_dut.u_chs.use_eifs && !eifs_q) n_eifs++;
    eifs_q = u_dut.u_chs.use_eifs;
    if (bkoff_done) n_bkoff++;
   end
  end

  // ---------------------------------------------------------------- AHB master (CPU)
  task automatic cpu_xfer(input bit w, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] q, output logic [1:0] resp);
    @(negedge clk);
    cpu_hbusreq = 1'b1;
    while (!(cpu_hgrant && ahb_s2m.hready)) @(negedge clk);
    cpu_m2s.haddr = a; cpu_m2s.htrans = HT_NONSEQ; cpu_m2s.hwrite = w; cpu_m2s.hsize = 3'd2;
    @(negedge clk);
    cpu_m2s.htrans = HT_IDLE; cpu_m2s.hwdata = d; cpu_hbusreq = 1'b0;
    while (!ahb_s2m.hready) @(negedge clk);
    q = ahb_s2m.hrdata; resp = ahb_s2m.hresp;
  endtask

  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q; logic [1:0] r;
    cpu_xfer(1'b1, a, d, q, r);
    `TB_CHECK(r == 2'b00, $sformatf("write %h OKAY", a))
  endtask

  task automatic cpu_read(input logic [31:0] a, output logic [31:0] q);
    logic [1:0] r;
    cpu_xfer(1'b0, a, 0, q, r);
    `TB_CHECK(r == 2'b00, $sformatf("read %h OKAY", a))
  endtask

  // ---------------------------------------------------------------- local bus master (modem controller)
  task automatic lb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    lb_req = 1; lb_we = 1; lb_be = 4'hF; lb_addr = a; lb_wdata = d;
    @(negedge clk);
    lb_req = 0; lb_we = 0;
  endtask

  task automatic lb_read(input logic [31:0] a, output logic [31:0] q);
    @(negedge clk);
    lb_req = 1; lb_we = 0; lb_be = 4'hF; lb_addr = a;
    @(negedge clk);
    lb_req = 0;
    q = lb_rdata;
  endtask

  // ---------------------------------------------------------------- MAC frames over the modem
  logic [7:0] frame [$];

  function automatic void mk_header(logic [7:0] fc0, logic [7:0] fc1, logic [15:0] dur,
                                    logic [47:0] a1, logic [47:0] a2, logic [11:0] seq);
    frame.delete();
    frame.push_back(fc0); frame.push_back(fc1);
    frame.push_back(dur[7:0]); frame.push_back(dur[15:8]);
    for (int i = 0; i < 6; i++) frame.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) frame.push_back(a2[8*i +: 8]);
    if (fc0[3:2] != 2'b01) begin            // not a control frame: address 3 and sequence control
      for (int i = 0; i < 6; i++) frame.push_back(8'hB0 + 8'(i));
      frame.push_back({seq[3:0], 4'd0}); frame.push_back(seq[11:4]);
    end
  endfunction

  task automatic send_frame(input mod_t m, input crate_t r, input bit ts, input bit bad);
    int t;
    modulation = m; rate = r; ts_insert = ts; corrupt = bad;
    rx_len_octets = 12'(frame.size() + 4);
    if (frame.size() + 4 > 24) n_rxf_exp += frame.size() + 4 - 24;   // octets after the header
    @(negedge clk);
    phy_tx_start = 1; phy_rx_start = 1;
    @(negedge clk);
    phy_tx_start = 0; phy_rx_start = 0;
    for (int i = 0; i < frame.size(); i++) begin
      mpdu_valid = 1; mpdu_data = frame[i]; mpdu_last = (i == frame.size() - 1);
      #1;
      while (!mpdu_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    mpdu_valid = 0; mpdu_last = 0;
    t = 0;
    while (!rx_frame_end && t < 200000) begin @(posedge clk); t++; end
    `TB_CHECK(rx_frame_end, $sformatf("frame (mode %0d rate %0d) received", m, r))
    `TB_CHECK(rx_frame_ok == !bad, $sformatf("frame (mode %0d rate %0d) CRC %s", m, r,
                                             rx_frame_ok ? "ok" : "bad"))
    repeat (3) @(posedge clk);
    corrupt = 0;
    // let the transmitter finish its padding symbols: 1000 quiet cycles
    t = 0;
    while (t < 1000) begin @(posedge clk); t = tx_valid ? 0 : t + 1; end
  endtask

  // ---------------------------------------------------------------- stimulus
  localparam logic [47:0] ME    = 48'h5544_3322_1100;
  localparam logic [47:0] PEER  = 48'hAB00_0000_CD02;
  localparam logic [47:0] OTHER = 48'h0A0B_0C0D_0E10;

  initial begin
    logic [31:0] q, dp_ref [64];
    logic [1:0]  resp;
    int t;
    cpu_hbusreq = 0; cpu_m2s = '0;
    lb_req = 0; lb_we = 0; lb_be = 0; lb_addr = 0; lb_wdata = 0;
    modulation = MOD_BPSK; rate = CR_1_2; phy_tx_start = 0; phy_rx_start = 0;
    mpdu_valid = 0; mpdu_data = 0; mpdu_last = 0; ts_insert = 0; tsf = 64'h0123_4567_89AB_CDEF;
    rx_len_octets = 0; my_addr = ME; cca_busy = 0; bkoff_start = 0; bkoff_cw = 10'd15; corrupt = 0;
    prev_lb = 0; eifs_q = 0; nav_q = 0; flush_q = 0;
    n_ctl_ack = 0; n_ctl_cts = 0; n_ctl_whole = 0; ctl_pos = 0; n_rxf = 0; n_rxf_exp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. AHB and default slave
    for (int i = 0; i < 64; i++) begin
      dp_ref[i] = (i % 2 == 0) ? $urandom : ~dp_ref[i-1];      // alternate: many toggling lines
      cpu_write(32'h2000_0000 + 32'(4 * i), dp_ref[i]);
    end
    cpu_read(32'h2000_0000 + 32'd20, q);
    `TB_CHECK(q == dp_ref[5], "CPU reads back dual-port SRAM")
    cpu_xfer(1'b0, 32'h8000_0000, 0, q, resp);
    if (resp == 2'b01) n_err++;
    cpu_xfer(1'b1, 32'h4000_F000, 0, q, resp);
    if (resp == 2'b01) n_err++;
    `TB_CHECK(n_err == 2, "unmapped accesses get ERROR")
    cpu_read(32'h2000_0000, q);
    `TB_CHECK(q == dp_ref[0], "bus works after an ERROR")

    // ---- 2. DMA copy 0x2000_0000 -> 0x2001_0000 (bank 2), CPU contends
    cpu_write(32'h4000_1000, 32'h2000_0000);
    cpu_write(32'h4000_1004, 32'h2001_0000);
    cpu_write(32'h4000_1008, 32'd64);
    cpu_write(32'h4000_0024, 32'h0000_0002);                   // INTC: enable the DMA line
    cpu_write(32'h4000_100C, 32'h3);                           // start, interrupt enable
    for (int i = 0; i < 8; i++) begin
      cpu_read(32'h2000_0000 + 32'(4 * i), q);
      `TB_CHECK(q == dp_ref[i], "CPU reads between DMA transfers")
    end
    t = 0;
    while (!irq && t < 10000) begin @(posedge clk); t++; end
    `TB_CHECK(irq, "DMA done interrupt")
    cpu_read(32'h4000_0028, q);
    `TB_CHECK(q[1], "interrupt status shows the DMA")
    cpu_write(32'h4000_1010, 32'h2);
    cpu_write(32'h4000_0024, 32'h0);
    for (int i = 0; i < 4; i++) begin
      cpu_read(32'h2001_0000 + 32'(4 * i), q);
      `TB_CHECK(q == dp_ref[i], $sformatf("CPU reads DMA copy word %0d: %h expected %h", i, q, dp_ref[i]))
    end
    for (int i = 0; i < 64; i++) begin
      lb_read(32'h1000_0000 + 32'h1_0000 + 32'(4 * i), q);
      `TB_CHECK(q == dp_ref[i], $sformatf("local bus reads DMA copy word %0d: %h expected %h", i, q, dp_ref[i]))
    end

    // ---- 3. local SRAM over the coded local bus, both banks
    for (int i = 0; i < 64; i++) lb_write(32'(4 * (840 + i)), dp_ref[i] ^ 32'(i));
    for (int i = 0; i < 64; i++) begin
      lb_read(32'(4 * (840 + i)), q);
      `TB_CHECK(q == (dp_ref[i] ^ 32'(i)), $sformatf("local SRAM word %0d", 840 + i))
    end
    for (int i = 0; i < 32; i++) begin
      lb_write(32'h1000_0000 + 32'(4 * (200 + i)), ~dp_ref[i]);
      cpu_read(32'h2000_0000 + 32'(4 * (200 + i)), q);
      `TB_CHECK(q == ~dp_ref[i], "CPU sees the local-bus write to the dual-port SRAM")
    end

    // ---- 4. timer, watchdog, UART
    cpu_write(32'h4000_0024, 32'h1);
    cpu_write(32'h4000_0000, 32'd100);
    cpu_write(32'h4000_0008, 32'h1);
    t = 0;
    while (!irq && t < 1000) begin @(posedge clk); t++; end
    if (irq) n_tmr_irq++;
    `TB_CHECK(t > 90 && t < 110, $sformatf("timer interrupt after %0d cycles", t))
    cpu_write(32'h4000_002C, 32'h1);
    cpu_write(32'h4000_0010, 32'd200);
    cpu_write(32'h4000_0018, 32'h1);
    t = 0;
    while (n_wdt == 0 && t < 1000) begin @(posedge clk); t++; end
    `TB_CHECK(n_wdt == 1 && t > 180, $sformatf("watchdog reset after %0d cycles", t))
    cpu_write(32'h4000_0018, 32'h0);
    cpu_write(32'h4000_0024, 32'h4);                           // UART line
    for (int i = 0; i < 4; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      do cpu_read(32'h4000_2004, q); while (q[0]);             // transmitter still busy
      cpu_write(32'h4000_2000, {24'd0, b});
      t = 0;
      while (!irq && t < 1000) begin @(posedge clk); t++; end
      cpu_read(32'h4000_2000, q);
      if (q[7:0] == b) n_uart++;
    end
    `TB_CHECK(n_uart == 4, "UART loopback bytes")
    cpu_write(32'h4000_0024, 32'h0);

    // ---- 5. MAC frames through the modem
    // data frame to this station
    mk_header(8'h08, 8'h00, 16'd44, ME, PEER, 12'd100);
    for (int i = 0; i < 20; i++) frame.push_back(8'($urandom));
    send_frame(MOD_QPSK, CR_1_2, 0, 0);
    `TB_CHECK(n_ack == 1 && n_accept == 1, "data frame accepted with ACK request")
    `TB_CHECK(resp_addr == PEER, "ACK goes to the sender")
    // the same frame again with the retry bit: duplicate, still acknowledged
    frame[1] = 8'h08;
    send_frame(MOD_16QAM, CR_9_16, 0, 0);
    `TB_CHECK(n_dup == 1 && n_ack == 2 && n_accept == 1, "retry detected as duplicate")
    // RTS to this station
    mk_header(8'hB4, 8'h00, 16'd300, ME, PEER, 12'd0);
    send_frame(MOD_BPSK, CR_1_2, 0, 0);
    `TB_CHECK(n_cts == 1, "RTS gives a CTS request")
    // beacon with timestamp insertion (group address)
    mk_header(8'h80, 8'h00, 16'd0, 48'hFFFF_FFFF_FFFF, PEER, 12'd7);
    for (int i = 0; i < 12; i++) frame.push_back(8'h00);      // timestamp placeholder + interval/capability
    send_frame(MOD_64QAM, CR_3_4, 1, 0);
    `TB_CHECK(n_accept == 2 && n_ack == 2, "beacon accepted without ACK")
    // frame for another station: NAV from its duration field
    mk_header(8'h08, 8'h00, 16'd50, OTHER, PEER, 12'd9);
    for (int i = 0; i < 10; i++) frame.push_back(8'($urandom));
    send_frame(MOD_64QAM, CR_2_3, 0, 0);
    #1;
    `TB_CHECK(nav_busy && medium_busy, "NAV set by a frame for another station")
    t = 0;
    while (nav_busy && t < 10000) begin @(posedge clk); t++; end
    `TB_CHECK(!nav_busy && t > 30 * 80 && t <= 50 * 80, $sformatf("NAV ran for %0d cycles", t))
    // corrupted on the air: CRC error, EIFS
    mk_header(8'h08, 8'h00, 16'd44, ME, PEER, 12'd101);
    for (int i = 0; i < 30; i++) frame.push_back(8'($urandom));
    send_frame(MOD_64QAM, CR_3_4, 0, 1);
    `TB_CHECK(n_ack == 2, "no ACK for a bad frame")
    // further modes, all through to CRC ok
    for (int k = 0; k < 4; k++) begin
      mk_header(8'h08, 8'h00, 16'd44, ME, PEER, 12'(200 + k));
      for (int i = 0; i < 15 + 9 * k; i++) frame.push_back(8'($urandom));
      case (k)
        0: send_frame(MOD_BPSK, CR_3_4, 0, 0);
        1: send_frame(MOD_QPSK, CR_3_4, 0, 0);
        2: send_frame(MOD_16QAM, CR_1_2, 0, 0);
        default: send_frame(MOD_16QAM, CR_3_4, 0, 0);
      endcase
    end

    // ---- 6. backoff once the medium is idle again
    @(negedge clk);
    bkoff_start = 1;
    @(negedge clk);
    bkoff_start = 0;
    t = 0;
    while (n_bkoff == 0 && t < 50000) begin @(posedge clk); t++; end
    `TB_CHECK(n_bkoff == 1 && t > 34 * 80, $sformatf("backoff finished after %0d cycles", t))

    // ---- MAC accelerator MIB counters, read by the protocol processor
    begin
      logic [31:0] mib [6];
      for (int i = 0; i < 6; i++) cpu_read(32'h4000_3000 + 32'(4 * i), mib[i]);
      $display("MIB counters: rx_ok=%0d fcs_err=%0d ack=%0d cts=%0d dup=%0d accept=%0d",
               mib[0], mib[1], mib[2], mib[3], mib[4], mib[5]);
      `TB_CHECK(mib[0] == 32'(n_crc_ok) && mib[1] == 32'(n_crc_bad) && mib[2] == 32'(n_ack) &&
                mib[3] == 32'(n_cts) && mib[4] == 32'(n_dup) && mib[5] == 32'(n_accept),
                "MIB counters match the observed events")
      cpu_write(32'h4000_301C, 32'h1);
      cpu_read(32'h4000_3000, mib[0]);
      `TB_CHECK(mib[0] == 0, "MIB counters cleared by CTRL")
    end

    // ---- mechanism counts
    $display("mechanism counts:");
    $display("  dma_preempt_cycles=%0d bus_invert=%0d gray_steps=%0d gray_single_toggle=%0d",
             n_dma_preempt, n_inv, n_gray_steps, n_gray_1hot);
    $display("  addr_toggles gray=%0d binary=%0d", gray_toggles, bin_toggles);
    $display("  sram_bank_cycles local b1=%0d b2=%0d dual b1=%0d b2=%0d", n_sp_b1, n_sp_b2, n_dp_b1, n_dp_b2);
    $display("  ahb_error=%0d timer_irq=%0d wdt_reset=%0d uart_bytes=%0d", n_err, n_tmr_irq, n_wdt, n_uart);
    $display("  tx_pad_cycles=%0d viterbi_flush=%0d crc_ok=%0d crc_bad=%0d", n_pad, n_flush, n_crc_ok, n_crc_bad);
    $display("  ack_req=%0d cts_req=%0d dup=%0d accept=%0d nav_set=%0d eifs=%0d backoff_done=%0d",
             n_ack, n_cts, n_dup, n_accept, n_nav, n_eifs, n_bkoff);
    $display("  control_frames ack=%0d cts=%0d complete=%0d", n_ctl_ack, n_ctl_cts, n_ctl_whole);
    $display("  rx_fifo_octets=%0d rx_fifo_overflow=%0d", n_rxf, rxf_overflow);
    `TB_CHECK(n_dma_preempt > 0, "DMA held the CPU off the bus")
    `TB_CHECK(n_inv > 0, "bus-invert line used")
    `TB_CHECK(n_gray_steps > 100 && n_gray_1hot == n_gray_steps, "sequential local-bus addresses toggle one line")
    `TB_CHECK(gray_toggles < bin_toggles, "Gray coding saves address toggles")
    `TB_CHECK(n_sp_b1 > 0 && n_sp_b2 > 0 && n_dp_b1 > 0 && n_dp_b2 > 0, "all SRAM banks used")
    `TB_CHECK(n_tmr_irq == 1 && n_wdt == 1, "timer and watchdog")
    `TB_CHECK(n_pad > 0 && n_flush == 10, "padding and Viterbi flush per frame")
    `TB_CHECK(n_crc_ok == 9 && n_crc_bad == 1, "CRC results")
    `TB_CHECK(n_ack == 6 && n_cts == 1 && n_dup == 1 && n_accept == 6, "receive filter decisions")
    `TB_CHECK(n_nav == 1 && n_eifs == 1 && n_bkoff == 1, "NAV, EIFS and backoff")
    `TB_CHECK(n_ctl_ack == n_ack && n_ctl_cts == n_cts && n_ctl_whole == n_ack + n_cts,
              "one 10-octet control frame per ACK/CTS request")
    `TB_CHECK(n_rxf == n_rxf_exp && !rxf_overflow, $sformatf("payload octets through the receive FIFO: %0d of %0d", n_rxf, n_rxf_exp))
    `TB_FINISH
  end
endmodule
