// Testbench for mha_chan_state (CYC_PER_US = 4): measures, in clock cycles,
// when ifs_done rises after the medium goes idle (DIFS = 34 us; EIFS = 94 us
// after a receive error), the spacing of slot pulses (9 us), that CCA, NAV
// and own transmission each make the medium busy and restart the wait, and
// the 1 us strobe period.
`include "tb/tb_util.svh"
module tb_mha_chan_state;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic cca, nav, txa, rxe, rxo, mb, ifsd, st, ust;
  mha_chan_state #(.CYC_PER_US(4)) dut (.clk, .rst_n, .cca_busy(cca), .nav_busy(nav), .tx_active(txa),
      .rx_error(rxe), .rx_ok(rxo), .medium_busy(mb), .ifs_done(ifsd), .slot_tick(st), .us_tick(ust));

  task automatic wait_ifs(int exp_us, string what);
    int cyc = 0;
    while (!ifsd && cyc < 2000) begin @(negedge clk); cyc++; end
    // the first microsecond may be partial (free-running 1 us strobe)
    `TB_CHECK(cyc > (exp_us - 1) * 4 && cyc <= exp_us * 4, $sformatf("%s after %0d cycles", what, cyc))
  endtask

  initial begin
    int t0, t1, n;
    cca = 1; nav = 0; txa = 0; rxe = 0; rxo = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    #1; `TB_CHECK(mb && !ifsd, "busy on CCA")
    // us strobe period
    n = 0; repeat (40) begin @(negedge clk); if (ust) n++; end
    `TB_CHECK(n == 10, "us_tick every 4 cycles")
    @(negedge clk); cca = 0;
    wait_ifs(34, "DIFS");
    // slot pulses every 9 us = 36 cycles
    t0 = -1; n = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      if (st) begin if (t0 >= 0) `TB_CHECK(c - t0 == 36, $sformatf("slot spacing %0d", c - t0)); t0 = c; n++; end
    end
    `TB_CHECK(n >= 10, "slot pulses while idle")
    // NAV busy restarts; no slot pulses while busy
    nav = 1; n = 0;
    repeat (100) begin @(negedge clk); if (st || ifsd) n++; end
    `TB_CHECK(n == 0 && mb, "NAV holds the medium busy")
    nav = 0; wait_ifs(34, "DIFS after NAV");
    txa = 1; @(negedge clk); #1; `TB_CHECK(mb && !ifsd, "own transmission busy"); txa = 0;
    // error -> EIFS once, then DIFS again
    cca = 1; rxe = 1; @(negedge clk); rxe = 0; repeat (5) @(negedge clk); cca = 0;
    wait_ifs(94, "EIFS");
    cca = 1; repeat (5) @(negedge clk); cca = 0;
    wait_ifs(34, "DIFS after EIFS");
    `TB_FINISH
  end
endmodule
