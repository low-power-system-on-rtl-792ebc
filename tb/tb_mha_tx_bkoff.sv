// Testbench for mha_tx_bkoff: starts backoffs with several contention
// windows, drives slot pulses and busy periods, and checks that the drawn
// count is within 0..cw, that it is frozen while the medium is busy, and
// that `done` comes exactly after that many slot pulses.
`include "tb/tb_util.svh"
module tb_mha_tx_bkoff;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(100000)

  logic start, st, ifsd, mb, act, done;
  logic [9:0] cw, cnt;
  mha_tx_bkoff dut (.clk, .rst_n, .start, .cw, .slot_tick(st), .ifs_done(ifsd), .medium_busy(mb),
                    .active(act), .count(cnt), .done);

  initial begin
    int drawn, slots, zeros;
    start = 0; cw = 15; st = 0; ifsd = 0; mb = 0; zeros = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      cw = (r % 4 == 0) ? 10'd1023 : (r % 4 == 1) ? 10'd15 : (r % 4 == 2) ? 10'd63 : 10'd3;
      if (r % 4 == 2) repeat ($urandom % 7) @(negedge clk);
      start = 1; @(negedge clk); start = 0; #1;
      drawn = cnt;
      if (drawn == 0) zeros++;
      `TB_CHECK(act && drawn <= cw, $sformatf("drawn %0d within cw %0d", drawn, cw))
      slots = 0;
      ifsd = 1;
      while (!done) begin
        // a busy period with a slot pulse that must be ignored
        if ($urandom % 5 == 0) begin
          mb = 1; ifsd = 0; st = 1; @(negedge clk); st = 0; #1;
          `TB_CHECK(!done, "no done while busy")
          mb = 0; ifsd = 1;
        end
        @(negedge clk); #1;
        if (done) break;
        st = 1; @(negedge clk); st = 0; slots++; #1;
        if (slots > drawn + 2) break;
      end
      `TB_CHECK(done && slots == drawn, $sformatf("done after %0d slots, drawn %0d", slots, drawn))
      @(negedge clk); #1; `TB_CHECK(!act && !done, "idle after done")
    end
    `TB_FINISH
  end
endmodule
