// tb_timer_wdt_intc: checks the timer, watchdog and interrupt controller
// through their AHB registers: one-shot and periodic timer expiry times,
// interrupt masking and clearing, external interrupt lines, watchdog
// reset when not kicked and no reset while it is kicked.
`include "tb/tb_util.svh"
module tb_timer_wdt_intc
  import wlan_pkg::*;
;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_wdt = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(200000)

  logic       hsel;
  ahb_m2s_t   m2s;
  ahb_s2m_t   s2m;
  logic [7:1] irq_src;
  logic       irq, wdt_reset;
  timer_wdt_intc u_dut (.hclk(clk), .hresetn(rst_n), .hsel, .m2s, .hready_in(1'b1), .s2m,
                        .irq_src, .irq, .wdt_reset);

  `include "tb/tb_ahb_tasks.svh"

  always @(posedge clk) if (rst_n && wdt_reset) n_wdt++;

  initial begin
    logic [31:0] q;
    int t0, n;
    m2s = '0; hsel = 0; irq_src = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // register read-back
    ahb_write(32'h00, 32'd50); ahb_read(32'h00, q);
    `TB_CHECK(q == 32'd50, "LOAD read-back")
    ahb_write(32'h24, 32'h01); ahb_read(32'h24, q);
    `TB_CHECK(q == 32'h01, "ENABLE read-back")
    // one-shot timer: interrupt after LOAD+1 ticks
    ahb_write(32'h00, 32'd40);
    ahb_write(32'h08, 32'h1);
    t0 = 0;
    while (!irq && t0 < 1000) begin @(posedge clk); t0++; end
    `TB_CHECK(t0 >= 38 && t0 <= 44, $sformatf("one-shot expiry after %0d cycles", t0))
    ahb_read(32'h28, q);
    `TB_CHECK(q[0], "STATUS shows timer")
    ahb_write(32'h2C, 32'h1);
    repeat (2) @(posedge clk);
    `TB_CHECK(!irq, "CLEAR drops the interrupt")
    repeat (100) @(posedge clk);
    `TB_CHECK(!irq, "one-shot does not fire again")
    // periodic timer: count expiries
    ahb_write(32'h00, 32'd19);
    ahb_write(32'h08, 32'h3);
    n = 0;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk);
      if (irq) begin n++; ahb_write(32'h2C, 32'h1); end
    end
    `TB_CHECK(n >= 12 && n <= 26, $sformatf("periodic timer fired %0d times", n))
    ahb_write(32'h08, 32'h0);
    ahb_write(32'h2C, 32'h1);
    // masking of external sources
    ahb_write(32'h24, 32'h00);
    irq_src = 7'b0000100;
    repeat (2) @(posedge clk);
    `TB_CHECK(!irq, "masked source gives no interrupt")
    ahb_read(32'h20, q);
    `TB_CHECK(q[3], "RAW shows the source")
    ahb_write(32'h24, 32'h08);
    #1;
    `TB_CHECK(irq, "enabled source interrupts")
    for (int k = 1; k < 8; k++) begin
      irq_src = 7'(1 << (k - 1));
      ahb_write(32'h24, 32'(1 << k));
      #1;
      `TB_CHECK(irq, $sformatf("line %0d reaches irq", k))
      ahb_write(32'h24, 32'(1 << ((k % 7) + 1)) & ~32'(1 << k));
      #1;
      `TB_CHECK(!irq, $sformatf("line %0d masked", k))
    end
    irq_src = 0;
    // watchdog kicked in time: no reset
    ahb_write(32'h10, 32'd60);
    ahb_write(32'h18, 32'h1);
    for (int k = 0; k < 10; k++) begin
      repeat (30) @(posedge clk);
      ahb_write(32'h14, 32'h1);
    end
    `TB_CHECK(n_wdt == 0, "kicked watchdog stays quiet")
    // watchdog starved: reset after about LOAD cycles, then reloads
    t0 = 0;
    while (n_wdt == 0 && t0 < 1000) begin @(posedge clk); t0++; end
    `TB_CHECK(t0 >= 55 && t0 <= 66, $sformatf("watchdog reset after %0d cycles", t0))
    repeat (200) @(posedge clk);
    `TB_CHECK(n_wdt >= 3 && n_wdt <= 5, $sformatf("watchdog reloads (%0d resets)", n_wdt))
    ahb_write(32'h18, 32'h0);
    n = n_wdt;
    repeat (200) @(posedge clk);
    `TB_CHECK(n_wdt == n, "disabled watchdog is quiet")
    `TB_FINISH
  end
endmodule
