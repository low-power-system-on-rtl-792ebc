// tb_uart: checks the debug UART. Bytes written to DATA are sent 8N1 on
// txd, which is looped back to rxd; every byte must arrive in DATA with
// the valid flag and interrupt, the bit period must follow DIV, and a byte
// left unread when the next one arrives must set the overrun flag.
`include "tb/tb_util.svh"
module tb_uart
  import wlan_pkg::*;
;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(400000)

  logic     hsel;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  logic     txd, irq;
  uart u_dut (.hclk(clk), .hresetn(rst_n), .hsel, .m2s, .hready_in(1'b1), .s2m,
              .txd, .rxd(txd), .irq);

  `include "tb/tb_ahb_tasks.svh"

  // measure the width of the start bit
  int bit_cycles;
  initial begin
    int c;
    bit_cycles = 0;
    @(posedge rst_n);
    @(negedge txd);
    c = 0;
    while (!txd) begin @(posedge clk); c++; end
    bit_cycles = c;
  end

  initial begin
    logic [31:0] q;
    logic [7:0]  b;
    int t;
    m2s = '0; hsel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ahb_read(32'h8, q);
    `TB_CHECK(q == 32'd15, "DIV reset value")
    ahb_write(32'h8, 32'd9);
    for (int i = 0; i < 40; i++) begin
      b = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom);
      ahb_write(32'h0, {24'd0, b});
      t = 0;
      while (!irq && t < 400) begin @(posedge clk); t++; end
      `TB_CHECK(irq, $sformatf("byte %0d received", i))
      ahb_read(32'h4, q);
      `TB_CHECK(q[1] && !q[2], "STATUS valid, no overrun")
      ahb_read(32'h0, q);
      `TB_CHECK(q[7:0] == b, $sformatf("byte %0d: got %h sent %h", i, q[7:0], b))
      @(posedge clk);
      `TB_CHECK(!irq, "read clears valid")
      if (i == 0) `TB_CHECK(bit_cycles >= 10 && bit_cycles <= 11, $sformatf("bit period %0d cycles for DIV 9", bit_cycles))
      repeat (30) @(posedge clk);
    end
    // overrun: two bytes, no read in between
    ahb_write(32'h0, 32'h5A);
    while (!irq) @(posedge clk);
    ahb_write(32'h0, 32'hA5);
    repeat (150) @(posedge clk);
    ahb_read(32'h4, q);
    `TB_CHECK(q[2], "overrun flagged")
    ahb_read(32'h0, q);
    `TB_CHECK(q[7:0] == 8'hA5, "newest byte kept")
    ahb_read(32'h4, q);
    `TB_CHECK(!q[2] && !q[1], "DATA read clears the flags")
    `TB_FINISH
  end
endmodule
