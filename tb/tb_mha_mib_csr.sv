// tb_mha_mib_csr: checks the MIB counters and the status/control register
// over AHB. Random event pulses are applied on all counter inputs while a
// model counts them; the counters are read back and compared, the status
// bits are checked, and a CTRL write must clear every counter.
`include "tb/tb_util.svh"
module tb_mha_mib_csr
  import wlan_pkg::*;
;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(200000)

  logic     hsel;
  ahb_m2s_t m2s;
  ahb_s2m_t s2m;
  logic [5:0] ev;
  logic       medium_busy, nav_busy, rxf_overflow;
  int         model [6];

  mha_mib_csr u_dut (.hclk(clk), .hresetn(rst_n), .hsel, .m2s, .hready_in(1'b1), .s2m,
                     .ev_rx_ok(ev[0]), .ev_rx_err(ev[1]), .ev_ack(ev[2]), .ev_cts(ev[3]),
                     .ev_dup(ev[4]), .ev_accept(ev[5]), .medium_busy, .nav_busy, .rxf_overflow);

  `include "tb/tb_ahb_tasks.svh"

  // one burst of random events, counted by the model
  task automatic events(input int n);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        ev[i] = ($urandom_range(0, 3) == 0);
        if (ev[i]) model[i]++;
      end
    end
    @(negedge clk);
    ev = '0;
  endtask

  initial begin
    logic [31:0] q;
    m2s = '0; hsel = 0; ev = '0; medium_busy = 0; nav_busy = 0; rxf_overflow = 0;
    for (int i = 0; i < 6; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      ahb_read(32'(4 * i), q);
      `TB_CHECK(q == 0, $sformatf("counter %0d zero after reset", i))
    end
    for (int round = 0; round < 4; round++) begin
      events(200 + 100 * round);
      for (int i = 0; i < 6; i++) begin
        ahb_read(32'(4 * i), q);
        `TB_CHECK(q == 32'(model[i]), $sformatf("round %0d counter %0d = %0d, model %0d", round, i, q, model[i]))
      end
      if (round == 2) begin
        ahb_write(32'h1C, 32'h0);   // bit 0 clear: no effect
        ahb_read(32'h00, q);
        `TB_CHECK(q == 32'(model[0]), "CTRL write without bit 0 keeps counters")
        ahb_write(32'h1C, 32'h1);
        for (int i = 0; i < 6; i++) begin
          ahb_read(32'(4 * i), q);
          `TB_CHECK(q == 0, $sformatf("counter %0d cleared", i))
          model[i] = 0;
        end
      end
    end
    for (int s = 0; s < 8; s++) begin
      {rxf_overflow, nav_busy, medium_busy} = 3'(s);
      ahb_read(32'h18, q);
      `TB_CHECK(q == 32'(s), $sformatf("STATUS = %0h for inputs %0h", q, s))
    end
    `TB_FINISH
  end
endmodule
