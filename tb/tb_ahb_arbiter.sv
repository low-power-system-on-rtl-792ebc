// tb_ahb_arbiter: checks the fixed-priority AHB arbiter with three masters
// (CPU 0, bridge 1, DMA 2). The highest-numbered requesting master wins,
// the grant is one-hot, it only changes on a ready cycle, and master 0 is
// the default owner when nobody requests.
`include "tb/tb_util.svh"
module tb_ahb_arbiter;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(100000)

  logic [2:0] req, grant;
  logic [1:0] hmaster, exp_m;
  logic       hready;
  ahb_arbiter #(.NM(3)) u_dut (.hclk(clk), .hresetn(rst_n), .hbusreq(req), .hready,
                               .hgrant(grant), .hmaster);

  initial begin
    req = 0; hready = 1; exp_m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      `TB_CHECK(hmaster == exp_m, $sformatf("cycle %0d owner %0d expected %0d", i, hmaster, exp_m))
      `TB_CHECK(grant == (3'b1 << hmaster), "grant is one-hot on the owner")
      req = 3'($urandom); hready = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (hready) exp_m = req[2] ? 2'd2 : req[1] ? 2'd1 : 2'd0;
    end
    `TB_FINISH
  end
endmodule
