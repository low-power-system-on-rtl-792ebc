// tb_ahb_decoder: checks the AHB address decoder at its default memory
// map: one select per region, none outside the regions, and the default
// slave selected exactly when no region matches.
`include "tb/tb_util.svh"
module tb_ahb_decoder;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(100000)

  logic [31:0] haddr;
  logic [4:0]  hsel;
  logic        hdef;
  ahb_decoder u_dut (.haddr, .hsel, .hsel_default(hdef));

  function automatic logic [4:0] model(logic [31:0] a);
    logic [4:0] s;
    s[0] = (a >= 32'h2000_0000 && a < 32'h2002_0000);
    s[1] = (a >= 32'h4000_0000 && a < 32'h4000_1000);
    s[2] = (a >= 32'h4000_1000 && a < 32'h4000_2000);
    s[3] = (a >= 32'h4000_2000 && a < 32'h4000_3000);
    s[4] = (a >= 32'h4000_3000 && a < 32'h4000_4000);
    return s;
  endfunction

  initial begin
    automatic logic [31:0] bases [5] = '{32'h2000_0000, 32'h4000_0000, 32'h4000_1000, 32'h4000_2000, 32'h4000_3000};
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 1) haddr = $urandom;
      else haddr = bases[$urandom_range(0, 4)] + ($urandom & 32'h0001_FFFF) - 32'h10;
      #1;
      `TB_CHECK(hsel == model(haddr), $sformatf("select for %h: %b", haddr, hsel))
      `TB_CHECK($countones(hsel) + hdef == 1, "exactly one slave selected")
    end
    `TB_FINISH
  end
endmodule
