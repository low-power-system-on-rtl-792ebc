// Testbench for cp_insert: random symbols with random output stalls; checks
// that each 80-sample output is samples 48..63 followed by 0..63, and that
// out_first marks the first prefix sample.
`include "tb/tb_util.svh"
module tb_cp_insert;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ov, orr, of;
  cplx16_t id, od;
  cp_insert dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                 .out_valid(ov), .out_ready(orr), .out_data(od), .out_first(of));
  cplx16_t s [64];

  initial begin
    iv = 0; id = '0; orr = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int sym = 0; sym < 4; sym++) begin
      int n;
      foreach (s[i]) s[i] = 32'($urandom);
      for (int i = 0; i < 64; i++) begin iv = 1; id = s[i]; #1; `TB_CHECK(ir, "ready") @(negedge clk); end
      iv = 0; n = 0;
      while (n < 80) begin
        orr = ($urandom % 3 != 0); #1;
        if (ov && orr) begin
          `TB_CHECK(od == s[(n < 16) ? n + 48 : n - 16] && of == (n == 0), $sformatf("sym %0d sample %0d", sym, n))
          n++;
        end
        @(negedge clk);
      end
      #1; `TB_CHECK(!ov, "exactly 80 samples")
    end
    `TB_FINISH
  end
endmodule
