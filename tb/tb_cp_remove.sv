// Testbench for cp_remove: a stream of 80-sample symbols (sym_start on the
// first sample of the first one, and again after a realignment); checks that
// exactly samples 16..79 of each symbol pass, in order, with out_first.
`include "tb/tb_util.svh"
module tb_cp_remove;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ss, ov, of;
  cplx16_t id, od;
  cp_remove dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .sym_start(ss),
                 .out_valid(ov), .out_ready(1'b1), .out_data(od), .out_first(of));

  initial begin
    int kept;
    iv = 0; id = '0; ss = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    // junk before the first symbol start
    for (int i = 0; i < 7; i++) begin iv = 1; id = 32'($urandom); @(negedge clk); end
    for (int sym = 0; sym < 5; sym++) begin
      kept = 0;
      for (int n = 0; n < 80; n++) begin
        iv = 1; id = {16'(sym), 16'(n)}; ss = (n == 0) && (sym == 0 || sym == 3);
        #1;
        `TB_CHECK(ov == (n >= 16), $sformatf("sym %0d sample %0d kept=%0d", sym, n, ov))
        if (ov) begin `TB_CHECK(od == id && of == (n == 16), "data and out_first"); kept++; end
        @(negedge clk);
      end
      `TB_CHECK(kept == 64, "64 samples per symbol")
    end
    `TB_FINISH
  end
endmodule
