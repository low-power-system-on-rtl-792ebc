// Testbench for the deinterleaver (interleaver with DEINT = 1): builds the
// transmitted order of a symbol with the standard permutation written out
// here, feeds it, and checks that the original coded-bit order comes back,
// for all four modulations.
`include "tb/tb_util.svh"
module tb_deinterleaver;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ib, ov, ob;
  mod_t md;
  interleaver #(.DEINT(1'b1)) dut (.clk, .rst_n, .modulation(md), .in_valid(iv), .in_ready(ir),
      .in_bit(ib), .out_valid(ov), .out_ready(1'b1), .out_bit(ob));

  logic orig [288];
  logic tx [288];

  task automatic sym(mod_t m, int nb);
    int n, s, i, j;
    n = 48 * nb; s = (nb / 2 > 1) ? nb / 2 : 1;
    md = m;
    for (int k = 0; k < n; k++) begin
      orig[k] = 1'($urandom);
      i = (n / 16) * (k % 16) + k / 16;
      j = s * (i / s) + (i + n - (16 * i) / n) % s;
      tx[j] = orig[k];
    end
    for (int k = 0; k < n; k++) begin iv = 1; ib = tx[k]; #1; `TB_CHECK(ir, "ready while filling") @(negedge clk); end
    iv = 0;
    for (int k = 0; k < n; k++) begin
      #1; `TB_CHECK(ov && ob == orig[k], $sformatf("nbpsc %0d bit %0d", nb, k))
      @(negedge clk);
    end
  endtask

  initial begin
    iv = 0; ib = 0; md = MOD_BPSK;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    sym(MOD_64QAM, 6); sym(MOD_16QAM, 4); sym(MOD_QPSK, 2); sym(MOD_BPSK, 1);
    `TB_FINISH
  end
endmodule
