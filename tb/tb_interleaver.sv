// Testbench for interleaver (DEINT = 0): for each modulation, sends one
// symbol of random bits and checks each output position against the
// standard two-step permutation computed here, independently of the
// package: i = (N/16)(k mod 16) + floor(k/16),
// j = s floor(i/s) + (i + N - floor(16 i / N)) mod s, s = max(Nbpsc/2, 1).
// Also checks the 2N-cycle symbol time without stalls.
`include "tb/tb_util.svh"
module tb_interleaver;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ib, ov, ob;
  mod_t md;
  interleaver #(.DEINT(1'b0)) dut (.clk, .rst_n, .modulation(md), .in_valid(iv), .in_ready(ir),
      .in_bit(ib), .out_valid(ov), .out_ready(1'b1), .out_bit(ob));

  logic din [288];
  logic exp_o [288];

  task automatic sym(mod_t m, int nb);
    int n, s, i, j, cyc;
    n = 48 * nb; s = (nb / 2 > 1) ? nb / 2 : 1;
    md = m;
    for (int k = 0; k < n; k++) begin
      din[k] = 1'($urandom);
      i = (n / 16) * (k % 16) + k / 16;
      j = s * (i / s) + (i + n - (16 * i) / n) % s;
      exp_o[j] = din[k];
    end
    cyc = 0;
    for (int k = 0; k < n; k++) begin iv = 1; ib = din[k]; @(negedge clk); cyc++; end
    iv = 0;
    for (int k = 0; k < n; k++) begin
      #1; `TB_CHECK(ov && ob == exp_o[k], $sformatf("nbpsc %0d position %0d", nb, k))
      @(negedge clk); cyc++;
    end
    #1; `TB_CHECK(!ov && cyc == 2 * n, "symbol takes 2N cycles")
  endtask

  initial begin
    iv = 0; ib = 0; md = MOD_BPSK;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    sym(MOD_BPSK, 1); sym(MOD_QPSK, 2); sym(MOD_16QAM, 4); sym(MOD_64QAM, 6);
    `TB_FINISH
  end
endmodule
