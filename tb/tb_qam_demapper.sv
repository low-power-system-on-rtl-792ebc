// Testbench for qam_demapper: builds 64 bins from random bits with the Gray
// tables written out here, adds noise smaller than half the decision
// distance, and checks that the demapper returns the bits in order, for all
// four modulations; also checks the 48*Nbpsc output cycle count.
`include "tb/tb_util.svh"
module tb_qam_demapper;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(30000)

  logic iv, ir, ov, ob;
  mod_t md;
  cplx24_t ib;
  qam_demapper dut (.clk, .rst_n, .modulation(md), .in_valid(iv), .in_ready(ir), .in_bin(ib),
                    .out_valid(ov), .out_ready(1'b1), .out_bit(ob));

  int bre [64], bim [64];
  int lv2 [4] = '{-3, -1, 3, 1};
  int lv3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  function automatic int lvl(logic b[], int off, int nb);
    if (nb == 1) return b[off] ? 1 : -1;
    if (nb == 2) return lv2[{b[off], b[off+1]}];
    return lv3[{b[off], b[off+1], b[off+2]}];
  endfunction

  function automatic int noise();
    return $signed($urandom % 401) - 200;   // |noise| < 256
  endfunction

  task automatic sym(mod_t m, int nb);
    logic bits [];
    int sc, bin, d, h, n;
    bits = new[48 * nb];
    foreach (bits[i]) bits[i] = 1'($urandom);
    for (int b = 0; b < 64; b++) begin bre[b] = noise(); bim[b] = noise(); end
    d = 0; h = (nb == 1) ? 1 : nb / 2;
    for (sc = -26; sc <= 26; sc++) begin
      if (sc == 0 || sc == 7 || sc == -7 || sc == 21 || sc == -21) continue;
      bin = (sc < 0) ? sc + 64 : sc;
      bre[bin] += 256 * lvl(bits, d * nb, h);
      if (nb > 1) bim[bin] += 256 * lvl(bits, d * nb + h, h);
      d++;
    end
    md = m;
    for (int b = 0; b < 64; b++) begin iv = 1; ib.re = 24'(bre[b]); ib.im = 24'(bim[b]); @(negedge clk); end
    iv = 0; n = 0;
    while (ov) begin
      `TB_CHECK(n < 48 * nb && ob == bits[n], $sformatf("nbpsc %0d bit %0d", nb, n))
      n++; @(negedge clk); #1;
    end
    `TB_CHECK(n == 48 * nb, $sformatf("emitted %0d bits", n))
  endtask

  initial begin
    iv = 0; ib = '0; md = MOD_BPSK;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    sym(MOD_BPSK, 1); sym(MOD_QPSK, 2); sym(MOD_16QAM, 4); sym(MOD_64QAM, 6);
    `TB_FINISH
  end
endmodule
