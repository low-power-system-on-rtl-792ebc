// Testbench for symbol_mapper: for each modulation, random bits fill one
// symbol; the 64 output bins are checked against the Gray tables of the
// standards written out here, the data-carrier numbering -26..26 without
// 0 and +-7, +-21, the pilot values and the zero DC/guard bins.
`include "tb/tb_util.svh"
module tb_symbol_mapper;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ib, ov, of;
  mod_t md;
  cplx16_t ob;
  symbol_mapper dut (.clk, .rst_n, .modulation(md), .in_valid(iv), .in_ready(ir), .in_bit(ib),
                     .out_valid(ov), .out_ready(1'b1), .out_bin(ob), .out_first(of));

  int exp_re [64], exp_im [64];
  int lv2 [4] = '{-3, -1, 3, 1};                       // index {b0,b1}: 00,01,10,11
  int lv3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};        // index {b0,b1,b2}

  function automatic int lvl(logic b[], int off, int nb);
    if (nb == 1) return b[off] ? 1 : -1;
    if (nb == 2) return lv2[{b[off], b[off+1]}];
    return lv3[{b[off], b[off+1], b[off+2]}];
  endfunction

  task automatic sym(mod_t m, int nb);
    logic bits [];
    int sc, bin, d, h;
    bits = new[48 * nb];
    foreach (bits[i]) bits[i] = 1'($urandom);
    for (int b = 0; b < 64; b++) begin exp_re[b] = 0; exp_im[b] = 0; end
    d = 0;
    h = (nb == 1) ? 1 : nb / 2;
    for (sc = -26; sc <= 26; sc++) begin
      if (sc == 0 || sc == 7 || sc == -7 || sc == 21 || sc == -21) continue;
      bin = (sc < 0) ? sc + 64 : sc;
      exp_re[bin] = 256 * lvl(bits, d * nb, h);
      exp_im[bin] = (nb == 1) ? 0 : 256 * lvl(bits, d * nb + h, h);
      d++;
    end
    exp_re[43] = 256; exp_re[57] = 256; exp_re[7] = 256; exp_re[21] = -256;
    md = m;
    foreach (bits[i]) begin iv = 1; ib = bits[i]; @(negedge clk); end
    iv = 0;
    for (int b = 0; b < 64; b++) begin
      #1; `TB_CHECK(ov && int'(ob.re) == exp_re[b] && int'(ob.im) == exp_im[b] && of == (b == 0),
                    $sformatf("nbpsc %0d bin %0d got %0d,%0d want %0d,%0d", nb, b, ob.re, ob.im, exp_re[b], exp_im[b]))
      @(negedge clk);
    end
  endtask

  initial begin
    iv = 0; ib = 0; md = MOD_BPSK;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    sym(MOD_BPSK, 1); sym(MOD_QPSK, 2); sym(MOD_16QAM, 4); sym(MOD_64QAM, 6);
    `TB_FINISH
  end
endmodule
