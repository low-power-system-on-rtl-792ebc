// Testbench for puncturer: for each code rate, feeds random pairs and checks
// the output bit sequence against the deletion patterns written out as
// strings (rate 1/2, 2/3, 3/4 and HIPERLAN/2 9/16), and the output count
// (rate r: N pairs -> N/r... i.e. 2N * (1/2) / r bits).
`include "tb/tb_util.svh"
module tb_puncturer;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(40000)

  logic clear, iv, ir, il, ov, orr, ob, ol;
  logic [1:0] ip;
  crate_t rate;
  puncturer dut (.clk, .rst_n, .clear, .rate, .in_valid(iv), .in_ready(ir), .in_pair(ip),
                 .in_last(il), .out_valid(ov), .out_ready(orr), .out_bit(ob), .out_last(ol));

  localparam int NP = 144;   // divisible by 1, 2, 3 and 9
  logic [1:0] pairs [NP];
  logic expq [$];

  task automatic run(crate_t r, string pa, string pb, int exp_bits);
    int sent, got, per;
    per = pa.len();
    expq.delete();
    for (int i = 0; i < NP; i++) begin
      pairs[i] = 2'($urandom);
      if (pa[i % per] == "1") expq.push_back(pairs[i][0]);
      if (pb[i % per] == "1") expq.push_back(pairs[i][1]);
    end
    `TB_CHECK(expq.size() == exp_bits, "reference bit count")
    rate = r; clear = 1; @(negedge clk); clear = 0;
    sent = 0; got = 0;
    while (got < exp_bits) begin
      iv = (sent < NP) && ($urandom % 4 != 0);
      ip = (sent < NP) ? pairs[sent] : 2'b00;
      il = (sent == NP - 1);
      orr = ($urandom % 4 != 0);
      #1;
      if (ov && orr) begin
        `TB_CHECK(ob == expq[got], $sformatf("rate %0d bit %0d", r, got))
        `TB_CHECK(ol == (got == exp_bits - 1), "out_last")
        got++;
      end
      if (iv && ir) sent++;
      @(negedge clk);
    end
    iv = 0; repeat (4) @(negedge clk);
    `TB_CHECK(!ov, "no extra output bits")
  endtask

  initial begin
    clear = 0; iv = 0; ip = 0; il = 0; orr = 0; rate = CR_1_2;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    run(CR_1_2, "1", "1", 288);
    run(CR_2_3, "11", "10", 216);
    run(CR_3_4, "110", "101", 192);
    run(CR_9_16, "111101111", "111111110", 256);
    `TB_FINISH
  end
endmodule
