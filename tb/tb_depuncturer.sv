// Testbench for depuncturer: punctures random pairs in the testbench with
// the pattern strings of each rate, feeds the surviving bits, and checks
// that every kept bit returns in its place and every deleted one is flagged
// as an erasure.
`include "tb/tb_util.svh"
module tb_depuncturer;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(40000)

  logic clear, iv, ir, ib, ov, orr;
  logic [1:0] op, oe;
  crate_t rate;
  depuncturer dut (.clk, .rst_n, .clear, .rate, .in_valid(iv), .in_ready(ir), .in_bit(ib),
                   .out_valid(ov), .out_ready(orr), .out_pair(op), .out_erase(oe));

  localparam int NP = 144;
  logic [1:0] pairs [NP];
  logic bits [$];

  task automatic run(crate_t r, string pa, string pb);
    int sent, got, per;
    logic [1:0] ke;
    per = pa.len();
    bits.delete();
    for (int i = 0; i < NP; i++) begin
      pairs[i] = 2'($urandom);
      if (pa[i % per] == "1") bits.push_back(pairs[i][0]);
      if (pb[i % per] == "1") bits.push_back(pairs[i][1]);
    end
    rate = r; clear = 1; @(negedge clk); clear = 0;
    sent = 0; got = 0;
    while (got < NP) begin
      iv = (sent < bits.size()) && ($urandom % 4 != 0);
      ib = (sent < bits.size()) ? bits[sent] : 1'b0;
      orr = ($urandom % 4 != 0);
      #1;
      if (ov && orr) begin
        ke = {pb[got % per] == "1", pa[got % per] == "1"};
        `TB_CHECK(oe == ~ke, $sformatf("rate %0d erasures of pair %0d", r, got))
        `TB_CHECK((!ke[0] || op[0] == pairs[got][0]) && (!ke[1] || op[1] == pairs[got][1]),
                  $sformatf("rate %0d data of pair %0d", r, got))
        got++;
      end
      if (iv && ir) sent++;
      @(negedge clk);
    end
    `TB_CHECK(sent == bits.size(), "all punctured bits consumed")
    iv = 0;
  endtask

  initial begin
    clear = 0; iv = 0; ib = 0; orr = 0; rate = CR_1_2;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    run(CR_1_2, "1", "1");
    run(CR_2_3, "11", "10");
    run(CR_3_4, "110", "101");
    run(CR_9_16, "111101111", "111111110");
    `TB_FINISH
  end
endmodule
