// Testbench for viterbi_decoder: a reference encoder in the testbench
// (generators 133/171 octal) encodes random frames with six zero tail bits;
// frames are sent clean, with isolated bit errors, and with 3/4-rate
// erasures plus errors. Every decoded bit, the tail and out_last are
// checked, and the flush length (min(N, D) cycles) is timed.
`include "tb/tb_util.svh"
module tb_viterbi_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(100000)

  logic iv, ir, il, ov, ob, ol;
  logic [1:0] ip, ie;
  viterbi_decoder dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_pair(ip), .in_erase(ie),
                       .in_last(il), .out_valid(ov), .out_bit(ob), .out_last(ol));

  logic data [$];
  logic dec  [$];
  always @(posedge clk) if (ov) dec.push_back(ob);

  task automatic frame(int n, int err_every, bit punct);
    logic [6:0] r;
    logic [1:0] p, e;
    int pos, t0;
    data.delete(); dec.delete();
    r = '0;
    for (int i = 0; i < n + 6; i++) data.push_back((i < n) ? 1'($urandom) : 1'b0);
    for (int i = 0; i < n + 6; i++) begin
      @(negedge clk);
      r = {data[i], r[6:1]};
      p = {^(r & 7'o171), ^(r & 7'o133)};
      e = 2'b00;
      if (punct) begin
        pos = i % 3;
        if (pos == 2) e[0] = 1'b1;
        if (pos == 1) e[1] = 1'b1;
        if (e[0]) p[0] = 1'($urandom);
        if (e[1]) p[1] = 1'($urandom);
      end
      if (err_every > 0 && i % err_every == err_every / 2) begin
        if (!e[0]) p[0] = ~p[0]; else p[1] = ~p[1];
      end
      iv = 1; ip = p; ie = e; il = (i == n + 5);
      #1; `TB_CHECK(ir, "decoder ready while receiving")
    end
    @(negedge clk); iv = 0; il = 0;
    t0 = 0;
    while (dec.size() < n + 6 && t0 < 200) begin @(negedge clk); t0++; end
    `TB_CHECK(t0 <= 64, $sformatf("flush took %0d cycles", t0))
    `TB_CHECK(dec.size() == n + 6, $sformatf("decoded %0d of %0d bits", dec.size(), n + 6))
    for (int i = 0; i < n + 6 && i < dec.size(); i++)
      `TB_CHECK(dec[i] == data[i], $sformatf("n=%0d err=%0d p=%0d bit %0d", n, err_every, punct, i))
    @(negedge clk);
  endtask

  initial begin
    iv = 0; ip = 0; ie = 0; il = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    frame(300, 0, 0);
    frame(300, 40, 0);
    frame(20, 0, 0);      // shorter than the survivor depth
    frame(300, 0, 1);
    frame(300, 60, 1);
    `TB_FINISH
  end
endmodule
