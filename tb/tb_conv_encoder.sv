// Testbench for conv_encoder: random bits with random output stalls; each
// output pair is compared with a reference encoder built directly from the
// octal generators 133/171; checks the six tail pairs and out_last.
`include "tb/tb_util.svh"
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv, ir, ib, il, ov, orr, ol;
  logic [1:0] op;
  conv_encoder dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_bit(ib), .in_last(il),
                    .out_valid(ov), .out_ready(orr), .out_pair(op), .out_last(ol));

  localparam int N = 200;
  logic data [N];
  logic [6:0] r;   // r[6] = current input, r[0] = oldest
  int sent, got;

  initial begin
    for (int i = 0; i < N; i++) data[i] = 1'($urandom);
    iv = 0; ib = 0; il = 0; orr = 0; r = '0; sent = 0; got = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (got < N + 6) begin
      @(negedge clk);
      iv = (sent < N) && ($urandom % 4 != 0);
      ib = (sent < N) ? data[sent] : 1'b0;
      il = (sent == N - 1);
      orr = ($urandom % 3 != 0);
      #1;
      if (ov && orr) begin
        logic u;
        u = (got < N) ? data[got] : 1'b0;
        r = {u, r[6:1]};
        `TB_CHECK(op[0] == ^(r & 7'o133) && op[1] == ^(r & 7'o171), $sformatf("pair %0d", got))
        `TB_CHECK(ol == (got == N + 5), "out_last position")
        if (got >= N) `TB_CHECK(!ir, "input refused during tail")
        got++;
      end
      if (iv && ir) sent++;
    end
    @(negedge clk); iv = 0; orr = 1; #1;
    `TB_CHECK(!ov, "no output after tail")
    `TB_FINISH
  end
endmodule
