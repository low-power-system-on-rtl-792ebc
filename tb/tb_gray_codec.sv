// tb_gray_codec: checks the Gray encoder/decoder pair used on the local-bus
// address lines. Random words must round-trip, the word address must be
// Gray coded with the byte offset left alone, and consecutive word
// addresses must differ in exactly one encoded line.
`include "tb/tb_util.svh"
module tb_gray_codec;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(100000)

  logic [31:0] a, g, back, g_prev;
  gray_codec #(.W(32), .DECODE(1'b0)) u_enc (.in_bus(a), .out_bus(g));
  gray_codec #(.W(32), .DECODE(1'b1)) u_dec (.in_bus(g), .out_bus(back));

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; #1;
      `TB_CHECK(back == a, $sformatf("round trip %h -> %h -> %h", a, g, back))
      `TB_CHECK(g == {a[31:2] ^ (a[31:2] >> 1), a[1:0]}, "word address is binary-reflected Gray, byte offset unchanged")
    end
    a = $urandom; #1; g_prev = g;
    for (int i = 0; i < 300; i++) begin
      a = a + 4; #1;
      `TB_CHECK($countones(g ^ g_prev) == 1, $sformatf("sequential step %h toggles %0d lines", a, $countones(g ^ g_prev)))
      g_prev = g;
    end
    `TB_FINISH
  end
endmodule
