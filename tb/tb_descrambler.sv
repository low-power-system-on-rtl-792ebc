// Testbench for the scrambler used as the receive-path descrambler: data is
// scrambled here with a reference x^7+x^4+1 generator and a random seed,
// fed to the block loaded with the same seed, and must come back unchanged;
// a second train with another seed checks re-initialisation, with random
// output stalls holding the register.
`include "tb/tb_util.svh"
module tb_descrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic load, iv, ir, ib, ov, orr, ob;
  logic [6:0] seed;
  scrambler dut (.clk, .rst_n, .load, .seed, .in_valid(iv), .in_ready(ir), .in_bit(ib),
                 .out_valid(ov), .out_ready(orr), .out_bit(ob));

  task automatic train(logic [6:0] sd, int n);
    logic [6:0] s;
    logic d, f;
    int i;
    s = sd; seed = sd; load = 1; @(negedge clk); load = 0;
    i = 0;
    while (i < n) begin
      d = 1'($urandom);
      f = s[6] ^ s[3];
      orr = ($urandom % 4 != 0);
      iv = 1; ib = d ^ f; #1;
      if (orr) begin
        `TB_CHECK(ov && ob == d, $sformatf("seed %0h bit %0d", sd, i))
        s = {s[5:0], f}; i++;
      end else `TB_CHECK(!ir, "stall propagates")
      @(negedge clk);
    end
    iv = 0;
  endtask

  initial begin
    load = 0; iv = 0; ib = 0; orr = 1; seed = 7'h7F;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    train(7'h45, 400);
    train(7'h01, 300);
    `TB_FINISH
  end
endmodule
