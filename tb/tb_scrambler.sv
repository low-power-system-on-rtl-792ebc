// Testbench for scrambler: compares against a reference LFSR written from
// the generator x^7+x^4+1, checks the 127-bit period, and checks that
// scrambling twice with the same seed restores the data.
`include "tb/tb_util.svh"
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(5000)

  logic load, iv, ir, ib, ov, ob;
  logic [6:0] seed;
  scrambler dut (.clk, .rst_n, .load, .seed, .in_valid(iv), .in_ready(ir), .in_bit(ib),
                 .out_valid(ov), .out_ready(1'b1), .out_bit(ob));

  logic [6:0] ref_s;
  logic seq [254];
  logic din [300];
  logic ref_b;
  initial begin
    load = 0; iv = 0; ib = 0; seed = 7'h5D;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    ref_s = 7'h5D;
    for (int i = 0; i < 254; i++) begin
      iv = 1; ib = 0;
      ref_b = ref_s[6] ^ ref_s[3];
      #1;
      `TB_CHECK(ov == 1 && ob == ref_b, $sformatf("sequence bit %0d", i))
      seq[i] = ob;
      ref_s = {ref_s[5:0], ref_b};
      @(negedge clk);
    end
    for (int i = 0; i < 127; i++) `TB_CHECK(seq[i] == seq[i+127], "period 127")
    // the all-ones seed starts with the known 802.11a sequence 00001110 11110010
    load = 1; seed = 7'h7F; iv = 0; @(negedge clk); load = 0;
    begin
      logic [15:0] exp_seq = 16'b0000111011110010; // first bit at [15]
      for (int i = 0; i < 16; i++) begin
        iv = 1; ib = 0; #1;
        `TB_CHECK(ob == exp_seq[15-i], $sformatf("all-ones seed bit %0d", i))
        @(negedge clk);
      end
    end
    // involution: scramble random data, descramble, compare
    load = 1; seed = 7'h33; @(negedge clk); load = 0;
    for (int i = 0; i < 300; i++) begin din[i] = 1'($urandom); ib = din[i]; iv = 1; #1; seq[i % 254] = ob; @(negedge clk);
      if (i == 253) break; end
    load = 1; @(negedge clk); load = 0;
    for (int i = 0; i < 254; i++) begin ib = seq[i]; iv = 1; #1;
      `TB_CHECK(ob == din[i], "descramble restores data"); @(negedge clk); end
    iv = 0;
    `TB_FINISH
  end
endmodule
