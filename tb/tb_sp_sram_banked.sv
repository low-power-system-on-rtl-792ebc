// tb_sp_sram_banked: checks the 16 KB single-port local SRAM at its full
// size against a reference array: random byte-masked writes and reads over
// both banks, one-cycle read latency, and that only the bank holding the
// addressed word is enabled (bank 1 below word 870, bank 2 above).
`include "tb/tb_util.svh"
module tb_sp_sram_banked;
  localparam int WORDS = 4096, B1 = 870;
  logic clk = 0;
  int checks = 0, failures = 0, n_b1 = 0, n_b2 = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(200000)

  logic        req, we;
  logic [3:0]  be;
  logic [31:0] addr, wdata, rdata;
  logic [1:0]  bank_en;
  logic [31:0] ref_mem [WORDS];
  sp_sram_banked u_dut (.clk, .req, .we, .be, .addr, .wdata, .rdata, .bank_en);

  task automatic access(input bit w, input int wa, input logic [3:0] m, input logic [31:0] d);
    @(negedge clk);
    req = 1; we = w; be = m; addr = 32'(wa) << 2; wdata = d;
    #1;
    `TB_CHECK(bank_en == ((wa >= B1) ? 2'b10 : 2'b01), $sformatf("bank enable for word %0d", wa))
    if (bank_en[0]) n_b1++; else n_b2++;
    @(posedge clk);
    @(negedge clk);
    req = 0;
    if (w) begin
      for (int b = 0; b < 4; b++) if (m[b]) ref_mem[wa][8*b +: 8] = d[8*b +: 8];
    end else
      `TB_CHECK(rdata == ref_mem[wa], $sformatf("read word %0d: %h expected %h", wa, rdata, ref_mem[wa]))
  endtask

  initial begin
    req = 0; we = 0; be = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      access(1, i, 4'hF, $urandom);
    end
    #1;
    `TB_CHECK(bank_en == 2'b00, "no bank enabled when idle")
    for (int i = 0; i < 3000; i++) begin
      int wa;
      case (i % 4)
        0: wa = $urandom_range(B1 - 2, B1 + 1);
        1: wa = $urandom_range(0, B1 - 1);
        default: wa = $urandom_range(0, WORDS - 1);
      endcase
      access(1'($urandom_range(0, 1)), wa, 4'($urandom_range(1, 15)), $urandom);
    end
    for (int i = 0; i < WORDS; i += 7) access(0, i, 4'h0, 0);
    `TB_CHECK(n_b1 > 500 && n_b2 > 500, "both banks used")
    `TB_FINISH
  end
endmodule
