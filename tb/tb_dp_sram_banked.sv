// tb_dp_sram_banked: checks the 120 KB dual-port SRAM at its full size.
// Port A is driven as an AHB slave (word, half-word and byte writes,
// back-to-back write then read of the same word), port B as the local
// bus; data written on either port must be read back on the other, and
// each port may enable only the bank holding its word (bank 1 is the
// first 1 KB).
`include "tb/tb_util.svh"
module tb_dp_sram_banked
  import wlan_pkg::*;
;
  localparam int WORDS = 30720, B1 = 256;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_b1 = 0, n_b2 = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000000)

  logic        hsel;
  ahb_m2s_t    m2s;
  ahb_s2m_t    s2m;
  logic        b_req, b_we;
  logic [3:0]  b_be;
  logic [31:0] b_addr, b_wdata, b_rdata;
  logic [1:0]  a_bank_en, b_bank_en;
  logic [31:0] ref_mem [WORDS];

  dp_sram_banked u_dut (.hclk(clk), .hresetn(rst_n), .hsel, .m2s, .hready_in(1'b1), .s2m,
                        .b_req, .b_we, .b_be, .b_addr, .b_wdata, .b_rdata, .a_bank_en, .b_bank_en);

  `include "tb/tb_ahb_tasks.svh"

  always @(posedge clk) begin
    `TB_CHECK(!(a_bank_en == 2'b11) && !(b_bank_en == 2'b11), "one bank per port")
    if (a_bank_en[0] || b_bank_en[0]) n_b1++;
    if (a_bank_en[1] || b_bank_en[1]) n_b2++;
  end

  task automatic b_access(input bit w, input int wa, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    b_req = 1; b_we = w; b_be = 4'hF; b_addr = 32'(wa) << 2; b_wdata = d;
    #1;
    `TB_CHECK(b_bank_en == ((wa >= B1) ? 2'b10 : 2'b01), "port B bank enable")
    @(posedge clk);
    @(negedge clk);
    b_req = 0;
    q = b_rdata;
  endtask

  initial begin
    logic [31:0] q;
    m2s = '0; hsel = 0; b_req = 0; b_we = 0; b_be = 0; b_addr = 0; b_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A writes, B reads
    for (int i = 0; i < 400; i++) begin
      automatic int wa = (i % 2 == 1) ? $urandom_range(0, B1 + 20) : $urandom_range(0, WORDS - 1);
      automatic logic [31:0] d = $urandom;
      ahb_write(32'(wa) << 2, d);
      ref_mem[wa] = d;
      b_access(0, wa, 0, q);
      `TB_CHECK(q == d, $sformatf("B reads A's word %0d: %h expected %h", wa, q, d))
    end
    // B writes, A reads
    for (int i = 0; i < 400; i++) begin
      automatic int wa = (i % 2 == 1) ? $urandom_range(B1 - 20, B1 + 20) : $urandom_range(0, WORDS - 1);
      automatic logic [31:0] d = $urandom;
      b_access(1, wa, d, q);
      ref_mem[wa] = d;
      ahb_read(32'(wa) << 2, q);
      `TB_CHECK(q == d, $sformatf("A reads B's word %0d: %h expected %h", wa, q, d))
    end
    // sub-word AHB writes
    for (int i = 0; i < 300; i++) begin
      automatic int wa = $urandom_range(0, WORDS - 1);
      automatic int bo = $urandom_range(0, 3);
      automatic logic [2:0] sz = 3'($urandom_range(0, 2));
      automatic logic [31:0] d = $urandom;
      logic [31:0] a;
      ahb_write(32'(wa) << 2, 32'h0);
      ref_mem[wa] = 0;
      if (sz == 1) bo = bo & 2;
      if (sz == 2) bo = 0;
      a = (32'(wa) << 2) | 32'(bo);
      ahb_write(a, d, sz);
      for (int b = 0; b < 4; b++)
        if ((sz == 2) || (sz == 1 && (b >> 1) == (bo >> 1)) || (sz == 0 && b == bo))
          ref_mem[wa][8*b +: 8] = d[8*b +: 8];
      ahb_read(32'(wa) << 2, q);
      `TB_CHECK(q == ref_mem[wa], $sformatf("size %0d write at %h: %h expected %h", sz, a, q, ref_mem[wa]))
    end
    // pipelined write followed directly by a read of the same word
    for (int i = 0; i < 100; i++) begin
      automatic int wa = $urandom_range(0, WORDS - 1);
      automatic logic [31:0] d = $urandom;
      @(negedge clk);
      m2s.haddr = 32'(wa) << 2; m2s.htrans = HT_NONSEQ; m2s.hwrite = 1; m2s.hsize = 3'd2; hsel = 1;
      @(negedge clk);
      m2s.hwdata = d; m2s.hwrite = 0;          // read of the same word in the write's data phase
      @(negedge clk);
      ahb_idle();
      `TB_CHECK(s2m.hrdata == d, $sformatf("write-then-read forwarding word %0d: %h expected %h", wa, s2m.hrdata, d))
      ref_mem[wa] = d;
    end
    `TB_CHECK(n_b1 > 100 && n_b2 > 100, "both banks used")
    `TB_FINISH
  end
endmodule
