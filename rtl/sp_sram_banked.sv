// sp_sram_banked: the single-port 16 KB SRAM of the local bus, partitioned
// into two independently enabled banks (3.4 KB and 12.6 KB in the
// energy-optimised organisation) behind a memory selection block. Only the
// bank that holds the addressed word is enabled for an access, so most
// accesses, concentrated on the small hot range, are served by the small,
// cheaper bank. Bank 1 holds words 0..BANK1_WORDS-1, bank 2 the rest.
//
// Local bus port: request with byte address, write enable and byte
// strobes; read data is registered and valid the cycle after the request
// (no wait states). `bank_en` shows which bank each access enabled.
//
// Lint note: only word accesses exist, so the byte-lane bits and the address
// bits above the memory size are unused.
module sp_sram_banked #(
  parameter int unsigned WORDS       = 4096,   // 16 KB of 32-bit words
  parameter int unsigned BANK1_WORDS = 870     // 3.4 KB (3480 bytes)
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic [1:0]  bank_en
);
  localparam int unsigned B2 = WORDS - BANK1_WORDS;
  localparam int AW = $clog2(WORDS);

  logic [31:0] bank1 [BANK1_WORDS];
  logic [31:0] bank2 [B2];
  logic [AW-1:0] wa;
  logic          sel2;

  assign wa      = addr[AW+1:2];
  assign sel2    = (32'(wa) >= BANK1_WORDS);
  assign bank_en = req ? (sel2 ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk) begin
    if (bank_en[0]) begin
      for (int b = 0; b < 4; b++) if (we && be[b]) bank1[32'(wa)][8*b +: 8] <= wdata[8*b +: 8];
      if (!we) rdata <= bank1[32'(wa)];
    end
    if (bank_en[1]) begin
      for (int b = 0; b < 4; b++) if (we && be[b]) bank2[32'(wa) - BANK1_WORDS][8*b +: 8] <= wdata[8*b +: 8];
      if (!we) rdata <= bank2[32'(wa) - BANK1_WORDS];
    end
  end
endmodule
