// ahb_decoder: AMBA AHB address decoder. Compares the address of each
// transfer with the base/mask pair of every slave and raises that slave's
// select; an address that matches no slave selects the default slave, which
// answers with an ERROR response. Purely combinational.
//
// Default map (this design's choice): slave 0 dual-port SRAM 0x2000_0000
// (128 KB window), slave 1 timers/watchdog/interrupt controller 0x4000_0000,
// slave 2 DMA configuration 0x4000_1000, slave 3 UART 0x4000_2000, slave 4
// MAC accelerator MIB/CSR 0x4000_3000 (4 KB each).
module ahb_decoder #(
  parameter int unsigned NS = 5,
  parameter logic [31:0] BASE [NS] = '{32'h2000_0000, 32'h4000_0000, 32'h4000_1000, 32'h4000_2000,
                                       32'h4000_3000},
  parameter logic [31:0] MASK [NS] = '{32'hFFFE_0000, 32'hFFFF_F000, 32'hFFFF_F000, 32'hFFFF_F000,
                                       32'hFFFF_F000}
) (
  input  logic [31:0]   haddr,
  output logic [NS-1:0] hsel,
  output logic          hsel_default
);
  always_comb begin
    for (int s = 0; s < int'(NS); s++) hsel[s] = ((haddr & MASK[s]) == BASE[s]);
    hsel_default = (hsel == '0);
  end
endmodule
