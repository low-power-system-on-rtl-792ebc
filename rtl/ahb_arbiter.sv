// ahb_arbiter: AMBA AHB bus arbiter. Grants the bus to one master at a
// time with fixed priority: the highest-numbered requesting master wins, so
// the DMA controller, connected as the last master, has the highest
// priority. With no request the bus is parked on master 0 (the protocol
// processor). The grant is re-evaluated only on cycles with HREADY high, and
// `hmaster` follows the grant at that point, so that the address phase on
// the bus always belongs to the granted master. Locked transfers and
// split/retry are not supported.
//
// Lint note: the grant-stability assertion uses the asynchronous reset in
// `disable iff`, which some tools report as a mixed synchronous and
// asynchronous use of the reset net; the check is for simulation only.
module ahb_arbiter #(
  parameter int unsigned NM = 3
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic [NM-1:0]         hbusreq,
  input  logic                  hready,
  output logic [NM-1:0]         hgrant,
  output logic [$clog2(NM)-1:0] hmaster
);
  logic [$clog2(NM)-1:0] next_m;

  always_comb begin
    next_m = '0;
    for (int m = 0; m < int'(NM); m++) if (hbusreq[m]) next_m = ($clog2(NM))'(m);
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    hmaster <= '0;
    else if (hready) hmaster <= next_m;
  end

  always_comb begin
    hgrant = '0;
    hgrant[hmaster] = 1'b1;
  end

  // the grant only moves on a ready cycle
  a_grant_stable: assert property (@(posedge hclk) disable iff (!hresetn)
                                   !hready |=> $stable(hmaster));
endmodule
