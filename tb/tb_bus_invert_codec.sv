// tb_bus_invert_codec: checks the bus-invert encoder/decoder pair used on
// the local-bus data lines. Every word must round-trip, at most W/2 + 1 of
// the W + 1 lines may toggle per transfer, and the invert line must be used
// whenever more than half of the data lines would otherwise change.
`include "tb/tb_util.svh"
module tb_bus_invert_codec;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_inv = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(100000)

  logic        valid;
  logic [31:0] d, bus, back, bus_prev;
  logic        inv, inv_prev, inv_back;
  bus_invert_codec #(.W(32), .DECODE(1'b0)) u_enc (.clk, .rst_n, .valid, .in_bus(d), .in_inv(1'b0),
                                                   .out_bus(bus), .out_inv(inv));
  bus_invert_codec #(.W(32), .DECODE(1'b1)) u_dec (.clk, .rst_n, .valid, .in_bus(bus), .in_inv(inv),
                                                   .out_bus(back), .out_inv(inv_back));

  initial begin
    valid = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    bus_prev = '0; inv_prev = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // mix of random words and words far from the previous one
      case (i % 3)
        0: d = $urandom;
        1: d = ~bus_prev ^ (32'h1 << (i % 32));
        default: d = bus_prev ^ 32'h0000_00FF;
      endcase
      valid = 1'b1;
      #1;
      `TB_CHECK(back == d, $sformatf("round trip %h -> %h", d, back))
      `TB_CHECK($countones(bus ^ bus_prev) + (inv != inv_prev) <= 17,
                $sformatf("too many toggles for %h", d))
      `TB_CHECK(inv == ($countones(d ^ bus_prev) > 16), "invert decision")
      if (inv) n_inv++;
      @(posedge clk);
      bus_prev = bus; inv_prev = inv;
    end
    `TB_CHECK(n_inv > 100, "invert line exercised")
    `TB_FINISH
  end
endmodule
