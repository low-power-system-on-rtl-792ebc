// scrambler: data scrambler of the transmit path and, the operation being
// its own inverse, the data descrambler of the receive path.
//
// A 7-bit linear feedback shift register with generator x^7 + x^4 + 1 (the
// polynomial of both HIPERLAN/2 and IEEE 802.11a) produces a pseudo-random
// sequence that is XORed onto the bit stream. The two standards differ only
// in how the register is initialised, so the seed is an input: `load` copies
// `seed` into the register (it must not be all zeros).
//
// Interface: bit stream in/out with valid/ready; the stage is combinational
// (zero latency), the register advances on each accepted bit.
module scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [6:0] seed,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit
);
  logic [6:0] lfsr;
  logic       fb;

  assign fb        = lfsr[6] ^ lfsr[3];
  assign out_bit   = in_bit ^ fb;
  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     lfsr <= 7'h7F;
    else if (load)                  lfsr <= seed;
    else if (in_valid && out_ready) lfsr <= {lfsr[5:0], fb};
  end
endmodule
