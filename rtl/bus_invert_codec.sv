// bus_invert_codec: bus-invert coding for the data lines of the local bus.
// The encoder (DECODE = 0) compares the next word with the value currently
// on the bus lines; if more than half of the W lines would toggle it sends
// the complement and raises the extra `inv` line, so at most W/2 + 1 lines
// change per transfer. The decoder (DECODE = 1) restores the word from the
// bus lines and `inv`. The encoder keeps the last bus value in a register
// updated on every `valid` transfer; the decoder is combinational.
//
// Lint note: one module serves both ends, so the encoder leaves `in_inv`
// unused and the decoder (pure logic) leaves `clk`, `rst_n` and `valid` unused.
module bus_invert_codec #(
  parameter int unsigned W      = 32,
  parameter bit          DECODE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [W-1:0] in_bus,
  input  logic         in_inv,     // decoder: received invert line
  output logic [W-1:0] out_bus,
  output logic         out_inv     // encoder: invert line to send
);
  if (!DECODE) begin : g_enc
    logic [W-1:0] last_bus;
    logic [$clog2(W+2)-1:0] hdist;
    always_comb begin
      hdist = '0;
      for (int i = 0; i < int'(W); i++) hdist += ($clog2(W+2))'(in_bus[i] ^ last_bus[i]);
      out_inv = (32'(hdist) > W / 2);
      out_bus = out_inv ? ~in_bus : in_bus;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     last_bus <= '0;
      else if (valid) last_bus <= out_bus;
    end
  end else begin : g_dec
    assign out_inv = in_inv;
    assign out_bus = in_inv ? ~in_bus : in_bus;
  end
endmodule
