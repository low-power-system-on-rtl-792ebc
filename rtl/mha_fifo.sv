// mha_fifo: synchronous first-in first-out buffer of the MAC hardware
// accelerator, used as the receive FIFO that carries payload octets from
// rx_data towards the defragmentation stage and the system bus. Valid/ready
// handshakes on both sides; an item written into a full FIFO is dropped
// and sets the sticky `overflow` flag, because rx_data has no way to hold
// the modem back. `clear` empties the FIFO and clears the flag. `level`
// reports the number of stored items.
module mha_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic                       overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (32'(level) < DEPTH);
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wp <= '0; rp <= '0; level <= '0; overflow <= 1'b0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      level <= level + ($bits(level))'(push) - ($bits(level))'(pop);
      if (in_valid && !in_ready) overflow <= 1'b1;
    end
  end
endmodule
