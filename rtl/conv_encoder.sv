// conv_encoder: FEC encoder front end - the six-tail-bit appender followed by
// the rate-1/2, constraint-length-7 convolutional encoder.
//
// Generators are g0 = 133 and g1 = 171 (octal), the code shared by
// HIPERLAN/2 and IEEE 802.11a. Each accepted data bit yields one output pair
// {b, a} (a from g0, b from g1). When the bit flagged `in_last` has been
// accepted the encoder stops taking input and emits six more pairs for zero
// tail bits, which returns it to the all-zero state; `out_last` marks the last
// tail pair.
//
// Interface: valid/ready on both sides, one pair per cycle, zero latency.
module conv_encoder
  import wlan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_pair,   // [0] = a (g0), [1] = b (g1)
  output logic       out_last
);
  logic [5:0] st;
  logic [2:0] tail_cnt;          // tail bits still to send
  logic       tailing;
  logic       u;

  assign tailing   = (tail_cnt != 3'd0);
  assign u         = tailing ? 1'b0 : in_bit;
  assign out_valid = tailing || in_valid;
  assign in_ready  = out_ready && !tailing;
  assign out_pair  = conv_out(u, st);
  assign out_last  = (tail_cnt == 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= '0;
      tail_cnt <= '0;
    end else if (out_valid && out_ready) begin
      st <= {st[4:0], u};
      if (tailing)      tail_cnt <= tail_cnt - 3'd1;
      else if (in_last) tail_cnt <= 3'd6;
    end
  end
endmodule
