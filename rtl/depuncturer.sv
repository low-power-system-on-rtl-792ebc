// depuncturer: the receiver's depuncture units. Rebuilds rate-1/2 pairs from
// the punctured serial bit stream, inserting an erasure where the
// transmitter deleted a bit, so the Viterbi decoder can ignore that position.
//
// Uses the same pattern table as the puncturer (1/2, 2/3, 3/4 and the
// HIPERLAN/2 9/16). Each pair is assembled over one to two cycles (one cycle
// per pattern slot, consuming an input bit only for a kept slot) and then
// offered at the output.
//
// Interface: serial bits in (valid/ready); pairs out as {b, a} with erasure
// flags {eb, ea} (valid/ready). `clear` restarts the pattern.
module depuncturer
  import wlan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  crate_t     rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [1:0] out_pair,
  output logic [1:0] out_erase
);
  logic       phase;        // 0: filling A, 1: filling B
  logic       full;
  logic [1:0] pair_q, era_q;
  logic [3:0] pos;
  logic       keep_now;

  assign keep_now  = phase ? punct_keep_b(rate, 32'(pos)) : punct_keep_a(rate, 32'(pos));
  assign in_ready  = !full && keep_now;
  assign out_valid = full;
  assign out_pair  = pair_q;
  assign out_erase = era_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0; full <= 1'b0; pair_q <= '0; era_q <= '0; pos <= '0;
    end else if (clear) begin
      phase <= 1'b0; full <= 1'b0; pos <= '0;
    end else if (full) begin
      if (out_ready) begin
        full <= 1'b0;
        pos  <= (int'(pos) + 1 >= int'(punct_period(rate))) ? 4'd0 : pos + 4'd1;
      end
    end else if (!keep_now || in_valid) begin
      pair_q[phase] <= keep_now ? in_bit : 1'b0;
      era_q[phase]  <= !keep_now;
      phase         <= !phase;
      if (phase) full <= 1'b1;
    end
  end
endmodule
