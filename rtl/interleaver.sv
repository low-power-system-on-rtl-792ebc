// interleaver: block (de)interleaver over the coded bits of one OFDM symbol.
//
// N = 48, 96, 192 or 288 bits per symbol (set by `modulation`). The
// permutation is the two-step one of HIPERLAN/2 and IEEE 802.11a: adjacent
// coded bits go to non-adjacent subcarriers, then alternate between more and
// less significant constellation bits. With DEINT = 0 input bit k is stored
// at position j(k) and the buffer is read out in order; with DEINT = 1 the
// inverse index is used, which undoes the permutation in the receiver.
//
// Timing: the block fills its N-bit buffer (one bit per cycle, valid/ready),
// then empties it (one bit per cycle); input is refused while emptying, so a
// symbol takes 2N cycles. `modulation` must be stable for a whole symbol.
module interleaver
  import wlan_pkg::*;
#(
  parameter bit DEINT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  mod_t modulation,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);
  logic [287:0] buf_q;
  logic [8:0]   cnt;
  logic         draining;
  logic [8:0]   n;
  logic [8:0]   wpos;

  assign n         = 9'(ncbps(modulation));
  assign wpos      = DEINT ? 9'(dil_index(32'(cnt), modulation)) : 9'(ilv_index(32'(cnt), modulation));
  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_bit   = buf_q[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q    <= '0;
      cnt      <= '0;
      draining <= 1'b0;
    end else if (!draining) begin
      if (in_valid) begin
        buf_q[wpos] <= in_bit;
        if (cnt == n - 9'd1) begin cnt <= '0; draining <= 1'b1; end
        else cnt <= cnt + 9'd1;
      end
    end else if (out_ready) begin
      if (cnt == n - 9'd1) begin cnt <= '0; draining <= 1'b0; end
      else cnt <= cnt + 9'd1;
    end
  end
endmodule
