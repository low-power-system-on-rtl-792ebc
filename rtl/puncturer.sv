// puncturer: puncture unit that raises the code rate of the rate-1/2 mother
// code by deleting coded bits.
//
// Rates 1/2, 2/3 and 3/4 use the IEEE 802.11a patterns, 9/16 the HIPERLAN/2
// pattern (A: 111101111, B: 111111110), which maps 18 coded bits to 16. A
// pattern position counter advances per input pair and is cleared by
// `clear` at the start of a PDU train. The first, PDU-header puncturing stage
// of HIPERLAN/2 (applied to the first 156 bits) is not included.
//
// Interface: pairs in ({b, a}, valid/ready), serial bits out (valid/ready),
// A before B. A pair is accepted when the one-pair buffer is empty, so a
// pair that keeps both bits takes two output cycles.
module puncturer
  import wlan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  crate_t     rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_pair,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last
);
  logic [1:0] data_q;
  logic [1:0] pend_q;       // bits of the buffered pair still to send
  logic       last_q;
  logic [3:0] pos;

  assign out_valid = (pend_q != 2'b00);
  assign out_bit   = pend_q[0] ? data_q[0] : data_q[1];
  // last bit of the pair that ends the train
  assign out_last  = last_q && (pend_q == 2'b01 || pend_q == 2'b10);
  // buffer frees when empty or when its final bit leaves this cycle
  assign in_ready  = (pend_q == 2'b00) ||
                     (out_ready && (pend_q == 2'b01 || pend_q == 2'b10));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      pend_q <= '0;
      last_q <= 1'b0;
      pos    <= '0;
    end else if (clear) begin
      pend_q <= '0;
      pos    <= '0;
    end else begin
      if (out_valid && out_ready)
        pend_q <= pend_q[0] ? {pend_q[1], 1'b0} : 2'b00;
      if (in_valid && in_ready) begin
        data_q <= in_pair;
        pend_q <= {punct_keep_b(rate, 32'(pos)), punct_keep_a(rate, 32'(pos))};
        last_q <= in_last;
        pos    <= (int'(pos) + 1 >= int'(punct_period(rate))) ? 4'd0 : pos + 4'd1;
      end
    end
  end
endmodule
