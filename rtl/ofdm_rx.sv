// ofdm_rx: data and frequency domains of the baseband modem's receive path
// after synchronisation - cyclic prefix extractor, 64-point FFT,
// constellation decoder, deinterleaver, depuncture units, Viterbi decoder
// and data descrambler - from aligned 80-sample symbols to the PDU bits.
//
// `start` begins a PDU train: it loads the descrambler seed, restarts the
// depuncturing pattern, and takes the train length `n_bits` (data bits,
// known to the receiver from the PHY header). The first sample given after
// `start` (with `sym_start`) is the first sample of an OFDM symbol. Coded
// pairs after the n_bits + 6 that carry data and tail bits are padding and
// are dropped; the decoded data bits leave on `out_bit`, the last one
// flagged `out_last`. The channel is assumed ideal: no channel estimation,
// FEQ or pilot phase correction is applied, so the input must already be
// at the transmit scale.
//
// Lint note: the `first` and `last` markers of some inner streams, and the
// descrambler's ready, are unused because the receive chain keeps its own
// symbol and bit counts.
module ofdm_rx
  import wlan_pkg::*;
#(
  parameter int unsigned VIT_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  seed,
  input  mod_t        modulation,
  input  crate_t      rate,
  input  logic [15:0] n_bits,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx16_t     in_sample,
  input  logic        sym_start,
  output logic        out_valid,
  output logic        out_bit,
  output logic        out_last
);
  logic c_v, c_r, c_f;
  cplx16_t c_d;
  cp_remove u_cpr (.clk, .rst_n, .in_valid, .in_ready, .in_data(in_sample), .sym_start,
                   .out_valid(c_v), .out_ready(c_r), .out_data(c_d), .out_first(c_f));

  logic f_v, f_r, f_f;
  cplx24_t f_d;
  fft64 #(.INVERSE(1'b0)) u_fft (.clk, .rst_n, .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
                                 .out_valid(f_v), .out_ready(f_r), .out_data(f_d), .out_first(f_f));

  logic q_v, q_r, q_b;
  qam_demapper u_dem (.clk, .rst_n, .modulation, .in_valid(f_v), .in_ready(f_r), .in_bin(f_d),
                      .out_valid(q_v), .out_ready(q_r), .out_bit(q_b));

  logic d_v, d_r, d_b;
  interleaver #(.DEINT(1'b1)) u_dil (.clk, .rst_n, .modulation, .in_valid(q_v), .in_ready(q_r), .in_bit(q_b),
                                    .out_valid(d_v), .out_ready(d_r), .out_bit(d_b));

  logic u_v, u_r;
  logic [1:0] u_p, u_e;
  depuncturer u_dep (.clk, .rst_n, .clear(start), .rate, .in_valid(d_v), .in_ready(d_r), .in_bit(d_b),
                     .out_valid(u_v), .out_ready(u_r), .out_pair(u_p), .out_erase(u_e));

  // pair counter: data + tail pairs go to the decoder, padding is dropped
  logic [16:0] pairs;
  logic        dropping;
  logic        v_v, v_r, v_l;
  logic [16:0] n_pairs;
  assign n_pairs  = 17'(n_bits) + 17'd6;
  assign dropping = (pairs >= n_pairs);
  assign v_v      = u_v && !dropping;
  assign v_l      = (pairs == n_pairs - 17'd1);
  assign u_r      = dropping ? 1'b1 : v_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           pairs <= '0;
    else if (start)                       pairs <= '0;
    else if (u_v && u_r && !dropping)     pairs <= pairs + 17'd1;
  end

  logic o_v, o_b, o_l;
  viterbi_decoder #(.D(VIT_DEPTH)) u_vit (.clk, .rst_n, .in_valid(v_v), .in_ready(v_r), .in_pair(u_p),
                                          .in_erase(u_e), .in_last(v_l), .out_valid(o_v), .out_bit(o_b),
                                          .out_last(o_l));

  // only the n_bits data bits are descrambled and delivered
  logic [16:0] dec_cnt;
  logic        is_data;
  logic        ds_b;
  assign is_data = o_v && (dec_cnt < 17'(n_bits));

  logic ds_rdy;  // always 1: the descrambler passes the decoder's pace through
  scrambler u_dscr (.clk, .rst_n, .load(start), .seed, .in_valid(is_data), .in_ready(ds_rdy),
                    .in_bit(o_b), .out_valid(out_valid), .out_ready(1'b1), .out_bit(ds_b));
  assign out_bit  = ds_b;
  assign out_last = is_data && (dec_cnt == 17'(n_bits) - 17'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dec_cnt <= '0;
    else if (start) dec_cnt <= '0;
    else if (o_v)   dec_cnt <= dec_cnt + 17'd1;
  end
endmodule
