// ofdm_tx: transmit path of the baseband modem - data scrambler, FEC
// encoder (tail appender, convolutional encoder, puncturer), interleaver,
// constellation encoder with pilot insertion, 64-point IFFT and cyclic
// prefix insertion - from the PDU bit train to 80-sample OFDM symbols.
//
// A PDU train starts with `start` (loads the scrambler seed and restarts
// the puncturing pattern) and ends with the bit flagged `in_last`. After
// the FEC encoder has sent its last tail bit, zero coded bits are added
// until the current OFDM symbol is full, so the train always fills a whole
// number of symbols. Modulation and code rate must stay constant during a
// train. Bits in and samples out use valid/ready.
//
// Lint note: the `first` markers of the mapper and IFFT streams are unused
// because the cyclic-prefix stage counts the 64 samples itself.
module ofdm_tx
  import wlan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] seed,
  input  mod_t       modulation,
  input  crate_t     rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_bit,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx16_t    out_sample,
  output logic       out_first,    // first cyclic-prefix sample of a symbol
  output logic       pad_active    // zero coded bits being added
);
  // scrambler -> encoder
  logic s_v, s_r, s_b;
  scrambler u_scr (.clk, .rst_n, .load(start), .seed, .in_valid, .in_ready, .in_bit,
                   .out_valid(s_v), .out_ready(s_r), .out_bit(s_b));
  logic last_q;  // in_last travels with the bit through the zero-latency scrambler
  assign last_q = in_last;

  logic e_v, e_r, e_l;
  logic [1:0] e_p;
  conv_encoder u_enc (.clk, .rst_n, .in_valid(s_v), .in_ready(s_r), .in_bit(s_b), .in_last(last_q),
                      .out_valid(e_v), .out_ready(e_r), .out_pair(e_p), .out_last(e_l));

  logic p_v, p_r, p_b, p_l;
  puncturer u_pun (.clk, .rst_n, .clear(start), .rate, .in_valid(e_v), .in_ready(e_r), .in_pair(e_p),
                   .in_last(e_l), .out_valid(p_v), .out_ready(p_r), .out_bit(p_b), .out_last(p_l));

  // symbol padding
  logic [8:0] sym_cnt;     // coded bits in the current symbol
  logic       padding;
  logic       i_v, i_r, i_b;
  logic [8:0] n_cbps;
  assign n_cbps     = 9'(ncbps(modulation));
  assign i_v        = padding || p_v;
  assign i_b        = padding ? 1'b0 : p_b;
  assign p_r        = i_r && !padding;
  assign pad_active = padding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_cnt <= '0; padding <= 1'b0;
    end else if (start) begin
      sym_cnt <= '0; padding <= 1'b0;
    end else if (i_v && i_r) begin
      if (sym_cnt == n_cbps - 9'd1) begin
        sym_cnt <= '0;
        padding <= 1'b0;
      end else begin
        sym_cnt <= sym_cnt + 9'd1;
        if (!padding && p_l) padding <= 1'b1;
      end
    end
  end

  logic l_v, l_r, l_b;
  interleaver #(.DEINT(1'b0)) u_ilv (.clk, .rst_n, .modulation, .in_valid(i_v), .in_ready(i_r), .in_bit(i_b),
                                    .out_valid(l_v), .out_ready(l_r), .out_bit(l_b));

  logic m_v, m_r, m_f;
  cplx16_t m_d;
  symbol_mapper u_map (.clk, .rst_n, .modulation, .in_valid(l_v), .in_ready(l_r), .in_bit(l_b),
                       .out_valid(m_v), .out_ready(m_r), .out_bin(m_d), .out_first(m_f));

  logic f_v, f_r, f_f;
  cplx24_t f_d;
  fft64 #(.INVERSE(1'b1)) u_ifft (.clk, .rst_n, .in_valid(m_v), .in_ready(m_r), .in_data(m_d),
                                  .out_valid(f_v), .out_ready(f_r), .out_data(f_d), .out_first(f_f));

  // the IFFT output fits 16 bits for the constellation scale used here
  cplx16_t f16;
  assign f16 = '{re: 16'(f_d.re), im: 16'(f_d.im)};

  cp_insert u_cp (.clk, .rst_n, .in_valid(f_v), .in_ready(f_r), .in_data(f16),
                  .out_valid, .out_ready, .out_data(out_sample), .out_first);
endmodule
