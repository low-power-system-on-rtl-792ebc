// qam_demapper: constellation decoder. Buffers the 64 FFT bin_q of a symbol,
// then visits the 48 data subcarriers in carrier order and slices each one
// to the nearest BPSK/QPSK/16-QAM/64-QAM point (hard decision, Gray
// mapping), emitting its 1, 2, 4 or 6 bits serially, in-phase bits first.
// Pilots, DC and guard bin_q are skipped. The bin_q are expected already
// equalised to the transmit scale (levels at odd multiples of LVL).
//
// Timing: 64 input cycles, then 48*nbpsc output cycles (valid/ready); input
// refused while emitting.
module qam_demapper
  import wlan_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    modulation,
  input  logic    in_valid,
  output logic    in_ready,
  input  cplx24_t in_bin,
  output logic    out_valid,
  input  logic    out_ready,
  output logic    out_bit
);
  cplx24_t     bin_q [64];
  logic [5:0]  wr;
  logic [5:0]  m;
  logic [2:0]  bcnt;
  logic        emitting;
  int unsigned nb;
  cplx24_t     cur;
  logic [5:0]  bits;

  assign nb        = nbpsc(modulation);
  assign cur       = bin_q[data_bin(32'(m))];
  assign in_ready  = !emitting;
  assign out_valid = emitting;
  assign out_bit   = bits[bcnt];

  always_comb begin
    bits = '0;
    case (modulation)
      MOD_BPSK:  bits[0]   = pam_slice(cur.re, 1)[0];
      MOD_QPSK:  bits[1:0] = {pam_slice(cur.im, 1)[0], pam_slice(cur.re, 1)[0]};
      MOD_16QAM: bits[3:0] = {pam_slice(cur.im, 2)[1:0], pam_slice(cur.re, 2)[1:0]};
      default:   bits      = {pam_slice(cur.im, 3), pam_slice(cur.re, 3)};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0; m <= '0; bcnt <= '0; emitting <= 1'b0;
      for (int i = 0; i < 64; i++) bin_q[i] <= '0;
    end else if (!emitting) begin
      if (in_valid) begin
        bin_q[wr] <= in_bin;
        wr <= wr + 6'd1;
        if (wr == 6'd63) begin emitting <= 1'b1; m <= '0; bcnt <= '0; end
      end
    end else if (out_ready) begin
      if (32'(bcnt) == nb - 1) begin
        bcnt <= '0;
        if (m == 6'd47) emitting <= 1'b0;
        else m <= m + 6'd1;
      end else bcnt <= bcnt + 3'd1;
    end
  end
endmodule
