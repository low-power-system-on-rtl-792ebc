// symbol_mapper: constellation encoder with mapper and pilot insertion.
//
// Groups of 1, 2, 4 or 6 interleaved bits become BPSK, QPSK, 16-QAM or
// 64-QAM points (Gray mapping of the two standards, in-phase bits first;
// levels are odd multiples of LVL, without the power normalisation factor).
// The 48 points of a symbol are written to their subcarriers, and the four
// pilots (+1 on -21, -7, +7 and -1 on +21, real axis) plus zeros on DC and
// the guard carriers complete the 64 FFT bin_q, which are then streamed out in
// bin order 0..63 for the IFFT.
//
// Timing: 48*nbpsc input cycles to fill, 64 output cycles to empty;
// valid/ready on both sides, input refused while emptying.
module symbol_mapper
  import wlan_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    modulation,
  input  logic    in_valid,
  output logic    in_ready,
  input  logic    in_bit,
  output logic    out_valid,
  input  logic    out_ready,
  output cplx16_t out_bin,
  output logic    out_first     // bin 0 of a symbol
);
  cplx16_t    bin_q [64];
  logic [5:0] bitbuf;
  logic [2:0] bcnt;
  logic [5:0] m;                // data carrier index
  logic [5:0] rd;
  logic       draining;
  logic [5:0] grp;
  int unsigned nb;
  cplx16_t    pt;

  assign nb        = nbpsc(modulation);
  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_bin   = bin_q[rd];
  assign out_first = draining && (rd == 6'd0);

  // the group including the bit arriving now; bit 0 is the first received
  always_comb begin
    grp = bitbuf;
    grp[bcnt] = in_bit;
    pt = '0;
    case (modulation)
      MOD_BPSK:  pt.re = 16'(pam_level({2'b0, grp[0]}, 1) * LVL);
      MOD_QPSK:  begin pt.re = 16'(pam_level({2'b0, grp[0]}, 1) * LVL);
                       pt.im = 16'(pam_level({2'b0, grp[1]}, 1) * LVL); end
      MOD_16QAM: begin pt.re = 16'(pam_level({1'b0, grp[1:0]}, 2) * LVL);
                       pt.im = 16'(pam_level({1'b0, grp[3:2]}, 2) * LVL); end
      default:   begin pt.re = 16'(pam_level(grp[2:0], 3) * LVL);
                       pt.im = 16'(pam_level(grp[5:3], 3) * LVL); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitbuf <= '0; bcnt <= '0; m <= '0; rd <= '0; draining <= 1'b0;
      for (int b = 0; b < 64; b++) bin_q[b] <= '0;
    end else if (!draining) begin
      if (in_valid) begin
        bitbuf <= grp;
        if (32'(bcnt) == nb - 1) begin
          bcnt <= '0;
          bin_q[data_bin(32'(m))] <= pt;
          if (m == 6'd47) begin
            m <= '0;
            draining <= 1'b1;
            rd <= '0;
            bin_q[43] <= '{re: 16'(LVL), im: 16'sd0};   // subcarrier -21
            bin_q[57] <= '{re: 16'(LVL), im: 16'sd0};   // subcarrier -7
            bin_q[7]  <= '{re: 16'(LVL), im: 16'sd0};   // subcarrier +7
            bin_q[21] <= '{re: -16'(LVL), im: 16'sd0};  // subcarrier +21
          end else m <= m + 6'd1;
        end else bcnt <= bcnt + 3'd1;
      end
    end else if (out_ready) begin
      rd <= rd + 6'd1;
      if (rd == 6'd63) draining <= 1'b0;
    end
  end
endmodule
