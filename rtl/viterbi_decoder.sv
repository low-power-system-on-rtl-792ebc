// viterbi_decoder: hard-decision Viterbi decoder for the K = 7, rate-1/2
// code (g0 = 133, g1 = 171 octal), the last stage of the FEC decoder.
//
// 64 add-compare-select units update all path metrics in one clock per
// received pair; branch metrics are Hamming distances that ignore erased
// (depunctured) bits. Survivors are kept by register exchange, D bits per
// state. Once D pairs have been seen, each new pair releases the oldest
// decision of the best path. At the end of a PDU train (`in_last`) the
// encoder is known to be back in state 0 (six tail bits), so the decoder
// stops accepting input and flushes the remaining min(N, D) decisions from
// state 0's survivor, one per cycle, then re-initialises for the next train.
// The output includes the decoded tail bits; `out_last` marks the final bit.
//
// Timing: one pair per cycle in; latency D pairs; flush of up to D cycles.
module viterbi_decoder
  import wlan_pkg::*;
#(
  parameter int unsigned D = 64      // survivor (traceback) depth
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_pair,        // {b, a}
  input  logic [1:0] in_erase,       // {eb, ea}
  input  logic       in_last,
  output logic       out_valid,
  output logic       out_bit,
  output logic       out_last
);
  localparam int PMW = 8;
  localparam int CW  = $clog2(D + 1);
  localparam int FW  = $clog2(D);

  logic [PMW-1:0] pm     [64];
  logic [PMW-1:0] pm_new [64];
  logic [D-1:0]   sv     [64];
  logic [D-1:0]   sv_new [64];
  logic [5:0]     best;
  logic [PMW-1:0] best_pm;
  logic [PMW-1:0] min_new;
  logic [CW-1:0]  cnt;              // pairs seen, saturating at D
  logic           flushing;
  logic [FW-1:0]  fidx;

  function automatic logic [1:0] bm(logic [1:0] exp_o, logic [1:0] rx, logic [1:0] er);
    return 2'((!er[0] && exp_o[0] != rx[0]) ? 1 : 0) + 2'((!er[1] && exp_o[1] != rx[1]) ? 1 : 0);
  endfunction

  // add-compare-select: next state ns = {s[4:0], u}, predecessors differ in s[5]
  always_comb begin
    min_new = '1;
    for (int ns = 0; ns < 64; ns++) begin
      logic [5:0]     p0, p1;
      logic           u;
      logic [PMW:0]   m0, m1;
      u  = 1'(ns & 1);
      p0 = 6'(ns >> 1);
      p1 = 6'(ns >> 1) | 6'h20;
      m0 = {1'b0, pm[p0]} + (PMW+1)'(bm(conv_out(u, p0), in_pair, in_erase));
      m1 = {1'b0, pm[p1]} + (PMW+1)'(bm(conv_out(u, p1), in_pair, in_erase));
      if (m1 < m0) begin
        pm_new[ns] = (m1[PMW]) ? '1 : m1[PMW-1:0];
        sv_new[ns] = {sv[p1][D-2:0], u};
      end else begin
        pm_new[ns] = (m0[PMW]) ? '1 : m0[PMW-1:0];
        sv_new[ns] = {sv[p0][D-2:0], u};
      end
      if (pm_new[ns] < min_new) min_new = pm_new[ns];
    end
  end

  // best state of the current metrics
  always_comb begin
    best = '0;
    best_pm = pm[0];
    for (int s = 1; s < 64; s++)
      if (pm[s] < best_pm) begin best_pm = pm[s]; best = 6'(s); end
  end

  assign in_ready  = !flushing;
  assign out_valid = flushing || (in_valid && cnt == CW'(D));
  assign out_bit   = flushing ? sv[0][fidx] : sv[best][D-1];
  assign out_last  = flushing && (fidx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 64; s++) begin
        pm[s] <= (s == 0) ? '0 : PMW'(32);
        sv[s] <= '0;
      end
      cnt <= '0; flushing <= 1'b0; fidx <= '0;
    end else if (flushing) begin
      if (fidx == '0) begin
        flushing <= 1'b0;
        cnt <= '0;
        for (int s = 0; s < 64; s++) pm[s] <= (s == 0) ? '0 : PMW'(32);
      end else fidx <= fidx - 1'b1;
    end else if (in_valid) begin
      for (int s = 0; s < 64; s++) begin
        pm[s] <= pm_new[s] - min_new;
        sv[s] <= sv_new[s];
      end
      if (cnt != CW'(D)) cnt <= cnt + 1'b1;
      if (in_last) begin
        flushing <= 1'b1;
        // decisions left: min(N, D) where N = pairs seen including this one
        fidx <= (cnt == CW'(D)) ? FW'(D - 1) : FW'(cnt);
      end
    end
  end
endmodule
