// cp_remove: cyclic prefix extractor. Counts the samples of each 80-sample
// symbol from the symbol start given by the synchroniser (`sym_start` with
// the first sample) and passes only samples 16..79, the 64 that feed the FFT.
//
// Streaming, zero latency: valid/ready pass through; prefix samples are
// accepted and dropped. `out_first` marks the first kept sample.
module cp_remove
  import wlan_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  cplx16_t in_data,
  input  logic    sym_start,
  output logic    out_valid,
  input  logic    out_ready,
  output cplx16_t out_data,
  output logic    out_first
);
  logic [6:0] cnt;      // position of the current sample in its symbol
  logic [6:0] pos;
  logic       keep;

  assign pos       = sym_start ? 7'd0 : cnt;
  assign keep      = (pos >= 7'(NCP));
  assign out_valid = in_valid && keep;
  assign out_data  = in_data;
  assign out_first = out_valid && (pos == 7'(NCP));
  assign in_ready  = keep ? out_ready : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid && in_ready) cnt <= (pos == 7'd79) ? 7'd0 : pos + 7'd1;
  end
endmodule
