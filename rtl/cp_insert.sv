// cp_insert: cyclic prefix insertion. Buffers the 64 IFFT output samples of
// a symbol and sends 80: the last 16 samples (the 0.8 us cyclic prefix)
// followed by all 64, so that T_S = 80 samples = 4 us at 20 MHz.
//
// Timing: 64 input cycles, then 80 output cycles (valid/ready); input is
// refused while sending. `out_first` marks the first prefix sample.
module cp_insert
  import wlan_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  cplx16_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output cplx16_t out_data,
  output logic    out_first
);
  cplx16_t    mem [64];
  logic [6:0] cnt;
  logic       sending;
  logic [5:0] rd;

  assign rd        = (cnt < 7'(NCP)) ? 6'(cnt + 7'd48) : 6'(cnt - 7'(NCP));
  assign in_ready  = !sending;
  assign out_valid = sending;
  assign out_data  = mem[rd];
  assign out_first = sending && (cnt == 7'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sending <= 1'b0;
      for (int i = 0; i < 64; i++) mem[i] <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        mem[cnt[5:0]] <= in_data;
        if (cnt == 7'd63) begin cnt <= '0; sending <= 1'b1; end
        else cnt <= cnt + 7'd1;
      end
    end else if (out_ready) begin
      if (cnt == 7'd79) begin cnt <= '0; sending <= 1'b0; end
      else cnt <= cnt + 7'd1;
    end
  end
endmodule
