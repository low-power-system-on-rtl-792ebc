// Testbench for fft64: random 64-sample blocks go through the forward and
// the inverse transform; outputs are compared with a direct DFT computed
// here in floating point (forward: X[k] = sum x[n] e^{-j2pi kn/64};
// inverse: x[n] = 1/64 sum X[k] e^{+j2pi kn/64}), within a few LSBs. Also
// checks that one block takes 320 cycles from first input to last output.
`include "tb/tb_util.svh"
module tb_fft64;
  import wlan_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  logic iv [2], ir [2], ov [2], of [2];
  cplx16_t id [2];
  cplx24_t od [2];
  fft64 #(.INVERSE(1'b0)) u_fft  (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .in_data(id[0]),
                                  .out_valid(ov[0]), .out_ready(1'b1), .out_data(od[0]), .out_first(of[0]));
  fft64 #(.INVERSE(1'b1)) u_ifft (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .in_data(id[1]),
                                  .out_valid(ov[1]), .out_ready(1'b1), .out_data(od[1]), .out_first(of[1]));

  real xr [64], xi [64];

  task automatic block(int u, int amp);
    real er, ei, ang, tol, sc;
    int cyc;
    for (int n = 0; n < 64; n++) begin
      xr[n] = real'($signed($urandom % (2 * amp + 1)) - amp);
      xi[n] = real'($signed($urandom % (2 * amp + 1)) - amp);
    end
    cyc = 0;
    for (int n = 0; n < 64; n++) begin
      iv[u] = 1; id[u].re = 16'(int'(xr[n])); id[u].im = 16'(int'(xi[n]));
      #1; `TB_CHECK(ir[u], "ready while loading") @(negedge clk); cyc++;
    end
    iv[u] = 0;
    while (!ov[u]) begin @(negedge clk); cyc++; end
    `TB_CHECK(of[u], "out_first on sample 0")
    for (int k = 0; k < 64; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < 64; n++) begin
        ang = 2.0 * 3.14159265358979 * k * n / 64.0 * (u ? 1.0 : -1.0);
        er += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        ei += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      sc  = u ? 1.0 / 64.0 : 1.0;
      tol = u ? 3.0 : 40.0;
      #1;
      `TB_CHECK(ov[u] && (real'(od[u].re) - er * sc) < tol && (er * sc - real'(od[u].re)) < tol &&
                (real'(od[u].im) - ei * sc) < tol && (ei * sc - real'(od[u].im)) < tol,
                $sformatf("inv=%0d bin %0d: got %0d,%0d want %f,%f", u, k, od[u].re, od[u].im, er*sc, ei*sc))
      @(negedge clk); cyc++;
    end
    `TB_CHECK(cyc == 320, $sformatf("block took %0d cycles, expected 320", cyc))
  endtask

  initial begin
    iv[0] = 0; iv[1] = 0; id[0] = '0; id[1] = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    block(0, 2000); block(0, 30000); block(1, 1792); block(1, 30000); block(0, 100);
    `TB_FINISH
  end
endmodule
