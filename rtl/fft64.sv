// fft64: 64-point radix-2 FFT / IFFT, shared by the transmit path (IFFT) and
// the receive path (FFT).
//
// Memory-based, decimation in time, one butterfly per clock: 64 samples are
// loaded in bit-reversed order, six stages of 32 butterflies run in place,
// then the 64 results are streamed out in natural order. One symbol thus
// takes 64 + 192 + 64 = 320 cycles, which is one OFDM symbol interval (4 us)
// at an 80 MHz modem clock. With INVERSE = 1 the twiddles are
// conjugated and every stage divides by two (rounded), so the IFFT carries
// the 1/64 factor and the FFT has unit gain per bin; internal words are 24
// bits, enough for the FFT's growth from 16-bit inputs.
//
// Twiddles W^k = cos(2*pi*k/64) - j*sin(2*pi*k/64), k = 0..31, in Q1.14.
//
// Interface: 16-bit complex input with valid/ready (ready only while
// loading), 24-bit complex output with valid/ready; `out_first` marks
// sample 0 of a block.
module fft64
  import wlan_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  cplx16_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output cplx24_t out_data,
  output logic    out_first
);
  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  typedef struct packed { logic signed [15:0] c; logic signed [15:0] s; } tw_t;

  state_t     state;
  cplx24_t    mem [64];
  logic [5:0] idx;
  logic [2:0] stage;
  logic [4:0] bfly;

  function automatic tw_t tw(logic [4:0] k);
    case (k)
      5'd0: tw = '{16'sd16384, 16'sd0};
      5'd1: tw = '{16'sd16305, 16'sd1606};
      5'd2: tw = '{16'sd16069, 16'sd3196};
      5'd3: tw = '{16'sd15679, 16'sd4756};
      5'd4: tw = '{16'sd15137, 16'sd6270};
      5'd5: tw = '{16'sd14449, 16'sd7723};
      5'd6: tw = '{16'sd13623, 16'sd9102};
      5'd7: tw = '{16'sd12665, 16'sd10394};
      5'd8: tw = '{16'sd11585, 16'sd11585};
      5'd9: tw = '{16'sd10394, 16'sd12665};
      5'd10: tw = '{16'sd9102, 16'sd13623};
      5'd11: tw = '{16'sd7723, 16'sd14449};
      5'd12: tw = '{16'sd6270, 16'sd15137};
      5'd13: tw = '{16'sd4756, 16'sd15679};
      5'd14: tw = '{16'sd3196, 16'sd16069};
      5'd15: tw = '{16'sd1606, 16'sd16305};
      5'd16: tw = '{16'sd0, 16'sd16384};
      5'd17: tw = '{-16'sd1606, 16'sd16305};
      5'd18: tw = '{-16'sd3196, 16'sd16069};
      5'd19: tw = '{-16'sd4756, 16'sd15679};
      5'd20: tw = '{-16'sd6270, 16'sd15137};
      5'd21: tw = '{-16'sd7723, 16'sd14449};
      5'd22: tw = '{-16'sd9102, 16'sd13623};
      5'd23: tw = '{-16'sd10394, 16'sd12665};
      5'd24: tw = '{-16'sd11585, 16'sd11585};
      5'd25: tw = '{-16'sd12665, 16'sd10394};
      5'd26: tw = '{-16'sd13623, 16'sd9102};
      5'd27: tw = '{-16'sd14449, 16'sd7723};
      5'd28: tw = '{-16'sd15137, 16'sd6270};
      5'd29: tw = '{-16'sd15679, 16'sd4756};
      5'd30: tw = '{-16'sd16069, 16'sd3196};
      5'd31: tw = '{-16'sd16305, 16'sd1606};
      default: tw = '0;
    endcase
  endfunction

  function automatic logic [5:0] bitrev6(logic [5:0] x);
    return {x[0], x[1], x[2], x[3], x[4], x[5]};
  endfunction

  // butterfly addressing for the current stage
  logic [5:0]  half, top, bot;
  logic [4:0]  tk;
  tw_t         w;
  cplx24_t     xa, xb;
  logic signed [41:0] pr, pi;
  logic signed [24:0] tr, ti;
  logic signed [25:0] sr, si, dr, di;
  cplx24_t     ya, yb;

  function automatic logic signed [23:0] shrink(logic signed [25:0] v);
    // divide by two with rounding in the inverse transform, else keep
    return INVERSE ? 24'((v + 26'sd1) >>> 1) : 24'(v);
  endfunction

  always_comb begin
    half = 6'd1 << stage;
    top  = 6'(((32'(bfly) >> stage) << (stage + 1)) | (32'(bfly) & (32'(half) - 1)));
    bot  = top + half;
    tk   = 5'((32'(bfly) & (32'(half) - 1)) << (5 - stage));
    w    = tw(tk);
    xa   = mem[top];
    xb   = mem[bot];
    // t = xb * W, W = c -/+ j s
    if (INVERSE) begin
      pr = xb.re * w.c - xb.im * w.s;
      pi = xb.im * w.c + xb.re * w.s;
    end else begin
      pr = xb.re * w.c + xb.im * w.s;
      pi = xb.im * w.c - xb.re * w.s;
    end
    tr = 25'((pr + 42'sd8192) >>> 14);
    ti = 25'((pi + 42'sd8192) >>> 14);
    sr = 26'(xa.re) + 26'(tr);
    si = 26'(xa.im) + 26'(ti);
    dr = 26'(xa.re) - 26'(tr);
    di = 26'(xa.im) - 26'(ti);
    ya = '{re: shrink(sr), im: shrink(si)};
    yb = '{re: shrink(dr), im: shrink(di)};
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_data  = mem[idx];
  assign out_first = (state == S_OUT) && (idx == 6'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD; idx <= '0; stage <= '0; bfly <= '0;
      for (int i = 0; i < 64; i++) mem[i] <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          mem[bitrev6(idx)] <= '{re: 24'(in_data.re), im: 24'(in_data.im)};
          idx <= idx + 6'd1;
          if (idx == 6'd63) begin state <= S_CALC; stage <= '0; bfly <= '0; end
        end
        S_CALC: begin
          mem[top] <= ya;
          mem[bot] <= yb;
          bfly <= bfly + 5'd1;
          if (bfly == 5'd31) begin
            if (stage == 3'd5) begin state <= S_OUT; idx <= '0; end
            else stage <= stage + 3'd1;
          end
        end
        default: if (out_ready) begin
          idx <= idx + 6'd1;
          if (idx == 6'd63) state <= S_LOAD;
        end
      endcase
    end
  end
endmodule
