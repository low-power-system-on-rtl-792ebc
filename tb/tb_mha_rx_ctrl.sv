// tb_mha_rx_ctrl: checks the control-frame generator. Random ACK and CTS
// requests with random addresses and durations are issued; each response
// must start no earlier than SIFS after the request and must carry the
// right frame control, duration and receiver address, octet by octet, while
// the consumer applies random back-pressure.
`include "tb/tb_util.svh"
module tb_mha_rx_ctrl;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000000)

  localparam int CPU = 4;   // clock cycles per microsecond in this test
  logic        us_tick, ack_req, cts_req, out_valid, out_ready, out_last, busy;
  logic [47:0] resp_addr;
  logic [15:0] resp_dur;
  logic [7:0]  out_data;
  int          us_div;

  mha_rx_ctrl u_dut (.clk, .rst_n, .us_tick, .ack_req, .cts_req, .resp_addr, .resp_dur,
                     .out_valid, .out_ready, .out_data, .out_last, .busy);

  always @(posedge clk or negedge rst_n)
    if (!rst_n) us_div <= 0; else us_div <= (us_div == CPU - 1) ? 0 : us_div + 1;
  assign us_tick = (us_div == CPU - 1);

  initial begin
    logic [7:0]  exp [10];
    logic [15:0] d;
    int          t, k, n_frames;
    ack_req = 0; cts_req = 0; resp_addr = '0; resp_dur = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    `TB_CHECK(!busy && !out_valid, "idle after reset")
    n_frames = 0;
    for (int f = 0; f < 40; f++) begin
      automatic bit cts = 1'($urandom_range(0, 1));
      @(negedge clk);
      resp_addr = {16'($urandom), $urandom};
      resp_dur  = (f % 5 == 0) ? 16'($urandom_range(0, 60)) : 16'($urandom_range(0, 32767));
      if (cts) begin ack_req = 0; cts_req = 1; end else begin ack_req = 1; cts_req = 0; end
      d = (cts && resp_dur > 16'd60) ? resp_dur - 16'd60 : 16'd0;
      exp[0] = cts ? 8'hC4 : 8'hD4; exp[1] = 8'h00; exp[2] = d[7:0]; exp[3] = d[15:8];
      for (int j = 0; j < 6; j++) exp[4 + j] = resp_addr[8 * j +: 8];
      @(negedge clk);
      ack_req = 0; cts_req = 0; resp_addr = '0; resp_dur = '0;
      // wait for the first octet, counting cycles since the request
      t = 1;
      out_ready = ($urandom_range(0, 3) != 0);
      while (!(out_valid && out_ready)) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); t++; end
      `TB_CHECK(t >= 15 * CPU && t <= 17 * CPU + 12, $sformatf("frame %0d starts %0d cycles after request", f, t))
      k = 0;
      while (1) begin
        if (out_valid && out_ready) begin
          `TB_CHECK(k < 10 && out_data == exp[k],
                    $sformatf("frame %0d octet %0d = %02h, expected %02h", f, k, out_data, exp[k]))
          `TB_CHECK(out_last == (k == 9), $sformatf("frame %0d last flag at octet %0d", f, k))
          k++;
          if (out_last) break;
        end
        @(negedge clk);
        out_ready = ($urandom_range(0, 3) != 0);
      end
      @(negedge clk);
      out_ready = 0;
      `TB_CHECK(!busy && !out_valid, $sformatf("idle after frame %0d", f))
      n_frames++;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    `TB_CHECK(n_frames == 40, "all frames sent")
    `TB_FINISH
  end
endmodule
