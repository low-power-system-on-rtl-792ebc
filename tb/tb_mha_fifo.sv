// tb_mha_fifo: checks the receive FIFO against a queue model. Random
// writes and reads with random handshakes on both sides; every item read
// must be the oldest one written, the level must match the model, and
// writes into a full FIFO must be dropped and raise the overflow flag
// until the FIFO is cleared.
`include "tb/tb_util.svh"
module tb_mha_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(2000000)

  localparam int DEPTH = 64;
  logic       clear, in_valid, in_ready, out_valid, out_ready, overflow;
  logic [7:0] in_data, out_data;
  logic [6:0] level;

  mha_fifo u_dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
                  .out_data, .level, .overflow);

  initial begin
    logic [7:0] q [$];
    bit         ovf_model, full;
    int         n_pop, n_drop, n_empty, pw, pr;
    clear = 0; in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `TB_CHECK(!out_valid && in_ready && level == 0 && !overflow, "empty after reset")
    ovf_model = 0; n_pop = 0; n_drop = 0; n_empty = 0;
    // phases with different write/read rates: balanced, filling, draining
    for (int ph = 0; ph < 6; ph++) begin
      pw = (ph % 3 == 1) ? 9 : (ph % 3 == 2) ? 2 : 5;
      pr = (ph % 3 == 1) ? 2 : (ph % 3 == 2) ? 9 : 5;
      for (int c = 0; c < 1500; c++) begin
        in_valid  = ($urandom_range(0, 9) < pw);
        in_data   = 8'($urandom);
        out_ready = ($urandom_range(0, 9) < pr);
        #1;
        `TB_CHECK(32'(level) == q.size(), $sformatf("level %0d, model %0d", level, q.size()))
        `TB_CHECK(in_ready == (q.size() < DEPTH), "ready follows the fill level")
        `TB_CHECK(overflow == ovf_model, "overflow flag")
        if (!out_valid) n_empty++;
        full = (q.size() >= DEPTH);   // a pop in this cycle does not make room
        if (out_valid && out_ready) begin
          `TB_CHECK(q.size() > 0 && out_data == q[0], $sformatf("read %02h, expected %02h", out_data, q[0]))
          void'(q.pop_front());
          n_pop++;
        end
        if (in_valid) begin
          if (!full) q.push_back(in_data);
          else begin ovf_model = 1; n_drop++; end
        end
        @(negedge clk);
      end
      if (ph == 3) begin
        clear = 1; in_valid = 0; out_ready = 0;
        @(negedge clk);
        clear = 0;
        q.delete(); ovf_model = 0;
        `TB_CHECK(level == 0 && !overflow && !out_valid, "clear empties the FIFO")
      end
    end
    $display("items read %0d, writes dropped %0d, empty cycles %0d", n_pop, n_drop, n_empty);
    `TB_CHECK(n_pop > 2000 && n_drop > 0 && n_empty > 0, "both full and empty conditions reached")
    `TB_FINISH
  end
endmodule
