// mha_tx_bkoff: backoff counter of the MAC hardware accelerator. On `start`
// it draws a random number of slots in 0..cw (cw = 2^n - 1, contention
// window) from a 16-bit LFSR, counts down one per slot reference pulse from
// chan_state while the medium is idle (the count is frozen while it is
// busy, since no slot pulses arrive then) and, when the count reaches zero
// with the medium idle after its interframe space, gives the transmit slot
// to tx_ctrl with a one-cycle `done` pulse.
module mha_tx_bkoff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [9:0] cw,
  input  logic       slot_tick,
  input  logic       ifs_done,
  input  logic       medium_busy,
  output logic       active,
  output logic [9:0] count,
  output logic       done
);
  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 16'hACE1; active <= 1'b0; count <= '0; done <= 1'b0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        count  <= lfsr[9:0] & cw;
      end else if (active && !medium_busy) begin
        if (count == 10'd0) begin
          if (ifs_done) begin active <= 1'b0; done <= 1'b1; end
        end else if (slot_tick) count <= count - 10'd1;
      end
    end
  end
endmodule
