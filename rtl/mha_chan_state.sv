// mha_chan_state: channel state machine of the MAC hardware accelerator.
// The medium is busy when the PHY's clear channel assessment (CCA, real
// carrier sense) or the NAV (virtual carrier sense) says so, or while this
// station transmits. After the medium has been idle for an interframe space
// - DIFS, or EIFS when the last received frame was in error - `ifs_done`
// rises and a slot reference pulse (`slot_tick`) is produced every slot time
// for the backoff counter. Any busy indication restarts the wait.
//
// Times are given in microseconds (IEEE 802.11a values: slot 9, SIFS 16,
// DIFS = SIFS + 2 slots = 34, EIFS = SIFS + DIFS + ACK time at 6 Mbit/s =
// 94) and converted with CYC_PER_US clock cycles per microsecond. A 1 us
// strobe `us_tick` is also provided (NAV and timer reference).
module mha_chan_state #(
  parameter int unsigned CYC_PER_US = 80,   // 80 MHz single system clock
  parameter int unsigned SLOT_US    = 9,
  parameter int unsigned SIFS_US    = 16,
  parameter int unsigned DIFS_US    = SIFS_US + 2 * SLOT_US,
  parameter int unsigned EIFS_US    = 94
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cca_busy,
  input  logic nav_busy,
  input  logic tx_active,
  input  logic rx_error,       // pulse: a frame was received with an error
  input  logic rx_ok,          // pulse: a frame was received correctly
  output logic medium_busy,
  output logic ifs_done,
  output logic slot_tick,
  output logic us_tick
);
  localparam int UW = $clog2(CYC_PER_US);
  logic [UW-1:0] us_cnt;
  logic [7:0]    idle_us;      // microseconds idle, saturating
  logic [7:0]    slot_us;
  logic          use_eifs;
  logic [7:0]    ifs_us;

  assign medium_busy = cca_busy || nav_busy || tx_active;
  assign us_tick     = (us_cnt == UW'(CYC_PER_US - 1));
  assign ifs_us      = use_eifs ? 8'(EIFS_US) : 8'(DIFS_US);
  assign ifs_done    = !medium_busy && (idle_us >= ifs_us);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us_cnt <= '0; idle_us <= '0; slot_us <= '0; use_eifs <= 1'b0; slot_tick <= 1'b0;
    end else begin
      us_cnt    <= us_tick ? '0 : us_cnt + 1'b1;
      slot_tick <= 1'b0;
      if (rx_error)   use_eifs <= 1'b1;
      else if (rx_ok) use_eifs <= 1'b0;
      if (medium_busy) begin
        idle_us <= '0;
        slot_us <= '0;
      end else if (us_tick) begin
        if (idle_us != 8'hFF) idle_us <= idle_us + 8'd1;
        // an EIFS is used once: once it has elapsed the next wait is a DIFS
        if (use_eifs && !rx_error && 32'(idle_us) + 1 >= EIFS_US) use_eifs <= 1'b0;
        if (ifs_done) begin
          if (slot_us == 8'(SLOT_US - 1)) begin
            slot_us   <= '0;
            slot_tick <= 1'b1;
          end else slot_us <= slot_us + 8'd1;
        end
      end

    end
  end
endmodule
