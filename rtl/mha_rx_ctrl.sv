// mha_rx_ctrl: control-frame generator of the MAC hardware accelerator.
// When rx_filter asks for an ACK or a CTS, this block waits one short
// interframe space (SIFS) and then delivers the frame body as an octet
// stream for tx_data, which appends the FCS:
//   octet 0..1  frame control (ACK 0xD4 0x00, CTS 0xC4 0x00)
//   octet 2..3  duration, least significant octet first
//   octet 4..9  receiver address (address 2 of the frame being answered)
// The duration of an ACK is 0 (the more-fragments bit is not tracked). The
// duration of a CTS is that of the RTS minus SIFS and the CTS air time,
// floored at 0. A request that arrives while a frame is pending replaces it.
// SIFS is counted in 1 us strobes (`us_tick`).
module mha_rx_ctrl #(
  parameter int unsigned SIFS_US = 16,   // IEEE 802.11a SIFS
  parameter int unsigned CTS_US  = 44    // CTS air time at 6 Mbit/s
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        us_tick,
  input  logic        ack_req,          // pulse from rx_filter
  input  logic        cts_req,          // pulse from rx_filter
  input  logic [47:0] resp_addr,        // receiver address of the response
  input  logic [15:0] resp_dur,         // duration field of the frame answered
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_last,
  output logic        busy              // a response is waiting or being sent
);
  typedef enum logic [1:0] {S_IDLE, S_SIFS, S_SEND} st_t;
  st_t         st;
  logic        is_cts;
  logic [47:0] ra;
  logic [15:0] dur;
  logic [4:0]  us_cnt;
  logic [3:0]  idx;

  localparam logic [16:0] CTS_SUB = 17'(SIFS_US + CTS_US);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; is_cts <= 1'b0; ra <= '0; dur <= '0; us_cnt <= '0; idx <= '0;
    end else if (ack_req || cts_req) begin
      st     <= S_SIFS;
      is_cts <= cts_req;
      ra     <= resp_addr;
      dur    <= (cts_req && {1'b0, resp_dur} > CTS_SUB) ? 16'({1'b0, resp_dur} - CTS_SUB) : 16'd0;
      us_cnt <= '0;
      idx    <= '0;
    end else begin
      case (st)
        S_SIFS: if (us_tick) begin
                  if (us_cnt == 5'(SIFS_US - 1)) st <= S_SEND;
                  us_cnt <= us_cnt + 5'd1;
                end
        S_SEND: if (out_ready) begin
                  if (idx == 4'd9) st <= S_IDLE;
                  idx <= idx + 4'd1;
                end
        default: ;
      endcase
    end
  end

  always_comb begin
    case (idx)
      4'd0:    out_data = is_cts ? 8'hC4 : 8'hD4;
      4'd1:    out_data = 8'h00;
      4'd2:    out_data = dur[7:0];
      4'd3:    out_data = dur[15:8];
      default: out_data = ra[8 * (32'(idx) - 4) +: 8];
    endcase
  end
  assign out_valid = (st == S_SEND);
  assign out_last  = (st == S_SEND) && (idx == 4'd9);
  assign busy      = (st != S_IDLE);
endmodule
