// mha_rx_filter: receive filter of the MAC hardware accelerator. Collects
// the MAC header octets of a frame (frame control, duration, address 1,
// address 2, sequence control, IEEE 802.11 layout) and, when rx_data
// declares the frame valid, decides:
//  * address 1 is this station: RTS -> CTS request; data or management ->
//    ACK request; a retry whose transmitter and sequence number match the
//    last accepted frame is flagged duplicate (acknowledged, not delivered);
//  * group address: delivered, never acknowledged;
//  * any other frame: its duration updates the NAV if longer than the
//    remaining NAV.
// Delivered frames raise `accept` (the owner indication to rx_defrag). The
// NAV counts down in microseconds (`us_tick`) and drives `nav_busy`.
// Decisions are one-cycle pulses one clock after `frame_end`.
//
// Lint note: only the frame type, subtype, retry bit and sequence number
// are decoded from the frame-control and sequence-control fields; the
// remaining bits (version, flags, fragment number) are unused.
module mha_rx_filter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] my_addr,
  input  logic        hdr_valid,
  input  logic [4:0]  hdr_idx,
  input  logic [7:0]  hdr_data,
  input  logic        frame_end,
  input  logic        frame_ok,
  input  logic        us_tick,
  output logic        accept,
  output logic        dup,
  output logic        ack_req,
  output logic        cts_req,
  output logic [47:0] resp_addr,     // receiver of the ACK/CTS (address 2)
  output logic [15:0] resp_dur,      // duration field of the frame
  output logic        nav_busy,
  output logic [15:0] nav
);
  logic [15:0] fc, dur, seqc;
  logic [47:0] a1, a2;
  logic [47:0] last_a2;
  logic [11:0] last_seq;
  logic        last_vld;

  logic [1:0]  ftype;
  logic [3:0]  fsub;
  logic        to_me, group, is_rts, is_ctl, retry, is_dup;

  assign ftype  = fc[3:2];
  assign fsub   = fc[7:4];
  assign retry  = fc[11];
  assign to_me  = (a1 == my_addr);
  assign group  = a1[0];
  assign is_ctl = (ftype == 2'b01);
  assign is_rts = is_ctl && (fsub == 4'b1011);
  assign is_dup = retry && last_vld && (a2 == last_a2) && (seqc[15:4] == last_seq);
  assign nav_busy = (nav != 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc <= '0; dur <= '0; seqc <= '0; a1 <= '0; a2 <= '0;
      last_a2 <= '0; last_seq <= '0; last_vld <= 1'b0; nav <= '0;
      accept <= 1'b0; dup <= 1'b0; ack_req <= 1'b0; cts_req <= 1'b0;
      resp_addr <= '0; resp_dur <= '0;
    end else begin
      accept <= 1'b0; dup <= 1'b0; ack_req <= 1'b0; cts_req <= 1'b0;
      if (hdr_valid) begin
        case (hdr_idx)
          5'd0, 5'd1:   fc[8 * hdr_idx[0] +: 8] <= hdr_data;
          5'd2, 5'd3:   dur[8 * (hdr_idx - 5'd2) +: 8] <= hdr_data;
          5'd22, 5'd23: seqc[8 * (hdr_idx - 5'd22) +: 8] <= hdr_data;
          default: begin
            if (hdr_idx >= 5'd4 && hdr_idx < 5'd10)  a1[8 * (hdr_idx - 5'd4) +: 8] <= hdr_data;
            if (hdr_idx >= 5'd10 && hdr_idx < 5'd16) a2[8 * (hdr_idx - 5'd10) +: 8] <= hdr_data;
          end
        endcase
      end
      if (us_tick && nav != 16'd0) nav <= nav - 16'd1;
      if (frame_end && frame_ok) begin
        resp_addr <= a2;
        resp_dur  <= dur;
        if (to_me) begin
          if (is_rts) cts_req <= 1'b1;
          else if (!is_ctl) begin
            ack_req <= 1'b1;
            if (is_dup) dup <= 1'b1;
            else begin
              accept   <= 1'b1;
              last_a2  <= a2;
              last_seq <= seqc[15:4];
              last_vld <= 1'b1;
            end
          end
        end else if (group) begin
          if (!is_ctl) accept <= 1'b1;
        end else if (!dur[15] && dur > nav) nav <= dur;
      end
    end
  end
endmodule
