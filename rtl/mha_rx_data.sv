// mha_rx_data: receive-side frame validation of the MAC hardware
// accelerator. Checks the CRC of each MPDU from the PHY (the CRC-32 run over
// all octets including the FCS must leave the fixed residue 0xDEBB20E3) and
// its length (MIN_LEN..MAX_LEN octets), forwards the first HDR_LEN octets as
// header (with their index) towards rx_filter and the remaining octets as
// payload towards rx_defrag via the receive FIFO (the last four payload
// octets are the FCS, which the consumer drops when the frame is accepted).
//
// Timing: one octet per cycle, no backpressure (the PHY cannot be stalled);
// the verdict (`frame_end` with `frame_ok`, `crc_err`, `len_err`,
// `frame_len`) is registered one cycle after the octet flagged `in_last`.
module mha_rx_data
  import wlan_pkg::*;
#(
  parameter int unsigned MIN_LEN = 14,     // ACK/CTS: 10 octets + FCS
  parameter int unsigned MAX_LEN = 2346,   // largest 802.11 MPDU
  parameter int unsigned HDR_LEN = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        hdr_valid,
  output logic [4:0]  hdr_idx,
  output logic [7:0]  hdr_data,
  output logic        pay_valid,
  output logic [7:0]  pay_data,
  output logic        frame_end,
  output logic        frame_ok,
  output logic        crc_err,
  output logic        len_err,
  output logic [11:0] frame_len
);
  logic [31:0] crc, crc_next;
  logic [11:0] cnt;           // octets received so far in this frame
  logic        len_bad;

  assign crc_next  = crc32_byte(crc, in_data);
  assign hdr_valid = in_valid && (cnt < 12'(HDR_LEN));
  assign hdr_idx   = 5'(cnt);
  assign hdr_data  = in_data;
  assign pay_valid = in_valid && (cnt >= 12'(HDR_LEN));
  assign pay_data  = in_data;
  assign len_bad   = (32'(cnt) + 1 < MIN_LEN) || (32'(cnt) + 1 > MAX_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc <= '1; cnt <= '0;
      frame_end <= 1'b0; frame_ok <= 1'b0; crc_err <= 1'b0; len_err <= 1'b0; frame_len <= '0;
    end else begin
      frame_end <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          frame_end <= 1'b1;
          crc_err   <= (crc_next != CRC32_RESIDUE);
          len_err   <= len_bad;
          frame_ok  <= (crc_next == CRC32_RESIDUE) && !len_bad;
          frame_len <= cnt + 12'd1;
          crc <= '1; cnt <= '0;
        end else begin
          crc <= crc_next;
          if (cnt != 12'hFFF) cnt <= cnt + 12'd1;
        end
      end
    end
  end
endmodule
