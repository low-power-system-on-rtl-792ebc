// mha_tx_data: transmit framer of the MAC hardware accelerator. Passes the
// octets of an MPDU to the PHY, inserting the TSF timestamp when asked
// (beacon and probe response frames carry it in octets 24..31, least
// significant octet first) and appending the 32-bit FCS (IEEE CRC-32,
// transmitted complemented, least significant octet first) after the octet
// flagged `in_last`.
//
// Interface: octet streams with valid/ready/last; zero latency for body
// octets, then four extra output cycles for the FCS during which input is
// refused. The CRC covers the octets actually sent (after timestamp insertion).
module mha_tx_data
  import wlan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ts_insert,      // frame carries a timestamp field
  input  logic [63:0] tsf,            // TSF timer value to insert
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_last
);
  logic [31:0] crc;
  logic [11:0] idx;          // octet index within the frame
  logic [2:0]  fcs_cnt;      // FCS octets still to send
  logic [63:0] ts_q;
  logic [7:0]  body;
  logic        in_fcs;
  logic [31:0] fcs;

  assign in_fcs    = (fcs_cnt != 3'd0);
  assign fcs       = ~crc;
  assign body      = (ts_insert && idx >= 12'd24 && idx < 12'd32) ?
                     ts_q[8 * (idx - 12'd24) +: 8] : in_data;
  assign in_ready  = out_ready && !in_fcs;
  assign out_valid = in_fcs || in_valid;
  assign out_data  = in_fcs ? fcs[8 * (3'd4 - fcs_cnt) +: 8] : body;
  assign out_last  = (fcs_cnt == 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc <= '1; idx <= '0; fcs_cnt <= '0; ts_q <= '0;
    end else if (out_valid && out_ready) begin
      if (in_fcs) begin
        fcs_cnt <= fcs_cnt - 3'd1;
        if (fcs_cnt == 3'd1) begin crc <= '1; idx <= '0; end
      end else begin
        if (idx == 12'd0) ts_q <= tsf;
        crc <= crc32_byte(crc, body);
        idx <= idx + 12'd1;
        if (in_last) fcs_cnt <= 3'd4;
      end
    end
  end
endmodule
