// Testbench for mha_rx_filter: feeds 802.11 headers built here (frame
// control, duration, addresses, sequence control) followed by frame_end and
// checks ACK/CTS requests, delivery, duplicate detection of retries, group
// frames, frames with a bad FCS, and the NAV (set by frames for others,
// kept at the longer value, counting down per microsecond).
`include "tb/tb_util.svh"
module tb_mha_rx_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(20000)

  localparam logic [47:0] ME = 48'h0000_5E00_5301, PEER = 48'h1122_3344_5566, OTHER = 48'h0A0B_0C0D_0E10;
  logic hv, fe, fok, ust, acc, dup, ackr, ctsr, navb;
  logic [4:0] hi;
  logic [7:0] hd;
  logic [47:0] ra;
  logic [15:0] rd, nav;
  mha_rx_filter dut (.clk, .rst_n, .my_addr(ME), .hdr_valid(hv), .hdr_idx(hi), .hdr_data(hd),
      .frame_end(fe), .frame_ok(fok), .us_tick(ust), .accept(acc), .dup(dup), .ack_req(ackr),
      .cts_req(ctsr), .resp_addr(ra), .resp_dur(rd), .nav_busy(navb), .nav);

  // type/subtype: data 10/0000, RTS 01/1011, beacon 00/1000
  task automatic frame(logic [1:0] ty, logic [3:0] sub, bit retry, logic [15:0] dur,
                       logic [47:0] a1, logic [47:0] a2, logic [11:0] sq, bit ok,
                       bit e_acc, bit e_dup, bit e_ack, bit e_cts);
    logic [7:0] h [24];
    h[0] = {sub, ty, 2'b00}; h[1] = {4'b0, retry, 3'b0};
    h[2] = dur[7:0]; h[3] = dur[15:8];
    for (int i = 0; i < 6; i++) begin h[4 + i] = a1[8 * i +: 8]; h[10 + i] = a2[8 * i +: 8]; h[16 + i] = 8'h00; end
    h[22] = {sq[3:0], 4'h0}; h[23] = sq[11:4];
    for (int i = 0; i < 24; i++) begin hv = 1; hi = 5'(i); hd = h[i]; @(negedge clk); end
    hv = 0; fe = 1; fok = ok; @(negedge clk); fe = 0; #1;
    `TB_CHECK(acc == e_acc && dup == e_dup && ackr == e_ack && ctsr == e_cts,
              $sformatf("decision acc=%0d dup=%0d ack=%0d cts=%0d", acc, dup, ackr, ctsr))
    if (e_ack || e_cts) `TB_CHECK(ra == a2 && rd == dur, "response address and duration")
    @(negedge clk);
  endtask

  initial begin
    hv = 0; hi = 0; hd = 0; fe = 0; fok = 0; ust = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    frame(2'b10, 4'b0000, 0, 16'd44, ME, PEER, 12'd100, 1, 1, 0, 1, 0);   // data to me
    frame(2'b10, 4'b0000, 1, 16'd44, ME, PEER, 12'd100, 1, 0, 1, 1, 0);   // retry: duplicate
    frame(2'b10, 4'b0000, 1, 16'd44, ME, PEER, 12'd101, 1, 1, 0, 1, 0);   // retry, new seq
    frame(2'b10, 4'b0000, 0, 16'd44, ME, PEER, 12'd102, 0, 0, 0, 0, 0);   // bad FCS: ignored
    frame(2'b01, 4'b1011, 0, 16'd300, ME, PEER, 12'd0, 1, 0, 0, 0, 1);    // RTS to me -> CTS
    frame(2'b00, 4'b1000, 0, 16'd0, 48'hFFFF_FFFF_FFFF, PEER, 12'd5, 1, 1, 0, 0, 0); // beacon
    #1; `TB_CHECK(!navb, "NAV clear")
    frame(2'b01, 4'b1011, 0, 16'd50, OTHER, PEER, 12'd0, 1, 0, 0, 0, 0);   // RTS to other: NAV
    #1; `TB_CHECK(navb && nav == 16'd50, $sformatf("NAV set to %0d", nav))
    frame(2'b10, 4'b0000, 0, 16'd20, OTHER, PEER, 12'd0, 1, 0, 0, 0, 0);   // shorter: keeps 50
    #1; `TB_CHECK(nav == 16'd50, "NAV keeps the longer value")
    for (int i = 0; i < 50; i++) begin ust = 1; @(negedge clk); ust = 0; @(negedge clk); #1;
      `TB_CHECK(nav == 16'(49 - i), "NAV counts down") end
    `TB_CHECK(!navb, "NAV expired")
    `TB_FINISH
  end
endmodule
