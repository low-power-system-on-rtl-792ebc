// Testbench for mha_rx_data: frames with a correct FCS (computed here with
// a bitwise CRC-32), with one corrupted octet, and too short/too long ones;
// checks frame_ok/crc_err/len_err/frame_len and the header/payload split.
`include "tb/tb_util.svh"
module tb_mha_rx_data;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(40000)

  logic iv, il, hv, pv, fe, fok, ce, le;
  logic [7:0] id, hd, pd;
  logic [4:0] hi;
  logic [11:0] fl;
  mha_rx_data #(.MAX_LEN(400)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .in_last(il),
      .hdr_valid(hv), .hdr_idx(hi), .hdr_data(hd), .pay_valid(pv), .pay_data(pd),
      .frame_end(fe), .frame_ok(fok), .crc_err(ce), .len_err(le), .frame_len(fl));

  function automatic logic [31:0] crc_ref(logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c ^= 32'hEDB88320;
    end
    return ~c;
  endfunction

  task automatic frame(int n, bit corrupt, bit exp_ok, bit exp_crc, bit exp_len);
    logic [7:0] f [$];
    logic [31:0] fcs;
    int nh, np;
    for (int i = 0; i < n - 4; i++) f.push_back(8'($urandom));
    fcs = crc_ref(f);
    for (int i = 0; i < 4; i++) f.push_back(fcs[8 * i +: 8]);
    if (corrupt) f[n / 2] ^= 8'h10;
    nh = 0; np = 0;
    foreach (f[i]) begin
      iv = 1; id = f[i]; il = (i == n - 1); #1;
      if (i < 24) begin `TB_CHECK(hv && !pv && hi == 5'(i) && hd == f[i], "header octet"); nh++; end
      else begin `TB_CHECK(pv && !hv && pd == f[i], "payload octet"); np++; end
      @(negedge clk);
      if ($urandom % 3 == 0 && i != n - 1) begin iv = 0; #1; `TB_CHECK(!hv && !pv, "idle gap") @(negedge clk); end
    end
    iv = 0; il = 0; #1;
    `TB_CHECK(fe && fok == exp_ok && ce == exp_crc && le == exp_len && fl == 12'(n),
              $sformatf("verdict n=%0d corrupt=%0d ok=%0d crc=%0d len=%0d", n, corrupt, fok, ce, le))
    @(negedge clk);
    #1; `TB_CHECK(!fe, "frame_end is a pulse")
  endtask

  initial begin
    iv = 0; id = 0; il = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    frame(14, 0, 1, 0, 0);
    frame(100, 0, 1, 0, 0);
    frame(100, 1, 0, 1, 0);
    frame(10, 0, 0, 0, 1);
    frame(420, 0, 0, 0, 1);
    frame(400, 0, 1, 0, 0);
    `TB_FINISH
  end
endmodule
