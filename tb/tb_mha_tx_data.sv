// Testbench for mha_tx_data: random frames with output stalls; checks the
// body octets, the timestamp field when inserted, and the four FCS octets
// against a bitwise CRC-32 (polynomial 0x04C11DB7, reflected) computed here,
// plus out_last and the 4-cycle FCS tail.
`include "tb/tb_util.svh"
module tb_mha_tx_data;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(40000)

  logic tsi, iv, ir, il, ov, orr, ol;
  logic [63:0] tsf;
  logic [7:0] id, od;
  mha_tx_data dut (.clk, .rst_n, .ts_insert(tsi), .tsf, .in_valid(iv), .in_ready(ir), .in_data(id),
                   .in_last(il), .out_valid(ov), .out_ready(orr), .out_data(od), .out_last(ol));

  function automatic logic [31:0] crc_ref(logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c ^= 32'hEDB88320;
    end
    return ~c;
  endfunction

  task automatic frame(int n, bit ts);
    logic [7:0] body [$], exp_o [$];
    logic [31:0] fcs;
    int sent, got;
    tsf = {$urandom, $urandom};
    for (int i = 0; i < n; i++) body.push_back(8'($urandom));
    exp_o = body;
    if (ts) for (int i = 24; i < 32; i++) exp_o[i] = tsf[8 * (i - 24) +: 8];
    fcs = crc_ref(exp_o);
    for (int i = 0; i < 4; i++) exp_o.push_back(fcs[8 * i +: 8]);
    tsi = ts; sent = 0; got = 0;
    while (got < n + 4) begin
      iv = (sent < n) && ($urandom % 4 != 0);
      id = (sent < n) ? body[sent] : 8'h00;
      il = (sent == n - 1);
      orr = ($urandom % 4 != 0);
      #1;
      if (ov && orr) begin
        `TB_CHECK(od == exp_o[got] && ol == (got == n + 3), $sformatf("n=%0d ts=%0d octet %0d", n, ts, got))
        got++;
      end
      if (iv && ir) sent++;
      @(negedge clk);
    end
    iv = 0;
  endtask

  initial begin
    tsi = 0; tsf = 0; iv = 0; id = 0; il = 0; orr = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    frame(10, 0); frame(60, 1); frame(200, 0); frame(1, 0);
    `TB_FINISH
  end
endmodule
