// tb_dma_controller: checks the DMA block-transfer engine. The testbench
// programs it over its AHB register port and provides a memory slave with
// random wait states and a bus grant that is sometimes withheld. Each block
// copy must match, the done interrupt must follow the interrupt enable, and
// address translation must redirect the source nibble.
`include "tb/tb_util.svh"
module tb_dma_controller
  import wlan_pkg::*;
;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(400000)

  logic     hsel;
  ahb_m2s_t m2s, mm2s;
  ahb_s2m_t s2m, ms2m;
  logic     busreq, grant, irq;
  dma_controller u_dut (.hclk(clk), .hresetn(rst_n), .s_hsel(hsel), .s_m2s(m2s), .s_hready_in(1'b1),
                        .s_s2m(s2m), .m_hbusreq(busreq), .m_hgrant(grant), .m_m2s(mm2s),
                        .m_s2m(ms2m), .irq);

  `include "tb/tb_ahb_tasks.svh"

  // memory slave: 4 regions of 256 words selected by address bits [31:28]
  logic [31:0] mem [4][256];
  logic        d_wr, d_act;
  logic [31:0] d_addr;
  int          n_wait;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin d_wr <= 0; d_act <= 0; ms2m.hready <= 1; end
    else begin
      if (ms2m.hready) begin
        if (d_act && d_wr) mem[d_addr[29:28]][d_addr[9:2]] <= mm2s.hwdata;
        d_act  <= grant && mm2s.htrans[1];
        d_wr   <= mm2s.hwrite;
        d_addr <= mm2s.haddr;
        if (grant && mm2s.htrans[1]) begin
          `TB_CHECK(mm2s.haddr[31:30] == 0, "address inside the memory model")
          ms2m.hready <= ($urandom_range(0, 2) != 0);
        end
      end else begin ms2m.hready <= 1; n_wait++; end
    end
  end
  assign ms2m.hrdata = mem[d_addr[29:28]][d_addr[9:2]];
  assign ms2m.hresp  = 2'b00;
  // the grant is withheld now and then, only changing on ready cycles
  always @(posedge clk) if (ms2m.hready) grant <= busreq && ($urandom_range(0, 3) != 0);

  task automatic run_block(input int s_reg, input int d_reg, input int n, input bit ien, input bit xen,
                           input int s_real);
    logic [31:0] q;
    int t;
    for (int k = 0; k < 256; k++) mem[s_real >> 28][k] = $urandom;
    ahb_write(32'h00, 32'(s_reg));
    ahb_write(32'h04, 32'(d_reg));
    ahb_write(32'h08, 32'(n));
    ahb_write(32'h0C, {29'd0, xen, ien, 1'b1});
    ahb_read(32'h10, q);
    `TB_CHECK(q[0], "busy after start")
    t = 0;
    do begin ahb_read(32'h10, q); t++; end while (!q[1] && t < 5000);
    `TB_CHECK(q[1] && !q[0], "done and idle")
    `TB_CHECK(irq == ien, "interrupt follows enable")
    for (int k = 0; k < n; k++) begin
      logic [31:0] sv, dv;
      sv = mem[s_real >> 28][((s_real & 32'h3FF) >> 2) + k];
      dv = mem[d_reg >> 28][((d_reg & 32'h3FF) >> 2) + k];
      `TB_CHECK(dv == sv, $sformatf("word %0d copied: %h expected %h", k, dv, sv))
    end
    ahb_write(32'h10, 32'h2);
    #1;
    `TB_CHECK(!irq, "done cleared")
  endtask

  initial begin
    logic [31:0] q;
    m2s = '0; hsel = 0; n_wait = 0; grant = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ahb_write(32'h14, 32'h0000_0023);
    ahb_read(32'h14, q);
    `TB_CHECK(q == 32'h23, "XLT read-back")
    run_block(32'h0000_0000, 32'h1000_0000, 16, 1, 0, 32'h0000_0000);
    run_block(32'h1000_0040, 32'h2000_0100, 33, 0, 0, 32'h1000_0040);
    run_block(32'h2000_0000, 32'h0000_0200, 1, 1, 0, 32'h2000_0000);
    for (int r = 0; r < 6; r++) begin
      automatic int n = $urandom_range(1, 60);
      automatic int so = 4 * $urandom_range(0, 255 - n);
      automatic int dof = 4 * $urandom_range(0, 255 - n);
      run_block(32'h2000_0000 | so, 32'h1000_0000 | dof, n, r % 2 == 1, 0, 32'h2000_0000 | so);
    end
    // translation: software gives source nibble 3, the DMA reads region 2
    run_block(32'h3000_0010, 32'h0000_0100, 20, 1, 1, 32'h2000_0010);
    // a zero-length start does nothing
    ahb_write(32'h08, 32'h0);
    ahb_write(32'h0C, 32'h1);
    ahb_read(32'h10, q);
    `TB_CHECK(!q[0], "zero length stays idle")
    `TB_CHECK(n_wait > 10, "wait states exercised")
    `TB_FINISH
  end
endmodule
