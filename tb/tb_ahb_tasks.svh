// AHB master tasks shared by the slave testbenches. The including module
// declares clk, hsel, m2s (ahb_m2s_t) and s2m (ahb_s2m_t). Each task drives
// one single transfer (address phase, then data phase) and waits out any
// wait states the slave inserts.
task automatic ahb_idle();
  m2s.htrans = HT_IDLE; m2s.hwrite = 1'b0; hsel = 1'b0;
endtask

task automatic ahb_write(input logic [31:0] a, input logic [31:0] d, input logic [2:0] sz = 3'd2);
  @(negedge clk);
  m2s.haddr = a; m2s.htrans = HT_NONSEQ; m2s.hwrite = 1'b1; m2s.hsize = sz; hsel = 1'b1;
  @(posedge clk);
  @(negedge clk);
  ahb_idle(); m2s.hwdata = d;
  while (!s2m.hready) begin @(posedge clk); @(negedge clk); end
  @(posedge clk);
endtask

task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
  @(negedge clk);
  m2s.haddr = a; m2s.htrans = HT_NONSEQ; m2s.hwrite = 1'b0; m2s.hsize = 3'd2; hsel = 1'b1;
  @(posedge clk);
  @(negedge clk);
  ahb_idle();
  while (!s2m.hready) begin @(posedge clk); @(negedge clk); end
  d = s2m.hrdata;
  @(posedge clk);
endtask
