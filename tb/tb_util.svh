// Shared testbench helpers: clock, check counters and the result line.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(cycles) \
  initial begin repeat (cycles) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_FINISH end
`endif
