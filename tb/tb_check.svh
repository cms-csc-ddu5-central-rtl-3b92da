// tb_check.svh: check counting shared by the testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure and
// prints msg. TB_DONE prints the result line and ends the simulation.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %0t: %s", $time, msg); end end
`define TB_DONE \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(cycles) \
  initial begin repeat (cycles) @(posedge clk); failures++; $display("FAIL: watchdog"); `TB_DONE end
`endif
