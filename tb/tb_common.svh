// tb_common.svh: check counter, check macro and watchdog shared by the testbenches.
// CHECK(cond, msg) counts a check and reports and counts a failure when cond is false.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("watchdog expired"); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
