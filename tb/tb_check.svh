// tb_check.svh: shared checking macros for the DX testbenches.
// Each testbench declares `int checks, failures;` and uses CHECK to count a
// check and report and count a failure when the condition does not hold.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; \
    if (failures < 20) $display("FAIL %0t: %s", $time, msg); end end
`endif
