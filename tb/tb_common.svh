// tb_common.svh: counters, a check macro and the closing report shared by the
// block testbenches. TB_FINISH prints the TB_RESULT line and ends simulation.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(t) \
  initial begin #(t); failures++; $display("WATCHDOG expired"); `TB_FINISH end
`endif
