// tb_util.svh: shared check and finish macros for the self-checking
// testbenches. Each testbench declares `int checks, failures;`.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL t=%0t: %s", $time, msg); \
    end \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define TB_WATCHDOG(clk, n) \
  initial begin \
    repeat (n) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    `TB_DONE \
  end
`endif
