// tb_check.svh: shared self-check counters and macros for the testbenches.
// CHECK(cond, msg) counts one check and, when cond is false or unknown, one failure
// with a message. TB_FINISH prints the result line and ends the run.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if ((|(cond)) !== 1'b1) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
