// tb_check.svh: counters and a compare macro shared by the testbenches.
// `CHECK(cond, msg) counts one check and, if cond is false, one failure
// with a message. Each testbench declares: int checks, failures;
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`define TB_END \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
