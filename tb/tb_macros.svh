// tb_macros.svh: check counting shared by the testbenches.
`ifndef TB_MACROS_SVH
`define TB_MACROS_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 20) $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`define TB_END \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define WATCHDOG(ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog expired"); \
    `TB_END \
  end
`endif
