// Shared testbench helpers: check counting, result line and a watchdog.
// Include inside a testbench module that declares clk.
int checks = 0;
int failures = 0;

`define CHECK(COND, MSG) \
  begin \
    checks++; \
    if (!(COND)) begin \
      failures++; \
      if (failures <= 20) $display("FAIL: %s (time %0t)", MSG, $time); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define TB_WATCHDOG(CYCLES) \
  initial begin \
    repeat (CYCLES) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    `TB_FINISH \
  end
