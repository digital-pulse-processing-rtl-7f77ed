// Shared testbench helpers: check counters, a CHECK macro, clock, watchdog.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH

`define TB_DECLS \
  int checks = 0; \
  int failures = 0; \
  logic clk = 1'b0; \
  logic rst_n = 1'b0; \
  always #5 clk = ~clk;

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL: %s", msg); \
    end \
  end

`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define WATCHDOG(ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    `TB_DONE \
  end

`endif
