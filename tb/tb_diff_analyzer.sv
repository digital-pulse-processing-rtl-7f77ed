// Testbench for diff_analyzer: solves dx/dt = a*x from x0 = 1. Each pulse must
// step x by one, the gap before the pulse that leaves x = n must be close to
// 2**ACC_W / (a * (n - 1)) clocks (exponential growth), and once a*x exceeds
// the accumulator range the overflow flag must rise and pulses must stop.
`include "tb_common.svh"
module tb_diff_analyzer;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  localparam int ALPHA = 64;
  logic start = 1'b0;
  logic signed [15:0] x;
  pulse_t p;
  logic overflow;
  diff_analyzer #(.ALPHA(ALPHA)) dut (.clk, .rst_n, .start, .x, .p, .overflow);

  int last_t, t, gap, expect_gap, prev_x, npulse;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    `CHECK(x == 1 && !overflow, "initial condition")
    last_t = 0; npulse = 0; prev_x = 1;
    for (t = 1; t < 100000 && !overflow; t++) begin
      @(negedge clk);
      if (x != prev_x) begin
        `CHECK(x == prev_x + 1, $sformatf("x jumped %0d -> %0d", prev_x, x))
        gap = t - last_t;
        expect_gap = 65536 / (ALPHA * prev_x);
        if (npulse > 0)
          `CHECK(gap >= expect_gap - 2 && gap <= expect_gap + 2 + expect_gap / prev_x,
                 $sformatf("x=%0d gap %0d expected about %0d", x, gap, expect_gap))
        npulse++; last_t = t; prev_x = x;
      end
    end
    `CHECK(overflow, "overflow reached")
    `CHECK(int'(x) * ALPHA > 32767, $sformatf("overflow at x=%0d", x))
    prev_x = x;
    repeat (200) @(negedge clk);
    `CHECK(x == prev_x, "no pulses after overflow")
    `CHECK(npulse > 400, $sformatf("pulses %0d", npulse))
    `TB_DONE
  end
endmodule
