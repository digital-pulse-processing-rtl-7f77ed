// Testbench for pulse_delay: a random pulse stream must reappear on y exactly
// DELAY clocks later, and every tap k must equal the input k+1 clocks ago.
`include "tb_common.svh"
module tb_pulse_delay;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int DELAY = 16;
  pulse_t x = NO_PULSE;
  pulse_t y;
  pulse_t tap [DELAY];
  pulse_delay #(.DELAY(DELAY)) dut (.clk, .rst_n, .x, .y, .tap);

  pulse_t hist [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (hist.size() >= DELAY) begin
        `CHECK(y == hist[hist.size() - DELAY], $sformatf("t=%0d y", t))
        for (int k = 0; k < DELAY; k++)
          if (tap[k] != hist[hist.size() - 1 - k]) begin
            failures++; $display("FAIL: t=%0d tap %0d", t, k);
          end
      end
      x.pos = ($urandom_range(0, 9) < 3);
      x.neg = !x.pos && ($urandom_range(0, 9) < 3);
      hist.push_back(x);
    end
    `TB_DONE
  end
endmodule
