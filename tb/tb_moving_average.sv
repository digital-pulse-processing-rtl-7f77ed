// Testbench for moving_average: the output must equal the net pulse count of
// the last W inputs, checked every clock against a model window.
`include "tb_common.svh"
module tb_moving_average;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int W = 32;
  pulse_t x = NO_PULSE;
  logic signed [$clog2(W+1):0] y;
  moving_average #(.W(W)) dut (.clk, .rst_n, .x, .y);

  int hist [$];
  int sum;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      sum = 0;
      for (int k = 0; k < W && k < hist.size(); k++) sum += hist[hist.size() - 1 - k];
      `CHECK(int'(y) == sum, $sformatf("t=%0d y=%0d expected %0d", t, y, sum))
      // Slowly varying density so the window sweeps from -W to +W.
      x.pos = ($urandom_range(0, 999) < 500 + 480 * ((t / 500) % 3 - 1));
      x.neg = !x.pos;
      if ((t / 2000) % 2 == 1 && $urandom_range(0, 1) == 1) x = NO_PULSE;
      hist.push_back(pulse_val(x));
    end
    `TB_DONE
  end
endmodule
