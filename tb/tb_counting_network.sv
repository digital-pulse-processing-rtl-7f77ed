// Testbench for counting_network: random signed pulse trains on all inputs;
// after each clock the net counts on the outputs must add up to the net input
// (delayed by the one-clock output register) and, at quiet points, satisfy the
// step property: every output count is within one of every other.
`include "tb_common.svh"
module tb_counting_network;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  localparam int WIDTH = 8;
  pulse_t x [WIDTH];
  pulse_t y [WIDTH];
  counting_network #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .x, .y);

  int nin, nout [WIDTH];
  int mn, mx, tot;
  always @(posedge clk) if (rst_n) for (int j = 0; j < WIDTH; j++) nout[j] += pulse_val(y[j]);

  initial begin
    for (int j = 0; j < WIDTH; j++) begin x[j] = NO_PULSE; nout[j] = 0; end
    nin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int burst = 0; burst < 200; burst++) begin
      for (int t = 0; t < 50; t++) begin
        @(negedge clk);
        for (int j = 0; j < WIDTH; j++) begin
          x[j].pos = ($urandom_range(0, 99) < 20);
          x[j].neg = !x[j].pos && ($urandom_range(0, 99) < (burst % 2 ? 25 : 8));
          nin += pulse_val(x[j]);
        end
      end
      @(negedge clk);
      for (int j = 0; j < WIDTH; j++) x[j] = NO_PULSE;
      repeat (3) @(negedge clk);
      tot = 0; mn = nout[0]; mx = nout[0];
      for (int j = 0; j < WIDTH; j++) begin
        tot += nout[j];
        if (nout[j] < mn) mn = nout[j];
        if (nout[j] > mx) mx = nout[j];
      end
      `CHECK(tot == nin, $sformatf("burst %0d: out %0d in %0d", burst, tot, nin))
      `CHECK(mx - mn <= 1, $sformatf("burst %0d: spread %0d", burst, mx - mn))
    end
    `TB_DONE
  end
endmodule
