// Testbench for const_mult: random signed pulse trains; the output is compared
// with a reference accumulator model every clock, and the net output count is
// checked to stay within one pulse of N/D times the net input count.
`include "tb_common.svh"
module tb_const_mult;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int N = 3, D = 8;
  pulse_t x = NO_PULSE;
  pulse_t y;
  const_mult #(.N(N), .D(D)) dut (.clk, .rst_n, .x, .y);

  int acc, nin, nout, ep, en_, nov, nun;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    acc = 0; nin = 0; nout = 0; ep = 0; en_ = 0; nov = 0; nun = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      `CHECK(y.pos == ep && y.neg == en_, $sformatf("t=%0d output", t))
      nout += pulse_val(y);
      nov += int'(y.pos); nun += int'(y.neg);
      x.pos = ($urandom_range(0, 99) < ((t / 3000) % 2 ? 10 : 40));
      x.neg = !x.pos && ($urandom_range(0, 99) < ((t / 3000) % 2 ? 40 : 10));
      nin += pulse_val(x);
      acc += pulse_val(x) * N;
      ep = 0; en_ = 0;
      if (acc >= D) begin acc -= D; ep = 1; end
      else if (acc < 0) begin acc += D; en_ = 1; end
      if (t % 1000 == 999)
        `CHECK(nout * D - nin * N <= 2 * D && nin * N - nout * D <= 2 * D,
               $sformatf("t=%0d ratio in=%0d out=%0d", t, nin, nout))
    end
    `CHECK(nov > 0 && nun > 0, "both overflow and underflow happened")
    `TB_DONE
  end
endmodule
