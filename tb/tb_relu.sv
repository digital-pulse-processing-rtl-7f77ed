// Testbench for relu: compares with a reference model every clock, and checks
// that a negative-rate train is blocked while a positive-rate train passes.
`include "tb_common.svh"
module tb_relu;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  localparam int STATES = 3, MID = 1, TOP = 2;
  pulse_t x = NO_PULSE;
  pulse_t y;
  relu #(.STATES(STATES)) dut (.clk, .rst_n, .x, .y);

  int s, ep, en_, np, nn;
  task automatic step(input pulse_t v);
    @(negedge clk);
    `CHECK(y.pos == ep && y.neg == en_, "output mismatch")
    np += int'(y.pos); nn += int'(y.neg);
    x = v; ep = 0; en_ = 0;
    if (v.pos && !v.neg) begin ep = s >= MID; if (s < TOP) s++; end
    else if (v.neg && !v.pos) begin en_ = s > MID; if (s > 0) s--; end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    s = MID; ep = 0; en_ = 0;
    for (int r = 0; r < 8; r++) begin
      int pp, pn, inp, inn;
      pp = (r % 2) ? 20 : 50;
      pn = (r % 2) ? 50 : 20;
      np = 0; nn = 0; inp = 0; inn = 0;
      for (int t = 0; t < 5000; t++) begin
        pulse_t v;
        v.pos = ($urandom_range(0, 99) < pp);
        v.neg = !v.pos && ($urandom_range(0, 99) < pn);
        inp += int'(v.pos); inn += int'(v.neg);
        step(v);
      end
      if (r % 2) `CHECK(np - nn <= 2 + (inp + inn) / 20, $sformatf("negative input leaked %0d", np - nn))
      else       `CHECK(np - nn >= inp - inn - 2 - (inp + inn) / 20 && np - nn <= inp - inn + 2 + (inp + inn) / 20,
                        $sformatf("positive input net %0d passed %0d", inp - inn, np - nn))
    end
    `TB_DONE
  end
endmodule
