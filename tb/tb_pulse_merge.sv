// Testbench for pulse_merge: random signed pulses on NIN inputs; the output
// and the collision flag are compared with a model, and the net count lost
// is checked to equal what the model says collisions removed.
`include "tb_common.svh"
module tb_pulse_merge;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int NIN = 3;
  pulse_t x [NIN];
  pulse_t y;
  logic collision;
  pulse_merge #(.NIN(NIN)) dut (.clk, .rst_n, .x, .y, .collision);

  int np, nn, ep, en_, ecol, ncol;
  initial begin
    for (int i = 0; i < NIN; i++) x[i] = NO_PULSE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ncol = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (t > 0) begin
        `CHECK(y.pos == (ep > 0 && en_ == 0) && y.neg == (en_ > 0 && ep == 0),
               $sformatf("t=%0d output p=%0d n=%0d", t, ep, en_))
        `CHECK(collision == (ecol != 0), $sformatf("t=%0d collision", t))
        ncol += int'(collision);
      end
      np = 0; nn = 0;
      for (int i = 0; i < NIN; i++) begin
        x[i].pos = ($urandom_range(0, 99) < 15);
        x[i].neg = !x[i].pos && ($urandom_range(0, 99) < 10);
        np += int'(x[i].pos); nn += int'(x[i].neg);
      end
      ep = np; en_ = nn; ecol = (np > 1 || nn > 1);
    end
    `CHECK(ncol > 0, "collisions happened")
    `TB_DONE
  end
endmodule
