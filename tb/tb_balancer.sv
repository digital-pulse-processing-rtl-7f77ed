// Testbench for balancer: random signed inputs on both ports; checks charge
// conservation every clock and the step property: the running net count on
// top minus bottom stays within 0..1.
`include "tb_common.svh"
module tb_balancer;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)
  pulse_t in0 = NO_PULSE, in1 = NO_PULSE;
  pulse_t top, bot;
  balancer dut (.clk, .rst_n, .in0, .in1, .top, .bot);

  int nin, ntop, nbot;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nin = 0; ntop = 0; nbot = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      in0.pos = ($urandom_range(0, 9) < 3); in0.neg = !in0.pos && ($urandom_range(0, 9) < 2);
      in1.pos = ($urandom_range(0, 9) < 3); in1.neg = !in1.pos && ($urandom_range(0, 9) < 2);
      #1;
      nin += pulse_val(in0) + pulse_val(in1);
      ntop += pulse_val(top);
      nbot += pulse_val(bot);
      `CHECK(!(top.pos && top.neg) && !(bot.pos && bot.neg), "both wires")
      `CHECK(ntop + nbot == nin, $sformatf("t=%0d conservation", t))
      `CHECK(ntop - nbot >= 0 && ntop - nbot <= 1, $sformatf("t=%0d step %0d", t, ntop - nbot))
    end
    `TB_DONE
  end
endmodule
