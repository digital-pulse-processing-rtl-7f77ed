// Testbench for min_max_sorter. Two I&F pulse trains of constant rates are
// sorted; min + max must equal a + b exactly (positive inputs never collide),
// and the min output count must be within two pulses of the smaller input count
// (three-state machine, gap bounds 0/1). Signed trains are checked against the
// bound max - min = |a - b| within the state range.
`include "tb_common.svh"
module tb_min_max_sorter;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  pulse_t a, b, mn, mx;
  min_max_sorter dut (.clk, .rst_n, .a, .b, .mn, .mx);

  int cmn, cmx;
  always @(posedge clk) if (rst_n) begin
    cmn += pulse_val(mn);
    cmx += pulse_val(mx);
  end

  // I&F pulse train of rate ra/1000 (signed), phase from a random start.
  task automatic run(input int ra, input int rb, input int T);
    int acca, accb, na, nb;
    rst_n = 0; a = NO_PULSE; b = NO_PULSE;
    @(negedge clk); @(negedge clk); rst_n = 1; @(negedge clk);
    cmn = 0; cmx = 0; na = 0; nb = 0;
    acca = $urandom_range(0, 999); accb = $urandom_range(0, 999);
    for (int t = 0; t < T; t++) begin
      a = NO_PULSE; b = NO_PULSE;
      acca += ra; accb += rb;
      if (acca >= 1000) begin acca -= 1000; a.pos = 1; na++; end
      if (acca < 0)     begin acca += 1000; a.neg = 1; na--; end
      if (accb >= 1000) begin accb -= 1000; b.pos = 1; nb++; end
      if (accb < 0)     begin accb += 1000; b.neg = 1; nb--; end
      @(negedge clk);
    end
    a = NO_PULSE; b = NO_PULSE;
    repeat (2) @(negedge clk);
    if (ra >= 0 && rb >= 0)
      `CHECK(cmn + cmx == na + nb, $sformatf("conservation min=%0d max=%0d a=%0d b=%0d", cmn, cmx, na, nb))
    `CHECK(cmn >= (na < nb ? na : nb) - 2 && cmn <= (na < nb ? na : nb) + 2,
           $sformatf("ra=%0d rb=%0d min=%0d, a=%0d b=%0d", ra, rb, cmn, na, nb))
    `CHECK(cmx >= (na > nb ? na : nb) - 2 && cmx <= (na > nb ? na : nb) + 2,
           $sformatf("ra=%0d rb=%0d max=%0d, a=%0d b=%0d", ra, rb, cmx, na, nb))
  endtask

  initial begin
    run(100, 37, 20000);
    run(37, 100, 20000);
    run(80, 80, 20000);
    run(250, 249, 20000);
    run(-60, 30, 20000);
    run(-40, -90, 20000);
    `TB_DONE
  end
endmodule
