// Testbench for abs_value: compares with a reference model every clock, and
// checks that long single-sign trains of either sign give the same positive
// output count (the absolute value) within the hysteresis depth.
`include "tb_common.svh"
module tb_abs_value;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  localparam int GAP_SUM = 2;
  pulse_t x = NO_PULSE;
  pulse_t y;
  abs_value #(.GAP_SUM(GAP_SUM)) dut (.clk, .rst_n, .x, .y);

  int s, ep, nout, nin;
  task automatic step(input pulse_t v);
    @(negedge clk);
    `CHECK(y.pos == ep && !y.neg, "output mismatch")
    nout += int'(y.pos);
    x = v;
    ep = 0;
    if (v.pos && !v.neg) begin if (s == GAP_SUM) ep = 1; else s++; end
    else if (v.neg && !v.pos) begin if (s == 0) ep = 1; else s--; end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    s = GAP_SUM / 2; ep = 0; nout = 0;
    // Random mixed trains against the model.
    for (int t = 0; t < 20000; t++) begin
      pulse_t v;
      v.pos = ($urandom_range(0, 99) < 30);
      v.neg = !v.pos && ($urandom_range(0, 99) < 30);
      step(v);
    end
    // Sign-constant trains: |count| in, about the same out.
    for (int r = 0; r < 6; r++) begin
      pulse_t v;
      nin = 100 + 50 * r;
      nout = 0;
      v.pos = r % 2; v.neg = !v.pos;
      for (int k = 0; k < nin; k++) begin step(v); step(NO_PULSE); step(NO_PULSE); end
      step(NO_PULSE); step(NO_PULSE);
      `CHECK(nout >= nin - GAP_SUM && nout <= nin, $sformatf("run %0d: in %0d out %0d", r, nin, nout))
    end
    `TB_DONE
  end
endmodule
