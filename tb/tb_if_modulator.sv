// Testbench for if_modulator: for several constant inputs, the net pulse count
// after T enabled clocks must equal floor(T*x / 2**16), at most one pulse per
// clock, and no pulses while en is low.
`include "tb_common.svh"
module tb_if_modulator;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)

  logic en = 1'b0;
  logic signed [14:0] x = '0;
  pulse_t p;
  if_modulator dut (.clk, .rst_n, .en, .x, .p);

  int npos, nneg;
  always @(posedge clk) if (rst_n) begin
    npos += int'(p.pos);
    nneg += int'(p.neg);
    if (p.pos && p.neg) begin failures++; $display("FAIL: both wires"); end
  end

  task automatic run(input int val, input int T);
    longint expect_net;
    rst_n = 1'b0; en = 1'b0; x = 15'(val);
    @(posedge clk); @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); npos = 0; nneg = 0;
    en = 1'b1;
    repeat (T) @(negedge clk);
    en = 1'b0;
    repeat (3) @(negedge clk);
    // Floor division toward minus infinity.
    expect_net = (longint'(val) * T) >>> 16;
    `CHECK(npos - nneg == expect_net, $sformatf("x=%0d T=%0d net=%0d expected %0d", val, T, npos - nneg, expect_net))
    `CHECK(val >= 0 ? nneg == 0 : npos == 0, $sformatf("x=%0d wrong-sign pulses", val))
  endtask

  initial begin
    run(1000, 10000);
    run(16383, 5000);
    run(-16384, 5000);
    run(-777, 20000);
    run(1, 70000);
    run(0, 1000);
    for (int i = 0; i < 5; i++) run(int'($urandom_range(0, 32767)) - 16384, 3000 + i * 1000);
    `TB_DONE
  end
endmodule
