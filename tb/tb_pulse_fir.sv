// Testbench for pulse_fir with 8 taps on an 8-wide network. Part 1: all taps
// positive, OUT_NUM = 3, so the output count must track 3 times the input
// count. Part 2: alternating tap signs give zero net gain, and a single
// impulse checks that output pulses appear only within the tap delays plus the
// network latency.
// Input rates are kept low: same-sign pulses that leave selected outputs in
// the same clock merge into one, as in any pulse merge.
`include "tb_common.svh"
module tb_pulse_fir;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  pulse_t xa = NO_PULSE, xb = NO_PULSE;
  pulse_t ya, yb;
  pulse_fir #(.NTAPS(8), .NET_W(8), .OUT_NUM(3), .TAP_DLY('{1, 3, 5, 7, 9, 11, 13, 15})) dut_a (
    .clk, .rst_n, .x(xa), .y(ya));
  pulse_fir #(.NTAPS(8), .NET_W(8), .OUT_NUM(8), .TAP_DLY('{1, 2, 3, 4, 5, 6, 7, 8}),
              .TAP_NEG('{1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1})) dut_b (
    .clk, .rst_n, .x(xb), .y(yb));

  int nin, ntot, na, nb, first_b, last_b, t;
  always @(posedge clk) if (rst_n) begin
    na += pulse_val(ya);
    nb += pulse_val(yb);
    if (yb.pos || yb.neg) begin
      if (first_b < 0) first_b = t;
      last_b = t;
    end
  end

  initial begin
    nin = 0; ntot = 0; na = 0; nb = 0; t = 0; first_b = -1; last_b = -1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 2000; k++) begin
        @(negedge clk);
        xa.pos = ($urandom_range(0, 99) < 2);
        xa.neg = !xa.pos && ($urandom_range(0, 99) < (r % 2 ? 3 : 1));
        nin += pulse_val(xa); ntot += int'(xa.pos | xa.neg);
        xb = xa;
      end
      @(negedge clk); xa = NO_PULSE; xb = NO_PULSE;
      repeat (40) @(negedge clk);
      `CHECK(na - 3 * nin <= 8 + ntot / 20 && 3 * nin - na <= 8 + ntot / 20, $sformatf("gain 3: in %0d out %0d", nin, na))
      `CHECK(nb >= -8 - ntot / 20 && nb <= 8 + ntot / 20, $sformatf("zero gain: out %0d", nb))
    end
    // Impulse response of dut_b: 8 pulses of alternating sign at delays 1..8.
    nb = 0; first_b = -1; last_b = -1;
    @(negedge clk); t = 0; xb.pos = 1'b1;
    fork
      forever begin @(posedge clk); t++; end
    join_none
    @(negedge clk); xb = NO_PULSE;
    repeat (40) @(negedge clk);
    `CHECK(first_b >= 1 && last_b <= 8 + 4 + 8, $sformatf("impulse span %0d..%0d", first_b, last_b))
    `CHECK(nb >= -1 && nb <= 1, $sformatf("impulse net %0d", nb))
    `TB_DONE
  end
endmodule
