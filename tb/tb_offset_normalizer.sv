// Testbench for offset_normalizer. Random pulse pairs are applied; a reference
// window model predicts every output pulse, and over long constant-rate runs
// the outputs must carry mu(0)-min and mu(1)-min: out0 - out1 equals
// n0 - n1 minus the change of the window position, and only the larger input
// produces output.
`include "tb_common.svh"
module tb_offset_normalizer;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int NS = 3;
  logic in0 = 0, in1 = 0, out0, out1;
  offset_normalizer #(.NSTATES(NS)) dut (.clk, .rst_n, .in0, .in1, .out0, .out1);

  int s_ref, e0, e1, n0, n1, c0, c1;

  task automatic run(input int p0, input int p1, input int T, input bit regular);
    int a0, a1;
    rst_n = 0; in0 = 0; in1 = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    a0 = $urandom_range(0, 999); a1 = $urandom_range(0, 999);
    s_ref = 0; n0 = 0; n1 = 0; c0 = 0; c1 = 0;
    for (int t = 0; t < T; t++) begin
      if (regular) begin
        // I&F trains of rates p0/1000 and p1/1000.
        a0 += p0; a1 += p1;
        in0 = a0 >= 1000; if (in0) a0 -= 1000;
        in1 = a1 >= 1000; if (in1) a1 -= 1000;
      end else begin
        in0 = ($urandom_range(0, 999) < p0);
        in1 = ($urandom_range(0, 999) < p1);
      end
      e0 = 0; e1 = 0;
      if (in0 && !in1) begin if (s_ref == NS-1) e0 = 1; else s_ref++; end
      else if (in1 && !in0) begin if (s_ref == 0) e1 = 1; else s_ref--; end
      n0 += int'(in0); n1 += int'(in1);
      @(negedge clk);
      `CHECK(out0 == e0[0] && out1 == e1[0], $sformatf("t=%0d out=%b%b expected %0d%0d", t, out0, out1, e0, e1))
      c0 += int'(out0); c1 += int'(out1);
    end
    in0 = 0; in1 = 0;
    `CHECK(c0 - c1 == n0 - n1 - s_ref, "conservation of the difference")
    if (regular && p0 > p1 + 50) `CHECK(c1 <= NS && c0 >= n0 - n1 - NS, $sformatf("mu0 larger: c0=%0d c1=%0d n0=%0d n1=%0d", c0, c1, n0, n1))
    if (regular && p1 > p0 + 50) `CHECK(c0 <= NS && c1 >= n1 - n0 - NS, $sformatf("mu1 larger: c0=%0d c1=%0d", c0, c1))
  endtask

  initial begin
    run(300, 100, 3000, 1);
    run(100, 300, 3000, 1);
    run(200, 200, 3000, 1);
    run(500, 50, 2000, 0);
    run(200, 230, 3000, 0);
    `TB_DONE
  end
endmodule
