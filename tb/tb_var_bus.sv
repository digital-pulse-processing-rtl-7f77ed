// Testbench for var_bus: random transmit patterns, each receiver must hear the
// OR of the other ports and nothing while it transmits itself.
`include "tb_common.svh"
module tb_var_bus;
  `TB_DECLS
  `WATCHDOG(10000)
  localparam int NP = 5;
  logic [NP-1:0] tx, rx;
  logic all_p;
  var_bus #(.NPORT(NP)) dut (.tx, .rx, .all_pulses(all_p));
  initial begin
    for (int it = 0; it < 500; it++) begin
      tx = NP'($urandom);
      #1;
      for (int p = 0; p < NP; p++) begin
        logic e;
        e = 1'b0;
        for (int q = 0; q < NP; q++) if (q != p && tx[q]) e = 1'b1;
        if (tx[p]) e = 1'b0;
        `CHECK(rx[p] == e, $sformatf("tx=%b port %0d rx=%b", tx, p, rx[p]))
      end
      `CHECK(all_p == (tx != 0), "all_pulses")
    end
    `TB_DONE
  end
endmodule
