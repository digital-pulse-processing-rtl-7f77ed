// Testbench for sign_detector: drives random bus0/bus1 pulse patterns and
// compares the saturating counter, the decided flag and the hard bit against a
// reference model every clock.
`include "tb_common.svh"
module tb_sign_detector;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int CNT_W = 3;
  localparam int CMAX = (1 << (CNT_W - 1)) - 1;
  logic bus0 = 1'b0, bus1 = 1'b0;
  logic bit_o, decided;
  sign_detector #(.CNT_W(CNT_W)) dut (.clk, .rst_n, .bus0, .bus1, .bit_o, .decided);

  int model;
  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      `CHECK(decided == (model != 0), $sformatf("decided at count %0d", model))
      `CHECK(bit_o == (model < 0), $sformatf("bit at count %0d", model))
      // Biased phases so both saturation limits are reached.
      bus0 = ($urandom_range(0, 99) < ((i / 1000) % 2 ? 70 : 20));
      bus1 = ($urandom_range(0, 99) < ((i / 1000) % 2 ? 20 : 70));
      if (bus0 && !bus1 && model < CMAX) model++;
      else if (bus1 && !bus0 && model > -CMAX) model--;
    end
    `TB_DONE
  end
endmodule
