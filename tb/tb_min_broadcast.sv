// Testbench for min_broadcast (NIN = 3): pulses from the variable side must be
// copied onto the buses one clock later, and the forward output must carry the
// min of the three bus inputs (I&F trains of constant rates) within 3 pulses.
`include "tb_common.svh"
module tb_min_broadcast;
  `TB_DECLS
  `WATCHDOG(200000)
  logic [2:0] w_rx;
  logic w_tx, c_rx, c_tx, c_rx_d;
  min_broadcast #(.NIN(3)) dut (.clk, .rst_n, .w_rx, .w_tx, .c_rx, .c_tx);

  always @(posedge clk) c_rx_d <= c_rx;

  task automatic run(input int r0, input int r1, input int r2, input int T);
    int acc [3], rate [3], n [3], cnt, mn;
    rate = '{r0, r1, r2};
    rst_n = 0; w_rx = 0; c_rx = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    cnt = 0; n = '{0, 0, 0};
    for (int i = 0; i < 3; i++) acc[i] = $urandom_range(0, 999);
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < 3; i++) begin
        acc[i] += rate[i];
        w_rx[i] = acc[i] >= 1000;
        if (w_rx[i]) begin acc[i] -= 1000; n[i]++; end
      end
      c_rx = $urandom_range(0, 9) == 0;
      @(negedge clk);
      `CHECK(w_tx == c_rx_d, "broadcast copy")
      cnt += int'(c_tx);
    end
    w_rx = 0; c_rx = 0;
    repeat (4) @(negedge clk) cnt += int'(c_tx);
    mn = n[0]; if (n[1] < mn) mn = n[1]; if (n[2] < mn) mn = n[2];
    `CHECK(cnt >= mn - 3 && cnt <= mn + 3, $sformatf("min count %0d expected %0d", cnt, mn))
  endtask

  initial begin
    run(50, 120, 90, 20000);
    run(200, 40, 41, 20000);
    run(70, 70, 70, 20000);
    `TB_DONE
  end
endmodule
