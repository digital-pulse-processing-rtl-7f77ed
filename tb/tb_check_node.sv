// Testbench for check_node (DEG = 6, a chain of four 3-input nodes): constant-rate I&F messages (distinct rates, so trains do not collide in lockstep) mu_{x_j->f}(k) are
// applied; each output count must match the min-sum update of a DEG-input parity check
//   mu_{f->x_j}(k) = min over even (x0,x1,x2) with x_j = k of the sum of the
//   other two variables' input counts,
// within a few pulses.
`include "tb_common.svh"
module tb_check_node;
  localparam int DEG = 6;
  `TB_DECLS
  `WATCHDOG(1500000)
  logic [DEG-1:0] v_rx0, v_rx1, v_tx0, v_tx1;
  check_node #(.DEG(DEG)) dut (.clk, .rst_n, .v_rx0, .v_rx1, .v_tx0, .v_tx1);

  task automatic run(input int T);
    int rate [DEG][2], acc [DEG][2], n [DEG][2], got [DEG][2];
    for (int j = 0; j < DEG; j++) for (int k = 0; k < 2; k++) begin
      rate[j][k] = $urandom_range(50, 300); acc[j][k] = $urandom_range(0, 99999);
      n[j][k] = 0; got[j][k] = 0;
    end
    rst_n = 0; v_rx0 = 0; v_rx1 = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < T; t++) begin
      for (int j = 0; j < DEG; j++) for (int k = 0; k < 2; k++) begin
        logic p;
        acc[j][k] += rate[j][k];
        p = acc[j][k] >= 100000;
        if (p) begin acc[j][k] -= 100000; n[j][k]++; end
        if (k == 0) v_rx0[j] = p; else v_rx1[j] = p;
      end
      @(negedge clk);
      for (int j = 0; j < DEG; j++) begin got[j][0] += int'(v_tx0[j]); got[j][1] += int'(v_tx1[j]); end
    end
    for (int j = 0; j < DEG; j++) for (int k = 0; k < 2; k++) begin
      int best, tol;
      best = 1 << 30;
      for (int c = 0; c < (1 << DEG); c++) begin
        int sum;
        if (($countones(c) % 2) != 0 || ((c >> j) & 1) != k) continue;
        sum = 0;
        for (int i = 0; i < DEG; i++) if (i != j) sum += n[i][(c >> i) & 1];
        if (sum < best) best = sum;
      end
      tol = 8 + best / 25;
      `CHECK(got[j][k] >= best - tol && got[j][k] <= best + tol,
             $sformatf("mu_f->x%0d(%0d) = %0d, expected %0d", j, k, got[j][k], best))
    end
  endtask

  initial begin
    for (int r = 0; r < 3; r++) run(400000);
    `TB_DONE
  end
endmodule
