// Testbench for ldpc_ctrl: checks the clear/run/done sequence, the success
// path when valid rises, the timeout path when the input pulse budget is
// spent, and the cycle and pulse counters.
`include "tb_common.svh"
module tb_ldpc_ctrl;
  `TB_DECLS
  `WATCHDOG(100000)
  localparam int BUDGET = 500;
  logic start = 1'b0, valid = 1'b0;
  logic [10:0] in_pulses = '0;
  logic clear, run, done, success;
  logic [23:0] cycles;
  logic [31:0] pulses;
  ldpc_ctrl #(.BUDGET(BUDGET)) dut (.clk, .rst_n, .start, .valid, .in_pulses, .clear, .run,
                                    .done, .success, .cycles, .pulses);

  task automatic go();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    `CHECK(clear && !run && !done, "clear after start")
    @(negedge clk);
    `CHECK(run && !clear && !done, "run after clear")
  endtask

  int n, tot;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    `CHECK(!clear && !run && !done, "idle after reset")
    // Success path.
    go();
    tot = 0;
    for (n = 0; n < 20; n++) begin
      in_pulses = 11'(n % 3); tot += n % 3;
      @(negedge clk);
    end
    in_pulses = '0; valid = 1'b1;
    @(negedge clk); valid = 1'b0;
    `CHECK(done && success, "done with success")
    `CHECK(cycles == 21, $sformatf("cycles %0d", cycles))
    `CHECK(pulses == tot, $sformatf("pulses %0d expected %0d", pulses, tot))
    repeat (5) @(negedge clk);
    `CHECK(done && success && cycles == 21, "done holds")
    // Timeout path.
    go();
    `CHECK(!success && cycles == 0 && pulses == 0, "counters cleared")
    n = 0;
    while (!done && n < 1000) begin
      in_pulses = 11'd7; n++;
      @(negedge clk);
    end
    `CHECK(done && !success, "timeout without success")
    `CHECK(n == (BUDGET + 6) / 7, $sformatf("timeout after %0d clocks", n))
    `CHECK(pulses >= BUDGET && pulses < BUDGET + 7, $sformatf("pulses at timeout %0d", pulses))
    `TB_DONE
  end
endmodule
