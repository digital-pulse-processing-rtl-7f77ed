// Testbench for ldpc_decoder at lifting factor Z = 8 (192 bits). Random
// codewords are sent as BPSK over Gaussian noise; the channel LLRs are scaled
// so each I&F modulator fires in at most a few percent of clocks (the bus and
// check circuits assume pulses are sparse compared with the clock). Checks:
// - words with no channel errors decode successfully and exactly;
// - noisy words with a few hard-decision errors are corrected;
// - a word of pure noise is not a codeword and the decoder times out after
//   its input pulse budget, reporting failure;
// - the pulse counter matches the budget on timeout.
`include "tb_common.svh"
`include "ldpc_tb_util.svh"
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  `TB_DECLS
  `WATCHDOG(3000000)

  localparam int Z = 8, N = NB * Z, MAXP = 32;
  logic start = 1'b0;
  logic signed [14:0] llr [N];
  logic done, success;
  logic [N-1:0] bits;
  logic [23:0] cycles;
  logic [31:0] pulses;
  ldpc_decoder #(.Z(Z)) dut (.clk, .rst_n, .start, .llr, .done, .success, .bits, .cycles, .pulses);

  int ncorr, nsucc;
  real sc = 600.0;

  // Send one word; sigma = 0 means noiseless; noise_only drops the signal.
  task automatic trial(input real sigma, input real scale, input bit noise_only, input bit expect_ok);
    bit cw [];
    int herr, nerr, t;
    cw = new[N];
    ldpc_encode(Z, cw);
    herr = 0;
    for (int v = 0; v < N; v++) begin
      real y = (noise_only ? 0.0 : (cw[v] ? -1.0 : 1.0)) + sigma * gauss();
      if ((y < 0.0) != cw[v]) herr++;
      llr[v] = 15'($rtoi(scale * y));
    end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    t = 0;
    while (!done && t < 2000000) begin @(negedge clk); t++; end
    nerr = 0;
    for (int v = 0; v < N; v++)
      if (bits[v] != cw[v]) begin
        nerr++;
        if (nerr <= 8) $display("  wrong bit %0d (block column %0d) sent %0d llr %0d", v, v / Z, cw[v], llr[v]);
      end
    $display("trial sigma=%0.2f hard errors=%0d: done=%0d success=%0d cycles=%0d pulses=%0d bit errors=%0d",
             sigma, herr, done, success, cycles, pulses, nerr);
    `CHECK(done, "decoder finished")
    if (expect_ok) begin
      `CHECK(success && nerr == 0, $sformatf("decode failed: %0d hard errors, %0d left", herr, nerr))
      if (herr > 0 && success && nerr == 0) ncorr++;
    end else begin
      `CHECK(!success, "noise word reported as success")
      `CHECK(pulses >= MAXP * N && pulses < MAXP * N + N, $sformatf("timeout pulses %0d", pulses))
    end
    nsucc += int'(success);
  endtask

  initial begin
    ncorr = 0; nsucc = 0;
    begin int s_; if ($value$plusargs("scale=%d", s_)) sc = real'(s_); end
    for (int v = 0; v < N; v++) llr[v] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    trial(0.0, sc, 1'b0, 1'b1);
    trial(0.0, sc, 1'b0, 1'b1);
    for (int i = 0; i < 6; i++) trial(0.45, sc, 1'b0, 1'b1);
    trial(1.0, sc, 1'b1, 1'b0);
    `CHECK(ncorr > 0, "at least one word with channel errors was corrected")
    `TB_DONE
  end
endmodule
