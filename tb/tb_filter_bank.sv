// Testbench for filter_bank at its full size (7 sources, three 64-tap
// filters). Part 1: constant source levels; the merged stream's windowed
// count must match the summed source rates (rec_merged). Part 2: one source
// carries a sinusoid at each band's centre period in turn; the output pulse
// component of each band output at the tone frequency (found by correlating
// the net output pulses with the tone) must be largest for the matching band.
`include "tb_common.svh"
module tb_filter_bank;
  import pulse_pkg::*;
  `TB_DECLS
  `WATCHDOG(200000)
  localparam int P [3] = '{48, 80, 128};
  logic signed [14:0] x [7];
  pulse_t merged, band [3];
  logic collision;
  logic signed [9:0] rec_merged, rec_band [3];
  filter_bank #(.REC_W(10)) dut (.clk, .rst_n, .x, .merged, .collision, .band, .rec_merged, .rec_band);

  int act [3], ncol, tcnt, pk;
  real cs [3], sn [3];
  bit counting;
  always @(posedge clk) if (rst_n) begin
    ncol += int'(collision);
    if (counting) for (int k = 0; k < 3; k++) begin
      act[k] += int'(band[k].pos | band[k].neg);
      cs[k] += real'(pulse_val(band[k])) * $cos(2.0 * 3.14159265 * real'(tcnt) / real'(P[pk]));
      sn[k] += real'(pulse_val(band[k])) * $sin(2.0 * 3.14159265 * real'(tcnt) / real'(P[pk]));
    end
    tcnt++;
  end

  initial begin
    int expect_m;
    real amp [3];
    tcnt = 0; pk = 0;
    ncol = 0; counting = 1'b0;
    for (int i = 0; i < 7; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Part 1: constant levels, low enough that collisions are rare.
    for (int i = 0; i < 7; i++) x[i] = 15'(200 * (i + 1) - 600);
    repeat (2000) @(negedge clk);
    expect_m = 0;
    for (int i = 0; i < 7; i++) expect_m += (200 * (i + 1) - 600);
    expect_m = expect_m * 256 / 65536;
    `CHECK(rec_merged >= expect_m - 3 && rec_merged <= expect_m + 3,
           $sformatf("rec_merged %0d expected about %0d", rec_merged, expect_m))
    // Part 2: tones.
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 7; i++) x[i] = '0;
      for (int j = 0; j < 3; j++) begin act[j] = 0; cs[j] = 0.0; sn[j] = 0.0; end
      pk = k;
      for (int t = 0; t < 6000; t++) begin
        @(negedge clk);
        if (t == 0) tcnt = 0;
        x[0] = 15'($rtoi(14000.0 * $sin(2.0 * 3.14159265 * real'(t) / real'(P[k]))));
        counting = (t >= 2000);
      end
      counting = 1'b0;
      for (int j = 0; j < 3; j++) amp[j] = $sqrt(cs[j] * cs[j] + sn[j] * sn[j]);
      $display("tone period %0d: band amplitude %0.1f %0.1f %0.1f (pulses %0d %0d %0d)", P[k], amp[0], amp[1], amp[2], act[0], act[1], act[2]);
      for (int j = 0; j < 3; j++)
        if (j != k) `CHECK(amp[k] > amp[j], $sformatf("tone %0d: band %0d not above band %0d", P[k], k, j))
    end
    `CHECK(ncol > 0, "merge collisions were observed")
    `TB_DONE
  end
endmodule
