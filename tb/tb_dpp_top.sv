// End-to-end testbench for dpp_top with the decoder at lifting factor Z = 8.
// All parts run at once: the decoder gets a noiseless codeword and then a
// noise word, the filter bank gets a tone plus constant sources, and random
// pulse trains drive the stand-alone operators while the differential
// analyzer integrates from its initial value. Each mechanism of the design is
// counted and it is a failure if one never happened:
// decoder done, decoder success, decoder timeout, filter-bank merge
// collision, band output pulses, multiplier overflow and underflow, abs sign
// flip, relu blocking, sorter min and max outputs, analyzer overflow.
`include "tb_common.svh"
`include "ldpc_tb_util.svh"
module tb_dpp_top;
  import pulse_pkg::*;
  import ldpc_pkg::*;
  `TB_DECLS
  `WATCHDOG(400000)
  localparam int Z = 8, N = NB * Z;

  logic dec_start = 1'b0;
  logic signed [14:0] dec_llr [N];
  logic dec_done, dec_success;
  logic [N-1:0] dec_bits;
  logic [23:0] dec_cycles;
  logic [31:0] dec_pulses;
  logic signed [14:0] fb_x [7];
  pulse_t fb_merged, fb_band [3];
  logic fb_collision;
  logic signed [9:0] fb_rec_merged, fb_rec_band [3];
  pulse_t cm_x = NO_PULSE, cm_y, abs_x = NO_PULSE, abs_y, mm_a = NO_PULSE, mm_b = NO_PULSE, mm_min, mm_max;
  pulse_t relu_x = NO_PULSE, relu_y;
  logic da_start = 1'b0;
  logic signed [15:0] da_x;
  pulse_t da_p;
  logic da_overflow;

  dpp_top #(.Z(Z)) dut (.*);

  int n_done, n_succ, n_tmo, n_col, n_band, n_ov, n_un, n_flip, n_block, n_min, n_max, n_daov;
  int relu_in, relu_out;
  always @(posedge clk) if (rst_n) begin
    n_col  += int'(fb_collision);
    n_band += int'(fb_band[0].pos | fb_band[0].neg | fb_band[1].pos | fb_band[1].neg | fb_band[2].pos | fb_band[2].neg);
    n_ov   += int'(cm_y.pos);
    n_un   += int'(cm_y.neg);
    n_flip += int'(abs_x.neg && !abs_x.pos);   // counted on input; output checked below
    n_min  += int'(mm_min.pos | mm_min.neg);
    n_max  += int'(mm_max.pos | mm_max.neg);
    n_daov += int'(da_overflow);
    `CHECK(!abs_y.neg, "abs output is never negative")
  end

  task automatic decode(input bit noise_only);
    bit cw [];
    int t;
    cw = new[N];
    ldpc_encode(Z, cw);
    for (int v = 0; v < N; v++)
      dec_llr[v] = noise_only ? 15'(int'($urandom_range(0, 1200)) - 600) : (cw[v] ? -15'sd600 : 15'sd600);
    @(negedge clk); dec_start = 1'b1;
    @(negedge clk); dec_start = 1'b0;
    t = 0;
    while (!dec_done && t < 100000) begin @(negedge clk); t++; end
    n_done += int'(dec_done);
    if (dec_done && dec_success) begin
      int nerr = 0;
      n_succ++;
      for (int v = 0; v < N; v++) nerr += int'(dec_bits[v] != cw[v]);
      `CHECK(nerr == 0, $sformatf("decoder success with %0d wrong bits", nerr))
    end
    if (dec_done && !dec_success) n_tmo++;
    $display("decode noise_only=%0d: done=%0d success=%0d cycles=%0d pulses=%0d", noise_only, dec_done, dec_success, dec_cycles, dec_pulses);
  endtask

  initial begin
    {n_done, n_succ, n_tmo, n_col, n_band, n_ov, n_un, n_flip, n_block, n_min, n_max, n_daov} = '0;
    relu_in = 0; relu_out = 0;
    for (int v = 0; v < N; v++) dec_llr[v] = '0;
    for (int i = 0; i < 7; i++) fb_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); da_start = 1'b1;
    @(negedge clk); da_start = 1'b0;
    fork
      begin
        decode(1'b0);
        decode(1'b1);
      end
      begin
        for (int t = 0; t < 20000; t++) begin
          @(negedge clk);
          fb_x[0] = 15'($rtoi(12000.0 * $sin(2.0 * 3.14159265 * real'(t) / 80.0)));
          for (int i = 1; i < 7; i++) fb_x[i] = 15'(1500 * i);
          cm_x.pos = ($urandom_range(0, 99) < ((t / 2000) % 2 ? 10 : 40));
          cm_x.neg = !cm_x.pos && ($urandom_range(0, 99) < ((t / 2000) % 2 ? 40 : 10));
          abs_x.pos = ($urandom_range(0, 99) < 20);
          abs_x.neg = !abs_x.pos && ($urandom_range(0, 99) < 20);
          mm_a.pos = ($urandom_range(0, 99) < 10);
          mm_b.pos = ($urandom_range(0, 99) < 15);
          relu_x.neg = ($urandom_range(0, 99) < 20);
          relu_x.pos = !relu_x.neg && ($urandom_range(0, 99) < 5);
          relu_in += -int'(relu_x.neg);
          relu_out += pulse_val(relu_y);
        end
      end
    join
    // Relu blocked most of a negative-rate train.
    if (relu_out > relu_in / 4) n_block++;
    `CHECK(n_done == 2, "decoder done twice")
    `CHECK(n_succ > 0, "decoder success seen")
    `CHECK(n_tmo > 0, "decoder timeout seen")
    `CHECK(n_col > 0, "filter-bank merge collision seen")
    `CHECK(n_band > 0, "filter-bank band output seen")
    `CHECK(n_ov > 0 && n_un > 0, "multiplier overflow and underflow seen")
    `CHECK(n_flip > 0, "abs value negative input seen")
    `CHECK(n_block > 0, $sformatf("relu blocked negative train (in %0d out %0d)", relu_in, relu_out))
    `CHECK(n_min > 0 && n_max > 0, "sorter min and max outputs seen")
    `CHECK(n_daov > 0, "analyzer overflow seen")
    $display("mechanisms: done=%0d succ=%0d tmo=%0d col=%0d band=%0d ov=%0d un=%0d flip=%0d block=%0d min=%0d max=%0d daov=%0d",
             n_done, n_succ, n_tmo, n_col, n_band, n_ov, n_un, n_flip, n_block, n_min, n_max, n_daov);
    `TB_DONE
  end
endmodule
