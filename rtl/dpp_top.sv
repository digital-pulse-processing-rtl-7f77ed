// dpp_top: digital pulse processing designs side by side.
//
//  * ldpc_decoder: the fully parallel pulse-domain min-sum decoder for the
//    (1056,528) WiMAX 802.16e rate-1/2 LDPC code (LLRs in, decoded bits out).
//  * filter_bank: seven I&F-modulated inputs merged on one pulse stream and
//    separated by three 64-tap pulse-domain band-pass filters.
//  * A constant multiplier (3/8), an absolute value, a min/max sorter and a
//    max(0, x) machine, each on its own pulse ports, and the first-order
//    pulse-domain differential analyzer.
//
// The designs share only clock and reset. All pulse ports use pulse_pkg's
// two-wire encoding, one clock per pulse.
module dpp_top
  import pulse_pkg::*;
  import ldpc_pkg::*;
#(
  parameter int Z = 44
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // LDPC decoder
  input  logic                    dec_start,
  input  logic signed [14:0]      dec_llr [NB*Z],
  output logic                    dec_done,
  output logic                    dec_success,
  output logic [NB*Z-1:0]         dec_bits,
  output logic [23:0]             dec_cycles,
  output logic [31:0]             dec_pulses,
  // filter bank
  input  logic signed [14:0]      fb_x [7],
  output pulse_t                  fb_merged,
  output logic                    fb_collision,
  output pulse_t                  fb_band [3],
  output logic signed [9:0]       fb_rec_merged,
  output logic signed [9:0]       fb_rec_band [3],
  // stand-alone operators
  input  pulse_t                  cm_x,
  output pulse_t                  cm_y,
  input  pulse_t                  abs_x,
  output pulse_t                  abs_y,
  input  pulse_t                  mm_a,
  input  pulse_t                  mm_b,
  output pulse_t                  mm_min,
  output pulse_t                  mm_max,
  input  pulse_t                  relu_x,
  output pulse_t                  relu_y,
  // differential analyzer
  input  logic                    da_start,
  output logic signed [15:0]      da_x,
  output pulse_t                  da_p,
  output logic                    da_overflow
);

  ldpc_decoder #(.Z(Z)) u_dec (
    .clk, .rst_n, .start(dec_start), .llr(dec_llr),
    .done(dec_done), .success(dec_success), .bits(dec_bits),
    .cycles(dec_cycles), .pulses(dec_pulses)
  );

  filter_bank #(.REC_W(10)) u_fb (
    .clk, .rst_n, .x(fb_x), .merged(fb_merged), .collision(fb_collision),
    .band(fb_band), .rec_merged(fb_rec_merged), .rec_band(fb_rec_band)
  );

  const_mult #(.N(3), .D(8)) u_cm (.clk, .rst_n, .x(cm_x), .y(cm_y));

  abs_value #(.GAP_SUM(2)) u_abs (.clk, .rst_n, .x(abs_x), .y(abs_y));

  min_max_sorter #(.STATES(3)) u_mm (.clk, .rst_n, .a(mm_a), .b(mm_b), .mn(mm_min), .mx(mm_max));

  relu #(.STATES(3)) u_relu (.clk, .rst_n, .x(relu_x), .y(relu_y));

  diff_analyzer #(.X_W(16), .ACC_W(16), .ALPHA(64), .X0(1)) u_da (
    .clk, .rst_n, .start(da_start), .x(da_x), .p(da_p), .overflow(da_overflow)
  );

endmodule
