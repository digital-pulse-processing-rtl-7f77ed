// if_modulator: signed integrate-and-fire (I&F) modulator.
//
// The input sample x is added to an unsigned ACC_W-bit accumulator every clock
// in which en is high. A carry out of the top bit is a positive output pulse and
// a borrow below zero is a negative output pulse; the accumulator keeps only the
// remainder, so it holds the gap g(t) in [0, Delta) with Delta = 2**ACC_W. This
// is the clocked first-order sigma-delta form of I&F: the same pulses as exact
// I&F, aligned to the clock. The pulse rate is x / 2**ACC_W pulses per clock.
//
// Interface: x is a signed IN_W-bit sample, held by the user; p is the pulse
// output, registered (one clock after the sample that caused it). At most one
// pulse per clock is produced because |x| < 2**ACC_W.
//
// The 16-bit accumulator and 15-bit input are the decoder prototype's sizes.
// Reset value 0 of the accumulator follows the I&F integrator reset to zero.
module if_modulator
  import pulse_pkg::*;
#(
  parameter int ACC_W = 16,
  parameter int IN_W  = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] x,
  output pulse_t                 p
);

  logic [ACC_W-1:0]          acc;
  logic signed [ACC_W+1:0]   sum;

  initial assert (IN_W <= ACC_W) else $error("IN_W must not exceed ACC_W");

  always_comb sum = $signed({2'b00, acc}) + (ACC_W+2)'(x);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      p   <= NO_PULSE;
    end else if (en) begin
      acc <= sum[ACC_W-1:0];                     // remainder modulo 2**ACC_W
      p.pos <= !sum[ACC_W+1] && sum[ACC_W];      // carry: crossed a level upward
      p.neg <= sum[ACC_W+1];                     // borrow: crossed a level downward
    end else begin
      p <= NO_PULSE;
    end
  end

endmodule
