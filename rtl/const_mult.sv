// const_mult: pulse-domain multiplication by a constant N/D, 0 <= N <= D.
//
// An accumulator modulo D steps up by N on each positive input pulse and down
// by N on each negative one. Stepping past D-1 (overflow) emits a positive
// output pulse, stepping below 0 (underflow) a negative one. With D = 2**K this
// is a K-bit accumulator whose carry and borrow are the output; with N = 1 it
// is decimation by D, the signed I&F machine of D states. Output pulses are the
// input pulses that align to a full Delta; the bounds follow eq. (5)/(6):
// L_y = a*L_x, U_y = a*U_x + Delta (a = N/D). Opposite pulses in one clock
// cancel.
//
// Interface: pulse x in, pulse y out registered. Reset state 0.
module const_mult
  import pulse_pkg::*;
#(
  parameter int N = 3,
  parameter int D = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x,
  output pulse_t y
);

  localparam int AW = $clog2(D) + 2;

  initial assert (N >= 0 && N <= D && D >= 1) else $error("need 0 <= N <= D");

  logic signed [AW-1:0] acc, nxt;

  always_comb nxt = acc + AW'(pulse_val(x)) * AW'(N);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      y   <= NO_PULSE;
    end else begin
      y <= NO_PULSE;
      if (nxt >= AW'(D)) begin
        acc   <= nxt - AW'(D);
        y.pos <= 1'b1;
      end else if (nxt < 0) begin
        acc   <= nxt + AW'(D);
        y.neg <= 1'b1;
      end else begin
        acc <= nxt;
      end
    end
  end

endmodule
