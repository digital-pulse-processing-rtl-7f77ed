// abs_value: pulse-domain absolute value of an I&F signal.
//
// The machine has GAP_SUM + 1 states, GAP_SUM = L_x + U_x being the width of
// the input's gap bounds. The state follows the input's integral inside a
// window of that width. While the integral may still have returned to its value
// at the last output pulse, the signal may have been zero, and pulses are
// absorbed (state moves). A positive pulse at the top of the window, or a
// negative pulse at the bottom, proves a change of a full Delta: it leaves as a
// positive output pulse and the state stays. So positive input pulses pass
// unchanged while the signal is positive and negative ones are flipped while it
// is negative. Output bounds: L_y = 0, U_y = L_x + U_x; up to GAP_SUM pulses are
// missed per sign change.
//
// Interface: pulse x in, pulse y out (positive only), registered. Reset in the
// middle of the window (a choice of this design).
module abs_value
  import pulse_pkg::*;
#(
  parameter int GAP_SUM = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x,
  output pulse_t y
);

  localparam int SW = $clog2(GAP_SUM + 1);

  initial assert (GAP_SUM >= 1) else $error("GAP_SUM must be at least 1");

  logic [SW-1:0] s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s <= SW'(GAP_SUM / 2);
      y <= NO_PULSE;
    end else begin
      y <= NO_PULSE;
      if (x.pos && !x.neg) begin
        if (int'(s) == GAP_SUM) y.pos <= 1'b1;
        else                    s     <= s + 1'b1;
      end else if (x.neg && !x.pos) begin
        if (s == '0) y.pos <= 1'b1;
        else         s     <= s - 1'b1;
      end
    end
  end

endmodule
