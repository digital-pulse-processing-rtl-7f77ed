// pulse_delay: clocked shift-register pulse delay line.
//
// A pulse entering at x leaves at y exactly DELAY clocks later, with its sign
// unchanged; any number of pulses may be in flight. The delayed signal keeps
// the gap bounds of its input. Taps gives every stage of the line, tap[k]
// being the input delayed by k+1 clocks, for tapped-delay-line filters.
// DELAY = 0 is not supported.
module pulse_delay
  import pulse_pkg::*;
#(
  parameter int DELAY = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x,
  output pulse_t y,
  output pulse_t tap [DELAY]
);

  initial assert (DELAY >= 1) else $error("DELAY must be at least 1");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DELAY; k++) tap[k] <= NO_PULSE;
    end else begin
      tap[0] <= x;
      for (int k = 1; k < DELAY; k++) tap[k] <= tap[k-1];
    end
  end

  assign y = tap[DELAY-1];

endmodule
