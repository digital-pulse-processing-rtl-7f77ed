// relu: passive pulse machine for max(0, x).
//
// The min/max sorter with its second input tied to zero: the state s in
// 0..STATES-1 follows the input's integral, saturating at both ends, the middle
// state meaning "could be zero". A positive pulse at or above the middle passes
// (the signal is not below zero) and a negative pulse above the middle passes
// (it lowers a positive output); all other pulses are absorbed. Every pulse then
// moves the state by one step, saturating.
//
// Interface: pulse x in, pulse y out, registered. Reset in the middle.
module relu
  import pulse_pkg::*;
#(
  parameter int STATES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x,
  output pulse_t y
);

  localparam int SW  = $clog2(STATES);
  localparam int TOP = STATES - 1;
  localparam int MID = (STATES - 1) / 2;

  initial assert (STATES >= 3 && STATES % 2 == 1) else $error("STATES must be odd and >= 3");

  logic [SW-1:0] s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s <= SW'(MID);
      y <= NO_PULSE;
    end else begin
      y <= NO_PULSE;
      if (x.pos && !x.neg) begin
        y.pos <= int'(s) >= MID;
        if (int'(s) < TOP) s <= s + 1'b1;
      end else if (x.neg && !x.pos) begin
        y.neg <= int'(s) > MID;
        if (s != '0) s <= s - 1'b1;
      end
    end
  end

endmodule
