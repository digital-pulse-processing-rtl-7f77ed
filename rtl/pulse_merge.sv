// pulse_merge: pulse-domain adder.
//
// Adding pulse signals is merging them onto one wire: every positive input
// pulse becomes a positive output pulse and every negative one a negative
// output pulse. The encoded signals add and so do their gap bounds. As on a
// wired-OR bus, pulses of the same sign arriving in the same clock merge into
// one (the collision loses pulses); a positive and a negative pulse in the same
// clock cancel. 'collision' flags a clock in which pulses were lost.
//
// Interface: NIN pulse inputs; y registered (one clock).
module pulse_merge
  import pulse_pkg::*;
#(
  parameter int NIN = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x [NIN],
  output pulse_t y,
  output logic   collision
);

  int unsigned npos, nneg;

  always_comb begin
    npos = 0;
    nneg = 0;
    for (int i = 0; i < NIN; i++) begin
      npos += 32'(x[i].pos);
      nneg += 32'(x[i].neg);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y         <= NO_PULSE;
      collision <= 1'b0;
    end else begin
      // One pulse of each sign survives per clock; opposite signs cancel.
      y.pos     <= npos != 0 && nneg == 0;
      y.neg     <= nneg != 0 && npos == 0;
      collision <= npos > 1 || nneg > 1;
    end
  end

endmodule
