// offset_normalizer: passive pulse machine for min-sum offset normalisation.
//
// Computes mu'(0) = mu(0) - min(mu(0), mu(1)) and mu'(1) = mu(1) - min(...)
// for a message sent from a variable bus to a parity-check factor. Both inputs
// carry positive pulses only. The state s in 0..NSTATES-1 follows the
// difference mu(0) - mu(1) inside a window: a (0) pulse raises s, a (1) pulse
// lowers it, and only a pulse that would push s past an end of the window is
// passed on, on its own output (out0 at the top, out1 at the bottom). Pulses
// on both inputs in the same clock cancel and leave the state unchanged.
//
// NSTATES should equal the number of other factors sharing the variable bus;
// the decoder sets it per variable. The reset state is the bottom of the window
// (a choice of this design; the initial state only has a transient effect).
//
// Interface: in0/in1 pulses in; out0/out1 pulses out, registered.
module offset_normalizer #(
  parameter int NSTATES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in0,
  input  logic in1,
  output logic out0,
  output logic out1
);

  localparam int SW  = (NSTATES > 1) ? $clog2(NSTATES) : 1;
  localparam int TOP = NSTATES - 1;

  initial assert (NSTATES >= 1) else $error("NSTATES must be at least 1");

  logic [SW-1:0] s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s    <= '0;
      out0 <= 1'b0;
      out1 <= 1'b0;
    end else begin
      out0 <= 1'b0;
      out1 <= 1'b0;
      if (in0 && !in1) begin
        if (int'(s) == TOP) out0 <= 1'b1;
        else                s    <= s + 1'b1;
      end else if (in1 && !in0) begin
        if (s == '0) out1 <= 1'b1;
        else         s    <= s - 1'b1;
      end
    end
  end

endmodule
