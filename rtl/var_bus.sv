// var_bus: a shared pulse wire (variable bus or internal factor bus).
//
// NPORT circuits share one wire. Each normally listens; when it transmits it
// disables its own receiver, so it never counts its own pulse and is blind to
// anything arriving in that clock. Port p therefore receives the merge of the
// other ports' pulses: rx[p] = OR(tx[q], q != p) AND NOT tx[p]. Pulses of two
// other ports in the same clock merge into one (collision loss), as on a real
// wire. all_pulses is the whole wire, seen by a passive listener.
//
// This is the logic-gate emulation of the tri-state bus; it is purely
// combinational. Every element that drives tx registers its output, so loops
// through buses always pass through a flip-flop.
module var_bus #(
  parameter int NPORT = 4
) (
  input  logic [NPORT-1:0] tx,
  output logic [NPORT-1:0] rx,
  output logic             all_pulses
);

  always_comb begin
    all_pulses = |tx;
    for (int p = 0; p < NPORT; p++) begin
      logic others;
      others = 1'b0;
      for (int q = 0; q < NPORT; q++)
        if (q != p) others |= tx[q];
      rx[p] = others & ~tx[p];
    end
  end

endmodule
