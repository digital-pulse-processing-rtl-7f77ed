// pulse_pkg: types shared by the pulse-processing elements.
//
// A signed pulse signal is carried on two wires, one for positive and one for
// negative pulses. In this clocked realisation a pulse is a one-clock strobe on
// one of the two wires; both wires high in the same clock is not produced by any
// element (the +1 and -1 would cancel) and is treated by receivers as two pulses
// of opposite sign. The asynchronous elements of the original concept are here
// sampled by a clock that is fast compared with the pulse rates.
package pulse_pkg;

  typedef struct packed {
    logic pos;  // positive pulse (+Delta)
    logic neg;  // negative pulse (-Delta)
  } pulse_t;

  localparam pulse_t NO_PULSE = '{pos: 1'b0, neg: 1'b0};

  // Net signed value (+1, 0, -1) of a pulse.
  function automatic logic signed [1:0] pulse_val(pulse_t p);
    return p.pos == p.neg ? 2'sd0 : (p.pos ? 2'sd1 : -2'sd1);
  endfunction

endpackage
