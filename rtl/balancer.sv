// balancer: signed two-input, two-output balancer of a counting network.
//
// One toggle bit of state. A positive pulse on either input leaves on the top
// output when the state is 1 and on the bottom output when it is 0; a negative
// pulse leaves on top when the state is 0 and on the bottom when it is 1. Every
// pulse toggles the state, so the outputs alternate and differ by at most one
// in their net counts. Two pulses in one clock are taken in order in0 then in1:
// two of the same sign leave one on each output, opposite signs cancel; either
// way the state is unchanged.
//
// Combinational outputs from the registered state, so that whole networks
// route a pulse in the clock it arrives.
module balancer
  import pulse_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t in0,
  input  pulse_t in1,
  output pulse_t top,
  output pulse_t bot
);

  logic state;   // 1: next positive pulse goes to top

  logic signed [1:0] v0, v1;
  logic              positive;
  always_comb begin
    positive = 1'b0;
    v0  = pulse_val(in0);
    v1  = pulse_val(in1);
    top = NO_PULSE;
    bot = NO_PULSE;
    if (v0 != 0 && v1 != 0) begin
      if (v0 == v1) begin
        // Same sign: in0 goes as routed, in1 to the other output.
        top = v0 > 0 ? '{pos: 1'b1, neg: 1'b0} : '{pos: 1'b0, neg: 1'b1};
        bot = top;
      end
      // Opposite signs cancel.
    end else if (v0 != 0 || v1 != 0) begin
      positive = (v0 + v1) > 0;
      if (positive == state) top = positive ? '{pos: 1'b1, neg: 1'b0} : '{pos: 1'b0, neg: 1'b1};
      else                   bot = positive ? '{pos: 1'b1, neg: 1'b0} : '{pos: 1'b0, neg: 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= 1'b1;
    else if ((v0 != 0) != (v1 != 0)) state <= !state;
  end

endmodule
