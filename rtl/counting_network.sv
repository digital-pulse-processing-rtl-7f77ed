// counting_network: periodic counting network of signed balancers.
//
// WIDTH (a power of two) input wires, WIDTH output wires. The network is
// log2(WIDTH) copies of a block; a block has log2(WIDTH) layers, and layer d
// (d = log2(WIDTH) down to 1) balances wire i against wire i XOR (2**d - 1),
// the lower index being the top output. This is the periodic balancing
// network, which counts: whatever wires the pulses arrive on, the net count
// leaving on output j settles to the j-th share of the signed total in
// round-robin order (the step property: earlier outputs are never behind later
// ones and never more than one ahead).
//
// The balancers switch combinationally from their registered toggles, so a
// pulse crosses the whole network in the clock it arrives; y is registered.
module counting_network
  import pulse_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x [WIDTH],
  output pulse_t y [WIDTH]
);

  localparam int L  = $clog2(WIDTH);
  localparam int NL = L * L;   // layers in total

  initial assert (WIDTH >= 2 && (1 << L) == WIDTH) else $error("WIDTH must be a power of two");

  // One array of wires per layer output.
  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int D    = L - (l % L);        // L, L-1, ..., 1 within a block
    localparam int MASK = (1 << D) - 1;
    pulse_t wi [WIDTH];
    pulse_t wo [WIDTH];
    if (l == 0) begin : g_first
      assign wi = x;
    end else begin : g_next
      assign wi = g_layer[l-1].wo;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_wire
      if (i < (i ^ MASK)) begin : g_bal
        balancer u_bal (
          .clk, .rst_n,
          .in0(wi[i]), .in1(wi[i ^ MASK]),
          .top(wo[i]), .bot(wo[i ^ MASK])
        );
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < WIDTH; i++) y[i] <= NO_PULSE;
    end else begin
      for (int i = 0; i < WIDTH; i++) y[i] <= g_layer[NL-1].wo[i];
    end
  end

endmodule
