// min_broadcast: the bidirectional element of a pulse-domain factor node.
//
// It has NIN interfaces on its wide side (internal factor buses) and one on its
// narrow side (toward a variable bus). In the forward direction it emits the
// pulse-domain min of the NIN wide-side inputs toward the variable; in the
// reverse direction it copies every pulse arriving from the variable onto all
// wide-side buses. Each interface is split into a receive and a transmit wire.
//
// The min of NIN > 2 inputs is a tree of two-input min/max sorters (only their
// min outputs are used). All inputs are positive pulses.
//
// Timing: the broadcast copy is registered (one clock), the min output takes one
// clock per tree level.
module min_broadcast
  import pulse_pkg::*;
#(
  parameter int NIN    = 2,
  parameter int STATES = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] w_rx,   // pulses heard on each internal bus
  output logic           w_tx,   // broadcast onto the internal buses
  input  logic           c_rx,   // pulses from the variable side
  output logic           c_tx    // min toward the variable side
);

  initial assert (NIN >= 2) else $error("NIN must be at least 2");

  always_ff @(posedge clk) begin
    if (!rst_n) w_tx <= 1'b0;
    else        w_tx <= c_rx;
  end

  // Linear chain of two-input mins: m[0] = w_rx[0], m[i] = min(m[i-1], w_rx[i]).
  // Each later input is delayed to line up with the chain.
  pulse_t m [NIN];
  assign m[0] = '{pos: w_rx[0], neg: 1'b0};

  for (genvar i = 1; i < NIN; i++) begin : g_chain
    pulse_t in_d, unused_max;
    if (i == 1) begin : g_nodelay
      assign in_d = '{pos: w_rx[i], neg: 1'b0};
    end else begin : g_delay
      logic [i-2:0] sr;
      always_ff @(posedge clk) begin
        if (!rst_n) sr <= '0;
        else begin
          sr[0] <= w_rx[i];
          for (int k = 1; k <= i - 2; k++) sr[k] <= sr[k-1];
        end
      end
      assign in_d = '{pos: sr[i-2], neg: 1'b0};
    end
    min_max_sorter #(.STATES(STATES)) u_min (
      .clk, .rst_n, .a(m[i-1]), .b(in_d), .mn(m[i]), .mx(unused_max)
    );
  end

  assign c_tx = m[NIN-1].pos;

endmodule
