// min_max_sorter: pulse-domain min and max of two signed pulse signals.
//
// One asynchronous pulse machine sorts every input pulse onto either the min
// or the max output, so that min + max = a + b at all times. The state s in
// 0..STATES-1 follows the difference D = A - B, saturating at both ends; the
// middle state means "even". A pulse that moves D away from the middle (or
// pushes it against a saturated end) is part of the larger signal and goes to
// max; a pulse that moves D back toward the middle goes to min. Negative pulses
// follow by max(a,b) = -min(-a,-b): a negative pulse moving D toward the middle
// goes to max, one moving it away goes to min.
//
// With STATES = 3 this is the machine for I&F inputs with gap bounds L = 0,
// U = 1 on both inputs (the difference then has L + U = 2, three states).
// Pulses of a and b in the same clock are handled as a followed by b. If both
// land on the same output with the same sign, one is lost (a collision);
// positive-only inputs can never collide this way.
//
// Interface: a, b in; mn, mx out, registered (one clock latency).
module min_max_sorter
  import pulse_pkg::*;
#(
  parameter int STATES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t a,
  input  pulse_t b,
  output pulse_t mn,
  output pulse_t mx
);

  localparam int SW  = $clog2(STATES);
  localparam int TOP = STATES - 1;
  localparam int MID = (STATES - 1) / 2;

  initial assert (STATES >= 3 && STATES % 2 == 1) else $error("STATES must be odd and >= 3");

  logic [SW-1:0] s;

  // Routing state carried through the four possible pulses of one clock:
  // next D state and the net output of this clock on each port.
  typedef struct packed {
    logic [SW-1:0]     st;
    logic signed [1:0] mn;
    logic signed [1:0] mx;
  } route_t;

  route_t r0, r1, r2, r3, r4;

  // Route one pulse; up = the pulse increases D. A second pulse of the same
  // sign on an output in one clock is dropped (collision).
  function automatic route_t route(input logic up, input logic positive, input route_t cur);
    route_t nx;
    logic away;
    logic signed [1:0] v;
    nx   = cur;
    v    = positive ? 2'sd1 : -2'sd1;
    away = up ? (int'(cur.st) >= MID) : (int'(cur.st) <= MID);
    // Positive pulse moving away -> max; toward -> min. Negative pulses: reverse.
    if (away == positive) begin
      if (cur.mx != v) nx.mx = cur.mx + v;
    end else begin
      if (cur.mn != v) nx.mn = cur.mn + v;
    end
    if (up) begin
      if (int'(cur.st) < TOP) nx.st = cur.st + 1'b1;
    end else begin
      if (cur.st != '0) nx.st = cur.st - 1'b1;
    end
    return nx;
  endfunction

  // a+ and b- raise D; b+ and a- lower it.
  always_comb begin
    r0 = '{st: s, mn: 2'sd0, mx: 2'sd0};
    r1 = (a.pos && !a.neg) ? route(1'b1, 1'b1, r0) : r0;
    r2 = (a.neg && !a.pos) ? route(1'b0, 1'b0, r1) : r1;
    r3 = (b.pos && !b.neg) ? route(1'b0, 1'b1, r2) : r2;
    r4 = (b.neg && !b.pos) ? route(1'b1, 1'b0, r3) : r3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s  <= SW'(MID);
      mn <= NO_PULSE;
      mx <= NO_PULSE;
    end else begin
      s      <= r4.st;
      mn.pos <= r4.mn > 0;
      mn.neg <= r4.mn < 0;
      mx.pos <= r4.mx > 0;
      mx.neg <= r4.mx < 0;
    end
  end

endmodule
