// moving_average: filter-based reconstruction of a pulse signal.
//
// Convolves the pulses with a rectangular window of W clocks: the output is
// the signed number of pulses that arrived in the last W clocks, i.e. W times
// the moving average Delta_w(t). An up/down counter adds each arriving pulse
// and subtracts it again when it leaves a W-stage delay line. For an I&F input
// the result stays within one pulse of W times the windowed average of the
// encoded signal (error bound Delta / W on the average).
//
// Interface: pulse x in; signed count y, registered.
module moving_average
  import pulse_pkg::*;
#(
  parameter int W     = 256,
  parameter int OUT_W = $clog2(W + 1) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  pulse_t                  x,
  output logic signed [OUT_W-1:0] y
);

  pulse_t x_old;
  pulse_t unused_tap [W];

  pulse_delay #(.DELAY(W)) u_dly (.clk, .rst_n, .x, .y(x_old), .tap(unused_tap));

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= y + OUT_W'(pulse_val(x)) - OUT_W'(pulse_val(x_old));
  end

endmodule
