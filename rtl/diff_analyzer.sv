// diff_analyzer: first-order pulse-domain differential analyzer.
//
// Solves dx/dt = alpha * x with x(0) = X0. The state x is an up/down pulse
// counter; an I&F modulator integrates alpha * x and each of its pulses steps
// the counter by one. So the counter changes level exactly when the integral of
// alpha * x crosses a level: the n-th interval between pulses is 1/(n*alpha).
// Here alpha = ALPHA / 2**ACC_W per clock. When |ALPHA * x| would no longer fit
// the modulator input the counter stops and 'overflow' is raised.
//
// Interface: start loads X0 (and clears the modulator) and runs; x is the
// counter, p the modulator pulse (dx/dt in the pulse domain).
module diff_analyzer
  import pulse_pkg::*;
#(
  parameter int X_W   = 16,
  parameter int ACC_W = 16,
  parameter int ALPHA = 64,
  parameter int X0    = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic signed [X_W-1:0] x,
  output pulse_t                p,
  output logic                  overflow
);

  localparam int PW = X_W + $clog2(ALPHA + 1) + 1;
  localparam logic signed [PW-1:0] LIM = PW'((1 << (ACC_W - 1)) - 1);

  logic running;
  logic signed [PW-1:0]    prod;
  logic signed [ACC_W-1:0] drive;

  always_comb begin
    prod     = PW'(x) * PW'(ALPHA);
    overflow = prod > LIM || prod < -LIM;
    drive    = ACC_W'(prod);
  end

  if_modulator #(.ACC_W(ACC_W), .IN_W(ACC_W)) u_mod (
    .clk, .rst_n(rst_n && !start), .en(running && !overflow), .x(drive), .p(p)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x       <= '0;
      running <= 1'b0;
    end else if (start) begin
      x       <= X_W'(X0);
      running <= 1'b1;
    end else begin
      x <= x + X_W'(pulse_val(p));
    end
  end

endmodule
