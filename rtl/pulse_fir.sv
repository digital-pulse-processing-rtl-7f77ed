// pulse_fir: pulse-domain FIR filter of delays and adders.
//
// The impulse response is itself a pulse signal: NTAPS signed taps at delays
// TAP_DLY[l] (clocks) with signs TAP_NEG[l] (1 = invert). Input pulses travel
// down a tapped delay line; each tap copies (or inverts) them onto one input of
// a counting network of width NET_W. The network merges all taps and scales
// the total by OUT_NUM / NET_W at once: the outputs j at which the count k*OUT_NUM
// mod NET_W overflows are selected and merged onto y. With OUT_NUM = 1 this is
// the final multiplication by Delta = 1/NET_W. Taps beyond NET_W share network
// inputs through a merge.
//
// Interface: pulse x in, pulse y out. Latency TAP_DLY[l] + 2 clocks per tap.
module pulse_fir
  import pulse_pkg::*;
#(
  parameter int NTAPS   = 8,
  parameter int NET_W   = 8,
  parameter int OUT_NUM = 1,
  parameter int TAP_DLY [NTAPS] = '{1, 2, 3, 4, 5, 6, 7, 8},
  parameter bit TAP_NEG [NTAPS] = '{default: 1'b0}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pulse_t x,
  output pulse_t y
);

  function automatic int max_dly();
    int m = 1;
    for (int l = 0; l < NTAPS; l++) if (TAP_DLY[l] > m) m = TAP_DLY[l];
    return m;
  endfunction

  localparam int LEN = max_dly();

  pulse_t tap [LEN];
  pulse_t unused_y;
  pulse_delay #(.DELAY(LEN)) u_line (.clk, .rst_n, .x, .y(unused_y), .tap(tap));

  // Tap signals, possibly inverted, grouped onto network inputs.
  pulse_t t_sig [NTAPS];
  for (genvar l = 0; l < NTAPS; l++) begin : g_tap
    assign t_sig[l] = TAP_NEG[l] ? '{pos: tap[TAP_DLY[l]-1].neg, neg: tap[TAP_DLY[l]-1].pos}
                                 : tap[TAP_DLY[l]-1];
  end

  pulse_t net_in  [NET_W];
  pulse_t net_out [NET_W];

  always_comb begin
    for (int j = 0; j < NET_W; j++) begin
      int np, nn;
      np = 0;
      nn = 0;
      for (int l = j; l < NTAPS; l += NET_W) begin
        np += 32'(t_sig[l].pos);
        nn += 32'(t_sig[l].neg);
      end
      net_in[j].pos = np > nn;
      net_in[j].neg = nn > np;
    end
  end

  counting_network #(.WIDTH(NET_W)) u_net (.clk, .rst_n, .x(net_in), .y(net_out));

  // Output j is selected when the j-th pulse of the round robin is an overflow
  // of an accumulator stepping by OUT_NUM modulo NET_W.
  function automatic bit selected(int j);
    return ((j + 1) * OUT_NUM) / NET_W > (j * OUT_NUM) / NET_W;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= NO_PULSE;
    end else begin
      int np, nn;
      np = 0;
      nn = 0;
      for (int j = 0; j < NET_W; j++)
        if (selected(j)) begin
          np += 32'(net_out[j].pos);
          nn += 32'(net_out[j].neg);
        end
      y.pos <= np > nn;
      y.neg <= nn > np;
    end
  end

endmodule
