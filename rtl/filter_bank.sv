// filter_bank: pulse-domain band-pass filter bank.
//
// NSRC input signals (held samples of analog sources) are each turned into
// pulses by a signed I&F modulator and all pulse streams are merged into one
// stream of indistinguishable pulses. Three pulse-domain FIR filters, built
// only of delays, signed taps and a counting network, separate three bands
// again; a moving-average window reconstructs each filter output and the
// merged input as signed pulse counts.
//
// Tap design: the template impulse response of filter k is a Gaussian-windowed
// sinusoid h_k[n] = exp(-((n - LEN/2)/SIGMA)**2 / 2) * sin(2*pi*n/PERIOD_k),
// n = 0..LEN-1. It is scaled by the smallest gain (in steps of 1/64) for which
// its signed I&F modulation with threshold 1 yields at least NTAPS pulses; the
// first NTAPS pulse times and signs are the tap delays and signs. This is done
// at elaboration by a constant function. The filter output is scaled by
// 1/NET_W in its counting network.
//
// Interface: x[i] signed samples in; pulses out of the merge and of each filter;
// rec_* moving-window counts. Latency: modulators and merge two clocks, then the
// filter delays.
//
// Lint note: the int argument k of templ selects one of the three bands, so
// only its low two bits are read; this is expected.
module filter_bank
  import pulse_pkg::*;
#(
  parameter int NSRC   = 7,
  parameter int IN_W   = 15,
  parameter int ACC_W  = 16,
  parameter int NTAPS  = 64,
  parameter int NET_W  = 64,
  parameter int LEN    = 1024,
  parameter real SIGMA = 160.0,
  parameter int PERIOD [3] = '{48, 80, 128},
  parameter int WIN    = 256,
  parameter int REC_W  = $clog2(WIN + 1) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x [NSRC],
  output pulse_t                  merged,
  output logic                    collision,
  output pulse_t                  band [3],
  output logic signed [REC_W-1:0] rec_merged,
  output logic signed [REC_W-1:0] rec_band [3]
);

  typedef int  dly_t [NTAPS];
  typedef bit  neg_t [NTAPS];

  localparam real PI = 3.14159265358979;

  function automatic real templ(int k, int n);
    real u;
    u = (real'(n) - real'(LEN) / 2.0) / SIGMA;
    return $exp(-u * u / 2.0) * $sin(2.0 * PI * real'(n) / real'(PERIOD[k]));
  endfunction

  // Count the pulses of the I&F modulation of gain * h_k (threshold 1).
  function automatic int n_pulses(int k, real gain);
    real acc = 0.0;
    int  cnt = 0;
    for (int n = 0; n < LEN; n++) begin
      acc += gain * templ(k, n);
      while (acc >= 1.0) begin acc -= 1.0; cnt++; end
      while (acc <  0.0) begin acc += 1.0; cnt++; end
    end
    return cnt;
  endfunction

  function automatic real pick_gain(int k);
    real g = 1.0 / 64.0;
    while (n_pulses(k, g) < NTAPS) g += 1.0 / 64.0;
    return g;
  endfunction

  // Tap delays (1-based: a pulse at template sample n is tap delay n + 1).
  function automatic dly_t taps_dly(int k);
    dly_t d;
    real  acc = 0.0;
    real  g   = pick_gain(k);
    int   cnt = 0;
    d = '{default: 1};
    for (int n = 0; n < LEN && cnt < NTAPS; n++) begin
      acc += g * templ(k, n);
      while (acc >= 1.0 && cnt < NTAPS) begin acc -= 1.0; d[cnt] = n + 1; cnt++; end
      while (acc <  0.0 && cnt < NTAPS) begin acc += 1.0; d[cnt] = n + 1; cnt++; end
    end
    return d;
  endfunction

  function automatic neg_t taps_neg(int k);
    neg_t s;
    real  acc = 0.0;
    real  g   = pick_gain(k);
    int   cnt = 0;
    s = '{default: 1'b0};
    for (int n = 0; n < LEN && cnt < NTAPS; n++) begin
      acc += g * templ(k, n);
      while (acc >= 1.0 && cnt < NTAPS) begin acc -= 1.0; s[cnt] = 1'b0; cnt++; end
      while (acc <  0.0 && cnt < NTAPS) begin acc += 1.0; s[cnt] = 1'b1; cnt++; end
    end
    return s;
  endfunction

  // ------------------------------------------------------------ input stage
  pulse_t src_p [NSRC];
  for (genvar i = 0; i < NSRC; i++) begin : g_src
    if_modulator #(.ACC_W(ACC_W), .IN_W(IN_W)) u_mod (
      .clk, .rst_n, .en(1'b1), .x(x[i]), .p(src_p[i])
    );
  end

  pulse_merge #(.NIN(NSRC)) u_merge (.clk, .rst_n, .x(src_p), .y(merged), .collision(collision));

  moving_average #(.W(WIN), .OUT_W(REC_W)) u_rec_in (.clk, .rst_n, .x(merged), .y(rec_merged));

  // ---------------------------------------------------------------- filters
  for (genvar k = 0; k < 3; k++) begin : g_flt
    localparam dly_t DLY = taps_dly(k);
    localparam neg_t NEG = taps_neg(k);
    pulse_fir #(
      .NTAPS(NTAPS), .NET_W(NET_W), .OUT_NUM(1), .TAP_DLY(DLY), .TAP_NEG(NEG)
    ) u_fir (.clk, .rst_n, .x(merged), .y(band[k]));
    moving_average #(.W(WIN), .OUT_W(REC_W)) u_rec (.clk, .rst_n, .x(band[k]), .y(rec_band[k]));
  end

endmodule
