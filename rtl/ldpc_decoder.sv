// ldpc_decoder: fully parallel pulse-domain min-sum LDPC decoder.
//
// Every variable of the code owns a pair of variable buses, one carrying the
// pulses of mu(0) and one of mu(1). On port 0 of each pair a signed I&F
// modulator turns the received LLR into pulses: positive pulses go on bus 0,
// negative pulses on bus 1. The other ports belong to the parity checks of the
// variable. Because a port hears everything on its bus except its own pulses,
// each check receives the sum of all other messages, i.e. the variable-node
// update, with no adder. That sum passes through an offset normaliser (one per
// edge, with as many states as there are other factors on the bus) into the
// check node, a chain of 3-input parity nodes built from min-broadcast
// elements. The check's output pulses go back onto the buses. A sign detector
// per variable follows Delta0 - Delta1 on its buses; the codeword verifier
// checks the tentative bits and the controller stops at the first valid
// codeword or when the modulators have spent their pulse budget.
//
// Sizes: Z = 44 gives the (1056,528) WiMAX 802.16e rate-1/2 code with 528
// checks of degree 6 and 7. LLRs are 15-bit signed, modulators 16-bit.
// Timing: each element adds one clock; the clock stands for the asynchronous
// timing of the original circuits and must be fast compared with pulse rates
// (an LLR of magnitude x produces x / 2**16 pulses per clock).
//
// Interface: llr[v] is held stable during a decode; start begins one; done,
// success and bits give the result; cycles and pulses are statistics.
//
// Lint note: the per-row check_ok output of the codeword verifier is left
// unconnected on purpose; only its AND (valid) is needed here.
module ldpc_decoder
  import pulse_pkg::*;
  import ldpc_pkg::*;
#(
  parameter int Z          = 44,
  parameter int LLR_W      = 15,
  parameter int ACC_W      = 16,
  parameter int MAX_PULSES = 32,   // average input pulses per variable before failure
  parameter int STATES     = 5,    // states of the min-broadcast sorters
  parameter int SD_W       = 8     // sign-detector count width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [LLR_W-1:0] llr [NB*Z],
  output logic                    done,
  output logic                    success,
  output logic [NB*Z-1:0]         bits,
  output logic [23:0]             cycles,
  output logic [31:0]             pulses
);

  localparam int N = NB * Z;
  localparam int M = MB * Z;
  localparam int PCNT_W = $clog2(N + 1);

  logic clear, run, valid, code_ok;
  logic st_rst_n;   // reset of all decoding state: power-on reset or a new decode

  always_comb st_rst_n = rst_n && !clear;

  // Edge signals, indexed by check row and slot.
  logic f2v0 [M][MAX_RDEG];   // check -> variable, mu_{f->x}(0)
  logic f2v1 [M][MAX_RDEG];
  logic raw0 [M][MAX_RDEG];   // bus -> check, before normalisation
  logic raw1 [M][MAX_RDEG];
  logic v2f0 [M][MAX_RDEG];   // normalised variable -> check messages
  logic v2f1 [M][MAX_RDEG];

  pulse_t           mod_p [N];
  logic [N-1:0]     decided;

  // ---------------------------------------------------------------- variables
  for (genvar v = 0; v < N; v++) begin : g_var
    localparam int BC   = v / Z;
    localparam int CDEG = col_deg(BC);
    logic [CDEG:0] tx0, tx1, rx0, rx1;
    logic          all0, all1;

    if_modulator #(.ACC_W(ACC_W), .IN_W(LLR_W)) u_mod (
      .clk, .rst_n(st_rst_n), .en(run), .x(llr[v]), .p(mod_p[v])
    );

    assign tx0[0] = mod_p[v].pos;
    assign tx1[0] = mod_p[v].neg;
    for (genvar n = 0; n < CDEG; n++) begin : g_port
      localparam int R  = var_check(v, n, Z);
      localparam int BR = R / Z;
      localparam int SL = col_slot(BR, BC);
      localparam int PT = bus_port(BR, BC);
      assign tx0[PT] = f2v0[R][SL];
      assign tx1[PT] = f2v1[R][SL];
      assign raw0[R][SL] = rx0[PT];
      assign raw1[R][SL] = rx1[PT];
    end

    var_bus #(.NPORT(CDEG + 1)) u_bus0 (.tx(tx0), .rx(rx0), .all_pulses(all0));
    var_bus #(.NPORT(CDEG + 1)) u_bus1 (.tx(tx1), .rx(rx1), .all_pulses(all1));

    sign_detector #(.CNT_W(SD_W)) u_sd (
      .clk, .rst_n(st_rst_n), .bus0(all0), .bus1(all1),
      .bit_o(bits[v]), .decided(decided[v])
    );
    // rx[0] is what the modulator would hear; a modulator does not listen.
    logic unused_rx;
    assign unused_rx = rx0[0] ^ rx1[0];
  end

  // ------------------------------------------------------------------- checks
  for (genvar r = 0; r < M; r++) begin : g_chk
    localparam int BR  = r / Z;
    localparam int DEG = row_deg(BR);
    logic [DEG-1:0] in0, in1, out0, out1;

    for (genvar t = 0; t < MAX_RDEG; t++) begin : g_slot
      if (t < DEG) begin : g_used
        localparam int VBC = slot_col(BR, t);
        offset_normalizer #(.NSTATES(col_deg(VBC))) u_norm (
          .clk, .rst_n(st_rst_n),
          .in0(raw0[r][t]), .in1(raw1[r][t]),
          .out0(v2f0[r][t]), .out1(v2f1[r][t])
        );
        assign in0[t]     = v2f0[r][t];
        assign in1[t]     = v2f1[r][t];
        assign f2v0[r][t] = out0[t];
        assign f2v1[r][t] = out1[t];
      end else begin : g_unused
        assign f2v0[r][t] = 1'b0;
        assign f2v1[r][t] = 1'b0;
        assign raw0[r][t] = 1'b0;
        assign raw1[r][t] = 1'b0;
        assign v2f0[r][t] = 1'b0;
        assign v2f1[r][t] = 1'b0;
      end
    end

    check_node #(.DEG(DEG), .STATES(STATES)) u_chk (
      .clk, .rst_n(st_rst_n),
      .v_rx0(in0), .v_rx1(in1), .v_tx0(out0), .v_tx1(out1)
    );
  end

  // ------------------------------------------------------ verification, control
  codeword_verifier #(.Z(Z)) u_ver (.bits(bits), .check_ok(), .valid(code_ok));

  assign valid = code_ok && (&decided);

  logic [PCNT_W-1:0] in_pulses;
  always_comb begin
    in_pulses = '0;
    for (int v = 0; v < N; v++) in_pulses += PCNT_W'(mod_p[v].pos | mod_p[v].neg);
  end

  ldpc_ctrl #(.PCNT_W(PCNT_W), .BUDGET(MAX_PULSES * N)) u_ctrl (
    .clk, .rst_n, .start, .valid, .in_pulses,
    .clear, .run, .done, .success, .cycles, .pulses
  );

endmodule
