// parity3_node: pulse-domain min-sum 3-input parity-check factor node.
//
// For a check x0 ^ x1 ^ x2 = 0 the factor function is 0 on the four even
// configurations (000, 011, 101, 110) and infinite elsewhere, so each even
// configuration gets one internal factor bus and no modulator. Six
// min-broadcast elements, one per (variable j, value k), join the two buses of
// the configurations in which x_j = k. A pulse of message mu_{x_j->f}(k) is
// broadcast onto those buses; the other two participants of a bus hear it.
// Each element's min over its two buses is then
//   mu_{f->x_j}(k) = min over the even configurations with x_j = k of the
//                    sum of the other two variables' messages,
// which is the min-sum factor update. The buses are var_bus instances, so an
// element never hears its own broadcast.
//
// Interface: per variable j, v_rx0/v_rx1 carry mu_{x_j->f}(0/1) in and
// v_tx0/v_tx1 carry mu_{f->x_j}(0/1) out. Positive pulses only.
// Latency from an input pulse to a resulting output pulse: two clocks.
//
// Lint note: the all_pulses output of the internal buses is left unconnected
// because the node needs only the per-port receive lines, and the function
// argument j uses only its low bits because it indexes a 3-entry port list.
module parity3_node #(
  parameter int STATES = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] v_rx0,
  input  logic [2:0] v_rx1,
  output logic [2:0] v_tx0,
  output logic [2:0] v_tx1
);

  // Even configurations, bit j is the value of x_j.
  localparam logic [2:0] CFG [4] = '{3'b000, 3'b110, 3'b101, 3'b011};

  // Index (0..1) of the k-th configuration, among those with bit j == val.
  function automatic int cfg_of(int j, int val, int nth);
    int n = 0;
    for (int c = 0; c < 4; c++)
      if (int'(CFG[c][j]) == val) begin
        if (n == nth) return c;
        n++;
      end
    return 0;
  endfunction

  logic [2:0] bus_tx [4];
  logic [2:0] bus_rx [4];
  logic       mb_tx  [3][2];   // broadcast out of element (j,k)

  for (genvar c = 0; c < 4; c++) begin : g_bus
    for (genvar j = 0; j < 3; j++) begin : g_port
      assign bus_tx[c][j] = mb_tx[j][CFG[c][j]];
    end
    var_bus #(.NPORT(3)) u_bus (.tx(bus_tx[c]), .rx(bus_rx[c]), .all_pulses());
  end

  for (genvar j = 0; j < 3; j++) begin : g_var
    for (genvar k = 0; k < 2; k++) begin : g_val
      logic [1:0] w_rx;
      logic       c_tx;
      assign w_rx[0] = bus_rx[cfg_of(j, k, 0)][j];
      assign w_rx[1] = bus_rx[cfg_of(j, k, 1)][j];
      min_broadcast #(.NIN(2), .STATES(STATES)) u_mb (
        .clk, .rst_n,
        .w_rx (w_rx),
        .w_tx (mb_tx[j][k]),
        .c_rx (k == 0 ? v_rx0[j] : v_rx1[j]),
        .c_tx (c_tx)
      );
      if (k == 0) begin : g_o0
        assign v_tx0[j] = c_tx;
      end else begin : g_o1
        assign v_tx1[j] = c_tx;
      end
    end
  end

endmodule
