// check_node: parity-check factor node of degree DEG (3 or more).
//
// A parity check on DEG variables is factored into a chain of DEG-2 three-input
// parity nodes joined by DEG-3 hidden variables: x0^x1^h0 = 0, h0^x2^h1 = 0,
// ..., h_{DEG-4}^x_{DEG-2}^x_{DEG-1} = 0. A hidden variable has only two
// neighbours, so its "bus" simply passes each node's output message to the
// other node. Messages on the external ports are assumed already offset
// normalised; hidden edges are not normalised (a choice of this design).
//
// Interface: per external variable i, v_rx0/v_rx1 carry mu_{x_i->f}(0/1) in,
// v_tx0/v_tx1 carry mu_{f->x_i}(0/1) out; positive pulses only.
// Latency: two clocks per parity node crossed.
module check_node #(
  parameter int DEG    = 6,
  parameter int STATES = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [DEG-1:0] v_rx0,
  input  logic [DEG-1:0] v_rx1,
  output logic [DEG-1:0] v_tx0,
  output logic [DEG-1:0] v_tx1
);

  localparam int NN = DEG - 2;   // number of three-input nodes

  initial assert (DEG >= 3) else $error("DEG must be at least 3");

  logic [2:0] n_rx0 [NN];
  logic [2:0] n_rx1 [NN];
  logic [2:0] n_tx0 [NN];
  logic [2:0] n_tx1 [NN];

  for (genvar u = 0; u < NN; u++) begin : g_node
    parity3_node #(.STATES(STATES)) u_p3 (
      .clk, .rst_n,
      .v_rx0(n_rx0[u]), .v_rx1(n_rx1[u]),
      .v_tx0(n_tx0[u]), .v_tx1(n_tx1[u])
    );
    // Port 1 of every node is an external variable.
    assign n_rx0[u][1] = v_rx0[u + 1];
    assign n_rx1[u][1] = v_rx1[u + 1];
    assign v_tx0[u + 1] = n_tx0[u][1];
    assign v_tx1[u + 1] = n_tx1[u][1];
    // Port 0: external x0 on the first node, else hidden variable from node u-1.
    if (u == 0) begin : g_first
      assign n_rx0[u][0] = v_rx0[0];
      assign n_rx1[u][0] = v_rx1[0];
      assign v_tx0[0]    = n_tx0[u][0];
      assign v_tx1[0]    = n_tx1[u][0];
    end else begin : g_hidden_in
      assign n_rx0[u][0] = n_tx0[u-1][2];
      assign n_rx1[u][0] = n_tx1[u-1][2];
    end
    // Port 2: external last variable on the last node, else hidden to node u+1.
    if (u == NN - 1) begin : g_last
      assign n_rx0[u][2]   = v_rx0[DEG-1];
      assign n_rx1[u][2]   = v_rx1[DEG-1];
      assign v_tx0[DEG-1]  = n_tx0[u][2];
      assign v_tx1[DEG-1]  = n_tx1[u][2];
    end else begin : g_hidden_out
      assign n_rx0[u][2] = n_tx0[u+1][0];
      assign n_rx1[u][2] = n_tx1[u+1][0];
    end
  end

endmodule
