// codeword_verifier: checks the tentative bits against every parity check.
//
// For each check row the XNOR of its DEG bits (a reduction tree) is 1 when the
// check is satisfied; an AND tree over all checks gives 'valid'. Purely
// combinational. The code structure comes from ldpc_pkg for lifting factor Z.
module codeword_verifier
  import ldpc_pkg::*;
#(
  parameter int Z = 44
) (
  input  logic [NB*Z-1:0] bits,
  output logic [MB*Z-1:0] check_ok,
  output logic            valid
);

  for (genvar r = 0; r < MB * Z; r++) begin : g_chk
    localparam int DEG = row_deg(r / Z);
    logic [DEG-1:0] b;
    for (genvar t = 0; t < DEG; t++) begin : g_e
      assign b[t] = bits[edge_var(r, t, Z)];
    end
    assign check_ok[r] = ~^b;
  end

  assign valid = &check_ok;

endmodule
