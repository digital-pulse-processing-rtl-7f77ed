// Shared LDPC testbench helpers: a reference encoder for the dual-diagonal
// WiMAX rate-1/2 structure, a reference syndrome check built directly from
// the base matrix, and a Gaussian noise source.
`ifndef LDPC_TB_UTIL_SVH
`define LDPC_TB_UTIL_SVH

// Bit of Z-vector block c (of word w) after a cyclic shift by a.
function automatic bit blk_bit(input bit w [], input int c, input int k, input int a, input int z);
  return w[c * z + (k + a) % z];
endfunction

// Encode: systematic bits in block columns 0..11 are random; parity blocks
// 12..23 follow from the dual-diagonal part of H.
function automatic void ldpc_encode(input int z, ref bit cw []);
  bit lam [];
  bit p0 [];
  lam = new[ldpc_pkg::MB * z];
  p0  = new[z];
  for (int v = 0; v < 12 * z; v++) cw[v] = 1'($urandom_range(0, 1));
  for (int v = 12 * z; v < ldpc_pkg::NB * z; v++) cw[v] = 1'b0;
  for (int r = 0; r < ldpc_pkg::MB; r++)
    for (int k = 0; k < z; k++) begin
      bit acc = 1'b0;
      for (int c = 0; c < 12; c++)
        if (ldpc_pkg::BASE[r][c] >= 0) acc ^= blk_bit(cw, c, k, ldpc_pkg::shift(r, c, z), z);
      lam[r * z + k] = acc;
    end
  // p0 is the sum of all row syndromes of the systematic part.
  for (int k = 0; k < z; k++) begin
    bit acc = 1'b0;
    for (int r = 0; r < ldpc_pkg::MB; r++) acc ^= lam[r * z + k];
    p0[k] = acc;
    cw[12 * z + k] = acc;
  end
  // Row 0 gives block 13, row i gives block 13 + i.
  for (int r = 0; r < ldpc_pkg::MB - 1; r++)
    for (int k = 0; k < z; k++) begin
      bit acc = lam[r * z + k];
      if (ldpc_pkg::BASE[r][12] >= 0) acc ^= p0[(k + ldpc_pkg::shift(r, 12, z)) % z];
      if (r > 0) acc ^= cw[(12 + r) * z + k];
      cw[(13 + r) * z + k] = acc;
    end
endfunction

// Number of unsatisfied checks of word w.
function automatic int ldpc_syndrome_weight(input int z, input bit w []);
  int n = 0;
  for (int r = 0; r < ldpc_pkg::MB; r++)
    for (int k = 0; k < z; k++) begin
      bit acc = 1'b0;
      for (int c = 0; c < ldpc_pkg::NB; c++)
        if (ldpc_pkg::BASE[r][c] >= 0) acc ^= blk_bit(w, c, k, ldpc_pkg::shift(r, c, z), z);
      n += int'(acc);
    end
  return n;
endfunction

// Approximately standard normal sample (sum of 12 uniforms minus 6).
function automatic real gauss();
  real s = 0.0;
  for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
  return s - 6.0;
endfunction

`endif
