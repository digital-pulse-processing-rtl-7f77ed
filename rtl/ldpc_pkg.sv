// ldpc_pkg: structure of the WiMAX 802.16e rate-1/2 LDPC code.
//
// The parity-check matrix H is the 12 x 24 base matrix below expanded by the
// lifting factor Z: entry -1 is a Z x Z zero block, entry p >= 0 is the Z x Z
// identity cyclically shifted by floor(p * Z / 96) (the rate-1/2 scaling rule
// of the standard, the table being given for Z = 96). Row i of block row br
// has a one in column bc*Z + (i + shift) mod Z. Z = 44 gives the (1056,528)
// code, Z = 22 the (528,264) code.
//
// Helper functions give each edge's position on its check (slot) and on its
// variable bus (port), so that the decoder and the verifier can be generated
// for any Z from the base matrix alone.
//
// Lint note: the int arguments of the table functions are row and column
// numbers below 12 and 24, so only their low bits are read; this is expected.
package ldpc_pkg;

  localparam int MB = 12;        // block rows
  localparam int NB = 24;        // block columns
  localparam int Z_TABLE = 96;   // lifting factor of the shift table
  localparam int MAX_RDEG = 7;   // largest check degree

  typedef int base_t [MB][NB];

  localparam base_t BASE = '{
    '{-1, 94, 73, -1, -1, -1, -1, -1, 55, 83, -1, -1,  7,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, 27, -1, -1, -1, 22, 79,  9, -1, -1, -1, 12, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, 24, 22, 81, -1, 33, -1, -1, -1,  0, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{61, -1, 47, -1, -1, -1, -1, -1, 65, 25, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, 39, -1, -1, -1, 84, -1, -1, 41, 72, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, 46, 40, -1, 82, -1, -1, -1, 79,  0, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{-1, -1, 95, 53, -1, -1, -1, -1, -1, 14, 18, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, 11, 73, -1, -1, -1,  2, -1, -1, 47, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{12, -1, -1, -1, 83, 24, -1, 43, -1, -1, -1, 51, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, -1, -1, -1, 94, -1, 59, -1, -1, 70, 72, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{-1, -1,  7, 65, -1, -1, -1, -1, 39, 49, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{43, -1, -1, -1, -1, 66, -1, 41, -1, -1, -1, 26,  7, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Degree of the checks of block row br.
  function automatic int row_deg(int br);
    int d = 0;
    for (int c = 0; c < NB; c++) if (BASE[br][c] >= 0) d++;
    return d;
  endfunction

  // Number of checks on each variable of block column bc.
  function automatic int col_deg(int bc);
    int d = 0;
    for (int r = 0; r < MB; r++) if (BASE[r][bc] >= 0) d++;
    return d;
  endfunction

  // Block column of the slot-th edge of block row br.
  function automatic int slot_col(int br, int slot);
    int n = 0;
    for (int c = 0; c < NB; c++)
      if (BASE[br][c] >= 0) begin
        if (n == slot) return c;
        n++;
      end
    return 0;
  endfunction

  // Slot of block column bc within block row br.
  function automatic int col_slot(int br, int bc);
    int n = 0;
    for (int c = 0; c < bc; c++) if (BASE[br][c] >= 0) n++;
    return n;
  endfunction

  // Port (1..col_deg) of block row br on the bus of a block-column bc variable;
  // port 0 is the channel modulator.
  function automatic int bus_port(int br, int bc);
    int n = 1;
    for (int r = 0; r < br; r++) if (BASE[r][bc] >= 0) n++;
    return n;
  endfunction

  // The n-th block row (n = 0..col_deg-1) that has an entry in block column bc.
  function automatic int col_row(int bc, int n);
    int k = 0;
    for (int r = 0; r < MB; r++)
      if (BASE[r][bc] >= 0) begin
        if (k == n) return r;
        k++;
      end
    return 0;
  endfunction

  // Cyclic shift of block (br, bc) for lifting factor z.
  function automatic int shift(int br, int bc, int z);
    return (BASE[br][bc] * z) / Z_TABLE;
  endfunction

  // Variable index of the slot-th edge of check row r.
  function automatic int edge_var(int r, int slot, int z);
    int br = r / z;
    int i  = r % z;
    int bc = slot_col(br, slot);
    return bc * z + (i + shift(br, bc, z)) % z;
  endfunction

  // Check row reached from variable v through the n-th check of its column.
  function automatic int var_check(int v, int n, int z);
    int bc = v / z;
    int b  = v % z;
    int br = col_row(bc, n);
    return br * z + (b - shift(br, bc, z) + z) % z;
  endfunction

endpackage
