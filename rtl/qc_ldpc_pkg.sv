// qc_ldpc_pkg: code constants, message type and connection functions shared
// by every block of the fully parallel QC-LDPC min-sum decoder.
//
// The code is the IEEE 802.11n rate-1/2, N = 648 code. Its parity-check
// matrix H is a 12 x 24 array of 27 x 27 sub-matrices. BASE holds one entry per
// sub-matrix: -1 for the all-zero sub-matrix, otherwise the cyclic shift s of
// the identity. A sub-matrix with shift s has, in its local row k, a single one
// in local column (k + s) mod 27.
//
// Messages between the node units are 4-bit sign-magnitude words: one sign bit
// (1 = negative) and a 3-bit magnitude, as in the comparator and adder drawings
// of the design. Inside the variable node the arithmetic is 8-bit two's
// complement.
//
// An edge (a one of H) is named by its block row br, its slot p (the p-th
// non-zero sub-matrix of that block row, counted from the left) and the local
// row k inside the sub-matrix; it joins check row br*27 + k to column
// bc*27 + (k + s) mod 27. The small tables below, computed at elaboration from
// BASE, give the wiring of the interconnection network between the check and
// variable node units.
package qc_ldpc_pkg;

  localparam int Z     = 27;       // sub-matrix (expansion) size
  localparam int MB    = 12;       // block rows    (gamma)
  localparam int NB    = 24;       // block columns (rho)
  localparam int N     = NB * Z;   // code length, 648
  localparam int M     = MB * Z;   // check rows, 324
  localparam int K     = N - M;    // information bits, 324

  localparam int MAG_W = 3;        // message magnitude bits
  localparam int SUM_W = 8;        // two's complement width inside a VNU

  localparam int MAX_DC = 8;       // largest row weight
  localparam int MAX_DV = 12;      // largest column weight

  typedef struct packed {
    logic             sign;        // 1: negative
    logic [MAG_W-1:0] mag;
  } msg_t;

  // Base matrix, rate 1/2, z = 27 (-1: zero sub-matrix).
  localparam int BASE [MB][NB] = '{
    '{ 0, -1, -1, -1,  0,  0, -1, -1,  0, -1, -1,  0,  1,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{22,  0, -1, -1, 17, -1,  0,  0, 12, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 6, -1,  0, -1, 10, -1, -1, -1, 24, -1,  0, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 2, -1, -1,  0, 20, -1, -1, -1, 25,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{23, -1, -1, -1,  3, -1, -1, -1,  0, -1,  9, 11, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{24, -1, 23,  1, 17, -1,  3, -1, 10, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{25, -1, -1, -1,  8, -1, -1, -1,  7, 18, -1, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{13, 24, -1, -1,  0, -1,  8, -1,  6, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{ 7, 20, -1, 16, 22, 10, -1, -1, 23, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{11, -1, -1, -1, 19, -1, -1, -1, 13, -1,  3, 17, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{25, -1,  8, -1, 23, 18, -1, 14,  9, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{ 3, -1, -1, -1, 16, -1, -1,  2, 25,  5, -1, -1,  1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  // Number of non-zero sub-matrices in block row br (row weight of its rows).
  function automatic int row_weight(int br);
    int w = 0;
    for (int bc = 0; bc < NB; bc++) if (BASE[br][bc] >= 0) w++;
    return w;
  endfunction

  // Number of non-zero sub-matrices in block column bc (column weight).
  function automatic int col_weight(int bc);
    int w = 0;
    for (int br = 0; br < MB; br++) if (BASE[br][bc] >= 0) w++;
    return w;
  endfunction

  // Small wiring tables at block level, each computed once at elaboration.
  typedef int mb_tab_t   [MB];
  typedef int nb_tab_t   [NB];
  typedef int row_bc_t   [MB*MAX_DC];   // index br*MAX_DC + p
  typedef int col_br_t   [NB*MAX_DV];   // index bc*MAX_DV + t
  typedef int slot_t     [MB*NB];       // index br*NB + bc

  function automatic mb_tab_t make_row_w();
    mb_tab_t t;
    for (int br = 0; br < MB; br++) t[br] = row_weight(br);
    return t;
  endfunction

  function automatic nb_tab_t make_col_w();
    nb_tab_t t;
    for (int bc = 0; bc < NB; bc++) t[bc] = col_weight(bc);
    return t;
  endfunction

  // Block column of the p-th non-zero sub-matrix of block row br (-1: none).
  function automatic row_bc_t make_row_bc();
    row_bc_t t;
    for (int i = 0; i < MB*MAX_DC; i++) t[i] = -1;
    for (int br = 0; br < MB; br++) begin
      int p = 0;
      for (int bc = 0; bc < NB; bc++) if (BASE[br][bc] >= 0) begin
        t[br*MAX_DC + p] = bc;
        p++;
      end
    end
    return t;
  endfunction

  // Block row of the t-th non-zero sub-matrix of block column bc (-1: none).
  function automatic col_br_t make_col_br();
    col_br_t t;
    for (int i = 0; i < NB*MAX_DV; i++) t[i] = -1;
    for (int bc = 0; bc < NB; bc++) begin
      int q = 0;
      for (int br = 0; br < MB; br++) if (BASE[br][bc] >= 0) begin
        t[bc*MAX_DV + q] = br;
        q++;
      end
    end
    return t;
  endfunction

  // Slot p of sub-matrix (br, bc) within its block row (-1: zero sub-matrix).
  function automatic slot_t make_slot();
    slot_t t;
    for (int br = 0; br < MB; br++) begin
      int p = 0;
      for (int bc = 0; bc < NB; bc++) begin
        t[br*NB + bc] = (BASE[br][bc] >= 0) ? p : -1;
        if (BASE[br][bc] >= 0) p++;
      end
    end
    return t;
  endfunction

  // BASE flattened, index br*NB + bc.
  function automatic slot_t make_shift();
    slot_t t;
    for (int br = 0; br < MB; br++)
      for (int bc = 0; bc < NB; bc++) t[br*NB + bc] = BASE[br][bc];
    return t;
  endfunction

  localparam slot_t   SHIFT  = make_shift();
  localparam mb_tab_t ROW_W  = make_row_w();   // row weight of block row
  localparam nb_tab_t COL_W  = make_col_w();   // column weight of block column
  localparam row_bc_t ROW_BC = make_row_bc();
  localparam col_br_t COL_BR = make_col_br();
  localparam slot_t   SLOT   = make_slot();

  // Number of edges (ones in H), 2376.
  function automatic int num_edges();
    int e = 0;
    for (int br = 0; br < MB; br++) e += row_weight(br) * Z;
    return e;
  endfunction

  localparam int E = num_edges();

endpackage
