// pgdbf_pkg: constants, types and the parity-check matrix of the PGDBF decoder.
//
// The code is a regular quasi-cyclic LDPC code with variable degree DV = 3,
// check degree DC = 6, rate 1/2 and circulant size Z = 54, so N = 24*Z = 1296
// variable nodes (VNs) and M = 12*Z = 648 check nodes (CNs). The degrees, Z and
// N follow the target code of the design; its exact circulant shifts are not
// available, so this package defines its own 12 x 24 base matrix:
//   * block column j (half h = j / 12) has its three circulants, layers
//     l = 0..2, in block rows (j mod 12 + OFF[h][l]) mod 12 with
//     OFF[0] = {0, 1, 3} and OFF[1] = {0, 5, 7}; every block row thus holds
//     6 of them and no two block columns share all three block rows;
//   * the circulant of layer l in block column j is the identity cyclically
//     shifted by s(l, j) = l*j mod Z.
// The matrix has no 4-cycles for Z = 54 (and for Z = 12, used in short tests).
// A circulant with shift s puts a 1 at (row a, column (a + s) mod Z), so the VN
// at offset t of block column j meets the CN at offset (t - s) mod Z.
// All functions take Z as an argument so that reduced sizes can be elaborated.
package pgdbf_pkg;

  localparam int unsigned DV     = 3;    // VN degree
  localparam int unsigned DC     = 6;    // CN degree
  localparam int unsigned MB     = 12;   // block rows of the base matrix
  localparam int unsigned NB     = 24;   // block columns of the base matrix
  localparam int unsigned Z_DEF  = 54;   // circulant size of the target code
  localparam int unsigned E_W    = 3;    // energy width: E ranges 0..DV+1
  localparam int unsigned E_LVLS = DV + 2; // number of distinct energy values

  typedef logic [E_W-1:0] energy_t;

  // Initialisation method of the short random sequence R'.
  typedef enum logic {
    INIT_IVRG = 1'b0,  // complement of the first CN values
    INIT_LFSR = 1'b1   // serial bits from a 32-bit LFSR and threshold
  } init_e;

  // Block-row offsets of the three layers, for each half of the base matrix.
  function automatic int unsigned row_off(int unsigned h, int unsigned l);
    if (h == 0) return (l == 0) ? 0 : (l == 1) ? 1 : 3;
    else        return (l == 0) ? 0 : (l == 1) ? 5 : 7;
  endfunction

  // Shift of the circulant of layer l in block column j.
  function automatic int unsigned circ_shift(int unsigned l, int unsigned j, int unsigned z);
    return (l * j) % z;
  endfunction

  // Block row holding the layer-l circulant of block column j.
  function automatic int unsigned circ_row(int unsigned l, int unsigned j);
    return ((j % MB) + row_off(j / MB, l)) % MB;
  endfunction

  // Index of the CN that VN n meets through its layer-l edge.
  function automatic int unsigned cn_of_vn(int unsigned n, int unsigned l, int unsigned z);
    int unsigned j, t, s;
    j = n / z;
    t = n % z;
    s = circ_shift(l, j, z);
    return circ_row(l, j) * z + ((t + z - s) % z);
  endfunction

  // Index of the d-th VN (d = 0..DC-1) of CN m. Edge d = 3*h + l belongs to
  // block column j = 12*h + (r - OFF[h][l]) mod 12, r being the CN's block row.
  function automatic int unsigned vn_of_cn(int unsigned m, int unsigned d, int unsigned z);
    int unsigned r, a, l, h, j, s;
    r = m / z;
    a = m % z;
    h = d / DV;
    l = d % DV;
    j = MB * h + (r + MB - row_off(h, l)) % MB;
    s = circ_shift(l, j, z);
    return j * z + ((a + s) % z);
  endfunction

endpackage
