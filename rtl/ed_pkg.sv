// ed_pkg: sizes and types shared by the early-detection checker for
// dual-diagonal block-based LDPC codes (IEEE 802.16e / 802.11n style).
//
// The parity-check matrix H is expanded from a base matrix Hb of mb rows and
// nb = kb + mb columns. Every base-matrix entry is either a zero block or a
// z x z circulant permutation (an identity matrix whose rows are rotated right
// by the entry's shift). The checker only ever needs the data part Hb_s
// (mb x kb) of the base matrix and the hard decisions of the kb data
// sub-blocks plus the first parity sub-block p0.
//
// The maxima below cover every IEEE 802.16e code: expansion factor z up to 96,
// 24 base columns, at most 12 base rows (rate 1/2) and at most 20 data
// columns (rate 5/6). These limits come from that standard; the checker
// itself works for any dual-diagonal code within them. Each module uses only
// some of these constants, so lint lists the others as unused.
package ed_pkg;

  localparam int unsigned Z_MAX   = 96;  // largest expansion factor z
  localparam int unsigned MB_MAX  = 12;  // largest number of base rows mb
  localparam int unsigned KB_MAX  = 20;  // largest number of data columns kb
  localparam int unsigned NB_MAX  = 24;  // base columns nb = kb + mb
  localparam int unsigned MAX_ITER = 15; // decoder iteration limit

  localparam int unsigned SHIFT_W = $clog2(Z_MAX);      // 7 bits: 0..95
  localparam int unsigned Z_W     = $clog2(Z_MAX + 1);  // 7 bits: 1..96

  // One base-matrix entry of Hb_s: valid = 0 stands for the -1 (zero block)
  // entry, otherwise shift is the right-rotation of the identity matrix.
  typedef struct packed {
    logic               valid;
    logic [SHIFT_W-1:0] shift;
  } hb_entry_t;

endpackage
