// dmc_pkg: shared constants and helpers of the decimal matrix code (DMC).
//
// A DMC word of N information bits is cut into K = K1 x K2 symbols of M bits
// and the symbols are laid out, logically only, as a K1-row by K2-column
// matrix. Symbol s holds bits D[s*M +: M]; row 0 carries symbols 0..3 and
// row 1 symbols 4..7. Each row owns two horizontal check groups of M+1 bits,
// each the integer sum of two symbols of that row that are two columns apart
// (symbols 0+2, 1+3, 4+6, 5+7). The vertical check bits are the XOR of the two
// bits in the same bit column of the two rows: V[i] = D[i] ^ D[i+N/2].
//
// The defaults are the 32-bit configuration: M = 4, K1 = 2, K2 = 4, giving
// 20 horizontal and 16 vertical check bits, a 68-bit codeword. The row and
// pairing structure (2 x 4 symbols, pairs two columns apart) is fixed; only
// the symbol width M is a parameter of the modules.
package dmc_pkg;

  localparam int unsigned SYM_W  = 4;               // m, bits per symbol
  localparam int unsigned ROWS   = 2;               // k1
  localparam int unsigned COLS   = 4;               // k2
  localparam int unsigned GROUPS = ROWS * COLS / 2; // horizontal check groups

  // Sizes derived from a symbol width m.
  function automatic int unsigned data_w(int unsigned m);
    return ROWS * COLS * m;
  endfunction

  function automatic int unsigned hgrp_w(int unsigned m);
    return m + 1;
  endfunction

  function automatic int unsigned h_w(int unsigned m);
    return GROUPS * (m + 1);
  endfunction

  function automatic int unsigned v_w(int unsigned m);
    return ROWS * COLS * m / 2;
  endfunction

  // Horizontal group g adds symbols sym_a(g) and sym_a(g) + 2.
  function automatic int unsigned sym_a(int unsigned g);
    return (g / 2) * COLS + (g % 2);
  endfunction

  // Horizontal group that covers symbol s.
  function automatic int unsigned group_of_sym(int unsigned s);
    return (s / COLS) * 2 + ((s % COLS) % 2);
  endfunction

  // Operation selected by the encoder-reuse enable.
  typedef enum logic {
    EN_ENCODE   = 1'b0,  // write: encoder produces H and V for storage
    EN_SYNDROME = 1'b1   // read: encoder recomputes H' and V' for the decoder
  } ert_mode_e;

endpackage
