// dmc_pkg: shared constants, types and index helpers of the 32-bit Decimal Matrix
// Code (DMC).
//
// The 32-bit word is cut into eight 4-bit symbols, symbol s = data[4s+3:4s], laid
// out as a matrix of 2 rows by 4 columns: row = s / 4, column = s % 4. Each row
// holds two horizontal groups, each the pair of symbols two columns apart
// (columns 0/2 and 1/3). A horizontal group stores the 5-bit binary sum of its
// two symbols (20 horizontal check bits in all); a column stores the 4-bit XOR of
// its two symbols (16 vertical check bits). A stored codeword is therefore
// 32 + 20 + 16 = 68 bits.
//
// The word size, symbol size, matrix shape and check-bit counts follow the
// document (16 and 20 XOR gates for the two syndromes, 20-bit and 16-bit check
// buses in its waveforms). The pairing of symbols into horizontal groups is the
// standard DMC arrangement; it reproduces the check bits of the paper's encoder
// waveform exactly.
package dmc_pkg;

  localparam int unsigned DATA_W  = 32;            // data word
  localparam int unsigned SYM_W   = 4;             // bits per symbol
  localparam int unsigned N_SYM   = DATA_W / SYM_W; // 8 symbols
  localparam int unsigned ROWS    = 2;             // matrix rows
  localparam int unsigned COLS    = N_SYM / ROWS;  // 4 matrix columns
  localparam int unsigned HG_W    = SYM_W + 1;     // 5-bit sum per horizontal group
  localparam int unsigned N_HG    = ROWS * 2;      // 4 horizontal groups
  localparam int unsigned H_W     = N_HG * HG_W;   // 20 horizontal check bits
  localparam int unsigned V_W     = COLS * SYM_W;  // 16 vertical check bits
  localparam int unsigned CW_W    = DATA_W + H_W + V_W; // 68-bit codeword

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [H_W-1:0]    hcb_t;
  typedef logic [V_W-1:0]    vcb_t;
  typedef logic [N_SYM-1:0]  errloc_t;

  // One stored word: data followed by its horizontal and vertical check bits.
  typedef struct packed {
    data_t data;
    hcb_t  hcb;
    vcb_t  vcb;
  } codeword_t;

  // Matrix column of a symbol (also its vertical group).
  function automatic int unsigned col_of(int unsigned s);
    return s % COLS;
  endfunction

  // Horizontal group of a symbol: two groups per row, by column parity.
  function automatic int unsigned hgrp_of(int unsigned s);
    return 2 * (s / COLS) + (s % 2);
  endfunction

  // First and second symbol of horizontal group g (columns k and k+2 of row g/2).
  function automatic int unsigned hgrp_sym_a(int unsigned g);
    return COLS * (g / 2) + (g % 2);
  endfunction

  function automatic int unsigned hgrp_sym_b(int unsigned g);
    return COLS * (g / 2) + (g % 2) + 2;
  endfunction

endpackage
