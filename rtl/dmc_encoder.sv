// dmc_encoder: DMC check-bit generator for one 32-bit word.
//
// The word is treated as eight 4-bit symbols in a 2 x 4 matrix (see dmc_pkg).
// Horizontal check bits: for each of the four horizontal groups g, the two symbols
// of the group (columns k and k+2 of one row) are added as unsigned binary
// numbers and the 5-bit sum, carry included, is placed in hcb[5g+4:5g]. This is
// the "decimal addition" of DMC: symbols are summed as integers, not XORed.
// Vertical check bits: for each column c, vcb[4c+3:4c] is the XOR of the column's
// symbol in row 0 and its symbol in row 1.
//
// Interface: data_in is the word to write; data_out is the same word, which is
// stored next to hcb and vcb. Timing: purely combinational, no clock, matching
// the paper's encoder, which has only data and check-bit pins (100 I/Os).
// The decoder reuses this block to recompute the check bits of a word read back.
//
// The arithmetic and XOR structure follow the paper; the symbol-to-group
// pairing is the standard DMC arrangement and matches the paper's example
// word 0xA86479BE -> hcb 10000_01100_10010_10111, vcb 1101_0001_1101_1010.
module dmc_encoder
  import dmc_pkg::*;
(
  input  data_t data_in,
  output data_t data_out,
  output hcb_t  hcb,
  output vcb_t  vcb
);

  assign data_out = data_in;

  // Horizontal: 4-bit + 4-bit -> 5-bit sum per group.
  for (genvar g = 0; g < N_HG; g++) begin : g_hor
    localparam int unsigned SA = hgrp_sym_a(g);
    localparam int unsigned SB = hgrp_sym_b(g);
    assign hcb[g*HG_W +: HG_W] = {1'b0, data_in[SA*SYM_W +: SYM_W]}
                               + {1'b0, data_in[SB*SYM_W +: SYM_W]};
  end

  // Vertical: XOR of the two symbols of each column.
  for (genvar c = 0; c < COLS; c++) begin : g_ver
    assign vcb[c*SYM_W +: SYM_W] = data_in[c*SYM_W +: SYM_W]
                                 ^ data_in[(c+COLS)*SYM_W +: SYM_W];
  end

endmodule
