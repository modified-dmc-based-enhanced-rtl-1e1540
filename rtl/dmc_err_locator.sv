// dmc_err_locator: finds which of the eight data symbols are in error.
//
// Every symbol belongs to one horizontal group (5 syndrome bits) and one column
// (4 syndrome bits). The two fields of a symbol are grouped: each field is
// reduced to a flag that is 1 when the field is nonzero, and the two flags are
// ANDed into the symbol's error-location bit. A symbol is therefore marked only
// when both its row-pair sum and its column parity disagree with the stored
// check bits, which places the error at the crossing of a horizontal group and a
// column of the matrix. An error that lies only in the stored check bits raises
// one kind of flag and marks no symbol.
//
// Interface: hsyn (20 bits), vsyn (16 bits) in; err_loc[s] = 1 marks symbol s.
// Timing: combinational.
//
// The paper states that the grouped syndrome bits of each symbol are ANDed
// into one bit per symbol (8 bits); the reduction of each field to a nonzero flag
// before the AND is this design's reading of that step, since an AND of the raw
// syndrome bits would miss errors whose syndrome is not all ones.
module dmc_err_locator
  import dmc_pkg::*;
(
  input  hcb_t    hsyn,
  input  vcb_t    vsyn,
  output errloc_t err_loc
);

  for (genvar s = 0; s < N_SYM; s++) begin : g_sym
    localparam int unsigned G = hgrp_of(s);
    localparam int unsigned C = col_of(s);
    assign err_loc[s] = (|hsyn[G*HG_W +: HG_W]) & (|vsyn[C*SYM_W +: SYM_W]);
  end

endmodule
