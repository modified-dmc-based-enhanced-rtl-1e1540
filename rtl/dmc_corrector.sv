// dmc_corrector: flips the erroneous bits of the located symbols.
//
// For every symbol s whose error-location bit is set, the symbol is XORed with the
// vertical syndrome of its column, vsyn[4c+3:4c] with c = s % 4: symbols 0 and 4
// use vsyn[3:0], 1 and 5 use vsyn[7:4], 2 and 6 use vsyn[11:8], 3 and 7 use
// vsyn[15:12]. Since the column syndrome is exactly the set of bits that changed,
// this restores the symbol. Symbols that are not marked pass unchanged.
//
// Interface: data read from memory, vsyn, err_loc in; corrected data out.
// Timing: combinational. The XOR mapping follows the paper's bit-inversion
// table.
module dmc_corrector
  import dmc_pkg::*;
(
  input  data_t   data_mem,
  input  vcb_t    vsyn,
  input  errloc_t err_loc,
  output data_t   data_corr
);

  for (genvar s = 0; s < N_SYM; s++) begin : g_sym
    localparam int unsigned C = col_of(s);
    assign data_corr[s*SYM_W +: SYM_W] = err_loc[s]
        ? data_mem[s*SYM_W +: SYM_W] ^ vsyn[C*SYM_W +: SYM_W]
        : data_mem[s*SYM_W +: SYM_W];
  end

endmodule
