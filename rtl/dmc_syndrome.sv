// dmc_syndrome: XOR comparator that forms the DMC syndromes.
//
// The decoder recomputes the check bits of the word it has read and compares them
// with the check bits stored beside it. Instead of a 5-bit decimal subtractor per
// horizontal group, each check bit is compared with an XOR gate:
//   hsyn = hcb_calc ^ hcb_mem   (20 XOR gates, 5 per horizontal group)
//   vsyn = vcb_calc ^ vcb_mem   (16 XOR gates, 4 per column)
// A horizontal group is in error exactly when its 5-bit field of hsyn is nonzero,
// and a column's 4-bit field of vsyn is the bit pattern by which its symbols
// differ, which the corrector uses directly to flip bits back.
//
// It is built from dmc_xor_cmp units: four 5-bit comparators for the horizontal
// groups and four 4-bit comparators for the columns.
//
// Interface: recomputed and stored check bits in, two syndromes out. Timing:
// combinational. The structure (XOR comparator, gate counts) follows the paper.
module dmc_syndrome
  import dmc_pkg::*;
(
  input  hcb_t hcb_calc,
  input  hcb_t hcb_mem,
  input  vcb_t vcb_calc,
  input  vcb_t vcb_mem,
  output hcb_t hsyn,
  output vcb_t vsyn
);

  // One 5-bit comparator per horizontal group.
  for (genvar g = 0; g < N_HG; g++) begin : g_hor
    dmc_xor_cmp #(.W(HG_W)) u_cmp (
      .a   (hcb_calc[g*HG_W +: HG_W]),
      .b   (hcb_mem[g*HG_W +: HG_W]),
      .diff(hsyn[g*HG_W +: HG_W])
    );
  end

  // One 4-bit comparator per column.
  for (genvar c = 0; c < COLS; c++) begin : g_ver
    dmc_xor_cmp #(.W(SYM_W)) u_cmp (
      .a   (vcb_calc[c*SYM_W +: SYM_W]),
      .b   (vcb_mem[c*SYM_W +: SYM_W]),
      .diff(vsyn[c*SYM_W +: SYM_W])
    );
  end

endmodule
