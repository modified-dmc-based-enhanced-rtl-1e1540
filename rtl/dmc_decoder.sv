// dmc_decoder: DMC error detection and correction for one 68-bit codeword.
//
// Datapath, all combinational up to the output register:
//   1. dmc_encoder recomputes the horizontal sums and vertical XORs of the data
//      as read (encoder reuse);
//   2. dmc_syndrome compares them with the stored check bits by XOR;
//   3. dmc_err_locator marks each symbol whose horizontal group and column both
//      show a nonzero syndrome;
//   4. dmc_corrector XORs each marked symbol with its column's vertical syndrome.
// The corrected word and the error-location bits are loaded into the output
// register on every rising clock edge. With no error located the word is loaded
// unchanged.
//
// Interface: clk, rst_n (asynchronous, active low, clears the output register),
// data_in/hcb_in/vcb_in from memory; data_out and err_loc registered.
// Timing: one cycle from inputs to outputs, one word per cycle.
//
// Follows the paper: XOR syndrome, per-symbol location bit, correction with the
// vertical syndrome, output register. This design's own choices: the reset, and
// bringing err_loc out (the paper's decoder has only the data and check-bit
// pins and a clock).
module dmc_decoder
  import dmc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  data_t   data_in,
  input  hcb_t    hcb_in,
  input  vcb_t    vcb_in,
  output data_t   data_out,
  output errloc_t err_loc
);

  data_t   data_re;
  hcb_t    hcb_calc, hsyn;
  vcb_t    vcb_calc, vsyn;
  errloc_t loc;
  data_t   data_corr;

  dmc_encoder u_reenc (
    .data_in (data_in),
    .data_out(data_re),
    .hcb     (hcb_calc),
    .vcb     (vcb_calc)
  );

  dmc_syndrome u_syn (
    .hcb_calc(hcb_calc),
    .hcb_mem (hcb_in),
    .vcb_calc(vcb_calc),
    .vcb_mem (vcb_in),
    .hsyn    (hsyn),
    .vsyn    (vsyn)
  );

  dmc_err_locator u_loc (
    .hsyn   (hsyn),
    .vsyn   (vsyn),
    .err_loc(loc)
  );

  dmc_corrector u_cor (
    .data_mem (data_re),
    .vsyn     (vsyn),
    .err_loc  (loc),
    .data_corr(data_corr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      err_loc  <= '0;
    end else begin
      data_out <= data_corr;
      err_loc  <= loc;
    end
  end

  // With no symbol located, the word must leave the register exactly as read.
  a_pass_clean: assert property (@(posedge clk) disable iff (!rst_n)
    (loc == '0) |=> (data_out == $past(data_in)));

endmodule
