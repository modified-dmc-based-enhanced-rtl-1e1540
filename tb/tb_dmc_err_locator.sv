// tb_dmc_err_locator: self-checking test of the error-location logic.
// Walks every single horizontal-group/column combination (exactly one symbol must
// be marked), every field alone (no symbol marked), and random sparse syndromes
// compared with the behavioural model in dmc_ref_pkg. A watchdog ends the run
// after a fixed number of clock cycles.
module tb_dmc_err_locator;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  hcb_t    hs;
  vcb_t    vs;
  errloc_t loc;
  int      checks = 0, failures = 0;

  dmc_err_locator dut (.hsyn(hs), .vsyn(vs), .err_loc(loc));

  task automatic expect_loc(errloc_t exp);
    @(posedge clk);
    checks++;
    if (loc !== exp) begin
      failures++;
      $display("FAIL hsyn=%b vsyn=%b loc=%b exp %b", hs, vs, loc, exp);
    end
  endtask

  initial begin
    // One horizontal group and one column: the symbol at their crossing, if any.
    for (int g = 0; g < 4; g++)
      for (int c = 0; c < 4; c++)
        for (int p = 1; p < 32; p += 5) begin
          automatic errloc_t exp = '0;
          hs = 20'(p) << (5 * g);
          vs = 16'((p % 15) + 1) << (4 * c);
          // symbols in row g/2 whose column parity is g%2
          if ((c % 2) == (g % 2)) exp[4 * (g / 2) + c] = 1'b1;
          expect_loc(exp);
        end
    // A field alone never marks a symbol.
    for (int g = 0; g < 4; g++) begin
      hs = 20'h1F << (5 * g);
      vs = '0;
      expect_loc('0);
    end
    for (int c = 0; c < 4; c++) begin
      hs = '0;
      vs = 16'hF << (4 * c);
      expect_loc('0);
    end
    // Random sparse syndromes.
    for (int i = 0; i < 2000; i++) begin
      hs = 20'($urandom) & 20'($urandom) & 20'($urandom);
      vs = 16'($urandom) & 16'($urandom) & 16'($urandom);
      expect_loc(ref_loc(hs, vs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
