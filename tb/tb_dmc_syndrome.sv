// tb_dmc_syndrome: self-checking test of the XOR syndrome comparator.
// Equal recomputed and stored check bits must give zero syndromes; for random
// pairs each syndrome bit must be 1 exactly where the two inputs differ (checked
// bit by bit). A watchdog ends the run after a fixed number of clock cycles.
module tb_dmc_syndrome;
  import dmc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  hcb_t hc, hm, hs;
  vcb_t vc, vm, vs;
  int   checks = 0, failures = 0;

  dmc_syndrome dut (.hcb_calc(hc), .hcb_mem(hm), .vcb_calc(vc), .vcb_mem(vm),
                    .hsyn(hs), .vsyn(vs));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      automatic int nbad = 0;
      hc = 20'($urandom);
      vc = 16'($urandom);
      if (i % 2 == 0) begin
        hm = hc;
        vm = vc;
      end else begin
        hm = 20'($urandom);
        vm = 16'($urandom);
      end
      @(posedge clk);
      for (int b = 0; b < 20; b++) if (hs[b] != (hc[b] != hm[b])) nbad++;
      for (int b = 0; b < 16; b++) if (vs[b] != (vc[b] != vm[b])) nbad++;
      if (i % 2 == 0 && (hs != 0 || vs != 0)) nbad++;
      checks++;
      if (nbad != 0) begin
        failures++;
        $display("FAIL hc=%h hm=%h hs=%h vc=%h vm=%h vs=%h", hc, hm, hs, vc, vm, vs);
      end
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
