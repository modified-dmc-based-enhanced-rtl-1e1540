// tb_dmc_encoder: self-checking test of the DMC check-bit generator.
// Checks the worked example word 0xA86479BE (hcb 10000_01100_10010_10111,
// vcb 1101_0001_1101_1010), the all-zero and all-one words, and random words
// against the behavioural model in dmc_ref_pkg. A watchdog ends the run after a
// fixed number of clock cycles.
module tb_dmc_encoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t din, dout;
  hcb_t  hcb;
  vcb_t  vcb;
  int    checks = 0, failures = 0;

  dmc_encoder dut (.data_in(din), .data_out(dout), .hcb(hcb), .vcb(vcb));

  task automatic check_word(data_t d, hcb_t exp_h, vcb_t exp_v);
    din = d;
    @(posedge clk);
    checks++;
    if (hcb !== exp_h || vcb !== exp_v || dout !== d) begin
      failures++;
      $display("FAIL data=%h hcb=%b exp %b vcb=%b exp %b dout=%h", d, hcb, exp_h, vcb, exp_v, dout);
    end
  endtask

  initial begin
    check_word(32'hA864_79BE, 20'b10000_01100_10010_10111, 16'b1101_0001_1101_1010);
    check_word(32'h0000_0000, 20'h0, 16'h0);
    check_word(32'hFFFF_FFFF, {4{5'd30}}, 16'h0);
    check_word(32'h0000_FFFF, {5'd0, 5'd0, 5'd30, 5'd30}, 16'hFFFF);
    for (int i = 0; i < 2000; i++) begin
      automatic data_t d = $urandom;
      check_word(d, ref_hcb(d), ref_vcb(d));
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
