// tb_dmc_decoder: self-checking test of the DMC decoder.
// Stored words are built with the behavioural encoder of dmc_ref_pkg, corrupted,
// and presented to the decoder. Checked:
//   - the worked example word 0xA86479BE with its check bits passes unchanged;
//   - every nonzero error pattern in every single symbol is corrected and only
//     that symbol is marked;
//   - every pair of horizontally adjacent symbols with random error patterns is
//     corrected (a multiple cell upset of up to 8 bits);
//   - errors in the stored check bits only leave the data untouched;
//   - random errors anywhere in the 68 bits give the reference model's result;
//   - the result appears after exactly one rising clock edge, and reset clears
//     the output register.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_dmc_decoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n;
  data_t   din, dout;
  hcb_t    hin;
  vcb_t    vin;
  errloc_t loc;
  int      checks = 0, failures = 0;

  dmc_decoder dut (.clk(clk), .rst_n(rst_n), .data_in(din), .hcb_in(hin), .vcb_in(vin),
                   .data_out(dout), .err_loc(loc));

  // Present a stored word at the falling edge; check one rising edge later.
  task automatic apply(data_t d, hcb_t h, vcb_t v, data_t exp_d, errloc_t exp_l);
    @(negedge clk);
    din = d;
    hin = h;
    vin = v;
    @(posedge clk);
    #1;
    checks++;
    if (dout !== exp_d || loc !== exp_l) begin
      failures++;
      $display("FAIL in=%h/%h/%h out=%h exp %h loc=%b exp %b", d, h, v, dout, exp_d, loc, exp_l);
    end
  endtask

  initial begin
    data_t   d, e;
    errloc_t el;
    rst_n = 1'b0;
    din = '0; hin = '0; vin = '0;
    #12;
    checks++;
    if (dout !== '0 || loc !== '0) begin
      failures++;
      $display("FAIL reset");
    end
    rst_n = 1'b1;

    // Worked example, no error.
    apply(32'hA864_79BE, 20'b10000_01100_10010_10111, 16'b1101_0001_1101_1010,
          32'hA864_79BE, '0);

    // Single-symbol errors, every pattern.
    for (int s = 0; s < 8; s++)
      for (int p = 1; p < 16; p++) begin
        d = $urandom;
        e = d ^ (data_t'(p) << (4 * s));
        apply(e, ref_hcb(d), ref_vcb(d), d, errloc_t'(1 << s));
      end

    // Two horizontally adjacent symbols.
    for (int s = 0; s < 8; s++) begin
      if (s % 4 == 3) continue;
      for (int i = 0; i < 40; i++) begin
        automatic int unsigned p1 = ($urandom % 15) + 1, p2 = ($urandom % 15) + 1;
        d = $urandom;
        e = d ^ (data_t'(p1) << (4 * s)) ^ (data_t'(p2) << (4 * (s + 1)));
        apply(e, ref_hcb(d), ref_vcb(d), d, errloc_t'(3 << s));
      end
    end

    // Check bits only.
    for (int i = 0; i < 200; i++) begin
      d = $urandom;
      if (i % 2 == 0) apply(d, ref_hcb(d) ^ 20'($urandom | 1), ref_vcb(d), d, '0);
      else            apply(d, ref_hcb(d), ref_vcb(d) ^ 16'($urandom | 1), d, '0);
    end

    // Random errors anywhere, compared with the reference model.
    for (int i = 0; i < 2000; i++) begin
      data_t x;
      hcb_t  h;
      vcb_t  v;
      d = $urandom;
      x = d ^ ($urandom & $urandom & $urandom);
      h = ref_hcb(d) ^ (20'($urandom) & 20'($urandom) & 20'($urandom));
      v = ref_vcb(d) ^ (16'($urandom) & 16'($urandom) & 16'($urandom));
      e = ref_decode(x, h, v, el);
      apply(x, h, v, e, el);
    end

    // Latency: the output must not change before the rising edge.
    for (int i = 0; i < 20; i++) begin
      data_t prev;
      @(negedge clk);
      prev = dout;
      d = $urandom;
      din = d ^ 32'h0000_0100;  // error in symbol 2
      hin = ref_hcb(d);
      vin = ref_vcb(d);
      #2;
      checks++;
      if (dout !== prev) begin
        failures++;
        $display("FAIL output changed before the clock edge");
      end
      @(posedge clk);
      #1;
      checks++;
      if (dout !== d || loc !== 8'b0000_0100) begin
        failures++;
        $display("FAIL latency check out=%h exp %h", dout, d);
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
