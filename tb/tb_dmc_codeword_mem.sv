// tb_dmc_codeword_mem: self-checking test of the codeword store.
// Fills every entry with random codewords and reads them back (one-cycle read
// latency, rdata held while re = 0), flips stored cells through the upset port and
// checks the flipped contents, and checks that a write in the same cycle as an
// upset of the same address wins. A shadow array in the testbench gives the
// expected contents. A watchdog ends the run after a fixed number of clock cycles.
module tb_dmc_codeword_mem;
  import dmc_pkg::*;

  localparam int unsigned DEPTH = 16;  // default of dmc_codeword_mem
  localparam int unsigned AW = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            we, re, upset_en;
  logic [AW-1:0]   waddr, raddr, upset_addr;
  codeword_t       wdata, rdata;
  logic [CW_W-1:0] upset_mask;
  logic [CW_W-1:0] shadow [DEPTH];
  int              checks = 0, failures = 0;

  dmc_codeword_mem dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr),
    .rdata(rdata), .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask));

  function automatic logic [CW_W-1:0] rand_cw();
    return {$urandom, $urandom, 4'($urandom)};
  endfunction

  task automatic read_check(int unsigned a);
    @(negedge clk);
    re = 1'b1;
    raddr = AW'(a);
    @(posedge clk);
    #1;
    re = 1'b0;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read %0d got %h exp %h", a, rdata, shadow[a]);
    end
    // Held while re is low.
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL rdata not held at %0d", a);
    end
  endtask

  initial begin
    we = 0; re = 0; upset_en = 0; waddr = 0; raddr = 0; upset_addr = 0;
    upset_mask = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = AW'(a);
      shadow[a] = rand_cw();
      wdata = shadow[a];
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) read_check(a);

    // Upsets: random multi-cell masks.
    for (int i = 0; i < 64; i++) begin
      automatic int unsigned a = $urandom % DEPTH;
      automatic logic [CW_W-1:0] m = rand_cw() & rand_cw();
      @(negedge clk);
      upset_en = 1'b1;
      upset_addr = AW'(a);
      upset_mask = m;
      shadow[a] = shadow[a] ^ m;
      @(negedge clk);
      upset_en = 1'b0;
      read_check(a);
    end

    // Write and upset to the same address in one cycle: the write wins.
    for (int i = 0; i < 8; i++) begin
      automatic int unsigned a = $urandom % DEPTH;
      @(negedge clk);
      we = 1'b1;
      waddr = AW'(a);
      shadow[a] = rand_cw();
      wdata = shadow[a];
      upset_en = 1'b1;
      upset_addr = AW'(a);
      upset_mask = '1;
      @(negedge clk);
      we = 1'b0;
      upset_en = 1'b0;
      read_check(a);
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
