// tb_dmc_top: end-to-end test of the DMC-protected memory at its default size.
//
// Words are written through the encoder, stored cells are flipped through the
// memory's upset port, and the words are read back through the decoder. The
// testbench keeps a shadow copy of every stored 68-bit codeword, computes the
// expected read result with the behavioural model of dmc_ref_pkg, and also
// requires the original word back for every upset class the code corrects:
//   clean       no upset since the write
//   single      one flipped data bit
//   in_symbol   2 to 4 flipped bits inside one 4-bit symbol
//   adjacent    flipped bits in two horizontally adjacent symbols (MCU)
//   check_bits  flips only in the horizontal or only in the vertical check bits
//               (data must be untouched)
//   random      random flips anywhere (model result only)
//   write_wins  an upset in the same cycle as a write to that address
// Reads are issued both one at a time and back to back (one per cycle); every
// result must arrive exactly two cycles after its request. Each class must occur
// at least once. A watchdog ends the run after a fixed number of clock cycles.
module tb_dmc_top;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  localparam int unsigned DEPTH = 16;  // default of dmc_top
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum int {CLEAN, SINGLE, IN_SYMBOL, ADJACENT, CHECK_BITS, RANDOM, WRITE_WINS,
                    N_CLASS} upset_class_e;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic            wr_en, rd_en, upset_en;
  logic [AW-1:0]   wr_addr, rd_addr, upset_addr;
  data_t           wr_data, rd_data;
  logic            rd_valid;
  errloc_t         rd_err_loc;
  logic [CW_W-1:0] upset_mask;

  dmc_top dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_valid(rd_valid), .rd_data(rd_data),
    .rd_err_loc(rd_err_loc), .upset_en(upset_en), .upset_addr(upset_addr),
    .upset_mask(upset_mask));

  // Shadow state per address.
  logic [CW_W-1:0] shadow_cw   [DEPTH];
  data_t           shadow_orig [DEPTH];
  upset_class_e    shadow_cls  [DEPTH];

  typedef struct {
    int unsigned  addr;
    longint       cycle;
    data_t        exp_data;
    errloc_t      exp_loc;
    data_t        orig;
    upset_class_e cls;
  } pending_t;

  pending_t pending[$];
  longint   cycle = 0;
  int       checks = 0, failures = 0;
  int       class_count [N_CLASS];
  int       corrected_reads = 0, back_to_back = 0;
  logic     last_rd_en = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [CW_W-1:0] encode(data_t d);
    return {d, ref_hcb(d), ref_vcb(d)};
  endfunction

  // Request tracking: sample requests at the rising edge.
  always @(posedge clk) begin
    if (rst_n && rd_en) begin
      automatic pending_t p;
      automatic int unsigned a = int'(rd_addr);
      automatic logic [CW_W-1:0] cw = shadow_cw[a];
      p.addr = a;
      p.cycle = cycle;
      p.exp_data = ref_decode(cw[67:36], cw[35:16], cw[15:0], p.exp_loc);
      p.orig = shadow_orig[a];
      p.cls = shadow_cls[a];
      pending.push_back(p);
      if (last_rd_en) back_to_back++;
    end
    last_rd_en <= rd_en;
  end

  // Result checking.
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL rd_valid with no request");
      end else begin
        automatic pending_t p = pending.pop_front();
        checks++;
        if (cycle - p.cycle != 2) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 2", cycle - p.cycle);
        end
        checks++;
        if (rd_data !== p.exp_data || rd_err_loc !== p.exp_loc) begin
          failures++;
          $display("FAIL addr %0d class %s data %h exp %h loc %b exp %b", p.addr, p.cls.name(),
                   rd_data, p.exp_data, rd_err_loc, p.exp_loc);
        end
        if (p.cls != RANDOM) begin
          checks++;
          if (rd_data !== p.orig) begin
            failures++;
            $display("FAIL addr %0d class %s not restored: %h exp %h", p.addr, p.cls.name(),
                     rd_data, p.orig);
          end
        end
        if (rd_err_loc != 0) corrected_reads++;
        class_count[p.cls]++;
      end
    end
  end

  task automatic do_write(int unsigned a, data_t d);
    @(negedge clk);
    wr_en = 1'b1;
    wr_addr = AW'(a);
    wr_data = d;
    shadow_cw[a] = encode(d);
    shadow_orig[a] = d;
    shadow_cls[a] = CLEAN;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic do_upset(int unsigned a, logic [CW_W-1:0] m, upset_class_e cls);
    @(negedge clk);
    upset_en = 1'b1;
    upset_addr = AW'(a);
    upset_mask = m;
    shadow_cw[a] = shadow_cw[a] ^ m;
    shadow_cls[a] = cls;
    @(negedge clk);
    upset_en = 1'b0;
  endtask

  // Upset mask of the given class; data bit i is mask bit 36 + i.
  function automatic logic [CW_W-1:0] make_mask(upset_class_e cls);
    logic [CW_W-1:0] m = '0;
    int unsigned s, p1, p2;
    case (cls)
      SINGLE: m[36 + ($urandom % 32)] = 1'b1;
      IN_SYMBOL: begin
        s = $urandom % 8;
        do p1 = $urandom % 16; while ($countones(p1) < 2);
        m[36 + 4 * s +: 4] = 4'(p1);
      end
      ADJACENT: begin
        do s = $urandom % 8; while (s % 4 == 3);
        p1 = ($urandom % 15) + 1;
        p2 = ($urandom % 15) + 1;
        m[36 + 4 * s +: 4] = 4'(p1);
        m[36 + 4 * (s + 1) +: 4] = 4'(p2);
      end
      // Only one kind of check bit: flips in both kinds at once look like a
      // data error to the decoder.
      CHECK_BITS: if ($urandom % 2 == 1) m[35:16] = 20'($urandom | 1);
                  else              m[15:0]  = 16'($urandom | 1);
      RANDOM: m = {$urandom, $urandom, 4'($urandom)} & {$urandom, $urandom, 4'($urandom)};
      default: m = '0;
    endcase
    return m;
  endfunction

  task automatic wait_drain();
    repeat (4) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    wr_en = 0; rd_en = 0; upset_en = 0; wr_addr = 0; rd_addr = 0; upset_addr = 0;
    wr_data = '0; upset_mask = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (rd_valid !== 1'b0 || rd_data !== '0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;

    // The worked example word, read back clean.
    do_write(0, 32'hA864_79BE);
    for (int a = 1; a < DEPTH; a++) do_write(a, $urandom);

    for (int round = 0; round < 40; round++) begin
      // Single reads, one class each.
      for (int k = 0; k < 6; k++) begin
        automatic upset_class_e cls = upset_class_e'(k);
        automatic int unsigned a = $urandom % DEPTH;
        do_write(a, $urandom);
        if (cls != CLEAN) do_upset(a, make_mask(cls), cls);
        @(negedge clk);
        rd_en = 1'b1;
        rd_addr = AW'(a);
        @(negedge clk);
        rd_en = 1'b0;
        wait_drain();
      end

      // Write and upset in the same cycle: the write must win.
      begin
        automatic int unsigned a = $urandom % DEPTH;
        automatic data_t d = $urandom;
        @(negedge clk);
        wr_en = 1'b1;
        wr_addr = AW'(a);
        wr_data = d;
        upset_en = 1'b1;
        upset_addr = AW'(a);
        upset_mask = '1;
        shadow_cw[a] = encode(d);
        shadow_orig[a] = d;
        shadow_cls[a] = WRITE_WINS;
        @(negedge clk);
        wr_en = 1'b0;
        upset_en = 1'b0;
        rd_en = 1'b1;
        rd_addr = AW'(a);
        @(negedge clk);
        rd_en = 1'b0;
        wait_drain();
      end

      // Upsets on several words, then the whole memory read back to back.
      for (int a = 0; a < DEPTH; a++) begin
        automatic upset_class_e cls = upset_class_e'($urandom % 6);
        do_write(a, $urandom);
        if (cls != CLEAN) do_upset(a, make_mask(cls), cls);
      end
      @(negedge clk);
      for (int a = 0; a < DEPTH; a++) begin
        rd_en = 1'b1;
        rd_addr = AW'(a);
        @(negedge clk);
      end
      rd_en = 1'b0;
      wait_drain();
    end

    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d reads never returned", pending.size());
    end
    for (int c = 0; c < N_CLASS; c++) begin
      $display("class %-10s reads %0d", upset_class_e'(c), class_count[c]);
      checks++;
      if (class_count[c] == 0) begin
        failures++;
        $display("FAIL class %s never exercised", upset_class_e'(c));
      end
    end
    $display("reads with a correction %0d, back-to-back reads %0d", corrected_reads, back_to_back);
    checks++;
    if (corrected_reads == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL correction or back-to-back reads never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
