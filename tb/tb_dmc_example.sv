// tb_dmc_example: the paper's worked example, run through the whole protected
// memory at its default size.
//   1. Encode: the word 0xA86479BE is written; the stored codeword must carry
//      hcb = 10000_01100_10010_10111 and vcb = 1101_0001_1101_1010.
//   2. Decode without error: reading it back returns the word, no symbol marked.
//   3. Decode with error: for every symbol and every nonzero 4-bit pattern, the
//      stored word is upset, read back corrected with exactly that symbol marked,
//      and rewritten.
// Reads must return two cycles after the request. A watchdog ends the run after
// a fixed number of clock cycles.
module tb_dmc_example;
  import dmc_pkg::*;

  localparam data_t EX_DATA = 32'hA864_79BE;
  localparam hcb_t  EX_HCB  = 20'b10000_01100_10010_10111;
  localparam vcb_t  EX_VCB  = 16'b1101_0001_1101_1010;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            rst_n, wr_en, rd_en, upset_en, rd_valid;
  logic [3:0]      wr_addr, rd_addr, upset_addr;
  data_t           wr_data, rd_data;
  errloc_t         rd_err_loc;
  logic [CW_W-1:0] upset_mask;
  int              checks = 0, failures = 0;

  dmc_top dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_valid(rd_valid), .rd_data(rd_data),
    .rd_err_loc(rd_err_loc), .upset_en(upset_en), .upset_addr(upset_addr),
    .upset_mask(upset_mask));

  task automatic write_word(data_t d);
    @(negedge clk);
    wr_en = 1'b1;
    wr_addr = 4'd5;
    wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read_expect(data_t exp_d, errloc_t exp_l);
    @(negedge clk);
    rd_en = 1'b1;
    rd_addr = 4'd5;
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (rd_valid !== 1'b0) begin
      failures++;
      $display("FAIL result one cycle early");
    end
    @(negedge clk);
    checks++;
    if (rd_valid !== 1'b1 || rd_data !== exp_d || rd_err_loc !== exp_l) begin
      failures++;
      $display("FAIL valid=%b data=%h exp %h loc=%b exp %b", rd_valid, rd_data, exp_d,
               rd_err_loc, exp_l);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    wr_en = 0; rd_en = 0; upset_en = 0; wr_addr = 0; rd_addr = 0; upset_addr = 0;
    wr_data = '0; upset_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. Encode.
    write_word(EX_DATA);
    checks++;
    if (dut.u_mem.mem[5] !== {EX_DATA, EX_HCB, EX_VCB}) begin
      failures++;
      $display("FAIL stored codeword %h", dut.u_mem.mem[5]);
    end

    // 2. Decode without error.
    read_expect(EX_DATA, '0);

    // 3. Decode with error detection and correction.
    for (int s = 0; s < 8; s++)
      for (int p = 1; p < 16; p++) begin
        @(negedge clk);
        upset_en = 1'b1;
        upset_addr = 4'd5;
        upset_mask = '0;
        upset_mask[36 + 4 * s +: 4] = 4'(p);
        @(negedge clk);
        upset_en = 1'b0;
        read_expect(EX_DATA, errloc_t'(1 << s));
        write_word(EX_DATA);
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
