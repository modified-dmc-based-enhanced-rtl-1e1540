// dmc_top: a DMC-protected memory.
//
// Write path: wr_data goes through dmc_encoder, and the word with its 20
// horizontal and 16 vertical check bits is stored as one 68-bit codeword in
// dmc_codeword_mem. Read path: the codeword read from memory goes through
// dmc_decoder, which locates erroneous symbols with the XOR syndromes and flips
// them back before loading its output register. The upset port of the memory
// lets a test flip any stored cells, as a radiation-induced single or multiple
// cell upset would.
//
// Interface: wr_en/wr_addr/wr_data write a word; rd_en/rd_addr request a read;
// rd_valid marks the cycle in which rd_data (corrected word) and rd_err_loc (the
// symbols that were corrected) belong to that read. upset_en/upset_addr/upset_mask
// flip stored bits; the mask is laid out as the codeword: {data, hcb, vcb}.
// Timing: a read requested in cycle t appears in cycle t+2 (one cycle in the
// synchronous memory, one in the decoder's output register); one read and one
// write may be issued every cycle.
//
// The encoder-memory-decoder chain follows the paper; DEPTH, the port
// protocol and the upset port are this design's own choices.
module dmc_top
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  data_t             wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output data_t             rd_data,
  output errloc_t           rd_err_loc,
  input  logic              upset_en,
  input  logic [ADDR_W-1:0] upset_addr,
  input  logic [CW_W-1:0]   upset_mask
);

  codeword_t wr_cw, rd_cw;
  logic      rd_p1;

  dmc_encoder u_enc (
    .data_in (wr_data),
    .data_out(wr_cw.data),
    .hcb     (wr_cw.hcb),
    .vcb     (wr_cw.vcb)
  );

  dmc_codeword_mem #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_mem (
    .clk       (clk),
    .we        (wr_en),
    .waddr     (wr_addr),
    .wdata     (wr_cw),
    .re        (rd_en),
    .raddr     (rd_addr),
    .rdata     (rd_cw),
    .upset_en  (upset_en),
    .upset_addr(upset_addr),
    .upset_mask(upset_mask)
  );

  dmc_decoder u_dec (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_in (rd_cw.data),
    .hcb_in  (rd_cw.hcb),
    .vcb_in  (rd_cw.vcb),
    .data_out(rd_data),
    .err_loc (rd_err_loc)
  );

  // Read-valid pipeline: memory stage, then decoder register stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p1    <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      rd_p1    <= rd_en;
      rd_valid <= rd_p1;
    end
  end

  // Every result belongs to a read requested exactly two cycles earlier.
  a_rd_latency: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> $past(rd_en, 2));

endmodule
