// dmc_codeword_mem: storage array for DMC codewords, with an upset port.
//
// Each entry holds one 68-bit codeword (32 data bits, 20 horizontal and 16
// vertical check bits). Writes and reads are synchronous: a write stores wdata at
// waddr on the rising edge; a read with re = 1 presents the entry at raddr on
// rdata after the next rising edge (rdata holds its value when re = 0).
// The upset port models a radiation strike: with upset_en = 1 the entry at
// upset_addr is XORed with upset_mask on the rising edge, flipping the marked
// cells, which may span several adjacent cells (a multiple cell upset). A write
// to the same address in the same cycle takes precedence over the upset. A read
// of an address being written or upset returns the old contents.
//
// The paper places the encoder output in a memory and reads it back into the
// decoder but gives no memory organisation; DEPTH, the synchronous read and the
// upset port are this design's own choices.
module dmc_codeword_mem
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  codeword_t         wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output codeword_t         rdata,
  input  logic              upset_en,
  input  logic [ADDR_W-1:0] upset_addr,
  input  logic [CW_W-1:0]   upset_mask
);

  codeword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (upset_en && !(we && waddr == upset_addr)) begin
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    end
    if (re) begin
      rdata <= mem[raddr];
    end
  end

endmodule
