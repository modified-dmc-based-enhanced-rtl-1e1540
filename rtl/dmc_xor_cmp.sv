// dmc_xor_cmp: W-bit XOR comparator, the unit from which the DMC syndrome is built.
//
// diff = a ^ b: bit i is 1 where the two words differ, so the word pair is equal
// exactly when diff is zero, and diff is the pattern of flipped bits. One XOR gate
// per bit: a 5-bit comparator, used for one horizontal check group, takes 5 XOR
// gates in place of a 5-bit subtractor. Combinational.
module dmc_xor_cmp #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff
);

  assign diff = a ^ b;

endmodule
