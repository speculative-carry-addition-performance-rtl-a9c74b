// Sum generator of a block adder.
//
// Forms the W sum bits of a block from the operand bits and the carries
// selected by the block's multiplexers: sum[j] = a[j] ^ b[j] ^ c[j], where
// c[0] is the carry into the block (the predicted carry-out of the block
// below) and c[j] is the carry out of bit j-1. Combinational. The sum
// generator kept apart from the carry logic follows the block-adder
// structure; the plain three-input XOR per bit is this design's choice.
module sum_gen #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,     // carry into each bit position
  output logic [W-1:0] sum
);

  always_comb sum = a ^ b ^ c;

endmodule
