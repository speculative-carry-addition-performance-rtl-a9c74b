// Carry predictor.
//
// Predicts the carry-out C_out^i* of block adder i from that block's own
// operand bits, ignoring everything below it: the carry out of its upper X
// bits is computed as if the carry into those bits were 0. The chain starts
// with the AND form of the modified carry generator and continues with full
// carry generators. The prediction is never 1 when the exact carry-out is 0,
// so a wrong prediction always means a carry was lost. With X = W (the
// default) the prediction is the block's generate signal.
// That the predictor looks only at bits of its own block, near its MSB,
// follows the architecture; the default X = W is this design's choice.
// Combinational.
module carry_predictor #(
  parameter int unsigned W = 4,   // block width
  parameter int unsigned X = 4    // number of upper bits used, 1..W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         cpred
);

  localparam int unsigned XE = (X > W) ? W : ((X == 0) ? 1 : X);
  localparam int unsigned LO = W - XE;

  logic [XE-1:0] c;   // c[j]: carry out of bit LO+j

  mod_carry_gen #(.CIN(1'b0)) u_first (.a(a[LO]), .b(b[LO]), .cout(c[0]));

  for (genvar j = 1; j < XE; j++) begin : g_chain
    carry_gen u_cg (.a(a[LO+j]), .b(b[LO+j]), .cin(c[j-1]), .cout(c[j]));
  end

  assign cpred = c[XE-1];

endmodule
