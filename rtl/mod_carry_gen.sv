// Modified 1-bit carry generator.
//
// In a ripple chain whose carry-in is a constant, the first carry generator
// collapses to one gate: with carry-in 0 the carry-out is A AND B, with
// carry-in 1 it is A OR B. CIN selects which constant the chain is tied to.
// Purely combinational, one gate delay. The two gate choices follow the
// adder's description; using them only in the first stage of a chain, with
// full carry generators above, is this design's reading, so that the block
// sums stay exact whenever the predicted carry is right.
module mod_carry_gen #(
  parameter bit CIN = 1'b0   // constant carry-in this generator replaces
) (
  input  logic a,
  input  logic b,
  output logic cout
);

  always_comb begin
    if (CIN) cout = a | b;
    else     cout = a & b;
  end

endmodule
