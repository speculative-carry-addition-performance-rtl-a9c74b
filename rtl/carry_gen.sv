// Internal 1-bit carry generator.
//
// One stage of a ripple carry chain: carry-out = majority(A, B, carry-in),
// i.e. generate (A AND B) or propagate (A OR B) with a carry coming in.
// The carry and sum logic are kept apart, as in the modified full adder of
// the block adders: this module produces only the carry. Combinational.
module carry_gen (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic cout
);

  always_comb cout = (a & b) | (cin & (a | b));

endmodule
