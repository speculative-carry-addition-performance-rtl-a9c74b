// Block adder of the carry speculative adder.
//
// A W-bit adder that computes its carries for both possible carry-ins at
// once and picks one when the carry-in arrives. Two ripple carry chains run
// side by side: one as if the carry-in were 1, the other as if it were 0.
// Each chain starts with a modified one-gate carry generator (OR for the
// chain tied to 1, AND for the chain tied to 0) followed by full 1-bit carry
// generators. A 2:1 multiplexer per bit, selected by the carry-in (the
// predicted carry-out of the block below), chooses the carry of each
// position, and the sum generator combines these carries with the operand
// bits. The multiplexer output of the top bit is the block's carry-out
// C_out^i, exact for the carry-in it was given.
// The lowest block (FIRST = 1) has no carry-in: it keeps only the chain tied
// to 0 and no multiplexers.
// Structure per the block-adder figures; the full carry generators above the
// first stage are this design's reading. Combinational.
module block_adder #(
  parameter int unsigned W     = 4,
  parameter bit          FIRST = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,    // predicted carry-in; unused when FIRST
  output logic [W-1:0] sum,
  output logic         cout    // carry-out of the block for this carry-in
);

  logic [W-1:0] c0;     // carry out of each bit, chain tied to 0
  logic [W-1:0] csel;   // selected carry out of each bit
  logic [W-1:0] cin_bit;
  logic         cin_eff;

  mod_carry_gen #(.CIN(1'b0)) u_mcg0 (.a(a[0]), .b(b[0]), .cout(c0[0]));
  for (genvar j = 1; j < W; j++) begin : g_chain0
    carry_gen u_cg0 (.a(a[j]), .b(b[j]), .cin(c0[j-1]), .cout(c0[j]));
  end

  if (FIRST) begin : g_first
    assign cin_eff = 1'b0;
    assign csel    = c0;
  end else begin : g_spec
    logic [W-1:0] c1;   // carry out of each bit, chain tied to 1
    mod_carry_gen #(.CIN(1'b1)) u_mcg1 (.a(a[0]), .b(b[0]), .cout(c1[0]));
    for (genvar j = 1; j < W; j++) begin : g_chain1
      carry_gen u_cg1 (.a(a[j]), .b(b[j]), .cin(c1[j-1]), .cout(c1[j]));
    end
    assign cin_eff = cin;
    always_comb csel = cin ? c1 : c0;
  end

  if (W > 1) begin : g_wide
    assign cin_bit = {csel[W-2:0], cin_eff};
  end else begin : g_one
    assign cin_bit = cin_eff;
  end

  sum_gen #(.W(W)) u_sum (.a(a), .b(b), .c(cin_bit), .sum(sum));

  assign cout = csel[W-1];

endmodule
