// Carry speculative adder with modified carry generators (CSPA-M).
//
// The N-bit addition is split into M = ceil(N/K) block adders that all work
// in parallel. Block i+1 does not wait for the carry out of block i: it
// takes the carry-out predicted by carry predictor i, which looks only at
// block i's own operand bits. There are M-1 predictors; block 0 has no
// carry-in. The outputs are the speculative sum SUM*, the carry-out of every
// block for the carry-in it was given (C_out^i) and the predicted carry-outs
// (C_out^i*), which the error detection compares. c_out[M-1] is the
// carry-out of the whole addition.
// Every block is K bits wide except the top one, which takes what remains.
// The adder has no external carry-in (block 0 is tied to 0, as drawn).
// Combinational; N = 16 follows the reported configuration, K = 4 and
// PRED_BITS = K are this design's choices.
module cspa_m
  import cspa_pkg::*;
#(
  parameter int unsigned N         = DEFAULT_N,
  parameter int unsigned K         = DEFAULT_K,
  parameter int unsigned PRED_BITS = DEFAULT_K,
  localparam int unsigned M        = num_blocks(N, K)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum_spec,   // SUM*
  output logic [M-1:0] c_out,      // C_out^i, carry-out of block i
  output logic [M-2:0] c_pred      // C_out^i*, predicted carry-out of block i
);

  for (genvar i = 0; i < M; i++) begin : g_blk
    localparam int unsigned W  = block_width(N, K, i);
    localparam int unsigned LO = i * K;
    logic cin_i;

    if (i == 0) begin : g_c0
      assign cin_i = 1'b0;
    end else begin : g_ci
      assign cin_i = c_pred[i-1];
    end

    block_adder #(.W(W), .FIRST(i == 0)) u_blk (
      .a   (a[LO +: W]),
      .b   (b[LO +: W]),
      .cin (cin_i),
      .sum (sum_spec[LO +: W]),
      .cout(c_out[i])
    );

    if (i < M - 1) begin : g_pred
      carry_predictor #(.W(W), .X(PRED_BITS)) u_pred (
        .a    (a[LO +: W]),
        .b    (b[LO +: W]),
        .cpred(c_pred[i])
      );
    end
  end

  // A predictor assumes carry-in 0, so it may miss a carry but never
  // predicts one the block does not produce; error recovery relies on it.
  always_comb begin
    a_pred_never_exceeds: assert ((c_pred & ~c_out[M-2:0]) == '0)
      else $error("predicted carry without a real carry-out");
  end

  initial begin
    assert (M >= 2) else $error("cspa_m needs at least two blocks (N > K)");
  end

endmodule
