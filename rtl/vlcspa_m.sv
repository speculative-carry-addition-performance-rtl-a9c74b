// Variable-latency carry speculative adder with modified carry generators
// (VLCSPA-M), top level.
//
// An N-bit adder that usually finishes in one clock cycle and takes two when
// its carry speculation fails. The operands are held in input registers
// (data_latch). The speculative adder (cspa_m) splits the addition into
// block adders that take predicted carries instead of waiting for real
// ones, so its delay is that of one block. The error detection compares
// each block's real and predicted carry-out; any mismatch raises ER. The
// error recovery corrects the speculative sum and registers the result.
// A multiplexer selected by ER puts SUM* (ER = 0) or the recovered SUMREC
// (ER = 1) on the output.
//
// Timing: a and b are taken at a rising edge where valid = 1. In the next
// cycle, if er = 0, sum/cout hold the result and valid = 1, so the next
// operands are taken at the following edge (one cycle per addition). If
// er = 1, valid = 0 in that cycle and the operands are held; the recovered
// result is on sum/cout in the cycle after, with valid = 1 (two cycles).
// The consumer samples sum/cout in the cycles where valid = 1. After reset
// the registers hold 0 and valid = 1.
// The structure follows the variable-latency adder described for CSPA-M;
// the cout output, the block width K = 4 and PRED_BITS = K are this
// design's choices.
module vlcspa_m
  import cspa_pkg::*;
#(
  parameter int unsigned N         = DEFAULT_N,
  parameter int unsigned K         = DEFAULT_K,
  parameter int unsigned PRED_BITS = DEFAULT_K,
  localparam int unsigned M        = num_blocks(N, K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         er,
  output logic [M-2:0] err_block,
  output logic         valid
);

  logic [N-1:0] a_q, b_q;
  logic [N-1:0] sum_spec, sum_rec;
  logic [M-1:0] c_out;
  logic [M-2:0] c_pred;
  logic         cout_spec, cout_rec;

  data_latch #(.N(N)) u_latch (
    .clk(clk), .rst_n(rst_n), .a_in(a), .b_in(b), .er(er),
    .a_q(a_q), .b_q(b_q), .valid(valid)
  );

  cspa_m #(.N(N), .K(K), .PRED_BITS(PRED_BITS)) u_cspa (
    .a(a_q), .b(b_q), .sum_spec(sum_spec), .c_out(c_out), .c_pred(c_pred)
  );
  assign cout_spec = c_out[M-1];

  error_detection #(.NB(M-1)) u_det (
    .c_out(c_out[M-2:0]), .c_pred(c_pred), .err_block(err_block), .er(er)
  );

  error_recovery #(.N(N), .K(K)) u_rec (
    .clk(clk), .rst_n(rst_n), .sum_spec(sum_spec), .cout_spec(cout_spec),
    .err_block(err_block), .sum_rec(sum_rec), .cout_rec(cout_rec)
  );

  // Output multiplexer, selected by the error signal.
  always_comb begin
    if (er) begin
      sum  = sum_rec;
      cout = cout_rec;
    end else begin
      sum  = sum_spec;
      cout = cout_spec;
    end
  end

endmodule
