// Error recovery circuit.
//
// A wrong prediction can only lose a carry: when Err_block[i] = 1, block i
// really produced a carry-out of 1 but block i+1 was summed with a carry-in
// of 0. Block i+1 of the speculative sum SUM* is therefore incremented by
// Err_block[i]. Summing the whole adder block by block shows that
//   A + B = {cout*, SUM*} + sum over i of Err_block[i] * 2^((i+1)K),
// so these increments give the exact result. An increment that overflows a
// block (its SUM* bits were all ones) is passed on to the block above; this
// carry between the per-block incrementers is this design's addition, and
// it covers a lost carry that travels through several blocks, which the
// comparison of predicted and real carry-outs does not flag on its own.
// The corrected sum SUMREC and carry-out are registered on every clock
// edge, so they are ready in the cycle after the error was detected (the
// second cycle of a recovered addition). Asynchronous active-low reset
// clears both registers.
module error_recovery
  import cspa_pkg::*;
#(
  parameter int unsigned N  = DEFAULT_N,
  parameter int unsigned K  = DEFAULT_K,
  localparam int unsigned M = num_blocks(N, K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sum_spec,    // SUM*
  input  logic         cout_spec,   // carry-out of the top block
  input  logic [M-2:0] err_block,
  output logic [N-1:0] sum_rec,     // SUMREC, registered
  output logic         cout_rec     // corrected carry-out, registered
);

  logic [N-1:0] rec_d;
  logic [M-2:0] ovf;   // ovf[i]: increment overflowed out of block i (ovf[0] = 0)

  assign ovf[0] = 1'b0;
  assign rec_d[K-1:0] = sum_spec[K-1:0];   // block 0 is always exact

  for (genvar i = 1; i < M; i++) begin : g_inc
    localparam int unsigned W  = block_width(N, K, i);
    localparam int unsigned LO = i * K;
    logic [W:0] inc;
    always_comb inc = {1'b0, sum_spec[LO +: W]}
                      + {{W{1'b0}}, err_block[i-1]}
                      + {{W{1'b0}}, ovf[i-1]};
    assign rec_d[LO +: W] = inc[W-1:0];
    if (i < M - 1) begin : g_ovf
      assign ovf[i] = inc[W];
    end else begin : g_top
      logic cout_d;
      assign cout_d = cout_spec | inc[W];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) cout_rec <= 1'b0;
        else        cout_rec <= cout_d;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_rec <= '0;
    else        sum_rec <= rec_d;
  end

endmodule
