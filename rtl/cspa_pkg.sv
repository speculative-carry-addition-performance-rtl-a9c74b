// Shared constants and helper functions of the variable-latency carry
// speculative adder (VLCSPA-M).
//
// The N-bit adder is cut into M = ceil(N/K) block adders. Every block is K
// bits wide except the most significant one, which takes the N-(M-1)*K bits
// that remain. The 16-bit default width is the configuration whose results
// are reported for this adder; the 4-bit block (four blocks, three carry
// predictors) is this design's choice, matching the three predictors the
// architecture is described with.
package cspa_pkg;

  localparam int unsigned DEFAULT_N = 16;  // adder width
  localparam int unsigned DEFAULT_K = 4;   // block adder width

  // Number of block adders for an N-bit adder with K-bit blocks.
  function automatic int unsigned num_blocks(input int unsigned n, input int unsigned k);
    return (n + k - 1) / k;
  endfunction

  // Width of block i (the last block takes the remainder).
  function automatic int unsigned block_width(input int unsigned n, input int unsigned k,
                                              input int unsigned i);
    int unsigned m;
    m = (n + k - 1) / k;
    return (i == m - 1) ? n - (m - 1) * k : k;
  endfunction

endpackage
