// Error detection circuit.
//
// For every block i that feeds a speculative carry upwards (0 <= i <= M-2)
// the carry-out the block really produced, C_out^i, is compared with the
// predicted one, C_out^i*, by an exclusive OR. The result is Err_block[i],
// and Err_block[i] = 1 means block i+1 was summed with the wrong carry-in.
// The OR of all Err_block bits is the error signal ER. Combinational,
// as described for this adder.
module error_detection #(
  parameter int unsigned NB = 3   // number of predicted carries, M-1
) (
  input  logic [NB-1:0] c_out,
  input  logic [NB-1:0] c_pred,
  output logic [NB-1:0] err_block,
  output logic          er
);

  always_comb begin
    err_block = c_out ^ c_pred;
    er        = |err_block;
  end

endmodule
