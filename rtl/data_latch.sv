// Data latching circuit: input registers and VALID generation.
//
// The operand registers A and B load only when VALID = 1. VALID is the
// exclusive OR of the error signal ER and its counterpart, a register that
// is 1 while no recovery is pending and 0 during the recovery cycle:
//   * no error:            ER = 0, counterpart = 1 -> VALID = 1, new data
//   * error, first cycle:  ER = 1, counterpart = 1 -> VALID = 0, inputs held
//   * recovery cycle:      ER = 1, counterpart = 0 -> VALID = 1, new data
// so a speculation error costs exactly one extra cycle and the latch never
// waits forever. The XOR with a counterpart of ER is the scheme described
// for this adder; what the counterpart holds is this design's reading. The
// clock of the input registers, gated by VALID in the schematic, is written
// here as a load enable. VALID also tells the environment that the current
// sum is final and that a and b are taken at the next rising edge.
// Asynchronous active-low reset clears the registers (VALID = 1 after reset).
module data_latch
  import cspa_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  input  logic         er,
  output logic [N-1:0] a_q,
  output logic [N-1:0] b_q,
  output logic         valid
);

  logic er_cp;   // counterpart of ER: 0 only in the recovery cycle

  assign valid = er ^ er_cp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) er_cp <= 1'b1;
    else        er_cp <= ~(er & er_cp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (valid) begin
      a_q <= a_in;
      b_q <= b_in;
    end
  end

  // While recovering, the held operands must still show the error.
  a_recovery_holds_error: assert property (@(posedge clk) disable iff (!rst_n)
                                           !er_cp |-> er);

endmodule
