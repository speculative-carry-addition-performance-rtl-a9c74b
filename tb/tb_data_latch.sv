// Testbench for data_latch. A scripted sequence of error signals is applied
// (none, a single error, back-to-back errors, random). A model of the
// described behaviour predicts VALID in each cycle: 1 without an error,
// 0 in the first cycle of an error and 1 in its recovery cycle. The test
// checks VALID and that the operand registers load exactly in the cycles
// where VALID is 1 and hold otherwise.
module tb_data_latch;
  localparam int N = 16;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  a_in, b_in, a_q, b_q;
  logic          er, valid;
  int checks = 0, failures = 0, stalls = 0;

  data_latch dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .er(er),
                  .a_q(a_q), .b_q(b_q), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic          in_recovery;
    logic          exp_valid;
    logic [N-1:0]  exp_a, exp_b;
    er = 1'b0; a_in = '0; b_in = '0;
    #12;
    checks++;
    if (a_q !== '0 || b_q !== '0 || valid !== 1'b1) begin failures++; $display("reset state wrong"); end
    rst_n = 1'b1;
    in_recovery = 1'b0;
    exp_a = '0; exp_b = '0;
    for (int t = 0; t < 3000; t++) begin
      // The error only stays up while the held operands are the same;
      // a recovery cycle always still sees it.
      if (in_recovery) er = 1'b1;
      else if (t < 20) er = (t == 5 || t == 9 || t == 11);
      else er = ($urandom_range(0, 2) == 0);
      a_in = 16'($urandom); b_in = 16'($urandom);
      #1;
      exp_valid = !(er && !in_recovery);
      checks++;
      if (valid !== exp_valid) begin failures++; $display("t=%0d er=%b rec=%b valid=%b", t, er, in_recovery, valid); end
      if (!exp_valid) stalls++;
      if (exp_valid) begin exp_a = a_in; exp_b = b_in; end
      in_recovery = er && !in_recovery;
      @(posedge clk); #1;
      checks++;
      if (a_q !== exp_a || b_q !== exp_b) begin failures++; $display("t=%0d registers wrong", t); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
