// Testbench for mod_carry_gen: both variants (carry-in tied to 0 and to 1)
// against the carry of a full adder with that constant carry-in, over all
// four operand combinations.
module tb_mod_carry_gen;
  logic a, b, c_and, c_or;
  int checks = 0, failures = 0;

  mod_carry_gen #(.CIN(1'b0)) dut0 (.a(a), .b(b), .cout(c_and));
  mod_carry_gen #(.CIN(1'b1)) dut1 (.a(a), .b(b), .cout(c_or));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int s0, s1;
      {a, b} = 2'(v);
      #1;
      s0 = int'(a) + int'(b);
      s1 = int'(a) + int'(b) + 1;
      checks++; if (c_and !== (s0 >= 2)) begin failures++; $display("CIN=0 a=%b b=%b got %b", a, b, c_and); end
      checks++; if (c_or  !== (s1 >= 2)) begin failures++; $display("CIN=1 a=%b b=%b got %b", a, b, c_or); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
