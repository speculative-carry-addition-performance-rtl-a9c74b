// Testbench for carry_gen: all eight input combinations against the carry
// of a + b + cin computed arithmetically.
module tb_carry_gen;
  logic a, b, cin, cout;
  int checks = 0, failures = 0;

  carry_gen dut (.a(a), .b(b), .cin(cin), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (cout !== ((int'(a) + int'(b) + int'(cin)) >= 2)) begin
        failures++; $display("a=%b b=%b cin=%b got %b", a, b, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
