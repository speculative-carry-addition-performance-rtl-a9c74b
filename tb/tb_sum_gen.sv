// Testbench for sum_gen (W = 4): every combination of operand and carry
// bits; each sum bit is checked as the low bit of a[j] + b[j] + c[j].
module tb_sum_gen;
  localparam int W = 4;
  logic [W-1:0] a, b, c, sum;
  int checks = 0, failures = 0;

  sum_gen #(.W(W)) dut (.a(a), .b(b), .c(c), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3 * W)); v++) begin
      logic [W-1:0] exp_s;
      {a, b, c} = (3 * W)'(v);
      #1;
      for (int j = 0; j < W; j++) exp_s[j] = 1'((int'(a[j]) + int'(b[j]) + int'(c[j])) % 2);
      checks++;
      if (sum !== exp_s) begin failures++; $display("a=%h b=%h c=%h sum=%h exp=%h", a, b, c, sum, exp_s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
