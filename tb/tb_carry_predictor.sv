// Testbench for carry_predictor: a 4-bit block using all its bits and a
// 6-bit block using only its upper 3 bits, exhaustively. The expected
// prediction is the carry out of the used upper bits added with carry-in 0.
module tb_carry_predictor;
  logic [3:0] a4, b4;
  logic [5:0] a6, b6;
  logic       p4, p6;
  int checks = 0, failures = 0;

  carry_predictor #(.W(4), .X(4)) dut4 (.a(a4), .b(b4), .cpred(p4));
  carry_predictor #(.W(6), .X(3)) dut6 (.a(a6), .b(b6), .cpred(p6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = 12'(v);
      a4 = a6[3:0];
      b4 = b6[3:0];
      #1;
      checks++;
      if (p4 !== ((int'(a4) + int'(b4)) >= 16)) begin failures++; $display("W4 a=%h b=%h got %b", a4, b4, p4); end
      checks++;
      if (p6 !== ((int'(a6[5:3]) + int'(b6[5:3])) >= 8)) begin failures++; $display("W6 a=%h b=%h got %b", a6, b6, p6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
