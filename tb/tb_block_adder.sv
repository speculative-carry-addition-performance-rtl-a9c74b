// Testbench for block_adder: a 4-bit speculative block, a 4-bit first block
// (no carry-in) and a 3-bit block, each exhaustively. The reference is the
// integer sum a + b + cin; both the sum bits and the carry-out are checked.
module tb_block_adder;
  logic [3:0] a4, b4, s4, s4f;
  logic [2:0] a3, b3, s3;
  logic       cin, co4, co4f, co3;
  int checks = 0, failures = 0;

  block_adder #(.W(4), .FIRST(1'b0)) dut4  (.a(a4), .b(b4), .cin(cin), .sum(s4),  .cout(co4));
  block_adder #(.W(4), .FIRST(1'b1)) dut4f (.a(a4), .b(b4), .cin(cin), .sum(s4f), .cout(co4f));
  block_adder #(.W(3), .FIRST(1'b0)) dut3  (.a(a3), .b(b3), .cin(cin), .sum(s3),  .cout(co3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: a=%h b=%h cin=%b got %h exp %h", what, a4, b4, cin, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      int r4, r4f, r3;
      {cin, a4, b4} = 9'(v);
      a3 = a4[2:0];
      b3 = b4[2:0];
      #1;
      r4  = int'(a4) + int'(b4) + int'(cin);
      r4f = int'(a4) + int'(b4);
      r3  = int'(a3) + int'(b3) + int'(cin);
      check("W4",  {co4, s4},   r4);
      check("W4F", {co4f, s4f}, r4f);
      check("W3",  {co3, s3},   r3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
