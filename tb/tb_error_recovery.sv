// Testbench for error_recovery (16 bits, 4-bit blocks). Random speculative
// sums, top carries and Err_block patterns are applied; one clock edge later
// SUMREC and the carry-out must equal {cout*, SUM*} plus each set Err_block
// bit weighted by 2^((i+1)*4), computed in integer arithmetic. Directed
// cases make an increment overflow into the block above. Reset values are
// checked too.
module tb_error_recovery;
  localparam int N = 16, K = 4, M = 4;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  sum_spec, sum_rec;
  logic          cout_spec, cout_rec;
  logic [M-2:0]  err_block;
  int checks = 0, failures = 0, overflows = 0;

  error_recovery dut (.clk(clk), .rst_n(rst_n), .sum_spec(sum_spec), .cout_spec(cout_spec),
                      .err_block(err_block), .sum_rec(sum_rec), .cout_rec(cout_rec));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] s, input logic c, input logic [M-2:0] e);
    longint unsigned exp_v;
    sum_spec = s; cout_spec = c; err_block = e;
    exp_v = 64'(s) + (64'(c) << N);
    for (int i = 0; i < M - 1; i++) exp_v += 64'(e[i]) << ((i + 1) * K);
    for (int i = 0; i < M - 1; i++)
      if (e[i] && s[(i + 1) * K +: K] == '1) overflows++;
    @(posedge clk); #1;
    checks++;
    if ({cout_rec, sum_rec} !== 17'(exp_v)) begin
      failures++;
      $display("s=%h c=%b e=%b got %b_%h exp %h", s, c, e, cout_rec, sum_rec, 17'(exp_v));
    end
  endtask

  initial begin
    sum_spec = 16'hABCD; cout_spec = 1'b1; err_block = '1;
    #12;
    checks++;
    if (sum_rec !== '0 || cout_rec !== 1'b0) begin failures++; $display("reset values wrong"); end
    rst_n = 1'b1;
    apply(16'h0F00, 1'b0, 3'b010);   // block 2 all ones: carry into block 3
    apply(16'hFFF0, 1'b0, 3'b001);   // ripples to the carry-out
    apply(16'h1234, 1'b0, 3'b000);
    apply(16'hF0F0, 1'b0, 3'b101);
    for (int t = 0; t < 5000; t++) begin
      logic [N-1:0] s = 16'($urandom);
      if ($urandom_range(0, 3) == 0) s[K +: K] = '1;
      apply(s, 1'($urandom), 3'($urandom));
    end
    checks++;
    if (overflows == 0) begin failures++; $display("no block overflow exercised"); end
    $display("increments that overflowed a block: %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
