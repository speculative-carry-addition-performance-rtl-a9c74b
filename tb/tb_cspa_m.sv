// Testbench for cspa_m: the default 16-bit adder (four 4-bit blocks) and a
// 10-bit adder whose top block is 2 bits wide. A reference model in plain
// integer arithmetic computes, block by block, the predicted carry-out
// (carry of the block's own bits with carry-in 0), the carry-out the block
// produces with the predicted carry-in, and the speculative partial sums.
// The test also checks the identity the recovery relies on:
// a + b = {c_out[M-1], SUM*} + sum of mispredictions at their block offsets.
// Random operands plus directed carry-chain patterns.
module tb_cspa_m;
  localparam int N1 = 16, K1 = 4, M1 = 4;
  localparam int N2 = 10, K2 = 4, M2 = 3;

  logic [N1-1:0] a1, b1, s1;
  logic [M1-1:0] co1;
  logic [M1-2:0] cp1;
  logic [N2-1:0] a2, b2, s2;
  logic [M2-1:0] co2;
  logic [M2-2:0] cp2;
  int checks = 0, failures = 0, mispredicts = 0;

  cspa_m dut1 (.a(a1), .b(b1), .sum_spec(s1), .c_out(co1), .c_pred(cp1));
  cspa_m #(.N(N2), .K(K2), .PRED_BITS(K2)) dut2 (.a(a2), .b(b2), .sum_spec(s2), .c_out(co2), .c_pred(cp2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: returns speculative sum, block carry-outs and predictions.
  task automatic ref_model(input int n, input int k, input longint unsigned a, input longint unsigned b,
                           output longint unsigned s, output longint unsigned co,
                           output longint unsigned cp);
    int m = (n + k - 1) / k;
    longint unsigned pred_prev = 0;
    s = 0; co = 0; cp = 0;
    for (int i = 0; i < m; i++) begin
      int w = (i == m - 1) ? n - (m - 1) * k : k;
      longint unsigned mask = (64'd1 << w) - 1;
      longint unsigned ai = (a >> (i * k)) & mask;
      longint unsigned bi = (b >> (i * k)) & mask;
      longint unsigned t  = ai + bi + pred_prev;
      s  |= (t & mask) << (i * k);
      co |= (t >> w) << i;
      pred_prev = (ai + bi) >> w;
      if (i < m - 1) cp |= pred_prev << i;
    end
  endtask

  task automatic check1();
    longint unsigned s, co, cp, total;
    ref_model(N1, K1, 64'(a1), 64'(b1), s, co, cp);
    checks++;
    if ({co1, cp1, s1} !== {4'(co), 3'(cp), 16'(s)}) begin
      failures++;
      $display("N16 a=%h b=%h got s=%h co=%b cp=%b exp s=%h co=%b cp=%b", a1, b1, s1, co1, cp1, 16'(s), 4'(co), 3'(cp));
    end
    total = 64'(s1) + (64'(co1[M1-1]) << N1);
    for (int i = 0; i < M1 - 1; i++) total += 64'(co1[i] ^ cp1[i]) << ((i + 1) * K1);
    if ((co1[M1-2:0] ^ cp1) != 0) mispredicts++;
    checks++;
    if (total != 64'(a1) + 64'(b1)) begin
      failures++; $display("N16 identity fails a=%h b=%h", a1, b1);
    end
    // A prediction may miss a carry but never invent one.
    checks++;
    if ((cp1 & ~co1[M1-2:0]) != 0) begin failures++; $display("N16 predicted carry without real carry"); end
  endtask

  task automatic check2();
    longint unsigned s, co, cp;
    ref_model(N2, K2, 64'(a2), 64'(b2), s, co, cp);
    checks++;
    if ({co2, cp2, s2} !== {3'(co), 2'(cp), 10'(s)}) begin
      failures++;
      $display("N10 a=%h b=%h got s=%h co=%b cp=%b exp s=%h co=%b cp=%b", a2, b2, s2, co2, cp2, 10'(s), 3'(co), 2'(cp));
    end
  endtask

  initial begin
    logic [15:0] dir_a [6] = '{16'h0FF8, 16'hFFFF, 16'h0000, 16'h00F0, 16'h8888, 16'h7FFF};
    logic [15:0] dir_b [6] = '{16'h0008, 16'h0001, 16'h0000, 16'h0010, 16'h8888, 16'h0001};
    for (int d = 0; d < 6; d++) begin
      a1 = dir_a[d]; b1 = dir_b[d]; a2 = dir_a[d][9:0]; b2 = dir_b[d][9:0];
      #1; check1(); check2();
    end
    for (int t = 0; t < 20000; t++) begin
      a1 = 16'($urandom); b1 = 16'($urandom);
      a2 = 10'($urandom); b2 = 10'($urandom);
      #1; check1(); check2();
    end
    checks++;
    if (mispredicts == 0) begin failures++; $display("no misprediction was exercised"); end
    $display("mispredicted additions: %0d", mispredicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
