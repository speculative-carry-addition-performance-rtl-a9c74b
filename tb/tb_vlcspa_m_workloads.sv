// Wide configurations of vlcspa_m: the adder widths 64, 128, 256 and 512,
// each with the two block sizes listed for them as window sizes (14/10,
// 15/11, 16/12, 17/13 bits), plus a 32-bit adder with 8-bit blocks whose
// predictors look only at the upper 4 bits. Each instance gets
// carry-chain-biased operands and then uniformly random ones; every result,
// ER, Err_block and latency is checked by vl_driver, which also prints the
// measured share of additions that needed the recovery cycle.
module tb_vlcspa_m_workloads;
  localparam int NC = 9;
  localparam int unsigned CN [NC] = '{64, 64, 128, 128, 256, 256, 512, 512, 32};
  localparam int unsigned CK [NC] = '{14, 10, 15, 11, 16, 12, 17, 13, 8};
  localparam int unsigned CP [NC] = '{14, 10, 15, 11, 16, 12, 17, 13, 4};

  logic clk = 1'b0;
  logic [NC-1:0] done;
  int checks [NC];
  int failures [NC];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int unsigned N = CN[c];
    localparam int unsigned K = CK[c];
    localparam int unsigned M = (N + K - 1) / K;
    logic         rst_n, cout, er, valid;
    logic [N-1:0] a, b, sum;
    logic [M-2:0] err_block;

    vlcspa_m #(.N(N), .K(K), .PRED_BITS(CP[c])) dut (
      .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout), .er(er),
      .err_block(err_block), .valid(valid));

    vl_driver #(.N(N), .K(K), .PRED(CP[c]), .NBIAS(3000), .NRAND(200000)) drv (
      .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout), .er(er),
      .err_block(err_block), .valid(valid), .done(done[c]), .checks(checks[c]),
      .failures(failures[c]));
  end

  function automatic int total(input int v [NC]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
