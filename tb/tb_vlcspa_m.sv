// End-to-end testbench of vlcspa_m at its default size (16 bits, 4-bit
// blocks). The adder is instantiated with its defaults; vl_driver offers
// directed, carry-chain-biased and uniformly random operands, checks every
// sum, carry-out, ER, Err_block and the 1- or 2-cycle latency against an
// independent model, and counts the one-cycle, recovered, stalled, chained
// and carry-out cases, each of which must occur.
module tb_vlcspa_m;
  import cspa_pkg::*;
  localparam int unsigned N = DEFAULT_N;
  localparam int unsigned K = DEFAULT_K;
  localparam int unsigned M = num_blocks(N, K);

  logic         clk = 1'b0, rst_n, done;
  logic [N-1:0] a, b, sum;
  logic         cout, er, valid;
  logic [M-2:0] err_block;
  int           checks, failures;

  always #5 clk = ~clk;

  vlcspa_m dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout),
                .er(er), .err_block(err_block), .valid(valid));

  vl_driver #(.N(N), .K(K), .PRED(K), .NBIAS(20000), .NRAND(20000), .DIRECTED(1'b1)) drv (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .cout(cout), .er(er),
    .err_block(err_block), .valid(valid), .done(done), .checks(checks), .failures(failures));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
