// Stimulus and checker for the variable-latency adder (vlcspa_m), shared by
// the end-to-end testbenches. It plays the producer and the consumer:
// it offers operands and keeps them until the adder takes them (valid = 1
// before a rising edge), and it collects a result in each cycle where
// valid = 1. Each result is compared with a + b done in plain wide
// arithmetic, and its latency with the one a reference model predicts:
// 1 cycle when every block's carry prediction is right, 2 when one is
// wrong. The model also predicts ER and Err_block.
//
// Phases: directed operands (DIRECTED = 1, for 16-bit adders), then NBIAS
// operands in which blocks are often forced to propagate (so that carries
// get lost and chained), then NRAND uniformly random operands over which the
// speculation error rate is measured.
// Events counted: one-cycle results, recovered results, stall cycles, lost
// carries that travelled through further blocks (chained), results with
// carry-out 1, and operations with several wrong predictions. Each that
// the configuration can produce must happen at least once. done rises when
// all operations have been checked.
module vl_driver #(
  parameter int unsigned N        = 16,
  parameter int unsigned K        = 4,
  parameter int unsigned PRED     = 4,
  parameter int unsigned NBIAS    = 2000,
  parameter int unsigned NRAND    = 2000,
  parameter bit          DIRECTED = 1'b0,
  localparam int unsigned M       = (N + K - 1) / K
) (
  input  logic         clk,
  output logic         rst_n,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  input  logic [N-1:0] sum,
  input  logic         cout,
  input  logic         er,
  input  logic [M-2:0] err_block,
  input  logic         valid,
  output logic         done,
  output int           checks,
  output int           failures
);

  int n_fast = 0, n_rec = 0, n_stall = 0, n_chain = 0, n_cout = 0, n_multi = 0;
  int rand_ops = 0, rand_err = 0;

  function automatic int unsigned bw(int unsigned i);
    return (i == M - 1) ? N - (M - 1) * K : K;
  endfunction

  // Reference speculation model: Err_block and "a lost carry passes
  // through the block above" for operands x, y.
  task automatic predict(input logic [N-1:0] x, input logic [N-1:0] y,
                         output logic [M-2:0] err, output logic chain);
    longint unsigned pred_prev = 0;
    err = '0; chain = 1'b0;
    for (int unsigned i = 0; i < M; i++) begin
      int unsigned w = bw(i);
      int unsigned xs = (PRED > w) ? w : PRED;
      longint unsigned mask = (64'd1 << w) - 1;
      longint unsigned xi = 0, yi = 0, t, pr;
      for (int unsigned j = 0; j < w; j++) begin
        xi |= longint'(x[i * K + j]) << j;
        yi |= longint'(y[i * K + j]) << j;
      end
      t  = xi + yi + pred_prev;
      pr = ((xi >> (w - xs)) + (yi >> (w - xs))) >> xs;
      if (i < M - 1) err[i] = 1'((t >> w) != pr);
      if (i > 0 && err[i-1] && (t & mask) == mask) chain = 1'b1;
      pred_prev = pr;
    end
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[N=%0d K=%0d] FAIL %s", N, K, what);
    end
  endtask

  // Operand generation for operation number n.
  task automatic next_operands(input int n, output logic [N-1:0] x, output logic [N-1:0] y);
    logic [15:0] da [7] = '{16'h0FF8, 16'hFFF8, 16'hFFFF, 16'hFFFF, 16'h0F80, 16'h1234, 16'hF8F8};
    logic [15:0] db [7] = '{16'h0008, 16'h0008, 16'h0001, 16'hFFFF, 16'h0080, 16'h4321, 16'h0808};
    for (int unsigned j = 0; j < N; j++) begin
      x[j] = 1'($urandom);
      y[j] = 1'($urandom);
    end
    if (DIRECTED && n < 7) begin
      x = N'(da[n]); y = N'(db[n]);
    end else if (n < NBIAS + (DIRECTED ? 7 : 0)) begin
      // Force random blocks to propagate (y = ~x inside the block), and
      // sometimes make the block below generate.
      for (int unsigned i = 0; i < M; i++) begin
        if ($urandom_range(0, 1) == 0)
          for (int unsigned j = 0; j < bw(i); j++) y[i * K + j] = ~x[i * K + j];
        else if ($urandom_range(0, 2) == 0) begin
          x[i * K + bw(i) - 1] = 1'b1; y[i * K + bw(i) - 1] = 1'b1;
        end
      end
    end
  endtask

  initial begin
    logic [N-1:0] cur_a, cur_b;     // operands in the adder's registers
    logic [M-2:0] cur_err;
    logic         cur_chain, cur_rand, first;
    int           cur_issue, cycle, nops, issued;
    logic [N:0]   exp_v;
    checks = 0; failures = 0; done = 1'b0;
    rst_n = 1'b0;
    nops = NBIAS + NRAND + (DIRECTED ? 7 : 0);
    issued = 0; cycle = 0;
    next_operands(0, a, b);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cur_a = '0; cur_b = '0; cur_err = '0; cur_chain = 1'b0; cur_rand = 1'b0;
    cur_issue = 0; first = 1'b1;
    while (1) begin
      #1;   // let the combinational outputs settle after the edge
      check("er matches model", er == (cur_err != 0));
      check("err_block matches model", err_block == cur_err);
      if (valid) begin
        if (!first) begin
          exp_v = {1'b0, cur_a} + {1'b0, cur_b};
          check($sformatf("sum %h + %h = %h, got %b_%h", cur_a, cur_b, exp_v, cout, sum),
                {cout, sum} == exp_v);
          check("latency", (cycle - cur_issue + 1) == ((cur_err != 0) ? 2 : 1));
          if (cur_err != 0) n_rec++; else n_fast++;
          if (cur_chain) n_chain++;
          if (cout) n_cout++;
          if ($countones(cur_err) > 1) n_multi++;
          if (cur_rand) begin rand_ops++; if (cur_err != 0) rand_err++; end
        end
        first = 1'b0;
        if (issued == nops) break;
        // The offered operands are taken at the coming edge.
        cur_a = a; cur_b = b; cur_issue = cycle + 1;
        cur_rand = (issued >= nops - NRAND);
        predict(cur_a, cur_b, cur_err, cur_chain);
        issued++;
        @(posedge clk); cycle++;
        #1;   // drive new operands away from the clock edge
        if (issued < nops) next_operands(issued, a, b);
      end else begin
        n_stall++;
        check("stall only in the first cycle of an error", cur_err != 0 && cycle == cur_issue);
        @(posedge clk); cycle++;
        #1;
      end
    end
    check("one-cycle additions happened", n_fast > 0);
    check("recovered additions happened", n_rec > 0);
    check("stall cycles happened", n_stall > 0);
    check("chained lost carries happened", n_chain > 0);
    check("carry-out results happened", n_cout > 0);
    if (M >= 5 && PRED == K) check("several wrong predictions at once happened", n_multi > 0);
    $display("[N=%0d K=%0d PRED=%0d] one-cycle=%0d recovered=%0d stalls=%0d chained=%0d cout=%0d multi=%0d",
             N, K, PRED, n_fast, n_rec, n_stall, n_chain, n_cout, n_multi);
    $display("[N=%0d K=%0d PRED=%0d] uniform random: %0d of %0d additions needed recovery (%f %%), %0d cycles for %0d additions",
             N, K, PRED, rand_err, rand_ops, 100.0 * real'(rand_err) / real'(rand_ops), cycle, nops);
    done = 1'b1;
  end

endmodule
