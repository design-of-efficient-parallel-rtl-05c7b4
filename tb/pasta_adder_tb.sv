// pasta_adder_tb - end-to-end test of the PASTA adder at its default width.
//
// Each addition follows the adder's protocol: operands with sel=0 for one
// clock edge (initial half-adder phase), then sel=1 and one edge per
// iteration until term. For every addition the testbench checks
//   * term stays low while sel=0 (completion guard),
//   * {cout, sum} = a + b once term is high,
//   * the number of edges to term equals the iteration count k of the
//     recursion S' = S ^ C, C' = (S & C) << 1, worked out here on whole
//     words, and k <= WIDTH.
// Operands are changed while sel=1 to show they are ignored in the
// iterative phase. Directed cases reach: no carry at all (k=0), the
// longest chain (all ones + 1, k=WIDTH), a carry out, and several
// independent carry chains resolving in parallel. Random operands then
// give the average iteration count, which must stay logarithmic in the
// width. Each mechanism is counted and one that never happened counts
// as a failure. A cycle watchdog ends a hung run.
`timescale 1ns/1ps
module pasta_adder_tb;
  localparam int unsigned W      = 32;
  localparam int unsigned NRAND  = 2000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         sel;
  logic [W-1:0] a, b, sum;
  logic         cout, term;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_load = 0, n_iter = 0, n_k0 = 0, n_kmax = 0, n_cout = 0;
  int n_parallel = 0, n_guard = 0, n_ignore = 0;
  longint unsigned iter_total = 0;
  int k_max_seen = 0;

  pasta_adder dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b),
    .sum(sum), .cout(cout), .term(term)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Iteration count of the half-adder recursion, on whole words:
  // c[i] is C_i (c[0] = C_0 = 0), and the loop runs until C_1..C_n are 0.
  function automatic int ref_iterations(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] s, s_n;
    logic [W:0]   c;
    int k;
    s = x ^ y;
    c = {x & y, 1'b0};
    k = 0;
    while (c[W:1] != '0) begin
      s_n = s ^ c[W-1:0];
      c   = {s & c[W-1:0], 1'b0};
      s   = s_n;
      k++;
    end
    return k;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic add(input logic [W-1:0] x, input logic [W-1:0] y,
                     output int k, input int extra_load = 0);
    logic [W:0] expected;
    int k_exp;
    expected = {1'b0, x} + {1'b0, y};
    k_exp = ref_iterations(x, y);
    @(negedge clk);
    a = x; b = y; sel = 1'b0;
    repeat (1 + extra_load) @(negedge clk);
    n_load++;
    check("term low while sel=0", term == 1'b0);
    if ((x & y) == '0) n_guard++;   // no carry, yet term must stay low
    sel = 1'b1;
    // Operands are not read any more: scramble them.
    a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom});
    n_ignore++;
    #1;
    k = 0;
    while (!term && k <= W + 1) begin
      @(negedge clk);
      k++;
    end
    check($sformatf("sum %h + %h: got %b_%h expected %h", x, y, cout, sum, expected),
          {cout, sum} == expected);
    check($sformatf("iterations %h + %h: got %0d expected %0d", x, y, k, k_exp),
          k == k_exp);
    check($sformatf("iterations %0d <= WIDTH", k), k <= W);
    if (k == 0) n_k0++;
    if (k > 0) n_iter++;
    if (k == W) n_kmax++;
    if (cout) n_cout++;
    if (k > k_max_seen) k_max_seen = k;
  endtask

  initial begin
    int  k, k_one;
    real avg;
    rst_n = 1'b0; sel = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // No carries: done without a single iteration.
    add(32'h0F0F_0F0F, 32'h3030_3030, k);
    add('0, '0, k);
    // Longest chain: all ones + 1 carries through every bit and out.
    add('1, 32'h0000_0001, k);
    // Carry out with a short chain.
    add(32'h8000_0000, 32'h8000_0000, k);
    add('1, '1, k);
    // Four independent 8-bit chains resolve together: as fast as one.
    add(32'h0000_007F, 32'h0000_0001, k_one);
    add(32'h7F7F_7F7F, 32'h0101_0101, k);
    check($sformatf("parallel chains: %0d iterations, one chain %0d", k, k_one), k == k_one);
    if (k == k_one && k > 0) n_parallel++;
    // A longer sel=0 phase must make no difference.
    add(32'h1234_5678, 32'h9ABC_DEF0, k, 3);

    // Random operands: the average iteration count must stay
    // logarithmic in the width (bound used here: 2*log2(WIDTH)).
    iter_total = 0;
    for (int t = 0; t < NRAND; t++) begin
      add(W'({$urandom, $urandom}), W'({$urandom, $urandom}), k);
      iter_total += longint'(k);
    end
    avg = real'(iter_total) / real'(NRAND);
    $display("random operands: average %0.2f iterations, maximum seen %0d, width %0d",
             avg, k_max_seen, W);
    check("average iterations logarithmic", avg <= 2.0 * real'($clog2(W)));

    check("initial phase used", n_load > 0);
    check("iterative phase used", n_iter > 0);
    check("completion without iteration (k=0)", n_k0 > 0);
    check("longest chain (k=WIDTH)", n_kmax > 0);
    check("carry out", n_cout > 0);
    check("independent chains in parallel", n_parallel > 0);
    check("term guarded during sel=0 with no carry", n_guard > 0);
    check("operands ignored while iterating", n_ignore > 0);
    $display("mechanisms: load=%0d iterate=%0d k0=%0d kmax=%0d cout=%0d parallel=%0d guard=%0d ignore=%0d",
             n_load, n_iter, n_k0, n_kmax, n_cout, n_parallel, n_guard, n_ignore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
