// pasta_adder_w8_tb - exhaustive test of an 8-bit PASTA adder.
//
// Every one of the 65,536 operand pairs goes through the full protocol
// (load with sel=0, iterate with sel=1 until term). {cout, sum} must equal
// a + b, and the number of clock edges to term must equal the iteration
// count of the half-adder recursion worked out on whole words here. The
// histogram of iteration counts is printed; every count from 0 to 8 must
// occur. A cycle watchdog ends a hung run.
`timescale 1ns/1ps
module pasta_adder_w8_tb;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         sel;
  logic [W-1:0] a, b, sum;
  logic         cout, term;

  int checks = 0, failures = 0;
  int hist [0:W];

  pasta_adder #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .a(a), .b(b),
    .sum(sum), .cout(cout), .term(term)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_iterations(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] s, s_n;
    logic [W:0]   c;   // c[i] is C_i, c[0] = 0
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

  initial begin
    int k, k_exp;
    for (int i = 0; i <= W; i++) hist[i] = 0;
    rst_n = 1'b0; sel = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        @(negedge clk);
        a = W'(x); b = W'(y); sel = 1'b0;
        @(negedge clk);
        checks++;
        if (term) begin
          failures++;
          $display("FAIL term high while sel=0 for %0d + %0d", x, y);
        end
        sel = 1'b1;
        #1;
        k = 0;
        while (!term && k <= W + 1) begin
          @(negedge clk);
          k++;
        end
        k_exp = ref_iterations(W'(x), W'(y));
        checks++;
        if ({cout, sum} != 9'(x + y) || k != k_exp) begin
          failures++;
          if (failures < 20)
            $display("FAIL %0d + %0d: got %0d in %0d iterations, expected %0d in %0d",
                     x, y, {cout, sum}, k, x + y, k_exp);
        end
        if (k <= W) hist[k]++;
      end
    end
    for (int i = 0; i <= W; i++) begin
      $display("iterations %0d: %0d operand pairs", i, hist[i]);
      checks++;
      if (hist[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
