// pasta_stage_tb - exhaustive check of one PASTA bit.
//
// All 32 combinations of (sel, a, b, s_fb, c_fb). With sel=0 the stage
// must add the operand bits, with sel=1 the fed-back sum and carry; in
// both cases {c, s} is the arithmetic sum of the two chosen bits, and the
// operands must have no effect once sel=1. Also counts that both phases
// were exercised. A watchdog ends the run if it ever hangs.
`timescale 1ns/1ps
module pasta_stage_tb;
  logic sel, a, b, s_fb, c_fb, s, c;
  int checks = 0, failures = 0;
  int initial_cnt = 0, iter_cnt = 0;

  pasta_stage dut (.sel(sel), .a(a), .b(b), .s_fb(s_fb), .c_fb(c_fb), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expected;
    for (int v = 0; v < 32; v++) begin
      {sel, a, b, s_fb, c_fb} = 5'(v);
      #1;
      if (sel) begin
        expected = 2'(s_fb) + 2'(c_fb);
        iter_cnt++;
      end else begin
        expected = 2'(a) + 2'(b);
        initial_cnt++;
      end
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL sel=%b a=%b b=%b s_fb=%b c_fb=%b {c,s}=%b%b expected=%b",
                 sel, a, b, s_fb, c_fb, c, s, expected);
      end
      checks++;
      if (s && c) begin
        failures++;
        $display("FAIL state (1,1) at v=%0d", v);
      end
    end
    checks++;
    if (initial_cnt == 0 || iter_cnt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
