// gdi_half_adder_tb - exhaustive check of the GDI half adder.
//
// For each of the four input pairs the two-bit result {c, s} must equal
// the arithmetic sum x + y. A watchdog ends the run if it ever hangs.
`timescale 1ns/1ps
module gdi_half_adder_tb;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  gdi_half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expected;
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      expected = 2'(x) + 2'(y);
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL x=%b y=%b {c,s}=%b%b expected=%b", x, y, c, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
