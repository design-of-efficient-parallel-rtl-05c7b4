// gdi_or_tb - exhaustive check of the GDI or gate.
//
// Applies every input combination and compares y with the SystemVerilog
// operator result (a | b). A watchdog ends the run if it ever hangs.
`timescale 1ns/1ps
module gdi_or_tb;
  logic a, b, y;
  int checks = 0, failures = 0;

  gdi_or dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      expected = a | b;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b expected=%b", a, b, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
