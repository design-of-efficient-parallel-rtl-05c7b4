// gdi_inv_tb - exhaustive check of the GDI inv gate.
//
// Applies every input combination and compares y with the SystemVerilog
// operator result (~a). A watchdog ends the run if it ever hangs.
`timescale 1ns/1ps
module gdi_inv_tb;
  logic a, y;
  int checks = 0, failures = 0;

  gdi_inv dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      expected = ~a;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL a=%b y=%b expected=%b", a, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
