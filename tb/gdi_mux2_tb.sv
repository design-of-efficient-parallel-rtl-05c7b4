// gdi_mux2_tb - exhaustive check of the GDI 2:1 multiplexer.
//
// All eight (sel, d0, d1) combinations; y must be d0 for sel=0 and d1 for
// sel=1. A watchdog ends the run if it ever hangs.
`timescale 1ns/1ps
module gdi_mux2_tb;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  gdi_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {sel, d0, d1} = 3'(v);
      #1;
      expected = sel ? d1 : d0;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b expected=%b", sel, d0, d1, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
