// gdi_cell_tb - exhaustive check of the GDI primitive.
//
// Drives all eight (g, p, n) combinations and checks out against the GDI
// function table read as "G low passes P, G high passes N". A watchdog
// ends the run if it ever hangs.
`timescale 1ns/1ps
module gdi_cell_tb;
  logic g, p, n, out;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

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
      {g, p, n} = 3'(v);
      #1;
      expected = (g == 1'b0) ? p : n;
      checks++;
      if (out !== expected) begin
        failures++;
        $display("FAIL g=%b p=%b n=%b out=%b expected=%b", g, p, n, out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
