// pasta_completion_tb - check of the completion detector.
//
// At 32 bits, and at 31 bits where the OR tree needs no padding: term must be 1 exactly when sel=1 and no carry
// is set. Covers all-zero carries with both sel values, each single carry
// set on its own (so every leaf of the OR tree is seen), and random
// carry vectors of varying density. A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module pasta_completion_tb;
  localparam int unsigned W = 32;

  logic         sel, term, term31;
  logic [W-1:0] carry;
  int checks = 0, failures = 0;

  pasta_completion #(.WIDTH(W)) dut (.sel(sel), .carry(carry), .term(term));
  // 31 carries plus ~sel fill a 32-leaf tree exactly, with no padding.
  pasta_completion #(.WIDTH(W-1)) dut31 (.sel(sel), .carry(carry[W-2:0]), .term(term31));

  task automatic check();
    logic expected;
    #1;
    expected = sel && (carry == '0);
    checks++;
    if (term !== expected) begin
      failures++;
      $display("FAIL sel=%b carry=%h term=%b expected=%b", sel, carry, term, expected);
    end
    expected = sel && (carry[W-2:0] == '0);
    checks++;
    if (term31 !== expected) begin
      failures++;
      $display("FAIL (31 bits) sel=%b carry=%h term=%b expected=%b", sel, carry, term31, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      sel = 1'(s);
      carry = '0;
      check();
      for (int k = 0; k < W; k++) begin
        carry = '0;
        carry[k] = 1'b1;
        check();
      end
    end
    for (int t = 0; t < 500; t++) begin
      sel = 1'($urandom);
      carry = W'({$urandom, $urandom});
      // Thin the vector out so that all-zero and sparse cases also occur.
      for (int d = 0; d < t % 6; d++) carry &= W'({$urandom, $urandom});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
