// gdi_half_adder - GDI half adder (6 transistors).
//
// The sum module is the 4-transistor GDI XOR and the carry module the
// 2-transistor GDI AND, giving s = x ^ y and c = x & y. A half adder can
// never output s = c = 1, which is what keeps the adder's per-bit state
// out of the (1,1) state.
// Interface: x, y in; s (sum), c (carry to the next bit) out.
// Combinational.
module gdi_half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  gdi_xor u_sum   (.a(x), .b(y), .y(s));
  gdi_and u_carry (.a(x), .b(y), .y(c));
endmodule
