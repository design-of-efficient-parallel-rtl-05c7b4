// gdi_and - two-input AND made of one GDI cell (2 transistors).
//
// G = a, N = b, P = '0': a=0 lets the pMOS pass '0', a=1 lets the nMOS
// pass b, so y = a & b. Wiring taken from the GDI function table.
// Interface: a, b in; y out. Combinational.
module gdi_and (
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .out(y));
endmodule
