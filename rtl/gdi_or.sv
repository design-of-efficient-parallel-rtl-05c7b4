// gdi_or - two-input OR made of one GDI cell (2 transistors).
//
// G = a, P = b, N = '1': a=0 lets the pMOS pass b, a=1 lets the nMOS pass
// '1', so y = a | b. Wiring taken from the GDI function table.
// Interface: a, b in; y out. Combinational.
module gdi_or (
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(b), .n(1'b1), .out(y));
endmodule
