// gdi_xor - two-input XOR made of two GDI cells (4 transistors).
//
// A GDI inverter forms ~b; a second GDI cell with G = a, P = b and
// N = ~b then passes b when a=0 and ~b when a=1, so y = a ^ b.
// The 4-transistor budget is the published one; the split into an
// inverter plus a selecting cell is this design's reading of it.
// Interface: a, b in; y out. Combinational.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;

  gdi_inv  u_inv  (.a(b), .y(b_n));
  gdi_cell u_cell (.g(a), .p(b), .n(b_n), .out(y));
endmodule
