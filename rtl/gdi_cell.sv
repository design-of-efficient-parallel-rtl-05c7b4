// gdi_cell - Gate Diffusion Input (GDI) primitive at logic level.
//
// A GDI cell is a CMOS inverter whose pMOS source (P) and nMOS source (N)
// are free inputs instead of VDD and GND. With the common gate G low the
// pMOS conducts and the output follows P; with G high the nMOS conducts
// and the output follows N. Logically the cell is therefore a 2:1
// selector, out = g ? n : p, and every gate of this adder (inverter, AND,
// OR, XOR, multiplexer) is one or two of these cells with constants or
// signals on P and N.
//
// Interface: g, p, n in; out out. Purely combinational, no timing.
// The selection rule follows the published GDI function table. The model
// is full swing: the threshold drop a real pass transistor adds when it
// passes the "weak" level, and body biasing, are analog effects a
// two-state model does not carry.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic out
);
  always_comb out = g ? n : p;
endmodule
