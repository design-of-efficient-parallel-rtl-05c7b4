// gdi_mux2 - 2:1 multiplexer made of one GDI cell (2 transistors).
//
// The select drives the common gate, input 0 the pMOS diffusion and
// input 1 the nMOS diffusion: y = sel ? d1 : d0. In the adder the select
// is SEL, d0 is an operand bit and d1 the fed-back sum or carry.
// Interface: sel, d0, d1 in; y out. Combinational.
module gdi_mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  gdi_cell u_cell (.g(sel), .p(d0), .n(d1), .out(y));
endmodule
