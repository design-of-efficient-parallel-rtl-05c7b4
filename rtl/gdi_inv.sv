// gdi_inv - inverter made of one GDI cell (2 transistors).
//
// G carries the input, P is tied to '1' and N to '0': with a=0 the pMOS
// passes '1', with a=1 the nMOS passes '0'. This is the GDI cell wired as
// a plain CMOS inverter, as in the GDI function table.
// Interface: a in, y = ~a out. Combinational.
module gdi_inv (
  input  logic a,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b1), .n(1'b0), .out(y));
endmodule
