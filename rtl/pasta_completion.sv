// pasta_completion - completion detector of the PASTA adder.
//
// Addition is finished when SEL is high (iterative phase) and every carry
// C1..Cn is zero. The detector is a single wide NOR whose inputs are all
// the carries plus the inverted SEL, so TERM = NOR(~SEL, C1, ..., Cn):
// including ~SEL keeps TERM low while the operands are being loaded, even
// if they produce no carry at all. In silicon this NOR is a ratioed
// pseudo-nMOS gate with all pull-downs in parallel; in this logic model
// it is a balanced tree of GDI OR cells (depth ceil(log2(WIDTH+1)))
// followed by a GDI inverter, which has the same function. The tree form
// is this design's choice.
//
// Parameter: WIDTH, the adder width (number of carries C1..Cn).
// Interface: sel, carry[WIDTH-1:0] (carry[k] is C_k+1) in; term out.
// Combinational.
module pasta_completion #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] carry,
  output logic             term
);
  // Leaves: the WIDTH carries and ~SEL, padded with zeros to a power of two.
  localparam int unsigned LEAVES = WIDTH + 1;
  localparam int unsigned PAD    = 1 << $clog2(LEAVES);

  logic sel_n;
  logic any;
  // Heap-ordered tree: node[1] is the root, node[PAD+k] is leaf k.
  logic [2*PAD-1:1] node;

  gdi_inv u_sel_inv (.a(sel), .y(sel_n));

  always_comb begin
    node[2*PAD-1:PAD] = '0;
    node[PAD+WIDTH-1:PAD] = carry;
    node[PAD+WIDTH]       = sel_n;
  end

  for (genvar i = 1; i < PAD; i++) begin : g_or
    gdi_or u_or (.a(node[2*i]), .b(node[2*i+1]), .y(node[i]));
  end

  assign any = node[1];

  gdi_inv u_out_inv (.a(any), .y(term));
endmodule
