// pasta_stage - one bit of the parallel self-timed adder (PASTA), in GDI.
//
// Two GDI multiplexers steered by SEL choose the half adder's inputs:
// with sel=0 (initial phase) the operand bits a_i and b_i, giving
// S0_i = a_i ^ b_i and C0_i+1 = a_i & b_i; with sel=1 (iterative phase)
// the previous iteration's sum S_i of this bit and carry C_i from the
// bit below, giving S_i' = S_i ^ C_i and C_i+1' = S_i & C_i. The bit's
// outputs are returned to s_fb / c_fb of this and the next stage by the
// enclosing adder.
//
// Interface: sel, a, b, s_fb, c_fb in; s, c out. Combinational.
// The immediate assertion checks that the stage never reaches the
// (carry, sum) = (1,1) state, which a half adder cannot produce.
module pasta_stage (
  input  logic sel,
  input  logic a,
  input  logic b,
  input  logic s_fb,
  input  logic c_fb,
  output logic s,
  output logic c
);
  logic x, y;

  gdi_mux2       u_mux_a (.sel(sel), .d0(a), .d1(s_fb), .y(x));
  gdi_mux2       u_mux_b (.sel(sel), .d0(b), .d1(c_fb), .y(y));
  gdi_half_adder u_ha    (.x(x), .y(y), .s(s), .c(c));

  always_comb begin
    assert (!(s && c)) else $error("pasta_stage: state (1,1) reached");
  end
endmodule
