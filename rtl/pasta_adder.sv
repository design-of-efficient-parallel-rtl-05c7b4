// pasta_adder - parallel self-timed adder (PASTA) built from GDI cells.
//
// The adder adds two WIDTH-bit operands with nothing but half adders. In
// the initial phase (sel=0) every bit i forms S_i = a_i ^ b_i and
// C_i+1 = a_i & b_i. In the iterative phase (sel=1) the multiplexers of
// each stage switch to the fed-back values and every bit repeats
//   S_i   <= S_i ^ C_i          (C_0 = 0)
//   C_i+1 <= S_i & C_i
// in parallel. Each iteration keeps the value sum(S_i 2^i) + sum(C_i 2^i)
// and moves carries one bit up, so the loop ends, after at most WIDTH
// iterations and on average about log2(WIDTH) for random operands, when
// every carry is zero; then sum = a + b and the completion detector
// raises term. Independent carry chains resolve at the same time.
//
// The published circuit closes the loop asynchronously through wire and
// gate delay. Here the loop is broken by one flip-flop per sum and per
// carry, and one rising edge of clk is one iteration, so the cycle count
// after sel rises equals the iteration count k of the recursion.
//
// Carry out: the top stage's carry C_n has no stage above it to absorb
// it, so each iteration would drop it. A sticky flip-flop (cout_q)
// collects any C_n reached in the iterative phase, and cout reports the
// (n+1)-th sum bit. No carry-in: C_0 is tied to 0. Both are choices of
// this design, as are the reset and the clocked loop.
//
// Parameter: WIDTH, operand width.
// Interface / timing:
//   rst_n  asynchronous active-low reset of the loop state.
//   sel    SEL, driven by the requester. Hold sel=0 for at least one clk
//          edge with a and b stable to load them; then raise sel and hold
//          it until term is seen. a and b are not read while sel=1.
//   term   combinational from the state and sel; 1 only when sel=1 and all
//          carries are 0. It can be 1 in the first cycle after sel rises
//          (no carries at all) and is at the latest 1 after WIDTH edges.
//   sum, cout  valid while term=1.
module pasta_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             term
);
  // s_q[i] holds S_i; c_q[i] holds C_i+1 (the carry out of bit i).
  logic [WIDTH-1:0] s_q, c_q;
  logic [WIDTH-1:0] s_d, c_d;
  logic [WIDTH-1:0] c_in;   // carry entering each stage, C_i
  logic             cout_q;

  assign c_in = {c_q[WIDTH-2:0], 1'b0};

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    pasta_stage u_stage (
      .sel  (sel),
      .a    (a[i]),
      .b    (b[i]),
      .s_fb (s_q[i]),
      .c_fb (c_in[i]),
      .s    (s_d[i]),
      .c    (c_d[i])
    );
  end

  // Feedback state: one edge = one pass round the loop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      c_q    <= '0;
      cout_q <= 1'b0;
    end else begin
      s_q    <= s_d;
      c_q    <= c_d;
      cout_q <= sel ? (cout_q | c_q[WIDTH-1]) : 1'b0;
    end
  end

  pasta_completion #(.WIDTH(WIDTH)) u_done (
    .sel   (sel),
    .carry (c_q),
    .term  (term)
  );

  assign sum  = s_q;
  assign cout = cout_q | c_q[WIDTH-1];

  // Completion rules: term needs sel and no carry, and once reached it
  // holds for as long as sel stays high.
  a_term_needs_sel: assert property (@(posedge clk)
    term |-> (sel && c_q == '0));
  a_term_holds: assert property (@(posedge clk)
    (term && sel) |=> (term || !sel));
endmodule
