# PASTA: a parallel self-timed adder built from GDI cells

A ripple-carry adder always waits for the worst case: a carry that might
travel through every bit. PASTA (Parallel Self-Timed Adder) instead lets
the addition take as long as the operands actually need. It uses only half
adders, one per bit, and repeats a simple half-adder step on all bits at
once until no carry is left. Independent carry chains resolve at the same
time, so for random operands the number of steps grows roughly with the
logarithm of the width, not with the width. A completion detector says when
the result is ready.

Every gate in this version is built from Gate Diffusion Input (GDI) cells.
A GDI cell is a two-transistor pMOS/nMOS pair whose source terminals are
free inputs. That makes the multiplexers, AND gates and inverters of the
adder very small.

## The recursion

Write `S_i` for the sum bit of bit `i` and `C_i` for the carry entering
bit `i`. `C_0` is always 0, and `C_n` is the carry leaving the top bit of
an `n`-bit adder.

*Initial phase* (`sel = 0`). Each bit adds its two operand bits:

    S_i = a_i XOR b_i          C_i+1 = a_i AND b_i

*Iterative phase* (`sel = 1`). Each bit adds its own previous sum to the
carry arriving from the bit below:

    S_i'   = S_i XOR C_i        C_i+1' = S_i AND C_i

*Termination.* The adder is done when `C_1 ... C_n` are all 0.

Each step leaves the value `sum(S_i*2^i) + sum(C_i*2^i)` unchanged, except
at the top bit, and it moves every carry one place up. A carry therefore
stops at the first bit whose sum was 0. A chain of `L` ones needs about `L`
steps, and separate chains run in parallel. The worst case, all ones plus
1, takes exactly `n` steps. With no carries at all the adder is done after
the initial phase, in zero steps.

Because every stage is a half adder, a bit can never be in the state
`(C_i+1, S_i) = (1, 1)`. `pasta_stage` asserts this.

Example, 4 bits, 0111 + 0001:

| step | S    | carries C4..C1 |
|------|------|----------------|
| init | 0110 | 0001           |
| 1    | 0100 | 0010           |
| 2    | 0000 | 0100           |
| 3    | 1000 | 0000 → done    |

## GDI cells and how the gates map onto them

A GDI cell has three inputs. G drives both transistor gates, P feeds the
pMOS and N feeds the nMOS. When G is low the pMOS conducts and the output
follows P. When G is high the nMOS conducts and the output follows N.
Logically that is `out = g ? n : p` (`gdi_cell`).

| gate (module)    | G   | P   | N    | function      | transistors |
|------------------|-----|-----|------|---------------|-------------|
| `gdi_inv`        | a   | 1   | 0    | ~a            | 2           |
| `gdi_and`        | a   | 0   | b    | a & b         | 2           |
| `gdi_or`         | a   | b   | 1    | a \| b        | 2           |
| `gdi_mux2`       | sel | d0  | d1   | sel ? d1 : d0 | 2           |
| `gdi_xor`        | a   | b   | ~b   | a ^ b         | 4 (with the inverter) |
| `gdi_half_adder` | XOR for the sum, AND for the carry | | | | 6 |

`pasta_stage` is one bit. Two `gdi_mux2` cells, steered by `sel`, pass
either `(a_i, b_i)` or the fed-back `(S_i, C_i)` to a `gdi_half_adder`.

The model is a logic model at full swing. A real GDI cell passes a weak
level through one of its transistors, so its output can be a threshold
voltage short of the rail. Such a cell also relies on twin-well or SOI body
biasing. Nothing in this RTL models either effect. It checks the logic, not
the electrical behaviour.

## Completion detection

`term` must rise only when the iterative phase has started and no carry is
left:

    term = NOR(~sel, C_1, ..., C_n)

The `~sel` input is there for a reason. In the initial phase the carries
may all be 0 (for example 0101 + 1010). Without `~sel`, `term` would then
rise while the operands are still being loaded. In silicon this is one wide
pseudo-nMOS NOR with all pull-downs in parallel. In `pasta_completion` it is
a balanced tree of `gdi_or` cells followed by a `gdi_inv`, which is the same
function. For the default 32 bits the tree is 6 levels deep (33 leaves,
padded to 64).

## How the asynchronous loop is modelled

In the original circuit the half-adder outputs go straight back into the
multiplexers. The loop iterates on gate delay alone, with no clock. A
combinational loop like that can be neither synthesised as ordinary logic
nor simulated by a cycle-based simulator. So `pasta_adder` breaks the loop
with one flip-flop per sum bit and one per carry bit. **One rising edge of
`clk` is one iteration.** After `sel` rises, the number of edges until
`term` goes high is exactly the iteration count `k` of the recursion. You
can read `clk` as the strobe of a bundled-data loop, or replace it with a
local delay-matched pulse in an asynchronous implementation.

### Interface of `pasta_adder`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | iteration strobe |
| `rst_n` | in  | 1     | asynchronous active-low reset of the loop state |
| `sel`   | in  | 1     | 0 = load operands, 1 = iterate (driven by the request) |
| `a`,`b` | in  | WIDTH | operands |
| `sum`   | out | WIDTH | sum bits, valid while `term` = 1 |
| `cout`  | out | 1     | carry out, valid while `term` = 1 |
| `term`  | out | 1     | completion, combinational from the state and `sel` |

Parameter: `WIDTH`, default 32.

### Protocol and timing

1. Drive `a` and `b` with `sel = 0` for at least one rising edge of `clk`.
   That edge loads the initial-phase result. `term` stays 0.
2. Raise `sel`. From then on `a` and `b` are not read.
3. `term` can be 1 in the same cycle (no carries) and is 1 after at most
   `WIDTH` edges. Once `term` is high it stays high, with `sum`/`cout`
   stable, for as long as `sel` stays high. A concurrent assertion checks
   this.
4. Lower `sel` to start the next addition. `term` falls at once.

### Carry out

The recurrence gives the top bit's carry `C_n` no bit to feed into, so each
step would throw it away. A sticky flip-flop collects any `C_n` seen during
the iterative phase, and `cout` is that flag ORed with the live `C_n`. When
`term` is high, `{cout, sum}` is the full `WIDTH+1`-bit sum. At most one
unit of `2^n` can come out during an addition, so one flag is enough.

## Choices this design makes

These points are not fixed by the design being modelled. Each has a
reasonable default here:

- **Width.** 32 bits. It is a parameter, and every module works for any
  `WIDTH >= 2`.
- **Loop.** A clocked feedback register, one iteration per edge, instead
  of a self-timed loop (see above).
- **No carry-in.** `C_0` is tied to 0, as in the initial-phase equations.
- **Carry out.** Added as described above. Without it the top carry is
  lost.
- **Reset.** Asynchronous and active low. Outside reset, the `sel = 0`
  phase initialises every flip-flop.
- **Request polarity.** The request drives `sel` directly: 0 selects the
  operands, 1 selects the feedback.
- **XOR.** The 4-transistor XOR is taken to be a GDI inverter plus one GDI
  cell used as a selector.
- **Completion NOR.** Built as a GDI OR tree rather than a ratioed wide
  gate.
- **Electrical behaviour.** Power, delay and frequency figures of the
  transistor circuit are outside what RTL can show. The comparison with a
  conventional static-CMOS PASTA is not part of this code.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- The GDI gates, the half adder and `pasta_stage` are tested exhaustively
  against SystemVerilog operators. `pasta_stage` also checks that the
  `(1,1)` state never occurs.
- `pasta_completion_tb` tries every single-carry position with both `sel`
  values, plus 500 random carry vectors. It runs at 32 bits and at 31 bits.
  At 31 bits the OR tree is full and needs no padding.
- `pasta_adder_tb` runs at the default 32 bits. It checks `{cout,sum}`
  against `a+b`. It checks the edge count against the recursion, evaluated
  independently on whole words, and checks that the count never exceeds
  `WIDTH`. It changes the operands during iteration to show they are
  ignored. Directed cases cover the zero-iteration case, the `WIDTH`-step
  worst case, carry out, and four parallel chains that take exactly as long
  as one. It also checks that `term` stays low during loading. Each of
  these is counted, and a missing one is a failure. Over 2000 random pairs
  the average was about 4.3 iterations for 32 bits. The test requires the
  average to stay at or below 2·log2(WIDTH).
- `pasta_adder_w8_tb` adds all 65,536 pairs of 8-bit operands. It prints
  how many pairs needed each iteration count (for example 128 pairs need
  all 8 steps).

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Irtl tb/pasta_adder_tb.sv \
        --top-module pasta_adder_tb -o sim && ./obj_dir/sim

## Files

- `rtl/gdi_cell.sv`: GDI primitive.
- `rtl/gdi_inv.sv`, `gdi_and.sv`, `gdi_or.sv`, `gdi_xor.sv`, `gdi_mux2.sv`:
  gates built from GDI cells.
- `rtl/gdi_half_adder.sv`: sum and carry modules of one bit.
- `rtl/pasta_stage.sv`: one bit (two multiplexers and a half adder).
- `rtl/pasta_completion.sv`: completion detector.
- `rtl/pasta_adder.sv`: top level, with `WIDTH` stages, the feedback
  register, carry out and completion.
