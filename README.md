# Factorial unit on a Vedic (Urdhva Tiryakbhyam) multiplier

This design computes n! in hardware. A register holds n. An up counter supplies the
factors 1, 2, ..., n, one per clock. A running product that starts at 1 is multiplied
by the counter each clock. The multiplier is a 16x16 unsigned multiplier built in the
style of the Vedic *Urdhva Tiryakbhyam* ("vertically and crosswise") sutra. It is a
purely combinational tree: 2x2 cells are combined, four at a time and with ripple
carry adders, into 4x4, then 8x8, then 16x16 multipliers.

Everything is plain synthesizable SystemVerilog with no vendor primitives. The
multiplier hierarchy follows the published block diagrams closely. The factorial
controller, its handshake and its overflow rule are this design's own, because the
original description gives only the chain of blocks.

## The multiplier

### Vertically and crosswise

Take two numbers, each split into a high part and a low part. Their product is built from:

- the **vertical** products: low x low and high x high, and
- the **crosswise** products: high x low and low x high. These two have the same
  weight and are added together.

For decimal digits this is the schoolbook method done column by column, with every
column formed in parallel. For 252 x 846 the columns are 12, 38, 48, 48 and 16. With
carries passed on, they give 213192. In binary, the same idea is applied recursively
to halves of the word.

### 2x2 cell (`vm2x2`)

Four AND gates form a0b0, a1b0, a0b1 and a1b1. Two half adders do the rest:

| output | formed as |
|---|---|
| p[0] | a0b0 |
| p[1], c1 | half adder(a0b1, a1b0) |
| p[2], p[3] | half adder(a1b1, c1) |

### Combining four half-size multipliers (`vm4x4`, `vm8x8`, `vm16x16`)

An N-bit multiplier splits each operand into H = N/2-bit halves. It runs four
H x H multipliers in parallel:

    q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH      (each N bits)

Three N-bit ripple carry adders then produce the 2N-bit product:

    adder 1:  t1 = q1 + q2                  carry ca1
    adder 2:  t2 = t1 + q0[N-1:H]           carry ca2
    adder 3:  p[2N-1:N] = q3 + {ca1|ca2, t2[N-1:H]}
              p[N-1:H]  = t2[H-1:0]
              p[H-1:0]  = q0[H-1:0]

This is the hardest part to follow, so here is why it is correct:

- **q0** has weight 1. Its low H bits are final product bits. Its high H bits carry
  over into the crosswise sum.
- **q1 and q2** have weight 2^H. Adder 1 sums them, and adder 2 adds the part of q0
  that spills over. The low H bits of that sum are product bits H to N-1. Its high
  H bits, with the two carries, have weight 2^N. They go into adder 3 with q3,
  which also has weight 2^N.
- **ca1 and ca2** both have weight 2^(N+H), and they are never both 1. Adder 1 can
  carry out only if q1 + q2 >= 2^N. Each partial product is at most (2^H-1)^2, so
  the N bits left after that carry are then at most 2^N - 2^(H+2) + 2. Adding at
  most 2^H - 1 to that cannot reach 2^N, so adder 2 cannot carry out as well. The
  design therefore merges them into a single bit.
- **Adder 3** never carries out, because the product fits in 2N bits.

Both invariants (one middle carry at most, no carry out of adder 3) are checked by
immediate assertions in every level.

The published diagrams show the three adders, zero padding on adder 2 and both
carries entering adder 3. They do not show which half-product goes where, nor
exactly how the two carries enter adder 3. The assignment above is the standard one
for this multiplier. Merging the carries is this design's choice. The 16x16 diagram
labels its middle adder "15 bit". This design reads that as a misprint: the other
adders, the text and the operand widths all call for 16 bits.

### Adders (`ripple_carry_adder`, `full_adder`, `half_adder`)

`ripple_carry_adder #(W)` is a chain of W full adders with a carry input and a carry
output. The multipliers tie the carry input to 0. The delay of each level is
dominated by three W-bit ripple chains, two of which are in series.

Size after generic synthesis: vm16x16 is about 2100 single-bit gates.

## The factorial unit (`vedic_factorial`)

### Datapath

    n --> [fact_input_reg] --n_q--> [fact_up_counter] --count--+
                                                               v
               +--temp[15:0]--> [vm16x16] <--------------------+
               |                    | product (32 bits)
               |                    v
               +------------- [fact_temp_reg]  (starts at 1)
                                    | temp
                                    v
                            [fact_output_reg] --> result, overflow, result_valid, done

| block | role |
|---|---|
| `fact_input_reg` | keeps n stable for the whole run; the `n` port may change after start |
| `fact_up_counter` | cleared to 1 on start; steps once per multiplication; `at_limit` flags count == n |
| `fact_temp_reg` | the running product; set to 1 on start and loaded with the multiplier output |
| `fact_output_reg` | holds the result and overflow flag; drives `result_valid` and a one-clock `done` |

### Control and timing

A three-state controller (`fact_pkg::fact_state_e`) sequences the run:

- **IDLE**: waits for `start`. On start it loads n, sets the counter to 1, sets the
  running product to 1 and drops `result_valid`. It goes to FIN directly if n = 0,
  otherwise to RUN.
- **RUN**: performs one multiplication per clock, temp <- temp x count. It leaves
  after the multiplication by count = n, or when the product has grown too wide
  (see below).
- **FIN**: copies the running product into the output register. `done` pulses in
  the following clock.

| n | result | overflow | clocks from the start edge to `done` |
|---|---|---|---|
| 0 | 1 | 0 | 1 |
| 1 ... 9 | n! | 0 | n + 1 |
| >= 10 | 362880 (9!) | 1 | 11 |

`busy` is high in RUN and FIN. `start` is ignored while `busy` is high. A new start is
accepted in the same clock as `done`, so runs can follow each other back to back. The
reset is active-low and asynchronous.

### Why n! stops at 9!

The multiplier takes 16-bit operands, so only the low 16 bits of the running product
are fed back. 8! = 40320 still fits in 16 bits, so 9! = 8! x 9 = 362880 is formed
exactly in the 32-bit product. For n >= 10 the next factor would have to multiply a
19-bit value. The unit stops there, raises `overflow` and leaves 9! in `result`. The
original description does not discuss this limit. The overflow rule is this design's.
Extending the range would need a wider multiplier (for example a 32x32 level built
from four `vm16x16`, in the same pattern) or a multi-cycle multiply.

## Where this design departs from or adds to the source

- **Counting direction.** The factorial formula is written counting down,
  n(n-1)(n-2)..., but the architecture uses an up counter. This design uses the up
  counter. The product is the same.
- **Storage for n.** "Stored in a memory" is taken to mean a single register.
- **Added by this design:** the controller, the start/busy/done/result_valid
  handshake, n = 0 handling, the overflow detection, the reset scheme, and the
  widths of n (16 bits) and of the running product (32 bits).
- **Carries into adder 3.** The two middle carries are merged into one bit, as
  explained above.
- **Not included:** the conventional array multiplier that the source compares
  against. It is a baseline, not part of the design. The source also reports FPGA
  LUT counts and delays; these cannot be reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_half_adder`, `tb_vm2x2`, `tb_vm4x4`, `tb_vm8x8` | exhaustive: every input combination |
| `tb_ripple_carry_adder` | exhaustive at W=4; corner and random operands at W=8 and W=16 |
| `tb_vm16x16` | 252 x 846 = 213192, corner values, every operand x 0xFFFF, 65536 random pairs |
| `tb_fact_*` | random control sequences against a reference model, plus reset values |
| `tb_vedic_factorial` | see below |

`tb_vedic_factorial` runs the unit with its default sizes. It checks:

- result, overflow and `result_valid` for every n from 0 to 20 and for 300 random n;
- the exact latency from start to `done`;
- a start pulsed while busy, which must be ignored;
- back-to-back starts in the `done` clock;
- a reset in the middle of a run.

It counts how often each of these mechanisms happened, and fails if any never did.
It finishes in well under a second.

## Simulating

Every testbench is self-contained. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fact_pkg.sv tb/tb_vedic_factorial.sv --top-module tb_vedic_factorial
    ./obj_dir/Vtb_vedic_factorial

Replace the testbench name to run any other testbench. `fact_pkg.sv` must come first
whenever a factorial module is compiled. The multipliers need no package.
