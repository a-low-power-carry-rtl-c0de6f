# Carry-select adder with a multiplexer-based add-one circuit

A carry-select adder splits a wide addition into blocks and makes every block
ready for either value of the carry that will arrive from below. The usual way
to do that is to build two ripple-carry adders per block, one assuming carry-in
0 and one assuming carry-in 1, and let the real carry pick one result. That
doubles the adder hardware.

This design keeps only the carry-in-0 adder. The carry-in-1 result is the same
number plus one, and adding one to a binary number only inverts its bits from
the least significant bit up to and including the first zero. So each block
computes `sum0 = a + b` once, a chain finds where the first zero of `sum0` is,
and per bit a single multiplexer, steered by that chain and by the incoming
carry, picks `sum0[k]` or `~sum0[k]`. The result is a 64-bit adder
(`s = a + b`, with a carry out) in ten blocks whose widths grow towards the
most significant end.

The RTL is a gate-level-style functional model of the circuit: every cell of
the circuit is a module, and the cells are wired as in the circuit. It says
nothing about transistor sizing, delay or power.

## The add-one rule

Take the carry-in-0 sum of one block, `sum0`. Then `sum0 + 1`:

- always inverts bit 0;
- inverts bit k (k >= 1) exactly when `sum0[k-1:0]` is all ones;
- carries out of the block exactly when `sum0` is all ones.

Example: `100111 + 1 = 101000` (the four bits up to the first zero are
inverted); `100100 + 1 = 100101` (the first zero is bit 0, only bit 0 flips).

`first_zero_chain` produces `inv[k] = &sum0[k-1:0]` as a ripple from bit 0
upwards, and `all_ones = &sum0`. In the circuit this is a chain of series pass
transistors gated by the sum bits; its supplies are swapped so that it delivers
these "invert here" controls directly, already in the polarity the next stage
needs.

## One multiplexer per bit

Each bit k >= 1 needs two choices: the add-one picks `sum0[k]` or `~sum0[k]`,
then the carry-select picks the carry-in-0 or the carry-in-1 value. The
cascade of two 2:1 multiplexers

    first  = sel1 ? A : B
    y      = sel2 ? first : A

equals a single multiplexer `y = NAND(~sel1, sel2) ? A : B`.
`two_input_two_select` is that cell. In a block, `A = sum0[k]`,
`B = ~sum0[k]`, `~sel1 = inv[k]` from the chain, and `sel2 = cin`: bit k is
inverted exactly when the carry-in is 1 and all lower bits of `sum0` are 1.
The ripple-carry adder already delivers every sum bit in both polarities, so
no inverters are needed in front of the multiplexers.

Bit 0 has no add-one control (it always flips when the carry-in is 1), so it
gets a plain multiplexer: `s[0] = cin ? ~sum0[0] : sum0[0]`.

## The block carry out

With carry-in 0 the block's carry out is the ripple adder's carry `cout0`.
With carry-in 1 it is `cout0 | all_ones`. The two terms never occur together
(if `a + b` already overflows the slice, `sum0` is at most all-ones minus one),
and both are needed: the all-ones flag alone would lose the carry for
`a = b = all ones` with carry-in 1. A final multiplexer steered by `cin` picks
between the two.

This OR is a deliberate departure from the published description, which
describes the carry-in-1 carry as the all-ones flag alone. Taken literally
that is arithmetically wrong in the case above; the testbench of `csa_block`
fails on that version.

## Inside the block's ripple-carry adder

`rca_block` computes `sum0`, `~sum0` and `cout0` for one slice:

- bit 0 is a half adder, since the carry-in-0 adder has no carry-in;
- bits 1 .. N-2 are mirror full adders without their output inverters
  (`mirror_fa`, whose outputs are `~sum` and `~cout`);
- bit N-1 is `fa2`, a full adder with two XOR levels for the sum and two NAND
  levels for the carry. The top sum bit feeds the first-zero chain's last link
  and so the block's carry-in-1 carry; making it fast keeps the block as fast
  as a dual-adder block.

The middle cells drop the inverter from the carry path by alternating
polarity. A full adder is self-dual: inverting all three inputs inverts both
outputs. An odd cell (bit 1, 3, ...) takes the true carry and true operands
and emits `~carry`; the next, even cell takes that `~carry` with inverted
operands and so emits the true carry and the true sum. The operand inverters
are off the carry path. If N is odd the carry reaching `fa2` is inverted, and
one inverter restores it. For N = 1 the block is the half adder alone; for
N = 2 it is a half adder and `fa2`.

## Block plan

`csa64` splits the 64 bits into ten blocks, least significant first:

| block       | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9  | 10 |
|-------------|---|---|---|---|---|---|---|---|----|----|
| width       | 2 | 2 | 3 | 4 | 6 | 7 | 8 | 9 | 11 | 12 |
| first bit   | 0 | 2 | 4 | 7 | 11| 17| 24| 32| 41 | 52 |

Widths grow with the arrival time of the block carry ("square-root" plan), so
that each block's local work finishes about when its carry-in arrives. Block 1
is a plain `rca_block` (the adder has no carry-in, so its carry-in-0 result is
final); blocks 2 to 10 are `csa_block`. The only path across the word is one
multiplexer per block.

The plan is the `BLOCK_SIZE` parameter of `csa64` (defaults in `csa_pkg`); the
word width is derived from it. Any list of ten widths of at least 1 works.

The worst case for delay is a carry generated at bit 0 and propagated by every
other bit (`a[0] = b[0] = 1`, `a[k] ^ b[k] = 1` for k >= 1). In this design
no carry ripples inside blocks 2 to 10 in that case: each of their `sum0` is
all ones with no local carry, and the carry crosses each of them through the
all-ones flag and the block's carry multiplexer.

## Interfaces and timing

| module                | parameters    | ports                                           |
|-----------------------|---------------|-------------------------------------------------|
| `csa64`               | `BLOCK_SIZE`  | `a[63:0]`, `b[63:0]` in; `s[63:0]`, `cout` out  |
| `csa_block`           | `N` (4)       | `a`, `b` `[N-1:0]`, `cin` in; `s`, `cout` out   |
| `rca_block`           | `N` (4)       | `a`, `b` in; `sum`, `sum_n`, `cout` out         |
| `first_zero_chain`    | `N` (4)       | `sum` in; `inv[N-1:0]`, `all_ones` out          |
| `two_input_two_select`| none          | `a`, `b`, `sel1_n`, `sel2` in; `y` out          |
| `half_adder`, `fa2`, `mirror_fa` | none | single-bit cells                           |

Everything is combinational: no clock, no reset, no registers. `csa_pkg` holds
the block count, the default plan and the offset helper.

## What is the published design and what is not

Taken from the published circuit: the single carry-in-0 adder per block; the
first-zero add-one rule; the swapped first-zero chain; the merged
NAND-steered multiplexer; half adder at the bottom and the XOR/NAND full adder
at the top of each block; the alternating-polarity mirror adder chain; the
ten-block 64-bit plan.

Choices made here:

- The block carry for carry-in 1 is `cout0 | all_ones` (see above).
- The published text is inconsistent about the polarity of the first-zero
  chain's control; this design follows the arithmetic: invert bit k when all
  lower bits of `sum0` are ones.
- Block 1 is the least significant block, a plain ripple adder; the adder has
  no carry-in port; the top block's carry is brought out as `cout`.
- How `fa2` joins the alternating chain (the restoring inverter for odd N) and
  its exact NAND arrangement.
- Cells are modelled by their logic function. The buffer the circuit has
  midway along each first-zero chain has no logic function and is left out.
  Delay, power and transistor counts are not modelled.

## Testbenches and how to run them

Each module has a self-checking testbench in `tb/` that compares with integer
arithmetic and prints `TB_RESULT checks=N failures=M`:

- `tb_half_adder`, `tb_fa2`, `tb_mirror_fa` (including self-duality),
  `tb_two_input_two_select` (against the two-multiplexer cascade): exhaustive.
- `tb_first_zero_chain`: every 8-bit and 4-bit input, against a trailing-ones
  count and against `sum + 1`.
- `tb_rca_block`: every width 1 to 12; exhaustive up to 6 bits, corners and
  random operands above.
- `tb_csa_block`: the 4-bit block exhaustively, every other width used by the
  adder with corners and random operands.
- `tb_csa64`: the 64-bit adder at its default plan; the worst-case carry
  pattern, corners, a carry generated at the bottom of each block, and 20000
  random and long-run-of-ones vectors. It also counts, per carry-select block,
  how often each mechanism decided the result (carry-in 0 pass-through,
  add-one inversion, all-ones carry, slice overflow with carry-in 1,
  worst-case path) and fails if one never happened.

Run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/csa_pkg.sv tb/tb_csa64.sv --top-module tb_csa64 -Mdir obj_csa64
    ./obj_csa64/Vtb_csa64

Every run takes well under a second.
