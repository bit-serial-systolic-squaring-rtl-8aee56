# Bit-serial systolic squarers

Squaring a number is a multiplication with both operands the same, and the
extra information can be used to save hardware. This RTL holds two bit-serial
systolic squarers. Each is a linear chain of small, nearly identical cells
that talk only to their neighbours. Each squares an n-bit number with
hardware linear in n, taking time linear in n. For comparison, a bit-parallel
systolic squarer needs hardware quadratic in n.

- **Algorithm I** (`alg1_array`) uses ceil(n/2) cells. The operand goes in at
  one end, is reflected at the far end, and the square comes out at the end
  where the operand went in.
- **Algorithm II** (`alg2_array`) uses n cells. The operand goes in at one
  end, and the square comes out at the other end.

Both arrays are wrapped in I/O cells that take a parallel operand and return
its parallel 2n-bit square. `squarer_top` places the two side by side.

## The idea: one stream, copied once

Square a = sum a_i 2^i. The square needs every product a_i·a_j. Two facts
about these products are used:

1. a_i·a_j = a_j·a_i. Each pair i ≠ j is therefore formed only once, at
   double weight.
2. Bit i of a stream meets bit i of an identical stream at one place only.
   So the second operand stream need not be supplied from outside. It is
   copied from the first stream in a single **special cell**.

The product a_i·a_i formed in the special cell must count at *single* weight
while every other product counts double. Therefore every product is
accumulated one result position lower than its true weight. The special
cell's a_i·a_i then lands at half weight, one position below that. For a
single bit, a_i·a_i = a_i, so the special cell needs no multiplier for it.

Result bits travel through the array least significant first, so carries
move forward with them. Each cell adds its product bit(s) to the partial
result bits passing through it. The carry is kept inside the cell and added
when the same cell works on the result bits two positions higher. Three bits
are added at each step (partial result, product, carry), so one carry bit per
adder is enough. The partial products enter as zeros at the end where the
results start. Placing the special cell at that end saves it one input, and
both algorithms here do that.

## Algorithm I: counter-flowing streams

```
 operand in  ─▶ [X] ─▶ [X] ─▶ … ─▶ [X] ─▶ ┐
                                          [Y]  reflects
 p_lo, p_hi ◀─ [X] ◀─ [X] ◀─ … ◀─ [X] ◀─ ┘
              (CELLS-1 internal cells)
```

- The original stream moves right through **one** flip-flop per cell.
- The reflected stream moves left through **three** flip-flops per cell.
- If two streams moved in opposite directions with every flip-flop holding
  data, neighbouring bits would swap cells in one clock and never meet. So
  every other slot is a **dummy** (zero): a_i is presented in cycle 2i.
- With this spacing every pair of bits meets exactly once.
- In any cycle a cell either works on two real products or only on dummies.

Each internal cell (`alg1_cell`) forms two products:

- u1·r and u3·r, where u1 and u3 are the first and third reflected-stream
  flip-flops and r is the original-stream flip-flop.
- Each product goes into its own result line through a full adder. The lower
  adder's carry feeds the upper adder.
- The upper adder's carry returns to the lower adder through two flip-flops,
  because the cell next works on real bits two cycles later.

The result moves left at one cell per cycle on two lines:

- `p_lo` carries the even-indexed bits.
- `p_hi` carries the odd-indexed bits.

The reflecting cell (`alg1_special`) has three operand flip-flops. It adds
a_i (the square of the bit) to a_(i-1)·a_i in a half adder, and starts both
result lines.

The slots left free by the dummies can carry a second operand, one cycle
behind the first. The array then computes two independent squares at once
with no extra hardware. `alg1_io` does this when `in_dual` is set.

## Algorithm II: streams in the same direction

```
 operand in ─▶ [Y] ═▶ [X] ═▶ [X] ═▶ … ═▶ [X] ═▶ p_lo, p_hi
               copies  (N-1 internal cells, four lines between cells)
```

- The special cell (`alg2_special`) latches each incoming bit and sends it on
  two operand lines: a slow copy (two flip-flops per cell) and a fast copy
  (one flip-flop per cell). The fast copy overtakes the slow one, so every
  pair of bits meets. No dummies are needed.
- The special cell puts a_i on the upper result line and 0 on the lower one.
- Each internal cell (`alg2_cell`) forms one product per cycle: the older
  slow bit times the fast bit.
- The two result lines cross at each cell's input, so every result bit passes
  three flip-flops every two cells.
- The carry is kept for one cycle. The cell handles the next result pair in
  the very next cycle.

**Departure from the source drawing.** The published drawing of the
algorithm II cell shows the carry fed back through two latches, and the text
counts 8 latches per cell for both algorithms. With two carry flip-flops the
array computes wrong squares, because the carry arrives one cycle late. The
text elsewhere says the carry is used "one or two clock periods later"
depending on the algorithm. This implementation uses one carry flip-flop, so
the cell has 7 flip-flops, and the squares are correct. The fault copy used
to test `tb_alg2_cell` is exactly the two-flip-flop version, and the
testbench rejects it.

## Serial formats and timing

In the table below, a_0 is presented in cycle 0, and D is the cycle of the
first output.

| | algorithm I | algorithm II |
|---|---|---|
| cells | ceil(n/2) | n |
| operand bits | a_i in cycle 2i (odd cycles: dummy or 2nd operand) | a_i in cycle i |
| delay D | 2·ceil(n/2) (= n for even n) | floor(3n/2) |
| result bits | p_2i on `p_lo`, p_2i+1 on `p_hi`, cycle D+2i | n even: p_2i on `p_lo`, p_2i+1 on `p_hi`, cycle D+i. n odd: p_2i on `p_hi` in cycle D+i, p_2i+1 on `p_lo` in cycle D+i+1 |
| computation time (first bit in to last bit out) | 3n−1 | floor(5n/2) |
| period between operands (latency) | 4n−2 | 2n−1 |
| zero bits between operands | n−1 | n−1 |

The figures for even n are those of the published complexity analysis.
`tb_complexity_table` measures them at n = 4, 8, 16 and 32. The odd-n
formulas are checked by `tb_alg1_array` and `tb_alg2_array` at n = 7.

## I/O cells and the top

The I/O cells are this design's own, since the source leaves them to the
implementation.

- **Operand side:** both use a valid/ready handshake. An operand is taken when
  both are high.
- **Sending:** the operand is shifted out in the serial format above, and
  zeros are padded until the period has passed. A new operand can be taken in
  the last cycle of a period, so back-to-back operands run at full rate.
- **Gathering:** the result lines are shifted into an accumulator. The
  square is then presented for one cycle with `out_valid` and held until the
  next result. There is no back-pressure.
- **`alg1_io`:** counts cycles within the period to find the result bits.
  With `in_dual` it sends `in_op1` in the dummy slots and returns both squares.
- **`alg2_io`:** here the result emerges after the next operand may already
  have started. So a start marker travels through a floor(3n/2)-stage shift
  register to time the gathering.

`squarer_top #(N)` joins each I/O cell to its array. The default is N = 16.
The ports are:

- algorithm I: `a1_valid/a1_ready/a1_dual/a1_op0/a1_op1` in,
  `s1_valid/s1_dual/s1_sq0/s1_sq1` out;
- algorithm II: `a2_valid/a2_ready/a2_op` in, `s2_valid/s2_sq` out.

For even N:

- algorithm I: a result appears 3N+1 cycles after its operand is taken, and
  operands can be taken every 4N−2 cycles;
- algorithm II: a result appears floor(5N/2)+1 cycles after its operand is
  taken, and operands can be taken every 2N−1 cycles.

## Choices not taken from the source

- **Operand length:** the source gives no number. N = 16 (8 cells for
  algorithm I) is assumed. An odd N is supported: algorithm I then uses
  ceil(N/2) cells and zero-extends the operand.
- **Clocking:** every latch of the drawings is a rising-edge flip-flop, all on
  one clock.
- **Reset:** a synchronous, active-high `rst` clears every flip-flop. The
  source mentions no reset. Without one, the stored carries would start at
  random values.
- **Bits, not digits:** the derivation allows multi-bit digits (e.g. bytes).
  Only the bit-serial form, drawn in the source, is built: multipliers are AND
  gates and the squarer is a wire.
- **Not built:** the variant with the reflected stream as the fast one
  ("Ib"), arrays with copying in several cells, and other stream speeds. The
  source discusses these only as less attractive alternatives.
  Also not built: folding algorithm I's half-idle cells by sharing resources
  or using a two-phase clock. The source names this as a possibility without
  designing it. Here the idle half is used by the dual mode instead.

## Files

| file | content |
|---|---|
| `rtl/bsq_pkg.sv` | full-adder function, structs for the lines between cells |
| `rtl/alg1_cell.sv`, `rtl/alg1_special.sv`, `rtl/alg1_array.sv` | algorithm I |
| `rtl/alg2_cell.sv`, `rtl/alg2_special.sv`, `rtl/alg2_array.sv` | algorithm II |
| `rtl/alg1_io.sv`, `rtl/alg2_io.sv` | I/O cells |
| `rtl/squarer_top.sv` | both squarers side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_complexity_table.sv` | measures delay, computation time and latency against the formulas |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
They check against squares computed with integer arithmetic in the
testbench. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bsq_pkg.sv \
    tb/tb_squarer_top.sv --top-module tb_squarer_top
./obj_dir/Vtb_squarer_top
```

The same command works for any other testbench name.

- `tb_squarer_top` runs the top at its default size. It counts single and
  dual computations, back-to-back starts and starts after idle gaps, and
  fails if any of them never happened.
- The array testbenches check every result bit at its exact cycle and line.
- The cell testbenches compare every output, every cycle, with a reference
  updated in integer arithmetic.

All simulations finish in well under a second.
