# Iterative byte-serial MAC for DNN inference and training

Inference of a quantised neural network needs only 8-bit multiplications,
but training needs much wider numbers: local gradients here are 40-bit
fixed point. Building a 40-bit multiplier for training wastes area and energy
during inference. This design takes the other route. It uses a single
8x8-bit multiplier and reuses it over time, one byte pair per clock, to build
wider products. It also exploits the error tolerance of neural networks.
The partial product of the two upper bytes is computed first. Once a partial
product is large enough, the less significant ones cannot change the result
by more than about 5%, so the unit stops early.

- An 8-bit inference product takes one clock.
- A 16x16-bit product takes 1 to 4 clocks.
- A 40x8-bit gradient product takes 1 to 5 clocks.
- A full 40x16-bit product takes up to 10 clocks.

The number of clocks depends on the data and on the selected mode.

The idea and its key numbers come from R. Machupalli, *Hardware Accelerators
for Deep Neural Networks* (M.Sc. thesis, chapter 3). That work describes the
arithmetic: byte splitting, upper bytes first, the threshold test and the
value 1639. The register-transfer structure, the interface and everything
listed under "Design choices" below belong to this implementation.

## Splitting a product into byte pairs

A two's-complement operand of n bytes is written as

    A = a[n-1]*2^(8(n-1)) + ... + a[1]*2^8 + a[0]

The top byte `a[n-1]` is signed (-128..127) and every lower byte is unsigned
(0..255). This split is exact for every value. It also keeps the sign in the
upper-byte product, which is the only product that may be computed. The
product A*B is then the sum over all byte pairs:

    A*B = sum over (i,j) of a[i]*b[j] * 2^(8(i+j))

Each term `a[i]*b[j]` is one pass through the 8x8 multiplier. Depending on
which bytes meet, it is signed x signed, signed x unsigned or
unsigned x unsigned, so the multiplier gets a "sign byte" flag for each
input. Every partial product lies in -32640..65025 and fits 17 signed bits.

The pairs are visited by **falling significance** `i+j`. Within one
significance level, the pair with the larger A index comes first. For
16x16 bits the order is:

| clock | pair    | weight | worked example C = 6244 = (24,100), D = 3272 = (12,200) |
|-------|---------|--------|---------------------------------------------------------|
| 1     | a1 * b1 | 2^16   | 24*12 = 288      -> running sum 18,874,368                |
| 2     | a1 * b0 | 2^8    | 24*200 = 4800    -> 20,103,168                           |
| 3     | a0 * b1 | 2^8    | 100*12 = 1200    -> 20,410,368                           |
| 4     | a0 * b0 | 1      | 100*200 = 20000  -> 20,430,368 (exact)                   |

For a 40-bit gradient times an 8-bit weight the order is simply a4*b0,
a3*b0, ..., a0*b0.

## Stopping early: the threshold

After each partial product, its magnitude is compared with a threshold. The
default is **1639**, which is 5% of 32768, the largest magnitude of a signed
16-bit upper-byte product.

- If |partial product| >= threshold, the operation ends. The remaining
  partial products are at least 256 times less significant.
- If it is below the threshold, the next pair is computed.
- The operation always ends when every pair has been computed.

There are two readings of when the test is applied, and both are built. Each
operation selects one with `in_policy`:

- `CHECK_EACH`: every partial product is tested. This is the flow of the
  original unit and the default in the testbenches. For the example above,
  288 < 1639, so the unit continues. Then 4800 >= 1639, so it stops after two
  clocks with 20,103,168 (1.6% low).
- `CHECK_FIRST`: only the upper-byte product is tested. If it is below the
  threshold, all remaining pairs are computed. For the example above this
  gives all four pairs and the exact result.

The threshold is a per-operation input (`in_threshold`, 17 bits):

- A value of 0 always stops after one pair.
- Any value above 65025 never stops early.

Measured on all 65,536 16-bit inputs with x^2 and the default threshold:

- 68% of squares finish after the upper-byte product.
- Those squares are never more than 5.04% off the exact value.

The worst case is a negative x just above -41*256, because the unsigned low
byte was dropped.

## Modes

`in_mode` selects how many pairs an operation may use:

| mode             | pairs computed                            | typical use                                     |
|------------------|-------------------------------------------|-------------------------------------------------|
| `MODE_SINGLE`    | only the upper-byte pair                  | 8x8 inference (exact); cheapest approximation of a wide product |
| `MODE_THRESHOLD` | until the threshold test stops it         | training with 40-bit gradients                  |
| `MODE_FULL`      | all pairs                                 | exact wide product (a conventional full MAC)    |

Operand sizes are also set per operation: `in_a_bytes` is 1..A_BYTES and
`in_b_bytes` is 1..B_BYTES. This lets one unit serve inference and training
without reconfiguration.

## Accumulation

Each partial product is sign-extended and shifted left by 8*(i+j). It is
then added to a 64-bit accumulator. Successive operations keep adding to it,
so a stream of products forms a dot product (a neuron's sum, or a local
gradient sum over the next layer). Setting `in_acc_clear` on an operation
makes it start a new sum. The accumulator wraps on overflow.

- A 40x16 product needs 57 bits, which leaves 7 guard bits.
- 8-bit inference sums use about 24 bits.

## Interface and timing (`imac`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | an operation is taken on an edge where both are high |
| `in_a`, `in_b` | in | 8*A_BYTES, 8*B_BYTES | operands; only the low `in_a_bytes` / `in_b_bytes` bytes are used |
| `in_a_bytes`, `in_b_bytes` | in | 4 | operand sizes in bytes; 0 counts as 1, too large counts as the maximum |
| `in_mode`, `in_policy` | in | 2, 1 | `imac_mode_e`, `check_policy_e` (in `imac_pkg`) |
| `in_threshold` | in | 17 | threshold on the partial-product magnitude (`THRESH_5PCT` = 1639) |
| `in_acc_clear` | in | 1 | this operation starts a new sum |
| `acc` | out | ACC_W | the running sum, signed |
| `out_valid` | out | 1 | one-cycle pulse: `acc` now includes the operation just finished |
| `out_iters` | out | 7 | number of partial products that operation used |
| `busy` | out | 1 | an operation is in progress |

Suppose an operation is taken at edge E0 and needs k partial products:

- It adds them at edges E1..Ek.
- `out_valid` is high during the cycle after Ek.
- `in_ready` is high when the unit is idle and also during the last
  iteration. A waiting operation is therefore taken at Ek, with no gap.

A stream of operations therefore costs exactly the sum of their partial
product counts in clocks. For 8-bit inference this is one product per clock.
The operands and threshold are registered when an operation is taken, so the
inputs may change right after.

## Structure

```
            +-------------- imac -------------------------------------------+
 in_a,in_b ->| operand regs -> byte select --> byte_mult --> pp (17 b)      |
            |                    ^  ^ sign flags        |    |              |
            |                    |  |                   v    v              |
            |                pp_sequencer <--more-- pp_threshold  shift_acc -> acc
            |                (pair order, stop rule,                  ^     |
            |                 iteration count)  --level,first--------+      |
            +---------------------------------------------------------------+
```

| file | content |
|------|---------|
| `rtl/imac_pkg.sv` | byte and product widths, default threshold, mode and policy enums |
| `rtl/byte_mult.sv` | 8x8 multiplier with a sign flag for each byte (combinational) |
| `rtl/pp_threshold.sv` | \|pp\| < threshold test (combinational) |
| `rtl/pp_sequencer.sv` | byte-pair order, stopping rule, back-to-back start, iteration count |
| `rtl/shift_acc.sv` | shift by 8*(i+j) and accumulate |
| `rtl/imac.sv` | top: handshake, operand registers, byte selection, wiring |

The datapath has no pipeline register. The critical path runs through the
byte multiplexer, the 8x8 multiplier and the 64-bit adder, and separately
through the multiplier, the comparator and the sequencer's next-state logic.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `A_BYTES` | 5 | widest A operand in bytes (40-bit local gradients) |
| `B_BYTES` | 2 | widest B operand in bytes (16 bits; 8-bit weights use 1) |
| `ACC_W`   | 64 | accumulator width; must be at least 17 + 8*(A_BYTES+B_BYTES-2) |

Operands of up to 8 bytes per side are supported, which gives up to 64
partial products. Larger operands need no extra multiplier, only more
clocks. This is checked with a 32x32-bit instance in `tb/imac_wide_tb.sv`.

## Design choices

The following behaviour was decided here; the original unit leaves it open:

- Signed operands are handled by the signed-top-byte split. The original
  works its example on positive numbers only.
- The order inside one significance level puts the larger A index first.
- A partial product equal to the threshold stops the operation.
- The `CHECK_FIRST` policy, `MODE_FULL`, and per-operation operand sizes.
- The accumulator is 64 bits. The original names a 32-bit register, which
  is enough for 16x16 products but not for 40-bit gradients.
- The accumulator wraps on overflow.
- The valid/ready handshake, the reset and the one-partial-product-per-clock
  timing.
- The unit receives whole operands and picks bytes from registers. Fetching
  only the upper byte from memory, and the lower bytes only on demand, is
  where the scheme would save memory bandwidth. That needs a memory
  organisation outside this unit, and none is included here.
- ReLU, requantisation between layers and weight storage are not part of
  the unit. The LeNet testbench does them itself.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
A watchdog ends every run.

| testbench | what it shows |
|-----------|---------------|
| `byte_mult_tb` | all 65,536 byte pairs x 4 sign combinations against integer products |
| `pp_threshold_tb` | every reachable partial product against 1639, 0, 2^17-1 and random thresholds |
| `shift_acc_tb` | random shifts, loads and idle cycles against a 64-bit integer model |
| `pp_sequencer_tb` | pair order against an independently sorted list; stop rule for all modes and policies; back-to-back starts; stray starts ignored |
| `imac_tb` | the unit at its default size, end to end (see below) |
| `imac_wide_tb` | a 32x32-bit instance, 1 to 16 partial products |
| `imac_lenet_tb` | LeNet-300-100 workloads (see below) |

`imac_tb` checks the following:

- the worked 6244 x 3272 example in every mode;
- 8-bit inference products;
- the widest 40x16 products;
- 20,000 random operations with every size, mode and policy;
- garbage in unused operand bytes and out-of-range byte counts.

For every result it checks the accumulator, the partial-product count and
the latency. It also checks that a waiting operation starts with no gap. It
counts each mechanism: every count from 1 to 10 partial products, early
stops, both policies, single and full mode, clears, stalls and back-to-back
starts. A mechanism that never occurs counts as a failure.

`imac_lenet_tb` runs LeNet-300-100 (784-300-100-10, fully connected):

- **Forward pass.** One input image with 8-bit (1,0,7) weights and
  activations: 266,200 products. Every neuron sum is exact, and each layer
  takes exactly one clock per product.
- **Local gradients.** The local gradients of both hidden layers are
  computed from 40-bit (1,16,23) gradients and 8-bit weights with the 5%
  threshold: 31,000 products. Every sum and count is checked against the
  reference model. With synthetic gradients concentrated near zero, every
  product needs a second partial product and about 60% need all five. The
  exact shares depend on the gradient distribution.
- **Squares.** x^2 is computed for all 16-bit x, with the 5% error bound
  described above.

The reference model used by the testbenches is `tb/imac_ref_pkg.sv`. It
recomputes the byte split, order and stopping rule with plain integer
arithmetic.

## Simulating

With Verilator 5 (every testbench is a top module without ports):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/imac_pkg.sv tb/imac_ref_pkg.sv tb/imac_tb.sv --top-module imac_tb -o sim
./obj_dir/sim
```

Replace `imac_tb` with any other testbench name. All runs finish within
seconds. The RTL needs no other files: packages first, then
the modules found through `-y rtl`.
