# Programmable FIR filter on a computation sharing multiplier

A transposed-form FIR filter multiplies every new input sample by all of its
coefficients in the same clock cycle. That is a vector-scalar product: one
scalar `x`, many coefficients `C_k`. This design does that product without
any general multipliers. It exploits the fact that every product has the same
multiplicand `x`.

Any 4-bit number other than zero is an odd number from 1 to 15, shifted left by
0 to 3 places. So `x * nibble` is one of eight precomputed odd multiples of `x`
(1x, 3x, 5x, …, 15x: the "alphabet"), shifted left by up to three places. The
design computes the eight alphabet multiples once per sample. Every
coefficient of every tap then shares them: each coefficient nibble only
selects one multiple and shifts it. A final adder sums the shifted pieces of
one coefficient. Together these units form the computation sharing multiplier
(CSHM). Every adder in it is a carry-select adder. Each 4-bit block of that
adder has a single ripple-carry adder and an *add-one* circuit in place of
the second ripple-carry adder.

Default configuration: 17-bit two's complement samples, 17-bit sign-magnitude
coefficients (16 magnitude bits plus a sign), 8 taps, a 36-bit output.

```
          x(n)
           |
   +---------------+     alphabet register
   | precomputer   |-->[ 1x 3x 5x 7x 9x 11x 13x 15x ]--+-------+---- ... ---+
   +---------------+                                   |       |            |
                                                     S&A C0  S&A C1  ...  S&A C7
                                                       |       |            |
                                                     [reg]   [reg]        [reg]
                                                       |       |            |
                               y(n) <------------------+<-[z]--+<-- ... <-[z]
```

Each S&A ("shift and add") unit holds four select units and one final adder.

## Number formats

| signal | format | default width |
|---|---|---|
| sample `x` | two's complement | `DATA_W` = 17 |
| coefficient | sign-magnitude; sign in the MSB, magnitude split into `NIBBLES` 4-bit nibbles | `4*NIBBLES+1` = 17 |
| alphabet multiple | two's complement | `DATA_W+4` = 21 |
| product `x*C` | two's complement | `DATA_W+4*NIBBLES` = 33 |
| filter output `y` | two's complement, cannot overflow | `DATA_W+4*NIBBLES+clog2(TAPS)` = 36 |

The coefficient is sign-magnitude, so the select units only ever see a
positive magnitude. The sign is applied once, inside the final adder.
Positive zero and negative zero both give a zero product.

## The alphabet precomputer (`precomputer`)

Each multiple takes one carry-select addition of shifted copies of `x`:

```
 3x =  2x + x      5x = 4x + x      7x = 8x + ~x + 1     9x = 8x + x
11x =  8x + 3x    13x = 8x + 5x    15x = 16x + ~x + 1
```

The two differences add the inverted sample with a carry-in of one. 11x and
13x reuse the 3x and 5x sums instead of adding three terms. Each output is
`DATA_W+4` bits wide, which just holds 15x for the most negative sample.

## The select unit (`select_unit`)

For one 4-bit nibble of the coefficient magnitude:

1. **Shifter.** Removes the nibble's trailing zeros. This gives the odd value
   `o` and the shift count `s` (0..3), with `nibble = o << s`.
2. **8:1 multiplexer.** Picks alphabet multiple `(o-1)/2`.
3. **Inverse shifter.** A barrel shifter (by 1, then by 2) shifts that
   multiple back left by `s`.
4. **AND gates.** Force the result to zero when the nibble is `0000`, which
   no odd multiple can express.

Example: nibble `1100` → odd value `0011`, select `001` (3x), shift 2, result
12x. The shifter depends only on the coefficient, which changes rarely.
Only the multiplexer and the inverse shifter lie on the sample's path.

## The final adder and the coefficient sign (`final_adder`)

This is the subtle part. The unit has three stages in order:

1. **Carry-save array.** Select unit `j` is weighted by `16^j`. One row of
   3:2 compressors per operand reduces the sign-extended, shifted partial
   products to a sum vector `S` and a carry vector `K`, with `S + K = P`,
   the product with the magnitude.
2. **XOR array.** Inverts both vectors when the coefficient is negative.
3. **Carry-select adder.** Adds the two vectors, with the sign bit as
   carry-in.

Inverting both vectors gives `~S + ~K = -(S+K) - 2`. The single carry-in
supplies only one of the two ones needed for a true negation. The design
closes that gap with one extra row in the carry-save array: `-1` (every bit
equal to the sign bit) when the coefficient is negative, zero otherwise.
Then `S + K = P - 1`, and the carry-select adder returns
`~S + ~K + 1 = -(P-1) - 2 + 1 = -P` exactly. This row is a choice of this
implementation. The published design says only that the sign's carry is
merged into the final carry-select adder. The testbenches check the result
against a plain signed product across the whole operand range, extremes
included.

## The carry-select adder with add-one circuits (`csel_adder`, `rca`, `add_one`)

A conventional carry-select adder holds two ripple-carry adders per block,
one for each possible carry-in. Here each 4-bit block has:

* one ripple-carry adder (`rca`) with carry-in 0, giving `S0` and carry `C0`;
* an add-one circuit (`add_one`) forming `S1 = S0 + 1`. It inverts every bit
  of `S0` from the LSB up to and including the first zero. In logic terms,
  bit `i` flips when bits `0..i-1` are all one, which is a prefix-AND chain
  and one XOR per bit. The same chain detects an all-ones `S0`. The block's
  carry-out for carry-in 1 is therefore `C0 | allones(S0)`.

The carry arriving at a block selects `S0`/`S1` and the matching carry-out,
so only one multiplexer per block lies on the carry path. The first block
uses the external carry-in as its select. If the width is not a multiple of
4, the last block is narrower. `BLK` sets the block size.

## The filter (`cshm_fir`, `cshm`)

`cshm` is the multiplier on its own: one precomputer shared by `LANES` S&A
units. With its defaults (`LANES=1`, no register) it is a combinational
17×17 multiplier. The filter instantiates it with one lane per tap. It also
sets `PRE_REG=1`, which registers the alphabet multiples. The filter also
holds the per-tap product registers, the transposed adder chain and the
coefficient register file.

The chain works in transposed direct form. Tap `TAPS-1` starts it, and each
register `z[k]` holds the partial sum that tap `k-1` adds to its own
product. The adder of tap 0 drives `y` without a register. The output is
```
y(n) = sum_{k=0}^{TAPS-1} C_k * x(n-k)
```

**Timing.** The filter takes one sample on every rising edge. A sample
presented before edge `t` is in the alphabet register after `t`, and its
products are registered at `t+1`. From `t+1` on, `y` shows that sample's
output: a latency of two edges, at one output per cycle. No handshake is
used.

**Programming coefficients.** Pulse `coef_we` with `coef_addr = k` and
`coef_wdata = C_k` (sign in the MSB). The new value is used from the next
cycle on. Writes to addresses of `TAPS` or more are ignored. A sample
already in the pipeline keeps the products it was given. Reprogramming while
the filter runs is therefore allowed; it takes effect tap by tap.

**Reset.** `rst_n` is asynchronous and active low. It clears the
coefficients, the alphabet register, the product registers and the chain.

## Where this implementation makes its own choices

* Default of 8 taps. The design is described at 8 taps in most places. It
  is also described at 10 taps (17×17 operands) and at 4 taps (4-bit
  samples, 8-bit coefficients). All three are simulated; `TAPS` sets the
  length.
* The `-1` correction row in the final adder (see above).
* The carry-save array is a simple linear array of 3:2 rows. A tree would
  be faster and gives the same sums.
* Reuse of the 3x and 5x sums for 11x and 13x.
* The coefficient write port, the reset, and the output and accumulator
  widths.
* The original work is a transistor-level 180 nm design, with pass-transistor
  multiplexers, a transmission-gate barrel shifter and dynamic add-one logic.
  Only the logic functions are modelled here. Nothing in this RTL supports
  claims about delay, power or transistor count.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `cshm_fir` | `DATA_W` | 17 | sample width |
| | `NIBBLES` | 4 | coefficient magnitude nibbles (coefficient = `4*NIBBLES+1` bits) |
| | `TAPS` | 8 | filter length |
| `cshm` | `LANES` | 1 | coefficients sharing one precomputer |
| | `PRE_REG` | 0 | register after the precomputer |
| `csel_adder` | `W`, `BLK` | 33, 4 | width, block size |

Shared constants and helper functions are in `cshm_pkg`.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_rca`, `tb_add_one` | exhaustive 4-bit (and 8-bit) truth tables |
| `tb_csel_adder` | 33-bit random and long carry runs, 4-bit exhaustive, 10-bit (short last block) |
| `tb_precomputer` | all eight multiples for extreme and random samples |
| `tb_select_unit` | all 16 nibbles; the `1100` → 3x, shift 2 example |
| `tb_final_adder` | random partial products with both signs; largest magnitudes |
| `tb_shift_and_add` | every single-nibble coefficient, both signs, negative zero, random |
| `tb_cshm` | the 17×17 multiplier; a registered 3-lane product with its one-cycle latency |
| `tb_cshm_fir` | default-size filter end to end: impulse response and latency, a random stream with coefficient rewrites, reset in mid-stream, extreme operands; counts every alphabet, shift, zero nibble and negative coefficient used |
| `tb_fir_workloads` | 8-tap and 4-tap filters with 4-bit samples and 8-bit coefficients, and a 10-tap 17×17 filter, against a reference model |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cshm_pkg.sv tb/tb_cshm_fir.sv \
          --top-module tb_cshm_fir -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl`, because each file in `rtl/` holds
one module named after it. Every testbench finishes in well under a second.
