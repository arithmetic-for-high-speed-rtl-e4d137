# Radix-4 pipeline FFT with 22-bit floating point arithmetic

This is a streaming FFT / inverse FFT processor. It takes **four complex samples per clock** and
delivers four transformed samples per clock without stopping, so a 10 MHz clock gives a
40 Msample/s complex data rate. The default build computes 4096-point transforms.

Two ideas carry the design:

* **Radix-4 pipeline.** The transform is a chain of identical-looking stages. Four data streams
  ("lanes") run in parallel through alternating *computational elements* (CE) and
  *delay commutators* (DC). A CE multiplies three lanes by twiddle factors and computes a 4-point
  DFT. A DC reorders the data between stages. It does this with fixed delays and a 4x4 rotating
  switch only, with no memory addressing. Only these two element types are needed. Different
  transform sizes use different numbers of stages, counter rates and delay lengths.
* **22-bit floating point.** Every word is a 16-bit two's complement fraction with a 6-bit
  two's complement exponent. That gives 16-bit-fixed-point precision over a very wide dynamic
  range, at a much lower cost than 32-bit floating point. The arithmetic is built from a model of
  a single-chip adder and a single-chip multiplier. Both round and limit in a defined way.

The design follows the processor described by Swartzlander and Eldon in *Arithmetic for High
Speed FFT Implementation* (TRW). The differences from that description are listed in the
last section.

```
 din[0..3] ─► CE1 ─► DC(256) ─► CE2 ─► DC(64) ─► CE3 ─► DC(16) ─► CE4 ─► DC(4) ─► CE5 ─► DC(1) ─► CE6 ─► dout[0..3]
```

## Number format (`fp22_pkg`)

| bits  | field    | meaning                                   |
|-------|----------|-------------------------------------------|
| 21:6  | `frac`   | two's complement fraction S, −1 ≤ S < 1   |
| 5:0   | `exp`    | two's complement exponent E, −32 … 31     |

The value is S·2^E. A number is *normalized* when its sign bit differs from the next bit, so
0.5 ≤ |S| < 1, or S = −1. **True zero** is fraction 0 with exponent −32. A complex word
(`cplx_t`) is 44 bits: `{re, im}`.

## The arithmetic units

### Adder (`fp22_adder`)

It has three register ranks and a latency of 3 clocks, and accepts one operation per clock.

1. **Input.** Registers A, B and the instruction {op, RND, SCA, LMT}, with active-low loads.
   A multiplexer in front of A can select the *accumulator path*: the result that is being
   written to the output register at the same edge. So an `acc` operation adds to the result of
   the operation issued two clocks earlier.
2. **Denormalize and ALU.** The operand with the smaller exponent is shifted right by the
   exponent difference. Bits shifted below the other operand's LSB are **dropped, not rounded**.
   The ALU forms a 17-bit sum. Subtraction inverts the subtrahend and adds a carry-in of one.
3. **Renormalize, round, scale, limit.**
   * If the sum needs 17 bits, it is shifted right once. With RND set, half an LSB is added first.
   * A 16-bit sum is shifted left until it is normalized. It is never rounded, because its
     rounding position is empty.
   * SCA halves the result.
   * The limiter acts **after** rounding. With LMT set, an exponent above 31 gives full scale of
     the same sign, and an exponent below −32 gives true zero. With LMT clear, overflow wraps the
     exponent. Underflow then leaves an unnormalized fraction at exponent −32.
   * Flags: zero, negative, overflow, underflow.

Operations (`add_op_e`): `ADD`, `SUB` (A−B), `RSUB` (B−A), `FIX2FLT` (A's fraction read as a
fixed-point number and normalized), `NORM` (normalize A), `FLT2FIX` (A shifted to exponent 0,
truncated, saturated when LMT is set).

Rounding always adds half an LSB and then truncates, so it is biased slightly upward. The
truncation during alignment is biased slightly downward. The two partly cancel. An error bound
that holds: one LSB of the larger operand plus half an LSB of the result. After cancellation,
most of that error can end up in the low bits of the normalized result.

### Multiplier (`fp22_mult`)

It is a 16×16 two's complement fraction multiplier plus a 6-bit exponent adder. When both inputs
are normalized, the 32-bit product needs at most one shift:

* one place left if |product| < 1/2,
* none,
* one place right, only for −1 × −1.

So the normalizer is a 3-way multiplexer. The exponent is adjusted by −1, 0 or +1 to match.
After it come rounding (half an LSB, then truncate) and the same limiter as the adder.

With `an` low the normalizer is off and the unit is a 16-bit fixed-point multiplier. The full
32-bit product is kept, and `ssel ^ asel` puts either the upper or the lower half on the output.

The control word {LMT_n, RND, AN, SSEL} passes through two registers so that it stays aligned
with its data. Latency is 3 clocks, one product per clock. Flags: overflow, underflow.

## How the data moves through the pipeline

This is the part that takes some thought. N = 4^L points; a frame lasts N/4 clocks.

**Input.** In clock t of a frame (t = 0 … N/4−1), lane k carries x[t + k·N/4]. So the four
lanes hold samples N/4 apart. Write every index in base 4. The lane number is then the top
digit, and the clock number holds the other L−1 digits.

**Stage s (CE).** The CE computes 4-point DFTs across the lanes, that is, across one index digit.
The radix-4 stages use decimation in time, but the input is in natural order. Stage 1 combines
the samples that differ in the top digit, and needs no twiddle (all twiddles are 1). Stage s
multiplies lane q by W^(q·K), where W = e^(∓j2π/4^s). K is formed from the frequency digits
already computed, which the commutators have moved into the upper clock digits: K is those
upper s−1 digits of t, **read in reverse order**. The butterfly is:

```
a = x0 + x2      b = x0 − x2      c = x1 + x3      d = x1 − x3
y0 = a + c       y2 = a − c       y1 = b ∓ j·d     y3 = b ± j·d      (upper sign: forward)
```

Multiplying by ±j costs nothing. It only swaps the real and imaginary parts and chooses adder
or subtractor.

**Delay commutator DC(X).** A DC swaps the lane digit with the clock digit of weight X. Lane i is
delayed by i·X. Then a switch rotates one step every X clocks: output j takes delayed lane
(c − j) mod 4, where c is a 2-bit counter. Finally output j is delayed by (3−j)·X. Every path
adds up to the same alignment, and the stage latency is 3X. The 64-point example (L = 3) below
gives position labels:

```
before DC(4):   lane0  0  1  2  3  4  5 ... 15        (label = t + 16·lane)
                lane1 16 17 18 ...          31
                ...
after DC(4):    lane0  0  1  2  3 16 17 18 19 32 33 34 35 48 49 50 51
                lane1  4  5  6  7 20 21 22 23 36 ...
                lane2  8  9 10 11 24 ...
                lane3 12 13 14 15 28 ...                 (lanes now 4 apart)
after DC(1):    lane0  0  4  8 12 16 20 ...              (lanes now 1 apart)
                lane1  1  5  9 13 17 ...
```

**Output.** After the last CE, lane k in clock t carries **X[rev(t) + k·N/4]**. Here rev()
reverses the L−1 base-4 digits of t. The lanes are in natural order (N/4 apart). Within a lane
the order is digit-reversed. A consumer that needs natural order must reorder the output.

## Delay commutator chip (`dc_chip`, `tapped_sr`, `dc_stage`)

The chip is a 4-bit slice of a DC.

* **Input shift registers.** They are 256, 512 and 768 words long, on lanes 1 to 3. Each has
  taps at 1, 4, 16, 64 and 256 times its multiple. DELAY LENGTH (3 bits) picks the tap, so
  X = 4^code. Lane 0 has no input register.
* **Switch.** Four 4:1 multiplexers form the switch.
* **Output shift registers.** They are 768, 512 and 256 words long, on outputs 0 to 2, set to
  3X, 2X and X. Output 3 has no output register.
* **Rate counter.** A divide-by-4096 prescaler has taps at its even stages (periods 1, 4, 16,
  64, 256, 1024). COUNT SELECT picks one tap, and the 2-bit commutator counter advances at that
  rate. Codes 6 and 7 stop it.
* **CTR RESET.** It clears and holds the counter. The switch then stays in one fixed
  permutation, and the chip is a set of plain delays. Such chips can be cascaded to lengthen the
  delays of larger transforms.

Each chip holds 3072 words × 4 bits = 12,288 register stages. `dc_stage` puts **eleven chips**
side by side for the 44-bit complex word, with shared controls. It holds CTR RESET until the first
`sync_in`, so the counter is 0 for the first X words of every frame. It also carries the frame
marker and the transform direction along with the data, delayed by 3X.

## Computational element (`fft_ce`, `twiddle_gen`, `cplx_mult`)

* **Multipliers.** There are three complex multipliers (`cplx_mult`). Each is four `fp22_mult`
  units followed by one subtracting `fp22_adder` and one adding `fp22_adder`, so its latency is
  6 clocks. Lane 0 goes through a matching 6-clock delay.
* **Butterfly.** It is two layers of eight `fp22_adder` units each.
* **Latency and flags.** The CE latency is 12 clocks. Rounding and limiting are always on, and
  all overflow flags are ORed into `ovf`.
* **Twiddle generator (`twiddle_gen`).** A frame counter restarts on `sync`. The twiddle angle
  is an index into a 4096-step circle: idx = q·K·4^(6−s). This makes one table serve every
  transform size up to 4096 points.
* **Twiddle table.** `rtl/twiddle_cos.hex` holds one quadrant: entry i = cos(2πi/4096) for
  i = 0 … 1024, in fp22 rounded to nearest, with entry 1024 = true zero. Sines and the other
  quadrants come from symmetry. Negation keeps numbers normalized: −0.5 becomes −1·2^(E−1).

## Top level (`fft_pipeline`)

| port       | dir | width          | meaning |
|------------|-----|----------------|---------|
| `clk`, `rst` | in | 1           | clock; synchronous reset |
| `sync_in`  | in  | 1              | high in the first clock of the first frame, and optionally at every later frame start |
| `inverse`  | in  | 1              | inverse transform (conjugate twiddles, no 1/N scaling); can change between frames |
| `din[4]`   | in  | 4 × 44         | lane k = x[t + k·N/4] |
| `dout[4]`  | out | 4 × 44         | lane k = X[rev(t) + k·N/4] |
| `sync_out` | out | 1              | first clock of each output frame |
| `ovf`      | out | 1              | exponent overflow somewhere in the arithmetic |

Parameters: `LOG4N` (default 6, range 2 … 6) and `DC_MAX_X` (default 256, the chip's longest X).

* **Timing.** Latency from the first word of a frame in to the first word out is
  `12·LOG4N + 4^(LOG4N−1) − 1` clocks. That is 1095 clocks for 4096 points and 51 for
  64 points. Frames must follow each other without gaps: there is no flow control.
* **Resources.** 12 multipliers and 22 adders per CE, and 55 commutator chips for 4096 points.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. Expected values are
computed independently in real arithmetic (`tb/fp22_tb_pkg.sv` converts between fp22 and
`real`).

| testbench | what it shows |
|-----------|---------------|
| `tb_fp22_adder` | exact words for growth, rounding on and off, cancellation, subtraction, scaling, over- and underflow with the limiter on and off, conversions, accumulation; latency 3; 400 random operations within the error bound |
| `tb_fp22_mult` | the three normalizer positions, rounding, limiting, fixed-point MSP/LSP; latency 3; 400 random products within ½ LSB |
| `tb_twiddle_gen` | all twiddles of the 4096-point last stage and of a 64-point stage, both directions, within 2^−15 |
| `tb_cplx_mult` | 500 random complex products, latency 6 |
| `tb_fft_ce` | a CE (stage 2 of 64 points) against a real-arithmetic reference, forward then inverse, latency 12 |
| `tb_dc_chip` | labelled data reordered correctly for X = 1, 4, 16; counter rate; fixed-delay mode |
| `tb_dc_stage` | 44-bit words through 11 slices for X = 4, 16; waits for sync; 3X latency of data and markers |
| `tb_fft_pipeline` | 64-point pipeline, five back-to-back frames: forward, inverse, an overflow frame (limited outputs, `ovf`), and a change of direction; latency and throughput; all commutator states |
| `tb_fft_full` | default 4096-point build: one forward and one inverse frame, all 8192 outputs against a direct DFT, with latency and throughput checked |

Accuracy with inputs in [−1, 1]: the largest error is about 5·10^−5 of the largest output
(64 points) and about 2·10^−4 of it (4096 points).

## Simulating

Run from the repository root, because the twiddle table is read as `rtl/twiddle_cos.hex`:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/fp22_pkg.sv tb/fp22_tb_pkg.sv \
          tb/tb_fft_full.sv --top-module tb_fft_full -Mdir obj_full -o sim
./obj_full/sim
```

Swap in any other testbench name. Modules are found through `-Irtl -Itb`. Compiling the
4096-point build takes about a minute, and the simulation takes under a second.

## Where this design departs from, or adds to, the original description

* **Framing.** The original gives no interface protocol. The `sync` marker, back-to-back frames
  and the output order are this design's.
* **Output order** is digit-reversed within each lane (see above). Nothing reorders it.
* **Transform size.** Only 16 … 4096 points (`LOG4N` 2 … 6) are built. The original also reaches
  16,384 points by cascading commutator chips in fixed-delay mode to form DC(1024). That
  arrangement is not described closely enough to build here.
* **Commutator.**
  * The rotation direction of the commutator is inferred from the worked 64-point data flow.
  * CTR RESET here also clears the prescaler, so a stage can be aligned to a frame.
  * The behaviour of unused DELAY LENGTH codes (5 … 7 select 256) and COUNT SELECT codes
    (6, 7 stop) is this design's choice.
* **CE structure.** The lane pairing in the butterfly and the split of each complex multiply
  into 4 multiplies and 2 adds are choices. The original's CE was about 80 ICs, and the count
  here is larger. The original used 66 commutator chips for 4096 points, and this design uses 55.
* **Arithmetic units.** The following are this design's choices:
  * the adder's instruction encoding,
  * the flag meanings (zero, negative, overflow, underflow; overflow and underflow for the
    multiplier),
  * true zero as exponent −32,
  * the fix-up of a rounded −0.5,
  * fixed-point-mode details of the multiplier.

  The input latch on the adder's A port is a register enable here. The flow-through (FT) and
  output-enable pins and the multiplier's third B-input register are not modelled. Outputs are
  always driven.
* **Twiddle table.** It is generated from the formula above. The original does not give its
  ROM contents or width.
* The programmable-length delay built as a RAM circular buffer, which the original considered
  and did not adopt, is not included.
