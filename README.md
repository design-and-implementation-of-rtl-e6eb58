# NTT polynomial multiplier for FV homomorphic encryption

This RTL is an accelerator for the most expensive step of encryption in the
Fan-Vercauteren (FV) scheme: multiplying a fresh random polynomial `u` by the
two public-key polynomials `p0` and `p1`. All three live in the ring
`Z_q[x]/(x^1024 + 1)`. The modulus `q` is any prime of 22 to 32 bits with
`q = 1 (mod 2048)`.

The keys stay inside the accelerator, already transformed into the NTT domain.
For each encryption the host streams `u` in and receives `u*p0` and `u*p1`.
In single mode it receives only `u*p0`, which is the one product that
decryption needs.

The design is sized so that computing takes about as long as moving the data
over the host link:

- 64 butterfly units work in parallel.
- A full 1024-point transform takes 80 cycles.
- The link delivers a polynomial in 256 beats of 128 bits.

Every operation runs in the same time whatever the data, which matters for
cryptographic use.

## What one job computes

For coefficients indexed by `i = 0..1023`, with `Psi` a primitive 2048-th root
of unity mod `q` and `w = Psi^2`:

1. Weighting: `u'[i] = u[i] * Psi^i`, applied as the beats arrive.
2. Forward NTT of `u'`, in place. It uses the decimation-in-frequency
   butterfly `(a, b) -> (a + b, w^e (a - b))`, spans 512 down to 1. The result
   is left in scrambled (bit-reversed) order and is never permuted.
3. Inner products `ū*p̄0` and `ū*p̄1`. The keys are stored in the same
   scrambled order, so the positions match without a permutation.
4. Inverse NTT of each product, in place. It uses the decimation-in-time
   butterfly `(a, b) -> (a + w^-e b, a - w^-e b)`, spans 1 up to 512. This
   butterfly takes the scrambled order and returns natural order, so no
   permutation is needed here either.
5. Unweighting: `y[i] * Psi^-i * n^-1`, applied as the beats leave.

Steps 1 and 5 turn the cyclic NTT into the negacyclic product that
`x^1024 + 1` needs. They cost no cycles of their own, because they are done
by four lane multipliers in the stream path.

## Modular arithmetic

All arithmetic is constant-time:

- **Addition** (`mod_add`) forms `a+b`, `a+b-q` and `a+b-2q` in parallel and
  picks the first one that is not negative.
- **Subtraction** (`mod_sub`) forms `a-b`, `a-b+q` and `a-b+2q` and picks in
  the same way.

Both keep a result of `K = 32` bits for lazy inputs, as long as `q > 2^31`.
For the fully reduced inputs used throughout this design they return a value
below `q` for any supported `q`.

**Multiplication** (`mod_mul`, 4 cycles) is a Montgomery product
`a * b * 2^-33 mod q`. It has two parts:

- `int_mul` builds the 32x32 product from four 16x16 core products (one DSP
  slice each) and an adder tree. A register sits after the core products and
  another after the tree.
- `mont_reduce` exploits `q = qH * 2^11 + 1`. Then `-q^-1 = -1 (mod 2^11)`,
  so no multiplication by the Montgomery constant is needed. Each of the
  three iterations is one multiply-accumulate:

  ```
  L  = T mod 2^11
  T2 = (-L) mod 2^11
  T  = (T >> 11) + qH * T2 + (T2[10] | L[10])      -- the last term is 1 iff L != 0
  ```

  After three iterations (`R = 2^33`), `T < 2q`, so one conditional
  subtraction finishes the job. Iterations 1 and 2 share a pipeline stage;
  iteration 3 and the subtraction share the next.

**Convention:** every constant that enters a multiplier as the second
operand is stored premultiplied by `R = 2^33 mod q` ("Montgomery form"). This
covers twiddles, keys and both `Psi` tables, and it makes every product come
out as an ordinary product. Data values are never in Montgomery form.

## The butterfly array and the coefficient banks

This is the part that needs the most care.

### Bank layout

Each polynomial memory (`poly_mem`) is 128 independent banks of 8 words.
Position `i` (10 bits) is stored at:

```
bank(i) = i[9:3] XOR {0000, i[2:0]}      word(i) = i[2:0]
```

In every cycle each of the 64 units (`ntt_unit`) reads two words and writes
two words, so every bank is read once and written once per cycle. A stage
(512 butterflies) therefore takes 8 cycles, and a transform takes 80 cycles
plus stalls.

### Which banks a unit serves

In a stage of span `2^s`, partners `i` and `i + 2^s` sit in banks that differ
in one bit:

```
j = s - 3   if s >= 3
j = s       if s < 3
```

Unit `u` (6 bits) serves the two banks formed by inserting one bit into `u`
at position `j`. The bank holding the lower position has that bit equal to
`c[j]` when `j < 3`, otherwise 0. Here `c` is the cycle within the stage.

The word each bank reads in cycle `c` is:

- `c`, for spans of 8 and more;
- `c XOR bank[2:0]`, for spans 1, 2 and 4.

With these rules every stage covers all 1024 positions exactly once without
a bank conflict. `tb_ntt_ctrl` checks this for every cycle of both
transforms. The index functions live in `ntt_pkg`.

### Timing and the write-back window

| Cycle      | Event                                               |
|------------|-----------------------------------------------------|
| `t`        | A read is issued.                                   |
| `t+1`      | The data reaches the unit.                          |
| `t+6`      | The result leaves the 5-cycle unit.                 |
| end of `t+6` | The result is written to its bank.                |

Stages that use the same access pattern read each word at the same cycle
offset, 8 cycles apart, so they can run back to back. This is the 8-cycle
in-place window that bounds the unit latency to 6 cycles.

When the pattern changes (between span 8 and span 4) and between operations,
`ntt_ctrl` idles for 6 cycles until all writes have landed. One job is:

| Phase                        | Cycles                    |
|------------------------------|---------------------------|
| forward NTT                  | 7×8 + 6 + 3×8 + 6 = 92    |
| inner product (64 per cycle) | 16 + 6 = 22               |
| inverse NTT                  | 92                        |

That gives **320 datapath cycles for two products and 206 for one**: 1.6 µs
and 1.03 µs at 200 MHz.

### The butterfly unit

`ntt_unit` has three modes, each with a latency of 5 cycles:

| Mode     | Cycle 1               | Cycles 2–5     | Cycle 5              |
|----------|-----------------------|----------------|----------------------|
| `BF_DIF` | add and subtract      | multiply       | —                    |
| `BF_DIT` | multiply (cycles 1–4) |                | add and subtract     |
| `BF_MUL` | multiply (cycles 1–4) |                | product alone        |

`BF_MUL` serves the inner products: a unit multiplies one word of `ū` by one
key word. Twiddles come from two small memories per unit (`sdp_ram`, 80 words
each: 10 stages × 8 cycles), one for `w` and one for `w^-1`. They are indexed
by `stage*8 + cycle`.

## Memories and job flow (`poly_mult_core`)

| Memory          | Holds                                                  |
|-----------------|--------------------------------------------------------|
| A0, A1          | `u`, then its transform (two input buffers)            |
| R0, R1 (×2 sets)| the two products, inverse-transformed in place         |
| K0, K1          | the keys                                               |

All eight are `poly_mem` instances. A job goes through three steps:

1. **Load**: accept 256 beats, weight them, write them into a free A buffer.
2. **Compute**: run `ntt_ctrl` on a full A buffer into a free result set.
3. **Output**: read R0, then R1, of a full result set in natural order, four
   words per cycle. Unweight them and send them.

The three steps run at the same time on different jobs: while job k is
computed, job k+1 loads and job k-1 drains. Each buffer has a full flag; a
step waits only when the buffer it needs is not ready. Back-to-back
single-product jobs therefore follow each other every 256 cycles, which is
the input transfer time (`tb_poly_mult_core` checks this). Two-product jobs
are limited by their 512 output beats.

Two sets of four lane multipliers (`psi_scaler`) weight the input and
unweight the output. They hold their `Psi^i` and `Psi^-i n^-1` tables
banked by lane.

The output multipliers cannot stall. Instead of a ready signal, the core
therefore issues an output beat only while the downstream buffer reports at
least 8 free entries (`out_free`).

## Top level and clocking (`ntt_accel_top`)

The host link runs on its own clock (250 MHz, a 128-bit stream) and the
datapath on another (200 MHz). Between them sit an input FIFO and an output
FIFO (`async_fifo`, 512 beats each, Gray-coded pointers). The PCIe endpoint
and its DMA driver are not part of this RTL. `rx_*` and `tx_*` are plain
valid/ready streams where that IP would connect.

The ports are:

- **Link clock domain**: `rx_valid`/`rx_ready`/`rx_data`,
  `tx_valid`/`tx_ready`/`tx_data`. Coefficient `4b + l` of a polynomial
  travels in beat `b`, bits `32l+31 : 32l`.
- **Datapath clock domain**:
  - `single` selects the mode; it is sampled with the first beat of a job.
  - `busy` and `ntt_busy` are status outputs.
  - The configuration port is `cfg_we`, `cfg_sel`, `cfg_addr` and
    `cfg_data`. Write it only while `busy` is low.

A two-product job returns 512 beats: `u*p0`, then `u*p1`.

### Configuration map

All values below are written in Montgomery form, that is `x * 2^33 mod q`,
except `q` itself.

| `cfg_sel`     | `cfg_addr`                         | value                                          |
|---------------|------------------------------------|------------------------------------------------|
| `CFG_MODULUS` | –                                  | `q`                                            |
| `CFG_TW_FWD`  | `unit*128 + stage*8 + cycle`       | `w^e`                                          |
| `CFG_TW_INV`  | same                               | `w^-e`                                         |
| `CFG_PSI`     | `i`                                | `Psi^i`                                        |
| `CFG_PSI_INV` | `i`                                | `Psi^-i * 1024^-1`                             |
| `CFG_KEY0/1`  | position `i`                       | word `i` of the DIF NTT of `p[j]*Psi^j`        |

The twiddle exponent `e` is computed for the lower position `i` of the pair
that the unit handles at that (stage, cycle), following the mapping above:

```
e = (i mod 2^s) * 512 / 2^s
```

The keys go in the scrambled order that the forward transform produces. This
means running the textbook DIF loop on `p[j]*Psi^j` and storing its output as
it stands, position by position. `tb/ntt_ref_pkg.sv` (`tw_exp`, `key_image`)
computes both tables this way.

## Files

| File | Contents |
|------|----------|
| `rtl/ntt_pkg.sv` | sizes, `bf_mode_t`, `cfg_sel_t`, `issue_t`, bank-mapping functions |
| `rtl/mod_add.sv`, `rtl/mod_sub.sv` | constant-time modular add / subtract |
| `rtl/int_mul.sv`, `rtl/mont_reduce.sv`, `rtl/mod_mul.sv` | 32-bit multiplier, Montgomery reduction, modular multiplier |
| `rtl/ntt_unit.sv` | butterfly, 3 modes, 5 cycles |
| `rtl/sdp_ram.sv`, `rtl/poly_mem.sv` | block-RAM model; 128-bank coefficient memory |
| `rtl/psi_scaler.sv` | stream-path weighting multipliers |
| `rtl/ntt_ctrl.sv` | job sequencer |
| `rtl/poly_mult_core.sv` | the multiplier (datapath clock domain) |
| `rtl/async_fifo.sv` | dual-clock FIFO |
| `rtl/ntt_accel_top.sv` | top: FIFOs plus core |
| `tb/ntt_ref_pkg.sv` | reference arithmetic, textbook NTT, schoolbook product, table layout |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, for the complete accelerator at full size (four
jobs, both clocks, back-pressure on both streams; under a minute including
the build):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/ntt_pkg.sv tb/ntt_ref_pkg.sv \
  tb/tb_ntt_accel_top.sv --top-module tb_ntt_accel_top
./obj_dir/Vtb_ntt_accel_top
```

Swap in another `tb_<module>.sv` and its top to run the others.

What the testbenches check:

- Products are checked against schoolbook negacyclic multiplication with
  22-, 27- and 32-bit primes (2101249, 132120577, 4293918721).
- Arithmetic blocks are checked against 64-bit integer arithmetic, with the
  latency checked to the cycle.
- `tb_ntt_accel_top` also checks the 320/206-cycle schedule. It counts every
  mechanism at least once:
  - forward NTT, both inner products, inverse NTT;
  - drain stalls;
  - both job modes;
  - transforms running while another job loads or drains;
  - output credit throttling;
  - input-FIFO-full and output back-pressure.

## Departures from the published design, and limits

- **Timing.** A job takes 320 datapath cycles for two products (1.6 µs) and
  206 for one (1.03 µs). The published figures are 1.3 µs and 1.25 µs. The
  difference comes from two things:
  - the 6-cycle drain stalls;
  - the inner products running as separate passes through the butterflies.
- **Pipelined rate.** With loading, computing and output overlapped, single
  products follow every 256 cycles: about 781K per second at 200 MHz,
  against the published figure of about 800K. The input transfer of 256
  beats sets the limit.
- **Multiplier count.** Input and output have their own four lane
  multipliers so that they can run at the same time. That is 72 modular
  multipliers (about 504 DSP blocks) against the published 476, which fits
  68 multipliers with the stream ones shared.
- **Inverse transform butterfly.** The inverse uses the decimation-in-time
  butterfly so that it reads the scrambled order directly. This is one
  reading of "slight modifications to the inverse NTT" that avoid a
  permutation.
- **Tables and modulus storage.**
  - The `Psi` tables are four lane-banked memories rather than 64 block RAMs.
  - The modulus is a single register rather than a memory.
  - The twiddle tables hold exactly the factor each unit needs at each
    (stage, cycle). This puts the layout burden on the host (see the
    configuration map).
- **Choices of this design**, none of them given by the published design:
  - bank placement, interconnect and stall rule;
  - the credit-based output;
  - the configuration port;
  - FIFO depths;
  - synchronous active-low resets.
- **Fixed size.** `poly_mult_core` is written for n = 1024, 64 units and 32-bit
  words. Its index arithmetic does not scale with the parameters, and an
  elaboration-time assertion says so.
- **Other Montgomery configurations.** Other moduli with more than 33 bits,
  or other degrees, would need another word size and iteration count in
  `mont_reduce`, whose `W` and `ITER` parameters are provided for that.
- **Not included.** The PCIe endpoint, the DMA driver and the host software
  are outside this RTL.
