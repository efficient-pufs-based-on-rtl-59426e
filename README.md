# Race PUF key generator with extended Hamming error correction

A physical unclonable function (PUF) turns small, random manufacturing
differences between nominally identical circuits into bits that are
different on every chip. The bits are reproducible, but not perfectly so. This
design builds a key from such bits:

* an array of **race PUF slices** gives one raw bit per slice, and
* a **code-offset fuzzy extractor** built on the **extended Hamming code**
  (SECDED: single-error correcting, double-error detecting) removes the noise.

The key is never stored. At enrollment the design publishes *helper data*, which
can be kept in ordinary, untrusted memory outside the chip. Later, the helper
data and a fresh, slightly different PUF readout reproduce the same key. The
design corrects one flipped PUF bit per codeword and reports two.

The race slices are timing phenomena, so they exist here only as a
behavioural simulation model. Everything else is synthesizable
SystemVerilog.

## Block diagram

```
 enroll_i / regen_i
        |
   +----v-----+  Clear, Start   +-----------------+  response   +-----------------+
   | puf_ctrl |---------------->| puf_array       |------------>| code_offset_fe  |
   +----------+                 |  NBITS x        |             |  ehc_encoder x W|
        | sample, mode          |  puf_slice      |  challenge_i|  ehc_decoder x W|
        |                       +-----------------+             +-----------------+
        v                                                             |
   result registers in ehc_puf_top  <---------------------------------+
   helper_o / helper_valid_o     key_o / key_valid_o / corrected_o / uncorrectable_o
```

`ehc_puf_top` instantiates all of it. `puf_pkg` holds the operation and
sequencer state types.

## The PUF slice (`puf_slice`, behavioural model)

Each slice produces one bit from a race between two paths:

```
          Start ──┬──> REG_0 (toggle FF) ──[ path delay T0 ]──> Q0 ─┐
  Clear ──┤       │                                                 ├─ cross-coupled ─ Z0 ─> mux input 1 ─┐
          │       └──> REG_1 (toggle FF) ──[ path delay T1 ]──> Q1 ─┘  arbiter         Z1 ─> mux input 0 ─┴─> Response R
                                                                                      Challenge C ─> mux select
```

* **Clear** resets both flip-flops and puts the arbiter in its idle state,
  Z0 = Z1 = 1.
* A rising edge of **Start** toggles both flip-flops, so Q0 and Q1 rise.
  Q0 rises after T0 and Q1 after T1.
* The arbiter latches whichever of Q0 and Q1 arrives first and drives that
  side's Z low. It holds that state until the next Clear. A tie goes to Z0.
* The challenge multiplexer outputs Z0 when C = 1 and Z1 when C = 0. After a
  race the response is therefore `~C` when path 0 was faster and `C` when
  path 1 was faster.

Some parts of this structure are this implementation's own reading:

* the toggle connection of the flip-flops (D = Q′);
* Clear acting as an asynchronous reset;
* the arbiter's polarity and its tie rule.

On silicon the gates decide the polarity. A race won by a few picoseconds
cannot be expressed as synthesizable logic. The model therefore uses
simulation delays in picoseconds:

| parameter | meaning |
|---|---|
| `T0_PS`, `T1_PS` | the two path delays of this slice (its "manufacturing variation") |
| `JITTER_PS` | each race adds a fresh uniform offset in `[-JITTER_PS, +JITTER_PS]` to each path; slices whose two delays are close then give unstable bits, which is the noise the error correction must absorb |

Each flip-flop process sleeps through its path delay. If Clear arrives while
a race is still in flight, it takes effect only after that race has landed.
The sequencer never does this.

### `puf_array` (behavioural model)

`puf_array` holds `NBITS` slices. They share Clear and Start, and each slice has
its own challenge bit. A slice's delays come from the device seed:

```
T0(i) = BASE_PS + h(DEVICE_SEED, 2i)   mod SPREAD_PS
T1(i) = BASE_PS + h(DEVICE_SEED, 2i+1) mod SPREAD_PS     (+1 ps if equal to T0)
```

Here `h` is a 32-bit integer mixing function (multiply, xor-shift). Different seeds
stand for different chips. The defaults are `BASE_PS = 1000` and `SPREAD_PS = 64`,
so every response has settled 1.064 ns + `JITTER_PS` after Start rises.

## Extended Hamming code (`ehc_encoder`, `ehc_decoder`)

The code has parameter `M`, with `N = 2^M` codeword bits and `K = 2^M − M − 1`
data bits. The default `M = 3` gives the (8,4) code. The bit layout is the
textbook one:

| codeword bit | content |
|---|---|
| 0 | overall parity (XOR of bits 1..N−1) |
| 1, 2, 4, …, 2^(M−1) | Hamming parity: bit 2^i is the XOR of every other position whose index has bit i set |
| all other positions, ascending | data bits 0..K−1 (for M = 3: d0→3, d1→5, d2→6, d3→7) |

The decoder computes two values from the received word:

* the **syndrome**, the XOR of the indices of all set bits in positions 1..N−1;
* the **overall parity**, the XOR of all N bits.

It then decides:

| syndrome | parity | meaning | action |
|---|---|---|---|
| 0 | even | no error | pass data |
| any | odd | one error, at position = syndrome (0 = parity bit) | flip that bit, `corrected_o = 1` |
| ≠ 0 | even | two errors | `uncorrectable_o = 1`; data not trustworthy |

Three or more errors are beyond the code. They may be miscorrected without a
flag. Both modules are purely combinational.

## Fuzzy extractor (`code_offset_fe`)

The PUF response is split into `WORDS` words of N bits. Each word is handled
independently:

* **enroll:** `helper = w XOR Enc(key)`. Here `w` is the response word and `key`
  is K bits supplied by the user (`key_i`).
* **regenerate:** `Dec(w' XOR helper)`. The new response is `w' = w XOR e`, so
  this equals `Dec(Enc(key) XOR e)`. It returns `key` whenever the noise `e` has
  at most one set bit, and raises `uncorrectable` for two.

Both results are computed in parallel from the same response. The top level
decides which one to register.

The helper data hide the key only as far as the response is random. Each
word leaks N − K bits of the response.

## Sequencer (`puf_ctrl`) and timing

A request seen on a rising clock edge in cycle 0 runs through these steps:

| cycle | state | outputs |
|---|---|---|
| 1 | CLEAR | `puf_clear_o` |
| 2 | START | `puf_start_o` rises: the race is launched |
| 3 … S+2 | SETTLE | `puf_start_o` held (S = `SETTLE_CYCLES`) |
| S+3 | SAMPLE | `sample_o`: the response is taken; Start falls |

`busy_o` is high in cycles 1 … S+3. Requests that arrive while busy are
ignored. Enroll wins if both requests come together. Assertions check two
rules:

* Clear and Start are never high at the same time;
* every fall of Start coincides with a sample.

Start is high for S + 1 clock periods before the sample. That time must
exceed the slowest race.

## Top level (`ehc_puf_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `enroll_i` / `regen_i` | in | 1 | one-cycle request while `busy_o` is low |
| `challenge_i` | in | WORDS·N | one challenge bit per slice; use the same value at enrollment and regeneration |
| `key_i` | in | WORDS·K | key to enroll |
| `helper_i` | in | WORDS·N | stored helper data, for regeneration |
| `helper_o`, `helper_valid_o` | out | WORDS·N, 1 | helper data of the last enrollment; valid pulses once |
| `key_o`, `key_valid_o` | out | WORDS·K, 1 | regenerated key; valid pulses once |
| `corrected_o`, `uncorrectable_o` | out | WORDS each | per word: one error corrected / two errors detected |
| `busy_o` | out | 1 | operation in progress |

The valid pulse comes `SETTLE_CYCLES + 4` cycles after the request was
applied: 8 cycles at the defaults. The results then hold until the next
operation of the same kind. `key_i`, `helper_i` and `challenge_i` must stay
stable while `busy_o` is high.

Parameters and their defaults:

| parameter | default | note |
|---|---|---|
| `M` | 3 | code order, (8,4) code |
| `WORDS` | 1 | codewords, so 8 slices and a 4-bit key |
| `SETTLE_CYCLES` | 4 | race settling time in clock cycles |
| `DEVICE_SEED` | 1 | which simulated chip |
| `JITTER_PS` | 0 | PUF noise in the model |

A longer key needs a larger `WORDS`, `M`, or both. For example, `WORDS = 16`
gives a 64-bit key from 128 slices.

## What is given and what is chosen

These parts follow the original description of the design:

* the slice structure with the names REG_0, REG_1, Q0, Q1, Z0, Z1, T0, T1, Challenge and Response;
* the multiplexer's input assignment, Z0 on input 1 and Z1 on input 0;
* the use of an extended Hamming code for error detection and correction;
* the code-offset fuzzy extractor with helper data.

The following are choices of this implementation:

* the code length and the bit layout;
* the split into words;
* the key supplied on a port;
* helper data kept outside;
* the sequencer, its timing and the register interface;
* the toggle/Clear reading of the slice flip-flops;
* the arbiter polarity and tie rule;
* all delay values and the seed-based delay model.

The original design was reported at 2 slices and 4 4-input LUTs on a Spartan-3E,
which fits a single (8,4) codeword and is why that is the default.

What is not here:

* the physical placement and routing constraints that make the race real on
  an FPGA;
* any source of the enrolled key (for example a random number generator);
* storage for helper data;
* per-device tuning of the slices.

## Simulating

Every file begins with a description of its module. Testbenches are
self-checking and print `TB_RESULT checks=N failures=F`. They need a
simulator with timing support, because the PUF model uses delays. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/puf_pkg.sv tb/ehc_ref_pkg.sv rtl/*.sv tb/tb_ehc_puf_top.sv \
  --top-module tb_ehc_puf_top
./obj_dir/Vtb_ehc_puf_top
```

| testbench | what it checks |
|---|---|
| `tb_ehc_encoder` | (8,4): all data words against explicit parity equations; (16,11): all data words for zero syndrome, even parity and data placement, and minimum distance 4 on sampled pairs |
| `tb_ehc_decoder` | (8,4): all 256 words against a brute-force nearest-codeword decoder (16 clean, 128 correctable, 112 double-error words); (16,11): random words with 0/1/2 injected errors |
| `tb_code_offset_fe` | helper data and regeneration for two words with 0, 1 or 2 flips each |
| `tb_puf_ctrl` | cycle-exact Clear/Start/sample/busy schedule, mode, ignored requests, priority |
| `tb_puf_slice` | idle after Clear, no change before the faster path lands, outcome versus challenge for either path winning, and that a near-tied noisy slice gives both values |
| `tb_puf_array` | response against a prediction from each slice's delay parameters for several challenges and three seeds; repeatability; distinct devices |
| `tb_ehc_puf_top` | end to end with 2 words and 12 ps jitter: one enrollment and 400 regenerations; clean, corrected and double-detected words must each occur and match a prediction from the raw response flips; latency |
| `tb_ehc_puf_top_full` | the top at its default parameters: 20 enroll/regenerate pairs with random keys and challenges, helper data, key and 8-cycle latency |

`tb/ehc_ref_pkg.sv` holds the reference (8,4) code used by the
testbenches. All of them finish in well under a second.
