# Fault-tolerant parallel FFTs: parity FFT plus Hamming-coded Parseval checks

A system that runs several FFTs side by side can protect them together more cheaply than
one by one. This design transforms four independent complex streams with four FFTs and
protects them against a soft error in any one of them. The protection uses

- **one extra (parity) FFT**, which transforms the sum of the four inputs, and
- **three sum-of-squares (Parseval) checks**. They do not check single FFTs. Each one
  checks a sum of three channels, chosen like the parity bits of a Hamming code.

Together the three check results name the faulty FFT. Its output is then rebuilt from
the parity FFT and the three healthy outputs. Protecting each FFT with its own check
would take four checks. Duplicating the bank would take four more FFTs. This scheme,
called *parity-SOS-ECC*, needs one FFT and three checks.

Everything is in SystemVerilog (IEEE 1800-2017) and synthesizable. The top module is
`second_tech`.

## The idea in two identities

**Linearity.** The DFT is linear, so the transform of a sum of inputs equals the sum of
their transforms:

    FFT(x1 + x2 + x3) = X1 + X2 + X3

**Parseval.** An unnormalised N-point DFT multiplies the signal energy by N:

    sum_k |X[k]|^2 = N * sum_n |x[n]|^2

Put them together. Build the time-domain sum x5 = x1 + x2 + x3 from the inputs. Build the
frequency-domain sum X5 = X1 + X2 + X3 from the FFT outputs. If FFTs 1, 2 and 3 are
correct, X5 is the transform of x5, and Parseval's identity holds between them. A fault
in any of the three breaks the identity, except in rare cases (see *Limits*). No FFT of
x5 is needed: the check only compares energies.

Three such checks cover different sets of channels:

| check | time-domain input  | frequency-domain input |
|-------|--------------------|------------------------|
| c1    | x5 = x1 + x2 + x3  | X5 = X1 + X2 + X3      |
| c2    | x6 = x1 + x2 + x4  | X6 = X1 + X2 + X4      |
| c3    | x7 = x1 + x3 + x4  | X7 = X1 + X3 + X4      |

Each channel has its own set of failing checks (its syndrome). A single failing check
means that the check path itself is faulty, so the data needs no correction:

| c1 c2 c3 | location          | action                          |
|----------|-------------------|---------------------------------|
| 000      | none              | pass through                    |
| 111      | FFT 1             | Y1 = X - X2 - X3 - X4           |
| 110      | FFT 2             | Y2 = X - X1 - X3 - X4           |
| 101      | FFT 3             | Y3 = X - X1 - X2 - X4           |
| 011      | FFT 4             | Y4 = X - X1 - X2 - X3           |
| 100, 010, 001 | check path c1, c2 or c3 | pass through           |

Here X is the output of the parity FFT, which transforms x = x1 + x2 + x3 + x4. No check
guards the parity FFT. Its output is used only when a channel is being rebuilt.

## Exact arithmetic: why the transform is 4 points

Both identities above are exact only if the FFT is exact. Fixed-point twiddle factors and
rounding would make them approximate. The checks would then need a tolerance, and the
rebuilt output would differ slightly from the true one. Here the transform has N = 4
points. Its twiddle factors are 1, -1, j and -j, so the FFT needs only additions and
subtractions. Every width grows just enough to hold its result without loss:

| signal                              | real / imaginary width |
|-------------------------------------|------------------------|
| input sample x1..x4                 | 16 bits                |
| coded input x5, x6, x7, x           | 18 bits                |
| FFT output X1..X4, final output Y   | 18 bits                |
| coded output X5..X7, parity FFT X   | 20 bits                |
| time-domain energy of a frame       | 39 bits                |
| frequency-domain energy of a frame  | 43 bits                |

As a result, a fault-free frame meets Parseval's identity bit for bit, and
`mag_comparator` tests for equality (`TOL = 0`). The parity relation is exact too, so a
rebuilt output equals the fault-free output exactly. The comparator still has a
tolerance parameter, for anyone who swaps in an inexact FFT.

## Data path and timing

```
 x1..x4 ──┬─────────────► fft ×4 ──► X1..X4 ─┬──► parity_encoder ──► X5,X6,X7 ─┐ (freq.)
          │                                  │                                  │
          ├─► parity_encoder ─► x5,x6,x7 ────┼──────────────────────────────────┤ (time)
          │                  └► x ──► fft (parity) ──► X                        ▼
          │                                  │                    parseval_check ×3
          │                                  ▼                                  │ c1 c2 c3
          │                    frame_delay (one frame) ──► edc ×4 ◄────────────┘
          │                                                  │
          └──────────────────────────────────────────────────┴──► Y1..Y4
```

Samples stream in at one per channel per valid cycle. Every four valid cycles form a
frame. Idle cycles may fall anywhere, between frames or inside one. For a frame with no
idle cycles:

| cycle (first input = 0) | event                                                             |
|-------------------------|-------------------------------------------------------------------|
| 0-3   | x[0..3] enter the FFTs and the time-domain side of the checks               |
| 4-7   | X[0..3] leave the FFTs and enter the frequency-domain side of the checks    |
| 7     | energies complete; the comparison result is registered at the end of cycle 7 |
| 8-11  | the delayed X[0..3] meet the now-stable syndrome in the four `edc` units    |
| 9-12  | Y[0..3] at the outputs, each with its frame's syndrome and `corrected` flags |

The latency is 9 cycles from first input to first output, or 6 cycles after the last
input. Throughput is one sample per channel per clock, with frames back to back. While
frame k leaves the FFTs, frame k+1 is already entering them. Each check keeps the
time-domain energy of frame k in a hold register until the matching frequency-domain
energy is ready. The one-frame `frame_delay` holds the FFT outputs back. Without it,
they would reach the correction stage before their frame's check result exists.

## Modules

| module            | role                                                                                 |
|-------------------|--------------------------------------------------------------------------------------|
| `fft_ft_pkg`      | N, DW, channel and check counts; `err_loc_e` and `decode_syndrome` (the table above); fault-injection type |
| `second_tech`     | top: wires everything together as in the diagram                                     |
| `fft`             | 4-point radix-2 DIT FFT, one sample per cycle in and out, double-buffered             |
| `parity_encoder`  | the three Hamming sums and the all-channel sum; used on the inputs and on the FFT outputs |
| `parseval_check`  | magnitude square, accumulator, hold register and comparator for one coded pair, giving p |
| `mag_square`      | re² + im² from two Vedic multipliers on absolute values                                |
| `vedic_mult`      | unsigned Urdhva Tiryakbhyam ("vertically and crosswise") multiplier from AND gates and `full_adder` / `half_adder` cells |
| `sos_accumulator` | sums the N squared magnitudes of a frame                                             |
| `mag_comparator`  | N·(time energy) against (frequency energy), within `TOL`                              |
| `frame_delay`     | N-cycle shift register that aligns FFT outputs with their check result               |
| `edc`             | per-channel error detection and correction (syndrome decode and rebuild)             |

### The Vedic multiplier

`vedic_mult` builds the product one column at a time, from the least significant end.
Column k takes every partial product a[i]·b[k−i] whose bit positions add up to k. These
are the "vertical" and "crosswise" pairs. The column also takes the carry bits handed on
by column k−1. For two 8-bit operands there are 15 such steps, and a 16th column gets
only the final carries. The only cells are AND gates, full adders (`full_adder`) and
half adders (`half_adder`):

- Full adders take a column's bits three at a time, and a half adder takes the last two
  if that many are left.
- Each sum goes back into the column's queue, and the last sum is product bit k.
- Every carry becomes an input of column k+1.

The adder counts follow from W alone. Constant functions compute them, and generate
loops lay out the cells. The module defaults to 8 bits. `mag_square` uses it at 18 and
20 bits for the two sides of a check, and takes absolute values first so that an
unsigned multiplier can square signed parts.

## Top-level interface (`second_tech`)

| port          | dir | width            | meaning |
|---------------|-----|------------------|---------|
| `clk`, `rst`  | in  | 1                | clock; synchronous active-high reset |
| `in_valid`    | in  | 1                | one sample per channel present |
| `x[4]`        | in  | 32 each          | `{re[15:0], im[15:0]}`, two's complement |
| `fault_inj`   | in  | `fault_inj_t`    | test hook: XOR `pattern` into the real part of one stream (FFT 1-4 output, parity FFT output, or coded sum of check 1-3); tie to `INJ_NONE` in use |
| `out_valid`   | out | 1                | one corrected sample per channel present |
| `y[4]`        | out | 36 each          | `{re[17:0], im[17:0]}`, DFT bin k of channel i, bins in natural order |
| `syndrome`    | out | 3                | `{c1,c2,c3}` of the frame now leaving, 1 = check failed |
| `err_loc`     | out | `err_loc_e`      | decoded location for that frame |
| `corrected`   | out | 4                | channel i's sample was rebuilt from the parity FFT |
| `check_valid` | out | 1                | pulses when a frame's three checks have completed |

Assertions in the RTL check that the five FFTs and the three checks stay in lock step.
They also check that the syndrome holds still while a frame is being corrected, and that
no check's held energy is overwritten before it is used.

## Limits of the protection

- **A single faulty FFT, or a single faulty check path, per frame.** With two faulty FFTs
  the failing checks combine. The syndrome then names a wrong channel, or names one of
  the faulty channels and rebuilds it from the other faulty output. Either way the
  output is wrong.
- **Energy-preserving errors escape.** A check only compares energies. Let an error e hit
  one bin of a coded sum whose value is S. If 2·Re(conj(S)·e) + |e|² = 0, the energy is
  unchanged and that check does not fail. The syndrome is then incomplete, and the fault
  is missed or located wrongly. This is inherent to sum-of-squares checking. An error
  that changes one real or imaginary part of one sample by an odd amount always changes
  the energy by an odd amount, so it is always caught.
- **The parity FFT is unguarded.** A fault there is harmless unless it coincides with a
  fault in another FFT.

## How this design relates to the published scheme

Taken from the published description:

- the parity-SOS-ECC organisation: four FFTs, one parity FFT and three coded Parseval
  checks;
- the channel sets of the checks, the syndrome table and the correction equation;
- the check structure: magnitude square, accumulator and comparator on each side;
- four per-channel correction units;
- the use of Vedic multipliers in the magnitude-square units;
- 32-bit input words;
- the `clk`/`rst` pins and the module names `second_tech`, `fft` and `edc`.

This design's own choices:

- **Transform size and number format.** The source gives neither. The 4-point, exact
  transform and the 16-bit real and imaginary parts are this design's. The outputs are
  2 × 18 bits, not the 32-bit words the source shows, so that they carry the full result.
- **Correction arithmetic.** The faulty channel is rebuilt by subtraction (parity output
  minus the other three). The prose also speaks of XOR-ing. Only subtraction undoes a
  sum, so the equation form is used.
- **Parseval scaling.** The energy comparison includes the factor N of an unnormalised
  DFT.
- **Timing.** The frame alignment buffer, the hold register in each check, the registered
  outputs, the reset behaviour and the timing are all this design's.
- **Vedic multipliers only in the energy path.** The FFT needs no multipliers at 4 points.
- **Not built.** The other schemes in the source are not included:
  - one Parseval check per FFT plus a parity FFT (*parity-SOS*);
  - three redundant FFTs with a Hamming code (plain ECC);
  - higher-order compressors for the multiplier.
- **Test hook.** The fault-injection input is a test facility, not part of the scheme.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
    rtl/fft_ft_pkg.sv tb/tb_second_tech.sv -y rtl -y tb --top-module tb_second_tech
./obj_dir/Vtb_second_tech
```

Use the same command for any other `tb_<module>`.

- **`tb_second_tech`** runs the whole bank at its default size. It sends 360 random frames
  (plus frames of extreme values), with gaps between and inside frames. The frames cycle
  through nine fault scenarios: none, FFT 1-4, parity FFT, and check paths 1-3. Each
  fault corrupts one random sample of its frame. A direct
  DFT in the testbench gives the expected values. The testbench checks that every output
  equals the fault-free DFT, checks the syndrome and the `corrected` flags against the
  table, and checks the exact output cycle. It also counts each scenario, each channel's
  correction, back-to-back frames and idle cycles, and fails if any of them never
  happened.
- **The unit testbenches** check, in turn:
  - the multiplier: exhaustively at 8 bits, randomly at 18 bits;
  - the FFT: against a direct DFT, with its latency and `out_last`;
  - the Parseval check: on frames with and without a corrupted bin, including the cycle
    `p` appears in;
  - the correction units: for every syndrome;
  - the encoder, accumulator, comparator and delay line: against integer reference
    models.

## Changing it

- **Word width.** `DW` in `fft_ft_pkg` sets the input width. Every other width follows
  from it.
- **Transform length.** `fft` is written for 4 points. A longer transform needs non-trivial
  twiddle factors, and with them
  - a nonzero `TOL` in the checks, chosen from the FFT's rounding error;
  - a `frame_delay` depth equal to the new N;
  - a way to accept corrected outputs that are close to, not equal to, the fault-free
    ones.
- **More channels.** The coding is fixed at four channels and three checks. More channels
  need a longer Hamming code: more checks, a wider syndrome and a new decode table.
