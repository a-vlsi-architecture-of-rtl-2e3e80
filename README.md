# A 2-D systolic array for the radix-2 FFT

This RTL computes an N = 2^(m+n) point FFT on a 2^m x 2^n mesh of identical
processing elements (PEs). Each PE holds one complex sample. The PEs talk only
to their four nearest neighbours. The idea behind the design is the **half
butterfly**. A normal radix-2 butterfly produces both `A + B·W` and `A − B·W` in
one place, so half of the array would sit idle while the other half computes.
Here the two outputs come from two different PEs: the one holding `A` computes
`A + B·W` (HBA+), and the one holding `B` computes `A − B·W` (HBA−). Both need
the other's sample, so before each stage every sample is copied to its partner.
After the stage, each result is already in the PE where the next stage
expects it. Every PE therefore works in every stage, and no data has to be
reordered between stages.

With the default parameters (m = n = 5) the array is 32 × 32 PEs and computes a
1024-point FFT. One transform, including loading the input and unloading the
previous result, takes 332 clocks: 16.6 µs at 20 MHz.

## Number format and links

* A sample is a 16-bit complex word: an 8-bit real part and an 8-bit imaginary
  part. Both are two's complement Q1.7 fractions (−1 ≤ x < 1).
* Twiddle factors are held as two 8-bit Q1.7 coefficients,
  `C1 = (Wr+Wi)/2` and `C2 = (Wr−Wi)/2`.
* Every link, between PEs and inside a PE, is 8 bits wide. A word therefore
  moves in two clocks ("beats"): the real byte first, then the imaginary byte.
* Every half butterfly divides its result by two, which keeps the values from
  overflowing. The array therefore returns `DFT(x) / N`. A result that still
  falls outside the 8-bit range saturates. This only happens when a complex
  input has a magnitude of 1 or more.

## Where the samples are and how they move

Sample `k` lives in the PE at row `r = k / 2^n`, column `c = k mod 2^n`
(row-major, zero-based). In process (stage) `q = 1 … m+n`, sample `k` is paired
with sample `k ± N/2^q`.

* For `q ≤ m` the partner is `d = 2^(m−q)` **rows** away.
* For `q > m` it is `d = 2^(m+n−q)` **columns** away.

A PE whose row (or column) index `i` has bit `log2(d)` clear, i.e.
`(i mod 2d) < d`, holds the upper sample. It computes HBA+, and its partner
is `d` below (or to the right of) it. The other PEs compute HBA−.

For the 4 × 4 array (16 points) this gives:

| process | moves along | distance | HBA+ rows/columns | HBA− rows/columns |
|---|---|---|---|---|
| 1 | rows    | 2 | rows 0, 1    | rows 2, 3    |
| 2 | rows    | 1 | rows 0, 2    | rows 1, 3    |
| 3 | columns | 2 | columns 0, 1 | columns 2, 3 |
| 4 | columns | 1 | columns 0, 2 | columns 1, 3 |

Each PE has two data routing units (DRUs) that move data in opposite directions.

* **DRU-A** carries bytes south (in row processes) or east (in column processes).
* **DRU-B** carries bytes north or west.

A shuffle copies the PE's own word into both DRUs. Both chains then move the
word `d` PEs along, at two clocks per PE. Afterwards, DRU-B of an HBA+ PE holds
the sample from `d` below (its partner), and DRU-A of an HBA− PE holds the
sample from `d` above. The two directions run at the same time, so partners
swap in one pass.

Each DRU is a source multiplexer followed by a 16-bit register. The register
works as a two-stage byte shift register. Its older byte is the output: it goes
to the next PE's DRU and to this PE's HBAU.

## The half butterfly without a multiplier

The HBAU (half butterfly arithmetic unit) forms `B·W` by **distributed
arithmetic**. It has exactly two adders, both binary lookahead carry adders:
one for the real part and one for the imaginary part. The same two adders then
compute `A ± P`. Operand multiplexers pick the inputs in each step. A
subtraction inverts the second operand and sets the carry-in.
The two's-complement bits of `B` are read as offset-binary digits
`d_j = 2·b_j − 1 ∈ {−1, +1}`. Then

    P_r = B_r·W_r − B_i·W_i = Σ_j s_j · Qr(b_r,j , b_i,j) · 2^j − C2
    P_i = B_r·W_i + B_i·W_r = Σ_j s_j · Qi(b_r,j , b_i,j) · 2^j − C1

Here `s_j` is +1 for every bit except the sign bit, where it is −1. Each term
needs only a choice among ±C1 and ±C2:

| b_r,j b_i,j | Qr  | Qi  |
|---|---|---|
| 1 1 | +C2 | +C1 |
| 1 0 | +C1 | −C2 |
| 0 1 | −C1 | +C2 |
| 0 0 | −C2 | −C1 |

One half butterfly takes ten clocks:

| step | real accumulator | imaginary accumulator |
|---|---|---|
| 0 | `−C2` (offset correction) | `−C1` |
| 1–7 | `(acc + Qr_j) / 2`, j = 0…6 (LSB first) | `(acc + Qi_j) / 2` |
| 8 | `acc − Qr_7` (sign bit) | `acc − Qi_7` |
| 9 | `sat(floor((A_r ± acc) / 2))` | `sat(floor((A_i ± acc) / 2))` |

The accumulators are 19 bits wide and keep seven extra fraction bits, so `B·W`
is exact. The only rounding is the floor of the final halving. The result stays
in the accumulators, and the accumulators are also where the PE keeps its own
sample between processes.

An HBA+ PE loads its own word into data register A and the partner word into B.
An HBA− PE does the opposite. Both then compute `A & B·W` with the same `W`.

## Schedule of one transform

The array controller broadcasts one command per clock to all PEs. The
control logic unit (CLU) in each PE decodes it.

| phase | clocks | what happens |
|---|---|---|
| IO_LOAD  | 2 | previous results → DRU-B; twiddle registers ← 0.5, 0.5 (W = 1 for process 1) |
| IO_SHIFT | 2·2^m | DRU-B chains move north: results leave through the top row (`dout`) while new samples enter at the bottom row (`din`) |
| IO_ACC   | 2 | new sample → accumulator |
| per process q: SH_LOAD | 2 | own word → DRU-A and DRU-B; for q > 1 the twiddle pair that DRU-A holds moves into the twiddle registers at the same time |
| SH_SHIFT | 2·d | both DRU chains move `d` PEs |
| SH_GET | 2 | partner word → data register A or B |
| HBA | 10 | half butterfly; in its first two clocks DRU-A takes the next process's `C1`, `C2` from `coef_in` |

Total: `2(2^m+2) + Σ_q 2(d_q+2) + 10(m+n)` clocks. This is 80 clocks for 16
points and 332 for 1024 points.

**Output order.** Results come out in row-major PE order, and PE `k` holds
`X(bitrev(k)) / N`, so the spectrum is bit-reversed. Samples enter in natural
order. Transforms pipeline: the results of transform `j` leave while the
samples of transform `j+1` enter.

**Twiddles.** Process `q` at sample `k` uses `W = exp(−j2πp/N)` with
`p = bitrev_{q−1}(k >> (m+n−q+1)) · 2^(m+n−q)`. The two PEs of a pair use the
same `W`. The coefficients come from a memory outside the array. In the first
two clocks of every half butterfly except the last, the array raises `coef_req`
with `coef_q` (the next process) and `coef_beat` (0: C1, 1: C2). The memory
must then drive `coef_in[r][c]` for every PE. The testbenches compute these
values from the formula above.

## Interface of `fft_array_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (data cleared, twiddles = 0.5) |
| `start` | in | start one transform; ignored while `busy` |
| `busy`, `done` | out | running; one-clock pulse at the end of the last half butterfly |
| `io_shift` | out | high for 2·2^m clocks; each clock, column `c` takes `din[c]` and shows `dout[c]` |
| `din[2^n]`, `dout[2^n]` | in/out | 8-bit streams: the word for row 0 first, real byte then imaginary byte |
| `coef_req`, `coef_q`, `coef_beat`, `coef_in[2^m][2^n]` | out/in | twiddle memory interface (above) |
| `test_en`, `test_done`, `test_go`, `test_go_pe` | in/out | self test of all PEs |

Parameters: `M`, `N` (array of 2^M × 2^N), `TEST_PATTERNS` (65535) and
`GOOD_SIG` (9'h175).

## Built-in self test

While `test_en` is high, each PE tests its HBAU on its own:

* The first clock seeds data register A from the accumulator, data register B
  from the DRU-B register, and the twiddle pair from the DRU-A register. So the
  starting patterns are brought in from outside through the normal data path.
* For each pattern, the HBAU runs one half butterfly, alternating HBA+ and
  HBA−. Register B and the twiddle pair then advance as two 16-bit LFSRs
  (x^16+x^15+x^13+x^4+1).
* A 9-bit signature register (x^9+x^5+1) compresses each result, folded to
  9 bits.
* After `TEST_PATTERNS` patterns, the signature is compared with `GOOD_SIG`,
  and `done` and `go` (1 = GO, 0 = NO-GO) are raised. A full test takes
  2 + 65535·11 clocks.

The default `GOOD_SIG` is the signature of a good PE for this reference seed:
accumulator (0x35, 0x1c), DRU-B 0xACE1, DRU-A 0x4040. A different seed needs a
different good signature.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | widths, command and control structs, LFSR/signature functions |
| `rtl/fft_array_top.sv` | the mesh and the controller |
| `rtl/array_ctrl.sv` | sequencer: I/O, shuffles and half butterflies, start/busy/done |
| `rtl/pe.sv` | one PE: CLU, DRU-A, DRU-B, HBAU, self-test controller |
| `rtl/clu.sv` | command decoder and HBA+/HBA− choice |
| `rtl/dru.sv` | data routing unit |
| `rtl/hbau.sv` | half butterfly by distributed arithmetic |
| `rtl/blc_adder.sv` | binary lookahead carry (Brent–Kung prefix) adder; the HBAU uses two |
| `rtl/bist.sv` | self-test controller, signature, GO/NO-GO |
| `tb/fft_ref_pkg.sv` | closed-form reference models (half butterfly, twiddles, whole transform, signature, float DFT) |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_fft_array_top` (4×4 end to end), `tb_fft_array_full` (32×32 defaults) |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/fft_pkg.sv tb/fft_ref_pkg.sv rtl/*.sv tb/tb_fft_array_top.sv \
      --top-module tb_fft_array_top -o sim
    ./obj_dir/sim

Replace `tb_fft_array_top` with any other testbench. The 1024-point
`tb_fft_array_full` takes about two minutes to compile and a few seconds to run.

What the testbenches check:

* Every output of the array matches the closed-form model bit for bit.
* The outputs stay within 3 LSB (16 points) or 8 LSB (1024 points) of
  `DFT(x)/N` computed in floating point.
* Each transform takes exactly the clock count above.
* Row shuffles, column shuffles, HBA+ and HBA− (in equal numbers), coefficient
  loads, overlapped I/O and the self test all occur.
* Self-test signatures match the model, with both a GO and a NO-GO case.

## Design choices and limits

* **Precision.** With 8-bit parts, a 1024-point transform scaled by 1/1024
  keeps only strong spectral lines. Expect a few LSB of error: Q1.7 twiddles
  plus a floor in every stage give up to about 6 LSB at 1024 points. Reading
  "16-bit complex" as 16 bits per part would need four beats per word and
  would no longer give the 332-clock (16.6 µs) timing.
* **Twiddle path.** Coefficients come in through a per-PE byte port into DRU-A.
  Passing them through the mesh could not finish within a 10-clock half
  butterfly on a 32-row array.
* **I/O direction.** The I/O pipeline uses DRU-B, the unit that already moves
  data north.
* **HBA timing.** The 10-clock half butterfly is 500 ns at 20 MHz.
* **Saturation.** Saturation of the halved result is an addition; the
  per-stage halving alone does not cover full-scale complex inputs.
* **Self test.** The signature is kept in a separate 9-bit register rather than
  in the accumulators, and data register A stays constant during the test.
* **Adders.** The two HBAU adders are binary lookahead carry adders written as
  a Brent–Kung prefix tree (`blc_adder`). Their internal structure is the
  textbook one, not one taken from a particular layout.
* **PE position.** Each PE takes its row and column as input ports. Unused
  mesh-edge inputs are tied to zero.
