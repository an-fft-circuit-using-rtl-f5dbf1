# Nested-RNS pipelined FFT for a radio-astronomy spectrometer

A wide-band spectrometer has to run many long FFTs in parallel on an FPGA. There, the
limit is usually the LUTs spent on wide complex multipliers, not block RAM. This design
removes wide multipliers. All FFT arithmetic is done in a **residue number system (RNS)**.
An integer is held as its remainders modulo a few small, pairwise coprime moduli, and
addition, subtraction and multiplication work on each remainder on its own. Every
multiplier in the datapath is then a small modular circuit whose inputs are a few bits
wide.

Two further ideas reduce the cost:

* **Nested RNS (NRNS).** A modular circuit for a 4- or 5-bit modulus still needs a
  table with 8 or 10 inputs. For such a modulus *m*, each residue is itself written in
  a second, inner RNS of small primes whose product is at least *m²*. One product of two
  residues is then exact in the inner system. After each operation the inner tuple is
  reduced back modulo *m*.
* **Growing dynamic range.** Early FFT stages carry small values and do not need every
  modulus. Each stage computes only the moduli its value range needs. **RNS2RNS
  converters** in front of later stages derive the residues of each extra modulus from
  the ones already present.

The RTL is a streaming radix-2 FFT with one complex sample per cycle. Its defaults are
1024 points, 8-bit complex input, 18-bit twiddles and moduli (5, 7, 9, 11, 13, 16). The
output is the residues of every bin. Converting them back to binary is left outside the
circuit.

## Number representation

Each modulus channel carries one residue per real or imaginary part, in a 24-bit field
(`nrns_pkg::res_t`).

* **Plain modulus:** the residue itself, in the low ⌈log2 m⌉ bits.
* **Nested modulus:** one 4-bit digit per inner prime. Inner primes come from
  {2, 3, 5, 7, 11, 13}, and digit *p* sits in bits `[4p +: 4]`. Digits of primes the
  modulus does not use stay 0.

Which moduli are nested is computed at elaboration (`nrns_pkg::is_nested`) from a LUT
cost model. A modular circuit with *k*-bit operands (2k inputs, k outputs) costs
⌈k·2^(2k) / 64⌉ six-input LUTs. For each modulus, the cheapest set of inner primes whose
product is at least *m²* is chosen. The modulus is nested only if that set is cheaper
than the plain circuit. For the moduli used in the size table below:

| modulus | plain cost | cheapest inner primes | inner cost | form   |
|--------:|-----------:|-----------------------|-----------:|--------|
| 5, 7, 8 | 3          | —                     | ≥ 5        | plain  |
| 9       | 16         | 3, 5, 7               | 7          | nested |
| 11, 13, 14 | 16      | 2, 3, 5, 7            | 8          | nested |
| 15      | 16         | 3, 7, 11              | 20         | plain  |
| 16      | 16         | 3, 7, 13              | 20         | plain  |
| 17      | 80         | 2, 3, 5, 11           | 21         | nested |
| 19      | 80         | 2, 3, 7, 11           | 21         | nested |
| 31      | 80         | 3, 5, 7, 11           | 23         | nested |

A rule of thumb from the original work is "nest every modulus of 8 or more except 15".
The cost model does not nest 8 or 16 when the inner moduli must be primes, so this RTL
follows the model. Change `prime_at` / `inner_mask` in `nrns_pkg` to use a different
policy.

### Arithmetic in a nested channel

`nrns_mod_op` applies the operation to each digit with a small `rns_mod_op` per inner
prime. Subtraction is biased: each digit computes `(a − b + m) mod p`, so the exact
difference is positive. The digit tuple then stands for an exact integer *v* < P, where
P is the product of the inner primes. `nrns_reduce` turns the tuple back into a residue
mod *m* in three steps:

1. It recovers *v* by the Chinese remainder theorem, using weights fixed at elaboration.
2. It reduces *v* modulo *m*.
3. It writes the result back as digits.

Every one of the ten operations in a butterfly is followed by such a reduction. A plain
channel uses `rns_mod_op` directly, written as `%` arithmetic for synthesis to map into
LUTs. `mod_alu` picks one form or the other for each modulus.

## Stage-by-stage dynamic range

The value range grows by one bit per radix-2 stage. Stage *s* (0-based) therefore
computes the first `ACT(s)` moduli of `MODS`: the shortest prefix whose product covers a
signed value of `IN_W + s + 1` bits. The last stage always uses all `L` moduli. For the
defaults:

| stages | moduli computed      | product (dynamic range) |
|--------|----------------------|-------------------------|
| 0–2    | 5, 7, 9, 11          | 3 465                   |
| 3–6    | + 13                 | 45 045                  |
| 7–9    | + 16                 | 720 720                 |

The input is converted (`bin2rns`) to the moduli of stage 0 only. Where `ACT` grows, the
top level places two `rns2rns` converters per new modulus in front of the stage, one for
the real part and one for the imaginary part. Each converter has two halves:

* **`rns2bin`** reconstructs the integer by the Chinese remainder theorem. Nested inputs
  are first reduced by their inner CRT. The result is read as signed: residues at or
  above (M+1)/2 stand for negative values.
* **`bin2rns`** takes that integer modulo the new modulus. If the new modulus is nested,
  it writes the result as inner digits.

The old residues pass through unchanged. If two moduli are added at the same boundary,
the second converter also uses the first one's output (a combinational chain).

**Limit on the numbers.** The schedule allows one bit of growth per stage. That matches
the moduli sets exactly: 720 720 ≥ 2^19 for 8-bit input at 1024 points. It does not allow
for the scale of the 18-bit integer twiddles. With `TW_W = 18`, intermediate values
exceed the dynamic range after the first twiddle multiplication. The residues the circuit
produces are still exact residues of the integer computation it performs, and the
testbenches check them bit for bit. But a converter that adds a modulus after an overflow
reconstructs the wrapped value, not the true one. So the output residues do not
reconstruct the true spectrum. To get outputs that convert back to a meaningful spectrum,
do one of the following:

* lower `TW_W` until the scaled results fit;
* choose moduli whose product covers the twiddle growth;
* add a scaling step. No such step exists here: division is not an RNS operation.

## Pipeline, swap memory and timing

`fft_stage` is a radix-2 decimation-in-frequency stage in single-path delay-feedback form.
Stage *s* pairs samples D = N/2^(s+1) apart. A counter runs over blocks of 2D accepted
samples:

* **First half of a block:** incoming samples are written into the swap memory. The
  memory's previous contents, the *Y* outputs of the last block, are sent on.
* **Second half:** each incoming sample *B* meets its partner *A* from the memory.
  *X = A + B* is sent on, and *Y = (A − B)·W* is written back into the memory.

`swap_memory` is a D-word circular buffer that delays its input by exactly D enabled
cycles. One memory serves every active modulus of the stage: each word holds all their
residues side by side, and each takes only its own bits: ⌈log2 m⌉ for a plain
modulus, ⌈log2 p⌉ per inner prime for a nested one. `twiddle_rom` holds each stage's twiddles as residues of each
modulus, computed at elaboration:
W = exp(−2πi·k·2^s/N), quantised to round((2^17−1)·cos) and round(−(2^17−1)·sin).
`rns_butterfly` has exactly ten modular circuits: four add/subtract for *A ± B*, four
multipliers, one subtract and one add for the complex product.

The top-level interface of `nrns_fft`:

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset of counters and valid flags |
| `in_valid` | 1 | a sample is accepted this cycle; the whole pipeline moves only on such cycles |
| `in_re`, `in_im` | `IN_W` | two's-complement input sample |
| `out_valid` | 1 | a new bin is on `out_res` this cycle |
| `out_bin` | log2 N | its bin index; bins come out in bit-reversed order |
| `out_res[L]` | 2 × 24 each | real and imaginary residue for every modulus |

Timing works as follows:

* When `in_valid` is low, the whole pipeline stalls.
* One bin comes out per accepted sample.
* The first bin of a frame is ready after **N + log2 N accepted samples**, counted from
  the frame's first sample. The swap memories account for N − 1 of them, the input
  register for 1, and the stage output registers for log2 N.
* Because the pipeline moves only when samples are accepted, a frame is pushed out by
  the samples of the following frame.
* There is no back-pressure on the output.

## Sizes

The original evaluation covers five FFT sizes, each with its own moduli set. Every one of
them is a parameter setting of this RTL (`N`, `MODS`, `L = 6`, `IN_W = 8`):

| N | moduli | status |
|---|--------|--------|
| 1024 | 5, 7, 9, 11, 13, 16 | default; simulated end to end |
| 2048 | 7, 8, 9, 11, 13, 17 | simulated |
| 4096 | 7, 8, 11, 13, 15, 31 | simulated (the set is read from a partly illegible source) |
| 8192 | not known | not built |
| 16384 | 11, 13, 14, 15, 17, 19 | simulated |

At the default size, a generic coarse synthesis gives about 5 300 word-level cells,
1 900 flip-flops and 250 kbit of memory. No FPGA mapping was done, so there are no LUT or
block-RAM counts. In the 24-bit residue fields on the ports, the bits above a plain
residue, and the unused bits of each nested digit, are constant zero.

## Files

| file | content |
|------|---------|
| `rtl/nrns_pkg.sv` | types, field encoding, nesting decision, moduli schedule |
| `rtl/nrns_fft.sv` | top level: input conversion, stages, moduli extension, output |
| `rtl/fft_stage.sv` | one delay-feedback radix-2 stage |
| `rtl/swap_memory.sv` | per-stage reordering memory |
| `rtl/twiddle_rom.sv` | twiddle residues of one stage and modulus |
| `rtl/rns_butterfly.sv` | modulo-m butterfly, ten `mod_alu`s |
| `rtl/mod_alu.sv` | selects the nested or plain circuit for a modulus |
| `rtl/rns_mod_op.sv` | plain modular add/subtract/multiply |
| `rtl/nrns_mod_op.sv` | nested modular add/subtract/multiply |
| `rtl/nrns_reduce.sv` | nested tuple → value mod m → nested tuple |
| `rtl/rns2rns.sv` | adds one modulus (rns2bin + bin2rns) |
| `rtl/rns2bin.sv` | residues → signed binary (CRT) |
| `rtl/bin2rns.sv` | signed binary → plain or nested residue |

Each testbench `tb/tb_<module>.sv` checks one module. `tb/tb_ref_pkg.sv` holds the bench's
own reference arithmetic. It is written separately from the RTL and uses:

* extended-Euclid inverses;
* Garner conversion from residues to an integer;
* search-based decoding of nested fields;
* a complete staged residue FFT model.

The system-level benches are:

* `tb_nrns_fft`: 16 points, 12-bit input, 8 frames with random stalls, a moduli extension
  before stage 3;
* `tb_nrns_fft_full`: defaults, 1024 points, two checked frames;
* `tb_nrns_fft_table2`: the 2048-, 4096- and 16384-point sets;
* `tb_nrns_fft_dft`: a 4-point transform, where 2-bit twiddles (1 and −i) are exact and
  nothing overflows. Each bin is rebuilt from its residues and compared with a DFT
  computed directly from the input.

`tb/fft_run.sv` is the checker module used by `tb_nrns_fft_table2`. The system-level
benches also check:

* `out_bin` against the bit-reversed output count;
* the latency;
* that stalls, converter-added moduli, nested moduli and back-to-back frames all
  occurred.

## Simulating

Packages must be read first. From the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_nrns_fft_full \
  rtl/nrns_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v nrns_pkg) tb/fft_run.sv \
  tb/tb_nrns_fft_full.sv
./obj_dir/Vtb_nrns_fft_full
```

Each bench ends with `TB_RESULT checks=<n> failures=<n>`. The default-size bench builds
in about a minute and runs in under a second. The three-size bench elaborates the
16384-point design (about 35 s in the linter, under 1 GB) and runs in a few seconds.

## How the design relates to the original architecture

These parts follow the original architecture:

* the residue FFT structure;
* input conversion tables per modulus;
* the ten-circuit modulo-m butterfly;
* one swap memory per stage shared by all moduli;
* RNS2RNS converters built from an RNS-to-binary half and a binary-to-RNS half;
* nested residues with inner range ≥ m²;
* the LUT cost model;
* the moduli sets and the 8-bit input and 18-bit twiddle widths.

These are choices made for this RTL:

* **Single-path delay-feedback stages.** Swap memory is N/2^(s+1) words per stage, N − 1
  in total, rather than N/2 per stage.
* **Decimation in frequency.**
* **When moduli are added.** One bit of growth per stage, with everything in the last
  stage.
* **Signed, centred reading of values.** This is needed for two's-complement samples.
* **Inner-prime candidates and nesting by the cost model**, instead of a fixed list.
* **Chinese-remainder arithmetic** in place of decision-diagram-decomposed tables for the
  converters.
* **Modular circuits written as arithmetic.** Conversion tables and converters are
  described as block-RAM tables and LUTs. Here they are written as arithmetic, and
  synthesis decides the mapping.
* **A reduction after every nested operation.**
* **Residue fields of fixed width.** Ports and stage registers use 24 bits per residue.
  In the swap memory, a nested residue is stored as its digits. That takes Σ⌈log2 p⌉
  bits, for example 8 for modulus 9, against ⌈log2 m⌉ = 4 in the original accounting.
* **The `in_valid` handshake and reset behaviour.**

These parts of the spectrometer are not included:

* **RF front end and ADC:** they are analog.
* **Magnitude and accumulation units:** only their existence is known.
* **Conversion of the result back to binary:** it is done off line.
