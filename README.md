# Serial BCH(15,k) encoder–decoder with single, double and triple error correction

This is a small error-correction module for short binary BCH codes of length 15.
A data word is encoded, an error pattern is XORed onto the codeword to model a
noisy channel, and the decoder repairs up to *t* flipped bits and returns the
original word. Three codes are provided side by side:

| channel | code        | corrects | data bits k | parity bits | generator polynomial g(x)              | key equation          |
|---------|-------------|----------|-------------|-------------|----------------------------------------|-----------------------|
| `sec_*` | BCH(15,11)  | 1 bit    | 11          | 4           | 1 + x + x^4                            | closed form           |
| `dec_*` | BCH(15,7)   | 2 bits   | 7           | 8           | 1 + x^4 + x^6 + x^7 + x^8              | closed form           |
| `tec_*` | BCH(15,5)   | 3 bits   | 5           | 10          | 1 + x + x^2 + x^4 + x^5 + x^8 + x^10   | Berlekamp–Massey      |

Everything moves one bit per clock. The main design idea is to keep the
decoder cheap for small *t*. For one and two errors the error-locator
polynomial comes straight from the syndromes, in closed form. Only the
three-error code uses an iterative solver: a Berlekamp–Massey unit with a
field inverter and a rotating syndrome register.

The architecture follows the article "An efficient high throughput BCH module
for multi-bits error correction mechanism on hardware platform". Where that
description leaves a detail open, this implementation makes its own choice.
The choices are listed in [Departures and own choices](#departures-and-own-choices).

## Arithmetic

All decoder arithmetic is in GF(2^4), built from the primitive polynomial
p(x) = x^4 + x + 1 (the t = 1 generator), with α a root of p. Elements are
4-bit vectors in the polynomial basis. `bch_pkg` provides:

* `gf_mul`: shift-and-add multiplication, reduced by p(x);
* `gf_sq`: squaring;
* `gf_inv`: a^14 = a^2·a^4·a^8, which also maps 0 to 0;
* `gf_alpha_pow`: powers of α;
* `bch_k(t)` and `bch_gen(t)`: the code tables.

Multiplications by a constant power of α reduce to a few XOR gates when synthesised.

Polynomial conventions used everywhere: bit *j* of a word is the coefficient of
x^j. The codeword is systematic, c(x) = x^(n-k)·d(x) + (x^(n-k)·d(x) mod g(x)),
so `din[i]` is the coefficient of x^(n-k+i). Bits travel **highest degree
first**: d_(k-1) … d_0, then the parity bits. Error-pattern bit `err[j]` flips
the codeword coefficient of x^j.

## One channel (`bch_ed`)

```
 din[k] ─► encoder register ─► LFSR encoder ─┐
           (piso_reg)          (bch_encoder) XOR ─► bch_decoder ─► decoder register ─► dout[k]
 err[15] ─► error register ──────────────────┘                     (sipo_reg)
           (piso_reg)
```

* **Encoder register / error register** (`piso_reg`): parallel load, then
  shift out MSB first.
* **Encoder** (`bch_encoder`): an LFSR of n−k stages that divides by g(x).
  For the first k clocks each data bit goes straight to the output. It also
  enters the feedback: the top stage XOR the data bit, added into every stage
  whose g(x) coefficient is 1. For the last n−k clocks the feedback is held at
  0 and the remainder shifts out of the top stage as the parity bits. The LFSR
  is cleared at each frame start.
* **Decoder register** (`sipo_reg`): collects the k corrected bits and pulses
  `dout_valid`.

`start` is taken when `ready` is high. `ready` is high when the channel is idle
and also in the last clock of a word, so holding `start` high sends a word every
15 clocks.

## The decoder (`bch_decoder`)

The decoder is a three-stage pipeline plus a delay line:

```
 in_bit ─┬─► sgm ×t ─► kes_direct (t≤2) ─► chien_search ─► err_detect ─err─┐
         │            or bma_kes   (t=3)                                   ▼
         └───────────────────────────────────────────────► siso_reg ─(XOR, reg)─► out_bit
                       dec_ctrl: counters that sequence all of the above
```

### Syndromes (`sgm`)
There is one generator per odd syndrome S_1, S_3, …, S_(2t−1). Each one applies
Horner's rule, S ← S·α^J + r_i, to the bits as they arrive. After the 15th bit
it holds r(α^J). The even syndromes are not generated, because S_2j = S_j^2 for
binary codes.

### Error-locator polynomial for t = 1, 2 (`kes_direct`, combinational)

* t = 1: λ(x) = 1 + S_1·x
* t = 2: λ(x) = 1 + S_1·x + (S_1^2 + S_3·S_1^−1)·x^2

With a single error S_3 = S_1^3, so the x^2 term cancels by itself. S_1 = 0
with S_3 ≠ 0 means three or more errors. The inverter then returns 0 and no
bit is corrected.

### Error-locator polynomial for t = 3 (`bma_kes`)
This is the part that takes most care. It is the binary, inversion-based form
of Berlekamp–Massey. In a binary code every second discrepancy is zero, so only
t iterations are needed, one per clock:

```
d_r     = Σ_i λ_i · S_(2r+1−i)                 r = 0 … t−1
λ(x)   ← λ(x) + (d_r · d_p^−1) · β(x)          (d_r·d_p^−1·β is the correction term)
if d_r ≠ 0:  β(x) ← x^2·λ_old(x),  d_p ← d_r
else:        β(x) ← x^2·β(x)
start:  λ = 1, β = x, d_p = 1
```

* **Syndrome window.** Forming d_r needs the syndromes S_(2r+1) … S_(2r+1−t)
  lined up with λ_0 … λ_t. Syndromes with index ≤ 0 count as zero.
  * The syndrome register has 3t−1 cells and rotates by two cells per
    iteration, so its first t+1 cells always hold that window.
  * At start, S_1 goes in cell 0 and cells 1…t are zero.
  * Each S_j with j ≥ 2 is loaded into cell (1−j) mod (3t−1). The rotations
    then bring it to the right place. The even syndromes are formed by squaring
    before loading.
* **Swap rule.** β takes λ whenever d_r ≠ 0. The textbook rule also requires
  2L ≤ 2r, where L is the current degree. For t ≤ 3 the two rules differ only
  in the last iteration, and β is not used after it.
* **Inverse.** d_p^−1 comes from the exponentiation inverter.
* **Timing.** `done` rises t+1 = 4 clocks after `start`, and λ stays valid
  until the next `start`.

### Chien search (`chien_search`) and error detection (`err_detect`)
Register j holds λ_j and is multiplied by α^j every clock, and the XOR of all
registers is λ at the current point. An error at bit position p makes α^(−p) a
root. Because α^15 = 1, the bit that leaves the delay line in search cycle i,
at position 14−i, has its root at α^(i+1). So the registers are loaded with
λ_j·α^j rather than λ_j, and cycle i tests bit 14−i.

Only the k data positions (i = 0 … k−1) are searched. The parity bits are
neither corrected nor output. `err_detect` raises `err` when the sum is zero,
and it also counts the flags of a frame (`n_corrected`).

### Delay line and control (`siso_reg`, `dec_ctrl`)
`siso_reg` is a shift register of D = 16 + L stages, where L = 0 for t ≤ 2 and
L = t+1 = 4 for t = 3. Bit r_(14−i) reaches its end in exactly the clock in
which its flag is computed. The two are XORed and registered.

`dec_ctrl` runs three independent counters, so that consecutive frames can
overlap in the pipeline:

* a bit counter, which ends syndrome accumulation;
* a Chien counter, which opens a k-clock search window after λ is ready;
* a life counter, which keeps the delay line shifting for the whole life of
  the newest frame. This keeps the delay of every bit exact, even with idle gaps
  between frames.

Assertions check the framing: a frame is 15 consecutive valid bits, and a new
frame may not start inside one.

### Timing

Clock counts are taken from the clock edge that accepts `start`:

| code        | first received bit | λ ready (Chien load) | corrected bits out | `dout_valid` |
|-------------|--------------------|----------------------|--------------------|--------------|
| BCH(15,11)  | 1                  | 16                   | 18 … 28            | 29           |
| BCH(15,7)   | 1                  | 16                   | 18 … 24            | 25           |
| BCH(15,5)   | 1                  | 20                   | 22 … 26            | 27           |

In general the latency is n + 3 + L + k clocks. Each channel accepts a new word
every 15 clocks, which is k/15 data bits per clock. Syndrome accumulation of
one word overlaps the key-equation and Chien stages of the previous word.

## Files

| file | contents |
|------|----------|
| `rtl/bch_pkg.sv` | GF(2^4) arithmetic, code tables, `gf_t` |
| `rtl/bch_top.sv` | the three channels side by side (top level) |
| `rtl/bch_ed.sv` | one encoder–decoder channel, parameter `T` (default 2) |
| `rtl/piso_reg.sv`, `rtl/sipo_reg.sv` | encoder/error registers, decoder register |
| `rtl/bch_encoder.sv` | LFSR encoder |
| `rtl/bch_decoder.sv` | decoder, instantiates the five blocks below |
| `rtl/sgm.sv`, `rtl/kes_direct.sv`, `rtl/bma_kes.sv`, `rtl/chien_search.sv`, `rtl/err_detect.sv`, `rtl/siso_reg.sv`, `rtl/dec_ctrl.sv` | decoder blocks |
| `tb/bch_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

All modules use an asynchronous, active-high reset `rst`. The codes are
selected by the parameter `T` (1, 2 or 3). The field size is fixed at
GF(2^4), so n = 15.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, the end-to-end test of all three channels:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_bch_top.sv --top-module tb_bch_top
./obj_dir/Vtb_bch_top
```

Replace `tb_bch_top` with any other `tb_<module>` to test one module.

## How far it has been verified

The reference model in `tb/bch_ref_pkg.sv` is built independently of the RTL:

* field products use log/antilog lookups;
* encoding is integer long division;
* syndromes are direct sums;
* the expected error locators are products of (1 + α^p·x) over the known
  error positions.

The testbenches check the following:

* **Encoder.** Every data word of all three codes, back to back. The codeword
  must match long division, and S_1 … S_2t of the codeword must be zero.
* **Key-equation solvers.**
  * `kes_direct`: every error pattern of weight ≤ t.
  * `bma_kes`: all 576 patterns of weight ≤ 3, the 4-clock latency, and both
    outcomes of the discrepancy test.
* **Decoder and channel.** Random words with random errors of weight ≤ t,
  with isolated and back-to-back frames. For each word the testbench checks:
  * the data after correction;
  * the number of corrected bits;
  * the exact latency.
* **Example words.** The channel test also sends 7f, 79, 4f, 4c, each with the
  error pattern 000100100000000, through the double-error channel. All four
  are restored.
* **Top level.** `tb_bch_top` runs all three channels at full size. It
  requires each of these mechanisms to occur at least once:
  * error-free words;
  * words with 1, 2 and 3 corrections;
  * parity-only errors;
  * back-to-back words;
  * both Berlekamp–Massey branches.

What is not covered: the behaviour with more than t errors. It is not
specified. The decoder then returns some word, and it has no "uncorrectable"
flag.

## Departures and own choices

* **Latency.** The published figures are 44.5, 40.5 and 67.5 clock cycles
  for t = 1, 2, 3, and the way they were measured is not described. This
  pipeline takes 29, 25 and 27 clocks from start to output word.
* **Parity output.** The parity bits leave the encoder serially, one per
  clock, as the single codeword line of the block diagram requires. The prose
  calls that transmission parallel.
* **β shift in Berlekamp–Massey.** β is multiplied by x^2 per iteration, as
  the update equation states. The block diagram marks a one-place shift.
* **Number of iterations.** The solver runs t iterations, not t−1.
* **Chien test point.** Bit 14−i is tested at α^(i+1), which is where the
  reciprocal-root rule puts its root, rather than at α^i.
* **Own choices.** The following are choices of this implementation, not
  taken from the source:
  * the handshakes, the framing signals and the pipelining that accepts a
    word every 15 clocks;
  * the delay-line length;
  * the S_1 = 0 handling;
  * the count of corrected bits;
  * the one-iteration-per-clock schedule of the solver;
  * the rotating layout of its syndrome register;
  * the start values λ = 1, β = x, d_p = 1;
  * placing the three codes side by side in one top level.
* **Throughput.** The source computes throughput as k·f/t from FPGA clock
  rates. The clock rate this RTL reaches depends on the target and has not
  been measured. Per clock, each channel delivers k/15 bits.
* **Lint warning.** Verilator reports `SYNCASYNCNET` for `rst`. The reset is
  asynchronous in the logic, and the assertions also use it in their
  `disable iff` condition. That double use is intended.
