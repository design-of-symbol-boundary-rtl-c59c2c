# DVB-T/H symbol boundary detection, scattered-pilot synchronisation and division-free equalisation

A DVB-T/H receiver starts with nothing but a stream of complex baseband
samples. It does not know the transmission mode (2K, 4K or 8K carriers), the
guard-interval length (1/32 to 1/4 of a symbol) or where symbols begin.
After the FFT it also does not know which of the four scattered-pilot patterns
the current symbol carries. Without those it cannot estimate the channel, so
it cannot demap, so it cannot decode the TPS carriers that would have told it
the answers. This RTL solves that bootstrap problem with four hardware ideas:

* **One division-free detector for mode, guard interval and boundary.** It
  tests the modes one after another on a single correlator. The normalised
  correlation test `|C|/P >= 0.707` becomes `2|C|^2 - P^2 >= 0`, which needs no
  divider and no square root.
* **A "twister" delay-line.** Sample history is written around the whole 8K
  buffer all the time, so switching from a 2K to a 4K or 8K delay costs no
  refill.
* **Two-stage pilot synchronisation with pre-filling.** A cheap power
  detector gives the pilot pattern. The next symbol confirms it. Meanwhile
  the pilots of every possible pattern are already being stored, so channel
  estimation starts as early as if the first answer had been trusted.
* **A division-free equaliser inside the demapper.** A carrier is never
  divided by its channel estimate. The decision thresholds are scaled by
  `|CR|^2` instead.

Nothing sits idle in this design. Fourteen 1K x 12 single-port SRAMs serve
the time-domain delay-lines until the boundary is found. After that they hold
seven symbols of pilots for the channel estimator. The boundary detector's
multipliers likewise move, at the same moment, to pilot detection and to the
demapper.

The architecture is that of the thesis *Design of Symbol Boundary Detection
and Scattered Pilot Synchronization for DVB-T/H*. The RTL, the word-level
choices where the thesis leaves them open, and the testbenches are this
design's own. The section on departures lists where they differ.

## Signal flow

```
 r_re/r_im (6 b)                                   fc_re/fc_im (12 b) from FFT
      |                                                      |
      v                                                      v
 +-------------+  mode, gi, fft_sym_start      +-------------+   +------------------+   +----------+
 | css_detector|------------------------------>| sps_detector|-->| channel_estimator|-->| demapper |--> dm_bits
 +-------------+                               +-------------+   +------------------+   +----------+
      |  css_req                                                     | ce_req     ^ cmode, alpha
      v                                                              v            (from TPS)
 +----------------------------------------------------------------------------+
 | memory_bank: 14 x sram_sp_1k, owner = css_detector until css_locked, then CE|
 +----------------------------------------------------------------------------+
 | shared_mults: cmult3 + 2 complex squarers, css_detector until css_locked,   |
 |               then |SC|^2 for sps_detector and F1, F2 for demapper         |
 +----------------------------------------------------------------------------+
```

`dvb_inner_rx` is the top. Two parts are outside it and appear only as ports:

* the FFT, which takes the samples, `fft_sym_start`, `mode` and `gi`;
* the carrier- and sampling-frequency recovery loops.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `r_valid`, `r_re`, `r_im` | in | 1, 6, 6 | time-domain samples, one per clock at most |
| `fft_sym_start` | out | 1 | pulse on the sample half a guard interval into each symbol; the FFT window starts there |
| `mode`, `gi`, `css_locked` | out | 2, 2, 1 | detected mode and guard interval; lock also hands the memory to channel estimation |
| `fc_valid`, `fc_first`, `fc_re`, `fc_im` | in | 1, 1, 12, 12 | FFT carriers k = 0..Kmax on consecutive clocks; `fc_first` marks k = 0; at least 4 idle clocks between symbols |
| `cmode`, `alpha` | in | 2, 2 | constellation and hierarchy from TPS; leave at QPSK until TPS is known |
| `sps_locked`, `sp_mode` | out | 1, 2 | pilot pattern confirmed; pattern of the current symbol |
| `dm_valid`, `dm_k`, `dm_ce_ok`, `dm_bits` | out | 1, 13, 1, 6 | demapped carrier 7 clocks after it entered; `dm_ce_ok` says its channel estimate is backed by seven stored symbols; `dm_bits[i]` is bit y_i of the DVB-T mapping |

Types and encodings are in `dvb_pkg`:

* `tx_mode_e`: 2K = 0, 8K = 1, 4K = 2, the TPS order.
* `gi_e`: 1/32 to 1/4.
* `const_e`.
* `bank_req_t`: the `{en, we, addr, wdata}` request that every SRAM port uses.

## Finding mode, guard interval and boundary (`css_detector`)

### Datapath

A sample r(n) is 6-bit I and Q. For each sample the detector does the following:

* Writes r(n) into the 8K correlation delay-line and reads r(n-N) back, where
  N is the mode under test.
* Forms `c(n) = r(n) conj(r(n-N))` on the shared three-multiplier complex
  multiplier, saturated to 12 bits.
* Forms `p(n) = |r(n)|^2` on a shared squarer.
* Runs both through moving sums of length L, using two more twister
  delay-lines of 2K words (a complex 24-bit one and a real 12-bit one). The
  sums C and P are 19-bit registers.
* Feeds bits [18:8] of C and P to the squarers, which gives `MC2 = |C|^2`
  (shared) and `P^2` (a local 11 x 11 multiplier).
* Tests `2*MC2 >= P^2`, which is the NMC test at threshold 0.707 squared.
* Smooths the test with an 8-state up/down confidence counter
  (`conf_counter`) into the flag `thr`. The flag rises at count 7 and falls at
  count 0, so both edges are delayed by the same amount and a measured plateau
  keeps its true length.

When L changes, the delay-line outputs are gated to zero for L samples. The
sums then integrate from nothing rather than subtracting stale values.

### Control

The detector tests one mode at a time, 2K first:

1. **Fill.** 2K samples fill the correlation line.
2. **Dummy.** L = N/32 and the moving sum fills. The detector then waits
   until `thr` is low, so that it never starts measuring in the middle of a
   plateau.
3. **Mode detection.** It watches for a rise of `thr` for (1 + 1/4)N samples.
   * If `thr` does not rise, the test moves to the next mode (4K, then 8K)
     and returns to the dummy state. If no mode shows a plateau, it starts
     over at 2K.
   * The correlation line is **not** refilled on a mode change.
4. **GI detection.** It counts how long `thr` stays high. The plateau of a
   window of N/32 lasts about G - N/32 samples, so the estimate
   `count + N/32` is rounded down to the nearest legal guard length. The
   thresholds are 2, 4 and 8 units of N/32.
5. **Dummy boundary.** It refills the moving sum with L = G. The window now
   spans exactly one guard interval.
6. **Find boundary.** It searches one symbol (N + G samples) for the largest
   MC2. The peak marks the end of the guard interval of the delayed copy.
7. **Track.** `sym_start` (`fft_sym_start`) pulses every N + G samples, on
   the sample G/2 after the guard interval starts. `locked` rises with the
   first pulse and is never cleared.

Starting at 2K costs only a 2K fill. By the time the 4K and 8K tests run, the
older samples are already in the line, thanks to the twister buffer below.

## The twister delay-line (`twister_delay_line`)

The problem: the correlation line must delay by 2K, 4K or 8K. A plain FIFO
sized to the current delay would have to be refilled on every mode switch.
It must also do a read and a write every clock on single-port SRAMs.

### How it works

* **One write pointer over all 2^AW words.** Every sample is written at the
  next address of one circular buffer of 8K words, whatever delay is
  selected. The line therefore always holds the last 8K samples, and a new
  delay can be used at once.
* **Read pointer `wptr + 1 - delay`.** The read runs one sample ahead of
  need. The word read while sample n is written is x(n+1-delay). It is
  registered by the SRAM and appears as `dout` while sample n+1 is on `din`.
  A delay given with sample n therefore applies from the output presented
  with sample n+1.
* **Parity interleave.** Every supported delay is even, so the read address
  `wptr + 1 - delay` always has the opposite parity of the write address.
  The module number is `{addr[AW-1:11], addr[0]}` and the word number is
  `addr[10:1]`. Address bit 0 chooses between two modules of a pair, so the
  read and the write of a cycle always land in different single-port SRAMs.
  Each module is 1K words, so an 8K line uses 8 modules and a 2K line uses 2.
* **Slices.** A word wider than 12 bits (the 24-bit complex moving sum) is
  split over `NSL` slices of modules that share the same addresses.

### Bank map while detecting

| Modules | Use |
|---|---|
| 0-7 | correlation line, r(n) as 6 + 6 bits, delay N |
| 8, 9 / 10, 11 | complex moving-sum line, real / imaginary 12 bits, delay L |
| 12, 13 | power moving-sum line, 12 bits, delay L |

Because writes rotate over every module, the modules are also used equally.
The module asserts that a delay is even and lies between 2 and 2^AW.

## One memory bank, two lives (`memory_bank`, `sram_sp_1k`)

`memory_bank` holds fourteen `sram_sp_1k` modules. Each module has one access
per clock, and read data arrives after the edge and holds while idle. In
front of each module sits a two-way request multiplexer:

* While `own_ce = 0` the boundary detector drives every module.
* `css_locked` sets `own_ce`. From then on the channel estimator drives the
  bank as seven groups: group g is modules 2g (real) and 2g+1 (imaginary).
  One group holds one symbol's scattered pilots.

Nothing is copied at the hand-over. The delay-line contents are simply
abandoned.

## Shared multipliers (`shared_mults`)

The multipliers follow the memory. `shared_mults` holds three units behind
one operand multiplexer, with `sel = css_locked`:

| Unit | Before lock (boundary detector) | After lock |
|---|---|---|
| `corr`, a `cmult3` of 12 x 14 bits | r(n) conj(r(n-N)), 6-bit operands | F1 = SC conj(CR) for the demapper |
| `sq_a`, a complex squarer of 12 bits | MC2 = \|C\|^2 from bits [18:8] of C | \|SC\|^2 for the pilot detector |
| `sq_b`, a complex squarer of 14 bits | \|r(n)\|^2 | F2 = \|CR\|^2 for the demapper |

`cmult3` is the three-multiplier form of a complex product:

```
k1 = c(ar+ai),  k2 = ar(d-c),  k3 = ai(c+d),  where c = br, d = -bi
re = k1 - k3,   im = k1 + k2
```

Each unit is as wide as its wider user. Narrow operands are sign-extended,
and narrow results are the low bits of the product, which always hold them.
The P^2 squarer has no second user and stays inside `css_detector`.

The units are purely combinational. The clients send their operands out and
get the products back on the same clock:

* `css_detector`: the top wires r(n) straight to the units. The detector sends
  r(n-N) on `mul_b_*` and the squarer bits of C on `sq_*`. It gets the products
  back on `mul_c_*`, `sq_mc2` and `pw_in`.
* `sps_detector`: the carriers go straight to the unit and `|SC|^2` comes back
  on `sc_pw`.
* `demapper`: SC and CR from the estimator go straight to the units and the
  products come back on `f1_*` and `f2`.
Each client registers the products in its own pipeline. The pilot detector
and the demapper run at the same time but use different units, so they never
compete.

The boundary detector stops using the multipliers at lock. From then on it
only counts samples to place `fft_sym_start`.

## Scattered-pilot synchronisation (`sps_detector`, `pilot_prbs`)

A symbol's scattered pilots occupy the carrier class k mod 12 = 3 * (l mod 4).
They are boosted to 4/3 amplitude, so that class collects the most power.

* For each carrier, `sps_detector` takes `|SC|^2` from the shared squarer and
  keeps 7 bits from `PW_LSB` = 16 upward, saturated.
* It adds those 7 bits into the 11-bit saturating register of the carrier's
  class (0, 3, 6 or 9). Only that class's register is enabled.
* One clock after the last carrier, `done` pulses and `sp_mode` gives the
  class with the largest sum. A tie goes to the lower class.

`pilot_prbs` produces the reference bit w_k. It is the x^11 + x^2 + 1 sequence
of EN 300 744, all ones at k = 0, and gives the sign of each pilot. The
channel estimator uses it to strip the pilot's sign before storing it.

## Two-stage check with pilot pre-filling (`channel_estimator`, control part)

A single power decision can be wrong. Waiting for a second decision before
storing pilots would delay channel estimation by a symbol or more. Instead,
the first symbol is a **pre-fill**.

1. **Pre-fill symbol.** The pattern is not yet known, so every carrier of
   every class is stored: class q goes into group q. All four candidate
   pilot sets are now in memory.
2. **First decision, m1.** Group m1 becomes "age 1" and the other three
   groups are freed. The next symbol is predicted to carry pattern m1 + 1
   (mod 4). Only that class is stored.
3. **Second decision.**
   * If it equals the prediction, the pattern is locked (`sps_locked`). From
     then on it counts up by one per symbol without consulting the detector.
   * If it differs, every stored symbol is dropped (`ev_mismatch`) and the
     next symbol is a new pre-fill.

A table `age -> group` (ages 1..8) keeps track of which group holds which past
symbol. Each symbol overwrites the group of its oldest needed symbol.

Estimates are flagged valid (`out_ce_ok`) once ages 1 to 7 are all filled. On
a clean start that is the eighth symbol after the pre-fill. After one wrong
decision it is two symbols later.

## Predictive 2-D channel estimation and the pre-read (`channel_estimator`, datapath)

### The estimate

The estimate is produced on every third carrier, k = 3i. Take a carrier of
class q in a symbol whose pattern is m, and let d = (m - q) mod 4.

* If **d = 0** the carrier is a pilot of this symbol. The estimate is
  `CR = 3/4 * s_k * SC`, where s_k is the pilot sign.
* **Otherwise** the class last carried pilots d symbols ago (value A) and
  d + 4 symbols ago (value B). The channel is extrapolated linearly to now:

  ```
  CR = 3/4 * ((4+d) A - d B) / 4
  ```

  The factors 7 = 8 - 1, 3 = 2 + 1, 6 = 4 + 2 and 5 = 4 + 1 are shifts and
  adds, and so is 3/4. The 3/4 removes the 4/3 pilot boost, so CR is on
  the same scale as the data carriers.

Carriers 3i + 1 and 3i + 2 are interpolated linearly between neighbouring
estimates as `(2a + b)/3` and `(a + 2b)/3`, with 1/3 taken as 341/1024. Two
delay registers hold the previous estimate.

### The read/write conflict

In steady state the current symbol's pilots overwrite the group of age 7. Age
7 is still needed as B for the carriers of class m + 1, three carriers after
each pilot, and only for the addresses not yet overwritten.

To solve this, each pilot write is preceded by a read of the same address.
That value is held in a register (the *pre-read*) and used in place of the
memory value for that one carrier (`ev_preread`). The accesses also never
collide in a module:

* writes fall on carriers k mod 3 = 1;
* reads fall on k mod 3 = 0.

### Timing

Carriers of one symbol must arrive on consecutive clocks. An assertion
(`a_burst`) checks this. Symbols need at least 4 idle clocks between them.
The output is the same carrier stream 4 clocks later, with `out_cr_re/im`
(14 bits).

## Division-free demapper (`demapper`)

The equalised carrier would be `SC / CR`. The demapper multiplies by
`conj(CR)` instead:

* `F1 = SC * conj(CR)`, from the shared complex multiplier;
* `F2 = |CR|^2`, from the shared power squarer.

Every decision `|Re or Im of SC/CR| > B * NF` then becomes
`|F1| > B * NF * F2`. Here NF is the constellation's normalisation factor and
B is a decision boundary in units of the grid.

B * NF is a 5-bit fraction R/32, so the test is `32|F1| > R * F2`. R * F2 is
formed by canonic-signed-digit shifts and adds, with at most three digits.

| Stage | Bits | R for alpha = 1 / 2 / 4 | Used for |
|---|---|---|---|
| 1 | y0, y1 | (sign of Re / Im F1) | all constellations |
| 2 | y2, y3 | 20 / 21 / 22 | 16-QAM, 64-QAM |
| 3, inner pair (y2/y3 = 1) | y4, y5 | 10 / 12 / 15 | 64-QAM |
| 3, outer pair (y2/y3 = 0) | y4, y5 | 30 / 29 / 28 | 64-QAM |

R is round(32 * B * NF) for the DVB-T hierarchical constellations. One
register follows each stage, so latency is 3 clocks.

Stages that the constellation does not use hold their registers, and their
bits read 0. Before TPS is known, leaving `cmode` at QPSK yields just the sign
bits. Those are also correct for the first two bits of any constellation.

## Word lengths

| Signal | Bits | Origin |
|---|---|---|
| time-domain sample | 6 + 6 | thesis |
| SRAM word | 12 | thesis |
| correlation product into the moving sum | 12 (saturated) | thesis (12-bit SRAM word) |
| moving sums C, P | 19 | thesis |
| squarer inputs | bits [18:8] of C, P | thesis |
| SPS power / class register | 7 / 11 | thesis; bit position of the 7 bits chosen here |
| FFT carriers | 12 + 12 | thesis (FFT output width) |
| channel estimate | 14 + 14 | chosen here, not truncated inside the estimator |

## Departures from the thesis and limits

### Built differently

* **Widened shared multipliers.** The thesis reuses the correlation
  multiplier and squarers after lock, as this design does. Here they are
  widened to the frequency-domain word lengths (12 and 14 bits). The thesis
  only says that stage 1 was reduced to about twelve bits.
* **Mode-test period.** The thesis gives a detection period between
  (1 + 1/32)N and 2(1 + 1/4)N. This design uses (1 + 1/4)N, so that a plateau
  is seen whole even with a 1/4 guard interval. The 2K worst-case
  acquisition is therefore about 10 800 samples rather than the thesis's
  7296. This includes the wait for the first boundary pulse. The testbenches
  measured 7074 to 8343 samples for 2K on clean streams, and 8073 to 10 416
  with noise, fading and frequency offset. In 8K the same choice gives about
  43 000 samples at worst against roughly 29 600 by the thesis's table;
  34 694 to 43 068 were measured.
* **Channel estimation start.** Estimates start after seven stored symbols.
  The thesis's summary table counts six symbols of preprocessing.
* **Clock gating.** The thesis replaces multiplexers with gated clocks.
  Here clock enables are used.

### Choices where the thesis gives none

* the GI rounding rule;
* the confidence-counter thresholds;
* the sample marked by `fft_sym_start`;
* the restart rules (no mode found; pilot mismatch);
* the 341/1024 approximation of 1/3;
* the parity interleave that realises interleaved read/write;
* all interface conventions and latencies.

### Not built

* the FFT;
* the carrier- and sampling-frequency offset loops;
* TPS decoding;
* continual pilots. These are treated as data carriers here; the SPS
  decision does not depend on them.

### Not verified

* error-rate statistics over many symbols and an SNR sweep, as the thesis
  reports them. Only one operating point of the boundary detector is tested
  here: 12 dB SNR, Rayleigh fading and a 23.33-carrier offset, in
  `tb_css_acquisition`;
* the clock speed the RTL reaches. Real time needs one sample per clock at
  64/7 = 9.14 MHz for an 8 MHz channel.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sram_sp_1k` | random reads and writes against a model; hold while idle |
| `tb_memory_bank` | fill through one owner, read through the other, both hand-over directions |
| `tb_cmult3` | random and extreme operands against a * conj(b) |
| `tb_shared_mults` | both settings with random and extreme operands on both clients at once; exact products for the selected client |
| `tb_conf_counter` | random vote runs against a reference model |
| `tb_pilot_prbs` | sequence against the recurrence and its known first bits |
| `tb_twister_delay_line` | 2K x 24 and 8K x 12 lines with random delay changes and input gaps; one read and one write per module per clock |
| `tb_css_detector` | noise only (must restart, never lock); 2K 1/4, 4K 1/32, 8K 1/8 and 2K 1/16 streams: mode, GI, boundary within 4 samples, pulse spacing, lock time |
| `tb_sps_detector` | 2K and 4K symbols with boosted pilots; class sums and decisions |
| `tb_channel_estimator` | channel linear in time and frequency with a forced wrong first decision: one mismatch, two pre-fills, pre-reads, all estimates within +-6 and valid from the expected symbol |
| `tb_demapper` | every constellation and alpha through random channels against ideal slicing |
| `tb_dvb_inner_rx` | end to end at default sizes (see below) |
| `tb_css_acquisition` | 20 acquisitions (2K and 8K, GI 1/4) at 12 dB SNR through a random three-path Rayleigh channel with a 23.33-carrier frequency offset: mode, GI, boundary within G/8 of the ideal point |

### End-to-end test

`tb_dvb_inner_rx` runs the whole design with every parameter at its default.
It generates the following:

* An 8K, GI 1/4 time-domain stream with a random start. The detector has to
  step 2K -> 4K -> 8K, find 1/4 and place the boundary. It is checked for
  exact position and N + G spacing.
* On each `fft_sym_start`, one FFT symbol of 64-QAM data with PRBS-signed,
  boosted scattered pilots. It passes through a channel that drifts in time
  and frequency, and stands in for the FFT.
* Symbol 1 carries the wrong pilot pattern, which forces a mismatch and a
  second pre-fill.
* `cmode` stays QPSK through symbol 10 and is 64-QAM after.

It checks, for every carrier:

* the output index;
* `dm_ce_ok`, which must be set exactly from symbol 9;
* the demapped bits: sign bits while QPSK, all six bits after.

It also counts, and fails if any count is zero:

* mode switches;
* GI decisions;
* the memory hand-over;
* pre-fills;
* mismatches;
* pre-reads;
* QPSK demapping;
* 64-QAM demapping.

A run takes a few seconds.

### Impairment test

`tb_css_acquisition` feeds the boundary detector a cyclic-prefix stream at
12 dB SNR. The stream passes through a three-path Rayleigh channel with
delays of 0, 3 and 7 samples, which is drawn again for every run. It also
carries a frequency offset of 23.33 carrier spacings. Ten runs each are made
in 2K and 8K mode, with GI 1/4 and a random start. All runs found the right
mode and GI. The boundary was on average 3 samples from the start of the
strongest path, and never more than 11 (G/8 is the limit). Lock came after
8073 to 10 416 samples in 2K and 34 694 to 43 068 in 8K. The whole run takes
a few minutes.

### Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/dvb_pkg.sv rtl/*.sv tb/tb_dvb_inner_rx.sv --top-module tb_dvb_inner_rx
./obj_dir/Vtb_dvb_inner_rx +verilator+rand+reset+2
```

Replace `tb_dvb_inner_rx` with any other testbench name to run that test. The
package must come first on the command line. Uninitialised state starts
random with `+verilator+rand+reset+2`. All state that is read is reset, so
results do not depend on the seed.

The lint warnings that remain are of two kinds:

* The assertions use `disable iff (!rst_n)` alongside the asynchronous
  reset, which Verilator reports as a reset used both synchronously and
  asynchronously.
* The top leaves the estimator's and detector's event pulses unconnected.
  They are for observation in simulation only.

## Changing the design

* **Sizes.**
  * `twister_delay_line #(.AW)` sets the longest delay.
  * `css_detector` takes `ACC_W` and `SQ_LSB` for the moving-sum width and
    the squarer tap.
  * `sps_detector` takes `PW_LSB` and `ACC_W`. Move `PW_LSB` if the FFT
    output scale differs: the pilot class sum should stay below 2^11 with
    margin over the data classes.
  * `channel_estimator` and `demapper` take `CRW`, the estimate width.
* **Memory.** The bank geometry (14 modules of 1K x 12) is in `dvb_pkg`. The
  correlation line needs 2^AW / 1024 modules. The pilot store needs seven
  pairs holding ceil(6817/12) = 569 words each.
* **Multipliers.** To give a client its own multipliers again, compute its
  products locally and leave the matching `shared_mults` inputs at zero.
  The widths of the shared units follow `SCW`, `CRW` and `SQW`.
