# A memory-centric OFDM baseband processor

An OFDM receiver spends most of its energy and area on memory. It buffers the
incoming symbol, runs the FFT on it, compensates the channel and demaps the result.
A naive design copies every buffer from one memory to the next between these steps.
This processor never copies. Its memory is split into a few **banks**, and each bank
has its own address generator. A **memory crossbar** hands each bank to exactly one
processing unit at a time. When a unit finishes a task, the controller reconnects the
banks, so the buffer that unit wrote becomes the next unit's input without moving a
single word. Each bank has four parallel memories behind a small **reordering
crossbar**. This lets a four-lane complex MAC unit read and write four samples per
cycle in any of the access patterns a radix-4 FFT needs, with no conflicts.

The same hardware handles symbols of different sizes (multi-standard): sizes
and addressing are configuration, not structure. The default sizes give
28672 words of 32 bits (917504 bits):

| bank | role in the reference schedule                          | size (4 ways)   |
|------|---------------------------------------------------------|-----------------|
| DM0  | receives the current symbol from the front end          | 4 x 2048 words  |
| DM1  | FFT working buffer / next symbol (swaps role with DM0)  | 4 x 2048 words  |
| DM2  | FFT working buffer                                      | 4 x 1024 words  |
| CM   | coefficients: FFT twiddles, channel estimate, preamble  | 4 x 2048 words  |

## Units and crossbar ports

`bb_top` connects six crossbar ports to four banks (numbers in `bb_pkg`):

| port | unit                                                   |
|------|--------------------------------------------------------|
| 0 FE | front end: frequency compensation, decimating filter, packet detector; writes captured samples |
| 1 A  | CMAC source operand (reads)                            |
| 2 B  | CMAC coefficient operand (reads)                       |
| 3 C  | CMAC destination (writes)                              |
| 4 MDM| mapper/demapper (reads points or writes points)        |
| 5 EXT| controller / bridge data port, brought out as `ext_req`/`ext_rsp` |

`xbar_owner[b]` names the port that owns bank `b`. A port may own at most one
bank, which an assertion in `mem_xbar` checks. A bank with no owner sits idle.
Reads return one cycle after the request. The response is routed back using
the owner held in a register at request time, so ownership can change
on any cycle boundary.

The controller core, its ALU, the bridge to the scalar part and the analog
front end are not in the RTL. Everything the controller would program becomes a
top-level input: bank configurations and their load strobes, owners, vector
instructions and front-end settings.

## Bank: address generator, reordering crossbar, four memories

A unit only asserts `en`/`we` and supplies data. The address comes from the
bank's own AGU (`agu.sv`), which is loaded with a `bank_cfg_t` and then
advances by one element on every access. It has three modes:

* **normal**: `start + i*step`;
* **modulo**: the same, but wrapping inside the circular buffer
  `[base, base+len)` (the front end uses this to keep the last samples);
* **bit-reversed**: `base + rev(i)` over `rbits` bits. With `rdig2` set, the
  reversal works on base-4 digits instead of bits. This is the order in which a
  radix-4 FFT leaves its output.

### How words map onto the four memories

Word address `a` lives in memory `m(a) = (sum of the base-4 digits of a) mod 4`,
at row `a >> 2`. In **wide** mode an access touches four words,
`A + k*4^lstride` for k = 0..3. These four addresses differ only in digit
`lstride` of `A`, which takes all four values when that digit of `A` is 0. So
the four digit sums are distinct mod 4, and the four words sit in four
different memories, for every lstride. Conflict-free cases:

* `lstride = 0`: four consecutive words (`4i .. 4i+3`), used for FFT writes and
  vector operations;
* `lstride = log4(N) - 1`: words `i, i+N/4, i+N/2, i+3N/4`, the inputs of one
  radix-4 butterfly.

The `lhalf` bit doubles the spacing to `2*4^lstride`. The four addresses then
add 0, 2, 1 and 3 to the digit sum, so they are still conflict-free. This
holds when digit `lstride` of `A` is 0 or 1 and the digit above it is 0. FFT
sizes `2*4^L` (32, 128, 512, 2048) need this spacing, because their
butterfly inputs are N/4 apart.

`reorder_xbar` turns lane addresses into per-memory addresses and routes data
both ways. It keeps the read routing in a register for the one-cycle memory
latency. An assertion fires if two lanes ever land in the same memory. In
**narrow** mode only lane 0 is used, one word per access (front end,
controller); lanes 1–3 read as zero. Any scalar access is conflict-free.

## The radix-4 FFT as four bank-to-bank passes

`cmac` is a four-lane complex multiply-accumulate unit with its own vector
sequencer. One instruction (`start`, `op`, `len`) streams `len` steps: read
port A (and B), compute, write port C. It works out no addresses itself: it
reads and writes whatever the AGUs of the connected banks produce.

`OP_BFLY4` computes one radix-4 decimation-in-frequency butterfly per cycle:
a 4-point DFT on the four lanes of A, a right shift by `shift` (0–3, for scaling),
then a multiply of each lane by the matching lane of B (coefficients in Q2.14).
The FFT uses a **constant-geometry** form, so every stage has the same
addressing:

* stage `s` reads `x[i + m*N/4]` (A bank wide, lstride = log4 N − 1, AGU
  normal, start 0, step 1) for i = 0..N/4−1,
* and writes `y[4i + k]` (C bank wide, lstride 0, step 4).

Twiddle of output `k` at step `i` in stage `s` is
`W_N^(k * (i >> 2s) * 4^s)`. All stages share **one** table of N words, where
word `4j + k` holds `W_N^(k*j)`, stored in CM. Stage `s` reads it with AGU step
`4*4^s`. The instruction's `b_hold = 2s` makes the CMAC request a new
coefficient only every `2^(2s)` steps, and reuse it in between. So a
256-point FFT is four `BFLY4` instructions of 64 steps each. They ping-pong
between two banks; the owner of each bank swaps between instructions, and no
data moves. The result is in base-4 digit-reversed order. The next consumer
reads it in natural order by putting the bank's AGU in bit-reversed mode with
`rdig2 = 1` and `rbits = log2 N`. The first stage can read straight out of the
capture buffer: the guard interval is skipped by the start address alone.

### Sizes 2·4^L: a final radix-2 stage

For N = 2·4^L the same L radix-4 stages run first. The A bank uses lstride
L−1 with `lhalf` set, so lanes are N/4 apart, and twiddles come from the same
kind of N-word table. After them, each pair `(p, p+N/2)` still needs a
2-point DFT. `OP_BFLY2` does two of these per cycle: on lanes
`i, i+N/4, i+N/2, i+3N/4` it forms `(a0+a2, a1+a3, a0−a2, a1−a3)`. The stage
needs no twiddles, so B is not read. Source and destination banks use the
same addressing (step 1, the same lane spacing), in N/4 steps. The output
holds bin `k` at `(k >= N/2 ? N/2 : 0) + digrev(k mod N/2)`. A consumer
therefore reads it in natural order half by half: two bit-reversed passes with
`base` 0 and N/2, and `rbits = 2L`. A 2048-point FFT takes 5 × 515 + 515 =
3090 cycles.

`OP_VMUL` multiplies A by B (optionally conjugated, `conj_b`) lane by lane.
This is channel compensation. `OP_DOT` accumulates `sum A*B` at 48-bit
precision; it is used for preamble correlation and channel estimation. It gives
the full result on `dot_re`/`dot_im` and writes the scaled, saturated sum to
lane 0 of port C.

**Phase tracking** needs no extra hardware. A narrow `OP_DOT` over the pilot
subcarriers, against conjugated pilot references, gives
`sum|P|^2 * e^(j*phi)`. The controller turns this into the unit phasor
`e^(-j*phi)` and stores it in four lanes of CM. One wide `OP_VMUL` with
`b_hold = 15` reads the phasor once, holds it, and rotates the whole symbol.
For 256 subcarriers with 8 pilots this takes 11 + 67 cycles.

**Cyclic correlation** for synchronisation is three instructions. First an
FFT of the received block. Then `OP_VMUL` with `conj_b` against the reference
spectrum stored in CM. Then a second forward FFT. The magnitude peak gives the
circular shift of the block against the reference. For 256 points this takes
2 × 268 + 67 cycles.

Timing: if `start` is sampled in cycle 0, step i is read in cycle i+1 and
written in cycle i+4. `done` pulses in cycle `len+3`, so an N-point FFT
takes log4(N) * (N/4 + 3) cycles.

## Front end

`front_end` chains three accelerators between the ADC samples and a bank:

1. `freq_comp`: a phase accumulator (NCO) drives a 16-stage pipelined CORDIC
   rotator, which removes a carrier frequency offset. `phase_inc` is in units
   of 2^-32 turn. Internal angles use 24 bits, and the error is within 3 LSB.
   Latency is 18 cycles.
2. `decim_filter`: a 7-tap half-band low-pass `[-1 0 9 16 9 0 -1]/32`,
   decimating by 1, 2 or 4. It can be bypassed.
3. `packet_detector`: correlates the signal against a copy delayed by D=64
   samples, over a 64-sample window. It raises `det` for one cycle when
   `16*|c| > thr*p` and the window power exceeds `pmin`. It re-arms only
   after `32*|c| <= thr*p`, so one preamble produces one pulse.

The front end also keeps the complex correlation `c` from where `|c|` peaks
after a detection (`fe_det_corr_re/im`). On a preamble of period D, its angle
is −2π·D times the remaining carrier offset in turns per sample. The
controller therefore estimates the offset as `−angle/(2π·64)` and writes it
into `phase_inc`. This covers offsets up to ±1/128 turn per sample.

Filtered samples are written (narrow mode) into the bank owned by port 0,
whose AGU is usually set to modulo mode. With `trig` set, writing starts at
the detection. After `cap_len` samples the front end stops and raises `cap_done`.

## Mapper / demapper

`mapper_demapper` handles Gray-coded QPSK, 16-QAM and 64-QAM, four points per
cycle. Per axis the level is `(2g−(M−1)) * scale`, where g is the Gray-decoded
index; the upper half of each symbol's bits goes on I. The **map** mode takes 4 ×
6 bits per valid cycle and writes four points (wide). The **demap** mode reads
`len` wide words. It makes a hard decision for each point by rounding to the
nearest level, and sends out the bits `len+2` cycles after `start`.

## Data formats and conventions

* Complex samples: 16-bit real and imaginary parts in two's complement, packed
  into 32 bits (`cplx_t`, real part on top).
* Active-low asynchronous reset `rst_n`. Memories start at zero in
  simulation; their contents are not reset.
* All ports are valid/enable only, with no back-pressure. A unit must own its
  bank for the whole instruction, and the controller guarantees this by
  programming owners before `start`.

## Departures from the published architecture and limitations

* The controller core (DSP-style processor with an ALU and SIMD control),
  the network bridge and the analog front end are not built. Their signals are
  ports of `bb_top`, and the testbench plays the controller.
* FFT sizes are `4^L` or `2*4^L` only. The radix-2 stage always comes last
  and has no twiddles. There is no general radix-2 butterfly with
  coefficients.
* Demapping is a hard decision. Soft bit metrics and differential
  demodulation are not provided.
* The packet detector's delay D=64 is fixed by a parameter and suits a
  preamble with period 64 (802.16e OFDM-256). Other standards need another D.
* Internal formats (Q2.14 coefficients, 48-bit accumulators, CORDIC
  precision, filter taps, detector thresholds), the exact constant-geometry
  FFT, the word-to-memory mapping and all handshakes are this design's own
  choices. The published architecture gives the bank organisation, the AGU
  modes, the crossbars and the split into units, but not these details.
* Cycle counts are those given above. Each vector instruction adds 3 cycles of
  pipeline to the `len` issue cycles. A unit runs one instruction at a time,
  but different units (front end, CMAC, mapper/demapper) run concurrently on
  different banks.
* Scalar steps of the receiver belong to the controller and are done by the
  testbenches: the angle for frequency and phase estimates, and the
  compensation coefficients, which the testbench derives from the channel it
  applies rather than estimating it.

## Workload fit at the default sizes

* **802.16e, 256-point FFT, 320-sample symbol**: simulated end to end at full
  size. FFT 4×67 cycles, channel compensation 259, phase tracking 78,
  demapping 66: about 680 cycles, against roughly 1850 cycles per symbol at 80 MHz.
* **DVB-H 4k mode, 4096-point FFT, 5120-sample symbol**: fits. The symbol goes
  in DM0. The FFT ping-pongs between DM2 (exactly 4096 words) and DM1. CM holds
  4096 twiddles + 4096 channel coefficients. FFT and channel compensation take
  7189 cycles against 36960 in the symbol time at 80 MHz. Simulated at full
  size (`tb_ofdm_fft`).
* **DAB mode I, 2048-point FFT, 2560-sample symbol**: five radix-4 stages and
  the radix-2 stage, then channel compensation in two halves. This takes 3608
  cycles against 99680. Simulated at full size (`tb_ofdm_fft`). Differential
  (DQPSK) demodulation is not provided.

## Files

`rtl/`:

* `bb_pkg.sv`: types (`cplx_t`, bank request/response, AGU and bank
  configuration, front-end settings), port and bank numbers, helper functions.
* `spram.sv`, `agu.sv`, `reorder_xbar.sv`, `mem_bank.sv`: one bank.
* `mem_xbar.sv`: the bank/port crossbar.
* `cmac.sv`, `freq_comp.sv`, `decim_filter.sv`, `packet_detector.sv`,
  `front_end.sv`, `mapper_demapper.sv`: the units.
* `bb_top.sv`: everything wired together.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb_bb_top` runs the whole processor at its default sizes. It streams noise, a
preamble and a 16-QAM symbol through a random channel with a frequency offset,
and detects, captures and correlates the preamble. It then runs the 256-point
FFT, compensates the channel, removes a common phase error by pilot-based
phase tracking, and demaps all 1024 bits, which must come out
exactly. Finally it runs mapping, a decimated capture concurrently with a 32-point
mixed-radix FFT (front end and CMAC writing different banks in the same
cycles), and a frequency-offset estimate. It counts every
mechanism (reconnection, narrow/wide, modulo, digit reversal, coefficient
hold, ...) and fails if any of them never happened. `tb_ofdm_fft` runs the
4096-point and 2048-point symbols through FFT and channel compensation at full
size. It checks every bin against a floating-point DFT and every instruction's
cycle count. It then finds a circular shift by cyclic correlation.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/bb_pkg.sv rtl/*.sv tb/tb_bb_top.sv --top-module tb_bb_top
./obj_dir/Vtb_bb_top
```

Replace `tb_bb_top` with any other testbench name to test a single module.
Some testbenches override parameters (memory depth) to run faster. The
full-size run takes a few seconds.

To change sizes, set the `*_DEPTH` parameters of `bb_top` (words per way; a
bank holds four times that). Larger FFTs need a bank of at least N words for
each buffer, an N-word twiddle table in CM, and `lstride` up to log4(N)−1
(3-bit field).
