# FFAST sparse spectrum analyzer

This is the RTL of a real-time spectrum analyzer for wideband inputs that are
sparse: only a few percent of the 21600 frequency bins hold a signal. It does
not take 21600 samples at the full 3.78 GS/s. Eighteen slow ADC slices
subsample the input instead. They form three groups, subsampling by 25, 27 and
32, and each group has six slightly different sample delays. Every slice
delivers one short frame:

| stage | subsampling | frame length n_i | radices of the sub-FFT |
|-------|-------------|------------------|------------------------|
| 0     | 25x         | 864 = 2^5 * 3^3  | 4, 4, 2, 3, 3, 3       |
| 1     | 27x         | 800 = 2^5 * 5^2  | 4, 4, 2, 5, 5          |
| 2     | 32x         | 675 = 3^3 * 5^2  | 3, 3, 3, 5, 5          |

Subsampling by 21600/n_i in time folds the spectrum. Bin b of the n_i-point FFT
of a lane holds the sum of all spectral lines j with j ≡ b (mod n_i). The
three stages fold in three different ways, because the n_i have different prime factors.
A line that collides with others in one stage is therefore usually alone in
another stage. The reconstruction is FFAST (Fast Fourier Aliasing-based
Sparse Transform). It repeatedly finds bins holding exactly one line
("singletons"), works out where that line is and how big it is, and subtracts
("peels") it from the bins it lands in at the other stages. This can turn
their collisions into new singletons.

The six delayed lanes of a stage are what make a bin's content measurable. A
line at location j seen by a lane delayed by d samples (of the full rate) is
turned by the phase 2π·j·d/21600. Comparing the phases of two lanes gives j.

## Data flow

```
vin ──► 18 x sar_adc ──► 18 x async_fifo ──► 3 x frame_capture ──► 3 x fft_stage ──► peeling_decoder ──► sync_fifo ──► SCR
          ▲  (sample enables)     ▲ (write enables)   (calibration       (6 lanes each)   (singleton_estimator,     (j, X[j])
   3 x clock_divider ──► fifo_align                    tables)                             circular buffers,
          (clk_ref)        (frame window)                                                  CORDICs, Barrett)
```

`ffast_top` wires this together and sequences one run. A write of 1 to CTRL
starts a run, which goes through these phases:

1. Capture (phase 1). Each `frame_capture` requests a frame.
   - `fifo_align` opens a window at the next point where all dividers are in
     phase. That point comes every 21600 reference cycles, the LCM of 25, 27
     and 32.
   - The window lasts exactly 21600 cycles, so lane r of stage i delivers
     exactly n_i samples.
   - The samples cross into the core clock through the lane FIFOs. They are
     corrected by the lane's calibration table and written in time order into
     the lane memories.
2. FFT (phase 2). The three `fft_stage`s run together. The 864-point stage
   takes longest, at 1728 cycles.
3. Peel (phase 3). `peeling_decoder` writes (j, X[j]) records into the output
   FIFO.
4. Done (phase 4). `done_irq` rises.

In calibration mode (CTRL bit 1) the run stops after capture. The host can then
read the raw lane samples through the RAW registers and compute calibration
tables. It writes them back through CAL_WR.

The full-size end-to-end simulation below uses 4 tones, 8 spectral lines in
all. From start to done it takes about 7900 core cycles:
- capture, which is bounded by the wait for the next alignment point plus the
  21600-reference-cycle window (about 2300 core cycles at 3.78 GHz / 400 MHz);
- 1730 cycles of FFT;
- peeling.

## Number formats

- Samples are calibrated codes minus 256 (9-bit signed). The imaginary part is
  zero.
- Memory words are complex, with 20-bit two's-complement real and imaginary
  parts (`cplx_t`).
  - The sub-FFT output is normalized: the stored value is DFT/n_i with 9
    fractional bits. The last FFT pass multiplies by 512/n_i and the binary
    point is taken to be 9 places further left.
  - So a real tone of amplitude A codes appears as A/2 · 512 = 256·A in its
    two bins.
- A recovered value X[j] has the same format, at zero delay.
- Angles are unsigned fractions of a full turn, 24 bits (`ANGW`).
- Locations j are 15 bits (0..21599).
- Energies (|Y|² summed over the six lanes) are 44 bits. The noise threshold
  `T_NOISE` is in these units. Its default is 2^20.

## The singleton estimator (`singleton_estimator`)

This is the most involved block. It gets the six observations Y[r] of bin b of
stage i. The lanes come in three pairs (clusters) with delay differences
τ = 1, 3, 7. With the default delays {0,1}, {6,9}, {12,19}, the pairs are
lanes (0,1), (2,3) and (4,5).

1. Phases. Six vectoring CORDICs give the phase of every Y[r]. For cluster s,
   θ_s = phase(Y[2s+1]) − phase(Y[2s]) equals 2π·ω·τ_s modulo 2π, where
   ω = j/21600.
2. Successive refinement.
   - Start with ω = θ_0/τ_0. With τ_0 = 1 this is unambiguous but coarse.
   - For each further cluster, compute the residue e = wrap(ω·τ_s − θ_s) and
     set ω ← ω − e/τ_s. Division by τ uses a reciprocal table.
   - Each step picks, among the τ_s candidates θ_s/τ_s + k/τ_s, the one
     nearest the current estimate. Noise on the final estimate is therefore
     divided by the largest τ (7).
3. Location. j_est = round(ω·21600). It is moved to the nearest j with
   j ≡ b (mod n_i), which is the only kind of location that can alias into
   bin b.
4. Value.
   - The lane angles 2π·⟨j·d_r⟩_21600/21600 are formed exactly. The modulo
     uses Barrett reduction, so there is no divider.
   - Six rotation CORDICs turn every Y[r] back by its lane angle.
   - The CORDIC gain is removed and the six results are averaged into v.
5. Test. The residual Σ_r |Y[r]·e^{−iφ_r} − v|² equals |Y − v·a_j|². If it is
   below `T_NOISE` the bin is a singleton.

The estimator takes one bin at a time. Its latency is 2·(ITER+1) + 6 = 52
cycles, with ITER = 22 CORDIC micro-rotations.

## Peeling (`peeling_decoder`)

1. Scan.
   - All bins of the three stages are read, one bin per stage per cycle.
   - A bin whose energy reaches `T_NOISE` is pushed into that stage's circular
     buffer (CB). The CB has n_i entries of 10 bits.
   - Other bins are zerotons and are never visited again.
2. Passes. Each pass goes stage by stage. It pops every location that was in
   the stage's CB when its turn started, and reads the bin again.
   - If the bin has fallen below the threshold, the location is dropped. An
     earlier peel emptied it.
   - Otherwise the singleton estimator runs.
     - A singleton's bin is zeroed and (j, v) goes to the output FIFO.
     - For every other stage l, the peel reads bin j mod n_l. If that bin is
       below the threshold it is zeroed. Otherwise v·a_j is subtracted lane by
       lane: six rotation CORDICs turn v by the lane angles.
     - A bin that is not a singleton is a multiton. Its location is pushed
       back into the CB for the next pass.
3. Stop. Peeling ends when a stage's CB is empty, or when a whole pass changed
   no CB length (nothing new can be learned). A pass limit `MAX_ITER` is also
   applied; if it is hit with locations left, `stuck` is set.

Each bin is handled to completion before the next one is read. So a bin is
never read before an earlier peel has updated it.

## Sub-FFTs (`fft_stage`, `mr_butterfly`)

Each stage has six lane memories of n_i words and one controller shared by the
six lanes. It runs an in-place, decimation-in-frequency, mixed-radix FFT as
follows:
- A pass with radix r and block size M visits every block and offset k < M/r.
  It reads the r points k + m·M/r, applies the radix-r DFT, and multiplies
  output q by W_M^{k·q}. The results go back to the same addresses.
- The butterfly handles radix 2, 3, 4 and 5 at run time. Its coefficients are
  constants computed at elaboration.
- The twiddle ROM (n_i entries, Q2.16) and the table that maps an output bin to
  its digit-reversed memory address are also computed at elaboration, with
  `$cos`/`$sin`. No data files are needed.
- One butterfly per lane per cycle gives Σ n_i/r_s cycles per transform:
  1728 for 864 points, 1120 for 800, and 945 for 675.

The access port reads all six lanes at one address in the same cycle. The
address is either a bin, via the unscrambling table, or a raw memory address
for calibration reads. The port also writes all six lanes. The peeling decoder
uses it after the transforms.

## Front end

- `clock_divider`
  - A one-hot ring of DIV flip-flops on the reference clock.
  - Tap r is bit TAPS[r]. It gives a one-cycle sample enable every DIV cycles,
    delayed by TAPS[r] reference cycles.
  - The default taps are 0, 1, 6, 9, 12 and 19.
- `sar_adc` (behavioural model)
  - This is an analog block. The model runs a 9-step successive approximation
    with reduced-radix weights.
  - The weights are 15360, 7680, 3840 for the three MSB steps, then binary
    from 2048 down to 64. The redundancy means missing decision levels appear
    as missing codes, which the calibration table fixes.
  - Code and valid appear one reference cycle after the sample enable.
- `fifo_align`
  - A counter modulo 21600 is reset with the dividers.
  - The core's request is synchronized. The window opens at the next counter
    wrap and lasts one full period.
  - `ack` rises when the window closes and drops after the request is
    released.
- `async_fifo`: an 8-deep dual-clock FIFO with Gray-coded pointers and
  two-flop synchronizers.
- `adc_cal_lut`
  - One table per lane: 512 entries of 9 bits, addressed by the raw code, with
    a synchronous read.
  - After reset it fills itself with the identity in 512 cycles.
  - Entries are rewritten through CAL_WR.
- `frame_capture`: pops the six FIFOs of its stage. It writes calibrated samples
  at their sample index and ends when all six lanes hold n_i samples.

## Register map (`scr_file`, 64-bit words)

| addr | name     | access | contents |
|------|----------|--------|----------|
| 0x00 | CTRL     | W/R    | bit0 start (pulse), bit1 calibration mode |
| 0x01 | STATUS   | R      | [0] busy, [1] done, [2] stuck, [5:3] phase, [15:8] peeling passes, [30:16] signals found, [42:32] output FIFO count, [63:48] FIFO overflows |
| 0x02 | T_NOISE  | RW     | threshold in energy units (default 2^20) |
| 0x03 | MAX_ITER | RW     | pass limit (default 16) |
| 0x04 | DELAYS   | RW     | six 5-bit lane delays, lane 0 in [4:0] (default 0,1,6,9,12,19) |
| 0x05 | TAUS     | RW     | three 4-bit cluster deltas (default 1,3,7) |
| 0x06 | OUT      | R, pops | [63] valid, [54:40] j, [39:20] Re X[j], [19:0] Im X[j] |
| 0x07 | CAL_WR   | W      | [22:21] stage, [20:18] lane, [17:9] raw code, [8:0] table entry |
| 0x08 | RAW_ADDR | RW     | [11:10] stage, [9:0] memory address |
| 0x09–0x0E | RAW | R     | lane 0–5 word {re, im} at RAW_ADDR |

The lane delays in DELAYS are used by the estimator and the peeler. They must
match the divider taps. The taps are fixed at elaboration, because they model
the analog delay cells.

## Memory sizes

| memory | organisation | size |
|--------|--------------|------|
| sub-FFT lane memories | 6 lanes x (864 + 800 + 675) words x 40 bits | 70.2 kB |
| calibration tables | 18 x 512 x 9 bits | 10.4 kB |
| circular buffers | (864 + 800 + 675) x 10 bits | 2.9 kB |
| output FIFO | 1944 x 55 bits (9 % of 21600 records) | 13.4 kB |

All memories are plain arrays, so a synthesis flow will infer or map them to
RAMs.

## How it differs from the original analyzer

- Estimator and peeler are not pipelined. The original pipelines the singleton
  estimator heavily and inserts no stalls. Occasionally it reads a bin before
  a pending peel has updated it, which limits how many signals can be
  recovered in real time. Here each bin is finished before the next one is
  read. There is no hazard, but peeling is slower: roughly 60 cycles per
  estimated bin. A 3.2 %-sparse spectrum (691 lines) needs about 69000
  backend cycles. The original reports about 4700 cycles in total, so this
  design is not real-time at that sparsity. At 0.35 % (76 lines) it needs
  about 7300.
- The FFTs run one butterfly per cycle from natural-order memory. The
  original spreads the data over memory banks, using an index generator and
  mixed-radix bank counters, and runs two radix-2 butterflies at once. Its
  sub-FFTs take about 1500 cycles; here they take 1728.
- Samples are written in time order. The original's bank/address map of
  captured samples is not reproduced.
- Only integer delays are modelled. Sample delays are whole reference cycles
  from divider taps. The original also tunes fine delays in analog and
  compensates measured lane skew by adjusting the delays held in registers.
  The registers exist here, but sub-cycle skew does not.
- The absolute lane delays 0, 1, 6, 9, 12, 19 were chosen here so that the
  cluster deltas are 1, 3 and 7.
- The calibration tables sit on the core side, after the clock-crossing
  FIFOs. The FIFOs therefore carry raw codes. Each table entry has 9 bits
  (sign plus 8 significant bits).
- The ADC is a behavioural model with chosen weights. The reference clock
  driver, bias circuits and delay tuners are analog and not modelled.
- The host processor, its interconnect and memories are not part of the RTL.
  The SCR port is a simple synchronous register bus (write on the clock edge,
  combinational read) for the host to drive. The threshold default and the
  pass limit are this design's choices.
- There is one output FIFO with an overflow counter.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `ffast_top_tb` | Full-size run of the whole analyzer at default parameters with a 4-tone input (8 lines, two collisions). The calibration-mode run is compared with an independent model of the SAR conversion. All 18 x 512 table entries are programmed. In the normal run every line must be recovered within 5 %, with nothing spurious. The FFT phase must take 1728–1732 cycles. The test counts frame windows, FIFO traffic, singletons, multitons put back, peels, bins emptied by peeling and passes, and fails if any never happened. |
| `sparse_workload_tb` | The peeling backend and the full 1944-entry output FIFO on random sparse spectra at 0.35 % (76 lines), 0.79 % (171) and 3.2 % (691) of the bins. There must be no wrong records and no overflow. At least 99 % (95 % at 3.2 %) of the lines must be recovered. In simulation all are recovered. Decoding takes about 7300, 16000 and 69000 cycles. |
| `peeling_decoder_tb` | Scenes of 10, 40 and 80 lines on ideal aliased spectra. Every line must come out once, exact j, within 2 %. All bins must end below the threshold. |
| `singleton_estimator_tb` | 300 random singletons (exact j, v within 1 %) and 100 two-line bins (never taken as singletons). Latency 52 cycles. |
| `fft_stage_tb` | A 60-point 4·3·5 instance against a floating-point DFT: 47 cycles. An 864-point instance with a tone: 1728 cycles. Raw access port. |
| `mr_butterfly_tb`, `cordic_tb`, `barrett_mod_tb` | Arithmetic against floating-point or integer references, including CORDIC latency. |
| `circular_buffer_tb`, `sync_fifo_tb`, `async_fifo_tb` | Queue models, overflow counting, two unrelated clocks. |
| `clock_divider_tb`, `fifo_align_tb`, `sar_adc_tb`, `adc_cal_lut_tb`, `frame_capture_tb`, `scr_file_tb` | Tap timing, window placement and length, per-lane sample counts, reconstruction error of the SAR codes, table init and rewrite, capture ordering and calibration, register map. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/ffast_pkg.sv tb/<name>.sv --top-module <name>
./obj_dir/V<name>
```

The full-size `ffast_top_tb` simulates a complete 21600-cycle acquisition
plus processing in about a second.

## Parameters worth knowing

- `ffast_pkg`
  - `NI`, `SUBF`, `N_FFT`: the stage sizes.
  - `DELAY_DEF`, `TAU_DEF`: the lane delays and cluster deltas.
  - `DW`: the word width.
- `fft_stage`
  - `N`, `NRAD`, `RADIX`: the radix sequence. Its product must be N, which an
    elaboration assertion checks.
- `cordic`
  - `ITER`: the number of micro-rotations.
  - `AW`: the angle width.
- `clock_divider`
  - `DIV`, `TAPS`.
- `fifo_align`
  - `LCM`: the alignment period. It must be the LCM of the dividers.
