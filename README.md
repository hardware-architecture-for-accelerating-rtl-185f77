# Frequency-domain plane-wave beamformer (Temme–Mueller migration) in SystemVerilog

Plane-wave ultrasound fires the whole aperture at once and rebuilds an image from
every transmit. Time-domain delay-and-sum does this with one delay calculation per
pixel and channel. Fourier-domain migration instead moves the RF data into the
frequency–wavenumber domain and remaps it there. Once it is in that domain, the
image costs two 2-D FFTs, a table-driven 1-D interpolation and a coherent sum over
transmit angles.

This RTL is a streaming core for that algorithm. It reconstructs one 4096 × 256
complex image from 128 RF channels × 4096 samples per transmit angle. It uses
IEEE single precision throughout. Six pipeline stages work on six different frames
at the same time, so one image per stage time comes out once the pipeline is full.
At one sample pair per clock a stage takes 262,144 cycles, about 0.7 ms at 384 MHz,
which is roughly 1,400 single-angle images per second.

## The algorithm as the hardware sees it

For each transmit angle θ:

1. **TFFT + DSPS.** A 4096-point FFT runs along time on each channel.
   - Two real channels (2i and 2i+1) are packed into one complex input, so 64
     transforms cover 128 channels.
   - The *double-spectrum phase shift* (DSPS) unit separates the two spectra:
     - even: `((Yr[k]+Yr[-k])/2, (Yi[k]-Yi[-k])/2)`
     - odd: `((Yi[k]+Yi[-k])/2, (Yr[-k]-Yr[k])/2)`
   - It then multiplies element *k* of each column by `exp(j·(k+1)·φc·π)`. The
     per-column angle φc comes from a phase table (PLUT) that software computes.
   - Only the lower 2048 bins are kept.
2. **XFFT.** A 256-point FFT runs along the array for each of the 2048 frequency
   bins. Channels 128…255 are zero padding.
3. **Remap.** For each lateral wavenumber column, the output at row *j* is a linear
   interpolation between input rows `⌊iiF⌋` and `⌊iiF⌋+1`, then multiplied by a
   scale factor `SFac`. The pairs (iiF, SFac) come from a remap table (RLUT),
   2048 per column.
4. **Compound.** For the second and later angles, the remapped spectrum is added to
   the running sum.
5. **IXFFT.** After the last angle, an inverse 256-point FFT runs along the
   wavenumber axis.
6. **ITFFT.** An inverse 4096-point FFT runs along depth. The upper 2048 inputs are
   zero, so the output is the analytic (complex) image.

Table sizes:
- PLUT: 64 words of two 32-bit angles per angle.
- RLUT: two halves of 128 × 2048 words.

## Architecture

```
raw RF ─► TFFT ─► DSPS ─► MemT ─► XFFT1/2 ─► MemX ─► Remap1/2 (+Compound1/2) ─► MemRC
                                                                                  │
bf_tdata ◄── ITFFT1/2 ◄── MemIX ◄── IXFFT1/2 ◄────────────────────────────────────┘
```

- Every stage except the TFFT has two cores that each handle half the data. The
  TFFT needs only one because its input is real.
- Every stage boundary is a **ping-pong memory pair** (`pp_mem`). While one stage
  writes memory 1 of a pair, the next stage reads memory 2. The roles swap at the
  next step.
- All memories store 64-bit words: `{imag, real}` in binary32. RLUT words are
  `{iiF, SFac}`.

| memory | size (words) | written by | layout | read by |
|---|---|---|---|---|
| MemT  | 2048 × 128 | DSPS | bin·128 + channel | XFFT1 rows 0–1023, XFFT2 rows 1024–2047; zeros for channel ≥ 128 |
| MemX  | 256 × 2048 | XFFT | kx·2048 + bin | Remap1 kx < 128, Remap2 kx ≥ 128 |
| MemRC | 2048 × 256 | Remap/Compound | kz·256 + kx | IXFFT1/2 rows; Compound reads the partial sum at the address it is about to write |
| MemIX | 256 × 2048 | IXFFT | x·2048 + kz | ITFFT1 columns 0–63, ITFFT2 columns 64–127; zeros for kz ≥ 2048 |

Each stage reads its memory in the order its transform needs. It writes in the
order the next stage will read. So every stage streams one word per core per cycle
and no transpose unit is needed. The output word is
`{ITFFT2 sample (column x+64), ITFFT1 sample (column x)}`, 128 bits per cycle. The
image delivered is 128 lateral columns × 4096 depth samples.

## Control: one global step, six stage controllers

`global_ctrl` runs HALT → SETUP → RUN:

- **SETUP** latches the number of angles (`angle + 1`) and waits for `start`.
- **RUN** has one *start register* per stage.
  - A register is set when the stage's input memory holds a complete frame.
  - **Synchronisation point:** at least one start register is set and no stage is
    busy. At that point:
    - every enabled stage gets a one-cycle `go`;
    - each memory pair whose writer finished in the previous step swaps.
  - Stages therefore always start together, aligned to the slowest one.
- **Angle counter.** The Remap stage runs plain for the first angle of an image
  and in compound mode for the others. The IXFFT is enabled only after the last
  angle. The TFFT and XFFT keep running on the next angle's frames.
  - With A angles, one image leaves every A steps.
- **LUT sharing.** LUT1 holds both the PLUT and RLUT1. The controller drives
  `lut1_sel` = 1 while the TFFT stage fetches its phase words, 0 otherwise.

Each stage controller (`tfft_proc`, `xfft_proc`, `remap_proc`, `itfft_proc`) works
the same way:

1. Configure its core(s): FFT direction bit.
2. Wait for the configuration acknowledgement.
3. Generate the read addresses and the zero padding.
4. Stream the data.
5. Write the results with the addresses of the table above.
6. Pulse `done`.

`xfft_proc` serves both the XFFT and the IXFFT through its `INV` parameter.
`remap_proc` contains the Remap and Compound stages; a mode bit selects between
them.

The FFTs run in a real-time style. Once a frame's first word is accepted, data
flows every cycle. The ITFFT stage starts a frame only when `bf_tready` is high,
and after that the output does not pause. The raw input side honours
`raw_tready`/`raw_tvalid` on every word, so the source may pause.

## Arithmetic units

- **`fp_op`**: binary32 add, subtract and multiply with round-to-nearest-even.
  Subnormals are flushed to zero. Latency is 8 for add/sub and 6 for mul. It
  computes in one cycle and then delays the result.
- **`fft_stream`**: pipelined radix-2 single-path delay-feedback FFT in binary32
  with a reorder buffer, so output is in natural order.
  - Forward transforms use `e^{-j}` and inverse transforms use `e^{+j}`. Neither
    scales.
  - Configuration bit 0 = 1 selects forward.
  - Latency is 2N + log2 N cycles.
  - This is a stand-in for a vendor FFT core. Its twiddles are binary32 and are
    computed at elaboration.
- **`sincos`**: phase generator for the DSPS.
  - Converts the column angle (float, in units of π) to 27-bit fixed point with
    25 fraction bits.
  - Accumulates it once per element, wrapping to stay below 2π.
  - Converts the result to a fraction of a turn.
  - Feeds `dds_sincos`, a 24-iteration CORDIC with gain correction (error about
    1e-7), then converts sine and cosine back to float.
- **`phase_shift`**: complex rotation with four multipliers, one subtractor and one
  adder.
- **`dsps`**:
  - Writes each TFFT column into one of two 4096-word buffers.
  - While the next column arrives, it reads the previous one at indices *k* and
    −*k*.
  - Forms both separated spectra, halves them by decrementing the exponent, and
    rotates them.
  - Emits the even channel's 2048 bins, then the odd channel's. That is one word
    per cycle, the same rate as the input.
  - A 128-entry phase memory holds the frame's column angles.
- **`remap`**: one Remap core.
  - Stores the incoming 2048-word column in a two-bank data memory.
  - Converts iiF to an integer part and a fraction.
  - Reads rows `int` and `int+1` (which wraps inside the column) with 3-cycle
    memory latency.
  - Computes `(a + (b−a)·frac)·SFac`.
- **`compound`**: two float adders.

## Latencies and rates

| unit | latency (cycles) | throughput |
|---|---|---|
| float add/sub, mul | 8, 6 | 1/cycle |
| sincos (angle in → sin/cos out) | 36 | 1/cycle |
| DSPS (last input of a column → first output) | 51 | 1/cycle |
| Remap (last input of a column → first output) | 39 | 1/cycle |
| FFT, N points | 2N + log2 N | 1/cycle |
| each stage, full size | 262,144 + fill | — |
| first image after start, 1 angle, full size | 1,380,526 | then one image per ~270,600 cycles |

## Where this RTL departs from the reference design

- **FFT cores.** The reference design uses a vendor streaming FFT. Here they are
  replaced by `fft_stream` with the same AXI-stream style ports. It has
  binary32 twiddles instead of 24-bit ones, and its latency differs.
- **Sine/cosine.** The reference design uses a lookup-table DDS with latency 9 and
  quotes 16 cycles for the phase generator. The CORDIC used here gives 26 and 36.
  Nothing outside the DSPS depends on this number.
- **Remap latency** is 38 cycles, the sum of the listed pipeline pieces. The
  reference design quotes 41.
- **Remap data-memory write** is delayed by the memory and conversion latency.
  Without that delay, a gap-free input stream overwrites the bank of a column
  whose last reads are still in flight. This is a correction found in simulation.
- **Synchronisation point.** It is "some stage enabled and nothing busy", which
  is the same as waiting for the done of the longest-running stage.
- **Compound and Remap** share one stage controller with a mode input. They also
  share the MemRC read port with the IXFFT. This is safe because the first angle
  of an image never compounds, so the IXFFT and a compound pass are never in the
  same step.
- **PLUT.** It holds 64 words per angle: one pair of column angles per word,
  128 angles in total. The phase channel of the DSPS has a `valid` input in
  addition to data, ready and last.
- **Frame lengths are counted**, so `raw_tlast` is accepted but not used.
  `lut_tlast` marks the end of the PLUT list.
- **Angle count.** The `angle` input is 4 bits wide, so an image can combine up
  to 16 angles.
- **Not built here:**
  - the external DDR memories for data and LUTs;
  - the AXI interface / memory controller;
  - the host software that fills the LUTs.

  Their channels are the ports of `tm_core`.

## Files

- `rtl/fp_pkg.sv`: binary32 helpers. `rtl/delay_line.sv`, `rtl/ctl_delay.sv`:
  data and control delay lines (only the control one is reset).
- Units: `fp_op`, `fft_stream`, `dds_sincos`, `sincos`, `phase_shift`, `dsps`,
  `remap`, `compound`, `pp_mem`.
- Stage controllers: `tfft_proc`, `xfft_proc`, `remap_proc`, `itfft_proc`. Global:
  `global_ctrl`. Top: `tm_core`.

Top parameters are `NT` (4096), `NX` (256), `NCOL` (128) and `PH_DEPTH` (128).
Reduced sizes work if all are powers of two and `NX = 2·NCOL`, which gives the lateral zero
padding. The tests use NT = 64, NX = 16, NCOL = 8.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:
- compares against a model computed in the testbench (real arithmetic, DFTs,
  interpolation);
- checks the latencies listed above;
- ends with `TB_RESULT checks=… failures=…`.

Two testbenches cover the whole core:

- **`tb_tm_core`** runs the complete core at NT = 64, NX = 16, NCOL = 8.
  - It runs two image sequences, one with one angle and one with three angles. It
    compares every output sample with a reference beamformer written in the
    testbench.
  - It counts and requires each mechanism:
    - raw-input stalls;
    - waiting for `bf_tready`;
    - plain and compound Remap passes;
    - LUT1 switching;
    - memory swaps;
    - overlapped stages;
    - zero padding;
    - back-to-back frames;
    - restart after a sequence.
- **`tb_tm_core_full`** runs `tm_core` at its default size.
  - Its input is a single tone, and the remap is the identity.
  - It checks all 524,288 output samples of the image against the closed-form
    result, plus the frame timing.
  - It takes a few seconds of simulation after a build of under a minute.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -O2 --top-module tb_tm_core \
  rtl/fp_pkg.sv tb/tb_fp_pkg.sv $(ls rtl/*.sv | grep -v fp_pkg) tb/tb_tm_core.sv
./obj_dir/Vtb_tm_core
```

Use the same command for any other testbench, replacing the top name and the
testbench file.
