# Onboard SAR image processor: AXI accelerators for range-Doppler focusing

A synthetic aperture radar records echoes. Each transmitted chirp gives one
range line; successive pulses along the flight path give the azimuth
direction. The simplified range-Doppler algorithm turns this raw data into
an image in three passes over a block (segment) of raw data:

1. **Range compression.** Matched-filter every range line against the
   transmitted chirp.
2. **Corner turn.** Transpose the segment so that azimuth lines are
   contiguous in memory.
3. **Azimuth compression.** Matched-filter every azimuth line against the
   azimuth chirp.

Range cell migration correction is not part of this flow.

Both filtering passes do the same thing in the frequency domain:
FFT → multiply by the conjugate reference spectrum → inverse FFT. Only the
reference differs between them.

This RTL is the programmable-logic half of an FPGA SAR processor built on
that observation:

- **One compression accelerator type (RCAC).** It handles range and
  azimuth compression, selected by a mode argument.
- **One corner-turn accelerator type (COR).** It transposes through
  on-chip block RAM.

Several copies of each sit on a shared AXI4 memory port to DDR. A host soft
processor computes the reference spectra, places them in DDR, and drives
the accelerators through AXI-Lite registers. The default build is the
target configuration:

- 8192 × 8192 segments;
- two compression cores and one corner-turn core;
- 64 × 64 corner-turn blocks.

```
                 AXI-Lite (host)                         AXI4 64-bit (to DDR controller)
                       │                                              ▲
                 ┌─────▼─────┐                                  ┌─────┴─────────┐
                 │ axil_xbar │ 64 KB window per core            │axi_interconnect│ round robin,
                 └┬────┬────┬┘                                  └─▲─────▲─────▲─┘ R and W separate
                  │    │    │                                     │     │     │
             ┌────▼┐ ┌─▼───┐ ┌▼────┐                              │     │     │
             │RCAC0│ │RCAC1│ │COR0 ├──────────────────────────────┘     │     │
             │     ├─┼─────┼─┼─────┼────────────────────────────────────┘     │
             │     ├─┼─────┼─┼─────┼──────────────────────────────────────────┘
             └─────┘ └─────┘ └─────┘       (each core: ha_ctrl_regs + axi_dma + datapath)
```

`sar_processor` is the top:

- `s_ctrl_req/resp`: AXI-Lite slave from the host.
- `m_mem_req/resp`: AXI4 master toward the DDR controller.
- `irq`: one done level per core.

The host processor, DDR controller, Ethernet, timer and UART connect to
these ports. They are not part of the RTL.

## Data format

A sample is one complex I/Q pair. I and Q are each a 32-bit signed
integer, so one sample is 8 bytes. That gives 512 MB for an
8192 × 8192 segment, and exactly one beat of the 64-bit AXI bus. In memory
a sample is `{Q[63:32], I[31:0]}` (`cplx_t` in `sar_pkg`).

A segment is stored row-major: line `k`, sample `n` is at
`base + (k*N + n)*8`.

Reference spectra use the same 64-bit layout. Their values are Q15.16 fixed
point, so 65536 means 1.0.

## Driving the processor

Every core has the same control port (`ha_ctrl_regs`), at
`0x44A0_0000 + i*0x10000`. The compression cores come first, then the
corner-turn cores.

| offset | register | meaning |
|-------:|----------|---------|
| 0x00 | CTRL | write bit0=1 to start. Read: bit0 busy, bit1 done (sticky until the next start), bit2 idle |
| 0x04 | ARG0 | RCAC: DATA_PTR. COR: SRC_PTR |
| 0x08 | ARG1 | RCAC: RG_REF_PTR. COR: DST_PTR |
| 0x0C | ARG2 | RCAC: AZ_REF_PTR. COR: NCOLS (samples per source row) |
| 0x10 | ARG3 | RCAC: MODE (0 range, 1 azimuth). COR: NROWS (rows in the whole source segment) |
| 0x14 | ARG4 | RCAC: FIRST_LINE. COR: FIRST_ROW |
| 0x18 | ARG5 | RCAC: NUM_LINES. COR: NUM_ROWS |

The `irq` bit of a core equals its done flag.

Addresses are byte addresses and must be 8-byte aligned. Arguments must
not change while a core runs.

To focus one segment with two compression cores:

1. Write the raw segment to `RAW`. Write the range and azimuth reference
   spectra (N samples each) to `RG` and `AZ`.
2. Range compression. Start core 0 with DATA_PTR=RAW, MODE=0,
   FIRST_LINE=0, NUM_LINES=N/2. Start core 1 the same way with
   FIRST_LINE=N/2. Wait until both are done. The lines are overwritten in
   place.
3. Corner turn. Start the COR core with SRC_PTR=RAW, DST_PTR=CT,
   NCOLS=NROWS=N, FIRST_ROW=0, NUM_ROWS=N. With several COR cores, give
   each a band of rows that is a multiple of the block size.
4. Azimuth compression. Repeat step 2 with DATA_PTR=CT and MODE=1. The
   image is now at `CT`: row = range cell, column = azimuth position.

Splitting lines into contiguous bands means no line is shared, so the
cores need no overlap or synchronisation. The bands may be any size; they
do not have to be equal.

## Compression core (`rcac_core`)

The core runs one line at a time, with the stages in sequence:

```
S_REF_CMD/S_REF_LOAD   read N reference samples (once per run) -> ref_mem
S_LINE_CMD/S_LINE_LOAD read line k (N beats)                   -> FFT buffer
S_FFT                  forward FFT in place
S_MUL/S_MUL_LAST       X[b] *= conj(R[b]) for all N bins
S_IFFT                 inverse FFT in place
S_WR_CMD/S_WR_STREAM   write line k back to the same address
S_WR_WAIT              wait for the last write response, next line
```

`MODE` only selects which reference pointer is read at the start of a
run. Range and azimuth compression therefore run the same hardware. The
reference is loaded once per run and used for every line of the run.

The line is written back only after the last write response, so when the
core reports done its data is already in memory.

### FFT engine (`fft_core`)

This is an in-place radix-2 Cooley-Tukey engine. It has one N-sample
buffer with two read ports and two write ports, and does one butterfly per
clock.

Each stage issues N/2 butterflies through a three-step pipeline:

1. read the two operands;
2. multiply by the twiddle and add;
3. write both results back.

The pipeline then drains, so one transform takes `log2(N)*(N/2+3)`
cycles. For N = 8192 that is 13 × 4099 = 53 287 cycles.

Twiddles are `cos`/`sin(2πk/N)` in Q1.16 (18 bits), for k < N/2. They are
computed during elaboration, so the ROM needs no data file.

**The ordering trick is the main point of the core.** A radix-2 FFT either
reads its input in bit-reversed order or writes its output that way, and
reordering a whole line costs N extra cycles and a second buffer. This
core avoids both:

- The **forward** transform is decimation-in-frequency. It takes
  natural-order input and leaves the spectrum in bit-reversed order.
- The **inverse** transform is decimation-in-time. It takes bit-reversed
  input and produces natural-order output.
- The spectrum therefore never needs to be in natural order. The pointwise
  multiply between the two transforms works in bit-reversed order.
- For that, the reference buffer is filled at bit-reversed addresses as it
  is loaded: `ref_mem[bitrev(n)] = R[n]`. Bin `b` of the data and bin `b`
  of the reference then sit at the same address, and the multiply walks
  both buffers linearly.

**Scaling.**

- The forward transform is unscaled. Its output is the plain DFT sum,
  which can grow by up to N = 2^13.
- The inverse transform halves the data at every stage, which gives the
  1/N of the inverse DFT.
- Every butterfly output is rounded to nearest and saturated to 32 bits
  (`rnd_sat` in `sar_pkg`).

A real or imaginary output of the forward transform is at most
N·(|I|+|Q|). A full-scale worst case therefore stays clear of saturation
if the input I and Q magnitudes stay below 2^(30-13) = 131 072. Raw SAR samples
(a few ADC bits) are far below that.

**Conjugate multiply.** It runs in Q15.16:

```
re = (xr*rr + xi*ri) >> 16
im = (xi*rr - xr*ri) >> 16
```

Each product is rounded and saturated like the butterflies.

With an all-pass reference (the spectrum of a unit impulse), a line goes
through FFT, multiply and IFFT and returns within ±8 LSB of the circularly
shifted input. The tests use that result as their reference.

### Core timing

One line of N samples takes:

```
N read beats + log2(N)*(N/2+3)  (FFT) + N+2 (multiply)
            + log2(N)*(N/2+3)  (IFFT) + N write beats + memory latency
```

For N = 8192 that is about 2 × 53 287 + 3 × 8192 ≈ 131 000 cycles,
without memory stalls.

The first line of a run adds N cycles for loading the reference. With two
cores sharing a memory that stalls 10 % of the time, the full-size test
measured 169 500 cycles for one line on each core in parallel.

A whole 8192-line segment on two cores takes about 0.55–0.7 G cycles per
compression pass. No clock frequency is fixed in this design. At 150 MHz,
one pass is about 3.7–4.6 s. The FFT butterfly rate dominates, so a
radix-4 or two-butterfly engine would be the next step to go faster.

## Corner-turn core (`cor_core`)

Transposing one sample at a time would make either the reads or the writes
stride through DDR by a whole row. Instead, the source matrix
(NROWS × NCOLS) is cut into BLK × BLK blocks:

1. **Fetch.** A block is fetched with BLK read bursts, one per source row
   segment, each BLK beats long and contiguous. The samples go into an
   on-chip RAM.
2. **Write.** The block is written with BLK write bursts, one per
   destination row. Each burst is again contiguous, and the RAM is read
   column-wise to form it.

Addressing:

- source `(r, c)` is at `SRC_PTR + (r*NCOLS + c)*8`;
- its image `(c, r)` is at `DST_PTR + (c*NROWS + r)*8`.

**Ping-pong buffering.** The RAM holds two blocks (banks). Each bank has a
*full* flag.

- The fetch engine fills a bank when its flag is clear, then sets it.
- The write engine drains a bank when its flag is set, then clears it.

The two engines run at once, so block k+1 is fetched while block k is
written. Within a band, blocks are taken row of blocks by row of blocks,
left to right. An assertion checks that no bank is refilled before it has
been written out.

The core reports done after the write response of its last burst.

**Limits.** NCOLS, FIRST_ROW and NUM_ROWS must be multiples of BLK.
Several COR cores can share a segment by taking different row bands. They
write disjoint column ranges of the destination.

**Timing.** A block moves 2 × BLK bursts of BLK beats. At BLK = 64 and
8192 columns, one 64-row band is 128 blocks. The full-size test measured
620 000 cycles per band with 10 % memory stalls, so a whole 8192 × 8192
segment (128 bands) is about 79 M cycles. The corner turn is bound by
memory traffic, not by the core. With a single memory port, more COR cores
help only as far as the DDR allows.

## Memory side (`axi_dma`, `axi_interconnect`)

Each core has one `axi_dma`. It has a read half and a write half, each
taking a command (address, sample count) and a valid/ready sample stream.

- Commands are cut into INCR bursts of 64-bit beats, each at most 256
  beats long.
- A burst never crosses a 4 KB boundary. Lines that straddle one are
  split, and an assertion checks every burst.
- Each half keeps one burst in flight, so no AXI IDs are needed.
- `wr_done` pulses after the last B response.

`axi_interconnect` merges the cores onto the single DDR port.

- Reads and writes are arbitrated independently. Core A can read while
  core B writes, which is what the COR core's ping-pong and the parallel
  compression cores need.
- Each direction grants round-robin, starting after the last winner. The
  grant is held until the burst's last R beat or its B response.
- The grant is registered, which adds one cycle of latency on AR and AW.
- Assertions check that masters hold AR and AW valid until they are
  accepted.

## Control side (`axil_xbar`, `ha_ctrl_regs`)

`axil_xbar` decodes `(addr - 0x44A0_0000) >> 16` into a core index. An
address outside every window gets DECERR, and nothing is forwarded. Each
direction carries one transaction at a time.

`ha_ctrl_regs` accepts AW and W together and answers reads one cycle after
AR.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|--------:|---------|
| sar_processor | N_FFT | 8192 | line length = segment size (FFT length fixed at build time) |
| sar_processor | NUM_RCAC | 2 | compression cores |
| sar_processor | NUM_COR | 1 | corner-turn cores |
| sar_processor | COR_BLK | 64 | corner-turn block edge |

On-chip memory at the defaults:

- per compression core: data buffer plus reference buffer,
  2 × 8192 × 64 bit;
- corner-turn core: 2 × 64 × 64 × 64 bit.

Total: about 2.9 Mbit.

Other segment sizes need N_FFT changed, because a line cannot be shorter
or longer than the FFT. Table sizes scale with N_FFT. 16 384 × 16 384
needs N_FFT = 16384, and its 2 GB per buffer fills the 32-bit address
space with two buffers.

Four compression cores means NUM_RCAC = 4. The decoder and interconnect
widths follow the parameters.

## Verification

All testbenches are self-checking. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog. Memory is
`tb/axi_mem_model.sv`: a sparse AXI4 slave with random ready/valid stalls
that also checks the 4 KB rule and WLAST. The host is `tb/axil_host.sv`,
an AXI-Lite master.

| testbench | what it checks |
|-----------|----------------|
| tb_fft_core | N=64 forward and inverse transforms against a floating-point DFT/IDFT on random data; cycle count `log2(N)*(N/2+3)` exactly |
| tb_rcac_core | N=64: range mode on a line subset (a circular shift by a known delay; lines outside the range untouched); azimuth mode with a random reference against a floating-point model; latency window for one line |
| tb_cor_core | BLK=8, 32 × 48 segment: full transpose, then a row band into a second buffer with the rest untouched; read/write burst overlap observed on the bus; status bits |
| tb_axi_interconnect | three burst masters with contention, 4 KB splits, and data crossing between masters |
| tb_axil_xbar | per-window register access, start isolation, DECERR on both channels |
| tb_sar_processor | the whole flow on a 32 × 32 segment (N=32, BLK=8): range on two cores in parallel, corner turn, azimuth on two cores. Each pass is checked, and so is the final image against the raw data. It counts parallel runs, interleaved bursts, 4 KB splits, ping-pong overlap and the mode switch, and fails if any never happened |
| tb_sar_workloads | the whole flow for eight builds side by side: 1, 2 and 4 compression cores (with as many corner-turn cores), 16/32/64-sample segments, and 4/8/16 corner-turn blocks. It checks every image, the compression time against its FFT lower bound, the speed-up over one core (at least 1.8 for two cores, 3.2 for four), and that the corner turn neither slows down with more cores nor depends strongly on the block size |
| tb_sar_processor_full | default parameters (N=8192, BLK=64, 2+1 cores): one line per core in each compression pass and one 64-row band of the corner turn on an 8192 × 8192 address layout, with the latency bound checked |

Measured on the 32 × 32 workload builds with 10 % memory stalls:

- **Compression.** Range compression speeds up 1.96× on two cores and
  3.57× on four. The cores interfere only on the memory port.
- **Corner turn.** It does not speed up with more cores (1.03× and
  0.99×). A single core already moves about 0.6 samples per cycle
  through the one memory port, so extra COR cores only pay off with a
  wider or multi-port memory path.
- **Block size.** The corner turn's time barely depends on the block
  size: 2217, 1771 and 1757 cycles for blocks of 4, 8 and 16.

The full segment (about a billion cycles) has not been simulated. The
largest run is the full-size test above: full-length lines and a full-width
corner-turn band.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/sar_pkg.sv tb/tb_sar_processor.sv --top-module tb_sar_processor
./obj_dir/Vtb_sar_processor
```

Replace the name for any other testbench. The full-size test builds in
about 20 s and runs in a few seconds.

Lint reports a few warnings that are left as they are:

- unused bits of the AXI structs (for example strobes and unused response
  fields);
- asynchronous-reset nets used inside `disable iff` of the assertions.

## Departures and limitations

- **Own FFT engine.** The architecture this follows uses a vendor FFT
  core. Here the FFT is a self-contained in-place radix-2 engine, one
  butterfly per clock, so a transform costs log2(N)·(N/2+3) cycles
  rather than about N for a streaming core.
- **Fixed point.** The arithmetic is 32-bit integer with rounding and
  saturation. The reference generation on the
  host must produce Q15.16 spectra. Reference-function generation itself
  (chirp synthesis and its FFT) is host software and is not in this RTL.
- **One reference per run.** Every line of a run uses the same reference.
  Range-dependent azimuth references would need one run per line or per
  line band, or a change to load the reference per line.
- **Sequential stages in the compression core.** Load, FFT, multiply,
  IFFT and store do not overlap across lines. A second line buffer would
  let the load and store of neighbouring lines hide behind the FFTs.
- **No clock constraint.** Latency is given in cycles. The published
  timing for the original two-core system is about 3.7 s per
  compression pass on an 8192 × 8192 segment. Matching it needs roughly
  150–190 MHz on this datapath.
- **Corner-turn scaling.** With one shared memory port, extra COR cores
  give no speed-up here. The original system reports a modest gain
  (about 1.4× for two cores).
- **Own register map and address map.** CTRL/ARG layout and 64 KB windows
  from 0x44A0_0000.
- **No AXI IDs, one burst in flight per direction per core.** This is
  simple and correct, but it does not use the deeper queues a DDR
  controller offers.
