# Single-multiplier 2-D wavelet transform engine for lossless medical images

This engine computes the forward and inverse multi-scale 2-D discrete wavelet transform
(DWT) of a 512 x 512 image with 12-bit pixels. It uses six scales and a 13-tap
biorthogonal filter bank. The precision is high enough that the inverse gives back
every pixel exactly, so the transform can sit in front of a lossless coder for CT or MR
images.

The design aims for a small area rather than high speed:

- one 32 x 32 two-stage pipelined multiplier with a 64-bit accumulator does every
  multiply-accumulate;
- the image sits in an external DRAM and is transformed **in place**, with each
  sample read once and each result written once;
- on chip there are only a 32-word input buffer, a 32-word coefficient RAM and an
  N/2 = 256-entry FIFO.

The multiplier works in every cycle except those lost to DRAM refresh. At 33 MHz one
512 x 512, 6-scale transform takes 9.18 M cycles, which is about 3.6 images per second.

```
                 start/dir, busy/done
                         |
                +------------------+  read requests  +--------------+   dram_*
                |  dwt_controller  |---------------->| dram_manager |<=========> DRAM
                | macrocycle, line,|<--ref_pending---| registered   |
                | pass, scale      |                 | port, refresh|
                +------------------+                 +--------------+
                  | tap addr, shift, acc ctl,            |        ^
                  | round ctl, FIFO ctl                  | sample | result
                  v                                      v        |
  config_mem   +--------------+   +------------+         |        |
  b_int(s),    | input_buffer |<--------------------------+        |
  D(s)         | 2 x 16 words |-->| align_unit |                   |
               +--------------+   +------------+                   |
               +----------+             |                          |
               | coef_ram |--------+    |                          |
               +----------+        v    v                          |
               +-----------------------------+  +-------------+  +-------------+
               | mac_unit: operand regs,     |->| round_align |->| output_fifo |
               | pipe_mult, 64-bit acc       |  | >>>, round  |  | delay D(s)  |
               +-----------------------------+  +-------------+  +-------------+
```

## How an image is transformed

A forward transform runs scales s = 1 .. S. Scale s works on the n x n low-pass
quadrant in the top-left corner of the image, with n = N / 2^(s-1). It does two
passes: first every column of the quadrant, then every row.

- Each 1-D pass convolves a line with a 13-tap low-pass filter and a high-pass filter.
- The line is extended periodically at both ends (circular convolution).
- Even-indexed outputs are low-pass results. They go to the first half of the line.
- Odd-indexed outputs are high-pass results. They go to the second half.

This is the usual Mallat layout, so after S scales the DRAM holds the complete pyramid.

The inverse runs scales S .. 1 and, within a scale, rows first, then columns. For each
output position it reads the low half and the high half of the line interleaved. It
applies the synthesis filters and writes the reconstructed line back in natural order.

Every 1-D result needs the 13 samples x[m-6] .. x[m+6] of its line. The engine reads
each line from DRAM once, in this order:

    x[n-6], ..., x[n-1], x[0], x[1], ..., x[n-7]

The six wrap-around samples come first. The last six samples the line needs, x[0..5]
again for the right border, are already in the buffer by the time they are needed.

The engine does not stop between lines or between the two passes of a scale; the
pipeline carries on from one line into the next. Within a scale, macrocycle ("slot") G
reads the G-th sample of the scale's read stream and computes result G - 13. The first
13 slots of a scale only fill the buffer, and 13 more slots at its end finish the last
results.

## The 13-cycle macrocycle

One result is one macrocycle. A macrocycle is 13 clock cycles, one multiply-accumulate
per cycle. When the DRAM needs a refresh, the macrocycle is stretched to 19 cycles.

| cycle | DRAM (decided) | input buffer / coefficient read | accumulator | FIFO, rounding |
|------:|----------------|-----------------------------------|-------------|----------------|
| 0     | read next sample | tap 3                           | load        | round result of previous macrocycle |
| 1     |                | tap 4                             | acc         | push rounded result |
| 2..4  |                | taps 5..7                         | acc         |                |
| 5     |                | tap 8                             | acc         | pop if count > D |
| 6     | write popped result | tap 9                         | acc         |                |
| 7..9  |                | taps 10..12                       | acc         |                |
| 10..12| (12: refresh due?) | taps 0..2 of the **next** result | acc     |                |
| 13    | refresh        | idle                              | hold        |                |
| 14,15 |                | idle                              | hold        |                |
| 16..18|                | taps 0..2 of the next result again| hold        |                |

Each result takes exactly 13 multiplier cycles:

- Taps 0..2 of a result are read in the last three cycles of the previous macrocycle.
- Taps 3..12 are read in cycles 0..9 of its own macrocycle.
- A tap reaches the accumulator three cycles after it is read: one operand register
  and two multiplier stages.
- So the accumulator *loads* the first product of a result in cycle 0 and
  accumulates the other twelve in cycles 1..12.
- Its value is complete at the end of cycle 12. The rounding register takes it in the
  next cycle 0.

When a refresh is pending at cycle 12, the macrocycle runs to cycle 18:

- The refresh command is issued in cycle 13.
- The accumulator holds from cycle 13 on.
- The three early taps already in the multiplier pipeline are lost, so taps 0..2 are
  read again in cycles 16..18. They reach the accumulator in cycles 0..2 of the next
  macrocycle, as usual.

Taps are not addressed by moving pointers. The controller computes each tap's buffer
position directly from the result index and the tap number. The re-read after a
refresh is therefore just a repeat of the same address computation.

## Input buffer folding

A sample must stay in the buffer as long as some result needs it.

- Most samples are needed by 13 consecutive results.
- The first twelve samples of a line are the exception. They form the wrap-around
  border and are needed at both ends of the line.
- A line therefore has 4l + 1 = 25 live words, where l = 6 is half the filter length.

The buffer is rounded up to 32 words and split into two banks of 16. For each line one
bank is the *own* bank: words 0..15 on even lines, 16..31 on odd lines. The other bank
is the *cycling* bank. Stream sample t of a line of length n is stored at:

| stream samples        | where                                  |
|-----------------------|----------------------------------------|
| t < 12 (border)       | own bank, word 4 + t                   |
| 12 <= t < n - 4       | other bank, word (t - 12) mod 16       |
| t >= n - 4 (last four)| own bank, word t - (n - 4)             |

The cycling bank is filled (n - 16)/16 times per line: 31 times on a 512-sample line,
down to 0 times on the 16-sample lines of scale 6.

Banks swap roles on each line, so the next line's border can be written while the
current line is still being finished from its own bank. That is why the pipeline never
stops at line ends. The smallest line the folding supports is 16 samples, so
N / 2^(S-1) >= 16; an elaboration-time assertion checks this.

## Output FIFO and the write-after-read distance

Results are written back over the samples of the same line, so a result must not be
written before every read of its old value has been done.

- The low-pass result of output m goes to line position m/2. That position was read
  long before, so the write is safe.
- The high-pass result goes to position n/2 + m/2. That position is read *later* in
  the stream.

Every result therefore waits in a FIFO. A pop is allowed in cycle 5 only while the FIFO
holds more than D entries, and each pop becomes one DRAM write. The delay per scale is:

    D(s) = N / 2^s - 6        (250, 122, 58, 26, 10, 2 for N = 512)

D has a window of safe values:

- If D is too small, a high-pass result overwrites a sample that has not been read yet.
- If D is too large, the next pass reads a position before the previous pass's result
  for it has left the FIFO.

With this design's schedule, a scale whose lines have n samples is correct for

    n/2 - 9  <=  D  <=  n - 10

On the first scale the FIFO size of N/2 entries caps the upper end. The defaults,
n/2 - 6, sit 3 above the lower end. The original architecture gives n/2 - 6 .. n - 8 as
the bounds. Its upper value is 2 higher than this schedule tolerates, so the window
here is slightly different, but the default values are inside both windows.

The FIFO is 256 entries of {address, data}. Both D(s) and b_int(s) are loaded at reset
into a small configuration memory, and a host can rewrite them.

When a scale's last result has been pushed, the FIFO drains down to the delay of the
next scale, or to zero at the end of the transform. Only then does the next scale start
reading, because its reads depend on writes still in the FIFO.

## Fixed point

All data in DRAM are 32-bit two's complement. The number of integer bits grows with
the scale, because each forward scale can enlarge the dynamic range by up to
(sum |c|)^2.

- Scale s stores its results with b_int(s) integer bits and F(s) = 32 - b_int(s)
  fractional bits.
- The pixels count as scale 0, with b_int(0) = 13: 12 bits plus sign.
- The reset values of b_int(s) for the default filter bank are 16, 17, 19, 21, 23, 25
  for s = 1..6.

| filter bank | s=1 | s=2 | s=3 | s=4 | s=5 | s=6 |
|-------------|-----|-----|-----|-----|-----|-----|
| 9/7         | 15  | 17  | 19  | 21  | 23  | 25  |
| 13/11 (default) | 16 | 17 | 19 | 21 | 23 | 25 |
| 6/10        | 15  | 17  | 19  | 21  | 23  | 25  |
| 5/3         | 16  | 18  | 20  | 22  | 24  | 27  |
| 2/6         | 15  | 16  | 17  | 18  | 19  | 20  |
| 9/3         | 16  | 19  | 21  | 24  | 26  | 29  |

Coefficients are Q2.30. A product of a sample with F_in fractional bits has F_in + 30
fractional bits in the 64-bit accumulator. The result is shifted right arithmetically
by `rshift = F_in + 30 - F_out` and rounded half up: 1 is added when the most
significant dropped bit is 1.

| transform | pass   | F_in -> F_out          | rshift                   |
|-----------|--------|------------------------|--------------------------|
| forward   | first  | F(s-1) -> F(s)         | 30 + b_int(s) - b_int(s-1) |
| forward   | second | F(s) -> F(s)           | 30                       |
| inverse   | first  | F(s) -> F(s)           | 30                       |
| inverse   | second | F(s) -> F(s-1)         | 30 - (b_int(s) - b_int(s-1)) |
| inverse   | second, s = 1 | F(1) -> integer | 62 - b_int(1)           |

The only left shift is on the first pass of the forward transform. There the alignment
unit shifts each 13-bit pixel left by 32 - 13 = 19 so it has the scale-0 format; on
every other pass the shift is 0. The last inverse pass rounds straight to integer
pixels. The residual error of the 32-bit arithmetic is well below half a pixel step, so
this rounding gives back the original pixels exactly.

### Coefficient RAM layout

The 32-word coefficient RAM holds two sets of 13 taps, at words 0..12 for even outputs
and 16..28 for odd outputs. Word k (or 16 + k) multiplies x[m - 6 + k].

- The words are addressed by {output parity, tap}.
- The filters are symmetric: h[-o] = h[o].
- Shorter filters are padded with zeros.

With analysis low pass h and synthesis low pass h~, offset o = k - 6:

| transform | even outputs (words 0..12) | odd outputs (words 16..28) |
|-----------|----------------------------|----------------------------|
| forward   | h[o]                       | (-1)^o h~[o]               |
| inverse   | h~[o] for even o, (-1)^o h[o] for odd o | h~[o] for odd o, h[o] for even o |

Before an inverse run, the host loads the inverse set. A sample-by-sample inverse over
the interleaved low/high line needs only these two tap sets, so the same datapath and
schedule serve both directions.

### Other filter banks

The datapath does not depend on the filter. Any two-channel filter bank whose analysis
and synthesis taps fit in the 13-sample window can be loaded. The table above gives
b_int(s) for six short biorthogonal banks: 9/7, 13/11, 6/10, 5/3, 2/6 and 9/3 taps
(analysis low pass / synthesis low pass). All six run at full size and give back every
pixel exactly.

- **Odd-length banks** (9/7, 13/11, 5/3, 9/3) are symmetric about a sample. They use the
  tables above unchanged.
- **Even-length banks** (6/10, 2/6) are symmetric about a half sample: h[1 - o] = h[o].
  - Their analysis high pass is g[o] = (-1)^o h~[o - 1].
  - For the inverse, let d be the output position minus the sample position in the
    interleaved line. A low-pass sample is weighted by h~[d].
  - A high-pass sample at distance d is weighted by (-1)^d h[d - 1].

Changing banks means rewriting the 32 coefficient words and b_int(1..6). D(s) does not
change with the bank.

## Multiplier and accumulator

- `mac_unit` registers the aligned sample and the coefficient, multiplies them in
  `pipe_mult`, and loads, adds or holds the 64-bit accumulator.
- `pipe_mult` splits each 32-bit operand into a signed upper half and an unsigned lower
  half.
- Stage 1 registers the four partial products.
- Stage 2 adds them and registers the full 64-bit product.
- Synthesis chooses how to build the adder tree.
- The multiplier is designed for a 25 ns clock.

## DRAM side and refresh

`dram_manager` registers every DRAM port signal. Each command therefore reaches the
DRAM one cycle after the schedule decides it:

- the read in cycle 1;
- the write in cycle 7;
- the refresh in cycle 14.

The port is a plain synchronous one:

- `dram_rd`, `dram_wr` and `dram_ref` are one-cycle strobes, with `dram_addr` and
  `dram_wdata` alongside.
- Read data come back with `dram_rvalid` after a fixed latency of at most 11 cycles.
- The returned word is registered and then written into the input buffer at its
  folded address.
- The address is row-major: `row * N + column`.

A timer requests a refresh every `REFRESH_CYCLES` = 624 cycles, which is 15.6 us at
25 ns. The next macrocycle serves the request by stretching to 19 cycles. While the
engine is idle, a refresh is issued at once.

Each refresh costs 6 cycles. A 512 x 512 run therefore takes

    sum over scales of 13 * (2 n^2 + 14 + max(1, D(s) - D(next))) + 6 * refreshes

cycles:

| direction | cycles    | refreshes | multiplier utilisation |
|-----------|-----------|-----------|------------------------|
| forward   | 9,178,031 | 14,708    | 98.99 %                |
| inverse   | 9,178,096 | 14,708    | 98.99 %                |

Almost all of the lost cycles are refresh extensions. The remainder are the FIFO drains
between scales and the pipeline fill and empty at each scale.

## Using the engine

1. Hold `rst_n` low. Reset loads the default b_int(s) and D(s).
2. Write the 32 coefficient words through `coef_we` / `coef_waddr` / `coef_wdata`.
3. Optionally, rewrite the configuration through `cfg_we`:
   - `cfg_wsel = 0` writes b_int(`cfg_waddr`);
   - `cfg_wsel = 1` writes D(`cfg_waddr`).
4. Pulse `start` with `dir`: 0 for forward, 1 for inverse. `busy` stays high until
   `done` pulses, and the transformed image is then in DRAM.
5. Use `mac_busy` to measure utilisation. It is high in every cycle the accumulator
   takes a product.

Parameters of `dwt_top`:

| parameter       | default | meaning                         |
|-----------------|---------|---------------------------------|
| N               | 512     | image rows and columns          |
| S               | 6       | scales                          |
| REFRESH_CYCLES  | 624     | DRAM refresh interval in cycles |
| AWID            | 18      | DRAM word address width         |
| DBITS           | 9       | width of FIFO counts and D(s)   |

The filter length (13), the word sizes (32-bit data and coefficients, 64-bit
accumulator) and the buffer geometry are constants in `dwt_pkg`. A function there
checks that they are consistent with each other.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | constants, enums, buffer-folding and address functions |
| `rtl/dwt_top.sv` | top level |
| `rtl/dwt_controller.sv` | macrocycle, line, pass and scale sequencing |
| `rtl/dram_manager.sv` | registered DRAM port, refresh timer, buffer write tags |
| `rtl/input_buffer.sv` | 32-word folded buffer |
| `rtl/coef_ram.sv` | 32 x 32 coefficient RAM |
| `rtl/config_mem.sv` | b_int(s) and D(s) per scale |
| `rtl/align_unit.sv` | input alignment shifter |
| `rtl/mac_unit.sv`, `rtl/pipe_mult.sv` | operand registers, 2-stage multiplier, accumulator |
| `rtl/round_align.sv` | arithmetic shift and round-half-up to 32 bits |
| `rtl/output_fifo.sv` | 256-entry delay FIFO |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dwt_top.sv` | end to end, 64 x 64, 3 scales, fast refresh |
| `tb/tb_dwt_full.sv` | end to end, all defaults (512 x 512, 6 scales) |
| `tb/tb_dwt_banks.sv` | all six filter banks at full size, forward and inverse |
| `tb/tb_dwt_fifo_bounds.sv` | both edges of the safe FIFO-delay window, per scale (128 x 128) |
| `tb/dwt_ref_pkg.sv` | reference model: loop-nest transform with the same arithmetic |
| `tb/dram_model.sv` | behavioural DRAM with fixed read latency |

## Simulation

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dwt_top \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/dram_model.sv tb/tb_dwt_top.sv
./obj_dir/Vtb_dwt_top
```

To run a unit test, swap in that testbench (plus `rtl/dwt_pkg.sv` and the module
under test). Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

The end-to-end testbenches:

- transform a random 12-bit image forward and compare every DRAM word with the
  reference model;
- then run the inverse and compare it with the reference model and with the original
  image (lossless round trip);
- check 13 multiplier cycles per result and the total cycle count against the formula
  above;
- count refresh extensions, writes from both bank parities, the FIFO reaching D(1)
  and the drains between scales, and fail if any of them never happens.

`tb_dwt_fifo_bounds` sets D(s) of one scale at a time to the lowest and the highest
safe value and to the default, and checks that the round trip is exact. It also sets
D one step outside the window and checks that the data are then corrupted, so both
hazards are real and the window is tight.

`tb_dwt_banks` repeats the full-size forward and inverse runs for each of the six
filter banks, with that bank's coefficients and b_int values. It takes about 70 s.

The full-size run also checks at least 3.5 images per second at 33 MHz and a
utilisation of at least 98.9 %. It takes about ten seconds to simulate. Both
end-to-end testbenches pass for random power-up states of all flops.

## How this design relates to the architecture it implements

These parts follow the published architecture:

- one pipelined 32 x 32 multiplier and a 64-bit accumulator;
- one DRAM read and one write per 13-cycle macrocycle, stretched to 19 cycles for a
  refresh;
- the 4l + 1 -> 32-word input buffer folded into two banks that swap on odd lines,
  with the cycling bank reused (n - 16)/16 times;
- the delay FIFO of N/2 words with a per-scale delay D;
- per-scale integer parts held in a configuration memory;
- 13-bit pixels, 32-bit data and coefficients;
- round-half-up.

These are choices of this design:

- **Read order and result timing.** A line is read wrap-around part first, and result
  G is computed one macrocycle after its newest sample arrives. With this timing the
  published delays D(s) are safe. The measured safe window of D is n/2 - 9 .. n - 10,
  against the published n/2 - 6 .. n - 8.
- **FIFO and write timing.** The published schedule pushes the FIFO in cycle 0 and
  marks DRAM writes in cycles 6 and 10. Here the rounding register is loaded in cycle
  0, the push is in cycle 1, and there is one write per macrocycle, decided in cycle 6.
  Because the DRAM port is registered, every command reaches the DRAM one cycle later.
- **Drain between scales.** The pipeline drains between scales. This costs a few
  thousand cycles per transform: utilisation is 98.99 % against the 99.04 % reported
  for the original.
- **Refresh interval.** The 624-cycle interval is assumed. It is the value that gives
  close to the reported utilisation.
- **Tap addressing.** Buffer addresses are computed from the result index rather than
  kept in decrementing pointers.
- **Inverse transform.** The interleaved read of the low and high halves, and the
  parity-dependent synthesis tap sets, are this design's own formulation. The
  original architecture only states that it computes the inverse.
- **Multiplier structure.** The multiplier is two registered stages of partial
  products. It is not a hand-built Wallace tree.
- **Filter banks.** The reset configuration is the 13/11-tap bank. The other five
  banks run on the same hardware once the host has loaded their coefficients and b_int
  values. Placing the even-length banks inside the 13-tap window, and deriving their
  high-pass and synthesis taps, is this design's own work.
- **Interfaces.** The host interface and the DRAM protocol are this design's own.
  There is no PCI bus interface.
