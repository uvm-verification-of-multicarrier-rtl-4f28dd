# OFDM baseband transmitter: bits in, cyclic-prefixed time samples out

OFDM (orthogonal frequency-division multiplexing) sends a fast bit stream as
many slow streams side by side, one per subcarrier. The subcarriers are spaced
at exactly the inverse of the symbol length, so they do not interfere even
though their spectra overlap. A transmitter does not need one oscillator per
subcarrier. It puts one constellation point on each frequency bin and takes a
single inverse FFT, and the result is the sum of all the modulated subcarriers,
sampled in time.

This RTL is such a transmitter, written as a chain of four stages:

```
            +-----------+    +-----------+    +------------------+    +------------------+
datain ---->| serial to |--->| modulator |--->| zero padding +   |--->| parallel to      |---> dataout
(6 b/push)  | parallel  |    | (48 x     |    | radix-2 DIT IFFT |    | serial, adds the |    (re,im per
            | (1 frame) |    |  mapper)  |    | (64 points)      |    | cyclic prefix    |     cycle)
            +-----------+    +-----------+    +------------------+    +------------------+
              stopin <--        (comb.)          1 butterfly/cycle       stopout -->
```

- Each frame is a set of input bits, 6 per push. The frame fills 48 data
  subcarriers with BPSK, QPSK or Gray-coded 16-QAM points. The mode is chosen
  per frame.
- The other 16 bins of a 64-point inverse FFT are set to zero.
- Each OFDM symbol goes out as 16 cyclic-prefix samples followed by its 64
  time samples.
- Every sample is a complex number in 16-bit fixed point.

An analog stage would then move this baseband signal up to the carrier
frequency. That stage is not part of the RTL. `dataout` is the signal that
would feed it.

## Ports and the stream protocol

`fdm_tx_top` has plain ports:

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1  | clock; all flops use the rising edge |
| `rst`      | in  | 1  | synchronous reset, active high |
| `mode`     | in  | 2  | constellation of the frame: 0 BPSK, 1 QPSK, 2 16-QAM (3 behaves as 2). Sampled only with `firstin` |
| `pushin`   | in  | 1  | `datain` is valid |
| `firstin`  | in  | 1  | this push is the first of a frame |
| `datain`   | in  | 6  | next six bits of the stream; `datain[0]` is the earliest |
| `stopin`   | out | 1  | the transmitter takes no push this cycle |
| `pushout`  | out | 1  | `dataout` is valid |
| `firstout` | out | 1  | this is the first sample of an OFDM symbol, i.e. its first cyclic-prefix sample |
| `dataout`  | out | 32 | `{re[15:0], im[15:0]}`, each part in Q2.14 |
| `stopout`  | in  | 1  | the sink takes no sample this cycle |

The rules for a transfer:

- **Input.** A push is taken at a rising edge where `pushin=1` and `stopin=0`.
  `stopin` comes straight from a flop.
- **Output.** A sample leaves at a rising edge where `pushout=1` and
  `stopout=0`. While `stopout` is high, `dataout` and `firstout` hold their
  values (an assertion checks this).
- **Frame length.** A frame is 48 × bits-per-symbol bits:

  | mode   | bits per frame | pushes per frame |
  |--------|----------------|------------------|
  | BPSK   | 48             | 8                |
  | QPSK   | 96             | 16               |
  | 16-QAM | 192            | 32               |

  The push carrying `firstin` is push 0.
- **Framing errors.**
  - A push that arrives before any `firstin` is dropped.
  - A `firstin` in the middle of a frame throws away the partial frame and
    starts a new one with that push.

Back-pressure works stage by stage. Each stage holds one frame. While the
output is stalled, the IFFT keeps its result, the serial-to-parallel converter
keeps its complete frame, and `stopin` stays high.

## From bits to constellation points

The serial-to-parallel converter writes push *p* into bits `[6p+5:6p]` of a
192-bit frame word. Bit *i* of the word is therefore the *i*-th bit of the
stream. Subcarrier *s* takes the *b* bits starting at bit `s*b`, where *b* is
1, 2 or 4. All 48 mappers work in parallel and have no clock.

| mode   | bits used | real part | imaginary part |
|--------|-----------|-----------|----------------|
| BPSK   | b0        | b0 ? +1 : −1 | 0 |
| QPSK   | b1 b0     | b0 ? +a : −a | b1 ? +a : −a |
| 16-QAM | b3 b2 b1 b0 | Gray(b1 b0) | Gray(b3 b2) |

- The QPSK level *a* is `16'h2d40` = 11584, which is about 0.7071 in Q2.14.
  So the all-zero QPSK symbol, written as a `{re, im}` word, is `d2c0_d2c0`.
- Gray(xy) maps 00 → −3c, 01 → −c, 11 → +c and 10 → +3c. The lower pair
  sets the real axis and the upper pair the imaginary axis.
  - c = 16384/√10 ≈ 5181
  - 3c ≈ 15543
  - The average symbol energy is therefore 1.
- Neighbouring 16-QAM points differ in a single bit, so a decision error
  between neighbours costs one bit.

## The inverse FFT

The IFFT is the part that most needs explaining. It computes

    x(n) = 1/N · Σ_{k=0}^{N−1} X(k) · exp(+i·2π·n·k/N),   N = 64

over bins X(0..47) = the 48 mapped symbols and X(48..63) = 0 (the zero
padding).

**Structure.** The work is done in place in a 64-entry register array with a
single radix-2 decimation-in-time butterfly that is used again every cycle.
Decimation in time needs its input in bit-reversed order, and then gives its
output in natural order. So the load cycle writes symbol *k* to address
`bitrev6(k)`, and the result is read out as `mem[0..63]` with no reordering.

**Schedule.** There are log2 N = 6 stages of N/2 = 32 butterflies, one
butterfly per clock, 192 cycles in all. In stage *s* (span `h = 2^s`),
butterfly *j* works on:

    pos  = j mod h
    i0   = (j div h)·2h + pos
    i1   = i0 + h
    W    = exp(+i·2π·t/N),  t = pos · N/(2h)

It reads `mem[i0]` (a) and `mem[i1]` (b) and writes back

    mem[i0] = (a + W·b) / 2
    mem[i1] = (a − W·b) / 2

Reads are combinational and writes happen at the next edge. No entry is
touched twice within a stage, so this update order is hazard free.

**Scaling.** Each butterfly halves its outputs, so the six stages together
apply exactly the 1/N of the formula. This also keeps every intermediate
value in range:

- The largest 16-QAM point has magnitude ≈ 21980 (Q2.14).
- Halving after each add means no stage can grow the magnitude.
- The saturation in the butterfly is only a safety net.

**Twiddles.** The 32 twiddles are `round(16384·cos)` and `round(16384·sin)`
of 2πt/64. They are computed at elaboration time from `$cos` and `$sin` in
`fdm_pkg::twiddle`, so changing `N` needs no table file.

**Rounding.**

- W·b is a 32-bit product per term, rounded to nearest back to Q2.14.
- The sum and the difference are halved with round-half-up and then
  saturated to 16 bits.

Against a floating-point inverse DFT, the largest error measured over
random full-scale spectra is below 3 LSB (the testbenches allow 4).

**Handshake and latency.** `in_ready` is high only when the IFFT is idle. The
load edge is followed by 192 butterfly edges. `out_valid` then rises
log2(N)·N/2 + 1 = 193 edges after the load edge. It stays high, with the
samples steady, until the parallel-to-serial stage takes them.

## Cyclic prefix and output

The parallel-to-serial stage copies the 64 samples into its own buffer, so
the IFFT is free for the next frame. It then sends samples 48..63 (the cyclic
prefix, a copy of the symbol's tail that acts as the guard interval) followed
by samples 0..63. That is 80 samples, one per accepted cycle. `firstout` marks
the first one. The stage can load the next symbol in the same cycle that the
last sample leaves, so back-to-back symbols stream without gaps.

## Throughput

At the default sizes with no stalls, the IFFT is the slowest stage:

- A new symbol can start at most every 194 cycles: 1 load, 192 butterflies
  and 1 hand-over.
- Each symbol sends 80 samples, so the output is busy about 41 % of the time.
- A 16-QAM frame takes 32 pushes and is filled while the previous frame is in
  the IFFT.
- The sustained input rate is 192 bits per 194 cycles in 16-QAM, 96 in QPSK
  and 48 in BPSK.

A faster IFFT (pipelined or with more butterflies) would be the change to make
if the sample rate must be higher. Nothing outside `ifft.sv` depends on its
latency.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N`       | 64 | top, `ifft`, `parallel_to_serial` | transform size, power of two |
| `NDATA`   | 48 | top, `serial_to_parallel`, `modulator`, `ifft` | data subcarriers, bins 0..NDATA−1; must be a multiple of `DIN_W` and ≤ N |
| `CP_LEN`  | 16 | top, `parallel_to_serial` | cyclic-prefix length, < N |
| `DIN_W`   | 6  | top, `serial_to_parallel` | input bits per push |

The 6-bit input, the 32-bit output word and the Q2.14 scale with QPSK level
`16'h2d40` match the interface of the published transmitter. The values of
`N`, `NDATA` and `CP_LEN` are choices of this design:

- The published description leaves `N` open.
- `NDATA = 48` makes every mode's frame a whole number of 6-bit pushes.
- `CP_LEN = N/4` is a common prefix length.

## Where this RTL goes beyond, or departs from, its source

The published design gives the following:

- the chain: serial-to-parallel, modulator, zero padding with a radix-2
  decimation-in-time IFFT, and parallel-to-serial with a cyclic prefix,
  followed by RF up-conversion;
- the IFFT formula with its 1/N;
- the butterfly as a twiddle multiplication followed by a + Wb and a − Wb;
- 16-QAM built from 4-bit groups, Gray coded, with the upper two bits on the
  imaginary axis and the lower two on the real axis;
- the names of the stream ports and the 6/32-bit widths.

Everything else is a choice made here:

- the sizes;
- the exact handshake and framing rules;
- the bit order;
- the Gray assignment and the 16-QAM levels;
- the BPSK and QPSK bit mapping;
- bin placement (data in the low bins, zeros above);
- the single-butterfly iterative IFFT and its per-stage scaling and rounding;
- the synchronous reset.

Other points worth knowing:

- **QPSK and 16-QAM.** The source both centres its transmitter on QPSK and
  describes a 16-point constellation. Both are supported here, plus BPSK,
  through the `mode` port. That port is an addition: it is not in the
  published port list.
- **Output.** The published waveform shows a constant QPSK point on the
  output word. That corresponds to looking at the mapper output. The output
  of this design is the time-domain IFFT output, so it varies from sample to
  sample.
- **Not built.**
  - The RF up-conversion is an analog stage with no given parameters.
  - Pilot insertion is mentioned but not specified (no positions or values).
  - The receiver's FFT is outside the transmitter.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs. The reference models in `tb/fdm_tb_pkg.sv` work in floating
point from the definitions: constellation levels from their formulas, Gray
decoding, and a direct O(N²) inverse DFT. None of them shares code with the
RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_fdm_tx_top` | 24 frames in all modes through the whole chain at default size, with random input gaps, random and bursty output stalls, dropped stray pushes and abandoned frames. Every sample is checked to ±4 LSB, `firstout` is checked, and each mechanism (mode switch, `stopin` back-pressure, `stopout` stall, restart, stray push) must occur |
| `tb_fdm_tx_top_small` | the same end-to-end test with N = 16, 12 data subcarriers and a 4-sample prefix, showing the parameters scale together |
| `tb_fdm_env` | a layered, class-based environment (see below) driving the default-size transmitter through a pin interface |
| `tb_ifft` | single tones and random spectra against the inverse DFT; latency 193; output held until taken; `in_ready` low while busy |
| `tb_radix2_butterfly` | 2000 random operands and twiddles, within 1 LSB of the exact value |
| `tb_constellation_mapper` | every mode and input bit pattern |
| `tb_modulator` | random frame words in every mode, symbol by symbol |
| `tb_serial_to_parallel` | frame assembly in all modes, `stopin` while a frame waits, stray pushes, restarts |
| `tb_parallel_to_serial` | prefix and order, `firstout`, hold under `stopout`, no gap between unstalled symbols |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fdm_pkg.sv tb/fdm_tb_pkg.sv tb/tb_fdm_tx_top.sv \
    --top-module tb_fdm_tx_top -Mdir obj_top
./obj_top/Vtb_fdm_tx_top
```

For another testbench, replace the last file and the top module.
`tb_fdm_env` also needs its package, listed after `tb/fdm_tb_pkg.sv`:
`tb/fdm_env_pkg.sv tb/tb_fdm_env.sv --top-module tb_fdm_env`. `-y rtl -y tb`
find the other modules and interfaces by file name, since each module, package or interface
lives in a file of its own name. The full-size end-to-end test finishes in
well under a second.

### The class-based environment

`tb_fdm_env` checks the transmitter as a black box, in the layered style
common for stream designs. It sees only the pins, through the `fdm_if`
interface and the `fdm_tx_wrap` wrapper, and is built from these classes in
`tb/fdm_env_pkg.sv`:

- **`fdm_frame`, `fdm_sequence`**: the stimulus. Frames have random bits and
  modes. Some are deliberately cut short so that the next `firstin` restarts
  the frame, and every fourth frame has the last two bytes of its payload
  pinned to all ones.
- **`fdm_driver`**: puts the frames on the pins with the push/stop protocol.
- **`fdm_in_monitor`**: rebuilds, from accepted pushes alone, the frames the
  transmitter must send. It applies the framing rules itself and never looks
  at the stimulus objects.
- **`fdm_out_monitor`**: hands every accepted output sample to the
  scoreboard.
- **`fdm_sink`**: stalls the output at random.
- **`fdm_scoreboard`**: predicts each frame's 80 samples in floating point
  and compares.
- **`fdm_env`**: builds and starts the others and checks at the end that
  every mechanism occurred.

No UVM library is needed, and the classes use only plain SystemVerilog.

## Files

- `rtl/fdm_pkg.sv`: sample and complex types, mode enum, bits per symbol,
  twiddle function
- `rtl/fdm_tx_top.sv`: the transmitter
- `rtl/serial_to_parallel.sv`, `rtl/modulator.sv`,
  `rtl/constellation_mapper.sv`, `rtl/ifft.sv`, `rtl/radix2_butterfly.sv`,
  `rtl/parallel_to_serial.sv`: its stages
- `tb/fdm_tb_pkg.sv`: floating-point reference models
- `tb/tb_*.sv`: one testbench per module, plus the reduced-size and
  class-based end-to-end tests
- `tb/fdm_env_pkg.sv`, `tb/fdm_if.sv`, `tb/fdm_tx_wrap.sv`: the class-based
  environment, the pin interface and the wrapper that connects the
  transmitter to it
