# Four-stream variable-length MDC FFT/IFFT processor

A MIMO-OFDM receiver or transmitter with four antennas has to transform four
OFDM symbols at the same time, one per spatial stream. Giving each stream its own
FFT would need four of everything. This processor uses one radix-4
multipath-delay-commutator (MDC) pipeline instead. Four samples enter per clock,
one from each stream. A buffer in front of the pipeline rearranges them so that
the pipeline sees one stream at a time, four samples of that stream per clock.
Each pipeline stage then needs exactly one radix-4 butterfly and three complex
multipliers, and they are busy in every cycle.

Supported lengths are 2048, 1024, 512 and 128 points, selectable at run time,
in FFT or IFFT mode. Four N-point symbols (one per stream) are processed every N
clock cycles, so at 40 MHz a set of four 2048-point symbols takes 51.2 µs.

```
 4 streams   +-------+   +------------+   +-----------------------------+   +--------+   +-------+
 A B C D --->| input |-->| input      |-->| stage1 stage2 stage3 stage4 |-->| output |-->| output|--> 4 bins
 (8 bit)     | reg.  |   | scheduling |   | radix-4 x4   stage5 r-4/8   |   | sorter |   | reg.  |   (12 bit)
             | conj  |   | buffer     |   |        (fft_core)           |   |        |   | conj  |
             +-------+   +------------+   +-----------------------------+   +--------+   +-------+
```

## Input scheduling

The buffer (`input_buffer`) receives sample n of streams A, B, C and D together
in cycle n. For each stream in turn it must produce N/4 cycles in which lane l
carries x[l·N/4 + t]. This is the order a radix-4 decimation-in-frequency first
stage needs: the four inputs of one butterfly are N/4 apart.

The buffer has twelve banks of N/4 words:
- three banks a0..a2;
- a 3×3 array M whose rows belong to streams B, C and D.

The symbol period splits into four blocks of N/4 cycles.

- **Block 3.** Stream A of the current symbol leaves the buffer. Its quarters 0–2
  come from a0..a2, and quarter 3 is the live input. At the same time a0..a2 are
  refilled with the live quarter 3 of streams B, C and D.
- **Block p = 0..2.** Stream p+1 (B, C or D) of the *previous* symbol leaves.
  - Its quarter 3 comes from a_p, which is refilled with the live quarter p of A.
  - Its quarters 0–2 come from one line of M, which is refilled with the live
    quarter p of B, C and D.

Every access is a read followed by a write at the same address (write after
read), so each word is overwritten in the cycle it is read. The twelve banks
(3N words) therefore stay full, and no ping-pong copy is needed.

The line of M that is read alternates between symbols. If the previous symbol
was stored column-wise, the line is row p; if it was stored row-wise, the line
is column p. So the grouping of b, c and d is transposed every symbol, while the
a group stays where it is.

Output order: A(j), B(j−1), C(j−1), D(j−1), A(j+1), ... Each stream appears
once every N cycles. Stream A is one symbol ahead of B, C and D inside one
period, and the output tag says which stream each block belongs to.

## Pipeline stages

Stages 1–4 (`r4_stage`) each contain the same three parts, with a register after
each of the first two:

1. **Radix-4 butterfly** (`radix4_bf`). Computes the four sums of the four lanes
   and divides them by 2 with rounding.
2. **Twiddle multipliers.** Lanes 1–3 are multiplied by W_M^(t·k). Here M = 16D
   is the size of the current sub-transform, t is the position inside it and k
   is the lane.
   - The factors come from `twiddle_gen`. It holds one octant (257 entries) of
     a 2048-point circle and builds every other factor by mirroring the octant
     and converting the quadrant.
   - The exponent is e = (t·k) · 2048/M.
3. **Delay commutator** (`commutator`). FIFOs of 0, D, 2D, 3D words come before
   a 4×4 switch box, and 3D, 2D, D, 0 words after it.
   - The switch changes its routing every D cycles: in phase p, output j takes
     input (p − j) mod 4.
   - Latency is 3D+1 cycles. The commutator swaps the lane index with the
     time-block digit.

The stage delay D is 128, 32, 8 and 2 for stages 1–4 at N = 2048, and half of
that at N = 1024.

Each length uses the stages as follows.

| N    | stage 1 | stage 2 | stage 3 | stage 4 | stage 5 |
|------|---------|---------|---------|---------|---------|
| 2048 | r4 D=128| r4 D=32 | r4 D=8  | r4 D=2  | radix-8 |
| 1024 | r4 D=64 | r4 D=16 | r4 D=4  | r4 D=1  | radix-4 |
| 512  | bypass  | r4 D=32 | r4 D=8  | r4 D=2  | radix-8 |
| 128  | bypass  | bypass  | r4 D=8  | r4 D=2  | radix-8 |

A bypassed stage passes data and tags through combinationally.

Stage 5 (`r8_stage`) uses one radix-4 butterfly in two ways.

- **Radix-4 mode (N = 1024).** It is a plain radix-4 butterfly.
- **Radix-8 mode (all other lengths).** The eight inputs of a radix-8 butterfly
  arrive in two consecutive cycles, four lanes each.
  - Each half goes through the radix-4 butterfly.
  - In the second cycle the odd half is multiplied by W8^0..3. W8^2 = −j is a
    swap; W8^1 and W8^3 use the constant 1/√2 ≈ 2896/4096.
  - Four radix-2 butterflies combine the two halves.
  - X[q] leaves first and X[q+4] one cycle later.

Latency is 3 cycles in both modes. Stage 5 does not scale; its output grows from
10 to 12 bits.

## Digit order at the core output

After stage 5, for N = 2048, the bins come out in this order:
- the cycle within a stream block is t = 128·k1 + 32·k2 + 8·k3 + 2·k4 + k5[2];
- the lane is k5[1:0];
- the bin index is k = k1 + 4·k2 + 16·k3 + 64·k4 + 256·k5.

Here k1..k4 are base-4 digits and k5 is the base-8 digit. The other lengths drop
the digits of their bypassed stages, and 1024 has a base-4 last digit. For
example, lane 0 of stream A at N = 2048 carries the bins 0, 1024, 64, 1088, ...

## Output sorting

`output_sorter` returns each stream block in natural order: lane l carries
X[4t + l]. It uses only push/pop FIFOs and a fixed sequence of three steps, and
holds 9N/8 + 192 words (2496 at N = 2048).

1. **Stage A: half separation** (`sort_half_split`, 3N/4 words). With a radix-8
   last stage, the lower half of the spectrum (k < N/2) arrives in even cycles
   and the upper half in odd cycles.
   - Per lane, even-cycle words go into a FIFO of N/16 words and odd-cycle
     words into a FIFO of N/8 words.
   - Starting N/8 cycles into the block, the stage pops the lower FIFO for N/8
     cycles and then the upper FIFO for N/8 cycles.
   - Those two sizes are exactly the peak occupancies of this schedule.
   - N = 1024 is not interlaced and bypasses the stage.
2. **Stage B: lane exchange** (a `commutator`, at most 3N/8 words). It moves
   k mod 4 onto the lanes, with D = 64 for 2048 and 1024, 16 for 512 and 4 for
   128.
3. **Stage C: digit exchange** (`sort_digit_swap`, 192 words). After stage B,
   each lane still has two base-4 digits of its cycle count in swapped places:
   weights 16 and 1 for 2048 and 1024, weights 4 and 1 for 512.
   - Each lane is cut into groups of four words, which turns the weight-1 digit
     into a sub-lane index.
   - A small commutator swaps that index with the group digit. It advances once
     per group and has FIFOs of 4, 8 and 12 words (1, 2 and 3 for 512).
   - The groups are then serialised again.
   - N = 128 bypasses the stage.

A register follows stage C.

Sorter latency is:
- 506 cycles for 2048;
- 250 cycles for 1024;
- 134 cycles for 512;
- 30 cycles for 128.

In general it is N/8 (stage A, radix-8 lengths only) + 3D+1 (stage B)
+ 12F+8 (stage C, F = 4 or 1; none for 128) + 1.

## Fixed point and scaling

| point              | width |
|--------------------|-------|
| input samples      | 8 bits signed (re, im) |
| inside the core    | 10 bits |
| twiddle factors    | 12 bits, 10 fractional |
| output             | 12 bits |

- Butterfly sums are divided by 2 with round-half-up and then saturated.
- Products are rounded by 10 fractional bits and saturated.
- Every active stage among 1–4 divides by 2, so the output is the DFT times:
  - 1/16 for 2048 and 1024;
  - 1/8 for 512;
  - 1/4 for 128.

The IFFT is computed as conj(FFT(conj x)). The input register conjugates with
saturation (−128 becomes +127), and the output register conjugates again. The
IFFT carries the same scale factors as the FFT, not 1/N.

Measured against a floating-point DFT, with uniformly random inputs in ±100, the
signal-to-quantisation-noise ratio is 35–39 dB at every length.

## Interface and timing (`mimo_fft_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | high with sample 0 of the first symbol; loads len_sel and ifft and restarts the pipeline |
| len_sel | in | 2 | `fft_pkg::len_e`: 0 = 2048, 1 = 1024, 2 = 512, 3 = 128 |
| ifft | in | 1 | 1 = inverse transform |
| in_re/in_im[4] | in | 8 each | sample of stream A, B, C, D |
| out_re/out_im[4] | out | 12 each | out lane l = X[4t + l] |
| out_valid | out | 1 | lanes carry results |
| out_first | out | 1 | t = 0 of a stream block |
| out_stream | out | 2 | 0..3 = A..D |

How the interface behaves:
- **Input.** After `start`, a new sample per stream is expected in every cycle.
  There is no flow control.
- **Changing length or mode.** Assert `start` again. Symbols still in the
  pipeline are dropped, because all FIFOs are cleared synchronously.
- **Output.** Blocks of N/4 cycles follow each other without gaps.
- **Latency.** The delay from `start` to the first `out_valid` is:

  - 2570 cycles for 2048;
  - 1291 cycles for 1024;
  - 659 cycles for 512;
  - 168 cycles for 128.

  In general it is 2 + 3N/4 (input register and buffer) + Σ(3D+3) over active
  stages 1–4, + 3 (stage 5) + the sorter latency + 1 (output register).

## Files

`rtl/`, one module per file:

| file | role |
|------|------|
| `fft_pkg.sv` | widths, the length enum, the tag struct, stage tables, ROM builder, rounding |
| `mimo_fft_top.sv` | top level |
| `input_buffer.sv` | input scheduling buffer |
| `dp_ram.sv` | bank with write-after-read |
| `fft_core.sv` | the five stages |
| `r4_stage.sv` | radix-4 stage |
| `r8_stage.sv` | radix-4/8 stage |
| `radix4_bf.sv` | radix-4 butterfly |
| `cmul.sv` | complex multiplier |
| `twiddle_gen.sv` | twiddle factor generator |
| `commutator.sv` | delay commutator |
| `switch_box.sv` | 4×4 switch box |
| `delay_fifo.sv` | run-time-length delay line |
| `output_sorter.sv` | output sorter |
| `sort_half_split.sv` | sorter stage A |
| `sort_digit_swap.sv` | sorter stage C |
| `pp_fifo.sv` | push/pop FIFO |
| `en_delay.sv` | shift delay with enable |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/fft_pkg.sv \
    tb/tb_mimo_fft_top.sv --top-module tb_mimo_fft_top -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` and its top-module name to run a single block.

`tb_mimo_fft_top` runs the processor at its default parameters. It takes about
a second and runs five configurations: 128 FFT, 512 IFFT, 1024 FFT, 2048 FFT and
128 IFFT, with three symbols on four streams each. For every configuration it
checks:
- each output bin against a double-precision DFT;
- the latency against the formula above;
- the N/4 block spacing and the stream order;
- counters for each mechanism: radix-8 and radix-4 use of stage 5, stage bypass,
  IFFT, length switching, and symbols read with the transposed grouping.

## How far it can be trusted

- **Verified by simulation:**
  - every length, in both FFT and IFFT mode, end to end;
  - every module separately, against independent models in its testbench;
  - each testbench is known to fail on a broken copy of its module.
- **Not verified:** timing closure and gate-level behaviour. The design
  synthesises with yosys to about 3.5k cells, 7.7k flip-flop bits and 494 kbit
  of memory arrays. Most of the flip-flops are the small register FIFOs of
  sorter stage C and the pipeline registers.
- **Memory behaviour.** Memories are plain arrays.
  - `dp_ram` has a registered read that returns the old word.
  - `delay_fifo` and `pp_fifo` read combinationally. A synthesis flow must map them to
    registers, or to a RAM with an extra output register.

## Where this design departs from the original architecture

- **Output sorter at 512 points.** The original description runs the 512-point
  case through stage C differently: it disables the switch box and does a 4×4
  transposition in the 8- and 12-word FIFOs. Here the same stage C commutator
  runs with 1-word FIFOs instead.
- **Schedules.** The stage A schedule and every control counter were worked out
  for this design. The FIFO sizes and the overall memory (10680 words of data
  storage at N = 2048) match the original.
- **Switch box.** The switch-box rule and the twiddle exponent order were
  derived here from the FIFO arrangement and the output order. They were not
  taken from a published table.
- **Scaling.** A fixed ÷2 per radix-4 stage was chosen. The IFFT is not divided
  by N.
- **Multipliers.** Each complex multiplier uses four real multipliers, and each
  has its own twiddle table: 12 tables, where the original shares 4 generators
  among 12 quadrant converters.
- **Stream count.** Fixed at four. The radix-N_s generalisation to other stream
  counts is not built.
- **Protocol.** The start/restart protocol, the reset, and the valid/first/stream
  tags belong to this design.
