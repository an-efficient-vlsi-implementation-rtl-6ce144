# A 2-D wavelet processor driven by embedded instruction codes

This is a synthesizable SystemVerilog model of a processor for the 2-D
discrete wavelet transform (DWT) and its inverse (IDWT). It uses the 9/7
biorthogonal spline filters, works on pictures up to 1024 x 1024, and
computes up to six decomposition levels.

The design does not build a filter as a fixed systolic array or as lifting
steps. Instead, the 1-D transform is a short program of two kinds of order:

* **MUL** multiplies the current input sample by one filter coefficient and
  keeps the product in a product register, PREG.
* **ADD** adds PREG into one or two accumulator registers (GPRs).

The filters are symmetric, so one product serves every tap that has the same
distance from the filter centre. The same product can also feed two different
outputs. Only the program (the "instruction codes") and the coefficient table
change between the forward and inverse transform. The multipliers, adders and
registers stay the same.

The published architecture this follows is "An Efficient VLSI Implementation
of the Discrete Wavelet Transform Using Embedded Instruction Codes for
Symmetric Filters". It gives the instruction idea, the datapath, the nine
registers and the code regions. The interfaces, the number formats, the frame
memory organisation and the way the code table is produced are this design's
own choices. They are listed under [Departures and limits](#departures-and-limits).

## From a filter to instruction codes

Each channel of the 1-D transform computes

    y[m] = sum over k of f[k] * x[2m - k],   k = c-H .. c+H,   f[c-j] = f[c+j]

Here c is the filter centre and H is the half-length. The input is extended
whole-point symmetrically at both ends: x[-i] = x[i] and
x[N-1+i] = x[N-1-i]. The four channels are:

| channel | filter | centre c | H | taps | registers | first output |
|---|---|---|---|---|---|---|
| forward low  | h  (9 taps)          | 0  | 4 | h[-4..4]  | R0-R4 (5) | a1[0] |
| forward high | g  (7 taps)          | 1  | 3 | g[-2..4]  | R5-R8 (4) | d1[1] |
| inverse even | bL (7 taps)          | 0  | 3 | bL[-3..3] | R0-R3 (4) | x^[0] |
| inverse odd  | bH (9 taps)          | -1 | 4 | bH[-5..3] | R4-R8 (5) | x^[1] |

Read the computation column by column, that is, by input sample. Input x[n]
is needed by the outputs m with |2m - n - c| <= H. A channel with half-length
H therefore has at most H+1 outputs in progress at any time, so H+1 GPRs are
enough. The 9-tap and 7-tap filters together need nine.

For one input, the distances j = |2m - n - c| that occur all have the same
parity. So an input needs at most three MULs (j in {0,2,4} or {1,3}). Each
product goes to the one or two outputs that use that distance, one on each
side of the centre. That is one MUL and up to two ADDs, which the two adders
of a 1M2A do in a single order. A line of N samples costs 5N orders per
channel: 5/2 MULs and 5/2 ADD orders per sample on average.

Output m always lives in register `RBASE + (m - m0) mod NREG`. In the
interior of the line, the code for an input therefore depends only on the
input's parity; the register numbers rotate on their own. Near the two ends
the symmetric extension folds taps back into the line. Then one input can meet
the same output through a tap and through the mirror of that tap. The product
must then be added twice. The datapath has a one-bit left shift (LS) with a
multiplexer in front of the first adder for exactly this case. When an output
receives its last contribution, the sum goes out and the register is cleared
in the same order. This makes the register ready for the output that rotates
into it.

The code table has three regions per mode:

* **boundary in the beginning** — one entry for each of inputs 0..5;
* **loop** — one entry for even inputs and one for odd inputs;
* **boundary in the end** — one entry for each of the last six inputs.

Each entry has up to three slots of {MUL coefficient distance, two ADD
targets}. An ADD target is the output index relative to floor(n/2), plus the
LS and "last" flags. So the table holds no absolute register numbers and
serves every even line length of at least 12. The 1-D control keeps floor(n/2)
modulo 5 and modulo 4 and turns each target into a register number with one
small addition and one correction.

`rtl/eic_rom.sv` does not hold typed-in codes. At elaboration, it computes
every entry from the rule above with `dwt_pkg::gen_instr`, for a reference
line of 64 samples. The rule for one input n and coefficient distance j:

1. The outputs it feeds are the m for which a tap k with |k - c| = j, after
   extension, lands on n.
2. A target gets LS when two such taps land on the same m.
3. A target is "last" when no later input, and no later slot of this input,
   reaches m.

### The inverse transform

The inverse transform uses the same machinery. It treats the two subbands as
one interleaved sequence, w1 = a1[0], d1[1], a1[1], d1[2], ... It then
computes even and odd reconstructed samples with two filters built from the
synthesis pair h~ and g~:

* bL[2k] = h~[2k] and bL[2k+1] = g~[2k];
* bH[2k] = h~[2k+1] and bH[2k+1] = g~[2k+1].

Both are symmetric, so the same code generator applies. The channel geometry
simply changes: the centres become 0 and -1 instead of 0 and 1.

## Datapath

`palu_1m2a` — one multiplier and two adders:

    x --\
         * --> PREG --+--> [LS <<1] --MUX--> (+) <-- GPR a    --> GPR a / out
    coef-/            |                                            (cleared on last)
                      +------------------> (+) <-- GPR b    --> GPR b / out

* The multiplier is 16 x 16. PREG and both adders are 32 bits wide.
* A MUL order loads PREG at the end of its cycle.
* An ADD order reads two GPRs and writes the sums back (or zero on "last").
  A finished sum goes out in the same cycle.

`palu_2m4a` puts two of these side by side on the shared input sample:

* the low-pass / even path, with its coefficient ROM port;
* the high-pass / odd path, with its coefficient ROM port.

`gpr_file` holds the nine GPRs, R0-R8, with four read and four write ports.

`eic_1d` issues one order per clock. For an input it runs MUL, ADD, MUL, ADD,
and so on, through the slots of the input's entry, which takes 4 or 6 cycles.
It takes the next sample in the cycle of the last ADD. A line of N samples
therefore takes 5N cycles, and the engine never waits when samples are
available. Both channels run in lock step. In each ADD order each channel can
finish at most one output.

## Number formats

| quantity | format |
|---|---|
| data words (memory, engine input and output) | 16-bit signed, Q12.4. An 8-bit pixel p is stored as p << 4 |
| coefficients | 16-bit signed, Q2.14 |
| products and accumulators | 32-bit signed, Q.18 |
| output | accumulator + 2^13, arithmetic shift right by 14, saturated to 16 bits |

The coefficients (CDF 9/7, rounded to Q2.14) are:

| filter | taps |
|---|---|
| h[0..4]   | 9879, 4372, -1282, -276, 438 |
| g[1..4]   | -18270, 9687, 943, -1495 |
| bL[0..3]  | 18270, 4372, -943, -276 |
| bH[-1..3] | -9879, 9687, 1282, -1495, -438 |

The other halves of each filter follow by symmetry. Each 1-D pass rounds to 4
fractional bits. In the tests, a 6-level forward and inverse transform of an
8-bit 1024 x 1024 picture reconstructs every pixel to within about 3/4 of a
grey level. The testbench allows one grey level.

## 2-D control and frame memory

`dwt2d_ctrl` makes the transform separable. It drives an external frame
memory with two banks and addresses it by `{bank, y, x}`, with 10 bits per
coordinate and 21 address bits in total.

* **Forward**, level l = 0 .. L-1, on the current LL band of
  (W >> l) x (H >> l):
  * rows go from bank 0 to bank 1, with the low half then the high half of
    each row;
  * then columns go from bank 1 back to bank 0.

  After every level, bank 0 holds the usual layout: LL and HL on top, LH and
  HH below. Pixels outside the current band are never touched.
* **Inverse** runs the levels in reverse. It does columns first
  (bank 0 to bank 1) and then rows (bank 1 to bank 0). It reads each line
  interleaved to form w1: sample k/2 for even k, sample N/2 + (k-1)/2 for
  odd k.

The memory has one read port with one cycle of latency and one write port.
The control prefetches one sample ahead, so the engine is never starved. The
engine's two channels may finish in the same cycle, so results pass through an
8-entry write queue. The queue drains one word per cycle. In the tests it never holds more than
two entries, and an assertion checks that it cannot overflow. A pass ends when its last line has been computed and the
queue is empty. The write enable is held low during reset.

Constraints on the configuration:

* `cfg_width` and `cfg_height` must be even.
* Every band down to the last level must be at least 12 samples long on each
  side, and must stay even while it is halved.
* `cfg_levels` is 1..6.

These fit the picture sizes the architecture was meant for. Each of the
following widths and heights has its usable level sequence:

* 1024 .. 32 (six levels);
* 640 .. 40;
* 480 .. 30;
* 352 .. 44;
* 720 .. 90.

VGA (640 x 480, five levels), MPEG-1 SIF (352 x 240, four levels) and MPEG-2
(720 x 480, four levels) therefore all fit.

## Top level

`dwt_top` (parameter `MAX_LOG2 = 10`) contains `dwt2d_ctrl` and `eic_1d`.
Its ports:

| port | direction | meaning |
|---|---|---|
| `clk`, `rst` | in | clock, synchronous active-high reset |
| `start` | in | start one operation; sampled while idle |
| `cfg_mode` | in | `MODE_DWT` (0) or `MODE_IDWT` (1) |
| `cfg_width`, `cfg_height` | in | picture size, 11 bits each |
| `cfg_levels` | in | 1..6 |
| `busy`, `done` | out | `done` pulses for one cycle at the end |
| `mem_rd_en`, `mem_rd_addr`, `mem_rd_data` | out / out / in | read port; data one cycle after the request |
| `mem_wr_en`, `mem_wr_addr`, `mem_wr_data` | out | write port |

A forward run expects the picture in bank 0 and leaves the coefficients
there. An inverse run expects the coefficients in bank 0 and leaves the
picture there. Bank 1 is scratch space. The configuration must stay constant
during a run.

Measured speed:

* 1024 x 1024, six levels: 13.35 cycles per pixel. That is 14.0 M cycles
  per direction, or 7.5 Mpixel/s at 100 MHz.
* 640 x 480, five levels: 13.36 cycles per pixel.

## Files

`rtl/`:

| file | contents |
|---|---|
| `dwt_pkg.sv` | types, constants, channel geometry, coefficients, the code generator, rounding |
| `eic_rom.sv` | instruction-code table (three regions, two modes, two channels) |
| `coef_rom.sv` | coefficient table |
| `gpr_file.sv` | nine GPRs |
| `palu_1m2a.sv` | multiplier, PREG, LS/MUX and two adders |
| `palu_2m4a.sv` | two 1M2As, shared GPRs |
| `eic_1d.sv` | 1-D control: code sequencing, register rotation, output positions |
| `dwt2d_ctrl.sv` | 2-D control: levels, passes, addressing, prefetch, write queue |
| `dwt_top.sv` | top level |

`tb/`. Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
on a watchdog.

| file | what it checks |
|---|---|
| `dwt_ref_pkg.sv` | reference model: direct filtering with floating-point filters rounded to Q2.14, independent of the code tables |
| `frame_mem.sv` | behavioural two-bank frame memory |
| `tb_gpr_file.sv` | random four-port writes and reads against a model |
| `tb_palu_1m2a.sv` | random MUL/ADD orders: PREG, LS, clear-on-last, output |
| `tb_palu_2m4a.sv` | random order streams on both channels against a model that includes the coefficients |
| `tb_coef_rom.sv` | every coefficient against the reference filters; DC gains |
| `tb_eic_rom.sv` | for every line length, the total weight each code set gives each (output, input) pair equals the filter with symmetric extension; every output is marked last exactly once |
| `tb_eic_1d.sv` | lines of 12 to 1024 samples, forward and inverse, with and without input stalls; bit-exact against the reference; 5N-cycle timing |
| `tb_dwt2d_ctrl.sv` | 2-D control with a behavioural "lazy wavelet" engine: addressing, pass order, interleaving, write queue, exact round trip |
| `dwt_top_bench.sv` | shared end-to-end bench: random picture, forward and inverse bit-exact against a 2-D reference, reconstruction within one grey level, cycle bound, and a count of each mechanism |
| `tb_dwt_top.sv` | 64 x 48, three levels |
| `tb_dwt_top_vga.sv` | 640 x 480, five levels |
| `tb_dwt_top_full.sv` | 1024 x 1024, six levels, top at its default parameters (about 20 s) |

The end-to-end bench fails if any of these mechanisms never occurs:

* forward run and inverse run;
* row lines and column lines;
* boundary-begin, loop and boundary-end codes;
* LS adds and double adds;
* GPR wrap-around;
* both channels finishing in one cycle;
* a write queue holding more than one entry.

To run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
      rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
    ./obj_dir/Vtb_dwt_top

## Departures and limits

* **Instruction tables are generated, not transcribed.** The published
  tables give the codes per input and list the end-of-line codes for a
  particular N. Here the codes come from the filter geometry, with register
  targets relative to the current output index. The register rotation is
  the published one: the register is a base plus the output index modulo
  the channel's register count.
* **Shortest line is 12 samples.** This keeps the boundary-begin and
  boundary-end regions apart. Odd lengths are not supported.
* **Throughput.** One MUL or ADD order per clock gives 5 cycles per sample
  per 1-D pass. A 1024 x 1024 six-level run takes 13.35 cycles per pixel.
  The published chip reaches 7.78 Mpixel/s at 100 MHz, which is about
  12.85 cycles per pixel. This model reaches about 7.5 Mpixel/s at 100 MHz,
  because it spends a few cycles at each line start and does not overlap
  lines.
* **Pass order.** The forward transform does rows before columns. The
  inverse transform does the reverse. Only a separable row/column transform
  is specified.
* **Frame memory** is outside the design. Its two-bank organisation and
  the memory ports are this design's own. No pad ring is modelled. The
  published chip has 84 pins; this top's separate read and write buses have
  107 signals.
* **Number formats, rounding and coefficient values** are this design's
  choices. The published datapath has one 16-bit multiplier and two 32-bit
  adders per 1M2A, and these match it.
