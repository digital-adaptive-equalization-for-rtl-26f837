# Frame-based adaptive equalizer for serial data

Serial data sent over a long cable arrives low-pass filtered: each bit smears
into its neighbours (inter-symbol interference). This design undoes that with
an 8-tap FIR equalizer whose coefficients are chosen by software on an
embedded processor, for example by a genetic algorithm. The hardware's job is
to make that search cheap: every frame of received samples begins with a
known 8-bit pseudo-random sequence (PRS), and the equalizer core scores the
current coefficients against it in hardware. Software only has to write
coefficients and samples, and read back one error number and one data byte per
frame.

The RTL has two parts on one clock:

* **the equalizer core** (`signalproc` with `equalizer`, `error_checker`,
  `mult18x18`, `sign_extend`): tap line, multipliers, PRS error measurement,
  bit slicer and the software handshake;
* **the register bank** (`opb_laregister`): 32 memory-mapped registers on an
  OPB bus that turn processor writes into wires for the core and latch the
  core's results for the processor to read.

`eq_system` connects the two. Its ports are the OPB slave wires, an interrupt
request and the equalized sample output.

## A frame and its two windows

A frame is 16 samples, one per transmitted bit. The transmitter sends the
8 PRS bits first, then 8 data bits. The core numbers the samples of a frame
0 to 15 (its position `p`) and does two different things with the equalized
value `y[p]`:

```
position p      0  1  2  3 | 4  5  6  7  8  9 10 11 | 12 13 14 15
error window                 PRS bit 0 ........ 7
data window                              bit 0 ................ 7
```

* **Error window, p = 4..11.** The equalizer is assumed to delay the symbol
  stream by 4 samples, so `y[p]` is compared with PRS bit `p-4`. The total is
  complete, and flagged, after the 12th sample. That leaves software four
  samples' worth of time to compute the next coefficients before the frame
  ends.
* **Data window, p = 8..15.** `y[p] > 0` gives a 1, otherwise 0. Position 8
  lands in bit 0 of the byte (LSB first, the RS-232 order).

The two windows are not shifted by the same amount. With coefficients centred
on tap 4, which is what makes the error window line up, the data byte holds
transmitted symbols 4..11: the last four PRS bits in its low nibble and the
first four data bits in its high nibble. With coefficients centred on tap 0,
the byte holds the data bits but the error window compares the wrong symbols.
This is kept as specified rather than guessed at. Moving the data window is a
change to one comparison in `signalproc.sv` (`count >= PRS_LEN`) and the
end-of-frame test.

### The error measure

For each sample in the error window:

```
e = | (y >>> 7) - (PRS bit ? +8192 : -8192) |
errorRate = min(65535, sum of e over the 8 samples)
```

Coefficients are signed Q1.7 (64 means 0.5), so `y >>> 7` is the equalized
value in input-sample units. ±8192 is the level a bit should reach after
equalization. The PRS pattern (`8'b1011_0010`, first bit in bit 0), the level
and the shift are constants in `eq_pkg`. They are this design's choices, and
software must use matching signal levels. Perfect equalization gives 0. All-zero
coefficients give 8 x 8192 = 65536, which saturates at 65535.

## Software's view

### Register map (offsets from `BASEADDR`, default `0x7E00_0000`)

Register `k` is at byte offset `4k`. Only address bits [6:2] are decoded, so
the 32 registers repeat every 128 bytes within a 1 KiB window, and offsets
1016 and 1020 are registers 30 and 31. The bus is big-endian: byte offset 0 of
a word is bits [31:24].

| offset | register | bits | field | direction |
|---|---|---|---|---|
| 0, 4 | 0, 1 | all | coefficients 0..7, coefficient `i` in register `i/4`, bits `[8(i%4)+7 : 8(i%4)]` | write |
| 8..28 | 2..7 | all | reserved for coefficients, not used by the core | write |
| 1016 | 30 | [31:24] | `statusIn` | write |
| 1018-1019 | 30 | [15:0] | `signalIn`, the current sample (signed) | write |
| 1020 | 31 | [31:24] | `statusOut` | read-only |
| 1021 | 31 | [23:16] | data byte | read-only |
| 1022-1023 | 31 | [15:0] | error total | read-only |

Every other register is plain storage. Writes to register 31 are ignored.
Each field of register 31 reloads from the core whenever the core's
matching `...IsValid` strobe is high, so it always shows the latest value.

The `irq` output is the latched "sample complete" bit (register 31, bit 24).
It is a level with no mask of its own. It follows `statusOut[0]` one cycle
later, so it rises when a sample is done. It falls two cycles after software
lowers `statusIn[0]`.
Software can therefore sleep on the interrupt instead of polling.

### Status bits

| `statusIn` | meaning |
|---|---|
| 0 | sample available |
| 2 | frame active; lowering it acknowledges the frame's results |

| `statusOut` | meaning |
|---|---|
| 0 | sample complete |
| 1 | error total complete (stays set until the next frame opens) |
| 2 | frame complete, data byte valid |
| 5:3 | samples processed in this frame, modulo 8 |
| 7:6 | state: 0 idle, 1 frame active, 2 equalizing, 3 frame done |

### Handshake for one frame

1. Write the coefficients.
2. Set `statusIn = 0x04` (open the frame).
3. For each of the 16 samples:
   1. Write `signalIn`.
   2. Set `statusIn = 0x05`.
   3. Poll until `statusOut[0] = 1`, or wait for `irq`.
   4. Set `statusIn = 0x04`.
4. Once `statusOut[1]` is set (after sample 12), the error total can be read.
5. After sample 16, `statusOut[2]` is set. Read the byte and the error, then
   set `statusIn = 0x00`. The core returns to idle, and `statusOut[7:6]` reads 0.

The core accepts a new sample only after `statusOut[0]` has dropped. So
`statusIn[0]` must really go low between samples. If `statusIn[2]` is lowered
in the middle of a frame, that frame is abandoned.

## Datapath

`equalizer` keeps an 8-deep tap line of 16-bit samples. Tap 0 holds the
newest sample, and coefficient 0 multiplies it. The output is

```
y = sum_{i=0..7} coeff[i] * tap[i]        (32-bit, signed, exact)
```

Each product comes from its own signed 18x18 multiplier (`mult18x18`). Its
operands are the coefficient and the sample, each widened with
`sign_extend`. The products are 24 bits wide and their sum needs 27 bits, so
the 32-bit result never overflows.

A small state machine takes three steps:

1. shift the sample in;
2. register the multiplier outputs (the multipliers get a full cycle);
3. add the products and strobe `done`.

The tap line is not cleared between frames. The samples form one continuous
stream, and only reset empties the line.

## Timing

| event | cycles |
|---|---|
| `statusIn[0]` seen high → `statusOut[0]` high | 4 (accept, shift, multiply, sum/register) |
| `statusOut[0]` of sample 12 → `statusOut[1]` | same cycle |
| `statusOut[0]` of sample 16 → `statusOut[2]` and data strobe | same cycle |
| OPB access: `opb_select` → `sl_xferAck` | 1 (acknowledge in the next cycle) |
| core output → readable in register 31 | 1 |

`statusOutIsValid` is high in every cycle in which `statusOut` has just
changed, and once after reset. `dataBlockIsValid` and `errorRateIsValid` are
one-cycle strobes, and the outputs they qualify hold their values afterwards.

## Files

| file | contents |
|---|---|
| `rtl/eq_pkg.sv` | widths, frame layout, PRS, levels, status bit positions, state enum |
| `rtl/sign_extend.sv` | parameterized sign extension (8→18 and 16→18) |
| `rtl/mult18x18.sv` | signed 18x18 multiplier |
| `rtl/equalizer.sv` | tap line, 8 multipliers, adder, 3-step control |
| `rtl/error_checker.sv` | PRS comparison and saturating error total |
| `rtl/signalproc.sv` | core top: handshake state machine, slicer, byte assembly, status |
| `rtl/opb_laregister.sv` | 32-register OPB slave with I/O ports, latched read-only fields and interrupt |
| `rtl/eq_system.sv` | core plus register bank |
| `tb/eq_ref_pkg.sv` | integer reference model (FIR, error term, saturation) |
| `tb/opb_master_if.sv` | OPB master read/write tasks for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the RTL with an integer model written separately in
`tb/eq_ref_pkg.sv` or inline. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_equalizer`: 200 random samples with coefficients changed every 10
  samples, plus the extreme operands (−128 × −32768 on every tap). It checks
  the 3-edge latency and `busy`.
* `tb_error_checker`: random frames, an ideal frame (error 0) and a
  saturating frame. It checks the window, the single strobe and the
  `error_done` level.
* `tb_signalproc`: 13 frames driven with the software handshake. It checks
  `signalOut`, the 4-cycle sample latency, the count and state fields, the
  error and the data byte, `statusOutIsValid`, acknowledge, and an abandoned
  frame.
* `tb_opb_laregister`: read-back of all registers, byte enables, the I ports,
  selective latching, the read-only register, aliasing, foreign addresses,
  the idle bus, and `irq`.
* `tb_eq_system`: the whole design at its default parameters, from the bus.
  Symbols ±16384 (PRS followed by random data) pass through a channel
  `1 + 0.5z⁻¹ + 0.25z⁻²`. Each round, three coefficient sets are scored the
  way a genetic algorithm's evaluation step would score them:
  * `{0,0,0,0,64,−32,0,8}`, a truncated inverse delayed by 4;
  * a plain delay;
  * all zeros.

  The inverse must score lowest (about 3000, against 28672 for the delay and
  65535 for zeros), and its sliced byte must equal the transmitted symbols
  4..11. The test also counts that each mechanism occurred: handshakes, polls
  that found a sample still running, an error ready before the frame ended,
  frames completed and acknowledged, and a write to the read-only register
  being ignored.

Simulating one testbench with plain Verilator (from the directory holding
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/eq_pkg.sv tb/eq_ref_pkg.sv tb/tb_eq_system.sv --top-module tb_eq_system
./obj_dir/Vtb_eq_system
```

Use the same command for the others, with `tb_<module>.sv` and
`--top-module tb_<module>`. All of them finish in well under a second.

## Where the design stops, and what is its own

* **Processor and algorithm.** The processor, its genetic-algorithm software,
  the OPB bus itself, the interrupt controller, the UART, GPIO and audio
  codec cores, and the physical channel are not part of the RTL. The
  testbench stands in for the processor and the channel.
* **Interrupt.** `irq` is a bare level. Masking and acknowledging it are
  left to the interrupt controller.
* **Bus.** The OPB slave is a minimal one: acknowledge one cycle after
  select, and no retry, error acknowledge or burst support.
* **Multipliers.** `mult18x18` is a plain signed multiply, not a vendor
  primitive. Synthesis maps it to whatever multipliers the target has.
* **Own choices.** These are not fixed by the core's data sheet:
  * the PRS value, the ±8192 level, the Q1.7 coefficient format and the
    saturation of the error total;
  * the state encoding, the bit order of the data byte, and the 4-cycle
    sample latency;
  * which 64 of the 256 coefficient-register bits reach the core (registers
    0 and 1);
  * the address decoding and aliasing, and the little-endian bit numbering
    of the RTL.
* **Data window alignment.** The data window is taken literally, as
  described under *A frame and its two windows*, and is not aligned with the
  error window.
* **Resets.** The core uses an asynchronous active-low reset (`reset_b`). The
  register bank uses the bus's synchronous active-high reset. `eq_system`
  drives both from `rst`.
