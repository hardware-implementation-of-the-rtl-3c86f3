# Neural Gas vector-quantisation board in SystemVerilog

This is RTL for a PC plug-in card that trains a vector-quantisation codebook
with the Neural Gas algorithm, and then uses the codebook to code images. It
follows a published ISA-bus board built from FPGA control logic, a hardware
distance unit and a TMS320C26 DSP. Everything on that board except the DSP,
its program EPROM and the PPI chips is written here as synthesizable
SystemVerilog.

## The problem and the split of work

Vector quantisation replaces each 8x8 block of an image (64 pixels) by the
index of the nearest of up to 256 prototype vectors, the *codevectors*.
Neural Gas trains the codevectors. Each iteration takes one sample block `x`
and computes its distance `d_k` to every codevector `w_k`. It ranks the
codevectors by that distance and moves each one towards `x`, closer ones
further: `w_k += dw_k`, with a step that decays exponentially with the rank.

Most of the cost is the distance computation: K codevectors times 64
components for every sample. The board does it in dedicated hardware and
leaves the rest to the DSP:

| step | where |
|---|---|
| choose a sample (random in training, in order at run time) | ALU-control unit, random-number register |
| distance to each codevector | Manhattan ALU, 68 clocks per codevector |
| sort the distances | DSP software, while the ALU goes on |
| adaptation `dw_k`, exponential by Taylor series, apply `w_k += dw_k` | DSP software, through its codebook port |
| report the winner (run time) | DSP writes the winner register, the PC reads it |

The Euclidean distance is replaced by the Manhattan (L1) distance,
`sum_j |x_j - w_j|`. This needs no multiplier. In the original experiments it
trained about as well as the Euclidean distance: the training and test error
curves of the two are nearly the same.

The board has three modes: training, feed-forward (run time, no adaptation)
and board testing. In board testing the PC reads back every memory and
register.

## The distance engine (hardest part)

### Number formats

* Pattern pixels are 8 bits. Codevector components are 16 bits, which lets
  the codevectors move in finer steps than the pixels.
* Before subtraction a pixel is widened to 16 bits by repeating it:
  `x16 = {x, x}`. So 0x00 maps to 0x0000 and 0xFF maps to 0xFFFF, and the
  pixel spans the full codevector range.
* 64 differences of at most 0xFFFF sum to less than 2^22, so the
  accumulator has 22 bits.
* The DSP has a 16-bit bus and is given only the 16 most significant bits,
  `dist = sum[21:6]`. This is a truncation, so distances that differ only in
  the low 6 bits compare equal for the DSP.

### Three-phase pipeline

| phase | what | where |
|---|---|---|
| 1 | read pixel `x_j` and component `w_j` in the same clock | pattern and codebook memories (registered read) |
| 2 | `|x16_j - w_j|` | `manhattan_alu`, first register |
| 3 | `S = S + |x16_j - w_j|`, restarted on pixel 0 | `manhattan_alu`, accumulator |

The ALU-control unit (`alu_control_unit`) runs each codevector through four
states: SETUP for 1 clock, READ for 64 clocks (one address pair per clock),
then DRAIN for 3 clocks while the last pixel goes through phases 1 to 3. That
makes **68 clocks per distance**, the figure given for the original board.
Codevectors are not overlapped. A start command given in clock 0 puts
distance 0 in the result memory in clock 68, distance 1 in clock 136, and so
on. At the original 8 MHz clock one distance takes 8.5 us (8 us was
measured). A full 256-codevector search takes 17,408 clocks, about 2.2 ms.

Each distance is written to the distance-result memory at its codevector
index and also to the DSP's 16-bit distance register. A per-sample count of
finished distances is visible to the DSP, which can therefore sort the
distances that are already in while the ALU computes the next ones.

### Parallel memory access and the bus buffers

Phase 1 needs a pixel and a codevector component in the same clock. The
original board gets this by cutting its data bus with buffers into a
pattern-memory segment and a prototype-memory segment: with the buffers open,
the ALU side reads both memories at once. `data_bus_buffers` models the
buffers as multiplexers. Each memory port goes either to the PC side (the
I/O-control unit) or to the ALU side, and the side that does not own a
segment reads zero.

The PC asks for the segments with state-register bit 4. It gets them
(`host_owns`, status bit 5) only when the ALU is not in the middle of a
distance. The ALU-control unit waits in SETUP, at a codevector boundary,
for as long as the PC holds them (status bit 6, "stalled"). A distance is
therefore never computed from bytes of two owners. PC accesses made before
`host_owns` rises are dropped, so software must poll status bit 5 first.

### Sample selection

* Training: the sample index is `(rnd * num_pat) >> 16`, where `rnd` is the
  16-bit random-number register. The register steps once for every sample
  started. The DSP reads the same register (IN 1) and the chosen index (IN 3).
* Run time: samples are taken in order, 0, 1, 2, ... and wrap at `num_pat`.
  The sequence restarts whenever the board leaves training and run modes.
* A start that arrives while a sample is still running is remembered and
  served as soon as that sample ends. The DSP can therefore ask for the next
  sample before the last distance is in.
* A training run lasts a number of iterations that the PC sets beforehand
  (offsets 11 and 12). Once that many samples have been started, further
  starts are refused and "training done" is raised: status bit 2 for the PC,
  IN 4 bit 13 for the DSP. IN 5 gives the iterations left. The count
  restarts whenever the board leaves training mode.

## Programming model

All register layouts in this section are choices of this design. The
original gives the registers and their widths, but not their bits.

### PC side (ISA I/O, base 0x300, 16 ports)

| offset | R/W | meaning |
|---|---|---|
| 0 | R/W | data: one pixel, or one byte of a 16-bit word (low byte first); the address steps after each pixel or each second byte |
| 1, 2 | R/W | transfer address, low and high byte (writing either resets the byte phase) |
| 3 | R/W | state register |
| 4, 5 | R | winner index, low and high byte |
| 6 | R | DSP control register |
| 7 | R | status: 7 ALU busy, 6 ALU stalled for the buses, 5 PC owns the buses, 4 winner valid, 3 interrupt, 2 training done, 1:0 mode |
| 8 | R/W | number of codevectors minus 1 (reset 255) |
| 9, 10 | R/W | number of samples, 11 bits (reset 1024) |
| 11, 12 | R/W | training iterations, 16 bits (reset 65535) |

**State register** (written by the PC, read by the DSP on IN 0):

| bits | meaning |
|---|---|
| 1:0 | mode: 0 idle, 1 training, 2 run time, 3 board testing |
| 3:2 | bank for data transfers: 0 patterns, 1 codebook, 2 distances (read only) |
| 4 | the PC asks for the memory buses |
| 7:5 | free flags; the test uses bit 5 as the PC's acknowledge to the DSP |

Memory layout: pattern `p`, pixel `j` is at `p*64 + j`. Codevector `k`,
component `j` is at `k*64 + j`. Distance `k` is at `k`.

The ISA strobes are sampled with the board clock, which on the original board
is the ISA bus clock. A write takes effect when IOW# returns high. The data
port steps its address when IOR# returns high. The word at the transfer
address is fetched in advance whenever the address or the state register
changes, so that a read is answered at once.

### DSP side

| port | meaning |
|---|---|
| IN 0 | state register |
| IN 1 | random number (16 bits) |
| IN 2 | distance register: last distance produced (16 bits) |
| IN 3 | index of the current sample |
| IN 4 | status: 15 ALU busy, 14 a distance arrived since the last IN 2, 13 training done, 8:0 distances done for this sample |
| IN 5 | training iterations left |
| OUT 0 | control register: bit 0 starts the ALU on a new sample (one-shot, not stored), bit 1 interrupt to the PC (`isa_irq`), bit 2 winner valid |
| OUT 1 | winner index (16 bits), read by the PC |

The DSP also has three memory ports: read and write on the codebook, read on
the distance-result memory, and read on the pattern memory. The pattern
port is this design's addition. Adaptation needs `x`, and the original block
diagram shows no other path from the patterns to the DSP. All memory reads
take one clock.

### A training iteration, as the DSP runs it

1. Read IN 1 (the random number) if it wants to know the sample in advance.
   Write OUT 0 = 1 to start.
2. Poll IN 4. Read each new distance from the distance-result memory.
3. Once K distances are in, start the next sample at once. Then sort the
   distances, compute `dw_k`, and rewrite the codevectors through the
   codebook port while the ALU computes the next sample's distances. This
   overlap is how the original board keeps both units busy.
4. Go back to step 2.

Writing the codebook while the ALU reads it for another sample is possible,
because the codebook memory has two ports. The next sample's distances may
then be computed from a mix of old and new codevectors. Neural Gas training
tolerates this; the training workload testbench runs exactly this way. If
software needs exact distances, it adapts first and starts afterwards, at
the cost of the overlap.

### A run-time iteration

Start. Collect the distances. Optionally start the next sample once K-1 of
them are in. Write the winner to OUT 1 and set OUT 0 bits 1 and 2. The PC
takes the interrupt, reads offsets 4 and 5, and acknowledges by any means
the software chooses. The testbench toggles state bit 5 and the DSP then
clears the interrupt.

## Sizes

| quantity | default | note |
|---|---|---|
| pixels per vector | 64 | 8x8 blocks |
| samples | up to 1024 (pattern memory 64 KiB) | original range 256 to 1024 |
| codevectors | up to 256 (codebook 16K x 16) | |
| distance-result memory | 256 x 16 | |
| clock | one domain; 8 MHz (ISA clock) on the original board | |

The whole design is about 0.8 Mbit of memory plus a few hundred flip-flops.
The memories are plain arrays with synchronous reads and no reset. They map
to block RAM, or to SRAM macros on a chip.

What fits:

* The largest configuration (1024 samples, 256 codevectors) fits exactly
  and is simulated end to end.
* Whole 512x512 training images (4096 blocks each) do not fit. They must be
  subsampled to at most 1024 blocks per run.
* Feed-forward coding with 256 codevectors runs at about 460 blocks per
  second at 8 MHz. The original reports 2 images per second without giving
  the image size.

## Where this RTL departs from, or adds to, the original

The following follow the original:

* the block structure: ISA interface, I/O-control unit, ALU-control unit,
  ALU, three memories, bus buffers, DSP port registers;
* the widths: 8-bit pixels, 16-bit codevectors, 22-bit sums, 16-bit
  distances, 8-bit state and control registers, 16-bit DSP ports;
* the pixel widening rule;
* the three-phase pipeline and its 68 clocks;
* the three modes;
* the register list of the DSP interface.

The following are this design's own choices:

* every bit layout and port number;
* the ISA base address and the strobe timing;
* the byte order of 16-bit transfers;
* how random numbers are made: a 16-bit Galois LFSR, x^16+x^14+x^13+x^11+1,
  seed 0xACE1;
* the index formula `(rnd*num_pat)>>16`;
* the in-order run-time sequence;
* the pending start;
* counting training iterations in hardware;
* the bus hand-over at codevector boundaries;
* the DSP's read port on the pattern memory;
* the prefetch for PC reads;
* a synchronous active-low reset on all registers.

The original board's data bus is drawn as 8 bits wide. Here the codebook
memory has 16-bit ports, because one component per clock is needed to meet
68 clocks per distance. The PC still moves codebook words as two bytes.

Not built:

* the TMS320C26 DSP and its program: sorting, the exponential adaptation
  step computed with a Taylor series, and float/integer conversion;
* its EPROM;
* the 8255 PPIs. `isa_bus_interface` takes their place as a simple port
  decoder.

The DSP's buses are ports of `ngas_board`.

## Files

| file | content |
|---|---|
| `rtl/ngas_pkg.sv` | sizes, mode/bank enums, state and control register structs, port numbers |
| `rtl/ngas_board.sv` | top level: everything wired together |
| `rtl/manhattan_alu.sv` | phases 2 and 3 of the distance pipeline |
| `rtl/alu_control_unit.sv` | sample choice, address generation, 68-clock sequence |
| `rtl/data_bus_buffers.sv` | bus segments and hand-over between PC and ALU |
| `rtl/io_control_unit.sv` | PC transfers, state register, size registers, read-back |
| `rtl/isa_bus_interface.sv` | ISA I/O cycle decoding |
| `rtl/dsp_port_interface.sv` | DSP input and output port registers |
| `rtl/random_number_register.sv` | LFSR random number |
| `rtl/pattern_memory.sv`, `rtl/codebook_memory.sv`, `rtl/distance_result_memory.sv` | memories |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ngas_board.sv` | end to end: the testbench plays the PC (ISA cycles) and the DSP; loading, training with adaptation up to the iteration limit, a PC bus grab that stalls the ALU, run-time winners with interrupt and acknowledge, read-back |
| `tb/tb_ngas_board_full.sv` | the same at full size: 1024 samples and 256 codevectors loaded over ISA |
| `tb/tb_ngas_training_workload.sv` | a codebook-training experiment: 16 codevectors trained on a synthetic 256-block image with the textbook Neural Gas step, each next sample started before the adaptation so the ALU and the DSP overlap; compares quantisation error before and after, and Manhattan against Euclidean coding; measures clocks per coded block |

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. The end-to-end test counts each mechanism (stall,
pending start, distances read while the ALU is busy, end of training,
interrupts, read-back)
and fails if one never happened. Its DSP model uses a simple adaptation,
`dw = (x - w) / 2^(rank+1)` for the three nearest codevectors. This is a
stand-in, not the original exponential rule. The training workload uses
the exponential rule in floating point, with the step size and the
neighbourhood width shrinking over the run. In that run the mean squared
error (pixels scaled to [0,1]) falls from 0.124 to 0.00023. Coding with the
Manhattan distance gives the same error as coding with the Euclidean
distance. A coded block costs 1158 clocks at 16 codevectors: 1088 for the
ALU, the rest for the DSP and the PC handshake.

## Simulating

With Verilator 5:

```sh
# one module's testbench
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/ngas_pkg.sv tb/tb_manhattan_alu.sv --top-module tb_manhattan_alu -o sim
./obj_dir/sim

# end to end, then at full size (about one second)
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/ngas_pkg.sv tb/tb_ngas_board_full.sv --top-module tb_ngas_board_full -o sim
./obj_dir/sim

# lint
verilator --lint-only -Wall -Irtl -y rtl rtl/ngas_pkg.sv rtl/ngas_board.sv
```

Lint leaves one expected warning besides unused package constants: only
the product bits that form the sample index are used from the multiplier
in `alu_control_unit`.

The sizes are localparams in `ngas_pkg`: `VEC_LEN`, `MAX_CV` and `MAX_PAT`.
The memories and address widths follow from them. The 68-clock figure
becomes `VEC_LEN + 4`.
