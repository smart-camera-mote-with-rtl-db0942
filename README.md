# Smart camera mote: line-parallel vision core

A wireless camera that has to run on batteries cannot afford to stream raw
video over its radio: sending the pixels costs more energy than analysing
them where they are captured. This camera therefore does its own analysis.
Pixel-level work (filtering, thresholding, edge and motion detection) runs at
sensor speed on **IC3D**, a SIMD processor that handles a whole image line in
each instruction. Object-level work (tracking, decisions, networking) runs on
an 8051 microcontroller at its own, variable, pace. The two meet in a
**dual-port RAM**: the IC3D writes features and coordinates, or image parts,
into it and interrupts the host. The host reads them and sends only event
descriptions over a low-rate IEEE 802.15.4 link.

This repository holds synthesizable SystemVerilog for the digital core: the
complete IC3D, the dual-port RAM with its semaphores and bank allocation, and
the I2C slave through which the host downloads IC3D programs. The 8051, the
image sensors, the radio module and the program EEPROM are bought-in parts.
They meet this core at its pins.

```
 sensors ──3 x 10-bit──▶ ┌──────────────────────── ic3d ─────────────────────────┐
                         │ video_in_proc ─▶ line_memory (64 x 320 x 10) ─▶ video_out_proc ──▶ video out
                         │                     ▲     │                               │
                         │                     │     ▼                               │
                         │                 lpa: 320 x lpa_pe                       │
                         │                     ▲                                     │
                         │ gcp (program, sync, global ops) ──────────────────────────┼──▶ irq to host
                         └───────▲───────────────────────────────┬───────────────────┘
     host I2C ──▶ i2c_prog_loader┘                 port A        ▼
     host bus (16-bit + bank pin) ───────────────────────▶ dpram 128K x 8 (port B)
```

## The line-parallel array

The heart of the IC3D is the linear processor array (`lpa`). It has 320
processing elements (`lpa_pe`), one per pixel column of a CIF line. Every
element has a 10-bit datapath, two word registers `r0` and `r1`, and a one-bit
flag. All elements receive the same control word in the same cycle, and all
use the same line-memory address. One instruction therefore reads a complete
line (320 x 10 = 3200 bits), processes all of its pixels, and can write a
complete line back, all in one clock.

Neighbourhood operations work because every element also sees the memory
words of its left and right neighbours. At the two ends of the array the
missing neighbour is chosen per instruction:

* **coupled** (`mirror = 0`): the array is closed into a ring, so PE 0's left
  neighbour is PE 319.
* **mirrored** (`mirror = 1`): the line is reflected about its end, so PE 0's
  left neighbour is PE 1, and PE 319's right neighbour is PE 318.

Operand `a` comes from the element's own memory word, a neighbour's word, or
a register. Operand `b` comes from a register, the 10-bit immediate, or its own
memory word. The result goes to `r0` or `r1` and/or to the element's column of
the line being written. The operations (enum `lpa_op_e` in `ic3d_pkg`) are:
pass, saturating add, subtract (clamped at 0), absolute difference, multiply
and multiply-accumulate with a right shift of the product, min, max, and, or,
xor, and shifts. All arithmetic is unsigned and saturates at 1023. There are
also compares (greater, equal, less) that set the flag.

**Guarding** gives data-dependent behaviour within one instruction stream.
An instruction with guard `G_FLAG` (or `G_NFLAG`) takes effect only in
elements whose flag is 1 (or 0). Its register write and its memory write are
both suppressed elsewhere. The line memory has a per-column write mask for
this reason. A typical pattern is "compare with threshold, then store a marker
guarded by the flag".

## Interlaced images: CIF and VGA on 320 elements

A CIF line (320 pixels) puts one pixel on each element. A VGA line (640
pixels) puts two pixels on each element: pixel `x` goes to element `x / 2`,
in sub-line `x mod 2`. The image line therefore occupies two memory lines, one
holding the even pixels and one holding the odd pixels. Element `p` owns the
adjacent pixels `2p` and `2p+1`. Horizontal neighbours are still one
instruction away:

* the left neighbour of even pixel `2p` is odd pixel `2p-1`: the *left* word
  of the odd line;
* the right neighbour of odd pixel `2p+1` is even pixel `2p+2`: the *right*
  word of the even line.

The `ppe2` pin selects this mode (`1` = VGA, two pixels per element). The
video input processor de-interlaces as pixels arrive, and the video output
processor re-interlaces on the way out. A program written for VGA addresses
even and odd lines explicitly. See the smoothing filter in
`tb/smart_camera_tb.sv` for an example.

## Control: the GCP and its instruction word

The global control processor (`gcp`) fetches one 67-bit instruction
(`gcp_instr_t`) per clock from a 256-word program memory. Each instruction
passes two stages:

| stage   | what happens                                                                 |
|---------|-------------------------------------------------------------------------------|
| issue   | fetch at `pc`. Jumps, loops and branches resolve here. `WAITV`/`WAITO` stall here. Array ops and `VOUT` present their read address to the line memory. |
| execute | the line read arrives. The array op is broadcast and writes back. `VIN` writes a video-in line. `VOUT` loads the output buffer. Global ops run (`LDI`, `GETPE`, `CNTF`, `SETXA`, `XWR`, `XRD`, `IRQ`). |

Instruction classes (`gcp_cls_e`):

* `I_LPA`: array operation. Fields `pe` (op, operand selects, destination,
  `mem_we`, guard, mirror, shift, imm), `rd_addr` and `wr_addr`.
* `I_VIN chan, sub, wr_addr, flag`: copy the held input line of channel
  `chan`, sub-line `sub`, into memory line `wr_addr`. `flag = 1` releases the
  held line, so set it on the last transfer of an image line.
* `I_VOUT chan, sub, rd_addr, flag`: load memory line `rd_addr` into the output
  buffer. `flag = 1` starts streaming.
* `I_WAITV` / `I_WAITO`: wait for a complete input line, or for the output
  processor to go idle. This is the video synchronisation.
* `I_JMP`, `I_LOOP n` / `I_DJNZ target` (the body runs `n` times, using one
  counter), and `I_BNZ target` (branch if `acc != 0`).
* Global operations on the 17-bit accumulator `acc`: `I_LDI imm`,
  `I_GETPE p` (read `r0` of element `p`), and `I_CNTF` (the number of elements
  whose flag is set).
* External bus: `I_SETXA addr`, then `I_XWR` (writes `acc[7:0]`) and `I_XRD`
  (reads into `acc`). The address auto-increments. With `sub = 1` they reach
  the dual-port RAM's semaphore/control space.
* `I_IRQ` raises the host interrupt, which is held until `host_irq_ack`.
  `I_HALT` stops the program.

Every line transfer passes through the program, so the line memory has only
one read port and one write port, and needs no arbiter. The program decides
in which cycle the video processors use those ports.

**Hazards and stalls.** An array instruction may read, in its issue cycle,
the line that the previous instruction writes in the same cycle. The line
memory forwards the written columns (a bypass), so no stall is needed.
Registers update at the end of execute, so back-to-back dependent array
instructions are safe. Issue stalls for three reasons only:

* a `WAITV`/`WAITO` that is not yet satisfied;
* the cycle after an `XRD`, because its data returns one clock later;
* a `BNZ` whose `acc` is still being produced.

Counters for both kinds of stall are brought out (`stat_wait_stalls`,
`stat_hz_stalls`), along with bypass and input-overrun counts.

**Timing.** Array instructions run one per clock. The testbench checks this
as a fixed cycle distance between instructions. Each video channel moves one
pixel per clock, both in and out. A VGA line takes 640 clocks of I/O plus
about 45 clocks of the test program's instructions, so 30 frames/s VGA needs
about 10 MHz. This figure is derived here, not specified. No clock frequency
or timing closure is claimed.

## Video input and output processors

`video_in_proc` takes three 10-bit pixel streams that share one timing:
`vin_valid` marks a pixel, and `vin_line_end` closes a line, at least one
clock after that line's last pixel. The block captures a line and then copies
it into a hold buffer. This lets the next line arrive while the program moves
the held one into the line memory. If a line ends before the held line was
released, the held line is replaced and `stat_vin_overruns` counts it.

`video_out_proc` holds one line (two sub-lines in VGA mode) per channel. It
streams `k*320` pixels on all three channels, with a valid/ready handshake
and `vout_last` on the final pixel. Loading a buffer while it streams is a
program error, and an assertion reports it.

## Dual-port RAM (`dpram`)

The dual-port RAM holds 128K x 8 in two banks of 64K. Port A belongs to the
IC3D, which uses the full 17-bit address. Port B belongs to the host, which
uses a 16-bit address plus a bank-select pin. Requests are taken on a clock
edge, and read data and status come one clock later. With `*_sem` set, a port
reaches the control space:

| address | register                                                                 |
|---------|---------------------------------------------------------------------------|
| 0..7    | semaphore. Write bit 0 = 0 to request it, or 1 to release it. A read returns bit 0 = 0 if this port owns it. A simultaneous request is granted to port A. |
| 8, 9    | allocation of bank 0 / bank 1: 0 shared, 1 IC3D only, 2 host only. Only the host can write these. |

An access to a bank allocated to the other side is refused. A refused write
is dropped, a refused read returns 0, and `*_denied` is set. When both ports
write the same word in the same cycle, the IC3D's write wins and `host_busy`
tells the host to retry. The semaphores are advisory: software uses them to
claim a region, for example a result table, while it is being written.

## Program download (`i2c_prog_loader`)

The host loads programs over I2C at run time. The slave sits at device
address `0x2A`. A transfer is the device address, a 16-bit start word address
(high byte first), and then 9 bytes per instruction (the 67-bit word,
most-significant byte first). Consecutive words go to consecutive addresses.
SCL and SDA are oversampled with the system clock, which must be at least 8x
the SCL rate. The `ic3d_start` pin restarts the program at address 0.

## Where this RTL departs from, or adds to, the published architecture

The published description gives the structure of the chip and the board,
their sizes and their mechanisms. It does not give the instruction set or the
interfaces. These choices are therefore this design's own and may differ from
the real chip:

* The instruction encoding and opcode list, the two-stage GCP pipeline, the
  256-word program memory, the single loop counter, and the small set of
  global operations (`GETPE`, `CNTF`). The real GCP is a full processor with
  more DSP capability.
* The interpretation of "mirrored" array ends as a reflection that skips the
  edge element.
* Program-scheduled line transfers (`VIN`/`VOUT`) instead of autonomous
  video-processor memory access, and the capture/hold buffering with overrun
  counting.
* Unsigned saturating 10-bit arithmetic, and MUL/MAC with a product shift.
* The dual-port RAM's register map, semaphore protocol, collision rule,
  bank-select pin and allocation codes.
* The I2C framing and device address.
* One interrupt line, level-held until acknowledged.

The sizes all follow the published figures: 320 elements, 10 bits, two
registers and a flag, a 64 x 3200-bit line memory, three video channels, one
or two pixels per element, and a 128K x 8 RAM in two 64K banks.

## Files

* `rtl/ic3d_pkg.sv`: shared types (instruction word, opcodes, selects).
* `rtl/lpa_pe.sv`, `rtl/lpa.sv`, `rtl/line_memory.sv`,
  `rtl/video_in_proc.sv`, `rtl/video_out_proc.sv`, `rtl/gcp.sv`,
  `rtl/ic3d.sv`: the vision processor.
* `rtl/dpram.sv`: the dual-port RAM.
* `rtl/i2c_prog_loader.sv`: the program download slave.
* `rtl/smart_camera.sv`: the top level.
* `tb/<block>_tb.sv`: one self-checking testbench per block. Each ends by
  printing `TB_RESULT checks=N failures=M`.

Parameters, with defaults in brackets: `NUM_PE` (320), `LINES` (64),
`CHANNELS` (3), `PROG_DEPTH` (256) and `DP_AW` (17) on `smart_camera` and
`ic3d`. The block testbenches mostly use narrower arrays (8 to 16 elements)
for speed.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/ic3d_pkg.sv \
          tb/smart_camera_tb.sv --top-module smart_camera_tb -o sim && ./obj_dir/sim
```

For another block, replace the testbench file and the top module name.
`-y rtl` lets Verilator find each module in the file of the same name. The
package must be listed first. `-Wno-fatal` keeps the testbenches' width
warnings (integer checks on narrow signals) from stopping the build. The
testbenches also pass with random initial register values
(`+verilator+rand+reset+2`).

`smart_camera_tb` is the end-to-end test, and it runs at the default sizes.
The host model downloads a 49-instruction program over I2C. The program then
processes two full 640x480 frames, interlaced onto the 320 elements. Per line
it does a 1-2-1 horizontal smoothing, horizontal and vertical gradients, a
threshold, a guarded edge map, a per-line edge count written to the
dual-port RAM, and three output channels. Around each frame run the
semaphore hand-shake, a bank-allocation change and the interrupt.

The testbench checks every output pixel and every count against a model
written in image coordinates. It also counts each mechanism (sync and
interlock stalls, bypass, coupled and mirrored reads, guarded stores,
semaphore refusal, bank refusal, interrupt, input overrun) and fails if one
never happens. It takes about 1.8 million checks and a few seconds of
simulation.
