# Flexible real-time image processing board — crossbar routing and host interface in SystemVerilog

A video system has an A/D-D/A front end, three frame buffers (one per colour plane) and
several processors: a chip set for low-level image processing and recognition, a
histogram/equalization chip set, and an off-board expansion processor. The board modelled
here puts all of these behind five small video crossbar chips. By writing a few control
words over VME, the host can put the processors in any order between camera, frame
buffers and monitor, chain them, process any one colour plane, or broadcast one plane to
all three outputs to show a grey image. All routing runs at the pixel clock: one 8-bit
sample per plane every 100 ns (10 MHz).

This RTL covers the board's logic: the two crossbar chip designs, the board-level wiring
of five crossbar instances, the VME slave interface, the register banks around the image
processing chips, and a model of the two-phase clock generator. The image processing
chips, the histogram chips, the frame buffers, the A/D-D/A board and the host are not
part of it. Their busses are ports of the top module `imgboard`.

## How video moves through the board

Five crossbars carry the video. Four of them handle all three colour planes (`mux3ch`,
24 bits); one handles a single 8-bit plane (`mux1ch`):

| instance  | chip    | main input (X1SDI)      | output (X2SDI)          | tri-state output (X3SDI) | second input (X3SDII) |
|-----------|---------|-------------------------|-------------------------|--------------------------|-----------------------|
| u_muxfb1  | mux3ch  | A/D                     | frame buffers           | INT1                     | INT2                  |
| u_muxfb2  | mux3ch  | frame buffers           | D/A                     | INT1                     | INT2                  |
| u_muxvp1  | mux3ch  | INT1                    | expansion port out      | green to GPIP            | green from DA_ING     |
| u_muxvp2  | mux3ch  | expansion port in       | INT2                    | green to GPIP            | green from DA_ING     |
| u_muxpi   | mux1ch  | AD_OUT = GPIP, P_OUT = image processor, FB_OUT = histogram | P_IN → image processor, FB_IN → histogram, DA_IN → DA_ING | – | – |

The shared busses are the core of the design:

* **INT1** (24 bits) is a wired-OR of the tri-state outputs of the A/D crossbar and the
  frame-buffer crossbar. Enable one of the two and the processors see either the live
  camera image or the stored frame. A bus with no driver reads 0. Two drivers at once
  would OR their pixels together, so the host must switch the old driver off before it
  switches the new one on.
* **INT2** (24 bits) is the output of the expansion-port return crossbar. It is the second
  input of both the frame-buffer-side crossbars, so a processed image can be stored, shown,
  or both.
* **GPIP** (8 bits) is a wired-OR of the green tri-state outputs of the two expansion-port
  crossbars. It feeds the single-plane crossbar, so the on-board processors can take green
  from INT1 (camera or frame buffer) or from the expansion processor's output.
* **DA_ING** (8 bits) carries the single-plane crossbar's result back into the green
  second input of both expansion-port crossbars. From there it can go to INT2 and on to
  the frame buffers or the D/A.

The single-plane crossbar chains the two on-board processors: the image processor takes
GPIP or the histogram output, the histogram takes GPIP or the image processor output, and
the result is either of the two.

For example, to process the camera's green plane with the image processor and then the
histogram chips, and show the result as grey:

1. The A/D crossbar drives INT1.
2. The first expansion crossbar drives its green onto GPIP.
3. The single-plane crossbar routes GPIP → image processor → histogram → DA_ING.
4. The return crossbar puts DA_ING on INT2 green.
5. The D/A crossbar selects INT2 green for all three outputs.

The end-to-end testbench runs this routing (mode `CASCADE`).

## The three-channel crossbar (`mux3ch`)

Each plane of X1SDI is caught in a master register. That register drives the plane's
tri-state output X3SDI and the first of three mux levels:

* **level 1**, per plane: the registered X1SDI plane, or the same plane of X3SDII
  (not registered);
* **level 2**, per output plane: red or green of the level-1 result;
* **level 3**, per output plane: the level-2 result, or blue.

A slave register catches the result and drives X2SDI. So each output plane can come from
any of the six input planes. All three outputs can take the same plane, which drives all
three frame buffers from one 8-bit source.

The master/slave pair is written as two edge-triggered registers on opposite edges of the
dot clock. The chip itself used level-sensitive latches. The master loads on the falling
edge of `bdotclock` and the slave on the rising edge. X1SDI reaches X2SDI half a clock
after capture. X3SDI follows the master register.

The control word is written on D[11:0] and loaded on the falling edge of `cs_l`. The chip
has 12 control bits, but which bit does what is this design's own choice (`mux3_ctrl_t`
in `imgboard_pkg`):

| bits    | field       | meaning                                                   |
|---------|-------------|-----------------------------------------------------------|
| [2:0]   | `oe`        | tri-state enable of R (bit 0), G, B; 1 = drive X3SDI      |
| [5:3]   | `lane_sel`  | level 1 for R (bit 3), G, B; 1 = X3SDII, 0 = X1SDI         |
| [7:6]   | `r_src`     | source of R2SDI: 00 red, 01 green, 1x blue                |
| [9:8]   | `g_src`     | source of G2SDI                                           |
| [11:10] | `b_src`     | source of B2SDI                                           |

The control registers have no reset. Like the real chip, they power up with random
contents, so the host must write every crossbar before it relies on the routing.
`ack_l` is this design's own acknowledge for the VME handshake: it follows `cs_l`,
sampled on the rising dot-clock edge.

## The one-channel crossbar (`mux1ch`)

It has three fixed 2:1 paths. AD_OUT and FB_OUT pass through master registers; P_OUT goes
straight in:

    FB_IN = SEL1 ? AD_OUT : P_OUT     (slave register)
    P_IN  = SEL2 ? FB_OUT : AD_OUT    (no output register)
    DA_IN = SEL3 ? FB_OUT : P_OUT     (slave register)

SEL1..SEL3 are D[2:0] and load on the falling edge of `cs_l`. Which select value picks
which input is this design's choice. On the board, the two clock pins PHASE1 and PHASE2
are tied to the dot clock.

## Host interface (`vme_interface`)

This is a 16-bit-address VME slave with a 12-bit data path. Decoding has two levels:

* `vme_addr_decoder` compares A[15:9] with three bank codes. It also requires a short
  address modifier (0x29 or 0x2D; this design's choice), LWORD* high, IACK* high and
  AS* low.
* `vme_vector_decoder` picks the chip in the bank from A[8:6] while the handshake strobe
  is asserted.

| address (A[15:0]) | chip                                  | access |
|-------------------|---------------------------------------|--------|
| 0xFA00 + 0x40·i   | read-back driver i (i = 0..3)          | read, D[7:0] |
| 0xFC00 + 0x40·i   | image processor control latch i (i = 0..6) | write, D[7:0] |
| 0xFE00            | u_muxfb1                              | write, D[11:0] |
| 0xFE40            | u_muxfb2                              | write |
| 0xFE80            | u_muxvp1                              | write |
| 0xFEC0            | u_muxvp2                              | write |
| 0xFF00            | u_muxpi                               | write, D[2:0] |

`vme_handshake` is this design's own state machine, clocked by the 16 MHz VME SYSCLK
with two-flop synchronisers on the bus strobes. It has four states:

* **IDLE**: waits for AS* and DS* while the board is addressed.
* **SETUP**: opens the data transceiver, so write data is stable before any chip select
  falls. It also waits for a crossbar acknowledge left over from the previous cycle to
  return high.
* **STROBE**: asserts the strobe, which becomes a crossbar chip select, a latch clock or a
  driver enable. For a crossbar it waits for that chip's ACK_L; for the other banks it
  holds for `WAIT_CYCLES` (3) clocks.
* **ACK**: asserts DTACK* and holds the strobe until DS* is negated.

A crossbar write takes a few SYSCLK cycles longer than an access to the other banks.
It waits for the crossbar's own acknowledge, which has to cross from the dot-clock domain.

## Clocks

* `dotclock_l` (10 MHz) clocks the crossbars. One new pixel enters every clock.
* `clockgen` makes PHI1 (high while DOTCLOCK_L is low) and PHI2 (high while it is high),
  the two non-overlapping clocks of the processing chips. It models a buffer and an
  inverter feeding two cross-coupled NOR gates. This is a behavioural model with gate
  delays (3 ns and 4 ns, chosen here), not synthesizable logic. The NOR loop is the one
  intended combinational loop in the design.
* The image processing module (`pip_module`) and the histogram module load their video
  input register on PHI1 and their output register on PHI2.
* `sysclk` clocks only the VME handshake, and `sysreset_l` resets only the handshake.

In the end-to-end test, these are the latencies from a pixel on an input bus to the
output bus, in dot clocks:

* 1 through one crossbar (A/D → frame buffers, frame buffers → D/A);
* 2 to the expansion port, which passes two crossbars;
* 7 through one on-board processor and back: frame buffers → image processor → frame
  buffers (`FBPROC`), or expansion port → histogram → D/A (`EXTHIST`);
* 10 from A/D through both processors in cascade to D/A (`CASCADE`).

These counts include one register in each processor stand-in. A real chip set adds its own
pipeline depth.

## What is outside this RTL, and where it departs from the original board

* The image processing chips (filters, convolvers, contour tracer, feature extractor),
  the histogram chips, and the glue-logic PLD that makes their sync and latch signals
  (VBLANK, HBLANK, LINSTART and others) are not modelled. Their video pins, the seven
  control-latch outputs and the four read-back inputs are ports of `imgboard`.
* The crossbar clocks come straight from `dotclock_l`. On the board they are buffered
  copies made by the glue PLD.
* Pads, video line drivers, connectors and the chips' test and power pins are not
  modelled.
* Tri-state busses are modelled as data plus enable, resolved by OR in the top.
* The red and blue second inputs of the two expansion-port crossbars are tied to 0. The
  board leaves them unconnected.
* The latch-based master/slave pipelines are written as registers on opposite clock
  edges. Timing follows the clock phases, not the latch transparency windows.
* This design chose: the control-word bit layout, the select polarities, the ACK_L
  behaviour, the handshake state machine, and the accepted address modifiers.

## Files

* `rtl/imgboard_pkg.sv`: pixel and RGB types, crossbar control-word struct, bank and
  chip codes.
* `rtl/mux3ch.sv`, `rtl/mux1ch.sv`: the two crossbar chips.
* `rtl/vme_addr_decoder.sv`, `rtl/vme_vector_decoder.sv`, `rtl/vme_handshake.sv`,
  `rtl/vme_interface.sv`: the host interface.
* `rtl/pip_module.sv`: the image processing module's video registers, seven control
  latches and four read-back drivers.
* `rtl/clockgen.sv`: behavioural two-phase clock generator.
* `rtl/imgboard.sv`: the board top.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench is a top of its own. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      --top-module tb_imgboard -y rtl -y tb +libext+.sv rtl/imgboard_pkg.sv tb/tb_imgboard.sv
    ./obj_dir/Vtb_imgboard

Replace `tb_imgboard` with `tb_mux3ch`, `tb_vme_interface` and so on for the unit tests.
`--timing` is needed because the clock generator model and the testbenches use delays.

`tb_imgboard` runs the whole board with no parameter overrides:

* A bus-master model reads all four read-back drivers and writes all seven latches.
* It configures the five crossbars for four routings:
  * `ACQUIRE`: camera to frame buffers, frame buffers to D/A;
  * `CASCADE`: both processors, shown as grey;
  * `FBPROC`: frame buffers onto INT1, green through the image processor and back to the
    frame buffers, whose red and blue take the expansion port's blue and red;
  * `EXTHIST`: expansion port through the histogram chips.
* Stand-ins on the chip-set pins add control latch 0 to the pixel (image processor) or
  invert it (histogram).
* Random pixels enter every clock. For each of the nine output planes, the checker finds
  the latency and then checks every pixel at that latency.
* `CASCADE` runs for one full 512 × 512 frame, about 2.4 million pixel checks. The whole
  run takes a few seconds.

## How far to trust it

* Every module passes its own testbench.
* Each testbench was also run against a deliberately broken copy of its module and fails
  there.
* The routing checks compare against expected values computed from the routing rules.
  They do not come from the RTL's own structure.
* Not verified: timing against real silicon, the power-up behaviour of the wired-OR
  busses before the host has written the crossbars, and anything involving the missing
  chip sets.
