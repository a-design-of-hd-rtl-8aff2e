# BT.1120 video transmitter for a DM6467 video compression board

This RTL is the FPGA half of a two-board HD camera link. An HD CMOS sensor
delivers 1920x1080 YCbCr 4:2:2 video, 8 bits per component, on an 80 MHz
word clock. The FPGA has no frame store, so it forwards every line at once to a
TI TMS320DM6467 DaVinci processor. The DM6467 compresses the video (H.264) or
analyses the luma (motion detection) and sends the result over Ethernet.

The DM6467 video port (VPIF) takes HDTV input only as BT.1120. It carries luma
on channel 0 and chroma on channel 1, each on its own 8-bit bus. The standard
BT.1120 clocks are 74.25 and 148.5 MHz, and its frame rates run from 24 to
60 fps. This system runs at neither: it uses the sensor's 80 MHz clock, and the
system platform switches the frame rate among 5, 10 and 20 fps. The transmitter
still works because a BT.1120 receiver finds lines and frames only through the
timing codes (EAV/SAV) embedded in the stream. It does not depend on the clock
rate or on a fixed frame period. So the transmitter:

* writes every line in the standard BT.1120 1080-line layout, with correct
  EAV/SAV codes, on the 80 MHz clock;
* sets the frame rate by inserting idle time after each line. It does not
  change the clock.

## Line anatomy

Every line takes 720 word clocks of horizontal blanking, then 1920 active
words. The same timing codes appear on both buses in the same clock:

| columns     | content                         | Y bus                 | C bus                  |
|-------------|---------------------------------|-----------------------|------------------------|
| 0-3         | EAV                             | FF 00 00 XY           | FF 00 00 XY            |
| 4-5         | line-number words               | 10 10                 | 80 80                  |
| 6-7         | error-detection words           | 10 10                 | 80 80                  |
| 8-715       | ancillary / blanking            | 10 ...                | 80 ...                 |
| 716-719     | SAV                             | FF 00 00 XY           | FF 00 00 XY            |
| 720-2639    | active                          | Y0 ... Y1919          | Cb0 Cr0 ... Cb959 Cr959 |
| 2640-...    | IDLE, until the next line trigger | 10                  | 80                     |

In blanking lines the active words are at the blank level (10h / 80h).

The fourth timing word, XY, is `1 F V H P3 P2 P1 P0`. F is 0 because the
video is progressive. H is 1 in EAV and 0 in SAV. The protection bits are
`P3..P0 = V^H, F^H, F^V, F^V^H`. This gives four codes:

| lines       | region               | EAV | SAV |
|-------------|----------------------|-----|-----|
| 1-41        | top vertical blanking    | B6  | AB  |
| 42-1121     | picture (1080 lines)     | 9D  | 80  |
| 1122-1125   | bottom vertical blanking | B6  | AB  |

The line-number and error-detection words carry the blank level. They do not
carry a coded line number or a CRC. The receiver locks on EAV/SAV only, so it
needs neither. If your receiver checks line numbers or CRCs, add them in
`bt1120_encoder` (the words are sent in the `RG_AUX` region at columns 4-7).

## Two state machines

The encoder (`bt1120_encoder`) is driven by two small Mealy state machines:

* `bt1120_region_fsm` steps through the regions of one line:
  EAV -> AUX -> SAV -> ACTIVE -> IDLE. A column counter starts at 0 on the
  first EAV word, and the state changes when the counter reaches the last
  column of a region. The machine waits in IDLE until `line_start`. The
  trigger is accepted in IDLE only, and an assertion flags a trigger that
  arrives while a line is still being sent. `line_begin` and `line_end` are
  combinational (Mealy) outputs.
* `bt1120_line_fsm` counts lines from 1 to 1125 and keeps the vertical region
  (top blanking, picture, bottom blanking). It advances when the region
  machine accepts a trigger. If `frame_start` comes with the trigger, the
  counter restarts at line 1. After reset the counter stands on line 1125, so
  the first line sent is line 1.

The encoder takes the current region, column and vertical region, selects the
word, and registers it onto `y_out`/`c_out`. All outputs change on the rising
edge. The first EAV word is on the bus at the second rising edge after the
cycle in which `line_start` is high.

## Frame rate by line stretching

A full frame needs at least 1125 x 2640 = 2,970,000 clocks. At 80 MHz that is
26.9 fps. `frame_rate_ctrl` makes the slower rates:

* It counts a frame period of `CLK_HZ/fps` clocks: 16,000,000 at 5 fps,
  8,000,000 at 10 fps and 4,000,000 at 20 fps.
* Inside each frame it issues 1125 line triggers, `floor(CLK_HZ/fps/1125)`
  clocks apart: 14222, 7111 and 3555 clocks.
* The last line of each frame absorbs the rounding remainder, so the frame
  period is exact.
* Each line sends its 2640 words and then idles until the next trigger.
* An elaboration check rejects parameters for which the 20 fps line spacing
  would be shorter than a line.

The rate request `fps_sel` (`fps_e`: 0 = 5 fps, 1 = 10 fps, 2 = 20 fps) is
sampled only at frame boundaries, so a switch never cuts a frame short. The
reserved code 3 keeps the rate in force. After reset, the first frame starts
on the first clock at the requested rate (20 fps if the request is reserved).

If you measure frame periods at the receiver from one first picture line to
the next, expect a small shift at a rate switch. The 41 top blanking lines of
the new frame already use the new line spacing.

## Pixel input

The transmitter has no line buffer. In every clock of the active region of a
picture line, `pix_rd` is high, and the sensor read path must present that
pixel's `y_in` and `c_in` in the same cycle, like a first-word-fall-through
FIFO read. `c_in` alternates Cb and Cr, Cb first, and is passed through as
given. The FPGA therefore sets the sensor's readout timing (it drives the
sensor). A small FIFO in front of `y_in`/`c_in` can absorb any fixed offset.

## Top level

`bt1120_tx_top` connects `frame_rate_ctrl` to `bt1120_encoder`:

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst_n`| in  | 1     | 80 MHz word clock; asynchronous reset, active low |
| `fps_sel`     | in  | 2     | requested rate (`fps_e`) |
| `fps_cur`     | out | 2     | rate in force |
| `pix_rd`      | out | 1     | pixel read strobe to the sensor path |
| `y_in`, `c_in`| in  | 8     | pixel luma / chroma |
| `vpif_y`      | out | 8     | BT.1120 Y stream (VPIF channel 0) |
| `vpif_c`      | out | 8     | BT.1120 C stream (VPIF channel 1) |
| `line_busy`   | out | 1     | a line is being sent |
| `frame_begin` | out | 1     | line 1 starts this cycle |
| `line_num`    | out | 11    | line being sent, 1..1125 |

The parameters are `CLK_HZ` (80e6), `H_BLANK` (720), `H_ACTIVE` (1920),
`V_TOTAL` (1125), `V_ACT_FIRST` (42) and `V_ACT_LAST` (1121). Types and
constants are in `bt1120_pkg`. The design is about 110 flip-flops and no
memory.

## Scope

Only the FPGA's BT.1120 output path is given here. Everything else in the
system is a processor, a vendor block or software, or is not specified in
enough detail to build:

* the sensor and its control interface;
* the FPGA's YCbCr-to-YUV step (its rule is not specified, and the sensor
  already delivers 8-bit 4:2:2);
* the 1553B interface to the platform;
* the DM6467 and its VPIF capture, memory, 4:2:2-to-4:2:0 conversion, H.264
  encoder, motion detection, Ethernet and serial ports;
* clocking and power.

Choices made here where the source system leaves details open:

* the blank-level line-number and CRC words;
* the same-cycle pixel handshake;
* IDLE filled with blank levels;
* the line-stretching rate control;
* the rate encoding and frame-boundary switching;
* reset behaviour.

Each source file's header comment says which parts are fixed by the format and
which are this design's own choice.

## Verification

Each testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | what it checks |
|-----------|----------------|
| `tb_bt1120_region_fsm` | region and column on every clock against a reference counter, Mealy pulses, line length, random trigger gaps |
| `tb_bt1120_line_fsm`   | line number, vertical region and `frame_begin` across wraps and mid-frame restarts |
| `tb_bt1120_encoder`    | every Y and C word against a reference built from the layout above, trigger-to-EAV latency, pixel order |
| `tb_frame_rate_ctrl`   | line spacing, last-line remainder, frame period, and rate switching at frame boundaries for all rates and the reserved code |
| `tb_bt1120_tx_top`     | reduced-size end-to-end run through 20 -> 10 -> 5 -> reserved -> 20 fps; counts each mechanism |
| `tb_bt1120_tx_full`    | default parameters: three full 1920x1080 frames (20, 10, then 5 fps), 6,220,800 pixels, line and frame periods |

`tb/vpif_rx_model.sv` is a behavioural BT.1120 receiver that stands in for the
video port. It checks the EAV/SAV codes, their protection bits, and Y/C
alignment, checks that the words between EAV and SAV are at the blank level,
and recovers the pixels. Pixel values in the tests stay within 01h..FEh,
because BT.1120 reserves 00h and FFh for timing codes.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bt1120_pkg.sv tb/tb_bt1120_tx_top.sv --top-module tb_bt1120_tx_top
./obj_dir/Vtb_bt1120_tx_top
```

The full-size test simulates about 29 million clocks and takes about 25 seconds.
