# Kirsch edge detector

This is a streaming edge detector for 8-bit grey-scale images, written in
synthesizable SystemVerilog. Pixels arrive one at a time in raster order, at
most one every eight clock cycles. For every pixel that is not on the image
border, the circuit decides whether the pixel lies on an edge. If it does, the
circuit also reports which of eight compass directions points to the brighter
side of the edge. A 256 x 256 image gives 254 x 254 = 64516 results.

The detector keeps only three image rows, not the whole image. It computes
each result in a short fixed pipeline, so the result of a pixel comes out
before the next pixel can arrive.

Around the detector sits a board-level system (`top_kirsch`) for an FPGA board
with a 50 MHz clock. A PC sends the image over a serial line, and the results
go back the same way. Two seven-segment digits show the row being received,
and two LEDs show the detector's mode.

## The edge decision

The detector looks at a 3 x 3 *convolution table* centred on the pixel under
test. In the table, `table[m][n]` is row `m` (0 = top) and column `n`
(0 = left). For each direction d there are three neighbours on that side,
A_d, and five neighbours on the other side, B_d. The Kirsch derivative is

    Deriv_d = 5 * sum(A_d) - 3 * sum(B_d)

| direction | code | bright-side neighbours A_d |
|-----------|------|----------------------------|
| E  | 000 | [0,2] [1,2] [2,2] |
| W  | 001 | [0,0] [1,0] [2,0] |
| N  | 010 | [0,0] [0,1] [0,2] |
| S  | 011 | [2,0] [2,1] [2,2] |
| NW | 100 | [1,0] [0,0] [0,1] |
| SE | 101 | [1,2] [2,2] [2,1] |
| NE | 110 | [0,1] [0,2] [1,2] |
| SW | 111 | [2,1] [2,0] [1,0] |

The largest derivative wins. When two or more derivatives are equal, the
winner is the first of them in the order W, NW, N, NE, E, SE, S, SW. There is
an edge when the largest derivative is greater than 400 (`THRESHOLD`). If
there is no edge, the direction output is 000. The centre pixel is not used.

`kirsch_edge_calc` does not compute the eight derivatives one by one. Let T be
the sum of all eight neighbours. Then sum(B_d) = T - sum(A_d), so

    Deriv_d = 8 * sum(A_d) - 3 * T

T is the same for every direction. So the largest derivative belongs to the
largest three-pixel sum, and ties between derivatives are exactly ties between
sums. The circuit therefore does the following:

- It forms the eight three-pixel sums, taking three neighbours in a row from a
  ring that runs clockwise round the table.
- It keeps the largest sum with a strictly-greater comparison, checking the
  candidates in the tie order.
- It tests `8*A_max > 3*T + 400`.

Both sides of that test are below 2^14 and never negative, so no signed
arithmetic is needed. The results are the same as those of the five-and-three
formula. The testbenches check this against a model written directly from
that formula.

## Three rows in rotation and the moving table

Only the pixels in the two rows above the current pixel are needed.
`kirsch_rowbuf` holds them in three 256 x 8 memories (`kirsch_ram`).
`kirsch_ctrl` counts columns and rows and chooses the memory for each row in
the order 0, 1, 2, 0, 1, 2, ... . Memory k therefore holds image rows
k, k+3, k+6, ... . When row 3 arrives, it overwrites row 0, which is no longer
needed.

When the pixel at (row r, column c) arrives, two things happen in the same
clock cycle:

- The pixel is written into memory `r mod 3` at address c.
- The other two memories are read at the same address c. They hold
  (r-2, c) and (r-1, c), the two pixels directly above.

The memory reads are registered, so one cycle later the column
{(r-2,c), (r-1,c), (r,c)} is complete. The buffer remembers which memory was
written and uses that to route the two older memories to the "two rows up"
and "one row up" outputs.

`kirsch_window` is nine registers. Each new column shifts in on the right, and
the table moves one pixel to the right. A table is complete, and gives a
result, when the new pixel has r >= 2 and c >= 2. The table is then centred
on (r-1, c-1). At the start of a row, the table still holds columns from the
end of the previous row. That does no harm, because no result is produced for
columns 0 and 1.

After the last pixel of an image, every counter returns to zero. The next
image can then follow directly, without a reset.

## Pipeline and timing

| cycle | what happens |
|-------|--------------|
| t     | `i_valid` = 1: the pixel is written, the two pixels above are read, the flags are computed from the counters |
| t+1   | the memory data and the registered pixel shift into the 3 x 3 table |
| t+2   | the table is complete: eight sums, maximum and T (first stage of `kirsch_edge_calc`) |
| t+3   | threshold test and direction |
| t+4   | `o_valid` = 1 with `o_edge`, `o_dir` |

The latency is 4 cycles. It is counted from the cycle in which the pixel that
completes a table is on the input, and it does not depend on the spacing of
the pixels. Nothing in the datapath is shared between pixels, so the pipeline
could take a pixel every cycle. The required spacing of at least eight cycles
is therefore met with room to spare. This design does not use the idle cycles
to share arithmetic units between pixels; it trades area for simplicity.

Only the control and valid flip-flops are reset. The memories, the table and
the arithmetic registers are not, because a valid flag that is reset keeps
their contents from being used.

## Modes, reset and row count

`o_mode` shows the detector's mode:

| mode  | `o_mode` | when |
|-------|----------|------|
| reset | 01 | from the cycle after `i_reset` is sampled high, for as long as it stays high |
| idle  | 10 | the cycle after reset is released, and after an image is finished |
| busy  | 11 | from the cycle after the first pixel until the cycle after the image's last result |

Reset is synchronous. Pixels offered during reset are ignored. Results still
in the pipeline when reset arrives are discarded.

The state register powers up as all zeros, which is the idle state. The
register also has an initial value of zero, so that simulation matches an
FPGA whose flip-flops start at zero. Lint tools report that initial value as
a variable with both an initialiser and a clocked assignment. This is
deliberate.

`o_row` gives the row of the most recent pixel. It reads 0 after reset and
255 once the last pixel of a 256-row image has arrived.

## Board-level system

`top_kirsch` connects three blocks:

- `uw_uart` receives the pixel bytes and sends back the result bytes. It is
  built from `uart_rx` and `uart_tx`.
- `kirsch` is the edge detector.
- `ssdc` drives the seven-segment display and the LEDs. It uses two
  `sevensegment` decoders.

| port | dir | meaning |
|------|-----|---------|
| `CLK` | in | 50 MHz clock |
| `nRST` | in | reset push button, **1 while pressed**; passes through a two-flip-flop synchroniser and resets all blocks. The synchroniser powers up as ones, so the system also starts in reset |
| `RXFLEX` | in | serial data from the PC: one byte per pixel |
| `TXFLEX` | out | serial data to the PC: one byte per result, `{0000, edge, dir[2:0]}` |
| `o_sevenseg[15:0]` | out | `[6:0]` low hex digit of the row, `[13:7]` high hex digit, segments g..a, active low; `[14]` = mode bit 0, `[15]` = mode bit 1 (LEDs) |

The serial format is 8 data bits, no parity, 1 stop bit, least significant
bit first. Each bit lasts `CLKS_PER_BIT` = 434 clock cycles, which is
115200 baud from 50 MHz. A byte takes 4340 cycles, far more than the 8 cycles
the detector needs per pixel. The detector produces at most one result per
pixel received, so the transmitter keeps pace with the receiver.

A result byte starts within a few cycles of the middle of the stop bit of the
pixel that completed its table. A four-entry buffer in `uw_uart` holds results
that arrive while a byte is still being sent. The `o_overflow` output and an
assertion flag the case where the buffer is full. In this system that does
not happen.

## Where this design makes its own choices

These parts follow the detector's requirements:

- the interface of `kirsch`
- the mode codes and their timing
- the derivative formulas, the tie order, the threshold and the direction
  codes
- the row count
- the three-row memory organisation and the 254 x 254 results per image

The following points are choices made in this design. Change them if your
environment differs:

- **Row memory.** Single port, 256 x 8, with synchronous write and a
  registered read of one cycle latency. A read of the address being written
  returns the old word.
- **Pipeline.** Four stages, fully parallel, with the `8A - 3T` form of the
  arithmetic.
- **Serial link.** 8N1 at 115200 baud. One pixel per received byte, and one
  `{0000, edge, dir}` byte per result. The receiver samples each bit in the
  middle. It drops a frame whose stop bit is 0, then waits for the line to go
  high again. The result byte layout and the baud rate are the main things to
  check against the PC software you use.
- **Display.** The row is shown in hexadecimal, because 0-255 has to fit on
  two digits. Segments are active low. The 16-bit bus is laid out as above;
  map it to your board's pins.
- **Reset button.** The button is taken as active high, as described above,
  and is synchronised with two flip-flops. These power up as ones, so the
  system starts in reset even before the button is pressed.
- **Image size.** `IMG_SIZE` can be set anywhere from 3 to 256 for quick
  tests. `o_row` stays 8 bits wide.

## Files

RTL (`rtl/`), from the bottom up:

| file | contents |
|------|----------|
| `kirsch_pkg.sv` | pixel, table, direction and mode types; default size 256 and threshold 400 |
| `kirsch_ram.sv` | one row memory |
| `kirsch_rowbuf.sv` | three memories in rotation, write and read in parallel |
| `kirsch_window.sv` | the 3 x 3 table |
| `kirsch_edge_calc.sv` | sums, maximum with tie order, threshold, direction (2 stages) |
| `kirsch_ctrl.sv` | mode state machine, row and column counters, `o_row` |
| `kirsch.sv` | the detector |
| `uart_rx.sv`, `uart_tx.sv` | serial receiver and transmitter |
| `uw_uart.sv` | serial link controller with the result buffer |
| `sevensegment.sv`, `ssdc.sv` | hex digit decoder, display controller |
| `top_kirsch.sv` | board-level top |

Testbenches (`tb/`): every module has its own `<module>_tb.sv`.

- `kirsch_ref_pkg.sv` holds the reference model, written directly from the
  derivative formulas. It also holds the test-image generator: blocks of
  4 x 4 pixels that are flat, noisy, faintly noisy, or a sharp step at a random
  angle.
- `seg_ref_pkg.sv` holds the segment patterns, written as lists of lit
  segments.
- `kirsch_env.sv` is shared by two testbenches:
  - `kirsch_tb` runs on 32 x 32 images: one image is cut short by a reset,
    then three full images follow.
  - `kirsch_full_tb` runs on one 256 x 256 image.

  Both check every result and its latency of exactly 4 cycles, `o_row`,
  `o_mode` on every cycle, and the number of results. Pixel gaps are random,
  from 7 to 200 idle cycles.
- `top_env.sv` is shared by two testbenches:
  - `top_kirsch_tb` runs on 16 x 16 images at 4 cycles per bit.
  - `top_kirsch_full_tb` uses every default: one 256 x 256 image at 434
    cycles per bit, about 285 million clock cycles.

  Both drive the serial line, decode the returned bytes, and check the
  display digits and the mode LEDs.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>` and has a
watchdog that counts a failure if the run hangs. The detector and system
testbenches also count a failure if a required event never happened: each of
the eight directions, results without an edge, short and long gaps, the mode
changes, a reset during an image, and reuse of a row memory.
The testbenches draw random values, so a different `+verilator+seed+<n>`
gives a different image and different gaps.

## Simulating

With Verilator 5, list the packages first:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module kirsch_tb \
        rtl/kirsch_pkg.sv tb/kirsch_ref_pkg.sv tb/seg_ref_pkg.sv tb/kirsch_tb.sv
    ./obj_dir/Vkirsch_tb

Replace `kirsch_tb` with any other testbench name. Running times:

- the unit testbenches and `kirsch_tb`: well under a second
- `kirsch_full_tb`: about a second
- `top_kirsch_full_tb`: about four minutes

The simulator has no X or Z states, so every register that is read is either
reset or written before use.

## How far it has been verified

- **Passing testbenches.** All testbenches pass. `kirsch_full_tb` checks all
  64516 results of a full-size random image.
- **Testbenches catch faults.** Each module's testbench was run against a copy
  of the module with one deliberate fault, and each run reported failures. The
  faults were: a wrong tie order, swapped rows, a border result, a wrong stop
  bit, and so on.
- **Not checked here.** Timing on a real FPGA, including whether the design
  reaches 50 MHz. The exact byte format expected by any particular PC
  program.
