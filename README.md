# Arbitrated address-event imager (80 x 60) with frame grabber

An ordinary image sensor scans every pixel at a fixed frame rate, whether or
not anything has changed, and it caps each pixel's dynamic range at what one
integration time can hold. This imager works the other way. Each pixel is an
integrate-and-fire cell. It collects photocurrent until it crosses a
threshold and then asks for the output bus. Once its address has been sent,
it resets and starts integrating again. A bright pixel fires often and a
dark one rarely, so intensity is carried by the time between a pixel's
events, and each pixel in effect picks its own integration time. The output
bus is given to pixels in proportion to how often they fire. When nothing
happens, nothing switches.

The chip sends out only addresses: an (X, Y) pair per event, on a bus with
a Req/Ack handshake. An image has to be rebuilt on the receiving side. A
frame grabber time-stamps every event with a 24-bit timer. It keeps each
pixel's latest time stamp and the latest inter-spike interval, and the
intensity is inversely proportional to that interval.

This repository gives synthesizable SystemVerilog for the readout of the
published 80 x 60 arbitrated address-event (AER) imager (Culurciello,
Etienne-Cummings and Boahen, 2001), a behavioural model of its analog
pixel, and a frame grabber that follows the published requirements. Every
module has a self-checking testbench.

## Block structure

```
aer_imaging_system                      top: chip + receiver
├── aer_imager                          the imager chip
│   ├── pixel_array                     80 x 60 pixels (behavioural)
│   │   └── aer_pixel  x 4800           integrate-and-fire model, pins ~p, s, li
│   ├── arbiter_tree   (N = 60)         row arbiter
│   │   └── arb_cell   x 63             two-input arbitration cells
│   ├── addr_encoder   (N = 60)         row address ROM -> Y
│   ├── row_latch      (N = 80)         buffer holding the selected row
│   ├── arbiter_tree   (N = 80)         column arbiter on the buffered row
│   ├── addr_encoder   (N = 80)         column address -> X
│   └── aer_readout_ctrl                handshaking: sequencing and Req/Ack
└── aer_frame_grabber                   24-bit timer + per-pixel frame buffer
aer_pkg                                 shared constants and state enums
```

The package `aer_pkg` holds the array size (80 x 60), the 24-bit timer width,
the pixel model's defaults and the state encodings.

## The pixel and its three wires

On the chip each pixel has three digital connections:

* `~p` is the row request, active low. It is shared by the whole row, so
  any firing pixel in a row pulls the row's request.
* `s` is the row acknowledge and reset. It is also shared by the whole row.
* `li` is the pixel's column line. It tells the row buffer which pixels of
  the acknowledged row have fired.

`aer_pixel` is a clocked behavioural model of the analog cell. The input
`photo` is the photocurrent expressed as charge per clock, and the register
`vmem` integrates it. When `vmem + photo` reaches the threshold `VTH`, the
pixel fires. It then stops integrating, just as the real cell disconnects
its capacitor from the comparator, and it holds `req_n` low. While `s` is
high a requesting pixel drives `li`. On the clock edge with `s` high it
clears its charge and its request.

A pixel that is not requesting ignores `s`. The row-wide acknowledge
therefore resets only the pixels that fired, and the others keep their
charge. Under constant light `p`, a pixel that is never kept waiting fires
every `ceil(VTH/p) + 1` cycles. That is `ceil(VTH/p)` cycles of
integration plus the cycle in which it is acknowledged.

The model's time scale (`PHOTO_W = 8`, `ACC_W = 16`, `VTH = 4096`) is this
design's own choice. The real pixel covers ten decades of intensity. An
8-bit `photo` input covers about 2.4 decades. Widening the model
(`PHOTO_W = ACC_W = 24`, `VTH = 2^24 - 64`) lets one array carry light
levels from 1 to 2^24. In simulation the frame buffer then holds intervals
from 12 to 16,777,158 cycles, a span of 123 dB.

## On-demand readout: row arbiter, row latch, column arbiter

This is the core of the design. A pixel is read out in three steps, and the
row latch in the middle lets the array and the output bus work on different
things at the same time.

1. **Row arbitration.** The row arbiter tree sees the 60 row request lines.
   It grants one row, and the row ROM (`addr_encoder`) turns the grant into
   the row address Y.
2. **Copy and acknowledge.** In the same clock cycle the controller drives
   `s` of the granted row. Every requesting pixel of that row puts its `li`
   on the column lines. The row latch copies all 80 column lines at the
   clock edge, and on that same edge the pixels reset. Those pixels are
   already integrating again while their addresses are still waiting in the
   latch.
3. **Column arbitration on the buffer.** The column arbiter tree works on
   the 80 latch outputs, not on the long column lines of the array. It
   picks one buffered element at a time. The controller sends that
   element's (X, Y) and clears it from the latch.

A new row is taken only when the latch is empty. Rows that fire in the
meantime wait on their request lines. This is where the queueing comes
from, and under heavy load it makes the intervals jitter.

### Controller states and cycle timing

`aer_readout_ctrl` has four states (`aer_pkg::rd_state_e`):

| state       | what happens                                                                 | leaves when      |
|-------------|------------------------------------------------------------------------------|------------------|
| `RD_IDLE`   | row tree enabled. If a row requests: pulse `s`/`latch_load`/`row_done` and register Y | a row is granted |
| `RD_COL`    | register X of the column tree's choice and raise Req                         | next cycle       |
| `RD_ACK_HI` | hold Req, X and Y                                                             | Ack = 1: drop Req, clear the element (`col_done`) |
| `RD_ACK_LO` | wait for Ack to fall                                                          | Ack = 0: raise Req for the next element, or go to `RD_IDLE` if the latch is empty |

The bus is four-phase (return to zero). Take a receiver that registers Ack
one cycle after it sees Req. Then one event takes **4 clock cycles**:

```
cycle     0    1    2    3    4    5    6    7    8
Req      _/‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾‾‾‾‾‾\_________/‾‾
Ack      ______/‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾‾‾‾‾‾\______
X,Y      =<event 0          ><event 1          ><
```

Each row adds 2 more cycles: one in `RD_IDLE` for the acknowledge and one
in `RD_COL` for the first launch. A lone pixel is therefore never read out
more often than once every 6 cycles. A saturated bus carries one event per
4 cycles plus 2 cycles per row. At the published peak of 40 M events/s
that means a clock of at least 160 MHz when rows are full.

### Frame rate

Under uniform bright light every row is full when it is taken. A row of 80
events then costs 80 x 4 + 2 cycles, which is 4.025 cycles per event. The
80 x 60 array delivers one "effective frame" (4800 events) every 19,320
cycles. That is 8,282 frames per second at a 160 MHz clock, or 39.75
M events/s. The event rate does not depend on the array size, so the
effective frame rate falls as 1/(pixel count). Smaller arrays measured
4.05 (40 x 30) and 4.10 (20 x 15) cycles per event, since their rows are
shorter. A VGA array at the same clock would reach about 130 frames per
second. In a real scene most pixels fire far less often than the bus
allows. The bus then idles, and each pixel's interval reflects its own
light, not the arbitration.

Assertions in the controller check the handshake rules: Req stays high
until Ack, X and Y stay stable while Req is high, and Req does not rise
again before Ack has fallen. Assertions in `aer_imager` check that a row is
taken only when the latch is empty.

## Arbitration trees

`arbiter_tree` is a binary tree of `arb_cell`s. The N inputs are padded
with idle inputs up to a power of two: 64 leaves for the 60 rows, 128 for
the 80 columns. Each cell does two things:

* It ORs the requests of its two subtrees and passes the result up.
* When its parent grants it, it passes the grant down to one requesting
  side.

Requests go up and grants come down through purely combinational logic, so
a grant appears in the same cycle as the requests. It stays stable for as
long as the requests and the root enable do, and the controller relies on
that.

When both sides of a cell request, the cell picks the side it did not serve
last. The cell records which side it served on the cycle `done` is pulsed.
No input can be starved: with all 60 rows requesting, every row is served
within 64 grants. The service is not exactly round-robin, though. Inputs
in a half-empty subtree are served more often. The published design says
only that arbitration trees grant access. The alternating tie rule and the
tree shape are this design's own choices.

## Frame grabber

`aer_frame_grabber` is the receiver side of the bus. It answers Req by
raising Ack `ack_delay + 1` clock edges after it first sees Req high. On
that same edge it does four things at pixel index `y*80 + x`:

* It reads the time of the pixel's previous event.
* It stores `timer - previous` as the pixel's interval. The subtraction
  wraps modulo 2^24.
* It stores `timer` as the pixel's new time.
* It updates the pixel's two flags.

It lowers Ack one cycle after Req falls. The flag `seen` marks a pixel that
has had one event, and `has_isi` marks a pixel that has had two. A pixel
has a valid interval only from its second event on. The read port
(`rd_x`, `rd_y` → `rd_isi`, `rd_valid`) is combinational.

The input `ack_delay` (0 to 255 extra cycles) is the receiver's handle on
the frame rate. Every cycle of delay lengthens each event on a saturated bus
from 4 cycles to `4 + ack_delay`. The imager then sends fewer events per
second, and pixels integrate longer between readouts. The end-to-end test
checks that a delay of 4 halves the saturated event rate.

The buffer holds 48 bits per pixel (24-bit time + 24-bit interval). That is
230,400 bits for 80 x 60, and 14.7 Mbit for a VGA array. The grabber
stores the interval, not its reciprocal. The timer counts clock cycles.
Both are this design's own choices.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_COLS`, `N_ROWS` | 80, 60 | top, `aer_imager`, `pixel_array`, `aer_frame_grabber` | array size (as fabricated) |
| `TIMER_W` | 24 | top, `aer_frame_grabber` | time-stamp width (as specified) |
| `PHOTO_W`, `ACC_W`, `VTH` | 8, 16, 4096 | pixel model | model time scale (own choice) |
| `X_W`, `Y_W` | $clog2 of the sizes | everywhere | address widths |
| `N` | 60 | `arbiter_tree`, `addr_encoder`, `row_latch` (80) | number of lines |

## Where this RTL departs from the chip

* **Clocked, not asynchronous.** The chip integrates, arbitrates and resets
  without a clock, and its arbiters and handshake are self-timed. Here
  every block runs on one clock, and Ack is assumed to be synchronous to
  it. Add a synchronizer in front of `ack` to connect an asynchronous
  receiver.
* **The pixel is a model.** The photodiode, capacitor, positive-feedback
  comparator and the separate analog and digital supplies are replaced by
  a digital integrator. It has the same three handshake pins.
* **The cell marked "C".** The chip's block diagram marks a cell "C" beside
  the row arbiter. Its job is not described, so no separate cell is built
  for it. The controller orders the row acknowledge and the emptying of the
  latch.
* **Row acknowledge selects and resets at once.** With only `~p`, `s` and
  `li` on the pixel, `s` is used both to put the row onto the column lines
  and to reset its requesting pixels, in one cycle.
* **Dynamic range.** A 24-bit timer resolves 7.2 decades of interval. That
  covers the array's 6 decades (120 dB) but not a single pixel's 10
  (200 dB).

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_arb_cell` | grants against a reference cell; a permanent tie must alternate |
| `tb_arbiter_tree` | 60- and 80-input trees against a heap-indexed reference tree under random requests; no starvation under saturation |
| `tb_addr_encoder` | every one-hot line gives its own address, at 60 and 80 lines |
| `tb_row_latch` | load, clear and empty against a reference, under random traffic |
| `tb_aer_pixel` | fires after exactly `ceil(VTH/p)` edges for six light levels; `li` only with `s`; `s` ignored when idle; a dark pixel never fires |
| `tb_pixel_array` | 8 x 6 array: row requests predicted cycle by cycle; column lines of each acknowledged row |
| `tb_aer_readout_ctrl` | event order and addresses with a modelled latch; exactly 4 cycles per event; random receiver latency |
| `tb_aer_imager` | 8 x 6 chip: flashed pixel sets give each address exactly once, rows in one burst, 4-cycle spacing; a lone pixel's interval is exactly `max(ceil(VTH/p)+1, 6)`; saturated throughput; no starvation |
| `tb_aer_frame_grabber` | 80 x 60 grabber and an 8-bit-timer grabber that wraps: intervals, valid flags, event count, Ack timing for random `ack_delay` |
| `tb_aer_imaging_system` | full size, defaults: sparse scene (bounds on every interval, dark pixels silent), then a saturated full frame until all 4800 pixels hold an interval. It then slows the receiver (`ack_delay` = 4) and checks 8 cycles per event. It counts and requires these mechanisms: multi-event rows, row ties, rows waiting, events waiting on the handshake, bus saturation, and a change of cycle time |
| `tb_workload_frame_rate` | uniform bright light on 20 x 15, 40 x 30 and 80 x 60 systems: cost per event on a saturated bus, effective frame rate against array size, and steadiness of one pixel's interval |
| `tb_workload_dynamic_range` | 4 x 4 system with a 24-bit pixel model, seven lit pixels spanning more than seven decades of light: every stored interval within its bounds, and more than 120 dB between the shortest and the longest |

The full-size test completes an entire 4800-pixel frame in about 50,000
cycles when every pixel is lit. It takes about a second to simulate once
built. Building takes a couple of minutes.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/aer_pkg.sv \
    tb/tb_aer_imaging_system.sv --top-module tb_aer_imaging_system
./obj_dir/Vtb_aer_imaging_system
```

Replace the testbench name to run any other test. `-Irtl` lets Verilator
find each module in `rtl/<name>.sv`. Any simulator without four-state
values should also seed its uninitialised state at random: the frame
buffer memories are left without reset on purpose, and the `seen` and
`has_isi` flags qualify them.
