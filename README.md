# Serial link transceiver with a built-in word-error-rate test

This is a small chip that measures how well a high-speed serial link works. A
transmitter and a receiver share one die. The transmitter sends 8b/10b-coded
words over a differential (LVDS) pair. A cable or PCB track loops them back to
the receiver on the same chip. The receiver has no clock from the link, so it
recovers the bit timing from the data edges, finds the word boundaries, and
decodes each word. It then compares every received byte with the byte that was
sent.

The result of each comparison is one pulse on one of two output pins: "correct"
or "faulty". An external counter on those two pins gives the word error rate.
Lowering the input clock lowers the bit rate, so the same chip traces the word
error rate against the data rate of a given channel. The design target is
500 Mbit/s over a 10 cm PCB track, plus lower rates over longer cables.

Everything between the pins is here as synthesizable SystemVerilog, apart from
the two LVDS buffers, which are behavioural models. The rest of this file
covers:

- how the pins and the two modes work;
- how the receiver recovers bits (the hardest part, with the most space below);
- how word alignment, coding and comparison work;
- how to simulate and change the design;
- where it departs from the specification it was built to.

## Pins and modes

The chip has twelve pins. Nine of them are ports of `transceiver_top`:

| Pin | Port | Direction | Use |
|---|---|---|---|
| 1, 2 | `tx_p`, `tx_n` | out | Differential serial output |
| 3, 4 | `rx_p`, `rx_n` | in | Differential serial input |
| 5 | `clk` | in | Sample clock: four times the bit rate |
| 6, 7 | — | — | VDD, VSS |
| 8 | `pin_ok` | out | Comma detected (comma mode) or correct word (data mode) |
| 9 | `pin_err` | out | Faulty word (data mode) or parity error (both modes) |
| 10 | — | — | Bias for the analog buffers |
| 11 | `mode_sel` | in | 0 = comma mode, 1 = data mode |
| 12 | `rst` | in | Reset, active high |

The chip has two modes:

- **Comma mode** (`mode_sel` = 0). The transmitter sends the K28.5 comma symbol
  without a break. The receiver uses these symbols to settle its sampling
  phase and to lock its word boundary. Pin 8 pulses once for each comma
  detected.
- **Data mode** (`mode_sel` = 1). The transmitter sends bytes from a PRBS-7
  pseudo-random generator. Each received byte gives one pulse: on pin 8 if it
  matches the byte sent, on pin 9 if it does not.

Both pins give one-clock pulses. There is at most one pulse per word, and a
word lasts 40 clocks. `pin_err` also pulses when the decoder flags a bad code
or a disparity error ("parity error"). A bad word in data mode can therefore
give one or two pulses on pin 9.

Reset and the mode pin each pass through a two-flop synchroniser, so hold reset
for at least two clocks. A mode change empties the store of transmitted bytes.
Bytes that were already in flight are then compared against an empty store and
count as faulty. To measure, run some words in comma mode, switch to data mode,
let a few words pass, and then start counting.

## Clocking

The specification uses a clock generator with four phases: four clocks at the
bit rate, each shifted by a quarter period. This RTL uses one clock at four
times the bit rate instead (2 GHz for 500 Mbit/s). A 2-bit phase counter in
`clock_gen` numbers the clock edges 1, 2, 3, 4 inside each bit period. Its
`bit_en` strobe (edge 4) steps the transmitter.

- One bit is four clocks.
- One 10-bit word is 40 clocks.
- At 500 Mbit/s the design runs at 2 GHz.
- At 125 Mbit/s it runs at 500 MHz.

The RTL knows no other rate: every rate is set by the frequency on pin 5.

## Bit recovery: oversampling and phase selection

This is the part of the design that takes the most care to understand.

### Sampling

The receiver samples the incoming line on every clock, which gives four samples
per bit. `oversampler` collects them into a 4-bit window, `win[3:0]`. Sample
`win[i]` was taken at clock edge i+1. The window is handed on once per bit
period. The receiver and transmitter share the clock, but the cable adds an
unknown delay, so a bit can start anywhere inside a window.

### Edges X and Y

`phase_select` compares each sample with the one before it. The first sample
of the window is compared with the last sample of the previous window. A
0-to-1 change at edge n is a rising data edge, and a 1-to-0 change is a
falling one. Two numbers are kept, each from 1 to 4:

- **X**: the clock edge that first sees the line high after a rising edge.
- **Y**: the clock edge that first sees the line low after a falling edge.

Each number is updated only in windows that contain such an edge. Between
edges it keeps its last value. 8b/10b guarantees an edge at least every five
bits, so both numbers stay fresh.

### The A flag and the formula

For an undistorted signal, a high pulse runs from edge X to edge Y of a later
bit period. Its middle is at (X + Y + 4) / 2 edges from the start of X's
period. The extra 4 accounts for Y being counted one period later. When the
duty ratio is badly distorted, a rising edge and the next falling edge can land
in the same window. Y is then in the same period as X, and the middle is
(X + Y) / 2.

The flag **A** tells the two cases apart:

- A = 1 while rising and falling edges never share a window.
- A = 0 once a window holds a rising edge followed by a falling edge.
- A returns to 1 when a window holds a falling edge with no rising edge before
  it.

The selected sampling edge is then

    ideal = (X + Y + 4A) / 2

The division is truncated, and results 5 and 6 wrap to edges 1 and 2. The
result is recomputed every bit period from the latest X, Y and A, so it follows
slow drift of the channel delay and changes of the duty ratio. Each recovered
bit is `win[ideal-1]`, using the value computed from earlier windows.

| X | Y | A | ideal | Example |
|---|---|---|---|---|
| 2 | 2 | 1 | 4 | Delay puts edges at sample 2; sample late in the bit |
| 1 | 1 | 1 | 3 | Reset state |
| 3 | 3 | 1 | 5 → 1 | Edges at sample 3; sample at edge 1 of the next bit |
| 1 | 3 | 0 | 2 | Rising and falling edges in one window (short high pulse) |
| 2 | 1 | 1 | 3 | High pulse a quarter bit shorter than nominal |

After reset, X = Y = 1, A = 1 and the selection is edge 3.

### Limitation: drift across the window boundary

The formula carries no memory of which bit period an edge belongs to. Suppose
the channel delay drifts slowly so that the data edges cross from edge 4 to
edge 1 of the window. Then there are a few bit periods in which X has already
moved and Y has not. The computed middle then jumps by two edges: half a bit
too early.

- **Drift in the forward direction** (more delay) is handled.
- **Drift in the backward direction** (less delay) across that boundary moves
  the sampling point by a whole bit, which is a bit slip.
- **Heavy random jitter** that moves edges back and forth across the boundary
  causes the same slips.

After a slip, the word boundary is wrong. In comma mode the next comma
realigns the receiver. In data mode the receiver only realigns when a false
comma appears in the data, and every word until then is faulty. The word error
rate sweep below shows this as a sharp cliff. This behaviour comes from the
formula as specified. A design that needs to survive it would have to keep the
bit-period index of each edge.

## Word alignment

Recovered bits shift into a 10-bit shift register (`rx_shift_reg`), newest bit
in bit 0. `comma_detect` looks at the 7 oldest bits for 0011111 or 1100000.
These are the first seven bits of K28.5 in its two disparity forms. No
sequence of valid data codes contains them across a code boundary, so a match
marks the end of a comma symbol.

`word_counter` then counts ten bits and loads the 10-bit register
(`rx_word_reg`) every tenth bit. Each comma detected restarts the count: it
loads the register at once and marks the receiver as locked. Before the first
comma nothing is loaded.

## 8b/10b coding and the parity check

The encoder and decoder use the standard 8b/10b code:

- 5b/6b and 3b/4b sub-blocks;
- running disparity;
- the alternate x.A7 code where the rules require it.

Bit 'a' is sent first. The tables in `sl_pkg` are the RD− forms. The RD+ form
is the complement wherever a sub-block has two forms.

The only control symbol is K28.5. `enc_8b10b` updates its running disparity on
every word. `dec_8b10b` looks each sub-block up in both forms. It reports:

- a code error if a sub-block is not in the tables;
- a disparity error if a sub-block's form does not match the running
  disparity tracked at the receiver.

It then resynchronises its running disparity from the received code, so one
error does not spread to the following words.

The specification asks for received words to be "checked for parity errors",
but 8b/10b has no parity bit. Here, a parity error means a code or disparity
error from the decoder. It is reported on pin 9 in both modes.

## Comparing sent and received words

The transmitter pushes every data byte it sends into `tx_data_fifo`, a 16-entry
queue. The receiver pops one byte for every data word it decodes.
`word_comparator` pulses `correct` when the bytes are equal and `faulty` when
they differ or the queue is empty.

The queue holds the bytes that are on their way through the serializer, the
channel and the receiver pipeline. That is a few words at any practical loop
delay. When the queue is full, a push is dropped and a sticky `ovf` flag is
set. Received commas are not compared. A mode switch empties the queue.

## Transmit path

1. `prbs_gen` is a 7-bit LFSR for x^7 + x^6 + 1, seeded with all ones. It steps
   eight times per byte, and the first bit out becomes bit 0 of the byte.
2. `tx_word_reg` holds K28.5 in comma mode, or the next PRBS byte in data mode.
   It loads once per word.
3. `enc_8b10b` codes the word.
4. `serializer` shifts the 10 bits out MSB first, one per bit period.
5. `lvds_driver` drives the pair.

A new word is loaded when the last bit of the previous one has been sent, so
words follow each other without a gap.

## Timing summary

| Quantity | Value |
|---|---|
| Clock | 4 × bit rate (2 GHz at 500 Mbit/s) |
| Bit period | 4 clocks |
| Word period | 40 clocks |
| Result pulse width | 1 clock |
| Pulses per word | at most one on pin 8; one or two on pin 9 |
| Reset and mode synchroniser | 2 clocks |

## Module map

| Module | Role |
|---|---|
| `transceiver_top` | Top level; wires the blocks below |
| `sl_pkg` | Mode type, word type, K28.5 constants, 8b/10b tables and encode function |
| `control_logic` | Reset and mode synchronisers, queue flush on mode change, pin 8/9 mux |
| `clock_gen` | Phase counter: edge number within a bit, bit strobe |
| `prbs_gen` | PRBS-7 byte generator |
| `tx_word_reg` | Transmit word register (comma or PRBS byte) |
| `enc_8b10b` | 8b/10b encoder with running disparity |
| `serializer` | 10-bit parallel-to-serial shift register |
| `lvds_driver` | Behavioural LVDS output driver (pins 1, 2) |
| `lvds_receiver` | Behavioural LVDS input receiver (pins 3, 4) |
| `oversampler` | 4× sampling into 4-bit windows |
| `phase_select` | Edge detection, X/Y/A, sampling-point choice, recovered bit |
| `rx_shift_reg` | 10-bit receive shift register |
| `comma_detect` | K28.5 comma pattern match |
| `word_counter` | Bit counter that fixes the word boundary |
| `rx_word_reg` | 10-bit received-word register |
| `dec_8b10b` | 8b/10b decoder with code and disparity checks |
| `rx_data_reg` | 8-bit received-data register with parity-error flag |
| `tx_data_fifo` | Queue of transmitted bytes awaiting comparison |
| `word_comparator` | Received versus transmitted byte comparison |

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches). The package must be
compiled first. The top-level test runs with verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        --top-module transceiver_top_tb rtl/sl_pkg.sv tb/transceiver_top_tb.sv
    obj_dir/Vtransceiver_top_tb

Every testbench works the same way: replace the name. Each testbench:

- prints `TB_RESULT checks=N failures=M` and ends with `$finish`;
- has a watchdog that ends the run with a failure if it hangs;
- checks results against values computed independently of the RTL, such as
  8b/10b and PRBS reference models.

The testbenches that matter most:

- **`transceiver_top_tb`** runs the whole chip at its default parameters at
  500 Mbit/s. The output pair is looped back to the input through a channel
  model with a delay, a slow delay drift, duty-ratio distortion and injected
  bit errors. The test locks in comma mode, runs 200 data words, drifts the
  channel delay by two samples and most of the way back, and distorts the duty ratio. It
  then flips single bits and returns to comma mode with pulses short enough to
  force A = 0. It counts each mechanism and fails if one never happened:
  - commas detected;
  - mode switches;
  - sampling-point changes;
  - the A = 0 case;
  - faulty words;
  - realignment.
- **`wer_sweep_tb`** measures the word error rate from the pin 8 and pin 9
  pulse counts at 125, 250 and 500 Mbit/s. The channel adds random jitter of
  0 to 625 ps to each edge. The results are no errors at 125 Mbit/s, about 10%
  at 250 Mbit/s, and all words wrong at 500 Mbit/s. Jitter above a third of a
  bit triggers the boundary slips described above. The test checks that the
  error rate does not fall as the rate rises.
- **`phase_select_tb`** drives windows directly and compares the selection with
  the formula.

## Departures from the specification

- **One 4× clock** takes the place of four phase-shifted clocks. The edge
  numbering and the sampling choice are the same, but the clock runs four
  times faster.
- **Parity error** is read as an 8b/10b code or disparity error, since the code
  has no parity bit. It is shown on pin 9.
- **Pin 8/9 mapping**: which events share which pin is this design's choice.
  The specification lists four events for the two pins.
- **PRBS-7** (x^7 + x^6 + 1) was chosen as the random generator. The
  specification does not name a polynomial.
- **The transmitted-data register** is a 16-entry queue, because several words
  are in flight in the loop at any time.
- **K28.5** is the only comma and control symbol.
- **No debug access pins**: the specification wishes for off-chip access to
  important nodes, but the twelve pins are all in use. `phase_select` brings
  out its X, Y, A and selection, and `word_counter` brings out its lock flag,
  for observation in simulation.
- **The LVDS driver and receiver** are behavioural: logic levels with a delay.
  No voltage levels or currents are modelled.
- **Lower data rates** come only from a slower clock on pin 5.
- **The phase-selection formula** slips a bit when edges drift backward across
  the window boundary (see above).

## Not included

These parts are analog and have no RTL here:

- the pads;
- the bias generator behind pin 10;
- the electrical side of the LVDS buffers.

The specification's area (core below 0.27 mm² in a 0.35 µm CMOS process),
current-density and process-corner requirements apply to the layout, and
cannot be checked from this RTL. For scale, a generic synthesis gives about
420 cells, of which 119 are flip-flops.
