# PS/2 keyboard to seven-segment display

This design reads a PC keyboard through its PS/2 serial port and shows what is
typed on a small FPGA board. It has two outputs:

- **Bargraph.** Eight LEDs show the bit pattern of the last byte received.
- **Four-digit seven-segment display.** Digit keys `0`–`9` appear at the right
  of the display. Each later key pushes the earlier ones one place to the left.
  Any other key shows as the letter `E`.

After reset all four digits are dark. Pressing `1 2 3 4 5 6` one after another
shows:

| after      | display |
|------------|---------|
| reset      | `    `  |
| 1          | `   1`  |
| 2          | `  12`  |
| 3          | ` 123`  |
| 4          | `1234`  |
| 5          | `2345`  |
| 6          | `3456`  |

Everything runs in one clock domain, the system clock. The keyboard's own
clock is never used as a clock. It is sampled like any other input, and its
falling edges become one-cycle enable pulses.

## Block chain

```
 kb_clk ─┐   ┌──────────────┐ kb_clk_sync  ┌───────────────┐ edge_found
 kb_data ┴──►│ sync_keyboard├─────────────►│ edge_detector ├──────────┐
             │              ├─ kb_data_sync ─────────────────────┐    │
             └──────────────┘                                    ▼    ▼
                                                        ┌──────────────────┐
                                         sc[7:0] ◄──────┤ convert_scancode │
                                                        └────────┬─────────┘
                                          scan_code, valid_scan_code
                                                        ┌────────▼─────────┐
                                                        │  keyboard_ctrl   │
                                                        └────────┬─────────┘
                                          4 × (code, occupied)
                                                        ┌────────▼─────────┐
                                                        │convert_to_binary │ ×4
                                                        └────────┬─────────┘
                                          4 × digit code
                                                        ┌────────▼─────────┐
                                       num, seg_en ◄────┤   binary_to_sg   │
                                                        └──────────────────┘
```

| module              | role |
|---------------------|------|
| `keyboard_top`      | top level; ports `sys_clk`, `rst`, `kb_clk`, `kb_data`, `sc[7:0]`, `num[6:0]`, `seg_en[3:0]` |
| `sync_keyboard`     | two flip-flops in series on each PS/2 line |
| `edge_detector`     | one-cycle `edge_found` pulse per falling edge of the synchronized keyboard clock |
| `convert_scancode`  | 10-bit right-shift register and a mod-11 bit counter; outputs a scan code and a valid pulse |
| `keyboard_ctrl`     | state machine for make, break, extended and Pause sequences; holds the four-entry display buffer |
| `convert_to_binary` | look-up table from scan code to digit code (one instance per position) |
| `binary_to_sg`      | time-multiplexed seven-segment driver |
| `kb_pkg`            | shared types (`scan_code_t`, `digit_t`) and constants |

## Receiving a PS/2 frame

The keyboard drives both lines. Both idle high. Each byte is sent as an 11-bit
frame:

```
 start(0)  d0 d1 d2 d3 d4 d5 d6 d7  parity(odd)  stop(1)
```

The data bits come LSB first. The keyboard clock runs at 10–30 kHz and only
while a frame is being sent. A bit must be sampled on the falling edge of the
keyboard clock. The data line may change with some skew after the rising edge.

The receiver works in three steps:

1. **Synchronize.** `sync_keyboard` passes both lines through two flip-flops.
   The copies change only on the system clock. This costs two cycles of
   latency. Both flip-flops reset to 1, the idle level, so leaving reset does
   not look like a falling edge.
2. **Find the falling edge.** `edge_detector` keeps the synchronized clock from
   the previous cycle. It compares that with the current value: old 1 and new
   0 means a falling edge, and `edge_found` is high for that one cycle.
3. **Shift in the bits.** On every `edge_found`, `convert_scancode` shifts the
   synchronized data bit into bit 9 of a 10-bit register that shifts right.
   After 11 shifts:
   - the start bit has passed through the whole register and dropped out;
   - bits [7:0] hold the data byte in the right order;
   - bit 8 holds the parity bit and bit 9 the stop bit.

   A counter runs 0..10 and wraps. On the wrap, `valid_scan_code` is raised
   for one cycle, in the same cycle the complete byte first shows on
   `scan_code_out`.

The parity and stop bits are stored but not checked. Nothing realigns the bit
counter if a frame is cut short, for example by a glitch on the clock line;
only reset does.

The bargraph output `sc` is wired straight to bits [7:0] of the shift register.
It therefore shows the last complete byte between frames and ripples while a
frame is being shifted in, far too fast for the eye to see. LEDs are lit by a 1.

## Scan code sequences and the controller

This is the part that needs the most care. The keyboard sends scan code set 2.
In that set a byte is not always a key press:

| event                          | bytes sent                         |
|--------------------------------|------------------------------------|
| key pressed (or held: repeats) | `mk`                               |
| key released                   | `F0 mk`                            |
| extended key pressed           | `E0 mk`                            |
| extended key released          | `E0 F0 mk`                         |
| Pause pressed (no release)     | `E1 14 77 E1 F0 14 F0 77`          |

Extended keys are cursor keys, Insert, Delete, Home, End, Page Up and Page
Down.

`keyboard_ctrl` follows these sequences with a state machine. It acts once per
`valid_code` pulse:

| state       | byte received | action                                | next state  |
|-------------|---------------|---------------------------------------|-------------|
| `MAKE`      | `F0`          | —                                     | `BREAK`     |
| `MAKE`      | `E0`          | —                                     | `EXT`       |
| `MAKE`      | `E1`          | push marker `E1`, load skip counter   | `PAUSE`     |
| `MAKE`      | other         | push the byte                         | `MAKE`      |
| `BREAK`     | any           | drop (key released)                   | `MAKE`      |
| `EXT`       | `F0`          | —                                     | `EXT_BREAK` |
| `EXT`       | other         | push marker `E0`                      | `MAKE`      |
| `EXT_BREAK` | any           | drop                                  | `MAKE`      |
| `PAUSE`     | any           | drop; after `PAUSE_SKIP` bytes        | `MAKE`      |

**Pushing into the buffer.** A push moves the four-entry display buffer one
place to the left. The oldest entry falls out, and the new code goes into
slot 0, the rightmost position. Each slot also has an occupied flag. All four
flags are cleared by reset, and that is what keeps the display dark until keys
arrive.

**Extended keys and Pause.** These are stored as the marker bytes `E0` and
`E1`. Neither marker is a digit's code, so both show as `E`.

**Held keys.** A key that is held down sends its make code again and again, and
every repeat counts as a new press. Holding `7` therefore fills the display
with sevens.

## Digit codes and the display

`convert_to_binary` maps the make codes of the main-row digit keys to values
0–9:

| key  | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  |
|------|----|----|----|----|----|----|----|----|----|----|
| code | 45 | 16 | 1E | 26 | 25 | 2E | 36 | 3D | 3E | 46 |

Every other code becomes `4'hE`, shown as `E`. An empty slot becomes
`4'hF`, which is dark. Keypad digits have different codes, so they show as `E`.

**Why the display is multiplexed.** The four digits are common-anode and share
seven cathode lines, so only one digit can be driven at a time.
`binary_to_sg` has a free-running counter of `REFRESH_BITS` bits. Its top two
bits pick the position to drive. For that position the driver:

- pulls its `seg_en` bit low;
- puts the digit's pattern on `num`, where a lit segment is 0.

All other enables stay high. A dark position keeps its enable high as well.
The outputs are registered.

With the default `REFRESH_BITS = 18` and a 100 MHz clock, each digit is lit
for 655 µs and the whole display refreshes at about 380 Hz.

Pin encoding:

- `num[0]` is segment a, `num[1]` is b, and so on up to `num[6]` = g. All
  active low. There is no decimal point output.
- `seg_en[0]` (AN0) is the rightmost digit and `seg_en[3]` (AN3) the leftmost.
  All active low.

If a board wires the segments in another order, only the pattern table in
`binary_to_sg` and the pin constraints need to change.

## Timing

- **Latency to the buffer.** A key press reaches the display buffer 4 system
  clock cycles after the last falling keyboard-clock edge of its frame: two
  synchronizer stages, the final shift, and the buffer update.
- **Latency to the pins.** The driver's output register adds one more cycle.
  The digit is then lit the next time the refresh counter selects its
  position.
- **Throughput.** The keyboard sends at most one bit per 33 µs. That is
  thousands of system clock cycles per bit, so the receiver never has to
  apply back-pressure.

## Reset

`rst` is active high (push button sw0 on the board) and synchronous. It:

- empties the display buffer, so all digits go dark;
- puts the controller back in `MAKE`;
- clears the receive register and the bit counter;
- sets the synchronizer and edge-detector flip-flops to the idle level 1.

## Parameters

| parameter      | where                          | default | meaning |
|----------------|--------------------------------|---------|---------|
| `REFRESH_BITS` | `keyboard_top`, `binary_to_sg` | 18      | width of the refresh counter; each digit is lit for 2^(REFRESH_BITS−2) cycles |
| `PAUSE_SKIP`   | `keyboard_ctrl`                | 7       | bytes dropped after `E1` |
| `NUM_DIGITS`   | `kb_pkg`                       | 4       | display positions; the driver's 2-bit select assumes 4 |
| `FRAME_BITS`   | `kb_pkg`                       | 11      | bits per PS/2 frame |

## What is specified and what is chosen here

These parts follow the lab description the design implements:

- the block partition and port names;
- the two-flip-flop synchronizer;
- falling-edge detection by delay and compare;
- the right-shifting 10-bit register with a mod-11 counter;
- the display behaviour: shift in from the right, `E` for other keys, dark
  after reset;
- active-low segments and enables, and a time-multiplexed display.

These are choices made in this design:

- synchronous reset, and reset values at the idle level;
- the state machine's states;
- showing extended keys and Pause as a single `E`. The 8-byte length of the
  Pause sequence comes from scan code set 2 itself;
- the digit encoding, with `4'hE` for error and `4'hF` for dark;
- one `convert_to_binary` per display position;
- the refresh period, which assumes a 100 MHz clock;
- which segment each `num` bit drives and which side AN0 is on;
- turning off the enable of dark digits;
- wiring `sc` straight from the shift register.

Not implemented:

- checking the parity and stop bits, and recovering from a broken frame
  (except by reset);
- the host-to-keyboard direction of the PS/2 protocol (commands such as LED
  control);
- the decimal points.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_sync_keyboard`     | reset value; random inputs appear exactly two cycles later |
| `tb_edge_detector`     | pulse exactly on 1→0 steps of a random waveform; pulse count |
| `tb_convert_scancode`  | 300 random frames with random gaps; valid only in the cycle after the 11th bit; byte value |
| `tb_keyboard_ctrl`     | "123456", then 600 random make / break / extended / Pause / repeat sequences, compared after every byte with a reference that re-parses the whole byte history |
| `tb_convert_to_binary` | all 256 codes, occupied and empty |
| `tb_binary_to_sg`      | with `REFRESH_BITS = 6`: one enable at a time, correct position for each quarter period, segment patterns from an independent letter table, dark positions never enabled |
| `tb_keyboard_top`      | end to end at the default parameters (see below) |

**The end-to-end test.** `tb_keyboard_top` drives the top level through
`ps2_keyboard_model`, a behavioural PS/2 sender at 20 kHz with data skew. The
system clock is 100 MHz. The test:

- decodes the display from the `num` and `seg_en` pins over full refresh
  periods;
- runs the "123456" sequence above, then a letter key, an extended key, a
  held key, Pause and a second reset;
- checks `sc` after every frame;
- checks the 4-cycle buffer latency;
- requires every mechanism to occur at least once: blanking, shifting, a digit
  falling off the left, dropped breaks, error key, extended make and break,
  auto-repeat, and Pause.

It runs in a few seconds with Verilator.

Two assertions are built into the RTL:

- `valid_scan_code` is a single-cycle pulse;
- at most one digit enable is low at a time.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/kb_pkg.sv \
    tb/tb_keyboard_top.sv --top-module tb_keyboard_top -o sim
./obj_dir/sim
```

Replace `tb_keyboard_top` with any other testbench name to run that one. The
package file must come first on the command line; the other modules are found
through `-y`. For a board, synthesize `rtl/` with `keyboard_top` as the top and
add the pin constraints of the board.
