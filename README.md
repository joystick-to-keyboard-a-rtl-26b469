# Joystick to PS/2 keyboard: the FPGA sender

Many games take only keyboard input, yet an analog stick would suit them
better. This system turns an analog joystick into *pulse-width-modulated key
presses*. A key is held for a share of a fixed period, and that share follows
how far the stick is pushed. The PC sees an ordinary PS/2 keyboard. A real
keyboard stays connected to the same two PS/2 lines and keeps working.

The work is split in two:

* A **microcontroller** samples the two axis voltages and the two buttons. It
  decides which keys to press and for how long, and hands the FPGA one
  scancode byte at a time on an 8-bit port, with an `enable` strobe.
* The **FPGA** (this RTL) is a PS/2 device transmitter. It puts each byte on
  the PS/2 clock and data lines as an 11-bit frame. It also watches those
  shared lines, so that it stays off them while the PC or the keyboard is
  using them.

The RTL here is the FPGA part. The microcontroller, the joystick and the
analog button circuits are not logic of this design. A behavioural model of
the microcontroller's key algorithm (`tb/pic_model.sv`) drives the
end-to-end testbench.

## What arrives on the byte port

The byte source runs a loop. Each pass covers two axes, and each axis takes
seven 16 ms slots:

* Bit 7 of the 8-bit Y reading chooses *up* (set) or *down* (clear). For
  *down* the reading is inverted first. Bits 6..4 then give a magnitude N
  from 0 to 7. The X axis works the same way: bit 7 set means *left*, clear
  means *right*.
* If N is not zero, the key's make code is sent N times, one per slot. Then
  the break prefix and the key code are sent, which releases the key. The
  remaining 7-N slots pass with the key up. So the key is held for N/7 of the
  period.
* After each axis, the buttons are tested. A pressed button sends its code. A
  button released since the last test sends break prefix and code.
* Every send puts the byte on the port, pulses `enable` for one instruction
  cycle, and then waits 2 ms. The source never reads the FPGA's `good`
  (busy) output. It relies on the 2 ms being long enough.

The sender shifts each byte out **MSB first**, but PS/2 sends LSB first. So
the byte source supplies bit-reversed scancodes, and `joykey_pkg` lists them:

| key            | set-2 scancode | byte on the port |
|----------------|----------------|------------------|
| keypad 8 (up)  | 75             | AE               |
| keypad 2 (down)| 72             | 4E               |
| keypad 4 (left)| 6B             | D6               |
| keypad 6 (right)| 74            | 2E               |
| z (button 1)   | 1A             | 58               |
| x (button 2)   | 22             | 44               |
| break prefix   | F0             | 0F               |

Keypad keys are used instead of the arrow keys. Arrow keys need an extra
prefix byte, which would lengthen every press.

## The PS/2 frame and its clock

All timing is counted in system-clock cycles. The design assumes a **2 MHz**
clock. At that rate, the 162-cycle bit period below is 81 us, close to the
80 us that PS/2 allows at its slowest.

```
load  |
sclk  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______ ...
        80 cycles        82 cycles          80            (period 162)
count  0 ...................... 1 ..................... 2
data   1 (idle)     | start 0                       | holdy[7]
line clock   ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________...  (sclk + DELAY_STAGES + 1)
```

* `clocker` restarts its `counter880` divider when a frame is accepted. The
  divider counts 8'h30 to 8'hD1, which is 162 states. The bit clock `sclk` is
  the inverse of the divider's bit 7. It starts high, is high for 80 cycles
  and low for 82.
* `counter4` advances on every rising edge of `sclk`. During bit period k it
  holds k: 0 is the start bit, 1..8 are data, 9 is parity, 10 is stop.
* `packeter` sets the data bit on every falling edge of `sclk`. The order is
  start 0, then `holdy[7]` down to `holdy[0]`, then odd parity, then stop 1.
* The host samples data on the falling edge of the **line** clock, so that
  edge must come after the data has changed. The line clock is `sclk` passed
  through `delay` (DELAY_STAGES = 5 registers) and the pad register. The data
  change reaches the pad 4 cycles before the line clock falls. That is 2 us
  at 2 MHz.
* The frame ends when the count passes 10, at the 11th rising edge of `sclk`.
  `good` then falls, and the pads go back to inputs. From the accepting
  clock edge to the fall of `good` takes 1786 cycles (11 x 162 plus 4
  cycles of pipeline), about 0.9 ms, well inside the source's 2 ms spacing.

## Sharing the bus

The lines are open-collector. The host, the keyboard and this sender can each
pull them low. The sender must not start a frame while another party is
using the lines, and it must give up a frame when the host takes the lines
back. This is the least obvious part of the design. Four pieces do it.

**Busy flag (`compin`, output `line_busy`).** The host pulls the clock low
before it sends or when it wants to inhibit devices. The keyboard pulls it
low on every bit it sends. So a low clock line while the sender is idle means
someone else owns the bus, and it sets the flag. While the flag is set,
`gooder` accepts no byte. A byte offered then is **dropped, not queued**, as
in the original system.

**Timeout (`stopclock`).** Once the flag is set, `stopclock` counts
STOP_TICKS = 15 periods of its own 162-cycle divider. That is 2430 cycles,
or 1.2 ms, longer than a whole 11-bit frame at the slowest PS/2 clock. At the
end of the count the flag clears, unless the clock line is low in that very
cycle; in that case the count simply starts again.

**Suppressed clock (`feedback`).** The host may take the bus in the middle of
a frame by holding the clock low. The sender releases the clock high at each
rising edge. One delay chain later (a second `delay`, 5 more cycles) it reads
the synchronised clock line back. If the line is still low, the host is
holding it. `feedback` pulses `lower`. That sets the busy flag, and the flag
ends the frame at once. The byte is lost: no resend is built, so the source's
next byte is simply the next one. One low sample decides.

**Hold-off after a frame.** The line clock lags `sclk` by the delay chain, the
pad register and the input synchroniser. When `good` falls, the sender's own
last low clock is therefore still visible on the synchronised input for a
few cycles. Without care, that would set the busy flag and block the next
byte for 1.2 ms. That is longer than the gap before the next byte arrives,
so bytes would be dropped. `joykey_main` keeps treating the bus as its own for
DELAY_STAGES+3 cycles after `good` falls. The end-to-end bench fails without
this.

## Modules

| module | role |
|---|---|
| `joykey_main` | top: synchronisers, the blocks below, pad registers, hold-off |
| `gooder` | accepts a byte on the rising edge of the strobe when idle and not busy; ends the frame after bit 10 or when the lines become busy |
| `holder` | 8-bit register for the byte, loaded on acceptance |
| `clocker` | bit clock `sclk` with rise/fall pulses; uses `counter880` |
| `counter880` | 8'h30..8'hD1 divider (162 cycles), restartable |
| `delay` | STAGES-deep shift register for the clock; two copies in series |
| `counter4` | bit counter 0..10 (saturates at 15) |
| `packeter` | picks start / data / parity / stop bit per count |
| `feedback` | reads the clock line back after each release |
| `compin` | busy flag |
| `stopclock` | busy timeout; uses `counter880` |
| `sync2` | two-flop synchroniser (strobe and clock pin) |
| `joykey_pkg` | frame constants, bit-reversed scancodes, `bitrev8` |

Everything runs on the one system clock with an asynchronous active-high
reset. The slow clock is never used as a clock; its edges are one-cycle
enable pulses.

### `joykey_main` ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | system clock (2 MHz assumed), async reset, active high |
| `enable` | in | 1 | strobe from the byte source; a rising edge offers `picin` |
| `picin` | in | 8 | byte to send (bit-reversed scancode) |
| `good` | out | 1 | frame in progress (busy) |
| `ps2_clk_i`, `ps2_data_i` | in | 1 | PS/2 pins as read |
| `ps2_clk_o`, `ps2_data_o` | out | 1 | values to drive while `ps2_oe` |
| `ps2_oe` | out | 1 | drive enable for both lines (equals `good`) |
| `line_busy` | out | 1 | the lines are in use by the host or keyboard |

The tri-state pads sit outside the module. On an FPGA they look like this:

```systemverilog
assign PS2_CLK  = ps2_oe ? ps2_clk_o  : 1'bz;   // pull-ups on the board
assign PS2_DATA = ps2_oe ? ps2_data_o : 1'bz;
assign ps2_clk_i  = PS2_CLK;
assign ps2_data_i = PS2_DATA;
```

While it sends, the sender drives both levels, as the original did. It does
not drive low only. `ps2_data_i` is read by nothing: the original
keyboard-sense block was tied off and is not built, and keyboard traffic is
seen through the clock line.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `CNT_FIRST`, `CNT_LAST` | 8'h30, 8'hD1 | divider range; period = LAST-FIRST+1 = 162 cycles |
| `DELAY_STAGES` | 5 | delay from bit clock to line clock, and from line clock to read-back |
| `STOP_TICKS` | 15 | busy timeout in divider periods (1..16) |

For a different system clock, scale the divider so that one period is about
80 us, and DELAY_STAGES so that the data leads the clock by 5 to 25 us.

## Where this departs from the original design, and how far to trust it

The original FPGA logic clocked several blocks from derived signals (the slow
clock and `good`). This version is fully synchronous and keeps the same
block split and the same numbers. Deliberate differences:

* **System clock.** The original gives no clock rate. 2 MHz is assumed,
  chosen so that the 162-state divider gives the stated ~80 us.
* **Busy timeout.** The timeout counts divider periods, so it lasts 1.2 ms,
  longer than a frame, as the design intends. A literal count of system
  clocks would last only 7.5 us.
* **Frame start.** The divider restarts at each frame, so the first bit
  period is whole.
* **Busy strobe.** A strobe during a running frame is ignored. It does not
  restart the frame.
* **Hold-off.** The hold-off after a frame (see above) is added.
* **Synchronisers.** Asynchronous inputs pass through two flip-flops.
* **Reset values.** The byte register resets to all ones, and the delay
  chains reset to the idle-high clock level.
* **Data-to-clock spacing.** The default DELAY_STAGES = 5 gives the data
  2 us of lead before the clock falls at 2 MHz. PS/2 hosts expect the clock
  to fall 5-25 us after the data changes. Raise `DELAY_STAGES` (to 10 or more at 2 MHz) if a
  host is strict about it.
* **No resend.** Dropped and aborted bytes are not resent. A lost break code
  can therefore leave the PC thinking a key is still down. Resending would
  also need the source to watch `good`.

The testbenches check cycle-exact timing against independent models. The
whole chain was simulated with a model host and keyboard, not on hardware.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The end-to-end bench is
`tb/tb_joykey_main.sv`. It runs the top at its default parameters for about
0.5 s of simulated time (a second or so of wall time). Its phases:

1. It sends every code and random bytes. It checks the scancodes the host
   receives, the 162-cycle clock period, the frame length and the
   data-before-clock spacing.
2. The host inhibits the idle bus. A strobe must be dropped, the busy flag
   must time out, and the next byte must go through.
3. The host holds the clock low in mid-frame. The frame must abort, and the
   host must get no byte from it.
4. A keyboard frame is put on the shared lines. The host must get it, and a
   strobe during it must be dropped.
5. A strobe arrives during a frame and must be ignored.
6. Two loops of the microcontroller model run. The bench checks the exact
   make/break sequence and the key hold times (7 x 18 ms and 5 x 18 ms).

Each mechanism is counted, and a mechanism that never happened is a failure.

`tb/tb_pwm_sweep.sv` is the joystick workload. It runs 16 loops of the
microcontroller model: every magnitude from 0 to 7, in all four directions,
with the buttons pressed and released. That is 220 bytes. The bench works out
the expected scancode sequence itself and compares every received byte. It
also times all 28 key presses, each of which must last N x 18 ms. It
simulates 4 s and takes a few seconds of wall time.

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/joykey_pkg.sv tb/tb_joykey_main.sv --top-module tb_joykey_main -o sim
./obj_dir/sim
```

A unit bench is built the same way, with its own file and top name, for
example `tb/tb_stopclock.sv` with `--top-module tb_stopclock`.
