# Keyboard calculator with a radix-2 Booth multiplier

This design multiplies two 16-bit signed integers and is meant for an FPGA
board. The operands are typed on a PS/2 keyboard, and the operands and the
32-bit product are shown in decimal on a 16x2 character LCD. The arithmetic
core is a sequential radix-2 Booth multiplier. It handles two's-complement
operands directly: each step looks at two adjacent multiplier bits and adds,
subtracts or skips the multiplicand, then shifts. Around it sit a PS/2 frame
receiver, a key controller that builds the operands, and an LCD controller
that initialises the display and writes numbers to it.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`; the whole
calculator comes to about 390 flip-flops after coarse synthesis. Self-checking
testbenches and behavioural models of the keyboard and the LCD are in `tb/`.
All of them pass in Verilator 5. The design has been verified in simulation
only, not on a board with a real keyboard and display.

## Using the calculator

| keys | effect |
| --- | --- |
| `0`-`9`, `A`-`F` | shift one hexadecimal digit into the entry register (the last four are kept) |
| `*` (keypad `*` or Shift+8) | store the entry in X, show X on LCD line 1 |
| `#` (Shift+3) | store the entry in Y, show Y on LCD line 2 (accepted once X is stored) |
| `=` | multiply X by Y (accepted once Y is stored); the product goes to ANS and LCD line 2 |

Operands are 16-bit two's complement, so `FFFE` means -2. A single digit key
`C` gives the value twelve, which the LCD shows as `12`. Example: `1 1 * 3 3 # =`
computes 0x11 × 0x33 = 17 × 51, so line 1 shows `17` and line 2 ends up showing `867`.
Other keys are ignored. So are key releases, and a frame with a parity or
stop-bit error (the top pulses `frame_err` for the bad frame).

## Block structure

```
calc_top
├── ps2_rx            PS/2 frame receiver: START / DATA / PARITY FSM, bit counter, SIPO shift register
├── key_control       entry, X, Y registers; x_loaded, y_loaded, start flags; display requests
│   └── scan_lut      scan code (+Shift) -> digit 0-F, '*', '#', '=' or nothing
├── booth_multiplier  16x16 signed sequential multiplier
│   ├── booth_controller  control FSM
│   └── booth_datapath    X, Y, Q, counter, result; adder, subtractor, 4-input mux
└── lcd_controller    LCD FSM, X/Y/Z multiplexer, digit shift register
    ├── bin2bcd           signed binary -> sign + 10 BCD digits
    ├── ascii_lut         BCD digit -> ASCII
    └── lcd_delay_counter E-pulse and inter-byte gap timer
```

`calc_pkg` holds the shared key type, the display selector and the LCD command
bytes.

## The Booth multiplier

### Register layout

The datapath works on 33-bit (2N+1) registers:

- **X** starts as `{16'b0, init_x, 1'b0}`: the multiplier in bits 16..1 and an
  extra 0 below it. This extra bit is the "previous bit" that Booth recoding
  compares with. The upper 16 bits are the accumulator.
- **Y** is `{init_y, 16'b0, 1'b0}`: the multiplicand lined up with the
  accumulator field.
- **Q** is the shift register that receives each step's result.
- **result** receives `X[32:1]` at the end.

### One iteration

The two lowest bits of X (X1 X0) choose the operation:

| X1 X0 | Q_IN |
| --- | --- |
| 00, 11 | X (inside a run of equal bits: nothing to add) |
| 01 | X + Y (end of a run of ones: add the multiplicand) |
| 10 | X − Y (start of a run of ones: subtract the multiplicand) |

An adder, a subtractor and a 4-input multiplexer form Q_IN. The controller
then takes three cycles per iteration:

1. **LOAD**: `Shift_enable`+`Load` put Q_IN into Q.
2. **SHIFT**: `Shift_enable`+`Right_shift` shift Q right by one place,
   arithmetically (the sign bit is copied).
3. **NEXT**: `LdX` with `x_sel`=1 copies Q into X, and `incC` counts the iteration.

The operation starts with a **CLEAR** cycle (`Reg_rst`, `clrC`) and an **INIT**
cycle (`LdX`, `LdY` with the initial layouts). After the 16th iteration a
**FINISH** cycle loads `X[32:1]` into the result register (`LdRes`) and pulses `done`.

### Worked example: 17 × 51

This is X at the start of each iteration (33-bit hex). `booth_datapath_tb` checks
every value.

| step | X | X1X0 | op | step | X | X1X0 | op |
| --- | --- | --- | --- | --- | --- | --- | --- |
| 1 | 0_0000_0022 | 10 | sub | 9 | 0_0006_C600 | 00 | – |
| 2 | 1_FFCD_0011 | 01 | add | 10 | 0_0003_6300 | 00 | – |
| 3 | 0_0019_8008 | 00 | – | 11 | 0_0001_B180 | 00 | – |
| 4 | 0_000C_C004 | 00 | – | 12 | 0_0000_D8C0 | 00 | – |
| 5 | 0_0006_6002 | 10 | sub | 13 | 0_0000_6C60 | 00 | – |
| 6 | 1_FFD0_3001 | 01 | add | 14 | 0_0000_3630 | 00 | – |
| 7 | 0_0001_B180 | 00 | – | 15 | 0_0000_1B18 | 00 | – |
| 8 | 0_0000_D8C0 | 00 | – | 16 | 0_0000_0D8C | 00 | – |

After step 16, X = 0_0000_06C6, and `X[32:1]` = 0x0000_0363 = 867.

### Timing and handshake

`start` is taken when the multiplier is idle. `done` is high in the 51st cycle
after the cycle that holds `start` (3N+3 for N = 16). `result` holds the
product from the next cycle until the next start. `busy` is high for those 51
cycles, and a `start` while busy is ignored. The operands are read in the INIT
cycle, so they must be held for two cycles after start. In the calculator they
sit in the X and Y registers.

### Range limit

The 16-bit accumulator field has no guard bit. If the multiplicand `init_y` is
−32768, the first subtraction gives +32768, which does not fit the field, so
the product is wrong for every nonzero multiplier. For example,
(−32768) × (−32768) gives −2^30 instead of +2^30. A multiplier `init_x` of
−32768 is fine. All other operand pairs give the exact
32-bit product; the testbenches check 2000 random pairs plus corner cases.
The fix, if you need it, is a 34-bit X/Y/Q (one more accumulator bit). This
RTL keeps the 33-bit layout described above.

## Keyboard path

**ps2_rx.** A PS/2 keyboard sends 11-bit frames: a start bit 0, eight data
bits LSB first, odd parity and a stop bit 1. Each bit is valid on a falling
keyboard-clock edge. The receiver brings clock and data into the system clock
domain through two-flop synchronisers and detects the falling edge there. A
three-state FSM does the rest:

- **START** waits for an edge with data low.
- **DATA** shifts eight bits into the serial-in parallel-out register.
- **PARITY** takes the parity and stop bits.

A good frame gives `code` with a one-cycle `code_valid`, three cycles after the
11th edge. A bad frame gives `frame_err` instead. `clk` must be many times
faster than the keyboard clock (10–16.7 kHz).

**scan_lut** maps scan-code set 2 make codes to keys:

- digits `45 16 1E 26 25 2E 36 3D 3E 46` are 0–9;
- `1C 32 21 23 24 2B` are A–F;
- `7C` (keypad) is `*`;
- `55` is `=`;
- with Shift held, `26` (3) is `#` and `3E` (8) is `*`.

**key_control** skips break sequences (`F0 xx`) and extended codes (`E0 xx`).
It tracks both Shift keys. It holds the 16-bit entry register and the X and Y
registers. Three one-bit registers enforce the order X, then Y, then `=`:
`x_loaded`, `y_loaded` and the start pulse. It tells the LCD controller what to
show: `disp_x` on `*`, `disp_y` on `#`, and `disp_z` when the multiplier's
`done` arrives.

## LCD path

**lcd_controller** drives an HD44780-compatible 16x2 module in 8-bit mode. Its
states are:

- **IDLE** waits for `lcd_start`. The top raises it once, right after reset.
- **LCDCMD_INIT** sends `01` (clear), `02` (home), `06` (entry mode,
  increment), `0E` (display on, blinking cursor), `38` (8-bit, two lines),
  `80` and `C0`.
- **WAIT** idles until a display request is queued.
- **SEL_IN** points the multiplexer at X, Y or Z. Queued requests are served
  in the order X, Y, Z.
- **CONVERT** waits for `bin2bcd`.
- **LCDCMD_LINE** sends `80` for X, or `C0` for Y and Z.
- **LCD_DISPLAY** sends 16 characters: a `-` if the value is negative, the
  significant digits (most significant first, no leading zeros), then spaces
  that clear whatever was there before.

Commands go out with RS=0 and characters with RS=1. RW is always 0. Each byte
is put on the bus and E rises two cycles later. E stays high for `EN_US`
microseconds (10), then the bus stays quiet for `GAP_US` microseconds (1000).
`lcd_delay_counter` counts both times. One line therefore takes 17 writes,
about 17.2 ms at the defaults. The controller's `ready` output is high when it
is in WAIT with nothing queued.

**bin2bcd** converts a signed 32-bit value into a sign and 10 BCD digits. It
uses the shift-and-add-3 (double-dabble) method, one bit per cycle: `done`
comes 33 cycles after `start`. It also reports the number of significant
digits. X and Y are sign-extended to 32 bits before conversion. **ascii_lut**
maps a digit to `30h + d`.

## Top-level ports (`calc_top`)

| port | dir | width | meaning |
| --- | --- | --- | --- |
| clk, rst | in | 1 | system clock of CLK_HZ; synchronous active-high reset |
| ps2_clk, ps2_data | in | 1 | keyboard lines (only read; the keyboard drives them) |
| lcd_data | out | 8 | LCD D7..D0 |
| lcd_rs, lcd_rw, lcd_en | out | 1 | LCD RS, RW (always 0), E |
| x, y | out | 16 | operand registers |
| ans | out | 32 | product register |
| mult_busy, x_loaded, y_loaded, frame_err, lcd_ready | out | 1 | status, e.g. for LEDs |

Parameters: `CLK_HZ` (default 50 000 000), `EN_US` (10), `GAP_US` (1000). The
multiplier width N = 16 is a parameter of `booth_multiplier` and
`booth_datapath`. The top uses it at 16 because the keyboard and LCD paths are
written for 16-bit operands.

## Departures and choices to be aware of

These points go beyond, or differ from, the original description of the design:

- The 50 MHz clock is an assumption. The LCD timings follow from `CLK_HZ`.
- The PS/2 receiver samples the keyboard clock with the system clock; it does
  not use the keyboard clock as a flip-flop clock. It checks odd parity and the
  stop bit. It has no time-out, so an interrupted frame is completed by the
  bits of the next one; expect one bad or lost key after a glitch.
- Operands are entered as up to four hexadecimal digits. How the keys map to
  `*` and `#` on a standard keyboard is this design's choice.
- Digits go to the LCD most significant first. The digit register holds 10
  digits, which any 32-bit product fits. Negative values get a `-`.
- The LCD controller has a seventh state (CONVERT) for the binary-to-decimal
  conversion.
- The initialisation order sends `38h` after `0Eh`, and every byte, clear and
  home included, gets the same 1000 µs gap. A standard HD44780 needs about
  1.52 ms after clear and home, and about 15 ms after power-up before the
  first command. If a real module misbehaves, raise `GAP_US` (for example to
  2000) and hold `rst` until the supply has settled.
- The multiplicand −32768 is outside the multiplier's range (see above). In
  the calculator this is Y = `8000`; enter it as X instead.
- No start-up or help message is displayed. The LCD stays blank until the
  first operand is stored.

## Simulating

Each block has a self-checking testbench in `tb/<block>_tb.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/calc_pkg.sv tb/calc_top_tb.sv --top-module calc_top_tb
./obj_dir/Vcalc_top_tb
```

Replace `calc_top_tb` with any other testbench name.

| testbench | what it covers |
| --- | --- |
| `booth_datapath_tb` | 17×51 step trace, Q after every load and shift, random pairs |
| `booth_controller_tb` | control word of every cycle, 51-cycle latency, start while busy |
| `booth_multiplier_tb` | 17×51, corner cases, 2000 random signed pairs, latency |
| `ps2_rx_tb` | 300 random frames, parity and stop errors, recovery |
| `scan_lut_tb` | all 256 codes with and without Shift |
| `key_control_tb` | key order, break/extended codes, Shift, display requests |
| `ascii_lut_tb`, `bin2bcd_tb`, `lcd_delay_counter_tb` | exhaustive or random against reference arithmetic |
| `lcd_controller_tb` | init sequence, X/Y/Z layout, negative and long values, queued requests, E timing |
| `calc_top_tb` | three scripted and 20 random calculations typed end to end at scaled timing, with every mechanism counted |
| `calc_top_full_tb` | one calculation (17×51) at the default parameters and real PS/2 and LCD timing |

`calc_top_tb` and `lcd_controller_tb` shorten the LCD timing through the
top's parameters (1 MHz clock, E 3 µs, gap 8 µs). `calc_top_full_tb` uses the
defaults and simulates about 4 million cycles, which takes a few seconds.
`ps2_keyboard_model` and `lcd_model` in `tb/` are behavioural stand-ins for
the keyboard and the display. The LCD model decodes the bus and checks its
timing.
