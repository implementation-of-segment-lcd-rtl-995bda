# Segment_LCD: an AHB display peripheral for an ARM-plus-FPGA SoC

An ARM processor that sits in a hard "stripe" next to an FPGA fabric (the Altera
Excalibur EPXA10, with an ARM922T core) reaches user logic in the fabric through one
AHB master port. This design is the logic on the other side of that port: a small
memory-mapped AHB slave that lets software put numbers on a six-digit seven-segment
display and text on a 2 x 16 character LCD. Software writes a register or a
character; the hardware then keeps the displays refreshed on its own — it scans the
seven-segment digits and streams the character buffer to the LCD controller chip —
so the processor never has to time anything.

```
             AHB (from the stripe's PLD master port)
                  │
           ┌──────▼──────┐   local bus: slave_address[9:2], write, wdata, rdata
           │  ahb_slave  │─────────────┬───────────────────────┐
           └─────────────┘             │                       │
                                ┌──────▼──────┐         ┌──────▼──────┐
                                │  seven_seg  │         │  text_lcd   │
                                │ 6 x bin2seg │         │ 32-char buf │
                                └──────┬──────┘         └──────┬──────┘
                     seg_out1/2, seg_gnd1/2, cnt3     lcd_data, lcd_rs, lcd_rw, lcd_en
```

The top module is `seg_lcd`. The processor, its buses and memories are hard blocks of
the device and are not part of the RTL; the testbenches stand in for the processor
with an AHB bus functional model.

## Register map

Only `HADDR[9:2]` is decoded; `HSEL` selects the peripheral (the system ties it high,
as the peripheral is the only slave on that port). All accesses are 32-bit words.

| byte offset   | word address (`HADDR[9:2]`) | contents                                        |
|---------------|-----------------------------|-------------------------------------------------|
| 0x08, 0x0C    | 2, 3 (`HADDR[9:3] == 1`)    | seven-segment data register, read/write          |
| 0x80 … 0xFC   | 32 … 63 (`HADDR[9:7] == 1`) | LCD character *n* = word address − 32, bits [7:0] |
| anything else | —                           | reads 0, writes ignored                          |

The seven-segment register decode `address[9:3] == 1` is the original design's;
the LCD window is this design's choice. LCD characters 0–15 are the first line,
16–31 the second; the buffer resets to spaces. The seven-segment register resets to 0.

## The AHB slave state machine

`ahb_slave` is the part that needs the most care, because AHB overlaps the address
phase of one transfer with the data phase of the previous one. The machine has the
four states the original schematic names:

| state             | HREADY | HRESP | what happens                                                         |
|-------------------|--------|-------|----------------------------------------------------------------------|
| `ADDRESS_PHASE`   | 1      | OKAY  | idle; a new transfer can be sampled                                  |
| `DATA_PHASE`      | 1      | OKAY* | data phase of an accepted transfer; a new transfer can be sampled too |
| `READ_WAIT_PHASE` | 0      | OKAY  | read wait state: the addressed register is captured into `HRDATA`     |
| `ERROR_PHASE`     | 0      | ERROR | first cycle of the two-cycle ERROR response                           |

\* `DATA_PHASE` answers ERROR when it is the second cycle of an error response.

A transfer is accepted at a rising clock edge where the slave shows HREADY high,
`HSEL` is high and `HTRANS` is NONSEQ or SEQ. Then:

* **Write**: next state `DATA_PHASE`. In that cycle the local `write` strobe is high
  with `wdata = HWDATA`, and the target register loads on the edge that ends the data
  phase. No wait state. Back-to-back and burst writes run at one per clock.
* **Read**: next state `READ_WAIT_PHASE` (one cycle, HREADY low), in which the local
  read multiplexer's output for the latched address is registered into `HRDATA`; then
  `DATA_PHASE` with the data valid. One wait state per read.
* **Illegal transfer** (`HSIZE` not a word, or `HADDR[1:0] != 0`): `ERROR_PHASE`, then
  `DATA_PHASE` with HRESP still ERROR and HREADY high, the two-cycle response AHB
  requires. Nothing is written.

IDLE and BUSY transfers, and transfers with `HSEL` low, get a zero-wait OKAY and do
nothing. `HBURST` is ignored: every beat is handled as a single transfer, which is
legal for a slave. `HRESP` never signals RETRY or SPLIT. Assertions in the module
check the ERROR response shape and that the write strobe only appears in a data phase.

The state names come from the original design; their encoding, the transitions and
the error rules are this design's, chosen to follow the AHB specification.

## Seven-segment display

`seven_seg` holds one 32-bit register. Digit *k* (0 = rightmost, 5 = leftmost) shows
nibble `D[4k+3:4k]` as a hexadecimal glyph, so software that wants a decimal
counter or a clock writes BCD. Each digit has its own registered decoder (`bin2seg`).
The six digits are wired as two groups of three that share segment lines, as the
port list of the original controller suggests:

* `seg_out1[7:0]` / `seg_gnd1[2:0]` drive digits 0–2, `seg_out2` / `seg_gnd2` digits 3–5;
* `cnt3` steps 0, 1, 2 every `SCAN_DIV` clocks; during slot *k* bit *k* of both
  `seg_gnd` buses is low (that digit's common is pulled to ground) and each `seg_out`
  carries the pattern of digit *k* or *k*+3;
* segment bits are `{dp, g, f, e, d, c, b, a}`, 1 = lit; the decimal point stays dark.

With the default `SCAN_DIV = 50_000` at 50 MHz each digit is lit 1 ms out of 3.
A register write shows on `seg_data` one clock later and on the segments at the next
slot of each digit. The nibble mapping, the group split, the polarities and the scan
rate are this design's choices.

## Text LCD controller

`text_lcd` drives an LCD module with the common HD44780-style 8-bit write interface
(`lcd_data`, `lcd_rs`, `lcd_en`; `lcd_rw` is held low, so the busy flag is never read
and fixed delays are used instead). It runs in two phases, the two the original
design names, visible on the `lcd_phase` output:

1. **INIT** — wait `POWERUP_CYC` clocks after reset, then send the commands 0x38
   (8-bit bus, 2 lines), 0x0C (display on), 0x06 (auto-increment), 0x01 (clear).
2. **DATA** — forever: 0x80 (cursor to line 1), characters 0–15, 0xC0 (line 2),
   characters 16–31. A full pass is 34 bytes, so a character written over the bus
   reaches the glass within two passes.

Each byte: `lcd_rs`/`lcd_data` set up one clock, `lcd_en` high for `E_CYC` clocks,
then a pause of `CMD_CYC` clocks (`CLEAR_CYC` after the clear command) with the data
held. Everything in this block beyond its name and its two phases is this design's
choice; the timing defaults are ordinary HD44780 data-sheet figures at 50 MHz.

## Parameters

All are parameters of `seg_lcd` and are passed down.

| parameter     | default   | meaning (at 50 MHz)                     |
|---------------|-----------|-----------------------------------------|
| `SCAN_DIV`    | 50 000    | clocks per seven-segment digit slot (1 ms) |
| `POWERUP_CYC` | 750 000   | LCD power-up wait (15 ms)               |
| `E_CYC`       | 13        | LCD enable pulse width (260 ns)         |
| `CMD_CYC`     | 2 000     | pause after each LCD byte (40 µs)       |
| `CLEAR_CYC`   | 82 000    | pause after the clear command (1.64 ms) |

For a different clock, scale them; none of them is in the original design, which
gives no clock frequency (50 MHz is the board clock of the development kit it used).

## Files

| file                    | contents                                                          |
|-------------------------|-------------------------------------------------------------------|
| `rtl/seg_lcd_pkg.sv`    | AHB encodings, state enums, register-map constants                |
| `rtl/ahb_slave.sv`      | AHB slave state machine                                           |
| `rtl/seven_seg.sv`      | seven-segment register and scanner                                 |
| `rtl/bin2seg.sv`        | registered hex digit to segment decoder                           |
| `rtl/text_lcd.sv`       | LCD character buffer and controller                               |
| `rtl/seg_lcd.sv`        | top level: the three blocks and the read multiplexer              |
| `tb/ahb_if.sv`          | AHB signal bundle with a master bus functional model (tasks)      |
| `tb/tb_ref_pkg.sv`      | independent reference glyphs and expected LCD byte stream         |
| `tb/tb_<block>.sv`      | self-checking testbench for each block                            |
| `tb/tb_seg_lcd.sv`      | end-to-end test with short timing                                 |
| `tb/tb_seg_lcd_full.sv` | end-to-end test at the default 50 MHz timing                      |
| `tb/tb_workloads.sv`    | the display used as a watch and as a decimal counter              |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops; each has a
watchdog. With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_seg_lcd \
    -y rtl -y tb +libext+.sv rtl/seg_lcd_pkg.sv tb/tb_ref_pkg.sv tb/tb_seg_lcd.sv
./obj_dir/Vtb_seg_lcd
```

Replace `tb_seg_lcd` by `tb_ahb_slave`, `tb_seven_seg`, `tb_bin2seg`, `tb_text_lcd`
`tb_seg_lcd_full` or `tb_workloads`. Lint the RTL with
`verilator --lint-only -Wall rtl/seg_lcd_pkg.sv rtl/*.sv --top-module seg_lcd`
(list the package first).

What the tests cover:

* `tb_ahb_slave`: random writes and read-back through a register file, one local
  write per AHB write, zero wait states for writes and exactly one for reads, a
  pipelined two-beat burst, a read immediately followed by a write, the two-cycle
  ERROR response for byte, half-word and unaligned transfers, and IDLE/BUSY/unselected
  transfers doing nothing.
* `tb_seven_seg`: reset value, address decode, enable, and for several values the
  glyph of every digit, the slot order and each slot's length.
* `tb_text_lcd`: the init command sequence, the refresh byte stream against an
  independently computed expectation, enable pulse width, minimum pauses, data
  stability while enabled, buffer read-back.
* `tb_seg_lcd`: the whole peripheral driven over AHB, a BCD counter on the digits
  (rebuilt from the scanned outputs), two lines of text (rebuilt by an LCD model),
  and a count of each mechanism — zero-wait writes, read wait states, ERROR responses,
  pipelined transfers, unmapped accesses, scan wrap-around, LCD initialisation and
  refresh passes — each of which must occur.
* `tb_seg_lcd_full`: the same at the default parameters, about 0.9 million clocks
  (18 ms of device time), checking the 50 000-clock digit slot and the LCD delays.
* `tb_workloads`: a watch counting HH MM SS across midnight, and a counter building
  1, 12, … 123456789 (only the low six digits, 456789, fit the display), each with a
  caption on the LCD.

## How far this follows the original design

Taken from the original design: the split into an AHB slave state machine, a
seven-segment controller and a text LCD controller; the AHB port names; the four
slave state names; the seven-segment controller's ports, its 32-bit register reset
to zero and written when `address[9:3] == 1`, and its per-digit library decoders;
the two LCD controller phases.

This design's own choices: the nibble-per-digit mapping; the slave's transitions, wait states and error rules;
the LCD buffer window and the read multiplexer; the glyph set and segment order; the
digit grouping, polarities and scan rate; the whole inside of the LCD controller
and all timing defaults; the 50 MHz clock. The seven-segment write is additionally
gated by the controller's active-low enable, which the original port list has but
its outline code does not test.

Known limits: a decimal number longer than six digits (for example a nine-digit
counter value) cannot be shown; only its low six BCD digits fit the display. The
LCD size is not known from the original; 2 x 16 is assumed. The processor side (the
program that formats numbers and text) is software and is not included.
