# 3CU — control card logic for a calorimeter front-end crate

Each crate of the LHCb electromagnetic and hadronic calorimeters holds up to
16 front-end boards (FEBs) and, in its middle slot, one control card, the 3CU.
The card receives a single bidirectional optical link (GBT) from the central
timing and control system. It turns that link into what the FEBs of its crate
need, each over its own point-to-point backplane connection:

* the 40 MHz LHC bunch clock;
* the fast commands of the Timing and Fast Control (TFC) system that the
  calorimeter uses, sent once per 25 ns bunch crossing;
* supervision of the latch-up protection on each FEB. A "delatcher" cuts the
  board's supply when it sees a current surge. The card records each such
  event, and the Experiment Control System (ECS) can also use it to hold a
  board off.

On the card, a GBTX chip recovers the clock and the frames from the optical
link. A GBT-SCA chip gives ECS its slow-control buses. An IGLOO2 flash FPGA
does the processing. This repository holds the FPGA logic in synthesizable
SystemVerilog, a behavioural model of the board's clock distribution, and
self-checking testbenches for every part.

```
 optical link ─ VTRx ─ GBTX ─┬─ 4 clocks ──────► clock_tree ──► 16 FEB clocks
                             │                       │ 40 MHz, 320 MHz
                             │                       ▼
                             ├─ D field (80 b) ─► tfc_decoder ─► tfc_serializer ─► 16 FEB TFC lines
                             │
                             └─ EC field ─► GBT-SCA ─ SPI ─► spi_reg_slave ◄─► ecs_regs ◄─► fault_monitor ◄─► 16 delatcher lines
                                                                              ▲
                                                                   crate Id (8 b, backplane)
```

`ccu3_top` wires these together and has only plain ports. `ccu3_pkg` holds the
frame layout, the TFC word type, the FEB command type and the register map.

## From GBT frame to TFC word

A GBT frame is 120 bits and one frame arrives every bunch crossing. It holds a
4-bit header, 4 slow-control bits (2 for the GBTX's own internal control, IC,
and 2 external-control bits, EC, for the GBT-SCA), 80 user-data bits (D) and 32
bits of forward error correction. That is 4.8 Gb/s on the line and 3.2 Gb/s of
user data. The GBTX checks the header and corrects errors. The FPGA sees only
the D field and a data-valid flag, once per 40 MHz cycle. The package places
the fields MSB first in the order header, IC, EC, D, FEC. Only the testbench's
GBTX model uses that placement.

The TFC word takes the low 48 bits of D. It carries 24 TFC bits, and each of
them occupies **two adjacent positions**. This is the point that is easiest
to get wrong. The odd position names the bit, and the even position just below
it holds a copy:

| D bits  | field                    | to FEB |
|---------|--------------------------|--------|
| 47..24  | BXID[11:0]               | no     |
| 23..22  | reserved                 | no     |
| 21..20  | Synch                    | yes    |
| 19..18  | Snapshot                 | yes    |
| 17..10  | Calibration type[3:0]    | as one bit: type ≠ 0 |
| 9..8    | BX veto                  | ORed with Header only |
| 7..6    | NZS mode                 | no     |
| 5..4    | Header only              | ORed with BX veto |
| 3..2    | FE reset                 | yes    |
| 1..0    | BXID reset               | yes    |

`tfc_decoder` reads the odd copy of each bit into the struct `tfc_t`. From it,
the decoder forms the six bits that the calorimeter FEBs use (`feb_cmd_t`):
BX reset, FE reset, Header-only OR BX veto, Calibration, Snapshot and Synch.
The outputs are registered, so they appear one bunch clock after the data
word. A frame without data-valid gives an all-zero command. BXID, NZS mode and
the calibration type are decoded but not forwarded. In `ccu3_top` they are
left unconnected.

## The FEB TFC line

Each slot has one differential pair for TFC commands. Six command bits per
25 ns do not fit on one pair at 40 Mb/s, so `tfc_serializer` sends an 8-bit
word per crossing at 320 Mb/s:

```
bit:   7      6         5         4             3      2         1      0
      '1'  BX reset  FE reset  HdrOnly|Veto  Calib  Snapshot  Synch  even parity(6..1)
```

The word goes out MSB first. An idle line (before the first load) is low. The
start bit lets a receiver find the word boundary. The FEB also receives the
bunch clock, so it can check the alignment.

Two clocks are involved. `clk_bx` (40 MHz) and `clk_ser` (320 MHz) come from
two GBTX outputs and are phase-aligned. In the bunch domain a flag toggles
every cycle. The serial domain samples that flag through two flops, and each
change loads the shift register. The command register holds its value for the
whole 25 ns, so the transfer is safe with related clocks and needs no phase
counter. The start bit leaves the pad register three `clk_ser` cycles after
the bunch-clock edge that updated the command. The eight bits then follow
back-to-back, and the next word starts right after. All 16 outputs carry the
same bit, and each has its own flop so that it can sit in its own I/O cell.

The line format, the 320 MHz rate and the parity bit are choices of this
design. The crate specifies only a point-to-point differential TFC connection
per slot. A FEB receiver that expects another format only needs a different
`feb_word()` in `ccu3_pkg` and a different `SER_BITS` in `tfc_serializer`. The
serial clock must be exactly `SER_BITS` times the bunch clock.

## Delatcher lines: recording faults and holding boards off

Each FEB's delatcher (a MAX869-type switch) has an open-drain, active-low
fault line that runs to an FPGA pin. The line is low while the delatcher is in
fault, which lasts a few ms after a surge. It is also low while anyone pulls it
down, and a pulled-down line keeps the delatcher's switch open. The same wire
is therefore both a status input and a remote off switch.

`fault_monitor` works on all 16 lines together:

* **Recording.** The lines pass a two-flop synchronizer whose reset value is
  high. A high-to-low change sets the slot's bit in a sticky status register.
  A change between two edges shows in `status_o` after the third rising edge.
  ECS clears bits by writing ones. If a new fault and a clear of the same bit
  fall in the same cycle, the fault wins.
* **Hold-off.** A bit set in the pull-down register enables the slot's
  open-drain driver (`pd_o`, one cycle after the register). The board stays
  off until ECS clears the bit.
* **Masking.** Without masking, the card's own pull-down would look like a
  fault. A slot's falling edges are therefore ignored while its driver is on,
  and for three cycles after release (the pad-to-synchronizer delay). While a
  slot is held off, a real fault on that slot cannot be seen, because the line
  is already low.

## ECS access

ECS reaches the FPGA through the GBT-SCA. This design uses its SPI master (any
of the SCA's buses would do). The link is SPI mode 0 with an active-low chip
select. Each access is one 24-bit transfer, MSB first:

```
bit 23: 1 = read, 0 = write | bits 22..16: address | bits 15..0: data
```

For a read, the slave drives the register's value on MISO from the 8th falling
SCK edge. The master samples it on rising edges 9 to 24. A write is performed
only after all 24 bits have arrived, so a transfer cut short by chip select
writes nothing. The SPI pins are oversampled by the 40 MHz FPGA clock, so SCK
must stay at or below 5 MHz. The SCA's SPI clock divider has to be set to
match.

| addr | name         | access | content |
|------|--------------|--------|---------|
| 0x01 | FAULT_STATUS | R, W1C | sticky fault bit per slot |
| 0x02 | FAULT_LINE   | R      | present line level per slot (1 = released) |
| 0x03 | DELATCH_PD   | R/W    | 1 = hold the slot's board off; 0 after reset |
| 0x04 | CRATE_ID     | R      | 8-bit crate Id read from backplane straps |

All other addresses read as 0 and ignore writes. The map and the SPI framing
are this design's own choices.

## Clock distribution (behavioural model)

`clock_tree` models the buffers, splitters and LVDS drivers. It is not FPGA
logic and it contains delays (`T_BUF_PS`, 800 ps assumed). The card uses four
of the GBTX's eight programmable clock outputs:

| GBTX output | feeds |
|-------------|-------|
| 0 | FEB slots 0–7 |
| 1 | FEB slots 8–15 |
| 2 | FPGA bunch clock |
| 3 | FPGA 320 MHz serial clock |

Each half crate and the FPGA has its own output, so the GBTX can shift their
phases independently. For debugging, `ext_sel_i` replaces the three 40 MHz
sources with `ext_clk_i`. The selector is modelled as a plain multiplexer with
no glitch protection, and the serial clock keeps coming from the GBTX.

## Outside this RTL

The following parts are separate chips or analog parts on the card:

* the GBTX link chip (frame decoding, error correction, clock recovery);
* the VTRx optical transceiver;
* the GBT-SCA;
* the DC/DC converters and supplies;
* the USB debugging mezzanine;
* the connectors;
* the slow-control path to the FEBs: three differential pairs per slot,
  whose protocol is not defined here.

The top brings the GBTX, SCA and backplane signals out as ports. The
testbenches model the GBTX, the SCA's SPI master and the delatcher lines.

## Where this design makes its own choices

Everything in the list below is a choice of this design:

* the position of the TFC word inside D (bit 0);
* Calibration = calibration type ≠ 0;
* the even copy of each TFC bit is ignored;
* the FEB line format, 320 MHz rate and parity;
* the SPI framing and the register map;
* write-one-to-clear status bits and the masking window;
* the assignment of the four GBTX clocks;
* the reset scheme: asynchronous assertion, synchronous release per domain.

These parts follow the crate's definition:

* the frame and TFC field layout;
* the six calorimeter command bits and the Header-only/BX-veto OR;
* 16 slots;
* per-slot point-to-point clock, TFC and delatcher lines;
* fault recording and ECS hold-off through the same line;
* the 8-bit crate Id.

One point departs from the card's description. That description says four
GBTX clocks feed the FEBs, and also that the two half crates and the FPGA can
be phased independently. The model follows the second statement: two outputs
go to the FEBs, and one goes to each FPGA clock.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it exercises |
|-----------|-------------------|
| `tfc_decoder_tb` | every command alone and 2000 random frames, idle frames, one-cycle latency |
| `tfc_serializer_tb` | 500 random words, bit pattern, parity, 16 identical lines, start-bit latency |
| `fault_monitor_tb` | faults at random phases on every slot, clear, set-over-clear, hold-off masking |
| `ecs_regs_tb` | register map, clear pulse, read-only and unmapped addresses, crate Id synchronizer |
| `spi_reg_slave_tb` | SPI reads/writes against a register array, aborted transfer |
| `clock_tree_tb` | routing of each source, buffer delay, external clock |
| `ccu3_top_tb` | whole card at full size: 3000 frames checked on all 16 FEB lines at fixed latency, faults, clears, hold-off, crate Id over SPI, debug clock; counts each mechanism and fails if one never occurs |

The GBTX model (`tb/gbtx_model.sv`) takes whole 120-bit frames and checks
their header (0101 data, 0110 idle). The testbenches run the bunch clock at
24 ns instead of 25 ns, so that the 320 MHz half-period is a whole number of
picoseconds.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/ccu3_pkg.sv tb/ccu3_top_tb.sv --top-module ccu3_top_tb
./obj_dir/Vccu3_top_tb
```

For another block, replace the testbench name. Lint a module with
`verilator --lint-only -Wall -Wno-fatal --timing -y rtl rtl/ccu3_pkg.sv rtl/<module>.sv`.

Lint reports these warnings, and they are expected:

* unused package constants: the frame-layout constants are used only by the
  GBTX model;
* the unused upper D bits and TFC fields;
* `rst_n` used both as an asynchronous reset and as the `disable iff` of the
  SPI write-strobe assertion.

## Size

After generic synthesis, the FPGA part has about 270 flip-flops and no
memories. That is a very small part of an IGLOO2 M2GL060 (56,520 logic
elements).
