# Address Card FPGA: row addressing for a SQUID multiplexer

A time-division SQUID readout reads a sub-array one row at a time. The
Address Card (AC) does the row selection. Each of the 41 rows has a
row-select line, and each line is driven by a 14-bit current DAC. To select
a row, the card drives that row's DAC with the row's *on* current and every
other row's DAC with that row's *off* (nulling) current. Both currents may
differ from row to row. The card cycles through the rows at a fixed rate,
frame after frame. Its frames stay in step with the other cards of the
readout. A Clock Card (CC) synchronises them with a Sync line and controls
the card over a serial command line.

This repository holds the card's FPGA logic as synthesizable SystemVerilog,
with self-checking testbenches for every block and for the whole card.

## Structure

```
cmd_rx ──> uart_rx ──> cmd_handler ──> uart_tx ──> reply_tx
                          │  registers, GO / STOP, sensor request
                          ▼
sync_in ─> sync_edge ─> row_sequencer ──(wanted row)──> dac_ctrl ──> dac_data[11], dac_clk[41]
                                                           ▲
                          row_bias_table (on/off code per row)
ow_in/ow_low <── ow_master (DS18S20 temperature + silicon ID)
bb_* / dev_* <── jtag_bypass (card's link in the backplane JTAG chain)
```

| File | Role |
|---|---|
| `rtl/ac_pkg.sv` | sizes, opcodes, status codes, register map, shared types |
| `rtl/ac_top.sv` | the card's FPGA, wiring of all blocks |
| `rtl/dac_ctrl.sv` | shared-bus DAC write sequencing |
| `rtl/row_sequencer.sv` | row/frame timing, Sync alignment, single-row mode |
| `rtl/row_bias_table.sv` | on and off code of every row |
| `rtl/cmd_handler.sv` | request parsing, checking, execution, replies |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial command and reply lines |
| `rtl/sync_edge.sv` | Sync line synchroniser and edge detector |
| `rtl/ow_master.sv` | 1-Wire reader for the DS18S20 |
| `rtl/jtag_bypass.sv` | JTAG TDI/TDO diversion |

## Driving 41 DACs over shared buses (`dac_ctrl`)

This is the least obvious part of the design. The DACs do not each get a
data bus. Four DACs share one 14-bit bus and each DAC has its own latch
clock. Row `r` therefore sits on bus `r / 4` at position `r % 4`. 41 rows
use 11 buses, and the last bus carries only row 40. A DAC takes the word on
its bus at the rising edge of its clock. It then holds that word, and so
its current, until it is clocked again.

All writes happen in *write slots* of two clocks. A slot puts up to one code
on each bus (SETUP), then raises the chosen DAC's clock on each bus (CLK).
The clocks drop on the next edge, and the next slot's data may be loaded on
that same edge. Data is thus stable for one clock before and one clock after
each latch edge. An assertion checks that no bus ever has two clocks high.

When the wanted row changes from `a` to `b`:

* if `a` and `b` are on different buses, one slot writes `off[a]` on `a`'s
  bus and `on[b]` on `b`'s bus, so de-selection and selection happen on the
  same edge. The new row is on 3 clocks after the request.
* if they share a bus, a first slot writes `off[a]` and a second writes
  `on[b]`. The new row is on 5 clocks after the request, with no row
  selected for one slot in between.
* selecting from "no row", or stopping, needs only one write.

In the default cyclic order, rows 4k→4k+1→4k+2→4k+3 share a bus, so three
changes in four take the two-slot path. The sequencer's dwell should
therefore be comfortably above 5 clocks. After reset, and on every GO, the
controller first writes every row's off code, one slot per bus position
(4 slots, 8 clocks). This clears whatever the DACs held at power-up and
applies newly written off codes. As a result, the first row of a run comes
on 8 clocks later than the sequencer's timing says.

## Frame timing (`row_sequencer`)

In cyclic mode the sequencer selects rows `0 … num_rows-1`, each for `dwell`
clocks. It wraps to row 0 at the end of each frame and stops by itself
after `num_frames` frames (0 means run until STOP). On stopping it
de-selects every row. The settings are latched at GO.

Sync pulses are what keep the frames in step with the other cards. A Sync
whose synchronised pulse falls on the last clock of a frame is on time and
changes nothing. Any other Sync counts a *sync error*, ends the current
frame early (it still counts as a frame) and restarts at row 0. The
sync-error count can be read over the command link, because misaligned
cards are otherwise hard to diagnose. The Sync input passes through a
two-flip-flop synchroniser, so a pulse reaches the sequencer 2 to 3 clocks
after the pin's rising edge.

Single-row mode holds `fix_row` selected until STOP, whatever Sync does. A
row number past the last row selects nothing.

## Command protocol (`cmd_handler`)

The CC is the master. Every request addressed to this card, or broadcast,
gets exactly one reply. Reads return data; everything else returns a short
status string. A garbled request gets an error status so that the CC can
send it again. The byte layout is this design's own:

```
request  A5 CARD OP PARAM DHI DLO CHK          CHK = CARD^OP^PARAM^DHI^DLO
reply    5A CARD OP STATUS CHK                  (write, GO, STOP, errors)
         5A CARD OP STATUS DHI DLO CHK          (successful READ)
```

`CARD` is `CARD_ID` (default 1) or `FF` for all cards. The opcodes are
`01` WRITE, `02` READ, `03` GO and `04` STOP. The status codes are `00` OK,
`01` checksum or framing error, `02` unknown opcode or parameter, and `03`
request cut short. A request is cut short when the line stays idle for
`RX_TIMEOUT` clocks in the middle of it. A garbled request is answered even
when its CARD byte names another card, because that byte may be the
corrupted one. A clean request for another card gets no reply.

| PARAM | Access | Meaning |
|---|---|---|
| `00+r` | R/W | on code of row r (r < 41) |
| `40+r` | R/W | off code of row r |
| `80` | R/W | mode: 0 cycle rows, 1 hold one row |
| `81` | R/W | rows per frame (reset 41) |
| `82` | R/W | dwell, clocks per row (reset 100) |
| `83` | R/W | frames per run, 0 = until STOP (reset 0) |
| `84` | R/W | row held in single-row mode |
| `90` | R | status: [15] running, [14] sensor busy, [13:10] mode, [9] row selected, [7:0] row |
| `91` | R | frames completed in this run |
| `92` | R | sync errors in this run |
| `A0` | R | last temperature word from the sensor |
| `A1`–`A4` | R | sensor ROM code, 16 bits each, low word first (the card's serial number) |
| `A5` | R | backplane slot number, from the `slot_id` pins |
| `A6` | R | firmware version (`FW_VERSION`) |
| `A8` | W | start a sensor read |

The serial lines use 8-N-1 framing at `CLKS_PER_BIT` clocks per bit
(default 8), LSB first. A request is executed on the clock after its last
byte. A request that arrives while the previous reply is still being sent
is dropped.

## Sensor and JTAG

`ow_master` reads the board's DS18S20, which is both its temperature
sensor and its silicon serial number. The read sequence is reset, READ ROM
(64-bit code), reset, SKIP ROM + CONVERT T, then polling until the
conversion ends, then reset, SKIP ROM + READ SCRATCHPAD (two temperature
bytes). The slot timings are those of the sensor's datasheet, in units of
`TICKS_PER_US` clocks (default 50, i.e. a 50 MHz clock). A full read takes
about 11 ms plus the conversion time. If no presence pulse answers a reset,
the read sets `no_device` and stops.

`jtag_bypass` is the card's link in the backplane JTAG chain. TCK and TMS
go to the card's devices in all cases. With `jtag_divert` high, TDI and TDO
pass through the devices. With it low, the chain's TDI loops straight back
to TDO, so the chain stays continuous. On a real backplane the switch that
keeps the chain whole while the card is out cannot sit on the card itself,
and `jtag_divert` comes from the card's presence. The block gives the
switch's logic, so that the chain can be simulated with the card both in
and out.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `NUM_ROWS` | 41 | rows per sub-array, one DAC each |
| `DAC_W` | 14 | DAC resolution, straight binary |
| `DACS_PER_BUS` | 4 | DACs sharing a data bus |
| `CLKS_PER_BIT` | 8 | design choice |
| `CARD_ID` | 1 | design choice (the AC occupies backplane slot 1) |
| `RX_TIMEOUT` | 40·`CLKS_PER_BIT` | design choice |
| `TICKS_PER_US` | 50 | design choice (50 MHz clock) |
| `FW_VERSION` | `0100` | design choice, readable at `A6` |

The first three are the card's real sizes. Everything else, including the
packet format, the slot timing and the Sync rule, is this design's own,
because the card's specification leaves them to other documents. All state
is reset by the active-low asynchronous `rst_n`.

## Departures and limits

* The command protocol here is a stand-in. The real backplane instruction
  set is defined elsewhere, so a real CC will not talk to this card without
  replacing `cmd_handler` and the serial framing.
* The DAC's own setup and hold times and the analog settling are not
  modelled. The slot timing gives one clock of setup and one of hold, so
  check it against the DAC data sheet at the chosen clock.
* Changes of row codes take effect the next time a row is written. A code
  changed for the row that is selected now is not applied until that row
  is selected again, or until the next GO.
* The FPGA's configuration device, the mechanical slot keying, the FPGA
  die-temperature monitor, the reset buttons and the analog bias network
  are not part of this RTL. The card's identity is only readable: the slot
  number comes from four assumed strapping pins, and no other diagnostics
  are provided beyond the status, frame and sync-error registers.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by
itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ac_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ac_pkg.sv tb/tb_ac_top.sv
./obj_dir/Vtb_ac_top
```

Replace `tb_ac_top` with `tb_dac_ctrl`, `tb_row_sequencer`,
`tb_cmd_handler`, `tb_row_bias_table`, `tb_uart_rx`, `tb_uart_tx`,
`tb_ow_master` or `tb_jtag_bypass` to test one block. `tb_ac_top` runs the
whole card at its default parameters. It plays the Clock Card: it programs
all 82 codes, runs two full 41-row frames and checks, from the DAC outputs
alone, the row order and the dwell of every row. It then tests on-time and
off-time Sync, single-row mode, the three error replies, a sensor read and
the identity registers through the command link, and it checks that every one of these mechanisms
occurred. It finishes in about a second. `tb/ad9744_model.sv` and
`tb/ds18s20_model.sv` are simple behavioural models of the DAC and the
sensor, used only by the testbenches.
