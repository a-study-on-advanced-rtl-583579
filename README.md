# FPIM digital controller and tile array

This repository holds the digital part of a 261-spin field-programmable Ising
machine (FPIM). The chip is an oscillator-based Ising machine. Its spins are
analog oscillators, and their couplings run through a programmable analog
fabric of switch blocks and connection blocks. The RTL here does not model any
of the analog parts. It covers everything a host needs to use the chip:

- a UART link to a host computer and a small command interpreter;
- about 1.2 million configuration flip-flops spread over 300 tiles, with a way
  to program them and read them back over the one serial link;
- circuits to pick any one oscillator and measure its frequency;
- circuits to capture the phase of all 261 oscillators at one instant and
  send it to the host.

The analog blocks connect to the design as plain ports. Every tile's
configuration register is an output, and every oscillator's output and
phase-detector bit is an input.

## Array organisation

The tiles sit in 30 rows of 10:

```
            col 0      col 1    ...   col 8      col 9
row 29   [north   ] [north   ] ... [north   ] [north-east]   no oscillators
row 28   [osc tile] [osc tile] ... [osc tile] [east      ]
  ...
row 0    [osc tile] [osc tile] ... [osc tile] [east      ]
```

| Tile kind  | Count | Config bits | Oscillator |
|------------|------:|------------:|:----------:|
| oscillator | 29×9  | 4422        | yes        |
| east       | 29    | 1200        | no         |
| north      | 9     | 1200        | no         |
| north-east | 1     | 480         | no         |

This gives 40,998 bits per oscillator row (9×4422 + 1200) and 11,280 bits in
the north row (9×1200 + 480). The array holds 1,200,222 bits in total. Row 29
is the north row. The design has 261 oscillators in 29 rows of 9. One part of
the chip's description calls this "9 rows by 29 columns", but its source
constants and block diagram agree on 29 rows of 9, and this design follows
those.

## Configuration streaming (the central idea)

Giving every configuration register its own address would need a huge
decoder and wide buses across the die. Instead, each row is one long shift
register that runs through its 10 tiles. All rows share a single write wire
(`cfg_write_in`). Each row also has its own shift enable (`row_shift_en[r]`),
which stands for the row's gated clock. To program row `r`, the controller
raises only `row_shift_en[r]` and pushes bits onto the shared wire, one per
clock cycle. The other rows do not move.

The first bit pushed ends up in bit 0 of the east tile, and the last bit
pushed ends up in the top bit of tile 0. Seen as one number,
`{tile0, tile1, …, tile8, east}`, bit `k` of the row is the `k`-th bit the
host sends. Programming is fully streamed. The controller shifts each UART
byte into the row as soon as it arrives, so it needs no row buffer. The host
pads the last byte to a whole byte, and the controller drops those padding
bits.

### Read-back: the ring

Read-back takes the hardest timing argument in the design. Each tile has one
read-back flip-flop next to its configuration chain. When the row's select
(`row_read_sel[r]`) is high and the row shifts, each read stage loads the
stage to its east. The east tile's read stage loads the last bit of the
row's chain. So the read path starts where the write chain ends and runs
back west to the controller through 10 stages. Each tile's read output is
ANDed with `cfg_enable`.

A plain read would empty the row. This design avoids that by closing a ring:
while reading, the controller feeds every bit that leaves on
`cfg_read_out[r]` straight back into `cfg_write_in`. The ring is the row's
chain plus its 10 read stages, so it is `ROW_BITS + 10` bits long. The
controller shifts it exactly `ROW_BITS + 10` times:

- The first 10 bits out are whatever the read stages held before. The
  controller drops them.
- The next `ROW_BITS` bits are the row's contents, least significant first,
  in the same format used for programming.
- After the full count every bit is back where it started, so the row is
  unchanged. A second read returns the same data.

The controller does not buffer the row. It packs bits into bytes and pauses
the ring shift after every 8 bits until the UART transmitter takes the byte.
Because the read path is gated by `cfg_enable`, a read raises the enable
first. As the chip's documentation requires, the enable stays low after the
read, and the host must send "enable" again to turn it back on.

## Oscillator selection, frequency and phase

Each oscillator tile has a 2:1 multiplexer for its oscillator signal and
another for its phase bit:

- select 0 passes the tile's own signal;
- select 1 passes the signal arriving from the tile to its east.

The select bits come from a second shift chain, the mux-select chain. It is
one bit per tile and shared by all 29 oscillator rows. Its output is ANDed
with `mux_sel_enable`. The west end of each row drives `sel_osc_out[r]` and
`sel_phase_out[r]`.

To choose column `c`, the controller shifts 9 bits into the select chain so
that tiles `0..c-1` hold 1 and tile `c` holds 0. Every row then presents
column `c`'s oscillator at its west end, and the controller picks the row.

**Frequency.** `fpim_freq_counter` synchronises the selected oscillator
with two flip-flops and counts its rising edges during exactly `2^g` clock
cycles, where `g` is the granularity field of the command. The result is 20
bits and saturates. The window opens 3 cycles after the select chain settles.
The delay flushes the synchroniser, so an edge from the previous selection
cannot be counted. The oscillator must run below half the clock rate. A
`p`-cycle oscillator returns between `floor(2^g/p)` and `ceil(2^g/p)`.

**Phase.** The `sample_phase` pulse passes two register stages in every
tile, and then each tile captures its phase-detector bit. All 261 bits are
therefore sampled in the same cycle. The controller then walks the select
chain through the 9 columns and collects 29 bits per column. Oscillator
`row*9 + col` goes to reply bit `row*9 + col`, in 33 bytes.

## Host protocol

The link is 8N1 UART, least significant bit first. Multi-byte values are
sent least significant byte first.

After reset the controller runs at 260 clock cycles per bit, which is 19200
baud from a 5 MHz clock. The first two bytes the host sends are the new
cycles-per-bit value (9 bits). The controller echoes both bytes at the old
rate and then switches. The host must wait one old bit period after the
echo's stop bit before it changes its own rate. The host must send this
command even when the rate does not change.

After that, each command's first byte holds the command type in bits [2:0]:

| Code | Command        | Bytes sent | Fields                                           | Reply |
|------|----------------|-----------:|--------------------------------------------------|-------|
| 001  | read frequency | 3          | [7:3] granularity g, [11:8] column, [20:16] row | 3 bytes, count of oscillator cycles in 2^g clocks |
| 010  | read phase     | 1          | —                                                | 33 bytes, one bit per oscillator |
| 100  | enable config  | 1          | [3] 1 = enable, 0 = disable                      | 0x00 |
| 101  | program config | 1 + data   | [7:3] row; then ceil(ROW_BITS/8) data bytes      | 0x00 after the last bit |
| 110  | read config    | 1          | [7:3] row                                        | ceil(ROW_BITS/8) bytes; enable left off |
| 111  | reset          | 1          | —                                                | 0x00; clears every configuration bit |
| 000, 011 | —          | 1          | —                                                | none (ignored) |

`ROW_BITS` is 40,998 (5,125 bytes) for rows 0–28 and 11,280 (1,410 bytes)
for row 29. A row index above 29 has the length of an oscillator row but
reaches no tiles: programming it consumes 5,125 bytes and changes nothing,
and reading it returns 5,125 zero bytes.

## Modules

| File | Module | Role |
|------|--------|------|
| `rtl/fpim_pkg.sv` | `fpim_pkg` | sizes, field positions, command codes |
| `rtl/fpim_top.sv` | `fpim_top` | controller + tile array; analog fabric as ports |
| `rtl/fpim_controller.sv` | `fpim_controller` | UART command sequencer, streaming, selection, phase collection |
| `rtl/uart_rx.sv` | `uart_rx` | receiver, rate set at run time, framing-error detection |
| `rtl/uart_tx.sv` | `uart_tx` | transmitter, rate set at run time |
| `rtl/fpim_freq_counter.sv` | `fpim_freq_counter` | edge counter over a 2^g-cycle window |
| `rtl/fpim_tile.sv` | `fpim_tile` | one tile: config chain, read stage, select stage, muxes, phase capture |
| `rtl/fpim_tile_array.sv` | `fpim_tile_array` | 30×10 tiles and the row wiring |

All parameters default to the full chip. To simulate a smaller array, shrink
`OSC_ROWS`, `OSC_PER_ROW` and the four `CFG_BITS_*` values. Each tile kind
must keep at least one bit.

The tile registers use a synchronous reset (`rst`), driven by the chip reset
and by the reset command. Within a row, the only cross-tile paths are the
two shift chains, the read path and the mux chain. These are short,
tile-to-tile paths. The one long path is the shared `cfg_write_in` and
select-chain input.

## Departures and choices

The chip's documentation gives the command set, codes and field positions,
the reply lengths, the reset baud divisor, the tile sizes and bit counts, the
signal names of the tile interfaces, and the rule that a read leaves the
enable off. This design fills in the rest as follows:

- Byte order and bit order on the line are least significant first.
- The read-back ring restores the row, so reads are non-destructive.
- The per-row gated clocks become shift enables on one clock, written in a
  style a synthesis tool recognises as clock gating.
- Gates that the block diagrams draw without a type are ANDs: the read path
  with `cfg_enable`, and the select stage with `mux_sel_enable`.
- The `sample_phase` path has two register stages before the capture
  register.
- The 3-cycle settling delay before the frequency window is this design's
  own.
- The rate-change echo is sent at the old rate.
- Unknown codes are ignored, and the UART receiver waits out a line break.
- The chip reset also clears the configuration, so a read after power-up
  returns zeros.

## Not included

- **Analog parts of each tile:** the oscillators, capacitor banks, phase
  detectors, switch blocks, connection blocks and oscillator helper. Their
  configuration bits are outputs of `fpim_top`, and their oscillator and
  phase signals are inputs. The meaning of each configuration bit is not
  specified, so no bit is decoded.
- **A 50-spin fully-connected oscillator chip.** A companion design whose
  controller has no specified command set or register map.
- **The bistable-latch Ising machine.** It is an analog circuit.
- **King's-graph embedding.** It is a software algorithm.

## Simulation

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
RTL="rtl/fpim_pkg.sv rtl/uart_rx.sv rtl/uart_tx.sv rtl/fpim_freq_counter.sv \
     rtl/fpim_tile.sv rtl/fpim_tile_array.sv rtl/fpim_controller.sv rtl/fpim_top.sv"
verilator --binary --timing --assert $RTL tb/uart_host.sv tb/tb_fpim_top.sv \
          --top-module tb_fpim_top -Mdir obj_top && ./obj_top/Vtb_fpim_top
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_uart_rx`, `tb_uart_tx` | framing, bit timing, rates, framing errors, handshake |
| `tb_fpim_freq_counter` | count within ±1 of the ideal, exact window length, saturation |
| `tb_fpim_tile` | shifting, read stage gating, mux selection, phase sampling |
| `tb_fpim_tile_array` | small array: per-row programming, ring read-back twice, selection, reset |
| `tb_fpim_controller` | controller and small array driven over the UART by `uart_host` |
| `tb_fpim_top` | a scaled chip run through a complete sequence of host commands; counts each mechanism exercised |
| `tb_fpim_top_full` | the full-size chip, no parameter overrides: rate change, program and read back a 40,998-bit row and the north row, frequency at three oscillators, phase, enable/disable, reset |

`tb/uart_host.sv` is a reusable host model. It has tasks for every command.

`tb_fpim_top_full` elaborates the whole 1.2-million-flip-flop array. Building
it takes a few minutes, and it runs in seconds.
