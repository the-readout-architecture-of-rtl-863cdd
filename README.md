# Pixel detector module readout: FE chips and Module Controller

This is the digital readout of one pixel detector module, written as synthesizable
SystemVerilog. A module is a silicon sensor of 46,080 pixels that is bump-bonded to
16 front-end (FE) chips. Each FE chip serves 18 column pairs of 160 pixels. A
Module Controller Chip (MCC) sits on top of the module and connects to the outside
world over three serial lines:

- one 40 MHz clock;
- one command line coming in from the off-detector Read Out Driver (ROD);
- one or two data lines going out.

The hard part is timing. A pixel hit is only worth keeping if a first-level
trigger (Lev1) selects its bunch crossing, and that trigger arrives a fixed
*latency* later: up to 255 clocks of 25 ns. Each FE chip therefore holds every hit
with its time stamp until the latency has expired. It forwards the hit only if a
trigger arrives at exactly that moment. The MCC receives 16 such data streams in
parallel and rebuilds one module event from them per trigger. It sends the events
out in trigger order, at 40, 80 or 160 Mbit/s. Data flows as a *push*: nobody asks
for data. Every trigger starts readout in all chips at once, and up to 16 events
can be in flight.

```
 ROD ──dci──► MCC ──lv1/bcr/ecr/cal (common)──► FE 0 … FE 15 ──dout (one per chip)──► MCC ──dto_r/dto_f──► ROD
              │  └──cck/dci/ld (common, 5 MHz)──►                                         │
              └───────────── command decoder, trigger control, 16 FIFOs, scoreboard, event builder
```

The top level is `pixel_module` (`rtl/pixel_module.sv`). It contains one `mcc` and
16 `fe_chip` instances in a star, with chip *f* at geographical address *f*. The
analog front end is not modelled. The top takes the discriminator output of every
pixel as an input, `disc[(f*18 + c)*160 + p]`. The optical links are not modelled
either: the clock and command line arrive as plain logic signals.

## Time stamps and hit lifetime in the FE chip

`gray_timestamp` runs an 8-bit counter at 40 MHz. It distributes the counter in
Gray code, so that a pixel that latches it in the middle of a change still gets one
of two neighbouring values. The BCID-reset command (BCR) clears the counter. The
binary value is also the chip's bunch-crossing ID (BCID).

`fe_column_pair` holds the digital part of 160 pixels:

- On a rising discriminator edge, a pixel stores the leading-edge time stamp.
- On the falling edge, it stores the trailing edge and raises a request.
- A pixel that still holds a hit ignores new edges.
- A shared column bus moves one hit every second clock (20 MHz) to the End of
  Column. The lowest pixel index wins.
- The bus carries the row, the leading edge in binary, and the time over threshold
  (ToT = trailing − leading, modulo 256).
- An OR of the discriminators of the pixels with `hitbus_en` set goes out as the
  Fast OR.

`fe_eoc_buffer` (64 entries per column pair) is where the latency is applied. Every
clock, each occupied entry compares its age (now − leading edge, modulo 256) with
the latency from the Global Register:

- age == latency and Lev1 high: the entry is *tagged* with the 4-bit event number
  and waits for readout.
- age == latency and no Lev1: the entry is freed.
- age above the latency when written (a hit that took too long to arrive): freed at
  once.
- A hit that finds no free entry is dropped, and an overflow flag is set. The flag
  is reported in the next End-of-Event word.

The age check is an equality, so a hit is read out only if the trigger comes in
exactly its bunch crossing. A hit 1 clock early or late is lost, and that is
checked by `tb_fe_eoc_buffer`.

`fe_readout` queues up to 16 triggered events. The queue entry holds the event
number and the BCID. For each event, in order, it scans the column pairs in order
and sends every tagged hit of that event. It then sends one End-of-Event (EoE)
word. A further trigger while 16 events are pending is refused. The chip sends
21-bit words on its 40 Mbit/s data line. Each word starts with a 1 bit, is sent
MSB first, and is followed by at least one 0 bit:

| word | bits 20..0 |
|---|---|
| hit | `row[7:0], column_pair[4:0], tot[7:0]` |
| EoE | `3'b111, eoc_overflow, 5'b0, l1id[3:0], bcid[7:0]` |

An EoE word is marked only by its top three bits. Rows stop at 159, so no hit word
can start with 111.

## FE configuration

The MCC drives three lines shared by all FE chips: CCK (5 MHz), DCI and LD.
`fe_config` samples them with the 40 MHz clock.

- While LD is high, each CCK rising edge shifts DCI into the 20-bit Command Register.
- When LD falls, the command is executed if bit 19 (broadcast) is set, or if bits
  18:15 equal the chip's address.
- With LD low, CCK shifts data into whichever register the last command selected.

Command Register = `{broadcast, address[3:0], spare[9:0], command[4:0]}`:

| command bit | action |
|---|---|
| 0 GRST | global reset: clears the logic and the pixel registers, and loads the Global Register defaults |
| 1 CKGLOB | the following bits go into the 166-bit Global Register shadow |
| 2 WRGLOB | copy the shadow into the Global Register |
| 3 CKPIX | the following bits go into the pixel shift register |

Global Register fields:

| bits | field | default |
|---|---|---|
| `[7:0]` | Lev1 latency | 255 |
| `[8]` | self-trigger enable | 0 |
| `[16:9]` | self-trigger delay | 0 |
| `[34:17]` | column-pair enables | all on |
| `[130:35]` | twelve 8-bit DAC codes, 11 bias plus 1 injection | 0x80 |
| `[165:131]` | spare | |

The DAC codes are outputs for the analog part and do nothing here.

Each pixel has 14 configuration bits: `{fdac[4:0], tdac[4:0], cal_en, hitbus_en,
mask, kill}`.

- `kill` blocks the discriminator.
- `mask` keeps the pixel's hits from being read out.
- `hitbus_en` adds the pixel to the chip's Fast OR (off after reset).
- `cal_en` lets the calibration strobe act as a hit on this pixel.
- The trim DACs are only brought out.

The pixel shift register runs through column pair 0 first, then on to the last.
So in a full load, the first 160×14 bits end up in the last column pair, and the
very first bit lands in `kill` of that column pair's pixel 0.

`fe_self_trigger`: when the self trigger is enabled, a trigger from the MCC only
*arms* the generator. The chip then ignores the MCC trigger. The next rising edge of
the chip's own Fast OR starts a countdown, and an internal Lev1 is produced
`delay + 2` clocks later. This lets a single chip be read out with a radioactive
source.

## MCC command decoder

All control arrives on the single `dci` line. The decoder has no reset: from any
power-up state it returns to idle within 64 clocks of idle input. A GRST command
then resets the rest of the MCC. Commands:

| command | bits, first to last |
|---|---|
| Trigger | `11101` |
| Fast | `10110` + 4-bit field: `0001` BCR, `0010` ECR, `0100` CAL, `1000` SYNC |
| Slow | `10110 1011` + `op[3:0] addr[3:0]` + payload |

The two 5-bit patterns are three bits apart. A single flipped bit in a trigger is
corrected, so the trigger keeps its exact timing, and a single flipped bit in a
header still starts a command.

Slow opcodes:

| op | name | payload |
|---|---|---|
| 0 | WRREG | 16 bits written to register `addr` |
| 1 | RDREG | none; the value comes back on the output as a REGDATA word |
| 2 | RUN | none; enter Run Mode |
| 3 | GRST | none; reset the MCC |
| 4 | FEGRST | none; broadcast GRST to all FE chips |
| 5 | WRFE | `addr[3]` is the LD level, then `len-1` (5 bits), then `len` data bits for the FE lines |
| 6 | WRFIFO | 21-bit word written into receiver FIFO `addr` (self test) |

In Run Mode any slow command is still executed, and it also ends Run Mode.

## MCC trigger control and the Pending Event FIFO

`mcc_trigger_ctrl` forwards each accepted trigger to the enabled FE chips in the
same clock. It records `{l1id, bcid, skipped}` in a 16-entry Pending Event FIFO.
`bcid` comes from a counter that is reset together with the FE counters by BCR, so
that the two agree.

A trigger that arrives while 16 events are pending is dropped and goes to no chip.
The number dropped (up to 31) is stored with the next event that is accepted. That
event's header then tells the ROD how many empty events to insert to stay in step.
The event counter (l1id) advances only for accepted triggers, so the MCC's and the
chips' numbering stay equal.

## MCC receivers, FIFOs and scoreboard

Each FE line has a `mcc_rx` receiver and a `mcc_rx_fifo` of 128 words × 21 bits.

- A hit that would leave fewer than 16 free words is refused. That space is kept
  for EoE words, so an event boundary is never lost.
- The refusal is remembered, and it is OR'ed into bit 17 of the next EoE word
  written.

`mcc_scoreboard` is a 16×16 bit matrix: rows are pending events, columns are chips.
A chip's bit is set when its EoE for that event is written. The oldest event is
ready when every enabled chip's bit is set.

## MCC event builder and output word format

`mcc_event_builder` takes the oldest ready event. It walks the chips in order and
pops each enabled chip's words up to and including its EoE. It checks the EoE's
BCID and l1id against the Pending Event FIFO; the checks are switched by the CSR.
It emits 24-bit words, a 3-bit type followed by a 21-bit payload:

| type | payload |
|---|---|
| 001 HEADER | `skipped[4:0], 4'b0, l1id[3:0], bcid[7:0]` |
| 010 FE flag | `bcid_err, l1_err, overflow, addr_err, 13'b0, fe[3:0]`, one per chip that has hits or errors |
| 011 HIT | the FE hit word, unchanged |
| 100 TRAILER | `5'b0, error_mask[15:0]`, one bit per chip with any error |
| 101 REGDATA | `1'b0, addr[3:0], data[15:0]` |

Compression: a chip with no hits and no errors is left out of the event entirely.
`overflow` covers FE buffer overflow and hits lost in the MCC FIFO. `addr_err`
flags a hit whose column pair is out of range.

## MCC output link

`mcc_output_link` sends each word as a 1 start bit followed by the 24 bits, MSB
first. Each line has a rising-edge bit (`dto_r`) and a falling-edge bit (`dto_f`).
Combining the two into a double-data-rate pad is left to the pad ring. The output
mode is set by CSR bits 1:0:

| mode | rate | lines and edges | clocks per word |
|---|---|---|---|
| 0 | 40 Mbit/s | line 0, rising edge; `dto_f` repeats `dto_r` | 25 |
| 1 | 80 Mbit/s | lines 0 and 1, rising edge | 13 |
| 2 | 80 Mbit/s | line 0, both edges | 13 |
| 3 | 160 Mbit/s | lines 0 and 1, both edges | 7 |

`tb/tb_out_decode.svh` is a reference decoder for all four modes.

## MCC registers

| address | content | default |
|---|---|---|
| 0 CSR | `[1:0]` output mode, `[2]` self test (FE inputs ignored; FIFOs filled by WRFIFO), `[3]` BCID check, `[4]` l1id check | 0x0018 |
| 1 | FE enable mask | 0xFFFF |
| 2 | `[7:0]` calibration strobe length in clocks | |
| 3–7 | general purpose | |

Read-only status at addresses 8–15:

| address | content |
|---|---|
| 8 | dropped triggers |
| 9 | events with errors |
| 10 | FIFOs that lost hits |
| 11 | FIFOs that lost an EoE |
| 12 | `{pending count, FE configuration busy, FE configuration request dropped}` |
| 13–15 | scoreboard row of the oldest event |

`mcc_fe_cfg` sends WRFE strings at 5 MHz (40 MHz / 8). The LD level is held for the
whole string. FEGRST sends the broadcast command word `{1, 0000, 10'b0, 00001}`
with LD high, then drops LD.

## Bringing a module up

The same sequence appears in `tb_pixel_module_full`:

1. At least 64 idle clocks on `dci`.
2. GRST: the MCC is now in a known state.
3. FEGRST: all FE chips are reset.
4. GRST again. This empties the MCC FIFOs of whatever the chips sent before their
   reset.
5. Optionally load the FE Global Registers and pixel registers with WRFE: the
   command word with LD high, then data in strings of up to 32 bits with LD low,
   then the next command word.
6. Set the output mode with WRREG 0.
7. BCR, to align the BCID counters.
8. Triggers.

A trigger sent with its first bit *N* clocks after a hit's first discriminator
clock selects that hit when N = latency − 6. The trigger reaches the FE chips
7 clocks after its first bit.

## Where this design departs from, or adds to, the published architecture

The block structure is the published one: a star of 16 FE chips and an MCC; in the
FE, column-pair buses, 64 EoC buffers, 16 pending events and the 20-bit command /
166-bit global register; in the MCC, a command decoder with three command types
and self-recovery, 8 × 16-bit registers, the Pending Event FIFO, 16 receiver FIFOs
of 128 words, the scoreboard and the event builder, and four output modes. So are
all the sizes.

The following are this design's own choices:

- All bit encodings: commands, data words, register maps, the pixel bit order.
- The column-bus priority.
- The EoE reserve in the MCC FIFOs.
- The form of the dropped-trigger warning: a count in the next header, not a
  separate word.
- Reading "some data compression" as leaving out chips without hits.
- The self-trigger timing.

Not modelled:

- the analog front end, DACs and calibration charge injection (`cal_en` simply
  turns the MCC's CAL strobe into a hit of the strobe's length);
- the optical receiver and laser drivers;
- the off-detector electronics.

There is no radiation hardening.

## Files and simulation

- `rtl/pix_pkg.sv`: shared types, encodings and the Gray-code functions. Compile it
  first.
- `rtl/*.sv`: one module per file.
- `tb/tb_<module>.sv`: a self-checking testbench per module. It prints
  `TB_RESULT checks=… failures=…`.
- `tb/*.svh`: shared tasks for driving the command line and the FE configuration
  lines, and the output decoder.

Example:

```
verilator --binary --timing -Wno-fatal --top-module tb_pixel_module \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/pix_pkg.sv tb/tb_pixel_module.sv
./obj_dir/Vtb_pixel_module
```

Verilator is two-state and starts registers at random values. The testbenches
therefore reset everything they read. Run with `+verilator+rand+reset+2` to check
that.

| testbench | size | what it covers |
|---|---|---|
| `tb_pixel_module` | 2 chips × 2 column pairs × 16 pixels, latency 40 | configuration through the MCC, an event across two chips, calibration injection at 160 Mbit/s, compression, 20 triggers back to back with drops reported, mode switches; counts each mechanism and fails if one never happened (about 10 s) |
| `tb_pixel_module_full` | full size: 16 × 18 × 160 pixels, latency 255 | one event with hits at the edges of the row, column-pair and chip ranges; about 2 minutes including the build on 4 cores |
| `tb_mcc` | 4 chips, 32-word FIFOs | the MCC alone, with FE traffic modelled in the testbench: self test, register readback, FIFO overflow, error flags |
| `tb_fe_chip` | 2 column pairs × 16 pixels | the FE chip alone |

The other testbenches check one block each, including cycle counts where timing is
defined: the 20 MHz column bus, exact-latency tagging, a trigger with one bit
flipped, and frame lengths per output mode.
