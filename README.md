# Porta-AMP: an FPGA core for a portable MP3 player

Porta-AMP is the digital core of a small MP3 player built around one FPGA.
A PC sends a song file over its parallel port. The core stores the file in an
8 MB EDO DRAM SIMM. When the file has arrived, the core streams it out of the
DRAM as a serial bit stream to a MAS3507D MP3 decoder chip. The decoder drives
an audio DAC. A 4x4 keypad and a 16x2 character LCD form the user interface.
The LCD shows what the player is doing: a banner, "Downloading", "Complete",
then the play symbol.

All logic runs on one 25 MHz clock (40 ns) with an asynchronous, active-high
reset. Every time constant in the RTL is a cycle count at 25 MHz.

```
             EPP bytes           16-bit words                 16-bit words        serial, ~1 MHz
  PC ------> ppi ---------> porta_amp_ctrl ---> mem_mgmt_cont ---> dram_int ---> 72-pin EDO SIMM
                                   |        <---                                     
                                   +--------> mp3_decode (clock_divide, shift8bitreg) ---> MAS3507D
                                   +--------> lcd (lcd_rom, lcd_out) ---> 16x2 LCD
  keypad <---> keytop ---> key_data / key_dvalid (brought out)
```

## The data path in one paragraph

The player has a single song slot. After reset the controller asks the
parallel-port block for words. Each word is two EPP bytes, and the first byte
becomes the high byte. Each word is written to the next free DRAM location.
The PC marks the end of the file by pulling nInit low. The controller then
reads the song back from address 0. It hands each word to the MP3 interface
whenever the decoder raises its demand line. The memory manager reports "no
data" after the last stored word, and the player stops. A new end-of-file
pulse plays the song again. Nothing in the path needs a buffer: every block has
a ready/strobe handshake, and a slow neighbour just holds the others off.

## Parallel port: taming a ringing bus (`ppi`, `ppi_dering`)

The PC side is an IEEE 1284 EPP port in its data-write cycle:

1. The PC pulls `ppi_nwrite` low and puts a byte on `ppi_data_in`.
2. It pulls `ppi_ndstrobe` low, but only while `ppi_nwait` is low.
3. The core acknowledges by raising `ppi_nwait`.
4. The PC raises `ppi_ndstrobe`.
5. The core latches the byte and drops `ppi_nwait`.

The difficulty is the cable. The handshake lines ring for a few hundred
nanoseconds after each edge, with full-swing glitches. A plain synchroniser
sees several strobes per cycle. Each handshake line therefore goes through
`ppi_dering`:

- two flip-flops synchronise the line;
- the first change of the synchronised value is accepted at once, as a
  `fall` or `rise` strobe;
- the filter then ignores the line for `SETTLE` cycles (default 8 = 320 ns).

The data byte is not latched at the strobe edge. It is latched `SETTLE`
cycles after the strobe's rising edge, once the data lines have settled as
well.

Flow control uses the acknowledge. The controller pulses `ppi_download` to ask
for a word. A strobe the PC starts while no word is wanted is not acknowledged
until the next request arrives, so the PC waits in its own handshake. After the
second byte, `ppi_ready` rises and the word stays on `ppi_data` until the next
request.

Two exceptions are handled:

- **End of file.** A filtered falling edge of `ppi_ninit` pulses `ppi_dldone`.
- **Timeout.** Suppose the core has acknowledged a byte, and the PC then does
  not finish its strobe within `TIMEOUT` cycles (default 1 ms). The core sets
  `ppi_timeout` and drops the acknowledge. It throws the partial word away and
  waits for the strobe to end. It then receives the word again from its first
  byte. `ppi_timeout` clears at the next request.

### Mode negotiation (`ppi_negotiate`)

Before a peripheral may use EPP, IEEE 1284 lets the PC ask for the mode in a
negotiation. With `NEGOTIATE = 1` the PPI answers it, and EPP write cycles are
acknowledged only after the PC has asked for EPP:

1. The PC puts an extensibility byte on the data lines. It pulls `nDStrobe`
   low while `nAStrobe` stays high.
2. The core answers with the status lines xflag 1, intr 0, davailn 1,
   ackdreq 1.
3. The PC pulses `nWrite` low to hand over the byte, then releases `nWrite`
   and `nDStrobe`.
4. After the settle delay the core takes the byte and drops ackdreq. xflag
   stays high for 0x40 (EPP) and falls for any other byte.
5. At least `NEG_DELAY` cycles later (520 ns, above the 500 ns minimum) intr
   rises and the negotiation is over.

If the byte was 0x40, the port stays in EPP mode until reset. Otherwise it
returns to compatibility mode, and the PC may try again with another byte.

By default `NEGOTIATE = 0`. The port is then in EPP mode from reset, for a
PC whose own driver selects EPP. The status lines stay at their
post-negotiation levels: `ppi_intr`, `ppi_xflag` and `pi_davailn` high,
`ppi_ackdreq` low. A DOS-style driver reads them through the status register
(nAck, Select and nError) and checks them before every byte, together with
nWait low.

## Memory: framed, masked addresses (`mem_mgmt_cont`)

The memory manager hides all addressing from its client. The client sees only
these signals:

| Signal | Meaning |
|---|---|
| `client_en` | one-cycle command strobe |
| `client_rw` | 1 = read, 0 = write |
| `client_ready` | manager can take a command |
| `client_no_data` | read past the end of the song, or no song stored |
| `client_full` | no free word is left |

The manager keeps a write pointer and a read pointer. Each is 22 bits wide and
split into a 12-bit *frame* and a 10-bit *offset*. The frame advances only when
the offset wraps.

Some address lines on the board were unreliable, so some address bits must
never be used. The 22-bit parameter `ADDR_MASK` marks which bits may be used.
Both counters step with a masked increment:

    next = ((x | ~ADDR_MASK) + 1) & ADDR_MASK

A masked-out bit is forced to 1 before the add, so a carry runs straight
through it. It is cleared again afterwards. The pointer therefore counts
densely through every usable address, and no word is wasted.

The default mask is `22'h33_FCFF`. It grounds address bits 8, 9, 18 and 19,
which are SIMM pins A8 and A9 in both the row and the column. That leaves
2^18 words, or 512 KB. Set the mask to all ones for the full 8 MB.

- **Reads.** A read of the last written word sets `client_no_data` on the next
  read. That next read rewinds the read pointer to 0 and makes no DRAM access.
  A read with no song stored behaves the same way.
- **Refresh.** A refresh timer fires every `REFRESH_CYCLES` cycles (default
  250 = 10 µs) and requests a CAS-before-RAS refresh. A client command already
  waiting in the idle state goes first. The refresh follows right after it, so
  the spacing between refreshes stretches by at most one access.

## DRAM cycle (`dram_int`)

The SIMM holds 16 devices in four RAS groups. The interface drives it as a
4M x 16 memory, one word per RAS cycle. The 22-bit word address is split into:

- bank = `addr[21:20]`, which selects one of the four `dram_rasn` lines;
- row = `addr[19:10]`;
- column = `addr[9:0]`.

Row and column take turns on the ten address pins.

Every strobe comes from a register, so the SIMM never sees a glitch. A settle
delay of `DELAY` cycles comes before each strobe edge. A read holds CAS low for
`READ_HOLD` cycles before it samples the data bus. With the defaults (3 and 4),
the client sees these times at 25 MHz, refresh not counted:

| Access | Cycles | Throughput |
|---|---|---|
| write | 23 | 2.17 MB/s |
| read | 27 | 1.85 MB/s |

These match the throughput measured on the prototype, which was 2.12 MB/s
write and 1.8 MB/s read. A refresh is CAS low, then all four RAS low, then
both released.

The data bus is split into `dram_dq_o`, `dram_dq_oe` and `dram_dq_i`. A
tristate pad at the FPGA pin joins them. An assertion checks that the bus is
driven whenever WE# is low.

## MP3 serial stream (`mp3_decode`, `clock_divide`, `shift8bitreg`)

The decoder chip takes its data as bits with a clock of about 1 MHz or less.
The clock is made by `clock_divide`:

- It is a counter that toggles `clk_out` every `HALF_DIV` system cycles.
- With `HALF_DIV = 13`, the clock is 25 MHz / 26 = 961.5 kHz, with a 50 % duty
  cycle.
- It runs only while a word is being sent.
- It gives one-cycle `rise_tick` and `fall_tick` strobes, so the rest of the
  logic stays on the system clock.

`mp3_decode` is a seven-state machine: start, wait, load, then shift and send
for the high byte, then shift and send for the low byte. In the wait state it
raises `mp3_ready`. It takes a word when `mp3_enable` and the decoder's
`mp3_demand` are both high.

Each byte is loaded into `shift8bitreg`. That register shifts left and fills
with 0, and its registered MSB drives `mp3_dataout`. Bits change on the rising
edge of `mp3_chipclk` and are stable at its falling edge, where the decoder
samples them. The bit counter also counts on the falling edge. A 16-bit word
takes about 32 decoder clock periods, which is about 420 system cycles.

## Keypad (`keytop`)

- **Scanning.** The scanner pulls one of the four columns low at a time. Drive
  1 gives `key_column = 0111`, and the zero walks to the right from there.
- **Sampling.** The rows are active low with pull-ups. They are synchronised
  and sampled once per `SAMPLE_CYCLES` (default 25000 = 1 ms), which also
  removes contact bounce.
- **Key code.** A low row r during drive k gives key number `4*r + (k-1)` on
  `key_data`, with a one-cycle `key_dvalid`.
- **Release.** The scanner then holds that column until the key is released.

The key code is brought out to the top's ports. This design has no
menu-driven controller that would act on keys.

## LCD: a double-addressed screen ROM (`lcd`, `lcd_rom`, `lcd_out`)

Every screen is stored as a list of 12-bit ROM words:

| Word | Meaning |
|---|---|
| bit 8 = 0 | LCD command byte in bits 7:0 (clear, set address, ...) |
| bit 8 = 1 | character in bits 7:0 |
| `12'h100` | end of the screen |

A screen is selected through a pointer table at the start of the ROM, which is
the double addressing:

- word 0 holds the address of the LCD initialisation sequence;
- word `m+1` holds the address of screen `m`;
- the screens follow from word 16.

Mode `m` therefore costs one ROM read for the pointer, then one read per byte.
The ROM contents are in `rtl/lcd_rom.hex` (256 x 12 bits). Each screen is its
byte sequence with an end marker appended, and its pointer is its start
address. The mode codes are in `porta_pkg::lcd_mode_e`:

| Code | Screen |
|---|---|
| 0 | banner "PortaAMP" |
| 1 | command menu |
| 2 | source menu |
| 3 | "Waiting for TX" |
| 4 | "Downloading" |
| 5 | "Complete" |
| 6, 7 | song line |
| 8 | play `>` |
| 9 | pause `\|\|` |
| 10 | stop `[]` |
| 11 | "Delete?" |
| 12 | "Deleted" |
| 13 | "Streaming" |

`lcd` works like this:

1. After reset it waits `INIT_CYCLES` (15 ms), as the LCD requires.
2. It writes the initialisation sequence: 0x38, 0x0C, 0x01, 0x06.
3. It raises `lcd_done`.
4. A rising edge of `lcd_mode_chg` captures `lcd_mode`. If the LCD is busy,
   the request waits in a one-entry slot. The sequencer then walks the
   screen's words.

`lcd_out` writes one byte:

1. It puts the byte and register select on the bus.
2. It holds `lcd_nenable` high for `E_CYCLES` (480 ns).
3. It drops the enable; the LCD latches on that falling edge.
4. It waits the execution time: 40 µs, or 2 ms for clear/home (commands 0x01
   to 0x03).

`lcd_register_select` is 1 for characters and `lcd_rw` is always 0.

## Controller (`porta_amp_ctrl`)

The controller is the download-then-play sequencer. It moves words from the
PPI to memory until the end of the file. It then waits until the LCD shows
"Complete", and moves words from memory to the MP3 interface until "no data".
After that it shows the stop symbol and waits for the next end-of-file pulse.

Screen requests go through a small "wanted screen" register. A request is sent
only while `lcd_done` is high, and only the newest wanted screen is kept. A
screen asked for during the LCD's 15 ms start-up is therefore shown once the
LCD is ready, not lost.

## Parameters of the top (`porta_amp`)

| Parameter | Default | Meaning |
|---|---|---|
| `PPI_SETTLE` | 8 | ringing filter hold-off, cycles |
| `PPI_TIMEOUT` | 25000 | EPP strobe timeout, cycles (1 ms) |
| `PPI_NEGOTIATE` | 0 | 1 = IEEE 1284 negotiation before EPP |
| `ADDR_MASK` | `22'h33_FCFF` | usable DRAM address bits (512 KB) |
| `REFRESH_CYCLES` | 250 | refresh period (10 µs) |
| `DRAM_DELAY` | 3 | settle cycles before each strobe |
| `DRAM_READ_HOLD` | 4 | CAS-low cycles before read sampling |
| `MP3_HALF_DIV` | 13 | half period of the decoder clock (961.5 kHz) |
| `KEY_SAMPLE` | 25000 | keypad sample period (1 ms) |
| `LCD_INIT` | 375000 | LCD power-on wait (15 ms) |
| `LCD_E` | 12 | LCD enable pulse (480 ns) |
| `LCD_EXEC` | 1000 | LCD command time (40 µs) |
| `LCD_LONG` | 50000 | LCD clear/home time (2 ms) |

## Where this design departs from the original player, or fills gaps

- **Pin list.** The CD-ROM (ATAPI) interface is left out.
- **Negotiation.** It is off by default, as in the working prototype, whose
  PC driver set EPP mode itself. The compatibility-mode idle levels of the
  status lines are this design's choice. So is keeping EPP mode until reset:
  nInit, the usual way to leave EPP, marks the end of a file here.
- **Pin names.** The DRAM strobes are named `dram_rasn` and `dram_casn`, and
  the decoder's request input `mp3_demand`. The original pin list names them
  `dram_ras`, `dram_cas` and `mp3_done`. The SIMM data bus is split into
  three signals, as described above.
- **Controller.** The full menu controller is not built: play/pause/stop keys,
  song list, delete, and CD or streaming source. Only the download-then-play
  sequence of the working prototype is built.
- **Memory manager.** It holds one song. There is no song table, no track
  selection, no song names and no delete. So the LCD has no
  title-character input, and "Song X" is fixed text.
- **Reads without a song.** A read before any song has been written is
  answered with `client_no_data`. It does not touch the DRAM. The original
  only says that such reads are ignored.
- **Default mask.** `ADDR_MASK` defaults to the 512 KB configuration with four
  address lines grounded, which is what the working prototype used. The
  counters step densely around the grounded bits.
- **LCD register select.** It is 1 for data (characters), matching the ROM's
  character bit. One pin table of the original gives the opposite polarity.
- **LCD mode width.** `lcd_mode` is 5 bits wide, for up to 32 screens. One
  block diagram of the original shows 4 bits.
- **Acknowledge.** The EPP acknowledge (`ppi_nwait`) is generated. The
  original's final build left it out. Here it is also used to hold the PC off
  between words.
- **Byte order.** The first byte of each pair is the high byte of the word, so
  the file reaches the decoder in its original byte order. The original does
  not state the order.
- **Own choices.** The original gives no values or rules for these, so they are
  this design's own:
  - the DRAM delay counts, chosen to reproduce the measured throughput;
  - the refresh-versus-access order;
  - the EPP timeout rule and its 1 ms value;
  - the ringing hold-off of 320 ns;
  - the LCD enable width and which commands get the 2 ms wait;
  - the LCD initialisation bytes;
  - the texts of the icon screens: play, pause, stop, "Deleted" and the song
    line.
- **Clock divider.** It is a plain binary counter. The original used a
  carry-save counter from an earlier lab.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_shift8bitreg` | load, shift, zero fill, load priority |
| `tb_clock_divide` | period and duty at `HALF_DIV` 5 and 13, gating, tick strobes |
| `tb_mp3_decode` | a decoder model rebuilds the words at falling clock edges; bit order; cycles per word |
| `tb_dram_int` | against the SIMM model (`tb/edo_simm_model.sv`): bank/row/column placement, strobe protocol, refresh, 21-cycle write and 25-cycle read |
| `tb_mem_mgmt_cont` | dense masked addressing, frame carry, end of song and rewind, full flag, refresh spacing, client-side throughput |
| `tb_ppi` | a PC model with ringing lines: byte order, no double strobes, hold-off, end of file, timeout and retry |
| `tb_ppi_negotiate` | negotiation: status levels, rejection of a byte other than 0x40, the 500 ns gap, retry, EPP cycles afterwards |
| `tb_keytop` | every key, bounce, one report per press, the column pattern |
| `tb_lcd_out`, `tb_lcd_rom`, `tb_lcd` | enable pulse and wait times, ROM layout, complete screens on a bus model, requests during start-up |
| `tb_porta_amp_ctrl` | sequencing against models of its neighbours |
| `tb_porta_amp` | end to end, all parameters at their defaults |

`tb_porta_amp` runs the whole core with every parameter at its default. A PC
model sends a 600-byte file with ringing on all lines, stalls once in the
middle, and pulls nInit low. The SIMM model stores the data. A decoder model
takes the serial stream and checks it byte for byte against the file. An LCD
model checks the screens. The test counts each mechanism and fails if any of
them never happened:

- ringing filtered;
- PC held off;
- PC timeout;
- DRAM writes, reads and refreshes;
- a refresh that waits for an access to finish;
- a frame carry;
- the no-data end;
- a decoder stall;
- LCD screens;
- key presses.

The PC model also checks the EPP status lines before every byte, as the
driver does. The test simulates about 29 ms of player time.

To simulate with Verilator from the repository root (the ROM is loaded from
`rtl/lcd_rom.hex`):

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -Irtl -Itb -y rtl -y tb +libext+.sv \
      --top-module tb_porta_amp rtl/porta_pkg.sv tb/tb_porta_amp.sv
    ./obj_dir/Vtb_porta_amp +verilator+rand+reset+2

Replace `tb_porta_amp` with any other testbench name to run that test.
`-Wno-fatal` is needed because the testbenches use random delays, which
Verilator reports as possibly zero (ZERODLY). `+verilator+rand+reset+2`
starts every register not reset at a random value, so it shows any state
that the reset misses.
