# DDU5 central control in SystemVerilog

In the CMS cathode strip chamber readout, a DDU (detector dependent unit)
board collects the data of up to 15 chamber DAQ motherboards (DMBs). The DMB
data arrive on optical fibres. Input FPGAs deserialise them into four input
FIFOs, each serving four fibres. The central-control FPGA turns them into
one stream of events:

- For each level-1 accept (L1A) it waits for the DMB data to arrive.
- It wraps the data of every FIFO that answered in a fixed DDU header and
  trailer, with a word count and a CRC-16.
- It sends the event to the DCC (data concentrator card).
- It sends a copy over a Gigabit Ethernet spy link.
- It tells the trigger throttling system (FMM) when it is falling behind or
  has lost track.

Everything is set and read over JTAG.

This repository is a synthesizable RTL model of that controller. The top is
`ddu5ctrl`; `ddu5ctrl_pkg` holds the shared constants.

## Building one event

`event_builder` handles a trigger in these steps:

1. **Queue.** At the L1A, the 24-bit L1A number and the 12-bit BX number go
   into a 16-deep L1A queue. This lets triggers arrive while an earlier
   event is still being read.
2. **Start wait.** The builder waits until every enabled input FIFO holds
   data. The wait is at most 128 clocks (3.2 µs at 25 ns), or 288 clocks
   (7.2 µs) when `cal_mode` is high. An enabled FIFO that is still empty
   then is flagged as a start timeout and skipped.
3. **Header.** It writes H1, H2 and H3.
4. **Data.** It reads the FIFOs that have data, lowest first, until each
   one shows a word flagged *last word*. A FIFO that has not produced its
   last word within 38914 clocks (972 µs) is flagged as an end timeout and
   abandoned. That limit is the worst case of four chambers.
5. **Trailer.** It writes T-2, T-1 and TR.

`dcc_stop` (DCC near full) holds the stream before its next word. The end
timer does not count while the stream is held.

| word | bits 63..0 |
|------|-----------|
| H1 | `5` · type `1` · L1A[23:0] · BX[11:0] · source ID[11:0] · FOV `5` · `0` |
| H2 | `8000 0001 8000` · mask of FIFOs read |
| H3 | `0` · DMB_LIVE[14:0] · `0000 0000 0000` |
| data | DMB words as they come from the FIFOs |
| T-2 | `8000 FFFF 8000 8000` |
| T-1 | start-timeout mask · end-timeout mask · mask read · mask enabled (16 bits each) |
| TR | `A` · `0` · word count[23:0] · CRC-16 · status[7:0] · FMM state[3:0] · `0` |

The word count includes all six header and trailer words, so an event with
no data has a word count of 6. The CRC uses the polynomial
x^16+x^15+x^2+1, folding one 64-bit word per clock (bit 63 first, preset
FFFFh). It covers every word of the event, with the CRC field of TR taken
as zero.

Bit 7 of the TR status byte is set when any timeout occurred. The FMM state
in TR is the live value of the `fmm` output. The exact contents of T-1 and of
the status byte are this design's choice.

### Input FIFO bus

The FIFOs share a 36-pin double-data-rate bus (`rdat_pin`). Each 72-bit word
crosses it in one clock:

- bits 35:0 are driven while `clk` is high and captured on the falling edge;
- bits 71:36 are driven while `clk` is low and captured on the rising edge.

This is `ifddr`. Bits 63:0 are data. Bits 71:64 are control:
`{RXER[1:0], FEND[1:0], LW[1:0], NODAT_n[1:0]}`.

The FIFOs are first-word-fall-through. `in_oe` (one-hot) selects which FIFO
drives the bus and `in_ren` pops it. Because of the input register, a word
is taken only after the selected FIFO has been visible for one clock
(`RD_GAP` = 1). That gives one data word per two clocks.

Input FIFO *i* is read if its `in_fok` is high and at least one of fibres
4*i*..4*i*+3 is alive in the kill register.

### Checks on the data

- **Special-word check.** Words flagged FEND (the DMB end words) go through
  `special_word_check`. Bits 12..15 of each 16-bit lane must agree across
  the four lanes. The voted bits (2 of 4) are latched, and a disagreement
  sets `sp_err`.
- **A-T switch.** `a_t_switch` is the 2-of-3 vote of bits 11, 27 and 43.
  It tells an ALCT trailer from a TMB trailer.
- **Receive errors.** A receive error flagged by an input FPGA (RXER) during
  an event is remembered until the event ends.

## FMM status

`fmm_status` drives the four FMM lines:

| bit | meaning | set by | cleared by |
|-----|---------|--------|------------|
| 0 BUSY | not ready | any reset | end of reset |
| 1 WARNING | slow the triggers down | L1A queue within 4 of full | the queue draining |
| 2 LOST SYNC | needs a sync reset | an L1A dropped because the queue was full | sync reset, JTAG reset, hard reset |
| 3 ERROR | needs a hard reset | at the end of an event with an end timeout, a special-word disagreement or a receive error | hard reset |

Which conditions feed which bit is this design's grouping.

## Gigabit Ethernet spy link

The event stream is also written into a 512-word spy FIFO. Words that
arrive while it is full are dropped, and `spy_drop` is set. `gbe_tx` turns
the FIFO into 8b/10b characters, one `{K, byte}` per clock:

| phase | characters |
|-------|-----------|
| reset | sync loop K28.5 D21.5 K28.5 D2.2 (`eth_sync`) |
| idle | K28.5 D16.2 pairs (`eth_idle`); a packet starts after a pair when the FIFO is not empty |
| header | K27.7, six 55h, D5h |
| destination | four FFh |
| data | FIFO words, 8 bytes each, most significant byte first |
| filler | only if fewer than 48 data bytes: a 2-byte count of the real bytes, then FFh up to 64 data bytes |
| packet number | 16-bit, incrementing per packet |
| CRC-32 | IEEE 802.3, over destination through packet number |
| trailer | K29.7 K23.7, then idle |

A packet ends when the FIFO runs out of words or after 7680 data bytes
(`MAX_DATA`). The four FFh bytes, the filler rule and the 64-byte minimum
follow the original design. The start-of-packet and trailer characters and
the preamble bytes are standard Ethernet choices.

`bus_match` pairs the characters into 16-bit words for the transceiver, the
first character in the low byte. The transceiver itself is not part of the
RTL, and neither is its 125 MHz clock: `gbe_tx` runs on the system clock
here.

The link drains one 64-bit word per 8 clocks, while the builder writes one
per 2 clocks. About three quarters of an event therefore piles up in the
spy FIFO:

- events up to about 680 words (3 DMBs with one CFEB each) arrive complete;
- larger events still go to the DCC in full, but their spy copy is cut and
  `spy_drop` is raised.

`tb_workload_wc` shows this for the standard event sizes, 6 to 3066 words.

## JTAG control

The JTAG user chains are modelled as clock-synchronous strobes:

- `jt_sel1` selects the 8-bit instruction chain;
- `jt_sel2` selects the 32-bit data chain;
- `jt_capture`, `jt_shift` and `jt_update` act on the selected chain.

Bits shift in at the top and out of bit 0. A load instruction takes its
value from the top bits of the data chain.

| opcode | function |
|--------|----------|
| 0 | NOOP; re-arms the toggled functions |
| 1 | FPGA reset (toggled); acts like a sync reset |
| 2 | read the 24-bit L1A number |
| 3 / 4 / 5 | read the 32-bit status word / its low half / its high half |
| 7 | read FOK of the active input FIFOs |
| 11 | read the start and end timeout masks |
| 13 / 14 | read / load the 20-bit kill register |
| 25 | read DMB_LIVE |
| 29 / 30 | load / read BX per orbit (12 bits) |
| 31 | toggle the CFEB calibration auto-L1 enable (toggled; enabled after reset) |
| 32 | read the board ID |
| 33 | one L1A, from JTAG only |

A toggled function acts once, when its instruction is loaded. It acts again
only after a NOOP has been loaded in between, which protects against
glitches on the chain. The other opcodes of the original instruction set
exist in the package but read zero.

**Kill register.** A 0 switches a path off and a 1 keeps it alive.

- Bits 14:0 enable the fibres.
- Bit 15 allows bits 16 (ALCT), 17 (TMB) and 18 (CFEB) to disable those
  checks: a check is off only when bit 15 is 1 and its own bit is 0.
- Reset sets all bits to 1.

**BX counter.** It runs 0..3563 by default (LHC) and wraps one clock after
the limit. The limit can be loaded, for example 923 for the SPS test beam.

## Front panel

`fiber_led` drives one FOK and one DAV LED per fibre:

- FOK is lit when the link is present and ready, blinks (2^24 clocks,
  about 0.4 s) when it is present but not ready, and is off when it is
  absent.
- DAV follows the fibre's data-available signal.

## Files

| file | block |
|------|-------|
| `rtl/ddu5ctrl.sv` | top: wiring, JTAG capture mux, spy FIFO, error collection |
| `rtl/event_builder.sv` | event sequencing, L1A queue, header/trailer, timeouts |
| `rtl/crc16_64.sv` | CRC-16, 64 bits per clock |
| `rtl/special_word_check.sv` | lane vote and A-T switch |
| `rtl/fmm_status.sv` | FMM lines |
| `rtl/jtag_decode.sv`, `rtl/jtag_readout.sv` | instruction decode, capture/shift register |
| `rtl/kill_register.sv`, `rtl/bxn_counter.sv`, `rtl/l1a_counter.sv`, `rtl/timeout_counter.sv` | registers and counters |
| `rtl/gbe_tx.sv`, `rtl/crc32_eth.sv`, `rtl/eth_idle.sv`, `rtl/eth_sync.sv`, `rtl/sr_onehot.sv` | spy link |
| `rtl/ifddr.sv`, `rtl/bus_match.sv` | DDR input register, bus matching |
| `rtl/anyorall.sv`, `rtl/vote3.sv`, `rtl/or5p1.sv` | small gates |
| `rtl/fiber_led.sv` | LEDs |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO (L1A queue, spy FIFO) |

Every file opens with a comment on its function, interface and timing. That
comment also says which parts follow the original controller and which are
choices of this model.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ddu5ctrl_pkg.sv tb/tb_ddu5ctrl.sv --top-module tb_ddu5ctrl -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Two testbenches run the whole controller at its default parameters.

**`tb_ddu5ctrl`** (about 9 M clocks, half a minute) runs the controller end
to end:

- It models the four input FIFOs on the DDR bus.
- It compares every event word by word, including the CRC, with an
  independent model.
- It decodes every Ethernet frame, checks its CRC-32 and packet number, and
  checks that the frames carry exactly the words the spy FIFO accepted.
- It makes each mechanism happen and counts it. A mechanism that never
  happened counts as a failure. The mechanisms are:
  - start timeout and calibration start timeout;
  - end timeout at the full 38914 clocks;
  - DCC stop;
  - L1A queue near full and overflow;
  - FMM error, sync reset and hard reset;
  - kill register and BX limit loads, and JTAG reads;
  - FPGA reset and calibration toggle, each with NOOP protection;
  - JTAG L1A;
  - special-word error, receive error and A-T switch;
  - spy FIFO overflow;
  - short (filled) and long frames;
  - LED blink.

**`tb_workload_wc`** runs events of 0 to 15 DMBs through the controller.
For each it checks the word count 6 + 25·8·nCFEB + 4·nDMB against the
standard table.

The block testbenches may shorten timeouts or widths to stay fast. The
simulator is two-state, so every register that is read has a reset.

## Limits

Some parts of a full DDU controller are not in this RTL:

- the DMB, CFEB, ALCT and TMB data-format checks and their error registers;
- the CFEB CRC-15 and trigger CRC-22 checks;
- the input FIFO shadow counters;
- the error and status registers behind the other JTAG opcodes;
- DMB_LIVE generation, which is an input here;
- the Ethernet receive path;
- the transceivers, clock managers and boundary-scan primitive.

Other departures to keep in mind:

- The end timeout is one timer, where the original distinguishes "end-wait"
  and "end-active".
- The BX limit defaults to 3563. Older configurations preset 923.
- The Ethernet packet limit is 7680 data bytes. Other revisions used 7952
  and 8960.
- Lint reports the reset `rst` as used both as an asynchronous clear (DDR
  input register, bus matching) and synchronously elsewhere. This matches
  the original macros: they have asynchronous clears while the rest of the
  logic is reset synchronously.
