# DDU event builder for the CMS endcap muon readout

The DDU (Detector Dependent Unit) sits between up to 15 DMBs (DAQ
Motherboards, one per cathode strip chamber) and the DCC (Data Concentration
Card). For every level-1 accept (L1A) each DMB answers. It sends either four
"lone" words to say it has no data, or a record that opens with four DMB_DAV
words. The answers arrive on separate fibres, at different times. The DDU
takes one trigger at a time from its L1A-FIFO and collects the matching answer
from every connected input. It drops the lone words and packs the 16-bit DMB
words into 64-bit words. The result goes out as one event, framed by three
header words and three trailer words in the DDU-2005 format. A copy of every
event goes to a SPY FIFO feeding a slow Giga-Bit Ethernet link to a local DAQ
PC. The SPY FIFO keeps only the events it has room for.

Beside building events, the DDU watches its own health. It checks input FIFO
levels, missing or endless DMB records, fibre errors and link states. The
results go into a 32-bit error status inside every event, and into a 4-bit TTS
state for the trigger throttling system (FMM). Errors of the "reset required"
class stay set until the DDU is reset.

All RTL is synthesizable SystemVerilog. It runs on one clock, taken to be the
40 MHz LHC bunch clock.

## Block diagram

```
 l1a, bc0 ──► l1a_fifo (L1A counter, BX counter, FIFO of {L1A, BXN})──┐
                                                                     │
 DMB01 words ─► dmb_input_fifo ─┐                                    ▼
   ...                          ├─────────────────────────► ddu_event_builder ──► dcc_* (to DCC / S-Link)
 DMB15 words ─► dmb_input_fifo ─┘                                 ▲    │             │
                                                                  │    │             └─► spy_fifo ──► spy_* (to Ethernet)
   link / receiver / checker flags ─► ddu_status ─────────────────┘    │
                                        ▲      └─► tts (to FMM), err_status
                                        └──────────── timeouts, wrong first word, evt_start
```

`ddu_top` wires these together. The DMB words enter through `dmb_wr`,
`dmb_data` and `dmb_last`, which are the outputs of the fibre receivers.
`dmb_last` marks the last word of each DMB record.

## The event, word by word

All words are 64 bits wide and are listed in the order they are sent. Bits
not listed (Header 2 bit 15, Header 3 bits 63, 47 and 4, Trailer bits 59:56)
are reserved and sent as 0. EVT_STATUS and the "free" fields have no defined
contents in the format yet and are also sent as 0.

| word | bits | contents |
|---|---|---|
| Header 1 | 63:60 | `0101`, beginning of event |
| | 59:56 | EVT_TYPE (input `evt_type`) |
| | 55:32 | L1A number (24-bit L1A counter) |
| | 31:20 | BXN, the bunch crossing of the L1A |
| | 19:8 | SOURCE_ID (input `source_id`) |
| | 7:4 | format revision, 5 (DDU-2005) |
| | 3:0 | free, 0 |
| Header 2 | 63:16 | `8000 0001 8000` |
| | 14:0 | DMB_FIFO_FULL_STATE: the input FIFOs that have been full since reset |
| Header 3 | 62:48 | inputs connected (`link_up`) |
| | 46:32 | DMB_DAV: the inputs that sent data in this event |
| | 31:28 | DMB_Active: how many inputs sent data |
| | 27:12 | DDU_OUTPUT_STATUS (layout below) |
| | 11:5 | EVT_BEGIN_STATUS (layout below) |
| | 3:0 | DDU_TTS |
| data | | DMB records of the inputs with data, lowest input first. Four 16-bit words per 64-bit word, first word in bits 15:0. The last word of a record is zero padded |
| Trailer-2 | 63:0 | `8000 FFFF 8000 8000` |
| Trailer-1 | 63:32 | DDU_ERROR_STATUS, evaluated when this word is sent |
| | 30:16 | CSC_ERROR_STATE, one bit per input |
| | 14:0 | CSC_WARNING_STATE, one bit per input |
| Trailer | 63:60 | `1010`, end of event |
| | 55:32 | number of 64-bit words in the event, counting Header 1 and the Trailer |
| | 31:16 | DDU CRC |
| | 15:8 | EVT_STATUS, 0 |
| | 7:4 | DDU_TTS |
| | 3:0 | free, 0 |

The field widths, marker nibbles, fixed patterns and revision number come
from the DDU-2005 format. Exact bit positions are given by that format only
for Header 1, Header 2, Trailer-2 and the status bits 63:32 of Trailer-1. The
other positions were chosen for this design. They keep the listed field order,
most significant field first.

The CRC uses the polynomial x^16 + x^15 + x^2 + 1. It starts from 0xFFFF and
takes each 64-bit word most significant bit first. It covers every word of the
event from Header 1 to the Trailer, with the Trailer's own CRC field read as
zero. The format only says that the CRC has 16 bits, so the polynomial and the
coverage were chosen for this design.

DDU_OUTPUT_STATUS and EVT_BEGIN_STATUS have only their names and widths in
the format. This design fills them as follows:

| field | bit | meaning |
|---|---|---|
| DDU_OUTPUT_STATUS | 0 | S-Link not ready |
| | 1 | S-Link full |
| | 2 | output held by the receiver at this moment |
| | 3 | output constricted (status bit 63) |
| | 4 | SPY FIFO near full |
| | 5 | SPY FIFO full |
| | 6 | SPY fibre error |
| | 7 | SPY clock-DLL error |
| | 8 | the previous event was skipped by the SPY FIFO |
| EVT_BEGIN_STATUS | 6..0 | status bits 47, 46, 58, 35, 44, 56, 34 when Header 3 is sent |

## How one event is built (`ddu_event_builder`)

1. **Scan.** An entry in the L1A-FIFO starts an event. The builder then
   looks at the first word waiting in each connected input. If bits 15-12 are
   `1000`, the input sent lone words: the builder reads and drops them up to
   the end of that record. Any other first word means the input has data.
   `1001` is the DMB_DAV signature. Any other value raises "wrong first word"
   (bit 59), but the record is still kept. The DAV words stay in the data.
   The scan ends when every connected input has answered.
2. **Headers.** Header 1, Header 2 and Header 3 are sent.
3. **Data.** The records of the inputs with data are copied, one input after
   another, one 16-bit word per clock cycle.
4. **Trailers.** Trailer-2, Trailer-1 and the Trailer follow. The Trailer's
   word count and CRC are computed as the event is sent.

**Timeout.** An input may stay empty while the builder is waiting for it,
either before it has answered or in the middle of its record. After `TIMEOUT`
cycles with no progress (16384 cycles by default, about 410 µs) the builder
pulses that input's timeout bit. It then goes on without the input: in the
scan the input counts as having no data, and during the copy the record is
cut short. A timeout is a reset-required error. The input's later words are
now out of step with the triggers, so the system must be reset.

**Back-pressure.** The output (`dcc_valid`, `dcc_data`, `dcc_last`,
`dcc_ready`) holds each word until the receiver takes it. An assertion checks
this. While the receiver refuses words, the builder reads nothing from the
input FIFOs, so they fill up. If one becomes full while the output is held,
status bit 63 ("output constricted") is set.

**Data stuck.** Suppose the builder is idle, no trigger is waiting, and an
input FIFO still holds data. That data belongs to no trigger, and status bit
57 is set.

Records in an event are ended by the receiver's end-of-record flag, not by
decoding DMB trailer words. The DMB record format is outside this design.

## Error status and TTS (`ddu_status`)

Each of the 32 status bits has a condition. A bit reads as 1 if its
condition is true now, or was true at any time since the current event
started. Bits of the "reset required" class stay at 1 until reset. Three bits
are ORs of others:

* bit 45 (single-event warning) = bit 55 OR bit 42.
* bit 46 (single-event error) = OR of all bits that make an event bad:
  32-41, 43, 48-51, 55, 57-59 and 63 (`BAD_MASK` in `ddu_pkg`).
* bit 47 (critical error) = OR of the reset-required bits: 34, 35, 36, 38,
  39, 42, 57, 58 and 63 (`RESET_MASK`).

These bit numbers, their meanings and their classes follow the DDU status
table. Some details were chosen for this design:

* **Bit-vote errors** are tracked per input. The first event in which an input
  reports a failure sets bit 55, a warning. A failure in a later event on the
  same input sets bit 36, which requires a reset.
* **Lost/new fibres** (bit 34) compares `link_up` with its value in the first
  cycle after reset.
* **CSC_ERROR_STATE** marks the inputs that had one of these in the current
  event: a timeout, a wrong first word, a hardware bit error, a second
  bit-vote error, or any result from the DMB record checker.
* **CSC_WARNING_STATE** marks a first bit-vote error or a nearly full input
  FIFO.
* **TTS** uses the usual CMS codes: OUT-OF-SYNC `0010` while bit 47 is set,
  BUSY `0100` while an input FIFO or the L1A-FIFO is full, WARNING `0001`
  while one of them is nearly full, READY `1000` otherwise.

Ten status bits (32, 33, 37, 39, 40, 41, 48-51) describe the contents of DMB,
TMB, ALCT and CFEB records: their CRCs, L1A numbers, word counts and control
word order. Those checks need the DMB data format, so they are not built
here. The results come in per input on the `dmb_check` port (`dmb_check_t`).

## SPY path (`spy_fifo`)

Every word the DCC side accepts is also offered to the SPY FIFO. When the
first word of an event arrives, the FIFO compares its fill level with
`spy_nf_thresh`. At or above the threshold, the whole event is skipped. This
way the Ethernet side only ever sees complete events. The same comparison
drives bit 61. The FIFO should never become full if the threshold leaves room
for the largest event. If it does become full, the words that do not fit are
lost, the rest of that event is skipped, and bit 62 is set. Whole-event
skipping is this design's choice. The format only says that the DDU stops
writing into the SPY FIFO when it is nearly full, at a tunable threshold.

## FIFOs, counters and sizes

| parameter (of `ddu_top`) | default | meaning |
|---|---|---|
| `DMB_FIFO_DEPTH` | 2048 | 16-bit words per input FIFO; near-full at 3/4 |
| `L1A_FIFO_DEPTH` | 64 | pending triggers; near-full at 3/4 |
| `SPY_FIFO_DEPTH` | 4096 | 64-bit words |
| `TIMEOUT` | 16384 | clock cycles without progress |

The format gives none of these sizes, so all four were chosen for this
design. The number of inputs, 15, is fixed by the format (`N_DMB` in
`ddu_pkg`).

The BX counter advances once per clock. It returns to 0 on `bc0`, the orbit
marker, or after 3564 cycles if `bc0` is missing. The L1A counter numbers
triggers from 1 and is cleared by `ev_cnt_rst`.

## What is not in the RTL

These parts are outside the RTL. Their signals are ports of `ddu_top`:

* **Fibre receivers.** They deliver the DMB words with an end-of-record flag
  (`dmb_wr`, `dmb_data`, `dmb_last`), the link state (`link_up`) and the
  bit-vote and bit errors (`bitvote_err`, `hw_bit_err`).
* **DMB record checker.** Its results come in on `dmb_check`.
* **S-Link / DCC transmitter.** It connects to the `dcc_*` port, with
  `slink_not_ready` and `slink_full` as status inputs.
* **Ethernet formatter.** It connects to the `spy_*` port, with
  `spy_fiber_err` as a status input.
* **FMM link.** It connects to the `tts` output.
* **Clock DLLs.** Their lock-loss flags come in on `ctrl_dll_err` and
  `spy_dll_err`.

Other limits:

* Everything runs on one clock. A real board would need clock-domain
  crossings at the fibres.
* The data format has three versions: DDU-2003, DDU-2004 and DDU-2005. Only
  the DDU-2005 layout is built.

## Files

| file | contents |
|---|---|
| `rtl/ddu_pkg.sv` | field constants, status bit numbers and masks, types, CRC function |
| `rtl/ddu_sync_fifo.sv` | generic first-word-fall-through FIFO |
| `rtl/dmb_input_fifo.sv` | one DMB input FIFO with its full and near-full flags |
| `rtl/l1a_fifo.sv` | L1A counter, BX counter and L1A-FIFO |
| `rtl/spy_fifo.sv` | SPY FIFO that keeps or skips whole events |
| `rtl/ddu_crc16.sv` | running event CRC |
| `rtl/ddu_event_builder.sv` | the event-building state machine |
| `rtl/ddu_status.sv` | error status, CSC states, TTS |
| `rtl/ddu_top.sv` | the whole DDU |
| `tb/ddu_tb_pkg.sv` | reference CRC and word packing for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench checks the block against a model of its own and ends with a
line `TB_RESULT checks=N failures=M`. To run the full DDU test with Verilator
5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/ddu_pkg.sv tb/ddu_tb_pkg.sv tb/tb_ddu_top.sv --top-module tb_ddu_top
./obj_dir/Vtb_ddu_top
```

For another testbench, replace `tb_ddu_top` with its name. `ddu_pkg.sv` must
come first on the command line, and `ddu_tb_pkg.sv` is needed by
`tb_ddu_top`, `tb_ddu_event_builder` and `tb_ddu_crc16`.

`tb_ddu_top` runs the whole DDU at its default sizes. It plays 15 DMBs with
random records and lone answers, a receiver that refuses words at random, and
a slow SPY reader. It checks every event word by word against an event it
builds itself, and recomputes the word count and the CRC. Every SPY event
must match a DCC event. It also steps through each special case at least
once and counts it:

* lone words suppressed
* several triggers waiting
* a wrong first word
* a bit-vote error
* a DMB checker flag and S-Link full, seen in Trailer-1 and Header 3
* a timeout of a silent DMB, followed by TTS out-of-sync
* an input FIFO overflowing while the output is held
* data stuck in a FIFO
* a full L1A-FIFO
* a reset followed by clean events

The unit testbenches cover FIFO flags and sticky full state, BX and L1A
numbering, SPY skip decisions, the CRC against a tap-by-tap LFSR model, and
every status bit with its class and persistence.
