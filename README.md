# Fault-tolerant magnetic bearing controller: voter, bus controller and SEC I/O bus

A magnetic bearing holds a spinning rotor in place with electromagnets. If the
controller stops, the rotor drops, so it must survive faults in its own
processors and in its I/O wiring. This RTL is the digital glue of such a
controller. Four identical DSP modules run the same control program on a 50 µs
sampling period. Three of them (T1, T2, T3) are voted; the fourth (T4) runs in
step as a hot spare. Every word of I/O the processors produce passes through a
**voter**. The voter takes a bitwise two-out-of-three majority, spots a
processor that has gone bad or "lost", swaps in the spare, and falls back to a
single processor if a second one fails. The voted stream drives a **channel
bus controller** (CBC). The CBC runs block reads and block writes over an
**I/O bus** to 8-channel, 14-bit A/D and D/A boards. On that bus the control
lines are triplicated and voted by every board, and address and data carry
Hamming check bits, so that any single corrupted line is corrected.

The processors themselves, their software, the analog converters and the
serial/JTAG ports are not part of this RTL. Their digital connections are the
ports of the top module, `mbc_top`.

```
            outbound FIFOs                                         I/O bus (backplane)
  T1 ──► [OFIFO] ─┐                                      cyc[2:0] wr[2:0]  addr+achk  wdata+wchk
  T2 ──► [OFIFO] ─┤  bitwise     voted     ┌──────────┐  ──────────────────────────────────────►
  T3 ──► [OFIFO] ─┼─► majority ─► stream ─►│   CBC    │          │            │            │
  T4 ──► [OFIFO] ─┘  + failure             │ block    │     ┌────┴───┐   ┌────┴───┐   ┌────┴───┐
  (spare)        ▲    detection            │ rd / wr  │     │ slot 0 │   │ slot 1 │ … │ slot 9 │
                 │   (voter)               └────┬─────┘     │ A/D    │   │ A/D    │   │ D/A    │
                 strobe: pop all four           │ ◄──────── rdata+rchk (wired-OR) ◄─────────────
                                                ▼
  T1 ◄── [IFIFO] ◄─┐                      return buffer
  T2 ◄── [IFIFO] ◄─┤   inbound                  │
  T3 ◄── [IFIFO] ◄─┼── synchronizer ◄───────────┘
  T4 ◄── [IFIFO] ◄─┘   (load all four together, only when all are empty)
```

Everything runs on one 4 MHz clock. The bus moves one 16-bit word per clock
(4 MW/s), and the 8 µs watchdog window is 32 clocks.

## Lockstep through the FIFOs

Each processor writes 32-bit words into its own outbound FIFO (`port_fifo`,
first-word fall-through). Its *buffer-full* flag `bf` means "a word is waiting".
The processors have separate oscillators, so their words arrive at slightly
different times. The voter waits until **every processor it is tracking** has
a word at the head of its FIFO. In that cycle it:

1. forms the bitwise majority of the three voting head words,
2. loads it into its output register (one register stage, the only added delay),
3. raises `strobe`, which pops the head of all four FIFOs at once, the spare's
   too, so that the spare stays word-for-word in step.

The vote itself is combinational. A strobe needs the output register to be
free or being read in the same cycle, so a stalled CBC back-pressures the
FIFOs. With every processor supplying a word each clock, the voter passes one
word per clock.

The inbound direction re-aligns the processors every sampling period.
`inbound_sync` holds each word the CBC has read from a board. It waits until
the inbound FIFO of every processor still in service is empty (`be`), then
writes the word into all four inbound FIFOs in the same cycle. So every
processor receives its sensor data at the same instant. A processor that has
been removed is no longer waited for.

## The voter: detecting and surviving failures

This is the part of the design that needs the most care. It lives in
`rtl/voter.sv`.

### Two failure symptoms

* **Bad data.** On every strobe each tracked processor's head word is compared
  with the voted word. A saturating counter per processor counts consecutive
  mismatches. **One** mismatch is a transient: the word is outvoted (event
  `masked`) and nothing else happens. A **second consecutive** mismatch marks
  the processor as failed. Any matching word resets the counter.
* **Lost processor.** A processor that crashed or ran away stops producing
  words, or stops reading its inbound FIFO. The voter forms a 2-bit control
  signature {outbound `bf`, inbound `be`} for every tracked processor. It
  compares each signature with the majority signature of the three voting
  processors. While any processor is out of line, a timer counts. When the
  timer reaches 32 consecutive clocks (8 µs), every processor still out of line
  is declared lost (event `timeout`). The timer restarts whenever everyone
  agrees again. Short skews between healthy processors last a few clocks and
  never come near the window.

### Three modes

| mode | who votes | on a voter failure | on a spare failure |
|---|---|---|---|
| `MODE_NORMAL` | T1, T2, T3 (T4 on standby, kept in step) | the failed processor is removed and T4 takes its place → `MODE_RECONFIG` | recorded in `spare_noted`, nothing else |
| `MODE_RECONFIG` | T4 and the two survivors | bad data: outvoted, **no** further change. Lost processor: → `MODE_FAILED` | — |
| `MODE_FAILED` (simplex) | the working processor with the lowest number; its words pass unvoted | — | — |

Reset enters `MODE_NORMAL`. `MODE_FAILED` is final until the next reset.

A swap caused by bad data costs nothing: the bad words were outvoted, and the
stream never pauses. A swap caused by a lost processor delays the stream by
8 µs. During that time the lost processor's FIFO holds back the strobe. Once
it is removed, the vote continues with the spare.

### Decisions the voter makes that are this design's own

* "Disagrees with the others" means "differs from the majority of the three
  voting processors", for both data and control signatures.
* A spare found **lost** while on standby is no longer waited for. Otherwise a
  dead spare would stall the lockstep forever. A later voter failure then goes
  straight to simplex, because there is nothing to swap in. A spare that only
  sent bad data is still swapped in when needed, and its bad-data record
  carries no weight.
* Two voting processors failing in the same clock go straight to simplex.
* In simplex mode the watchdog is off; there is nobody to compare with.

### Status outputs

`mode`, `vote_mask` (whose words are used), `failed` (who was removed) and
`spare_noted` are level outputs. Twelve one-cycle event pulses are gathered
in `mbc_events_t ev`:
`strobe, masked, reconf_data, reconf_lost, simplex, timeout, in_load,
in_wait, wr_op, rd_op, rd_corr, board_corr`. They exist for status LEDs,
counters and test.

## Bus operations: the word stream the processors send

The processors describe I/O as block operations. The word format is this
design's choice:

```
header   [31:30] op   01 = block write, 10 = block read
         [29:20] word count - 1   (1..1024 words)
         [9:0]   first bus address
block write: the header is followed by `count` data words; bits [15:0] of each are written.
block read:  `count` words come back through the inbound FIFOs, zero-extended to 32 bits.
```

Consecutive words go to consecutive addresses. `mbc_pkg::mk_header(op, count,
addr)` builds a header.

## The channel bus controller (`cbc`)

The CBC reads a header in one clock. It then issues one bus cycle per clock:

* **Writes** take one data word from the voter per bus cycle. A voter that
  runs dry simply leaves gaps.
* **Reads** are pipelined. The address goes out in clock *t*. The board answers
  on the bus in clock *t + 2* (`READ_LAT`). The CBC registers the answer at the
  end of that clock, corrects it in clock *t + 3*, and writes it into a return
  buffer (`RB_DEPTH`, 8 words). Reads
  issue back to back, but only while the return buffer has room for every read
  in flight. A slow inbound side therefore throttles the bus; it never
  overflows the buffer.

The check bits for address and write data are computed combinationally in
front of the bus output register. Coding therefore adds latency but never a
bus cycle.

## The I/O bus

### Signals (`iobus_req_t`, `iobus_rsp_t`)

| signal | width | meaning |
|---|---|---|
| `cyc[2:0]` | 3 × 1 | bus cycle in progress, three copies |
| `wr[2:0]` | 3 × 1 | write (1) or read (0), three copies |
| `addr`, `achk` | 10 + 4 | address and its Hamming check bits |
| `wdata`, `wchk` | 16 + 5 | write data and its check bits |
| `rdata`, `rchk` | 16 + 5 | read data and check bits, wired-OR of all boards |

A board that is not answering drives all zeros. All zeros is itself a valid
code word, so the boards' read buses can be ORed on the backplane.

### Address map

| address | meaning |
|---|---|
| `0 bbbbbb ccc` | regular address: board (slot) `b`, channel `c` — 64 boards × 8 = 512 channels |
| `1 000 bbbbbb` (0x200 + b) | update address of board `b` |
| 0x3FD | sample all A/D boards |
| 0x3FE | update all D/A boards |
| 0x3FF | sample all A/D boards **and** update all D/A boards in the same clock |

A write to an A/D board's update address samples all eight of its channels at
once. A write to a D/A board's update address moves all eight buffered values
to the outputs at once. The data of such a write is ignored. Placing the
update space in a tenth address bit is this design's choice.

Board update addresses are consecutive, and `mbc_top` puts the A/D boards in
the lowest slots with the D/A boards right after them. So one block write
samples every A/D board, and one block write updates every D/A board. The
boards are reached one bus clock apart (250 ns). Where even that skew matters,
the global addresses reach all boards in the same clock. Address 0x3FF also
makes the delay from sample to output exactly one sampling period.

### Error correction

`sec_encode` / `sec_decode` implement a Hamming single-error-correcting code
for any width K. Positions are numbered from 1 and check bits sit at the
powers of two. Check bit *i* is the XOR of the data bits whose position has
bit *i* set, so every check bit is an independent XOR tree. On receive, the
recomputed check bits XOR the received ones to give the syndrome, which is the
position of the flipped bit. A data position is inverted; a check-bit position
needs no action. Widths: 10 address bits + 4 check bits; 16 data bits + 5
check bits.

Where it is applied:

* **Each board** corrects the address. One bad address line still selects the
  right board and channel.
* **Each board** corrects write data before it reaches a channel buffer.
* **The CBC** corrects read data.

`cyc` and `wr` are voted two-out-of-three on every board (`tmr_vote`).

### Board front end (`iobus_slave`)

Each board has the same front end. In the cycle a request is on the bus, the
front end votes the control lines and corrects address and data. It decodes
the channel hit, the "sample" addresses and the "update" addresses, and
registers the result. The board therefore sees a clean request one clock after
the bus. A read answer is encoded and registered onto the bus one clock later
still.

## The A/D and D/A boards

* **`ad_board`** has one sample-and-hold and one converter per channel, outside
  the RTL. A sample address raises `conv_start` for one clock on all eight
  channels together. `conv_done` latches the eight 14-bit codes into result
  registers, and the result registers answer reads. `ready` is low from a
  conversion start until its results are latched.
* **`da_board`** keeps eight temporary buffers. Channel writes fill the
  buffers; the outputs do not move. An update address copies all eight buffers
  to `dac_code` in one clock and pulses `dac_load`. The board does not answer
  reads.

Timing at the board: a write on the bus in clock *t* is in the buffer, or on
`dac_code`, after *t + 2*.

## One control cycle, and how long it takes

A processor's control cycle, started by a periodic interrupt common to all
four, uses four bus operations:

1. a block write to the A/D boards' update addresses (sample, start conversion),
2. a block write of the new actuator values to the D/A channels,
3. after a one-shot delay that covers the conversion time, a block write to
   the D/A update addresses (all outputs change),
4. a block read of the A/D channels (sensor data for the next calculation).

The bus time is small against the 50 µs (200-clock) period:

| population | bus words per cycle (with headers) | measured I/O time per cycle |
|---|---|---|
| 1 A/D + 1 D/A board | 18 (+4) = 5.5 µs | well within 200 clocks, even with an 8 µs lost-processor stall |
| 5 A/D + 5 D/A boards (80 channels) | 90 (+4) = 23.5 µs | 141–144 clocks with board update addresses; 170 clocks in the cycle in which a processor is lost (8 µs stall); 178–180 clocks with address 0x3FF, whose read must wait for the conversion |

The measured time is longer than the bus time for two reasons. It includes the
one-shot wait. And read-back runs at about one word per two clocks, because
each sensor word waits for every inbound FIFO to empty before the next one is
loaded.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `mbc_top` | `NUM_AD`, `NUM_DA` | 5, 5 | A/D boards in slots `0..NUM_AD-1`, D/A boards after them. At most 10 in total, with at least one of each. The default fills the 10-slot backplane (80 channels). 1 + 1 is the smallest system. |
| `mbc_top` | `OFIFO_DEPTH`, `IFIFO_DEPTH` | 8, 8 | outbound / inbound FIFO depth per processor |
| `mbc_top`, `cbc` | `RB_DEPTH` | 8 | CBC return buffer; also caps the reads in flight |
| `voter` | `TIMEOUT` | 32 | watchdog window in clocks, from `TIMEOUT_NS` and `CLK_HZ` in `mbc_pkg` |
| `mbc_pkg` | `READ_LAT` | 2 | clocks from read address to read data on the bus |
| `mbc_pkg` | `BUS_DATA_W`, `CONV_W` | 16, 14 | bus data width, converter resolution |

The check-bit widths follow from the data widths (`sec_r`). The bus clock
itself is not a parameter of the logic. Only the watchdog needs it, through
`CLK_HZ`.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog against hangs. With
Verilator 5:

```sh
t=tb_mbc_backplane     # or any other tb/tb_*.sv
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mbc_pkg.sv tb/sec_ref_pkg.sv tb/$t.sv --top-module $t --Mdir obj_$t
./obj_$t/V$t
```

(`-Wno-fatal` keeps the unused-signal style warnings from stopping the build.)

| testbench | what it shows |
|---|---|
| `tb_mbc_backplane` | the default full backplane (5 + 5 boards, 80 channels). Runs five control cycles: every sensor word at every live processor, every D/A output after every update, the skew of sample and update instants, and the I/O time per cycle. One cycle uses address 0x3FF. In another, T3 stops dead: it must be declared lost once, the spare must take its place, and the cycle must still finish in time. |
| `tb_mbc_top` | the 1 + 1 board system end to end, with faults. A single bad word is masked. Two bad words swap in the spare. A stuck write-data line and a stuck read-data line on the backplane are corrected. The global addresses are used. A lost processor leads to simplex. A second run loses a processor in normal mode, then sends a bad word from the now-voting spare. |
| `tb_voter` | all mode transitions, the timeout firing after exactly 32 clocks of disagreement, spare-failure handling, and the output stream checked word by word |
| `tb_inbound_sync` | words loaded only when all tracked FIFOs are empty, all at once, in order |
| `tb_cbc` | block reads and writes against a bus model with read latency, back-pressure, and single-bit read errors |
| `tb_iobus_slave` | random bus cycles of every address class, some with one flipped address, data or check bit, or one corrupted control-line copy, checked against an independent decode |
| `tb_ad_board`, `tb_da_board` | sampling, update and read-back behaviour of the boards |
| `tb_sec_encode`, `tb_sec_decode` | every code word must have the Hamming property (the XOR of the positions of its one bits is zero), plus hand-worked vectors; every single-bit error position of random words is corrected |
| `tb_tmr_vote`, `tb_port_fifo` | the majority gate exhaustively; the FIFO against a queue model under random pushes and pops |

`voter` and `cbc` carry SVA assertions: no pop from an empty tracked FIFO, a
stable output while stalled, and no return-buffer overflow.

## How far it can be trusted, and where it departs from the original system

What follows the published description of the controller:

* four modules, three voting plus a hot spare popped in lockstep
* a bitwise majority vote
* failure on two consecutive bad words, or on 8 µs of control-flag disagreement
* the three modes and their transitions; simplex on the lowest-numbered
  working processor
* inbound loading of all FIFOs at once once all are empty
* triplicated, board-voted control lines
* single-error correction on address and data
* 6 board bits + 3 channel bits
* board update addresses plus the three global ones
* per-channel sampling and buffered D/A updates
* 10 slots, 8 channels each

Choices made here, where that description gives no detail:

* the word format
* the update address space
* the 16-bit bus data width
* the Hamming bit order
* FIFO and buffer depths
* the read latency
* the spare-handling corner cases listed under the voter

Known differences:

* **Clock not triplicated.** Only `cyc` and `wr` are triplicated. All logic
  runs on one clock net.
* **One clock domain.** The processors' communication ports really run on
  their own 40 MHz timing. Here the FIFOs' write side shares the 4 MHz bus
  clock, and a port is a plain valid/ready word interface. Because of this,
  read-back in simulation runs at about 2 MW/s, not at bus speed. With real
  ports, a processor empties its inbound FIFO within a fraction of a bus clock.
* **Signal polarity.** `strobe` is active high. The original drives it active
  low; its timing is the same, one pulse after every tracked `bf` is up.
* **Timeout edge.** The timeout fires on the 32nd consecutive clock of
  disagreement, that is at 8 µs rather than "more than" 8 µs.
* **Single-error correction only.** A double error on the bus is neither
  corrected nor detected.
* **One voter module.** The voter is a single module. The original spreads it
  over three programmable logic devices, which is an implementation choice
  that does not change its function.
* **Not included:** the DSP modules and their memories and DMA, the real-time
  operating system, the common 1 MHz timer oscillator, the analog converters,
  the RS-232 DUART, the JTAG port, digital I/O cards, and the electrical
  backplane.

## Files

| file | contents |
|---|---|
| `rtl/mbc_pkg.sv` | constants, address map, bus and event types, `mk_header` |
| `rtl/mbc_top.sv` | FIFOs, voter, CBC, inbound synchronizer, board population |
| `rtl/voter.sv` | majority vote, lockstep strobe, failure detection, mode machine |
| `rtl/inbound_sync.sv` | simultaneous loading of the inbound FIFOs |
| `rtl/port_fifo.sv` | first-word fall-through FIFO with `bf` / `be` flags |
| `rtl/cbc.sv` | channel bus controller |
| `rtl/iobus_slave.sv` | board bus front end: vote, correct, decode, answer |
| `rtl/ad_board.sv`, `rtl/da_board.sv` | digital parts of the converter boards |
| `rtl/sec_encode.sv`, `rtl/sec_decode.sv` | Hamming SEC code |
| `rtl/tmr_vote.sv` | two-out-of-three majority |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus the two system runs |
| `tb/sec_ref_pkg.sv` | independent reference for the check bits |
