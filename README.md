# PCI Express Gen1 x1 MAC: the logical half of the physical layer

This RTL sits between a PIPE-compatible PHY and the PCI Express data link
layer. It contains everything in the physical layer that is not
analog or 8b/10b coding:

* it **trains the link** from power-up to L0 with the training sequences
  TS1/TS2 (the LTSSM);
* it **frames outgoing packets** (TLPs with STP ... END, DLLPs with
  SDP ... END) and interleaves them with ordered sets and logical idle;
* it **separates incoming ordered sets from packets**, strips the framing and
  hands whole packets to the data link layer, dropping broken ones.

It covers one lane at 2.5 GT/s. The PIPE data path is 16 bits wide, which
is two symbols per PCLK at 125 MHz (250 MB/s in each direction). The data
link layer side works in rows of 32 bytes with byte maps for start, end and
valid. The top module is `pcie_mac_top`. Two copies of it, one set as
downstream and one as upstream, train against each other and exchange
packets in simulation.

```
               data link layer (32-byte rows, SOP/EOP/valid maps, ACK)
                 |  i_DataLink ... o_ACK                ^  o_Rx_* , i_Rx_ACK
                 v                                      |
  +--------------------------+                +--------------------------+
  | tx_top                   |                | rx_top                   |
  |  interface buffer (17x32B)|               |  general filter (2 x     |
  |  interface bus (row->2B) |                |   per-symbol FSM)        |
  |  Tx buf 2047x16 + PI buf |                |  buffer controller       |
  |  OS buffer 16x16  <------+--- OS words ---|  row register (32 B)     |
  |  controller, SE framing, |   +--------+   |  data buf 19x256,        |
  |  mux, framing alignment  |<--| ltssm  |<--+  control buf 19x97       |
  +------------+-------------+   | SM,    |   |  controller interface    |
               |                 | timer, |   +------------^-------------+
               |                 | creator|                |
               |   L0 ---------- |decoder,|--- L0 -------->|
               v                 | PIPE   |                |
        TxData[15:0], TxDataK    +---+----+        RxData[15:0], RxDataK
                                     | TxDetectRx, PowerDown, PhyStatus, RxStatus, RxElecIdle
                                   PIPE PHY
```

## Conventions used on every interface

* **PIPE words.** Bits 7:0 hold the first symbol in time and bits 15:8 the
  second. Each symbol has a D/K flag, **1 for data and 0 for a control
  (K) symbol**. The same polarity is used on the LTSSM side of the receive
  filter.
* **Control symbols** (`pcie_mac_pkg`): COM BC, STP FB, SDP 5C, END FD, EDB FE,
  PAD F7, SKP 1C, IDL 7C, EIE FC. TS1 is identified by 4A and TS2 by 45.
* **Data link layer rows** are big-endian. Byte 31 (bits 255:248) is the
  first byte of a row, and bit *k* of the SOP/EOP/valid (Tx) or
  start/end/valid (Rx) maps belongs to byte *k*. A packet starts at byte 31
  of its first row. Packet type is 0 for a TLP and 1 for a DLLP.
* **Reset** is asynchronous and active low (`i_reset_n`). After reset the
  Tx output is logical idle: 0000h with D/K = 11.

## Link training (LTSSM)

`ltssm` has five parts:

* `ltssm_state_machine` holds the states.
* `ltssm_timer` counts timeouts.
* `ltssm_os_creator` builds the sets to send and pushes them into the Tx
  ordered-set buffer.
* `ltssm_os_decoder` assembles and checks received sets.
* `ltssm_pipe_operation` drives the PIPE control pins.

States and their numbers (`o_LTSSM_state`):

| # | state | sends | leaves when |
|---|-------|-------|-------------|
| 0 | Detect.Quiet | electrical idle | 12 ms, or the receiver leaves electrical idle |
| 1 | Detect.Active | TxDetectRx pulse | PhyStatus with RxStatus = 011 → 2; timeout → 0 |
| 2 | Polling.Active | TS1, link/lane PAD | ≥ 1024 TS1 sent and 8 TS1 (control 0 or 4) or TS2 received |
| 3 | Polling.Configuration | TS2, PAD | ≥ 16 TS2 sent and 8 TS2 received |
| 4 | Config.Linkwidth.Start | TS1: downstream link 0/lane PAD, upstream PAD/PAD | 2 TS1 with a link number received |
| 5 | Config.Linkwidth.Accept | TS1 with the agreed link | 2 matching TS1 (downstream: lane PAD; upstream: lane number) |
| 6 | Config.Lanenum.Wait | TS1 link/lane | 2 TS1 (downstream) or TS2 (upstream) with link and lane |
| 7 | Config.Lanenum.Accept | TS1 link/lane | 2 matching TS1 (downstream) / TS2 (upstream) |
| 8 | Config.Complete | TS2 link/lane | ≥ 16 TS2 sent and 8 TS2 received |
| 9 | Config.Idle | logical idle | ≥ 16 idle symbols sent, 8 received, receiver not idle |
| A | L0 | SKP set every 590 clocks | 2 TS received → B |
| B | Recovery.RcvrLock | TS1 | 8 TS with link and lane |
| C | Recovery.RcvrCfg | TS2 | ≥ 16 TS2 sent and 8 TS2 received → 9 |

The downstream port proposes link number 0 and lane number 0, and the
upstream port echoes them back. The role comes from the pin
`i_IsDownstream`, so one module serves both ends. Every timeout returns to
Detect.Quiet. The timeouts at 125 MHz are:

| state | clocks | time |
|-------|--------|------|
| Detect | 1,500,000 | 12 ms |
| Polling.Active | 3,000,000 | 24 ms |
| Polling.Configuration | 6,000,000 | 48 ms |
| Config.Linkwidth | 3,000,000 | 24 ms |
| the other Configuration states | 250,000 | 2 ms |
| Recovery.RcvrLock, Recovery.RcvrCfg | 3,000,000, 6,000,000 | 24 ms, 48 ms |

The same timer reloads in L0 and schedules a SKP set (COM plus three SKP)
every 590 clocks, which is 1180 symbol times.

Points that matter when reading or changing the state machine:

* **Settling cycle.** The first clock in every state is a settling clock:
  - `o_State_change` is high;
  - the creator is disabled, so its sent-count restarts;
  - the timer restarts;
  - the decoder's receive count clears;
  - no exit is taken.

  Exits are therefore never judged on counts from the previous state.
* **Counting rule.** The decoder counts *consecutive* matching TSs that carry
  the same link and lane numbers. A matching set with different numbers
  restarts the count at 1 and captures the new numbers. The captured link
  and lane are what the state machine stores at the Linkwidth.Start and
  Linkwidth.Accept exits.
* **Sets are never cut.** The creator latches the 16 symbols of a set when
  the set starts and always finishes a set it has started, even if the state
  changes under it. TS and idle repeat for as long as the state enables
  them. A SKP set is sent exactly once per request. Back-pressure comes from
  the Tx ordered-set buffer (`i_Tx_OSbufferFull`).
* **Recovery is simplified.** Only the TS-received entry from L0 is built,
  with a two-state lock/configure exchange that returns through Config.Idle.
  There is no speed change, equalisation, power management, loopback,
  hot reset or disable.

Two back-to-back ports reach L0 about 8,600 clocks (69 µs) after reset.
Polling.Active dominates that time, with its 1024 TS1 of 8 clocks each.

## Transmit path (`tx_top`)

Packets and ordered sets reach the PIPE through these stages:

1. **Interface buffer** (17 rows × 32 B, enough for the largest 544-byte
   TLP). The data link layer writes one packet, one row per clock
   (`i_WrEn`). When the EOP row is written `o_ACK` rises. The layer must
   then stop writing until `o_ACK` falls, which happens once the last row
   has been read out. Bad input is handled as follows:
   - a first row without SOP is ignored;
   - a buffer that fills without an EOP is flushed, and no ACK is given.
2. **Interface bus.** It cuts each row into two-byte words, first byte in
   the low half. Each word gets a packet indicator: TLP start, DLLP start or
   continuation.
3. **Tx buffer** (2047 words) and **packet-indicator buffer**. These are two
   first-word-fall-through FIFOs, written and read together.
4. **Ordered-set buffer** (16 words), filled by the LTSSM.
5. **Controller.** It arbitrates between three sources:
   - ordered sets have priority, but never interrupt a packet: a set that
     arrives mid-packet waits for END;
   - packets may start only in L0;
   - logical idle is sent when there is nothing else.

   A packet is sent as:
   - a start word, {STP,00} or {SDP,00};
   - its data words;
   - the end word {00,END}.
6. **Multiplexer.** It forms the word and its D/K flags:
   - data words are 11;
   - in framing words, each 00 byte is data and each framing byte is K;
   - in ordered-set words, COM, SKP, IDL, EIE and PAD are K.
7. **Framing alignment**, a registered stage. The start word carries a pad
   byte, so from the start word to the end word the stream is delayed by one
   byte. That removes both pad bytes:

```
 from the multiplexer     {STP,00}  {D1,D0}  {D3,D2} ... {Dn-1,Dn-2} {00,END}
 on the PIPE (hi,lo)      {D0,STP}  {D2,D1}  ...         {END,Dn-1}
 D/K                        10        11                    01
```

A packet of *n* bytes (n even) takes n/2 + 1 PIPE words plus one idle word.
The idle word is the one the start word costs. Latency is one clock from
the multiplexer to the PIPE.

**Throughput.** The interface buffer holds one packet, and it is not read
while a packet is being written into it. Back-to-back 544-byte TLPs
therefore leave every 291 clocks: 17 clocks to write the rows, then 272
words at one word per clock. That is about 94% of the 250 MB/s line rate.

## Receive path (`rx_top`)

1. **General filter.** Two copies of a one-symbol state machine
   (`rx_filter`) run in series, one for each symbol of the word. The state
   passes from the second copy to the first copy on the next clock. The
   states are Idle, Ordered-set and Packet:
   - COM enters Ordered-set, and from then on every symbol, logical idle
     included, goes to the LTSSM with a valid flag and a COM flag;
   - STP or SDP enters Packet, and packet symbols are classed as STP, SDP,
     VLD (data), END, EBD (EDB) or ERR (any other control symbol);
   - in Idle, data symbols are ignored.

   All outputs are registered.
2. **Buffer controller.** It handles the two symbols of a clock in order. It
   strips the framing, pairs the bytes and writes each pair into the 32-byte
   **row register** (`rx_buffer_interface`). It also builds a 97-bit
   control word {start map, end map, valid map, type} for each row.

   **Row timing** is the subtle part. The control word of a full row is
   final only once it is known whether END follows, so a full row is copied
   out only when the next byte of the same packet arrives, or at END. A row
   whose last pair is written in the very clock it is closed is copied one
   clock later.

   Re-pairing means a packet starts at byte 31 of a row, whichever half of
   the PIPE word its STP arrived in. Packets of odd length end with their
   last byte alone, padded with 00.
3. **Data buffer** (19 × 256 bits) and **control-signal buffer** (19 × 97
   bits). These are two FIFOs written in lockstep. Rows of an open packet
   are not readable until END **commits** the packet. A broken packet is
   **rewound**: its rows are discarded. There are three causes:
   - a control symbol inside the packet;
   - a second STP or SDP before END (the new packet is kept);
   - L0 falling mid-packet.

   A packet that loses a row to a full buffer is discarded at END.
4. **Controller interface.** It keeps two counters, packets committed and
   packets handed over. When they differ, it reads the packet out one row
   per clock onto registered outputs, which are all zero between packets.
   It then waits for `i_Rx_ACK` before it starts the next packet. The first
   row appears about five clocks after the END symbol.

Packets are accepted only in L0. Ordered sets always reach the LTSSM.
Packets ending in EDB are delivered like ordinary packets, and so are
packets with a lone last byte. Judging them is left to the data link layer.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `ltssm` | `T_DETECT`, `T_POLL_ACTIVE`, `T_POLL_CONFIG`, `T_CFG_LW`, `T_CFG_2MS` | 1.5 M, 3 M, 6 M, 3 M, 250 k | timeouts in PCLK cycles |
| | `NUM_TS1_POLL`, `NUM_TS2_SENT`, `NUM_IDLE_SENT` | 1024, 16, 16 | sets (idle: symbols) to send |
| | `NUM_RX_POLL`, `NUM_RX_CFG`, `NUM_RX_COMPLETE`, `NUM_RX_IDLE` | 8, 2, 8, 8 | consecutive sets to receive |
| | `SKP_INTERVAL` | 590 | clocks between SKP sets in L0 |
| | `LINK_NUMBER`, `LANE_NUMBER`, `N_FTS` | 0, 0, 32 | values sent in TS |
| `tx_top` | `TXBUF_DEPTH`, `IFBUF_DEPTH`, `OSBUF_DEPTH` | 2047, 17, 16 | buffer depths (words, rows, words) |
| `rx_top` | `BUF_DEPTH` | 19 | rows in the data and control buffers |

The top module uses all defaults. For quick simulation the LTSSM can be
scaled down, for example to 24 TS1 in Polling.Active and timeouts of a few
hundred clocks.

## Departures from the reference design, and choices of its own

The design follows a published description of this MAC. Where that
description is silent, contradicts itself or was changed here, the choice
is listed below.

* The D/K flag is 1 for data everywhere. The PIPE, LTSSM and receive
  interface definitions use this polarity. The transmit multiplexer and
  alignment tables use the opposite one, and so call logical idle "D/K 0".
  The transmit test expectations (STP word D/K = 10, END word 01) agree
  with 1 = data, so logical idle leaves here as 0000h with D/K 11.
* Polling.Configuration sends TS2 and leaves after 16 TS2 sent and 8
  received. One exit table says "16 TS1 sent" for this step, but the state
  description says TS1s stop and TS2s are sent there.
* As in the reference, a received packet must start with STP/SDP and end
  with END or EDB, and the transmit side never sends EDB (it produces no
  nullified packets).
* Timeouts are the specification's milliseconds converted to 125 MHz
  clocks. Far smaller values are useful for simulation only.
* The port role is an input pin. Recovery is reduced to two states (B, C).
  L0 is left only when training sets are received.
* Exits use counts of consecutive, consistent sets, and each state begins
  with a settling clock.
* The receive path re-aligns packets whose STP falls in the second half of
  a PIPE word. The reference passes such packets on with all-zero maps,
  leaving the data link layer to drop them. Broken packets (an error symbol,
  a second start, or no END before the next packet) are dropped whole by
  the commit/rewind buffers. The reference passes some of them on with
  wrong maps and lets the packets after them suffer too.
* `o_PIPE_UpLink` (bit/symbol lock) is approximated by "not in Detect and
  receiver not in electrical idle". TxCompliance, RxPolarity and Rate are
  tied to 0.
* There is no scrambler, no lane reversal or multi-lane deskew, and no
  power states beyond P0/P1. Logical idle is the constant 0000h fed to the
  Tx multiplexer.

## Limitations

* Only one lane at 2.5 GT/s. The 8b/10b coding, elastic buffer, clock
  recovery and analog parts belong to the PHY and are not here. The
  testbenches model the PHY only as far as receiver detection and a
  symbol-level loop-back.
* The data link and transaction layers are not included. The MAC neither
  checks nor generates CRCs or sequence numbers.
* LTSSM: no L0s, L1, L2, Hot Reset, Disable or Loopback; no speed change;
  Recovery only as described above. RxStatus is used only for receiver
  detection. Decode, disparity and elastic-buffer errors are ignored.
* EDB is accepted as a packet end, but the packet is not marked as
  nullified. An upper layer that must discard nullified TLPs cannot tell
  them apart.
* The data link layer must wait for `o_LinkUp` before writing packets. A
  packet written earlier is held in the Tx buffer and leaves as soon as this
  port reaches L0. If the partner reaches L0 a few clocks later, it drops
  that packet, because its receive path accepts packets only in L0.
* The transmit interface takes one packet at a time. A new packet can be
  written only after the previous one has left the 17-row interface
  buffer.
* Tested only in simulation: against itself back to back and against
  scripted symbol streams, not against another vendor's port.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_pcie_mac_top` | two default tops back to back with a PHY model. It trains to L0, then sends 40 random TLPs and DLLPs each way, one of them 544 bytes, and compares every byte received. Then each side sends 30 consecutive 544-byte TLPs, which must arrive within 30 × 294 clocks. It counts training, TLP/DLLP both ways, SKP, idle, an ordered set waiting behind a packet and ACK stalls, and fails if any of them never happens. |
| `tb_rx_workloads` | the receive path at full line rate: 30 DLLPs then 30 minimum 28-byte TLPs; 30 maximum TLPs; one maximum TLP followed by 30 DLLPs; a mixed sequence of TLPs, DLLPs, idle and SKP sets; resets in the middle of a packet and of a TS. Nothing may be lost, and each scenario must be delivered within its wire time plus 40 clocks. |
| `tb_ltssm` | two LTSSMs through a link model. Checks the exact state sequence to L0, SKP spacing and set length, Recovery after injected TS1s, and the Detect.Active and Polling.Active timeouts (shortened). A fifth, scaled port trains against a script: TS1 with training control 4 in Polling.Active, a changed link number in Linkwidth.Start (count restarts), a foreign one in Linkwidth.Accept (ignored), and a Config.Idle timeout. |
| `tb_ltssm_os_creator` | set contents and latching, repeat rules, the Counter_Ack timing, back-pressure, and sets finishing after disable. |
| `tb_ltssm_timer` | timeout timing against a reference count, including a full 12 ms run. |
| `tb_ltssm_pipe_operation` | detect handshake, PowerDown/TxElecIdle per state, lane-detected latch, UpLink. |
| `tb_tx_top` | packets and ordered sets rebuilt from the PIPE words by an independent parser. Checks L0 gating, ordered-set priority without cutting packets, a row without SOP, and the 544-byte TLP. |
| `tb_rx_top` | random symbol streams: packets at both alignments and odd lengths, ordered sets to the LTSSM, error and second-start drops, a doubled END, bytes with no start symbol, L0 gating and L0 loss, ACK stall, the 544-byte TLP. |
| `tb_mac_sync_fifo`, `tb_rx_packet_buffer` | the FIFOs against queue models, including overflow, commit and rewind. |

Running one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/pcie_mac_pkg.sv tb/tb_pcie_mac_top.sv \
          --top-module tb_pcie_mac_top -o sim
./obj_dir/sim
```

The end-to-end test simulates 152 µs (about 19,000 clocks) and finishes
in well under a second. `verilator --lint-only -Wall` reports only unused
package constants. The whole top synthesises with Yosys to about 1,550 flip-flop
bits plus 49 kbit of memory arrays, most of it the 2047-word Tx buffer.
