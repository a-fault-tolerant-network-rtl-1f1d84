# Braided-ring fault-tolerant network (BRAIN) — smart node RTL

A distributed engine-control network has to keep delivering sensor and actuator
data when a node dies, a cable breaks or a node starts sending garbage. A plain
bus cannot do that. This design uses a **braided ring**: eight nodes in a ring,
where every node sends not only to its neighbour but also to the node two places
further on, in both directions. Each node then hears every frame twice per
direction: once relayed by its neighbour (the *direct* link) and once from the
node before that (the *skip* link). Two mechanisms follow from that wiring:

* **Self-checking relaying.** A relaying node compares the copy its neighbour
  relayed with the copy from one node further back. If they differ, the frame is
  passed on with its *integrity flag* cleared, so a node that corrupts data
  cannot pass it off as good.
* **Path reconstruction.** When a node or link is missing, the skip link jumps
  over the gap, so the frame still travels on. A node that only gets one copy
  forwards that copy.

The receiving node collects the result of both ring directions and outputs the
data word together with an integrity flag that is 1 only when both directions
delivered a valid, identical copy.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The top,
`brain_ring`, holds eight `brain_node`s plus fault-injection inputs, and
reproduces the published fault-injection results: with node 1 sending to
node 5, every one of the 24 tested sets of one to four halted nodes gives
the published success or failure.

## The ring and its links

Nodes have IDs 1..8 (array index = ID − 1). For node *i*:

| link          | from node | carries            |
|---------------|-----------|--------------------|
| `rxd_cw_d`    | i − 1     | clockwise, direct  |
| `rxd_cw_s`    | i − 2     | clockwise, skip    |
| `rxd_ccw_d`   | i + 1     | counter-clockwise, direct |
| `rxd_ccw_s`   | i + 2     | counter-clockwise, skip   |

A node has one transmitter per direction, and its line is wired to both the
next node (direct) and the one after it (skip). Links are single-ended logic
lines that idle at 1. The differential line drivers and level shifters of a real
board sit outside this RTL.

## Frames and the mode selection identifier

Every link carries four-byte frames. Each byte goes out as a 10-bit character:
a start bit 0, eight data bits (bit 7 first) and a stop bit 1:

| byte | content |
|------|---------|
| 0 | mode selection identifier: `[7:4]` target node ID, `[3:0]` relaying number |
| 1 | data word `[15:8]` |
| 2 | data word `[7:0]` |
| 3 | integrity flag (`8'h01` valid, `8'h00` invalid) |

The sender writes relaying number 1. Every relaying node adds one. When a node
sees an identifier, `mode_select` sets its mode:

* target ID = own ID → **receiving** (this has priority);
* relaying number 1 → **primary relaying**: the frame came straight from the
  sender, so there is nothing to check it against. The node forwards it as
  received, with the number incremented;
* anything else → **checking-relaying**.

## Inside a node

```
 rxd_cw_d ─ frame_rx ─┐                              ┌─ frame_tx ─ txd_cw
 rxd_cw_s ─ frame_rx ─┴─ relay_channel (clockwise) ──┤
                                                      └──────────┐
 rxd_ccw_d ─ frame_rx ─┐                             ┌─ frame_tx ─ txd_ccw
 rxd_ccw_s ─ frame_rx ─┴─ relay_channel (ccw) ───────┤            │
                                                      └─ rx_combine ─ rx_valid/data/flag
```

* `frame_rx`: `serial_rx` (serial to parallel) followed by byte
  assembly. Bytes 1 and 2 go through `byte_join` (8 to 16 bits).
* `frame_tx` sends the data word through `word_split` (16 to 8 bits), then
  each byte through `serial_tx` (parallel to serial).
* `relay_channel`: the checking and relaying logic of one direction (below).
* `rx_combine` merges the two directions at the receiver.

### The checking-relaying channel (the part to read carefully)

Traffic is organised in **slots**. The network schedule is outside this RTL. It
pulses `slot_start` for all nodes at once, and at that pulse the scheduled
sender raises `send_req`. The sender then transmits `{dst, 1, data, flag=1}` in
both directions, and its own channels sit out the slot.

During a slot a channel accepts at most one frame from each of its two links:

1. The first frame to arrive starts a wait timer.
2. The channel decides at the first of these events:
   * both copies are in;
   * the direct copy has relaying number 1 (primary relaying, no second copy to
     wait for);
   * `WAIT_CLKS` clocks (two frame times by default) have passed.
3. `mode_select` reads the identifier of the direct copy, or of the skip copy if
   that is the only one.
4. In checking mode with two copies, `data_check` compares the data words. The
   forwarded frame carries the direct copy's data, with flag =
   `direct.flag & skip.flag & (direct.data == skip.data)`.
   With one copy, that copy goes on with its own flag: this is the
   reconstruction path.
5. In receiving mode the same result goes to `rx_combine` instead of the
   transmitter.
6. The channel then ignores its links until the next `slot_start`. Frames keep
   travelling past the receiver and round the ring, and this is what stops them.

Timing when nothing has failed: a hop takes one frame time (40 bit times) plus a
few clocks. A checking node gets the skip copy one hop before the direct copy,
so it waits about one frame time. From 1 to 5 the end-to-end latency is about
4 frame times (837 clocks at the defaults).

A missing copy makes each affected node wait `WAIT_CLKS`. With several failures
in a row, a copy can arrive after its node has already decided on the single
copy. In that case the late copy is ignored.

### Receiving

`rx_combine` waits for one result per direction. With both in, it outputs the
word, and the flag is set only if both results carry a set flag **and** their
words are equal. The word given is that of a direction whose flag is set (the
clockwise one if both or neither are). If the slot ends with only one direction
delivered, that word is output at `slot_start` with the flag cleared. If nothing
arrived at all, nothing is output.

Requiring both directions is how this design reads the published fault table:
every tested fault set that leaves the receiver reachable from one side only is
reported there as a failure. This also means a node that sends wrong data is
*detected* (flag 0), not masked.

## The building blocks

* **`data_check`**: 16-bit equality check `aeqb = (a == b)`. It is laid out
  for 6-input LUTs: six groups of three bit pairs (one LUT6 each), then an AND
  of the six group results (a seventh LUT6). The result is registered, so
  `aeqb` belongs to the inputs at the previous rising edge.
* **`serial_rx`**: waits for the falling edge of a start bit. It then counts
  `CLKS_PER_BIT` clocks per bit, samples each bit in the middle and shifts it
  in. After the stop bit it outputs the byte for one cycle in both bit orders:
  `data_msb` takes the first bit as bit 7, `data_lsb` as bit 0. A stop bit of 0
  drops the character and pulses `frame_err`. The input has a two-flip-flop
  synchroniser.
* **`serial_tx`**: loads `{stop, data, start}` into a 10-bit shift register
  and shifts one bit per bit time. `txd_msb` sends bit 7 first, `txd_lsb` bit 0
  first. `ready` is already high in the last clock of the stop bit, so a byte
  stream runs at exactly 10 bit times per byte: 1 µs at 10 Mbit/s.
* **`byte_join`**: a two-state machine. State 0 stores a valid byte. State 1
  outputs `{stored, new}` for one cycle with `out_valid`. Only cycles with
  `in_valid` count, so a byte held on the input is not taken twice. `clear`
  realigns it.
* **`word_split`**: latches a word and outputs its high byte, then its low
  byte in the next cycle. A word that arrives during a split waits in a one-word
  holding register, so two words offered back to back come out as four bytes in
  four consecutive cycles.
* **`mode_select`**: the combinational identifier decode described above.
  It has one-hot outputs `mode1`/`mode2`/`mode3` (primary, checking, receiving)
  and the forwarded identifier.
* **`brain_pkg`**: the frame struct, the identifier struct and the mode enum.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_NODES` | 8 | `brain_ring` | nodes in the ring |
| `CLKS_PER_BIT` | 5 | ring, node, converters | system clocks per serial bit. At 50 MHz this gives 10 Mbit/s |
| `WAIT_CLKS` | 400 | `brain_node`, `relay_channel` | how long a checking node waits for the second copy (2 frame times) |
| `OWN_ID` | 5 | `brain_node`, `mode_select` | node ID. `brain_ring` sets 1..8 |
| `WIDTH` | 16 | `data_check` | compared word width |

## Fault injection (top-level ports)

* `node_halt[i]` models a powered-down node: it is held in reset and its lines
  stay at idle.
* `node_err[i]` makes the node send every data word inverted, so 0x00FF
  becomes 0xFF00.
* `cut_cw_d[i]`, `cut_cw_s[i]`, `cut_ccw_d[i]` and `cut_ccw_s[i]` each hold one
  link leaving node *i* at idle.
* `ev_valid/ev_mode/ev_copies/ev_match` report every channel decision: which
  mode, which copies were present, and whether they matched.

End-to-end results at the default parameters (node 1 sends 0x00FF to node 5):

| halted nodes | result |
|--------------|--------|
| any single one of 2, 3, 4, 6, 7, 8 | flag 1 |
| 2/8, 2/7, 2/6, 3/7, 3/6, 4/6 | flag 1 |
| 2/6/8, 3/6/8 | flag 1 |
| 2/6/7, 2/7/8, 3/6/7, 3/7/8 | flag 0 (one direction only) or nothing |
| 2/4/6/8 | flag 1 |
| 2/3/6/7, 2/3/6/8, 2/3/7/8, 2/4/6/7, 3/4/6/7 | flag 0 or nothing |
| data error at 2, 4 or 6 | flag 0 |
| cut links leaving 1, 3 and 7 | flag 1 |

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_brain_ring` runs the
whole network at its default parameters. It covers the table above and counts
every mechanism (primary relaying, checking with agreeing and with differing
copies, lone-copy relaying, receiving, each fault kind); a mechanism that never
occurs counts as a failure. It simulates in under a second.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/brain_pkg.sv tb/tb_brain_ring.sv --top-module tb_brain_ring -Mdir obj -o sim
./obj/sim
```

Swap in another `tb_<block>.sv` and its top module for the unit tests:
`tb_data_check`, `tb_serial_rx`, `tb_serial_tx`, `tb_byte_join`, `tb_word_split`,
`tb_mode_select`, `tb_brain_node`. `tb/line_drv.sv` and `tb/line_mon.sv` drive
and decode serial frames at bit level. They work independently of the design's
own converters.

## What comes from the published design and what is this design's own

Taken from the published design:
* the braided ring of eight nodes with direct and skip links;
* primary, checking and receiving modes;
* the 8-bit identifier (4-bit target ID, 4-bit relaying number, sender writes 1,
  each relay adds one, own ID wins);
* the 16-bit two-stage LUT equality check with a clocked result;
* 10-bit serial characters, 10 Mbit/s and two bit orders;
* the two-state 8↔16-bit conversion with a latch against overwrite;
* the fault scenarios and their outcomes.

This design's own choices, where the published description is silent:
* the frame byte order and the flag byte;
* the slot interface standing in for the time-triggered protocol controller;
* the per-slot, relay-once behaviour and the `WAIT_CLKS` timeout;
* the AND of the flags;
* forwarding the direct copy;
* the rule that both directions must agree;
* the 50 MHz system clock (`CLKS_PER_BIT` = 5);
* synchronous active-low reset;
* the synchroniser and framing check;
* the fault-injection ports.

Not included:
* the time-triggered protocol controller and its schedule: drive `slot_start`
  and `send_*` yourself;
* the differential line interface, level shifters, power supply and
  configuration flash of the node board;
* the host serial port used to display results.
