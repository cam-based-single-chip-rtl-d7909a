# CAM-controlled shared buffer ATM switch

A shared buffer switch keeps the cells of all its ports in one memory. The usual way to keep
track of which cell belongs to which output is a set of linked lists: every stored cell carries
the address of the next cell for the same output, and a FIFO of idle addresses hands out free
words. This design replaces all of that address bookkeeping with a content-addressable memory
(CAM) beside the buffer:

* every buffer word has a **tag**: the output port (or multicast connection) of the cell held
  there and a **sequence number**, plus a **valid** bit;
* to store a cell, the switch takes the queue's *write* sequence number, searches the CAM for the
  first word whose valid bit is clear, writes the tag there and the cell into the buffer, and
  increments the write number;
* to send a cell, it takes the queue's *read* sequence number, searches the CAM for the tag
  {port, read number}, reads the matching buffer word, frees it, and increments the read number.

The buffer never sees an address. The CAM drives one-hot word lines straight into the buffer, so
there is neither an address decoder nor an encoder. A queue is empty when its read number has
caught up with its write number, and its length is their difference. On top of this scheme the
switch adds multicast with a single stored copy per cell, serial-to-parallel and
parallel-to-serial memories at the pins in place of cell-wide buses, discarding of cells that
have waited too long, and, optionally, delay priorities and a CLP=0/CLP=1 split of the buffer.

The RTL is synthesizable SystemVerilog. `atm_switch` is the top. By default it is a 16x16 switch
with 256 cells of 424 bits (one whole 53-byte cell per memory word).

## Block map

```
      in_data (8 pins per port) + routing side-band
                          |
                       sp_ram  (serial word + parallel word per input port)
                          |
                     write_ctrl ----------- seq_ram u_ws  (write seq # per queue)
                      |      \              seq_ram u_wms (write seq # per MCI)
                      |       \
      tag_cam  <------+        +--------> buffer_ram (256 x 424)
     (tag,valid,class) <-- cell_aging           | bit lines
          ^                                     v
          |                                  psram ---> out_data (8 pins per port)
      read_ctrl ------------ seq_ram u_rs  (read seq # per queue)
       ^     \               seq_ram u_rms (read seq # per MCI)
       |      \
   rr_sched    mc_cam (destination ports of every multicast connection)
```

| module | role |
|---|---|
| `atm_pkg` | default sizes, slot-kind enum |
| `tag_cam` | tag, valid and class bit of every buffer word; empty search, tag search, free |
| `buffer_ram` | the cells, addressed by one-hot word lines |
| `seq_ram` | sequence-number register file (four instances) |
| `sp_ram` | serial-to-parallel input memory |
| `write_ctrl` | input round-robin and write pipeline |
| `rr_sched` | output round-robin with a rotating multicast slot |
| `read_ctrl` | read pipeline: queue choice, multicast release, tag search, cell read |
| `mc_cam` | multicast CAM (McCAM) |
| `psram` | parallel-to-serial output memory |
| `cell_aging` | age of every buffered cell; discards cells past the latency limit |
| `atm_switch` | top |

## Tags and sequence numbers

A tag is `{mc, level, id, seq}`:

| field | unicast cell | multicast cell |
|---|---|---|
| `mc` (1 bit) | 0 | 1 |
| `level` (PRIO_W bits, at least 1) | delay priority level | 0 |
| `id, seq` (11 bits by default) | output port (4) + sequence number (7) | MCI (6) + sequence number (5) |

The unicast and multicast identifiers share the same 11 bits (`MCI_W + MSEQ_W` must equal
`log2(N_PORTS) + SEQ_W`, which is checked at elaboration). The `mc` bit keeps a unicast tag from
colliding with a multicast tag that has the same bits.

Each queue has a write number (in `u_ws`/`u_wms`) and a read number (in `u_rs`/`u_rms`), all
zero after reset. Queues are:

* unicast: one per (output port, delay level), `N_PORTS * N_PRIO` of them;
* multicast: one per multicast connection identifier (MCI), `2**MCI_W` of them.

Sequence numbers wrap. A tag must stay unique, so a queue may hold at most `2**SEQ_W - 1` cells
(31 for a multicast queue). A cell that would exceed this is dropped, and so is a cell that finds
no empty word. In both cases `in_taken` still takes it and `ev_drop_full` or `ev_drop_nobuf`
pulses.

## Timing: the two pipelines

The buffer and both CAM ports are dual-ported. Every clock one write and one read make progress.

**Write** (`write_ctrl`). The input ports are served round-robin, one port per clock.

| stage | work |
|---|---|
| W1 | read WS of the cell's queue; check the queue is not full; search the CAM for the first empty word (of the cell's CLP class); write tag + valid into it; write WS+1 back |
| W2 | write the cell into the buffer word on the same word line |

**Read** (`read_ctrl`). One round-robin slot per clock.

| stage | work |
|---|---|
| R1 | choose what to read (see below); form the tag from the read number; write the number + 1 back |
| R2 | search the CAM for the tag; free the matching word at the clock edge |
| R3 | the word line reads the cell onto the bit lines. The first word in the PSRAM of every destination port latches it |

The write number, the tag and the valid bit all change at the end of W1. So a read that sees the
new write number finds the tag one clock later. The word freed at the end of R2 may be reused by
a write at once: the new cell reaches the buffer at the end of W2, one clock after R3 has already
read the old one.

In the published pipeline the sequence number is read in one stage and incremented in the next.
Here both happen in R1. The effect is the same, and back-to-back slots need no forwarding.

## Output round-robin and multicast release

This is the part of the design that takes the most thought.

**Schedule** (`rr_sched`). A round-robin cycle has one slot per output port plus one multicast
slot. If the multicast slot were always first, multicasts could starve unicasts. If it were
always last, multicasts would never find a free port. So it moves down one slot per cycle,
through every slot except the last. The unicast order also rotates, so that no port is always
served last. With `c` the cycle number and `N` the port count:

```
multicast slot     = c mod N
first unicast port = (c + floor(c / N)) mod N,   then increasing ports in the other slots
```

For N=8 this gives, for example, cycle 0 = `mc 0 1 2 3 4 5 6 7`, cycle 1 = `1 mc 2 3 4 5 6 7 0`
and cycle 8 = `mc 1 2 3 4 5 6 7 0`. The testbench checks ten cycles of this 8x8 schedule, entry
by entry.

**Occupied ports.** An output port can take only one cell per round-robin cycle. `read_ctrl`
keeps an `occupied` mask, cleared at slot 0 of every cycle.

* A unicast slot whose port is already occupied is skipped (`ev_occ_skip`).
* Otherwise the slot takes the highest non-empty delay level of that port (level 0 first).
* A port with nothing queued stays free.

**Multicast slot** (`mc_cam`). Bit *p* of a McCAM word is 1 when port *p* belongs to that
connection. The words are written at call set-up through `cfg_mc_*`. In the multicast slot the
McCAM is searched:

* Every free port is a "don't care". Every occupied port is a 0.
* A stored 1 facing a 0 is a miss: that cell could not reach all of its ports in this cycle.

Only connections with a waiting cell take part. Among the hits, a rotating priority encoder
picks one. It starts just after the connection granted last, for fairness. The chosen cell is
read **once**, and in R3 it is latched into the first PSRAM word of every destination port at
the same time. Those ports then count as occupied. Example with 8 ports:

```
search word (port 7..0):  0 X 0 0 X X 0 X
MCI0  0 0 1 1 1 1 0 0   miss (ports 5, 4 occupied)
MCI1  0 1 0 0 0 0 0 1   hit  -> released to ports 6 and 0
MCI2  0 0 0 0 1 1 1 1   miss (port 1)
MCI3  0 1 0 1 0 1 0 1   miss (port 4)
```

`ev_mc_block` pulses when multicast cells are waiting but every one of them misses.

## Parallel-to-serial output (PSRAM)

A cell-wide bus from the buffer to 16 output ports would be 424 bits wide. Instead, every output
port owns two cell-wide words that sit directly on the buffer bit lines:

* The **first word** latches the bit lines when its port is selected in R3. A multicast selects
  several ports at once.
* One clock after the R3 stage of the last slot of a round-robin cycle, `xfer` copies every first
  word into its **second word**, all ports at once.
* During the next cycle, each second word drives its port's pins. It sends `PIN_W` bits per
  clock, bits `0..7` first, then `8..15`, and so on. All ports send in the same clocks.

The double buffering means no port waits for another. A cell therefore leaves the pins in the
round-robin cycle after the one in which it was read. `out_sop` marks the first group of a cell
and `out_valid` every group.

**Clocking.** The whole design runs on one clock, so the pins run at the core clock. A 424-bit
cell needs 53 clocks on 8 pins. The top therefore stretches the round-robin cycle to
`RR_LEN = max(N_PORTS+1, ceil(CELL_BITS/PIN_W)) = 53` clocks: 17 read slots followed by 36 idle
slots. The writes keep their rate of one per clock. In the source design the pads run about
3.3 times faster than the memory, so the cycle is only 17 clocks and the aggregate throughput is
three times higher. Reaching that would need a separate pad clock and a clock-domain crossing at
`xfer`, which this RTL does not have.

## Serial-to-parallel input

The input side mirrors the output side. Every input port owns two cell-wide words that sit on
the write bit lines of the buffer:

* The **serial word** collects a cell from the port's `PIN_W` pins, one group per clock in which
  `in_valid` is high, bits `0..7` first. `in_sop` marks the first group. The routing side-band
  (`in_mc`, `in_dest`, `in_prio`, `in_clp`) is sampled with that first group only.
* When the last group arrives, the cell and its routing move to the **parallel word**. The write
  pipeline reads it there when the input round-robin reaches the port. `in_taken` pulses in
  that clock.

A cell needs 53 clocks on the pins, and the round-robin visits each port every 16 clocks. The
parallel word is therefore always free before the next cell is complete, even when cells arrive
back to back. If it were still full, the new cell would be lost and `in_overrun` would pulse.
Idle clocks (`in_valid` low) are allowed between cells and inside a cell.

## Optional features: delay priority and CLP split

Both are off in the default configuration. Turn them on with parameters.

* **Delay priority** (`N_PRIO`, for example 4). Every port gets `N_PRIO` unicast queues, each
  with its own write and read numbers. A unicast slot serves the lowest-numbered level that is
  not empty.
* **CLP split** (`CLP1_WORDS`). Every CAM word gets a class bit. A cell with CLP=0 may take only
  a class-0 word, and a CLP=1 cell only a class-1 word. After reset the last `CLP1_WORDS` words
  are class 1. Network control can move any word between the classes at run time through
  `cfg_cls_*`. With `CLP1_WORDS = 0` the class bits are ignored and all words are shared.

Neither of these two features is in the default because the default memory budget matches a 16x16 chip whose
memory adds up to 127,072 bits. That total has room for multicast and the PSRAM but not for
replicated sequence numbers or an extra tag bit.

## Cell aging

Dense buffers are dynamic memories, but a DRAM cell holds its charge for milliseconds, far
longer than any cell may usefully wait in a switch. So the buffer needs no refresh, only a way
to throw away cells that have grown too old. `cell_aging` keeps a small age counter per buffer
word:

* A write into the word (the tag CAM write) clears its age.
* The age grows by one every round-robin cycle while the word holds a cell.
* When it reaches `AGE_LIMIT`, the word is freed through the same invalidate port that reads use.

The discarded cell is still counted in its queue, because the write sequence number has moved
past it. When the read pipeline later asks for its tag, the search misses. That slot loads no
output port and frees nothing, and `ev_tag_miss` pulses. The read number has already advanced,
so the queue simply continues with its next cell. A multicast cell is discarded for all its
ports at once.

`AGE_LIMIT` defaults to 255 cycles, about 135 us at 100 MHz. Only under sustained overload,
such as a long-blocked multicast queue, does a cell wait that long. Setting it to 0 removes
aging.

## Parameters (`atm_switch`)

| parameter | default | meaning |
|---|---|---|
| `N_PORTS` | 16 | input and output ports (power of two) |
| `N_CELLS` | 256 | buffer words |
| `CELL_BITS` | 424 | bits per cell |
| `SEQ_W` | 7 | unicast sequence number width |
| `MCI_W` | 6 | multicast connection identifier width (64 connections) |
| `MSEQ_W` | 5 | multicast sequence number width |
| `N_PRIO` | 1 | delay priority levels |
| `PIN_W` | 8 | input pins and output pins per port |
| `CLP1_WORDS` | 0 | words reserved for CLP=1 after reset (0 = no split) |
| `AGE_LIMIT` | 255 | latency limit in round-robin cycles (0 = no aging) |

Memory at the defaults: buffer 108,544 bits; tag CAM 256 x 16 = 4,096 bits (tag, valid and class
bits); sequence numbers 224 + 640 bits; McCAM 1,024 bits; PSRAM 13,568 bits. That is
128,096 bits, about the 127,072 bits budgeted for the chip. The input memory adds another
13,568 bits and the age counters 2,048 flip-flops.

## Interface of `atm_switch`

* **Inputs, per port**:
  * `in_data` (`PIN_W` bits), `in_valid` and `in_sop`: the cell, one bit group per clock.
  * `in_mc`: 0 for unicast, 1 for multicast.
  * `in_dest`: the output port in its low bits for a unicast cell, or the MCI for a multicast
    cell.
  * `in_prio` and `in_clp`.

  The last four are sampled with `in_sop`. They come from header translation in front of the
  switch.
* **Input status, per port**: `in_taken` (the assembled cell went to the write pipeline, stored
  or dropped) and `in_overrun` (a completed cell was lost).
* **Outputs, per port**: `out_data` (`PIN_W` bits), `out_valid` and `out_sop`.
* **Control**:
  * `cfg_mc_we`, `cfg_mc_mci` and `cfg_mc_ports` write a McCAM word.
  * `cfg_cls_we`, `cfg_cls_addr` and `cfg_cls_val` set the class of one buffer word.
* **Status**: `buf_used` (cells held), plus one-clock event pulses:
  * `ev_stored`, `ev_drop_full`, `ev_drop_nobuf`
  * `ev_uni`, `ev_mc`, `ev_low_prio`, `ev_occ_skip`, `ev_mc_block`
  * `ev_tag_miss` (a read found its cell discarded for age) and `ev_aged` (number of cells discarded in this clock).

Reset (`rst_n`) is asynchronous and active low. It clears the sequence numbers, the valid bits,
the McCAM and the pipelines.

## Where this RTL departs from, or adds to, the source design

* The extra `mc` tag bit, and a priority field that is at least 1 bit wide, even when there is
  only one level.
* The drop rules (queue sequence numbers exhausted, or no empty word in the class).
* Multicast connections without a waiting cell are kept out of the McCAM search.
* Sequence numbers are read and incremented in the same stage (R1).
* A single clock domain, so the round-robin cycle is 53 clocks at the defaults (see above).
* Only one multicast slot per cycle. Selectable multicast-to-unicast ratios are not built.
* The routing of an input cell arrives on side-band pins with its first bit group.
* Aging is built, but the buffer itself is modelled as ordinary storage. The limit, the time
  base and the handling of a discarded queue head are this design's choices.
* The "push-out" class shared by CLP=0 and CLP=1 cells is not built, and neither is a
  call-splitting alternative to the one-shot multicast.
* Pads, header translation and usage parameter control are outside this design.
* The full-custom CAM and RAM arrays are modelled as flip-flop arrays with parallel comparators.
  A real implementation would replace `tag_cam`, `buffer_ram`, `mc_cam` and `psram` with
  memory macros that have the same ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.

| testbench | what it checks |
|---|---|
| `rr_sched_tb` | all 90 entries of the 8x8 sample schedule; 16-port cycles with idle padding |
| `mc_cam_tb` | the 8-port example above; rotation; pending qualifier; random 64x16 against a model |
| `tag_cam_tb` | first-empty order, classes, search, free, reuse, class moves; random 256-word model |
| `buffer_ram_tb` | 256x424 random writes and reads on one-hot lines |
| `seq_ram_tb` | random writes against a model, both sizes |
| `sp_ram_tb` | cell and routing assembly with gaps, release order, overrun when held, back-to-back cells |
| `psram_tb` | 53-clock serial output, bit order, multicast loads, load during transfer |
| `write_ctrl_tb` | every clock against a model: port served, tag, word line, sequence number, drops |
| `cell_aging_tb` | expiry exactly `AGE_LIMIT` ticks after a write, reads first, reuse of expired words |
| `read_ctrl_tb` | scripted slots: priority choice, skips, multicast release and blocking, R2/R3/xfer timing |
| `atm_switch_tb` | end to end at 4 ports / 16 cells / 2 levels / CLP split / 10-cycle aging, with a scoreboard |
| `atm_switch_full_tb` | the same end-to-end test with every parameter at its default |
| `atm_switch_rate_tb` | default size, every input sending back to back in a rotating permutation: each output must send in every clock of a 60-cycle window; no drops; order and content |

In the end-to-end tests every delivered cell must be the head of one of its port's expected
queues, with the right content. Cells ahead of it may be missing only if aging discarded them.
There can be no more missing cells, and no more tag misses, than cells aged out, and a missing
cell may never appear later. Every queue must drain, and each mechanism must occur at least
once:

* unicast and multicast reads, and multicast fan-out to several ports;
* service from a lower level (when `N_PRIO > 1`);
* a slot given up to a multicast, and a multicast held back;
* both drop causes;
* CLP=1 storage, and a class move (when `CLP1_WORDS > 0`).
* cells discarded for age and the resulting tag misses (when `AGE_LIMIT` is small).

The first cell must cross an empty switch within two round-robin cycles after it is assembled,
and no input may ever be overrun.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/atm_pkg.sv tb/atm_switch_full_tb.sv --top-module atm_switch_full_tb
./obj_dir/Vatm_switch_full_tb
```

The full-size end-to-end run takes well under a minute. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/atm_pkg.sv rtl/atm_switch.sv`. Some warnings
remain:

* `SYNCASYNCNET`: the reset is also used in the assertions' `disable iff`.
* `PINCONNECTEMPTY`: two unused status outputs are left open.
