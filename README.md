# Message Queues Memory: a packet buffer with priority queues for IPSec accelerators

A flow-through IPSec accelerator sits on the data path. Every packet passes
through it, waits in a buffer, and is then fed block by block to a
cryptographic unit. Here that unit is an HMAC-SHA2 hasher. To give some
traffic better service than the rest, the buffer has to keep one queue per
priority level. The usual way to do that is to give each queue a fixed
region of memory. That wastes space when the traffic mix shifts, and packets
of very different sizes fragment the memory.

The Message Queues Memory (MQM) avoids both. The main memory is cut into
blocks of 16 words of 32 bits, which is one 512-bit SHA-256 block. A queue is
a linked list of such blocks. The link to the next block is not kept in a
separate table. It is stored one bit per word, in a 33rd bit added to every
word of the block. Free blocks are kept as a stack of addresses. Any free
block can join any queue, so no queue has a fixed share of memory and the
memory never fragments. The extra hardware is small:

- one extra bit per word;
- a free-address memory of 1/32 of the data memory;
- eleven registers.

This repository holds synthesizable SystemVerilog for the whole buffer. That
covers the padder in front of it, the storage, the free-block stack, the
write and read control, the scheduler and the packet-dropping logic. The
hasher itself is not included: its block interface is brought out as ports.

## Block diagram

```
 message ──► padder ──► write_unit ──────────► main_memory ──► read_unit ──► out_* (to hasher)
               P_in,nb    │  W0..W2, W'          2^14 blocks     │ R0..R2, R'   ◄── hash_req
                          │  discard_policy      x16 words       │
                          │                      x(32+1) bits    │
                          ├── pop ◄── address_memory (LIFO) ◄── push ──┤
                          │                                            │
                          └── +nb ──► block_counters N0..N2 ◄── -1 ── priority_manager
```

| Module | Role |
|---|---|
| `mqm_top` | wires everything together; top level |
| `padder` | cuts messages into 16-word blocks and pads the last one; gives the priority `P_in` and the packet length in blocks `nb` |
| `write_unit` | registers W0..W2 and W'; runs the initial phase, the drop decision, block stores and the `N_p += nb` update |
| `discard_policy` | combinational accept/drop decision (inside `write_unit`) |
| `main_memory` | MM: 2^14 blocks x 16 words x 33 bits, with the in-block word counters; one write and one read port |
| `address_memory` | AM: LIFO of free block addresses |
| `block_counters` | N0..N2: blocks stored and not yet read, per queue |
| `priority_manager` | PM: proportional round robin that picks the queue to read |
| `read_unit` | registers R0..R2 and R'; reads blocks and returns freed addresses |
| `mqm_pkg` | shared constants, the policy enum and the link-field struct |

## How a queue is linked

### Registers

For each queue `p` there are two address registers:

- `W_p` points to the block that the next arriving block of queue `p` will
  fill. That block is always reserved already: it is empty, and it sits at
  the tail of the queue.
- `R_p` points to the oldest unread block of the queue. Queues are FIFOs.

Two more registers, `W'` and `R'`, each hold a 16-bit *link field*:

```
bit 15   first  - this block is the first of its packet
bit 14   last   - this block is the last of its packet
bits 13..0      - address of the next block in the same queue
```

### Storing a block of priority p

1. **Load (1 clock).** The next free address is popped from AM. It goes into
   `W'` together with the block's first/last flags.
2. **Write (16 clocks).** Word `k` is written at `{W_p, k}`. Its 33rd bit is
   bit 15 of `W'`. Then `W'` rotates left by one bit. After 16 words every
   link bit is in memory and `W'` is back to its loaded value.
3. **End of block.** The address part of `W'` is copied into `W_p`. The block
   just popped is now the reserved tail of the queue.
4. **End of packet.** When the packet's last block is in memory, `nb` is added
   to `N_p`. Nothing is counted before then, so the read side never sees a
   half-written packet.

### Reading a block of queue p

1. `R_p` addresses the memory for 16 clocks. The in-block counter inside
   `main_memory` steps through words 0 to 15.
2. As each word comes back, its 33rd bit is shifted into `R'` from the right.
   After word 15, `R'` holds the block's link field.
3. `R_p` takes the next address from `R'`.
4. The address of the block just read is pushed back to AM.

### Initial phase

Right after reset, the write side pops one address per queue into
W0..W2. The read side then copies them into R0..R2. These are the reserved
first blocks. A queue that is never used keeps its one block: this is the
only memory tied to a level. With 2^14 blocks, 16,381 are free for packets.

### How an address travels

An address cycles through the design like this:

AM → W' → W_p → (written into the previous block's link bits) → R' → R_p → AM.

The same address may come back to a different cell of AM.

## The free-address stack (AM)

AM is a LIFO with a single up-down counter `ptr`, which acts as two
pointers:

- The output pointer O = `ptr` is the cell handed out next.
- The input pointer I = `ptr - 1` is the cell a returned address is written
  to.

| Operation | Effect |
|---|---|
| pop | reads cell `ptr`, then `ptr + 1` |
| push | writes cell `ptr - 1`, then `ptr - 1` |
| pop and push in the same clock | writes the returned address into the cell just emptied; `ptr` stays |

When nothing is free, O is inactive (`head_valid = 0`). When AM is full, I
is inactive.

After reset, AM is full and cell `i` holds address `i`, so addresses come
out as 0, 1, 2, and so on. The array is not cleared at reset. A register
`hw` remembers how far the array has ever been written. A cell at or above
`hw` has never been written, and reading it returns its own index. This
means no 16K-clock fill sequence is needed.

## Scheduling the read side

`priority_manager` runs a proportional round robin:

- In each round, level `p` may send up to `SLOT_BASE*(p+1)` blocks. With the
  defaults that is 10, 20 and 30 blocks.
- Levels are visited from the highest down: 2, 1, 0, then 2 again.
- A level is left when its quota is used up or it has nothing stored.
- Empty levels are skipped.
- The queue only changes between packets. Once the first block of a packet
  is granted, the rest of that packet follows, even past the quota. A single
  hasher context is then enough. The quota can be overrun by less than one
  packet.

The read side raises a request when the hasher asks for a block
(`hash_req`). The grant arrives in the same clock. On the grant, PM
decrements `N_p` of the chosen queue.

## Dropping packets under load

Before a packet's first block is stored, `discard_policy` decides whether to
keep the packet. Let `C = 2^14` blocks and `P = 3` levels.

A packet that needs more blocks than AM has free is always dropped. On top of
that, `mode` selects one of three policies:

| `mode` | Policy | Also drops when |
|---|---|---|
| 0 | unconditional | never: only the fit test applies, whatever the level |
| 1 | proportional | `N_p > f_p*C`, with `f_p = (p+1)/(1+2+...+P)`, i.e. 1/6, 2/6, 3/6 |
| 2 | uniform | `N_p > C/P` |

The tests compare the blocks already queued at that level, without the new
packet. They are done in integer form: `N_p*P(P+1)/2 > (p+1)*C`.

What the policies do to throughput is the point of the design. Under the
unconditional policy, the low levels get fewer read slots, so their queues
grow until they fill the memory. From then on, every level is dropped alike
and every level gets about the same throughput. Capping each level's share
of memory keeps room for the higher levels, and throughput then rises with
the level. `tb/mqm_trace_tb.sv` reproduces this (see below).

## Interfaces and timing (`mqm_top`)

All handshakes are valid/ready or level requests. Reset is synchronous and
active low.

| Port | Meaning |
|---|---|
| `msg_valid`, `msg_ready`, `msg_data[31:0]` | message words |
| `msg_len[15:0]`, `msg_prio[1:0]` | length in words (at least 1) and priority; sampled with the first word of a message |
| `mode` | discard policy; change it only between packets |
| `hash_req` | the hasher can take one 16-word block at one word per clock |
| `out_valid`, `out_data`, `out_word`, `out_eob` | block words to the hasher; `out_eob` marks word 15 |
| `out_first_blk`, `out_last_blk` | valid with `out_eob`; `out_last_blk` is the "last block" signal that ends a packet for the hasher |
| `out_prio` | level of the block being sent |
| `ready` | the initial phase is over |
| `pkt_stored`, `pkt_dropped`, `pkt_prio` | one pulse per packet decision |
| `n_cnt[3]` | the N registers |
| `free_cnt` | free blocks in AM |

**Padding.** The padder applies SHA-256 padding to the message words: a word
`32'h8000_0000`, zero words, then the 64-bit message length in bits in the
last two words. So `nb = ceil((len+3)/16)` blocks. Without stalls, the padder
emits 16 words per block and loses no cycle between packets.

**Cycle costs.** A stored block takes 17 clocks: 1 load and 16 writes. A
dropped block takes 16. A read block takes 18 clocks from one grant to the
next. Memory reads have one clock of latency. Writing and reading go on at
the same time, through the two ports of `main_memory`.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `BLK_AW` | 14: 2^14 blocks, 1 MiB of data, 18-bit word address | `mqm_top` and the units below it |
| `NUM_PRIO` | 3 | number of levels |
| `SLOT_BASE` | 10: quota `SLOT_BASE*(p+1)` blocks per round | `mqm_top`, `priority_manager` |
| `LEN_W` | 16: message length field in words | `mqm_top`, `padder` |

The link field has 14 address bits, so `BLK_AW` can be at most 14. The
registers are only as wide as they need to be: 14 bits for W/R and 15 bits
for N.

## What is this design's own choice

The following follow the architecture:

- the block organisation;
- the 33rd link bit, filled from a left-rotating `W'` and collected in `R'`;
- the W/R/N registers and the initial phase;
- the LIFO with one up-down counter;
- the three drop policies and `f_p`;
- the 10*(p+1) round-robin quota.

These were filled in here:

- **Address width.** The description of the architecture gives both a
  16-bit block address inside a 20-bit word address, and a capacity of 2^14
  blocks (1,048,576 bytes). The RTL uses 2^14 blocks, because only 14 of the
  16 link bits are left for the next address.
- **Link field layout.** The flags are in bits 15 and 14; bit 15 is stored in
  word 0.
- **SHA-256 padding** in the padder, and word-granular messages that carry
  their length up front.
- **Counting.** `N_p += nb` happens at the end of the packet, not at its
  start.
- **Round-robin details.** The visiting order, the skipping of empty levels
  and the packet-boundary rule in PM.
- **Memory ports.** A dual-port main memory with one-clock reads.
- **Same-clock pop/push rule** and the lazy initialisation of AM.
- **Handshakes and clock-by-clock timing** everywhere.

These are not built:

- the hasher;
- a FIFO variant of AM, which is an alternative to the LIFO;
- a 34th bit per word to reach more memory;
- jumbo packets: 4 GB packets do not fit a 2^18-word memory or a 16-bit
  length field.

## Testbenches

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `padder_tb` | 300 random messages with stalls on both sides; every word, the flags, nb; 16 clocks per block |
| `main_memory_tb` | all blocks written in shuffled order, then reads running alongside writes; data, 33rd bit, counters, end-of-block, latency |
| `address_memory_tb` | a 16-entry stack: the pop/return example, empty and full states, 3000 random pop/push/both cycles against a model |
| `discard_policy_tb` | the limits 2730/5461/8192 and 5461 blocks, checked on both sides; no-fit cases; 5000 random cases |
| `block_counters_tb` | random `+nb` / `-1` on all counters, including both on one counter in the same clock |
| `priority_manager_tb` | runs of 30/20/10 blocks; an empty level skipped; 4-block packets kept whole |
| `write_unit_tb` | initial phase; block addresses; link bits; `N_p` updates; both kinds of drop; 17 clocks per block |
| `read_unit_tb` | preloaded linked queues read in random order; data, flags, freed addresses; 18 clocks per block |
| `mqm_top_tb` | end to end with 128 blocks; three policies under congestion, then a full drain, with a scoreboard on every packet; checks that each mechanism happened |
| `mqm_full_tb` | all defaults (16,384 blocks); fills the memory until packets are dropped, then reads everything back |
| `mqm_trace_tb` | equal-size packets, priorities assigned 0,1,2,0,..., a hasher slower than the input; blocks delivered per level under each policy |

`mqm_trace_tb` prints results like these:

```
policy 0: blocks delivered per level 504 480 506   (unconditional: flat)
policy 1: blocks delivered per level 276 460 754   (proportional: rising)
policy 2: blocks delivered per level 281 460 749   (uniform: rising)
```

To run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/mqm_pkg.sv tb/mqm_top_tb.sv \
    --top-module mqm_top_tb -o sim
./obj_dir/sim
```

Replace `mqm_top_tb` with any testbench name. Every one finishes in seconds,
including the full-size `mqm_full_tb`.

To check a single module without simulating it:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/mqm_pkg.sv rtl/<module>.sv
```

## Trust and limits

- Every module is checked against models written separately in its
  testbench.
- The whole design has been run end to end, at reduced and at full size,
  with every stored packet compared word for word.
- The design is synthesizable. The two memories are plain arrays: the main
  memory is 8.65 Mbit, and AM is 16K x 14 bits. For an ASIC or FPGA they
  would map onto SRAM macros or block RAM. AM's head is read
  combinationally; a registered-read RAM would need one clock of prefetch.
- No timing or area figures come with this RTL.
