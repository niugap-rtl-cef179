# NIUGAP: a network interface that reorders packets by Gray code

In a network-on-chip, packets from one source can reach their destination out of
order, because they take different paths or wait in different buffers. Someone has to
put them back in order before the receiving core sees the data. Classic schemes stamp
each packet with a binary sequence number or time stamp. They sort packets in the
switch output buffers with several magnitude comparisons per packet, and that costs
latency.

NIUGAP (Network Interface Unit with GrAY code Packet reordering) moves the
reordering into the network interface unit (NIU) at the destination. Its tags are
Gray codes. The next expected packet is the only one whose tag differs from the last
delivered tag in exactly one bit, and in the *right* bit. An XOR plus a small
priority rule answers "is this the next packet?" in one step. No adder and no
magnitude comparator are needed.

This repository holds synthesizable SystemVerilog for the whole NIU: both
directions, both clock-domain crossings, the Gray tag generation and the reorder
controller with its retransmission and bypass paths. Each block has a self-checking
testbench, and one testbench runs the complete interface end to end.

## Block structure

```
 processor clock          |                 NIU clock
                          |
 tx_req/tx_ack/tx_data -> async FIFO -> bit-stream in pool -> packetizer -> packet out pool -> pkt_out_req/acq
   (16-bit words)         |            (4 words = payload)   (+Gray tags,  (4 packets,
                          |                                   header)      4-phase req/acq)
                          |
 rx_req/rx_ack/rx_data <- async FIFO <- bit-stream out pool <- depacketizer <- reorder controller <- incoming packet buffer <- pkt_in_req/acq
                          |                                                  |  ^ req_retrans/retrans_tag
                          |                                                  |  | acq_retrans/retrans_pkt
```

| Module | Role |
|---|---|
| `niugap` | top: the two halves below side by side |
| `niugap_po` | packet-out half (processor to switch) |
| `niugap_pi` | packet-in half (switch to processor) |
| `niugap_async_fifo` | dual-clock FIFO, Gray pointers, 8 words |
| `niugap_bs_in_pool` | collects four 16-bit words into a 64-bit payload |
| `niugap_packetizer` | adds header and Gray time/sequence tags |
| `niugap_gray_counter` | toggle-flip-flop counter with XOR Gray outputs |
| `niugap_bin2gray` | binary to Gray conversion network |
| `niugap_pkt_out_pool` | outgoing packet buffers and packet-out scheduler |
| `niugap_pkt_in_buf` | incoming packet buffer and packet-in scheduler |
| `niugap_reorder_ctrl` | Gray code packet reorder controller |
| `niugap_gray_cmp` | Gray successor check (XOR + transition pattern) |
| `niugap_depacketizer` | strips the header, splits the payload into words |
| `niugap_bs_out_pool` | sends the four words one per clock |
| `niugap_sync_fifo` | generic single-clock FIFO used inside the above |
| `niugap_pkg` | field widths, default tag widths, `packet_t`, `tag_t`, `words_t` |

## Packet format

An 88-bit `packet_t`, most significant field first:

| Field | Bits | Position | Coding |
|---|---|---|---|
| time tag | 3 | 87:85 | Gray |
| sequence tag | 12 | 84:73 | Gray |
| SRC address | 3 | 72:70 | binary |
| DST address | 3 | 69:67 | binary |
| control bits | 3 | 66:64 | binary |
| payload | 64 | 63:0 | data, first processor word in 63:48 |

The field widths and their order are those of the original NIUGAP description. The
bit positions and the 16-bit processor word are this implementation's choices.

The {time tag, sequence tag} pair forms a 15-bit tag by default (`tag_t`). The sequence tag
counts packets through all 4096 Gray codes. When it rolls over from its last code
(`1000_0000_0000`) back to zero, the time tag advances by one Gray step. The
sequence codes are then reused under a new time tag. Packet *k* therefore carries
time tag `gray(k / 4096 mod 8)` and sequence tag `gray(k mod 4096)`. The whole tag
repeats after 32768 packets.

## Gray tags

### Generating them: `niugap_gray_counter`

This is a binary counter built from toggle flip-flops X0..X(W-1). Flip-flop *i*
toggles when `enable` and X0..X(i-1) are all 1, through an AND chain, so
`enable = 0` freezes the count. An XOR row produces the Gray output:
`Y(i) = X(i) xor X(i+1)`, with the MSB passed through (`niugap_bin2gray`).
`clear_n` clears all flip-flops asynchronously. `at_last` is high while the counter
holds its last code. The packetizer uses it to enable the 3-bit time-tag counter
on the clock where the 12-bit sequence counter rolls over.

### Recognising the successor: `niugap_gray_cmp`

The reflected Gray code has a fixed rule for which bit changes next:

* if the current code has an **even** number of ones, bit 0 flips;
* if it has an **odd** number of ones, the bit just left of the lowest 1 flips;
* the last code (only the MSB set) flips its MSB and wraps to all zeros.

`niugap_gray_cmp` computes `diff = prev ^ cand`. `hd1` says `diff` has exactly one
bit set (Hamming distance 1). `is_next` says that bit is the one the rule above
names. The second test matters: for a 12-bit code there are eleven other codes at
distance 1 from `prev`, and only one of them follows it. Example with 4 bits:
after `0111` (odd parity, lowest 1 at bit 0) bit 1 must flip, giving `0101`. The
code `0110` is also one bit away, but it is the predecessor, and is rejected.
`next_code` is `prev ^ flip`. The reorder controller uses it to name the packet it
is waiting for.

## The reorder controller (`niugap_reorder_ctrl`)

This is the heart of the design and the part with the most behaviour of its own.

**State.** `last_time`/`last_seq` hold L, the tag of the last packet released.
After reset L is the last code of both fields, so the first expected tag is {0, 0}.
The out-of-order pool has `POOL` (6) slots, each holding a packet and a valid bit.

**Arrival.** A packet from the incoming buffer takes the lowest free slot.
`in_ready` is low when the pool is full.

**Selection (every clock).** Each slot has two Gray comparators against L. A slot
matches when:

* its sequence tag is L's successor, and its time tag equals L's time tag; or
* L's sequence tag is the last code, the slot's sequence tag is 0, and its time tag
  is L's time-tag successor.

The lowest matching slot moves into the reordered FIFO, and L takes its tag. An
in-order stream thus passes at one packet per clock. An arriving packet is offered
at the output two clocks after it is taken: one clock into the pool, one into the
FIFO. Each slot has its own comparator, so this delay does not grow with the tag
width. The original reports a reordering latency that rises with the width of the
tag field. Its numbers come from its own netlist and are not reproduced here.

**Timing threshold and retransmission.** While the pool holds packets and none
matches, a timer counts. After `THRESH` (32) clocks the controller raises
`req_retrans` and drives `retrans_tag` with the expected tag. At that moment one
entry of the bypass FIFO and of the order FIFO is reserved. The request stays
high, and no slot is released, until one of two things happens:

1. **Retransmission arrives.** The responder pulses `acq_retrans` for one clock
   with the packet on `retrans_pkt`. The packet goes straight into the bypass
   FIFO. An assertion checks that its tag is the requested one.
2. **The original arrives late.** A packet on `in_pkt` whose tag equals
   `retrans_tag` is taken even if the pool is full. It skips the pool and goes into
   the bypass FIFO, and the request is withdrawn.

**Late duplicates.** The controller keeps the tags of the last `REC` (4)
retransmitted packets. If the original of one of them turns up in the pool later,
it is discarded, and `dup_drop` pulses for one clock. Each remembered tag is
forgotten once half the tag space has been released after it, which is 16384
packets at the default widths. Tags are reused after a full turn of the tag space.
The next packet that carries a forgotten tag is therefore handled as a new packet,
not dropped as a duplicate.

**Pool overflow.** The pool can fill with later packets while the expected one is
still upstream, held behind them in the incoming buffer. The same mechanism
resolves this: the timer expires, the packet is retransmitted, and its original is
later discarded as a duplicate.

**Output.** The reordered FIFO (4) and the bypass FIFO (2) merge through a
multiplexer. A one-bit order FIFO, written by the selector for every released
packet, steers the multiplexer. The bypass therefore speeds a late packet past the
pool, but never past an earlier packet still queued.

Limits: the controller tracks **one** tag sequence, from one sender. The timer runs
only while packets wait, so the loss of the very last packet of a burst is not
detected. Duplicates are recognised only for the last four retransmissions, and
only if they arrive within half a turn of the tag space.

## Handshakes and clocks

* **Processor side** (`tx_*`, `rx_*`, on `proc_clk`): level req/ack. A word moves
  on a clock edge where req and ack are both high. On `tx`, the processor drives
  `tx_req` and the NIU answers `tx_ack` = FIFO not full. On `rx`, the NIU drives
  `rx_req` = data available and the processor answers `rx_ack`. The words of one
  payload arrive first word first.
* **Switch side** (`pkt_out_*`, `pkt_in_*`, on `niu_clk`): four-phase req/acq.
  1. The sender drives the packet and raises req.
  2. The receiver takes it and raises acq.
  3. The sender drops req.
  4. The receiver drops acq.

  The packet is stable while req is high; an assertion in `niugap_pkt_out_pool`
  checks this. One packet takes at least four clocks.
* **Retransmission** (`niu_clk` domain): described above. The original
  description shows the reorder selector connected to the packet-out side. It does
  not say how a request reaches the sender, so here the request and the
  retransmitted packet are top-level ports.
* **Clock crossing:** `niugap_async_fifo` uses binary pointers with Gray-coded
  copies and two-flop synchronizers. Full and empty are conservative. A word is
  visible to the reader 2–3 read clocks after it is written.
* **Reset:** `proc_rst_n` and `niu_rst_n`, active low and asynchronous. Assert both
  together.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `niugap` | `TIME_W`, `SEQ_W` | 3, 12 | time tag and sequence tag widths (original values) |
| `niugap_pkg` | `ADDR_W`, `CTRL_W`, `PAYLOAD_W` | 3, 3, 64 | header and payload (original values) |
| `niugap_pkg` | `WORD_W` | 16 | processor word, chosen |
| `niugap` | `FIFO_AW` | 3 | async FIFO depth 2^3, chosen |
| `niugap` | `PKT_BUFS` | 4 | packet out pool and incoming buffer depth, chosen |
| `niugap` | `POOL` | 6 | out-of-order pool slots, chosen |
| `niugap` | `THRESH` | 32 | retransmission timeout in NIU clocks, chosen |
| `niugap_reorder_ctrl` | `RF_DEPTH`, `BF_DEPTH`, `REC` | 4, 2, 4 | reordered FIFO, bypass FIFO, remembered retransmissions, chosen |

The tag widths are module parameters. `niugap_pkg` holds their defaults,
`DEFAULT_TIME_W` and `DEFAULT_SEQ_W`, and the default `packet_t`. The top builds
its own packet struct from `TIME_W` and `SEQ_W` and hands it down to the
packet-side blocks as a type parameter. Its packet ports
are flat vectors of `TIME_W + SEQ_W + 73` bits, in the same bit order as `packet_t`.
The time tag sits in the top bits and the payload in the bottom 64 bits.
`retrans_tag` is `TIME_W + SEQ_W` bits. The other field widths and `WORD_W` are
package constants.

## What follows the original and what is this implementation's choice

These follow the original NIUGAP description:

* the block chain of both halves;
* the packet fields and their widths;
* the Gray counter structure;
* the XOR-plus-pattern successor test;
* the existence of a timing threshold, a retransmission request/acknowledge pair,
  a bypass FIFO, a reordered FIFO and an output multiplexer.

These are this implementation's own choices:

* the release rules of the selector and the handling of late and duplicate packets;
* all buffer depths and the threshold;
* the 16-bit word;
* the handshake phases;
* the asynchronous FIFO design;
* bringing the retransmission request out as ports;
* dropping the header in the depacketizer (the processor receives only payload
  words);
* a single sequence counter for all packets.

The SRC, DST and control fields come from top-level inputs sampled with each
payload. Nothing here inspects DST. The original also reports gate counts, area and
a clock of 46.8 MHz in a 0.25 µm library. No such numbers are claimed for this
RTL; the testbenches only use 46.7 MHz as the NIU clock.

## Simulation

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.
With plain Verilator, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb rtl/niugap_pkg.sv tb/niugap_tb.sv --top-module niugap_tb
./obj_dir/Vniugap_tb
```

Replace `niugap_tb` with any other testbench name. Each block testbench is named
after its module with `_tb`.

`niugap_tb` runs the whole NIU at its default parameters. It sends 4200 payloads,
enough for the sequence tag to roll over and the time tag to advance. A switch
model shuffles packets four at a time. It loses some packets, which are recovered
by retransmission; others arrive late, which exercises the bypass and the
duplicate drop. The test checks every word that comes back and every packet
header and tag. It also counts that each mechanism actually occurred:

* processor stall;
* full packet-out pool;
* out-of-order arrival;
* incoming buffer stall;
* retransmission;
* late bypass;
* duplicate drop;
* time-tag advance.

It simulates 485 µs in well under a second. `niugap_reorder_ctrl_tb` covers the same reorder cases
in more isolation and checks the two-clock latency.

`niugap_tagw_tb` builds the whole NIU four times. Each build has a 3-bit time tag
and a 4, 8, 10 or 12-bit sequence tag, so the tag field is 7, 11, 13 or 15 bits.
Each build gets its own processor and switch models from `niugap_tagw_bench`. The
switch swaps every pair of packets and loses every 37th packet. The test checks
each tag, each header and each returned word. Each build must retransmit exactly
once per lost packet, and its time tag must advance. No packet may be dropped as a
duplicate. The 7-bit build goes twice round its 128 tags, so the time tag wraps
back to zero. It also reuses the tags of retransmitted packets, which tests that
remembered tags are forgotten in time. The four builds together simulate in
about ten seconds. The 3-bit time tag for the shorter fields is a choice:
the original names the four field sizes but not how each is split. The Gray blocks are checked
against the 4-bit Gray table and, at 12 bits, against a binary reference.
