# Fortified-NoC: a Trojan-resilient 4x4 mesh network-on-chip

A multicore chip built from third-party IP may contain routers with hidden
malicious logic, or hardware Trojans. Such a Trojan waits for a trigger and then rewrites the
flits it holds in its buffers. It can clear a head bit, change a destination or a packet length,
pull packets into its own tile, or drop tail bits so that packets chase each other in
a loop. The Fortified-NoC defends against this at three levels:

1. **Cipher between trusted cores.** A trusted tile encrypts its message words
   before they enter the network: a keyed bit permutation, then sixteen 4-bit
   substitution boxes. A packet that leaks to another tile is unreadable there.
2. **Error-detectable shuffling.** Inside every router the 14 bits that steer a
   packet are protected. These are the head, tail, source, destination and length
   fields. They get five Hamming parity bits, and the 19 bits are stored in a
   scrambled order. A Trojan that writes "the destination field" at its usual place
   hits other bits. The Hamming check at the router output sees the change, and
   corrects it when only one bit changed.
3. **Trojan-cognizant routing (TCRA).** A router that finds an altered flit
   marks it: the flit's `Tr` bit is set. The next router then records which side the flit
   came from in a one-bit direction register (N, E, S or W). From then on it routes
   packets around that neighbour.

The RTL is synthesizable SystemVerilog. It contains the complete 4x4 mesh with
one secure core interface per tile. It also contains an evaluation model of the Trojan,
which can be placed in any router.

## Flit format

Flits are 64 bits wide, and a packet has 5 flits: one head, three body and one tail.

| bits    | head flit                         | body / tail flit           |
|---------|-----------------------------------|----------------------------|
| 63      | H (head)                          | H = 0                      |
| 62      | T (tail)                          | T (1 on the tail flit)     |
| 61:58   | SRC node id                       | payload                    |
| 57:54   | DST node id                       | payload                    |
| 53:50   | PL, packet length in flits (5)    | payload                    |
| 49:45   | reserved for the 5 parity bits    | reserved (zero)            |
| 44:2    | payload (43 bits)                 | payload (44:1)             |
| 1       | NF, "north first" routing flag    | payload                    |
| 0       | Tr, "Trojan seen" flag            | Tr                         |

Node id = 4*y + x. Here x is the column (0 = west) and y is the row (0 = north,
growing southwards). The network interface fills a packet with four 64-bit
words: 43 bits in the head flit and 56 bits in each other flit. It writes zeros
where the parity bits will go. Body flits keep bits 49:45 free as well, so the
router can treat every flit the same way.

## Inside a router: where the protection sits

```
link in -> security encoder -> input FIFO (8) -> address extractor -> TCRA
        -> round-robin arbiter + crossbar -> output FIFO (2) -> security decoder -> link out
```

* **Security encoder** (`security_encoder` = `hamming_encoder` + `eds_shuffler`).
  Bits 63:50 are the 14 data bits of a Hamming code. They take codeword
  positions 3,5,6,7,9-15,17,18,19, and the parity bits take positions 1,2,4,8,16.
  The five parity bits are written into 49:45. The whole 19-bit group 63:45 is then
  permuted by one of four patterns, chosen by `pattern_sel`.
* **Input FIFO** (`flit_fifo`, 8 deep). The flit stays in its shuffled form here
  and through the output FIFO. The buffers are where a planted Trojan would act.
* **Address extractor.** It reverses the shuffle, corrects a single altered bit,
  and hands H, T and DST to the route computer.
* **Arbiter and crossbar.** Each output has a round-robin arbiter. A packet holds
  its output from the head flit to the tail flit (wormhole switching). On the way
  through the crossbar, the `Tr` bit is cleared. A head flit also gets the NF
  value that the route computer chose.
* **Security decoder** (`security_decoder` = `eds_deshuffler` +
  `hamming_decoder` + TE). It reverses the shuffle and computes the syndrome. It
  corrects a single-bit change, and sets `Tr` when the syndrome is non-zero.
  Flits leave the router in plain order.

So detection happens at the *output* of the router that stored the flit, and the
decision to avoid that router is made by the *next* router. Its Tr checker looks
at the flit waiting at each neighbour input. When `Tr` is set, the checker sets
the direction register for that side. The registers are sticky until reset.
They are visible as the `news` output. A set bit takes effect in the same cycle.

### Why the shuffle patterns matter

A Hamming code corrects one error but misses some multi-bit changes. For example,
flipping codeword positions 16-19 together gives a zero syndrome. A Trojan that
rewrites a 4-bit field at its nominal place changes 4 adjacent *stored* bits. The
four patterns (`EDS_PAT` in `fnoc_pkg`) were chosen by search to meet two rules:

* no bit keeps its position;
* every run of 1 to 6 adjacent stored bits maps to a set of codeword positions
  whose XOR is non-zero, under every pattern.

So any Trojan that overwrites a contiguous field of up to six bits is always
*detected*. It is *corrected* only when just one bit actually changed. `tb_eds_shuffler`
and `tb_security_decoder` check this property exhaustively for all runs of 1 to 6 bits.

### Route computation (TCRA)

`tcra_route` implements the Trojan-cognizant routing algorithm. It works from the
local and destination coordinates, the four direction registers and the NF flag:

* NF = 0 (X first): move along X toward the destination column. If the next
  router in X is flagged, leave X and step north or south instead. The flagged
  neighbour is still used when it *is* the destination (one hop away, same row).
  In the destination column, move along Y. If that Y neighbour is flagged and is
  not the destination, step east (in column 0) or west, and set NF.
* NF = 1 (Y first): while neither row nor column matches, move along Y and fall
  back to X when that Y neighbour is flagged.

With all registers clear, this reduces to plain XY routing. The router therefore
runs TCRA all the time; the unmodified XY router is the same logic with the
registers at zero. `tb_tcra_route` checks plain XY routing for every pair. It then flags each
router in turn, as seen by all of that router's neighbours, and walks packets
hop by hop for every source/destination pair. Every packet must reach its
destination within 12 hops, stay in the mesh, and never enter the flagged
router unless that router is its destination.

### Recovery rules (this design's additions)

A Trojan can leave a wormhole router in states that plain wormhole switching never
leaves. The router adds five small rules:

* a body or tail flit that reaches an input not inside a packet (its head was
  lost) is discarded;
* a head flit that reaches an input still inside a packet (the previous packet's
  tail was lost) closes that packet first;
* an input that has stayed empty for `IDLE_LIMIT` (128) cycles inside a packet
  releases its output;
* a head flit that has waited `STALL_LIMIT` (512) cycles without being granted
  its output is discarded with its packet. Routes bent around a flagged router
  can close a ring of packets that each wait for the next, which plain XY routing never
  forms. A ring like this was seen in simulation: packets were bent south-then-east at
  router 13 and north-then-west at router 7 around router 10. Discarding one
  packet breaks the ring, and a lost message must be sent again;
* a head flit that a flagged neighbour hands back, addressed to that same
  neighbour, is discarded with its packet. Routing it back would start a ping-pong
  with the suspect router.

## Core side: cipher and network interface

`secure_core_if` sits between a processing node and its router. It contains:

* `flit_encryptor`: `pbox64` moves bit i to (i*mult + add) mod 64, where mult is
  odd and the key belongs to the core (`core_key`). Then sixteen `sbox4`s run,
  each with its own table. No table has a fixed point (S(x) = x) or an opposite
  point (S(x) = ~x).
* `ni_packetizer`, which builds the 5-flit packet.
* `ni_depacketizer`, which rebuilds the message. It also checks the PL field
  against the flits actually seen from head to tail, and raises `rx_len_err`
  instead of delivering a packet of the wrong length.
* `flit_decryptor`, which uses the *source* core's key.

Encryption is used only when both tiles are trusted. `SECURE_MASK` = 16'h33CC
marks nodes 2, 3, 6, 7, 8, 9, 12 and 13, which form two secure clans.

## Evaluation Trojan

`hw_trojan` is a threat model for testing, not part of the defence. It sits on
the read port of every input FIFO of one router (`TROJAN_NODE`, node 10 by default,
tile x=2, y=2) and on that port's route output. After `TRIG_COUNT` flits have
left its buffers, it fires on every flit whose stored bit 63 is set. It knows the
nominal field positions but not the shuffle:

| mode | payload |
|------|---------|
| HBT  | clear bit 63 (head bit) |
| DAT  | flip bits 1 and 2 of the destination field |
| PLT  | flip bits 0 and 1 of the packet length field |
| DLT  | write the local address into the destination field |
| LLT  | clear bit 62 (tail bit) and turn a north-bound route into west |

## Top level

`fortified_noc` builds the mesh. Its parameters default to the evaluated setup:

| parameter     | default  | meaning |
|---------------|----------|---------|
| `X_DIM`,`Y_DIM` | 4, 4   | mesh size (at most 4 x 4, addresses are 2+2 bits) |
| `BUF_DEPTH`   | 8        | input FIFO depth in flits |
| `OBUF_DEPTH`  | 2        | output FIFO depth |
| `TROJAN_NODE` | 10       | router carrying `hw_trojan` (16 = none) |
| `TRIG_COUNT`  | 4        | Trojan trigger count |
| `SECURE_MASK` | 16'h33CC | trusted tiles |

Each node has a message port: `tx_valid/tx_ready/tx_dst/tx_data[4]` and
`rx_valid/rx_src/rx_data[4]/rx_len_err`. The top also brings out status and
event pulses for each node: `news`, `ev_err_det`, `ev_deflect`, `ev_drop` and
`ev_ht_hit`. `pattern_sel`, `ht_enable` and `ht_mode` are global inputs.

Timing: every router adds two cycles (input register, output register). An
isolated message from node 0 to node 3 is delivered 13 cycles after it is
offered: 4 routers x 2 cycles plus 5 flits.

## How far it is tested

Every block has its own self-checking testbench in `tb/`, named `tb_<module>`.
Two testbenches run the whole mesh:

* `tb_fortified_noc` runs the full 4x4 mesh at default parameters. Traffic is
  bit-complement (node i to node 15-i) plus random destinations. The test first
  runs with no Trojan: every message must arrive intact, and the 0-to-3 latency
  must be 13 cycles. It then runs HBT, DAT, PLT and DLT, one after another, each after
  a reset and with a different shuffle pattern. In every Trojan phase, the
  neighbours' direction registers must point at router 10, and no message from a
  trusted core may be readable anywhere but at its destination. It counts
  payload hits, detections, direction registers set, deflections, pattern switches
  and encrypted messages, and requires each to be non-zero.
* `tb_fnoc_livelock` places the Trojan in corner router 15 in LLT mode, with the
  flows 12->3, 13->2 and 15->0. Every message must arrive. Router 14 must flag
  its east side and send the traffic for node 3 north, through router 10.

Results of `tb_fortified_noc` (the messages of one phase are 12 rounds of 16):

| phase | intact | garbled | not delivered | direction bits set | notes |
|-------|--------|---------|---------------|--------------------|-------|
| no Trojan | 160 / 160 | 0 | 0 | 0 | mean latency 17 cycles |
| HBT | 192 / 192 | 0 | 0 | 4 | single-bit change, always corrected |
| DAT | 162 / 192 | 30 | 33 | 4 | two-bit change: detected, sometimes mis-corrected |
| PLT | 192 / 192 | 0 | 0 | 4 | |
| DLT | 148 / 192 | 8 | 51 | 3 | packets lost to discards while the detour ring forms |

In every Trojan phase the last round, sent after the Trojan router has been
flagged, is delivered complete and intact. No message from a trusted core was readable at a
wrong node. The live-lock test delivers all 60 messages. Router 14 flags its
east side, and 19 packets are deflected there.

## Limits and departures

* **Correction is single-bit.** A Trojan that changes two or more stored bits is
  detected but may be mis-corrected. DAT, PLT and DLT do this, and so they garble
  or lose some packets in the router that holds the Trojan until the neighbours
  have flagged it. The cipher keeps such packets unreadable.
* **A Trojan that only sends packets to its own core is not flagged by anyone.** Detection is done
  by the next router. A packet pulled into the Trojan router's own core never
  passes another router, so no neighbour learns of it. Encryption is the
  protection against that leak.
* **Detours can deadlock; this design recovers by discarding packets.** Plain XY routing is
  deadlock-free. Routes bent around a flagged router are not, and the only
  cure here is the stall rule. That rule loses packets instead of delaying them.
  A design that must deliver every packet needs an escape channel or a turn
  restriction in the detours. Neither is built here.
* **No virtual channels.** Each input has one FIFO.
* The shuffle patterns, the Hamming position map, the S-box tables, the
  P-box form and keys, the trusted-tile mask, the output FIFO depth, the
  arbitration and the handshake are all choices of this design.

## Simulating

All files are plain SystemVerilog; the package `rtl/fnoc_pkg.sv` must be read
first. With Verilator 5:

```
verilator --binary --assert -Wno-fatal -Irtl rtl/fnoc_pkg.sv $(ls rtl/*.sv | grep -v fnoc_pkg) \
    tb/tb_fortified_noc.sv --top-module tb_fortified_noc -Mdir obj_top
./obj_top/Vtb_fortified_noc
```

Use the same command for any other testbench: change the file and the top
module name. Every testbench ends with a line `TB_RESULT checks=N failures=M`. The
full mesh takes a few minutes to compile and a few seconds to run.
