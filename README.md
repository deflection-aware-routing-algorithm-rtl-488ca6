# Fault-tolerant 8x8 mesh NoC with deflection-aware routing checks

This is a network on chip that keeps working through soft errors (single
and multiple bit upsets in buffers) and crosstalk faults (glitches on the
wires between routers). It protects the two kinds of flits differently.

* **Header flits** steer the packet, so a wrong bit can send the packet to
  the wrong node. Each router checks every header that arrives from a
  neighbour in two ways. The first check is **deflection-aware routing
  (DAR)**: the router re-runs XY routing as if it were still at the
  neighbour that sent the header, and checks that the result points at
  itself. The second check is a **two-bit parity**. A header that fails
  either check is dropped, and the sender resends a clean copy. The sender
  keeps that copy in a small **barrel-shifter spare buffer**.
* **Data (body and tail) flits** are protected while they sit in a router's
  input buffer. The flit is split into 8 groups. Each group gets a Hamming
  single-error-correcting code. The codewords are then **split-interleaved**,
  so that any burst of up to 8 neighbouring upset bits in the buffer hits
  each codeword at most once. Each Hamming decoder then repairs its one bit.

The network is an 8x8 2D mesh with deterministic XY routing, wormhole
switching and 128-bit flits. All of it is synthesizable SystemVerilog.

## The network

| item | value |
|---|---|
| topology | `MESH_X` x `MESH_Y` mesh, default 8x8; node `n = y*8 + x` |
| routing | XY: correct x first, then y, then eject at LOCAL |
| switching | wormhole: an output stays with one input from header to tail |
| flit | `FLIT_W` = 128 data bits, a 2-bit type (`HEAD`, `BODY`, `TAIL`, `HEADTAIL`), 2 parity bits |
| input buffer | one queue per port, `BUF_DEPTH` = 1 flit, storing the 168-bit encoded flit |
| header fields | data bits [2:0] destination x, [5:3] destination y, [8:6] source x, [11:9] source y |

Ports of a router are LOCAL, NORTH, EAST, SOUTH, WEST (0..4). x grows to
the east and y grows to the south, so the NORTH neighbour of (x, y) is
(x, y-1).

A link between two routers carries `valid`, `ftype`, `data[127:0]` and
`par[1:0]` forwards. It carries `ready` and `retx` (the retransmission
request) backwards. A flit moves when `valid && ready`. `ready` depends only
on the receiver's registered state, so there is no combinational path from
one router's `ready` through another router.

**Router timing.** A flit at the head of an input buffer goes through
decoding, routing (for a header), switch allocation, the crossbar and the
link. It is written into the next router's buffer at the next clock edge.
So one hop takes one cycle when nothing blocks the flit. The header checks
run in that same cycle on the incoming link. This is the "merged"
arrangement, in which the check adds no cycle when there is no fault. With
the default one-flit buffer, a link carries at most one flit every two
cycles, because `ready` falls as soon as the buffer fills.

Switch allocation is round-robin per output among the headers waiting for
it. Once a header wins, the output is locked to that input until the tail
passes. Body and tail flits use the route that was stored when their header
left.

## Header protection: check, drop, resend

### Deflection-aware routing

The sending router routed the header correctly before it left, so the
header's destination must route from the sender to this receiver. The
receiver checks this with the following steps (`dar_unit`):

1. The **address generator** (`addr_gen`) finds the sender's address from
   the receiver's own address and the input port. A header arriving on the
   WEST port of (3,3) came from (2,3).
2. The XY routing function (`xy_route`) runs on the *received* destination
   as if at the sender.
3. A second address generator steps one hop from the sender in the
   direction that routing chose.
4. The **address comparator** compares that address with the receiver's
   own. A mismatch means the header has been deflected off its path, so it
   is faulty.

DAR cannot see a fault that leaves the receiver on the path, such as a
flipped destination bit that still routes the same way, or a flipped
payload bit. The parity pair covers those.

### Two-bit parity

`par[0]` is the XOR of the even-numbered data bits and `par[1]` the XOR of
the odd-numbered ones (`parity_gen`). The sender computes the pair, and the
receiver recomputes and compares it (`parity_check`). One flipped bit, or
two adjacent flipped bits, always changes at least one of the two. A
contiguous burst of 3, 5, 6 or 7 bits is also caught. A burst of 4 or 8
bits flips two bits of each parity and is missed.

### Retransmission timing

A sender output (`output_unit`) copies each header it sends into stage 0
of its spare buffer (`spare_buffer`). The spare buffer is a circular shift
register of `SPARE_DEPTH` = 4 stages, and every stage moves one step each
cycle. The receiver's error control unit (`err_ctrl_unit`) sends its
request back through a 4-stage register pipeline. So the request reaches
the sender in exactly the cycle in which the dropped header reaches the
last stage:

| cycle | sender | link | receiver |
|---|---|---|---|
| c0 | sends header H and loads it into stage 0 | H (hit by a fault) | check fails, H dropped, request enters pipeline |
| c1 | H in stage 0 | nothing accepted | `ready` = 0 |
| c2 | H in stage 1 | nothing accepted | `ready` = 0 |
| c3 | H in stage 2 | nothing accepted | `ready` = 0 |
| c4 | `retx` high: mux sends stage 3 and rotates it back into stage 0, crossbar held off | copy of H | `ready` = 1 for the copy only, copy checked |

From c1 to c3 the receiver holds `ready` low, so no body flit of the packet
can get ahead of its header. The buffer had room for H in c0 and nothing
has been written since, so the copy always finds room in c4. If the copy is
hit again, the same thing repeats, because the copy went back into stage 0.
A header that nobody asks for falls out of the last stage. Assertions check
that the copy is there when the port reopens, and that the sender never
loads a new header in a retransmission cycle.

A fault therefore costs `SPARE_DEPTH` = 4 cycles on that one link. A
fault-free header costs nothing.

## Data protection in the buffer

`flit_encoder` and `flit_decoder` wrap each input buffer:

```
link -> flit_encoder (8 x Hamming(21,16) -> split interleaver) -> flit_fifo (168 bits)
     -> flit_decoder (split de-interleaver -> 8 x Hamming decoder) -> crossbar
```

* **Groups.** The 128-bit flit is cut into B = 8 groups of 16 contiguous
  bits. `B` is the longest burst the code has to survive.
* **Hamming (21,16).** Each group gets r check bits, where r is the
  smallest number with 2^r - r - 1 >= 16, so r = 5. Check bits sit at
  codeword positions 1, 2, 4, 8 and 16, and data bits fill the rest. The
  decoder's syndrome (the XOR of the positions of all set bits) is the
  position of a single wrong bit. `noc_pkg::ham_r` gives the same codes for
  other group sizes, for example (7,4) for 32-bit flits and (12,8) for
  64-bit flits.
* **Split interleaving.** Bit j of codeword g is stored at position
  `j*8 + g` of the 168-bit word. Two bits of the same codeword are always
  exactly 8 apart, so a burst of at most 8 contiguous upsets touches each
  codeword at most once.
* **Residue group.** If `FLIT_W` is not a multiple of `B`, the top
  `FLIT_W mod B` bits form one extra, shorter group with its own Hamming
  code. For example, a 100-bit flit becomes 8 x (17,12) plus (7,4), which
  is 143 stored bits. The interleaver then fills each row with bit j of the
  eight full codewords followed by bit j of the residue codeword, while it
  still has one. Bits of one codeword stay at least 8 apart. The residue
  group must not be longer than a full group. `noc_pkg::enc_width` gives
  the stored width.

Headers are stored in the same encoded form, so a header that passed the
link checks is also safe while it waits in a buffer. The 2-bit flit type is
stored beside the encoded word and is not protected.

## Top level and test hooks

`noc_mesh` brings out each node's core interface: `inj_*` into the network
and `ej_*` out of it, both ready/valid, 64 entries each. It also has two
fault-injection inputs, which exist only for testing:

* `link_inj_en/node/port/mask` XORs a 128-bit mask onto the data of one
  router's output link. This models a crosstalk fault, or an upset in the
  sender's output stage.
* `buf_inj_en/node/port/mask` XORs a 168-bit mask onto the encoded word as
  it is written into one input buffer. This models an upset in the buffer.

Tie both `*_en` inputs low in normal use. The event outputs report, per
node and cycle:

* `ev_dar`: DAR flagged a header.
* `ev_par`: the parity pair flagged a header.
* `ev_drop`: a header was dropped.
* `ev_retx`: a header was resent.
* `ev_corr`: the number of Hamming groups corrected as flits left the
  buffers.
* `ev_unc`: a syndrome pointed outside its codeword.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | mesh size. At most 8 each, because of the 3-bit coordinate fields in `noc_pkg` |
| `FLIT_W` | 128 | flit data width. Must be a multiple of `B` |
| `B` | 8 | number of Hamming groups, which is also the longest burst corrected |
| `BUF_DEPTH` | 1 | input queue depth in flits |
| `SPARE_DEPTH` | 4 | retransmission interval, which is the spare buffer length and the request pipeline length |

## What follows the original design and what does not

These parts follow the design this RTL was written from:

* the 8x8 mesh, XY routing and wormhole switching;
* the 128-bit flit, 5-flit packets in the tests, and a one-flit buffer;
* the DAR check, built as an address generator, a routing function and an
  address comparator;
* even/odd two-bit parity;
* dropping a faulty header and resending it from a 4-stage barrel-shifter
  spare buffer that re-buffers the copy;
* Hamming codes sized by 2^r - r - 1 >= N, with B = 8 groups and
  interleaving at a distance of 8.

These are choices made here:

* the header field layout and the 2-bit flit-type side band;
* the ready/valid link;
* the one-cycle router and the round-robin allocator;
* the exact interleaving permutation, including where the residue
  group's bits go;
* the placement of the request pipeline, and holding the link while the
  copy is awaited;
* a separate small XY routing function for DAR, instead of time-sharing the
  router's own. It is a few comparators, not the full second router of a
  performance-oriented variant, and the check adds no cycle;
* taking the spare copy of a header as it leaves through an output, rather
  than as it arrives at the node;
* one queue per port with no virtual channels;
* synchronous active-high reset;
* the fault-injection ports.

Departures and limits a user should know:

* **Residue group count.** The original text gives one codec the length
  `L mod B` and "the other" codecs `floor(L/B)`. Taken literally, that
  does not cover all L bits. This design uses B full groups plus one
  residue group, so B + 1 codecs. The default 128-bit flit has no residue
  group.
* **Hamming code sizes.** For 104-bit flits `ham_r` gives (18,13). The
  original design lists (19,13) for that width.
* **Unchecked flits and links.** The flit type bits are not covered by
  parity or Hamming. Body and tail flits are not checked on the link; they
  are protected only inside the buffers. The core-to-router link is not
  checked.
* **Parity gaps.** Contiguous 4- and 8-bit faults in a header are caught
  only when they change the route (see the coverage numbers below). The
  original design reports nearly full coverage for 4-8 faults, which
  presumably assumes a different fault distribution.
* **Throughput and latency.** With `BUF_DEPTH` = 1 a link carries at most
  one flit every two cycles. The latency figures below come from this RTL
  and are not comparable to the original design's cycle-level network
  model, which had virtual channels.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each compares the module's outputs with values it works out itself. Each
ends with `TB_RESULT checks=N failures=M` and has a watchdog. The main
ones:

* `tb_dar_unit` covers every receiver, input port and destination of the
  8x8 mesh, plus every single-bit destination flip.
* `tb_flit_decoder` applies bursts of 0 to 8 bits at random positions and
  checks full correction. It also checks that 9-bit bursts never decode
  cleanly. It repeats the burst test on a 100-bit flit, which has a
  residue group.
* `tb_err_ctrl_unit`, `tb_spare_buffer` and `tb_output_unit` check the
  exact 4-cycle retransmission timing on both sides of a link.
* `tb_router` tests one router with every neighbour simulated by the test.
  Corrupted incoming headers must be dropped and requested again. Outgoing
  headers that the test rejects must be resent after 4 cycles. The test
  also injects buffer upsets and checks every flit against a scoreboard.
* `tb_noc_mesh` runs the full 8x8 mesh at default parameters. It sends 640
  packets, hits headers on the links with destination flips, payload flips
  and adjacent-pair flips, injects 1-8-bit buffer bursts, and stalls the
  ejection ports at random. It checks every flit. It also checks that DAR
  detection, parity detection, drops, retransmissions, Hamming corrections
  and both kinds of stall each happened at least once.
* `tb_header_coverage` injects 1..8 contiguous flips into correct headers at
  a random hop of random XY paths and measures what each check catches.
  Representative output, with faults confined to the 12 routing bits:
  DAR alone catches 25% of 1-bit faults, rising to 65% of 8-bit faults.
  Parity catches 100% of 1, 2, 3, 5, 6 and 7-bit faults and 0% of 4- and
  8-bit faults. With faults anywhere in the 128-bit flit, DAR catches only
  about 3%, because most bits are payload.
* `tb_noc_traffic` runs uniform, tornado, bit-complement and transpose
  traffic with 5-flit packets at two injection rates on the full mesh. It
  checks delivery, reports the average latency, and checks that no header
  is flagged when there are no faults. Representative average latencies,
  from packet creation to tail arrival with source queueing included:

  | pattern | 0.01 packets/node/cycle | 0.03 packets/node/cycle |
  |---|---|---|
  | uniform | 17 cycles | 95 cycles |
  | tornado | 21 cycles | 135 cycles |
  | bit-complement | 25 cycles | 238 cycles |
  | transpose | 23 cycles | 134 cycles |

  At 0.03 packets/node/cycle the network is near its limit. With 5-flit
  packets, that rate is 0.15 flits/node/cycle, and the one-flit buffers
  halve each link's throughput.

To simulate one with Verilator, list the package first and let Verilator
find the other modules by name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh
./obj_dir/Vtb_noc_mesh
```

The full-mesh testbenches take a few minutes to compile and seconds to run.

## Files

* `rtl/noc_pkg.sv`: port and flit-type enums, the address struct, `ham_r`
  and the header field helper.
* `rtl/noc_mesh.sv`: the top level.
* `rtl/router.sv`: the router.
* `rtl/err_ctrl_unit.sv`, `rtl/dar_unit.sv`, `rtl/addr_gen.sv`,
  `rtl/xy_route.sv`, `rtl/parity_gen.sv`, `rtl/parity_check.sv`: header
  checking.
* `rtl/output_unit.sv`, `rtl/spare_buffer.sv`: the sender side and
  retransmission.
* `rtl/flit_encoder.sv`, `rtl/flit_decoder.sv`, `rtl/hamming_enc.sv`,
  `rtl/hamming_dec.sv`, `rtl/split_interleaver.sv`,
  `rtl/split_deinterleaver.sv`, `rtl/flit_fifo.sv`: buffer protection.
