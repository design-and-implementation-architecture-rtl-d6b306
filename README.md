# RKT switch: a reliable 4x4 mesh network-on-chip

A network-on-chip moves small packets between the cores of a chip through a
grid of routers. This design is a 4x4 mesh of "RKT switch" routers built to
keep working when parts of the network misbehave. It does three things on
top of plain packet switching:

* **Payload protection.** Every packet carries its 8-bit payload as a 13-bit
  Hamming codeword. Each router a packet passes through decodes the word,
  repairs a single flipped bit and flags a double flip.
* **Routing round unavailable routers.** Packets follow XY (dimension-order)
  routing. When the neighbour a packet should go to next is marked
  unavailable, the router sends it along the other axis first. It marks that
  hop as a deliberate bypass.
* **Detecting routing errors.** Every router checks whether the router that
  sent it a packet routed it correctly. A packet that arrives from a
  direction the routing rules could not have chosen raises a routing-error
  flag. Bypass hops are recognised and not reported.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) and has been
checked with Verilator 5 (lint and simulation) and the slang front end of
Yosys.

## The packet

All links carry one 48-bit packet per clock. The field widths and bit
positions come from the original router description. The meaning of the
`rev` bit is this design's choice.

| bits  | field  | meaning |
|-------|--------|---------|
| 47    | `rev`  | set when the previous router sent the packet along a bypass |
| 46:43 | `addr` | destination, `{y[1:0], x[1:0]}` |
| 42:30 | `code` | 13-bit Hamming codeword of the payload |
| 29:22 | `data` | payload (rewritten with the corrected value at every router) |
| 21:0  | `pad`  | zero |

The type is `rkt_pkg::pkt_t`.

## The Hamming code

The code is the classic (12,8) Hamming code plus an overall parity bit. That
gives single-error correction and double-error detection (SEC-DED). The
13-bit word is laid out as

    {p8, p4, p2, p1, p0, d[7:0]}

Here `p1`, `p2`, `p4` and `p8` are the check bits for Hamming positions 1, 2,
4 and 8. The data bits sit at positions 3, 5, 6, 7, 9, 10, 11 and 12, in
order. `p0` is the parity of all other 12 bits. With this layout, data
`8'hFF` encodes to `13'b0011011111111`.

Decoding recomputes the four check bits. Their XOR with the received check
bits is the syndrome. If the overall parity is odd, exactly one bit is
assumed flipped:

* a syndrome of 0 means `p0` itself flipped;
* any other syndrome is the Hamming position of the flipped bit.

If the parity is even and the syndrome is not zero, two bits flipped. That
cannot be repaired and is only flagged.

The original description gives only the 8-bit data and 13-bit code widths,
and this one encoded value. The SEC-DED reading of the 13th bit and the bit
layout are this design's choices, consistent with that value. The functions
`ham_encode` and `ham_decode` in `rkt_pkg` hold the code.

`ecc_8` is a stand-alone demonstrator. It encodes `data_in` in one register
stage (`hamming_enc`). It then corrupts the word with `error_out = enc_out ^
error_in` and decodes it in a second register stage (`hamming_dec`).

## Inside one router (`rkt_node`)

A router has five ports: local, North, East, South and West. Each has an
input FIFO (`in_buffer`, 2 entries). The router forwards at most **one
packet per clock**. Each clock:

1. **Arbitration.** `random_arbiter` looks at which input FIFOs hold a
   packet and grants one of them. A 16-bit LFSR picks a random starting
   input each clock. The grant goes to the first non-empty input from there,
   going round. Simultaneous requests are therefore served in a random
   order, and none is starved.
2. **Selection.** `packet_select` passes on the granted head packet and the
   number of the port it came in on.
3. **Routing** (`xy_route`), **checking** (`route_err_detect`) and
   **decoding** (`ham_decode`) all act on the selected packet in parallel.
   The outgoing packet gets the corrected codeword and payload, and its
   `rev` bit is set if this router took a bypass.
4. **Forwarding.** The packet leaves if the chosen output can take it. A
   neighbour can take it when its input FIFO is not full; the local output
   always can. The packet is then popped from its FIFO. Otherwise it stays,
   and the clock counts as a stall. The arbiter may pick another input next
   clock.

Packets injected at the local port are assembled first: the payload is
Hamming-encoded into `code`. A test input, `loc_err_in`, XORs an error
pattern into the codeword to model a noisy link. `ready` depends only on how
full a FIFO is, never on what happens downstream. No combinational path
therefore runs from one router to the next through the handshake.

The single selector and single routing unit follow the original node
diagram. The FIFOs, the handshake and the one-packet-per-clock forwarding
are this design's choices.

## Routing, bypass and routing-error detection

This is the subtle part of the design.

**Coordinates.** Node `i` of the mesh sits at `x = i % 4`, `y = i / 4`. Its
address is `{y, x}`. East is `x+1`, West is `x-1`, South is `y+1` and North
is `y-1`.

**Plain XY.** A router first moves the packet along x until the column
matches, then along y. When both coordinates match, it delivers the packet
to the local port.

**Bypass.** Each router knows which neighbours are available (`nbr_avail`).
Suppose a packet still needs to move in x, but the x neighbour is
unavailable. If it also needs to move in y, the router sends it along y
first, sets `bypass`, and writes `rev = 1` into the packet. Every bypass is
still a minimal move (it gets one hop closer). If no minimal move is
available, the packet waits in its FIFO. That happens when the packet needs
to move along only one axis and the neighbour on that axis is unavailable.
Non-minimal detours are not implemented.

**Error check.** The packet carries no source address, so the receiving
router reasons from the port the packet arrived on. A hop is correct when
both of these hold:

* it moved the packet towards its destination. For example, a packet that
  came in on the West port has moved east, so its destination must not lie
  west of this router;
* if it was a y move, x was already finished (the destination column equals
  this router's column), unless `rev` says the hop was a bypass.

Packets from the local port are not checked. A failed check raises
`route_err` for one clock when the packet leaves. The packet is still
routed onwards correctly from where it is. The `rev` bit is therefore what
separates legitimate bypasses from real routing errors. Each router rewrites
`rev` for the next hop only.

**Locating a faulty switch.** Each router keeps a sticky flag per mesh
port, `err_from[3:0]` (N, E, S, W), set when a routing error arrives on that
port. The mesh combines them into `switch_suspect[i]`: node `i` is suspect
once any neighbour has caught it misrouting. The flags clear only on reset.
Nothing feeds them back into `node_fault` automatically; whoever manages the
chip decides when a suspect node is taken out of service.

**Fault injection.** The `route_fault` input of a router models a faulty
routing unit. The router then makes y moves before x moves without marking
them. Delivery still works because the moves are still minimal, but the next
router reports the error.

**Deadlock.** Plain XY routing cannot deadlock. Bypass hops add y-then-x
turns that XY forbids. Under heavy traffic, the ring of routers round an
unavailable node can fill up and block itself. There are no virtual channels
to prevent this. The end-to-end test sends bypass traffic one packet per
source at a time. Do the same, or add a deadlock-avoidance scheme, before
relying on bypassing under load.

## The mesh (`smart_reliable_noc`)

The top instantiates `MESH_X x MESH_Y` routers (default 4x4; at most 4x4
because of the 4-bit address). It joins neighbours with a pair of one-way
links, each carrying a packet plus valid and ready. Links off the edge are
tied off. Apart from `clk`, `rst` and the `ecc_*` ports, every port is an
unpacked array indexed by node number:

| port | dir | use |
|------|-----|-----|
| `valid_in`, `ready_out`, `addr_in[3:0]`, `data_in[7:0]` | in/out | inject a packet (valid/ready handshake) |
| `err_in[12:0]` | in | bits to flip in the injected codeword; 0 in normal use |
| `valid_out`, `data_out[7:0]` | out | packet delivered here, corrected payload |
| `node_fault` | in | node unavailable: neighbours stop sending to it and ignore its output |
| `route_fault` | in | fault injected into that node's routing unit |
| `ecc_corrected`, `ecc_uncorr`, `route_err`, `bypass_taken`, `stall` | out | one-clock status pulses of that router |
| `switch_suspect` | out | sticky: a neighbour has seen a routing error in a packet from this node |
| `ecc_data_in`, `ecc_error_in`, `ecc_enc_out`, `ecc_error_out`, `ecc_dec_out`, `ecc_dec_corrected`, `ecc_dec_uncorr` | in/out | the `ecc_8` demonstrator, instantiated beside the mesh |

Reset (`rst`) is synchronous and active high. It empties every FIFO and
reloads the LFSRs (each router has its own seed).

**Timing.** A packet written into a FIFO on one clock edge can leave on the
next. An uncontended packet therefore moves one hop per clock, and
`valid_out` rises at the destination `hops` clocks after injection. For
example, node 0 to node 14 (x=2, y=3) takes 5 clocks. Delivery to the local
output is combinational from the FIFO head. Under contention, each router
still moves at most one packet per clock in total.

## How far it follows the original description, and where it departs

Taken from the original description:

* the 4x4 mesh;
* 8-bit payloads and 4-bit addresses per node;
* the 48-bit packet layout;
* the 13-bit Hamming code and the `ECC_8` ports, with `error_out = enc_out ^
  error_in`;
* the node data path (encoder, packet, selector driven by the arbiter, XY
  routing, decoder);
* a random arbiter over five requests;
* XY routing made adaptive to bypass faulty nodes;
* detection of routing errors by the receiving router.
* locating faulty switches so that they can be bypassed (the flag logic
  itself is this design's).

Choices of this design, where the description is silent:

* the codeword layout and the SEC-DED parity bit;
* the meaning of `rev`;
* the exact bypass and error-check rules;
* the LFSR arbiter;
* the 2-entry FIFOs and the valid/ready handshake;
* the fault-injection inputs and status outputs;
* the synchronous reset.

Other differences:

* The original node diagram draws a three-input arbiter feeding a 5-bit
  select. This design uses the five-request arbiter that the text describes.
* The description also lists a loopback mechanism and an FSM but does not
  define them. Neither is built.
* The published FPGA utilisation (18 flip-flops for a node) is far below
  what this router needs, since 5 FIFOs of 2 x 48 bits alone hold 480 bits.
  The configuration behind that figure is unknown.

## Files

`rtl/`:

* `rkt_pkg.sv`: packet type, port enum, Hamming functions
* `hamming_enc.sv`, `hamming_dec.sv`, `ecc_8.sv`: the code and its demonstrator
* `random_arbiter.sv`, `packet_select.sv`, `xy_route.sv`,
  `route_err_detect.sv`, `in_buffer.sv`: the router's parts
* `rkt_node.sv`: one router
* `smart_reliable_noc.sv`: the mesh (top)

`tb/` has one self-checking testbench per module, named `<module>_tb.sv`.
Each one prints `TB_RESULT checks=N failures=M`. `ham_ref_pkg.sv` is a
reference Hamming encoder, written bit position by bit position, used to
check the design's equations.

`smart_reliable_noc_tb` runs the whole 4x4 mesh at its default size in four
phases:

1. a single 5-hop transfer, with its latency checked;
2. random all-to-all traffic with single-bit errors;
3. bypass traffic round a faulty node;
4. traffic through routers with injected routing faults.

A final step injects double errors. The test requires that every packet
arrives once, with its payload intact, and that no routing error is reported
without a routing fault. After phase 4, exactly the four routers with
injected faults must be marked in `switch_suspect`. It also requires that corrections, bypasses,
routing errors, double-error flags and stalls all occur.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rkt_pkg.sv tb/ham_ref_pkg.sv tb/smart_reliable_noc_tb.sv \
        -y rtl --top-module smart_reliable_noc_tb -o sim
    ./obj_dir/sim

For any other block, swap in its testbench. The mesh test takes a few
seconds. The router contains assertions (one-hot grants, at most one output
per clock, no packet sent to an unavailable neighbour, no pop from an empty
FIFO). `--assert` enables them.
