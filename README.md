# Bit-shuffling protection against flit-field Trojans in a mesh NoC

A hardware Trojan hidden inside a network-on-chip router can disrupt a whole
chip without touching the data it carries. It only has to wait for a rare bit
pattern in the traffic and then flip one of a packet's few control bits. If it
clears the head bit, the router drops the whole packet. If it clears the tail
bit, the wormhole path is never released and packets get mixed. If it changes
the flit count, the receiver abandons the packet. If it rewrites the
destination, packets are sent to the wrong node.

This RTL builds a 4x4 mesh of five-port wormhole routers that defend against
such Trojans by *bit shuffling*. At every router input the 14 control bits of a
flit are permuted among their own positions. The permutation is chosen per
flit from the flit's own payload, and five Hamming parity bits are added. The
router's inside only ever holds shuffled flits, so a Trojan that was built to
hit "the head bit" or "the destination field" hits some other control bit
instead. A single wrong bit is then repaired by the Hamming code before the
fields are put back at the router output.

The RTL also contains models of the four Trojans (Quan, Address, Head and
Tail) so that the protection can be exercised. The same mesh can be built
without the protection, as a baseline.

## Flit format

Links carry 50-bit flits, MSB first:

| bits   | 49 | 48:45 | 44:41 | 40:37 | 36:5    | 4:1  | 0 |
|--------|----|-------|-------|-------|---------|------|---|
| head   | H  | SEQ   | SRC   | DST   | payload | QUAN | T |
| body/tail | H | data | data | data | data    | data | T |

* H = 1 marks a head flit and T = 1 marks a tail flit. SRC and DST are
  `{x[1:0], y[1:0]}`. QUAN is the number of flits in the packet (5 in all tests).
* The field order, the 32-bit payload and the 4-bit address and count fields
  follow the original scheme for a 4x4 mesh. The 4-bit SEQ is this design's
  choice.
* Two payload ranges have fixed jobs. Bits `[12:5]` (the low payload byte)
  key the shuffle. Bits `[28:13]` are what the Trojan trigger watches.

Inside a router a flit is 55 bits: the 5 Hamming parity bits sit on top of the
50-bit flit.

## The shuffle and its key (the part to understand first)

The critical vector is the 14 bits H, SRC, DST, QUAN and T. It is indexed
0 = T, 4..1 = QUAN, 8..5 = DST, 12..9 = SRC, 13 = H (`noc_pkg::get_crit` /
`put_crit`).

1. **Select.** `shuffle_pattern_selector` folds the low payload byte `d` to
   3 bits: `sel = d[2:0] ^ d[5:3] ^ {0, d[7:6]}`. The select changes from flit
   to flit with the data.
2. **Permute.** `bit_shuffler` puts input bit `PERM_SRC[sel][j]` at position
   `j`. The table is `PERM_SRC[p][j] = (A_p*j + B_p) mod 14`, with
   `(A,B) = (1,5) (3,1) (5,3) (9,7) (11,9) (13,11) (1,9) (3,13)`. Every `A_p`
   is coprime to 14, so each row is a permutation, and no row leaves any bit in
   place. The shuffled bits go back into the same 14 flit positions.
3. **Protect.** `hamming_encoder` computes a [19,14] Hamming code over the
   shuffled bits. Data bit `i` sits at codeword position `HAM_POS[i]`
   (3, 5, 6, 7, 9..15, 17, 18, 19). Parity bit `k` is the XOR of the data bits
   whose position has bit `k` set.
4. **Undo.** At the output, `hamming_decoder` forms the syndrome. If the
   syndrome names a data position, that bit is inverted. `shuffle_pattern_selector`
   then recomputes the select from the same payload byte, which was never
   moved, and `bit_deshuffler` applies the inverse permutation.

No key travels with the flit and no state is shared between routers. Each
router shuffles and unshuffles on its own, so links always carry plain flits.

Limits of the scheme as built:

* The payload byte that keys the shuffle is visible to a Trojan. A Trojan
  designed with knowledge of this table could still aim at a field. The
  protection rests on the table not being known when the Trojan is inserted.
* The Hamming code corrects one error per flit per router. A Trojan that
  changes two or more critical positions (the Quan and Address models here)
  causes a miscorrection. Its effect then lands on random critical bits
  instead of on the field it aimed at.
* Payload bits outside the 14 critical positions are not protected. SEQ is
  not among the shuffled bits.
* The 8 patterns are plain affine permutations. They do not try to move the
  DST and QUAN bits into SRC positions in particular.

## Router

```
link -> shuffle_encoder -> input flit_fifo (8) -> [hw_trojan] -+-> crossbar -> output flit_fifo (8) -> shuffle_decoder -> link
                                                               |
                                                               +-> address_extractor -> route_computation -> switch_arbiter
```

* **Ports.** Port 0 is local, 1 north (y-1), 2 east (x+1), 3 south (y+1) and
  4 west (x-1).
* **Flow control.** Every link uses valid/ready. `in_ready` means the input
  FIFO is not full. `out_valid` means the output FIFO is not empty.
* **Buffers.** `flit_fifo` is the input and output buffer together with its
  controller. It holds 8 flits with a show-ahead read.
* **Trojan position.** `hw_trojan` sits between the input FIFO and the
  crossbar. This is where the original evaluation placed it.
* **Address extractor.** `address_extractor` repairs and unshuffles only the
  H, T and DST of the flit at each FIFO head. It applies the Hamming
  correction before unshuffling, so that a flipped bit cannot misroute the
  packet inside the router. The correction here is this design's choice.
* **Routing.** `route_computation` is dimension-ordered XY routing.
* **Timing.** An uncontended flit accepted in cycle t is offered on the
  output link in cycle t+2. All of the encode, extract, route, arbitrate and
  decode logic is combinational around the two FIFOs.
* **Events.** `events` (`router_events_t`) gives per-cycle flags for
  performance counters: Trojan fired, ECC corrected, flit dropped, output
  contested, output stalled.

### Wormhole switch allocation (`switch_arbiter`)

Each input is either idle or has a packet open on an output it holds.

* **Idle input, head flit at the FIFO front.** It requests the port that the
  route computation gives.
* **Open input.** It requests the port it holds, whatever the flit at the
  front. A head that arrives inside an open packet therefore follows that
  packet. This is how a lost tail bit mixes packets.
* **Idle input, front flit not a head.** The flit has no route. It is popped
  and discarded. This is how a packet whose head bit was cleared disappears,
  body and all.
* **Free output.** It grants one requesting head in round robin, starting
  after the last input it granted.
* **Held output.** It serves only its owner.
* **Moving a flit.** A grant needs room in the output FIFO. It moves one flit
  through the crossbar. The head flit opens the packet and the tail closes it.

## Trojan models (`hw_trojan`)

The trigger fires when flit bits `[28:13]` equal `TRIG_VALUE` (default
`16'hC35A`). When it fires, the payload changes fixed bit positions of the
plain flit format:

| `TROJAN`  | model | payload |
|-----------|-------|---------|
| `TR_HEAD` (default) | Head Hardware Trojan | inverts bit 49 (H) |
| `TR_TAIL` | Tail Hardware Trojan | inverts bit 0 (T) |
| `TR_QUAN` | Quan Trojan | inverts QUAN bits [2:1] (flit bits 3:2) |
| `TR_ADDR` | Address Trojan | clears the DST x bits, sending traffic to column 0 (the left edge) |
| `TR_NONE` | no Trojan | none |

The Trojan is the same in every router, because all nodes use one router
design. The watched bits, the trigger value and the exact bits each payload
hits are this design's choices.

## Mesh (`noc_mesh`, the top)

Router (x, y) is node `y*MESH_X + x`. Edge links are tied off: no valid in,
always ready out. Each node's local port is brought out as `inj_*` (into the
network) and `ej_*` (out of it). `events[n]` is router n's event vector.

Parameters and defaults:

* `MESH_X = MESH_Y = 4`. Coordinates are 2 bits, so 4 is the maximum.
* `SHUFFLE_EN = 1`. Set it to 0 for the unprotected baseline.
* `TROJAN = TR_HEAD`.
* `TRIG_VALUE = 16'hC35A`.
* `FIFO_DEPTH = 8`.

The network interfaces and processor cores are outside this RTL.

## Where this follows the original scheme and where it is its own

Taken from the scheme:

* the flit fields, 14 critical bits, 32-bit payload and 5-flit packets;
* a 3-bit shuffle select that picks one of 8 patterns and is derived from the
  low payload data lines;
* a [19,14] Hamming code added after shuffling and checked before
  unshuffling;
* the encoder and decoder at the router's ends, and the partial unshuffle for
  route computation;
* input and output FIFOs of depth 8, a crossbar and an arbiter;
* a 4x4 mesh with wormhole switching;
* four Trojan types placed behind the input buffer, with a data-pattern
  trigger and XOR-style payloads.

This design's own choices:

* the select function and the 8 permutations;
* the codeword bit order;
* the SEQ width;
* the valid/ready links;
* XY routing and round-robin arbitration;
* the drop rule for flits that have no route;
* the Hamming correction inside the address extractor;
* the output FIFO depth;
* the trigger bits and value, and the exact bits the Quan and Address Trojans
  hit;
* the two-cycle router timing.

Not modelled: the network interface and cores, retransmission of dropped
packets, and any source routing.

## Measured behaviour

The four attack testbenches run the protected and the unprotected mesh on
identical traffic. Every node sends 5-flit packets to uniformly random
destinations for 2000 cycles. One packet in five carries the trigger value.
"Delivered" means the packet reached the node it was addressed to, bit-exact.

| Trojan | protected, delivered | unprotected, delivered |
|--------|----------------------|------------------------|
| Head   | 100 % at every rate 0.1-0.7 | about 80 % (every triggered packet is lost) |
| Tail   | 100 % at every rate | 75 % at rate 0.1, falling to 16-22 % as merged packets block paths |
| Address | 93-95 %; misrouted packets fall by about 85 % (679 to 88 at rate 0.7) | about 85 %; column x = 0 receives about twice its share |
| Quan   | 29 % at rate 0.1, falling to 3.5 % at 0.7 | about 91 % |

Latency with no attack runs from 13 cycles at rate 0.1 to 25 cycles at 0.5.
It saturates between 0.6 and 0.7.

What the numbers show:

* **Head and Tail Trojans are defeated completely.** A one-bit payload lands
  on a shuffled position, and the Hamming code repairs it at the next decoder.
* **The Address Trojan is defeated in part.** Its payload can hit two bits
  that are both set. Both bits are then wrong and the code miscorrects a
  third.
* **The Quan Trojan, as modelled here, is made worse by the protection.** It
  inverts two bits, so every trigger becomes a double error. The miscorrected
  third bit is often H or T in its shuffled place. That opens or breaks
  wormhole paths and stalls much of the network. Without protection the
  same Trojan only costs the packets that trigger it. The protection only
  helps against one-bit payloads. Against multi-bit payloads it needs a
  code that at least detects double errors, or a Trojan that cannot reach
  every shuffled position.

Compared with the original evaluation:

* Full recovery from the Head and Tail Trojans agrees with it.
* The Address Trojan result agrees with its "more than 90 % delivered" figure.
* The Quan Trojan result does not agree. The original reports a partial
  recovery (about two thirds) and a larger unprotected loss than the Address
  Trojan causes. Neither the number of bits its Quan Trojan changes nor the
  share of packets that trigger it is known, so the absolute losses here are
  not comparable either.

The protected mesh with no Trojan delivers every packet bit-exact
(`tb_noc_mesh_full`: 4846 packets, mean latency 16.2 cycles).

## Simulating

All files are SystemVerilog 2017. The `rtl/` files are synthesizable. `tb/`
holds self-checking testbenches; each prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_noc_mesh \
          rtl/noc_pkg.sv tb/tb_noc_mesh.sv -o sim && obj_dir/sim
```

Use the same command for any other testbench. Testbenches that use the
reference models also need `tb/tb_ref_pkg.sv` on the command line.

* **Unit tests.** `tb_<module>` exists for every RTL module. The shuffle,
  Hamming and extractor tests compare against independent reference models in
  `tb_ref_pkg` and inject every single-bit error.
* **`tb_router`.** One router with the Head Trojan. Checks routing, packet
  contiguity, bit-exact delivery, the 2-cycle latency and the counters.
* **`tb_noc_mesh`.** The protected mesh and the unprotected mesh on identical
  traffic. Every mechanism must be seen at least once.
* **`tb_noc_mesh_full`.** The mesh at its default parameters for 5000
  injection cycles.
* **`tb_attack_head`, `tb_attack_tail`, `tb_attack_quan`, `tb_attack_addr`.**
  Each builds a protected and an unprotected mesh with one Trojan type and
  sweeps injection rates 0.1 to 0.7. Each prints delivery, misrouting and
  latency per rate, plus the packets received per node at rate 0.3.
* **`noc_traffic`.** The traffic source and packet scoreboard that the mesh
  testbenches use. It is a behavioural model, not RTL.
