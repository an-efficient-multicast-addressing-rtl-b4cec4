# RPHOR multicast copy network

A multicast ATM switch must copy one incoming cell to any subset of its N
outputs. This design does it in a single pass through a self-routing banyan
network of 2x2 switching elements, using **Recursive Partial Header ORing
(RPHOR)** addressing:

* The cell's routing header is an N-bit destination bitmap `P0 P1 … P(N-1)`.
  `Pk = 1` asks for a copy at output port k. The header is N bits for any
  multicast set, against `(N-1)(log2 N + 1)` bits for an explicit address list
  and `2(N-1)` bits for vertex-isolation addressing.
* A switching element at stage s (counting from 0) receives an `N/2^s`-bit
  header. This header covers exactly the outputs still reachable from that
  element. The element ORs the first half into `C(U)` and the second half
  into `C(L)`:

  | C(U,L) | action |
  |---|---|
  | 10 | cell goes to the upper link with the first header half |
  | 01 | cell goes to the lower link with the second header half |
  | 11 | cell is copied: first half up, second half down |
  | 00 | cell is dropped (no destination behind this element) |

* After log2 N stages, each copy carries one header bit (its own `P`, always 1)
  followed by the cell body, and it sits on the requested output.

Example (16 ports, in `tb/tb_rphor_copy_network.sv`). Input 0 sends to
{2,3,4,5,9,11,15}. Stage 0 copies (11). Both stage-1 elements copy (11). The
four stage-2 elements on the tree compute 01, 10, 11 and 01. The last-stage
elements leading to ports 2–3 and 4–5 copy, and those leading to 9, 11 and 15
send lower only (01).

## Files

| file | module |
|---|---|
| `rtl/rphor_pkg.sv` | `link_t` (one serial link: `vld`, `dat`) and `ATM_CELL_BITS` = 424 |
| `rtl/rphor_logic.sv` | bit-serial OR of the two header halves; five flip-flops and one OR |
| `rtl/packet_controller.sv` | delay line, header split and cell copy |
| `rtl/input_controller.sv` | strobe counter + `rphor_logic` + `packet_controller` |
| `rtl/output_controller.sv` | two-input arbiter for one outgoing link |
| `rtl/switch_element.sv` | 2 input controllers + 2 output controllers |
| `rtl/rphor_copy_network.sv` | top: log2 N stages of N/2 elements |

## Link format and timing

Every link is bit-serial, one bit per clock. `vld` is high for the whole cell.
The header comes first, P0 first, then the `CELL_BITS` body (default 424, a
53-byte ATM cell). Cells may follow each other with no idle clock. Receivers
find cell boundaries by counting bits from the first clock with `vld` high.
All inputs must be **slot aligned**, meaning all cells of a slot start in the
same clock. The output controllers rely on this.

| point | cell length |
|---|---|
| network input | N + CELL_BITS |
| after stage s | N/2^(s+1) + CELL_BITS |
| network output | 1 + CELL_BITS |

A stage whose incoming header has H bits adds **H + 2 clocks** of latency.
The network adds **(2N − 2) + 2·log2 N** clocks, from the first header bit in
to the first bit out: 38 clocks for N = 16. The testbenches check these
numbers exactly.

## RPHOR logic (`rphor_logic`)

The control bits are computed on the fly as the header streams past, with
five flip-flops:

1. an input flip-flop that registers the header bit;
2. an accumulator, whose next value is `in | (acc & ~clr)`. This is the
   single OR gate. `clr` makes a header half start a fresh OR;
3. a capture flip-flop for C(U), enabled by `cnt0` at the last bit of the
   first half;
4. the C(U) output flip-flop and 5. the C(L) flip-flop, both enabled by
   `cnt1` at the last bit of the header.

C(U) and C(L) therefore appear together, one clock after the last header bit
has been registered. That is H+1 clocks after the cell's first bit. They then
hold until the next cell's `cnt1`. The input controller makes `clr`, `cnt0`
and `cnt1` from a bit counter, registered so that they line up with the input
flip-flop.

The circuit this follows uses two transmission gates and three further clocks
(CLK0–CLK2) to move the results between flip-flops. Here everything runs on
one clock, with clock enables. The asynchronous accumulator reset becomes the
synchronous `clr` mask. The logic is identical at every stage; only the strobe
positions depend on H. At the last stage (H = 2) each half is one bit, so the
OR does no work there, but the block is kept for regularity.

## Packet controller: holding the cell until C(U,L) is known

The element cannot choose its outputs before the whole header has passed, so
the cell goes through an **(H+1)-stage delay line**. With `h = H/2`:

* the **lower copy** is the input frame from bit `h` onwards (second header
  half + body). It is read from a tap `H+1−h` clocks behind the input;
* the **upper copy** needs the first header half and then the body. The body
  is on the same tap at the same time. For the first `h` clocks of the
  outgoing frame, the header bits come from the end of the delay line,
  exactly `h` clocks further back.

So both copies leave at the same clock, H+1 clocks after the cell's first bit,
and are `h + CELL_BITS` long. At that clock the RPHOR logic has just produced
C(U,L), which gates the two requests. The next back-to-back cell cannot
change C(U,L) before the current outgoing frame has ended. This holds because
its `cnt1` comes H clocks after its first bit, while the current frame ends
`H−h` clocks after that first bit.

## Output controller and contention

Each output controller takes one request from each input controller (upper
links to the upper controller, lower links to the lower one). At the first
clock of a slot it grants the link to the only requester. When both request,
it grants the input whose turn it is, and the turn passes to the other input
(round robin). The grant holds for the frame. The output is registered. The
losing copy is **discarded**, and `collision` pulses for one clock. A banyan
network blocks internally, so simultaneous multicast cells from different
inputs can lose copies even when their destination sets are disjoint. A single
multicast cell on its own is never blocked.

## Network wiring (`rphor_copy_network`)

* Inputs reach stage 0 through a perfect shuffle (input i goes to line i
  rotated left by one bit). This only decides which inputs share an element.
* After stage s, every block of `N/2^s` lines is unshuffled. The upper links
  of the block's elements go to its top half, the lower links to its bottom
  half (baseline wiring). The upper link of a stage-s element therefore always
  leads to the lower-numbered half of the outputs it can reach, which is the
  order the header halves are in.
* Element j of the last stage drives outputs 2j and 2j+1.

Ports: `in_link[N]`, `out_link[N]` (`link_t`); `collision[stage][line]`, one
pulse per output controller; `ctrl[stage][line]`, the C(U,L) last computed on
each stage input line (C(U) in bit 1). The last two are for observation.
Lines that a cell does not reach keep their previous `ctrl` value.

Parameters: `N` (ports, power of two, default 16) and `CELL_BITS` (default
424). Every element instance gets `H = N >> stage`.

## What follows the source and what is this design's own

Taken from the addressing scheme: the N-bit bitmap header, its halving at
every stage, the C(U,L) rules, and the element's structure (two input
controllers, each with RPHOR logic and a packet controller, and two output
controllers). Also taken: the five-flip-flop, one-OR form of the RPHOR logic
and its strobe sequence (restart, compute C(U), restart, compute C(L), present
both), and a 16-port banyan network.

This design's own choices:

* a single clock with enables in place of the separate clocks;
* the header order on the wire (P0 first);
* the 424-bit body;
* the delay-line packet controller and its latency;
* cell framing by counting bits;
* slot alignment;
* round-robin arbitration and dropping of lost copies;
* the `collision` and `ctrl` observation ports;
* the input-side shuffle;
* leaving the 1-bit residual header on the outputs;
* asynchronous active-low reset `rst_n` of all state.

The control bits could also be computed by a tree of wide OR gates on a
parallel header, with an N-input OR at stage 0. That grows too fast with N,
so only the bit-serial RPHOR logic is built.

There is no point-to-point routing network after the copy network: each copy
already arrives at its final port. There is no header encoder either: the
source supplies the bitmap.

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_rphor_logic` | C(U)/C(L) against the OR of each half, for H = 16, 8, 4, 2, and that they hold |
| `tb_packet_controller` | both output streams clock by clock, for all four C(U,L) values, with back-to-back cells |
| `tb_input_controller` | control bits and split streams from random headers |
| `tb_output_controller` | grants, round-robin order, collision pulses, one-clock delay |
| `tb_switch_element` | both links clock by clock, with contention and broadcasts |
| `tb_rphor_copy_network` | the 16-port network at default size (see below) |
| `tb_rphor_examples` | the two 8-port examples, with the expected C(U,L) per stage |
| `tb_rphor_table_sizes` | a 32-port network, random multicast cells |

`tb_rphor_copy_network` uses the default parameters. It runs the 16-port
example, including the C(U,L) pairs each stage computes. It then sends
single-source cells with random headers (including empty and broadcast
headers, some back to back), checking delivery, body and latency at every
port. Finally it sends slots with several sources, where each delivered copy
must belong to a source that asked for that port, and a slot without
collisions must deliver every requested copy. It counts copy, upper-only,
lower-only, discard, collision and back-to-back events, and fails if any of
them never occurs.

To simulate with Verilator:

```
verilator --binary --timing --assert rtl/rphor_pkg.sv rtl/rphor_logic.sv \
  rtl/packet_controller.sv rtl/input_controller.sv rtl/output_controller.sv \
  rtl/switch_element.sv rtl/rphor_copy_network.sv tb/tb_rphor_copy_network.sv \
  --top-module tb_rphor_copy_network -o sim && ./obj_dir/sim
```

For `tb_rphor_table_sizes`, add `tb/rphor_net_exerciser.sv`.

## Sizes and limits

The header-size comparison this scheme comes from goes up to 1024 ports. The
RTL is parameterized for any power-of-two N. Flip-flop count grows roughly as
4·N² (delay lines of H+1 bits in both input controllers of every element).
That is 3,344 flip-flops at N = 16, and about four million at N = 1024.
Simulation was run at N = 8, 16 and 32. Larger sizes were not simulated,
because Verilator's C++ compile time grows steeply with N: a 64-port build
takes well over 7 minutes. The internal
speed-up that a header costs, (header + cell)/cell, is a property of the link
rate and is not modelled.
