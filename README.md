# CDMA crossbars and a 1x3 packet router for networks-on-chip

A network-on-chip crossbar normally needs a switch matrix that grows with the
square of the port count. A CDMA crossbar replaces it with a single adder. Every
transmitter spreads its data with its own code, one code chip per clock cycle.
All spread signals are added into one channel value. Every receiver recovers
its own data by correlating that channel value with its code over a frame of N
cycles. This RTL contains three such crossbars and one small packet router:

* **ACDMA crossbar** (`acdma_crossbar`). "Aggregated" CDMA: a whole W-bit
  word, not a single bit, is spread with one chip per cycle. N ports carry N
  words every N cycles through one W+1+log2(N)-bit channel.
* **Overloaded crossbar, T-OCI** (`oci_crossbar`). Walsh codes of length N
  give only N-1 useful orthogonal codes. This crossbar adds N-1 more ports
  that each own one time slot of the frame, so 2N-2 ports share codes of
  length N. The receivers still use the plain accumulator decoder.
* **Overloaded crossbar, P-OCI** (`poci_crossbar`). The same ports and codes,
  but all N chips go out in one clock cycle through N copies of the adder. A
  word crosses in one cycle instead of N.
* **1x3 router** (`router_1x3`). One 8-bit input port and three output ports,
  each with a store-and-forward FIFO. Packets carry a header, a payload and a
  parity byte.

The top module `noc_cdma_top` places the four side by side. They share only
clock and reset.

## Codes

All spreading uses Walsh-Hadamard codes of length N (N a power of two). Chip
`j` of code `k` is `parity(k & j)`, held as one bit: 0 stands for +1 and 1 for
-1 (`cdma_pkg::walsh_chip`). Code 0 is all +1. Every other code has N/2 chips
of each sign. Any two codes are orthogonal.

## ACDMA crossbar

### Spreading a word with one chip

To multiply a two's-complement word `d` by a chip of -1, you invert it and add
one. The encoder (`acdma_encoder`) does only the first half: W XOR gates with
the chip. The "+1" goes to the channel adder, which takes the chip bits as
extra one-bit inputs. The adder therefore sums `±d_i` over all ports without
needing any negation logic at the ports.

### Channel adder

`acdma_channel_adder` is a binary tree of log2(N) stages with a register after
each stage. Each stage-1 adder takes two encoded words and their two chips.
Each stage is one bit wider than the one before, which gives W+1+log2(N) bits
at the root.

The extra bit at the bottom is needed because a negated word spans
-2^(W-1)..+2^(W-1). For example, two ports that both send the most negative
word with chip -1 produce +2^W at stage 1. A stage-1 output of only W+1 bits
would overflow on that value.

### Decoder

`acdma_decoder` is an up/down accumulator. It adds the channel value when its
despreading chip is +1 and subtracts it when the chip is -1. On chip 0 a
multiplexer feeds the adder/subtractor zero instead of the register, so each
frame starts fresh without a clear cycle. After N chips the accumulator holds
`N * d_k`, and an arithmetic shift right by log2(N) gives `d_k`. The
accumulator is W+1+2·log2(N) bits, so no partial sum can overflow.

### Controller, codes and timing

`acdma_controller` runs a free-running chip counter that divides time into
frames of N cycles. In the last cycle of a frame it grants, for every RX port,
one of the TX ports that request it. The choice is round robin, from a pointer
that advances every frame. In the next frame each granted TX port spreads its
word with the Walsh code of its **destination**, so every RX port always
despreads with its own fixed code. A port without a grant sends 0, which adds
nothing to the channel. The decoders see the channel log2(N) cycles late, so
the controller delays their chip counter and their "a word is addressed to you"
flags by the same amount.

Port protocol:

* A TX port holds `tx_valid_i`, `tx_dest_i` and `tx_data_i` until `tx_ready_o`
  pulses. The pulse comes in the last cycle of a frame.
* The word crosses during the next frame.
* It appears on `rx_data_o[dest]`, with a one-cycle `rx_valid_o` pulse,
  **N + log2(N) + 1 cycles** after the `tx_ready_o` pulse. That is 12 cycles
  at N = 8.
* Throughput is one word per port per frame. All N ports can send in the same
  frame if their destinations differ.

## Overloaded crossbar (T-OCI)

This is the least obvious part of the design.

### Port-to-code map

There are M = 2N-2 port pairs (`cdma_pkg::oci_chip`, `oci_mode`):

| ports | kind | code | encoder |
|---|---|---|---|
| 0 .. N-2 | orthogonal | Walsh code p+1 (code 0 unused) | data XOR chip |
| N-1 .. 2N-3 | TDMA | one-hot time slot p-N+2 (1..N-1) | data AND chip |

Chip 0 carries no TDMA bit. Each bit of an A-bit word travels in its own bit
slice. One arbiter and one chip counter serve all slices.

Each bit slice contains:

* one `oci_hybrid_encoder` per port, which picks the XOR or the AND path with
  a multiplexer;
* an `oci_tree_adder`, which counts the ones among the M spread bits (input
  register plus ceil(log2 M) registered stages). Its output has
  ceil(log2(M+1)) bits: 4 bits for M = 14;
* one decoder per RX port.

### Why the orthogonal decoders still work

With unipolar XOR spreading, the accumulator of `oci_orth_decoder` ends a
frame at +N/2 for a sent 1 and at -N/2 for a sent 0. The other orthogonal ports
contribute exactly zero. The TDMA bits contribute one bit each in chips 1..N-1.
Their sum, weighted by the code, lies in -N/2..N/2-1, because chip 0 is +1 in
every code and carries no TDMA bit. The accumulator is therefore ≥ 0 exactly
when a 1 was sent. The decoder outputs the inverted sign bit.

### How a TDMA bit is recovered

`oci_nonorth_decoder` looks only at bit 0 of the channel count. In chip j, the
parity of the count is the XOR of three terms:

1. the XOR of all orthogonal data bits, which is the same in every chip;
2. chip j of the Walsh code whose index is the XOR of the code indices in use;
3. the bit of the TDMA port that owns slot j.

The second term follows from `walsh(a, j) ^ walsh(b, j) = walsh(a ^ b, j)`.
Every Walsh code is +1 in chip 0, so bit 0 of the count in chip 0 gives the
first term. The decoder keeps two bits in a register: the count's bit 0 in
chip 0 and in its own slot. Its output is their XOR, corrected by chip SLOT of
code `code_x`. The arbiter computes `code_x`, the XOR of the indices of the
Walsh codes on the channel in that frame. If all N-1 orthogonal codes are in
use, `code_x` is 0 and the correction vanishes.

### Timing

The handshake is the same as in the ACDMA crossbar. Delivery comes
**N + ceil(log2 M) + 2 cycles** after `tx_ready_o`: 14 cycles at N = 8, M = 14.
Up to 2N-2 words cross per frame of N chips.

## Parallel overloaded crossbar (P-OCI)

`poci_crossbar` keeps the port-to-code map, the hybrid encoder, the tree adder
and the two decoding rules of T-OCI, but lays the N chips of a frame out in
space instead of time:

* Each bit slice has N rows of M encoders. Row j gets chip j of every port's
  code from `poci_arbiter`. Each row has its own `oci_tree_adder`, so every
  cycle produces N channel counts.
* `poci_orth_decoder` multiplies the N counts by its code (keep for +1,
  negate for -1), adds them in one combinational tree and registers the
  inverted sign. It needs no accumulator and no chip counter.
* `poci_nonorth_decoder` takes bit 0 of the chip-0 count and bit 0 of its
  slot's count from the same cycle and applies the same `code_x` correction.
* `poci_arbiter` arbitrates every cycle with a round-robin pointer that
  advances every cycle. There is no frame counter.

A granted word appears **ceil(log2 M) + 3 cycles** after `tx_ready_o` (7 at
N = 8). Up to 2N-2 words cross every cycle, N times the T-OCI rate, for N
times the adder area.

## 1x3 packet router

A packet is a header byte, then a payload, then a parity byte:

* the header holds the destination in bits [1:0] and the payload length
  (0..63 bytes) in bits [7:2];
* the parity byte is the XOR of the header and all payload bytes.

The source keeps `packet_valid` high for every byte of the packet. A byte is
taken on a rising edge with `packet_valid` high and `suspend_data` low.

* `router_fsm` has three states: DECODE, LOAD_DATA and LOAD_PARITY. It writes
  every accepted byte, parity included, into the FIFO of the addressed output.
  It raises `suspend_data` while that FIFO is full. A packet for destination 3
  is consumed and dropped.
* `router_reg` latches the header, keeps a running parity and compares it with
  the parity byte. `err` is valid the cycle after the parity byte and stays set
  until the next header.
* `router_fifo` (128 bytes by default) stores and forwards. Each entry
  carries a "last" tag, set on the parity byte, and the FIFO counts the
  complete packets it holds. `vld_out_x` is high only while at least one
  complete packet is stored. A packet that is still arriving stays hidden,
  even when the bytes of an earlier packet are being read. The head byte is
  shown on `data_out_x`, and `read_enb_x` pops it. A packet can be read from
  the cycle after its parity byte was written.
* The depth must hold the longest packet: 65 bytes, from a 63-byte payload
  plus header and parity. Otherwise a long packet would fill the FIFO while
  still waiting for its own end. `router_1x3` asserts this at elaboration.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| acdma_crossbar | N | 8 | ports = code length (power of two) |
| acdma_crossbar | W | 7 | word width |
| oci_crossbar | N | 8 | code length; ports M = 2N-2 |
| oci_crossbar | A | 8 | word width (bit slices) |
| poci_crossbar | N, A | 8, 8 | as for oci_crossbar |
| router_1x3 | FIFO_DEPTH | 128 | bytes per output FIFO (at least 65) |

`noc_cdma_top` passes these through as N, W, OCI_N, OCI_A and FIFO_DEPTH.
OCI_N and OCI_A serve both overloaded crossbars.

## Files

* `rtl/cdma_pkg.sv`: code functions and the spreading-mode enum.
* `rtl/acdma_*.sv`: the ACDMA crossbar and its encoder, channel adder,
  decoder and controller.
* `rtl/oci_*.sv`: the overloaded crossbar and its hybrid encoder, tree adder,
  two decoder types and arbiter (T-OCI).
* `rtl/poci_*.sv`: the parallel overloaded crossbar, its two decoder types
  and its arbiter.
* `rtl/router_*.sv`: the router and its FSM, register block and FIFO.
* `rtl/noc_cdma_top.sv`: the top.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cdma_pkg.sv \
    tb/tb_noc_cdma_top.sv --top-module tb_noc_cdma_top
./obj_dir/Vtb_noc_cdma_top
```

Replace `tb_noc_cdma_top` with any other testbench name. The package must
come first on the command line.

What the testbenches establish:

* Every block is compared against a reference computed in the testbench:
  * exhaustive tests for the encoders;
  * random sums with exact pipeline latency for the adders;
  * ideal channel values for all four decoder types;
  * the worst-case TDMA interference for the orthogonal OCI decoder.
* Both crossbar testbenches deliver several thousand words. They check every
  word, and its exact latency, against a scoreboard. They cover uniform,
  hot-spot and permutation traffic.
* The arbitration tests check at most one grant per destination, no idle
  destination that has a requester, and no request waiting more than a round.
* The router tests cover FIFO-full suspension, parity errors, dropped packets,
  empty and longest packets. They check that `vld_out_x` is high exactly while
  a complete packet is stored.
* `tb_noc_cdma_top` runs all four designs at their default sizes. It fails if
  any of the following never happens: crossbar contention, a fully loaded
  frame, a most-negative word, an overloaded OCI frame or P-OCI cycle, P-OCI
  contention, TDMA and orthogonal deliveries, router suspension, a parity error, a dropped packet, an empty
  packet, a longest packet, an incomplete packet held back.

## Where this RTL goes beyond or departs from its source

The crossbar structures follow the published descriptions: XOR word encoder,
pipelined chip-carrying adder tree and up/down accumulator decoder for ACDMA;
hybrid encoder, pipelined tree adder, sign-bit accumulator decoder and 2-bit
register decoder for T-OCI; the adder replicated once per chip, with +/-
units and an adder tree in the orthogonal decoder, for P-OCI. The router
follows its register / controller / three-FIFO structure, store-and-forward
buffering and port names.

These are choices made here:

* all port handshakes, the round-robin arbitration, and sending a word with
  the code of its destination;
* all reset behaviour;
* the Walsh row order;
* the sizes N = 8, A = 8 and FIFO_DEPTH = 128 (W = 7 follows the 7-bit data
  ports of the reference implementation);
* the router's packet layout and parity rule;
* the TDMA slot codes, the chip-0 parity reference and the `code_x`
  correction.

Known differences:

* **Adder widths.** Stage s of the ACDMA adder is W+1+s bits, one bit more
  than the per-stage labels of the source's adder drawing, which would
  overflow. The root width W+1+log2(N) agrees with the source's formula.
* **P-OCI timing.** The source gives P-OCI's structure but not its pipeline.
  Its latency and per-cycle arbitration are choices made here.
* **Conventional CDMA crossbar not built.** This is the bit-serial crossbar
  with one CDMA channel per bit that ACDMA is compared with.
* **OCI handshake signals not modelled.** The OCI arbiter uses a
  request/grant pair instead of the start/idle and valid/acknowledge signals
  drawn at the port buffers. RX ports always accept.
* **OCI adder input multiplexer not built.** The source draws a multiplexer
  at the tree adder's inputs but does not describe what it selects.
