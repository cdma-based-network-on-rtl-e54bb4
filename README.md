# Overloaded CDMA crossbar for a network-on-chip router

A crossbar moves flits from any of its transmit ports to any of its receive ports. This
design does it with code-division multiple access (CDMA): every transmitter spreads its flit
over N clock cycles ("chips") with a spreading code, all spread signals are simply **added**
on one shared channel, and every receiver recovers its own flit by correlating the channel
sum with its own code. There is no switch matrix and no per-cycle arbitration; latency is fixed.

A classical CDMA crossbar with Walsh codes of length N serves only N-1 ports, one per
non-constant Walsh code. The **overloaded CDMA interconnect (OCI)** implemented here doubles
that to M = 2(N-1) ports without changing the accumulator decoders: N-1 extra ports use
*non-orthogonal* codes that each put a single 1 into one time slot, a little TDMA signal
riding on top of the CDMA signal. The architecture follows the OCI crossbar described in
"CDMA Based Network on Chip with Crossbar Switches"; the RTL, its interfaces and the choices
listed under [Departures and own choices](#departures-and-own-choices) are this implementation's.

Two variants are provided, both with M = 14 ports for N = 8:

| variant | chips per cycle | flits per port | latency (tx_start to rx_valid) |
|---|---|---|---|
| serial, T-OCI (`toci_crossbar`) | 1 | 1 every N = 8 cycles | N + 5 = 13 cycles |
| parallel, P-OCI (`poci_crossbar`) | N | 1 every cycle | 6 cycles |

(latencies with the default pipelined adder; with the reference adder subtract 2.)

## How overloading works

### The two code families

Chips are 0/1 values. For code length N (a power of two, at least 4):

* **Orthogonal codes** 1..N-1 are the Walsh-Hadamard rows; chip j of code i is
  `parity(i & j)`. For N = 8: code 1 = `01010101`, code 2 = `00110011`, code 3 = `01100110`.
  Chip 0 of every code is 0, and every code has N/2 ones.
* **T-OCI codes** 1..N-1: code k is 1 in slot k and 0 elsewhere. Slot 0 belongs to no T-OCI
  code; it is the reference slot.

Spreading (`oci_hybrid_encoder`): for an orthogonal code the chip sent is `data XOR code`;
for a T-OCI code it is `data AND code`, so a 1 shows up as a single extra unit in slot k and
a 0 sends nothing. A multiplexer picks the XOR or AND result by the kind of code assigned.

### Decoding the orthogonal ports: a signed accumulator

The receiver adds the channel sum S(j) when its despreading chip is 0 and subtracts it when
the chip is 1 (`oci_orth_decoder`), which is a zero-accumulator minus one-accumulator
correlator folded into one up/down accumulator. Over N slots:

* its own flit contributes +N/2 for a 1 (sent as the inverted code) and -N/2 for a 0;
* every other orthogonal code contributes exactly 0 (orthogonal and balanced);
* every active T-OCI code contributes +1 or -1, in total between -N/2 and N/2-1.

The result lies in [0, N-1] for a 1 and in [-N, -1] for a 0, so the **sign bit alone** is the
decoded bit (sign 0, including the value 0, means 1). Decoding is exact for any traffic.

### Decoding the T-OCI ports: parity against slot 0

With all N-1 orthogonal codes in use, S(j) - S(0) is even for every slot j, whatever data they
carry: in slot j exactly N/2 of the codes have chip 1, and each contributes its chip's change
relative to slot 0. A T-OCI 1 in slot k makes S(k) - S(0) odd. So the T-OCI decoder
(`oci_tdma_decoder`) only keeps the least significant bit of the sum in slot 0 and in slot k
(a 2-bit register per bit slice) and XORs them.

When fewer orthogonal codes are active, the parity they contribute in slot k is
`parity(X & k)`, where X is the XOR of the active code numbers (Walsh chips are linear in the
code number). The controller computes X (`orth_mix`) for every transaction and the T-OCI
decoders XOR in `parity(orth_mix & k)`. With all orthogonal codes active X = 0 and the
decoder is the plain two-register XOR.

### Worked example (N = 8)

Orthogonal codes 1, 2, 3 carry 0, T-OCI codes 1 and 2 carry 1, codes 4..7 are idle:

```
slot             0  1  2  3  4  5  6  7
code 1 (d=0)     0  1  0  1  0  1  0  1
code 2 (d=0)     0  0  1  1  0  0  1  1
code 3 (d=0)     0  1  1  0  0  1  1  0
T-OCI 1 (d=1)    0  1  0  0  0  0  0  0
T-OCI 2 (d=1)    0  0  1  0  0  0  0  0
channel sum S    0  3  3  2  0  2  2  2
```

Decoder of code 2: slots with chip 0 give +0+3+0+2 = 5, slots with chip 1 give -(3+2+2+2)
= -9; total -4 < 0, so the bit is 0. T-OCI decoder 1: LSB(S(1)) XOR LSB(S(0)) = 1; T-OCI
decoder 2: LSB(S(2)) XOR LSB(S(0)) = 1 (X = 1^2^3 = 0, no correction). This example is
replayed by `tb_oci_orth_decoder` and `tb_poci_orth_decoder`.

## The serial crossbar (T-OCI)

```
 tx_req/dest/data -> controller -> code per transmitter
                  -> flit registers -> M hybrid encoders -> steering by code
                  -> crossbar adder (N inputs) -> channel sum, slot
                  -> N-1 accumulator decoders + N-1 parity decoders -> rx_valid/rx_data
 chip counter 0..N-1 paces the encoders and the controller
```

**Transaction timing.** A free-running chip counter counts slots 0..N-1. In slot N-1 the
controller arbitrates and pulses `tx_start` for the winners; on that clock edge their flits
are registered and their codes loaded. During the next N cycles every encoder emits one chip
per bit slice per cycle. Transactions follow each other without gaps.

**Crossbar adder** (`oci_crossbar_adder`). Of the 2(N-1) encoder outputs, at most one T-OCI
chip can be 1 in a given slot, so a multiplexer steered by the slot number picks that one and
the adder sums only N one-bit inputs (N-1 orthogonal + 1). The sum needs log2(N)+1 bits
(all N inputs can be 1). Chips and slot number first enter the encoded-data register. The
reference variant then has a combinational tree and a sum register (latency 2); the pipelined
variant registers every one of the log2(N) tree levels (latency 1 + log2 N = 4). The slot
number travels beside the sum so the decoders know which slot each sum belongs to.

**Steering.** Because a transmitter may be given any receiver's code, orthogonal or T-OCI,
a small AND-OR stage places each encoder's chips on the adder input that belongs to its code.

**Decoders** accumulate as the sums arrive and present their flits together, one cycle after
the sum of slot N-1; `rx_valid` is high for the receive ports that were sent a flit in that
transaction. Latency from `tx_start` to `rx_valid`: N + adder latency + 1.

All A bit slices share the counter, the codes and the controller; each slice has its own
encoder bit, adder tree and decoder accumulator.

## The parallel crossbar (P-OCI)

`poci_crossbar` produces all N chips of a transaction in the same cycle: each port has N
encoders (one per slot), the adder is replicated N times (copy j sums slot j; its T-OCI
multiplexer is fixed to slot j), the orthogonal decoder (`poci_orth_decoder`) is the
unrolled accumulator (a signed adder tree over the N sums) and the T-OCI decoder
(`poci_tdma_decoder`) XORs the LSBs of sums k and 0. The controller arbitrates every cycle.
It moves N times as many flits as the serial crossbar for about N times the encoder and adder
logic. Latency from `tx_start` to `rx_valid` is adder latency + 2.

## Controller and code assignment

`oci_controller` uses receiver-based assignment. Each receive port has a fixed despreading
code: ports 0..N-2 use Walsh codes 1..N-1, ports N-1..2N-3 use T-OCI codes (slots) 1..N-1.
A transmitter that wins access to a receiver is given that receiver's code for one
transaction. Among transmitters asking for the same receiver, the lowest port number wins
(fixed priority); the others keep their flit and ask again in the next transaction, so a
low-numbered port that always targets the same receiver can starve a higher-numbered one.
A receiver is only offered if its `rx_ready` is high at grant time. Transmitters that are idle
or lose get no code and send zero chips, adding nothing to the channel.

Per transaction the controller holds: the code of every transmitter, `rx_active` (which
receivers get a flit) and `orth_mix` (XOR of the Walsh code numbers in use). The crossbars
delay the last two to line up with the decoders.

## The router around the serial crossbar

`toci_router` adds a transmit and a receive network-interface FIFO (`oci_fifo`, 4 deep) per
port. A processing element writes `{destination, flit}` into its transmit FIFO
(`pe_tx_valid`/`pe_tx_ready`), the head of every non-empty FIFO requests the crossbar, and
decoded flits are written into the receive FIFOs, which the PE reads with
`pe_rx_valid`/`pe_rx_pop`. Flow control is store and forward: a receiver is offered only when
its FIFO has room for the new flit and for every flit already on its way
(`RX_RESERVE` = 2 places for N = 8, derived from latency and transaction length). An assertion
flags any receive overflow.

`oci_noc_top` places this router (ports `t_*`) and a bare P-OCI crossbar (ports `p_*`) side by
side. The processing elements are outside; the packet-to-flit split and the choice of
destination port (the routing) are theirs.

## Files

| file | contents |
|---|---|
| `rtl/oci_pkg.sv` | code types, Walsh/T-OCI chip functions, port-to-code map, adder latency |
| `rtl/oci_chip_counter.sv` | slot counter of the serial crossbar |
| `rtl/oci_code_gen.sv` | spreading/despreading code generator |
| `rtl/oci_hybrid_encoder.sv` | XOR/AND hybrid encoder, A bit slices |
| `rtl/oci_crossbar_adder.sv` | T-OCI multiplexer + tree adder, reference or pipelined |
| `rtl/oci_orth_decoder.sv`, `rtl/oci_tdma_decoder.sv` | serial decoders |
| `rtl/poci_orth_decoder.sv`, `rtl/poci_tdma_decoder.sv` | parallel decoders |
| `rtl/oci_controller.sv` | arbitration and code assignment |
| `rtl/toci_crossbar.sv`, `rtl/poci_crossbar.sv` | the two crossbars |
| `rtl/oci_fifo.sv`, `rtl/toci_router.sv` | NI FIFO and the serial router |
| `rtl/oci_noc_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters (defaults): `N = 8` code length, `A = 8` flit width, `PIPELINED = 1`,
`DEPTH = 4` FIFO depth, `M = 2*(N-1)` ports (derived; leave it alone). N must be a power of
two of at least 4; the serial crossbar also needs the adder latency to be below N (checked at
elaboration). The crossbars are tested at N = 8 and N = 16, everything else at N = 8.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself (each has a
watchdog). With Verilator 5, from the project root, the package first:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    rtl/oci_pkg.sv $(ls rtl/*.sv | grep -v oci_pkg) tb/tb_oci_noc_top.sv \
    --top-module tb_oci_noc_top -o sim
./obj_dir/sim
```

Replace `tb_oci_noc_top` with any other testbench. What they check:

* `tb_oci_noc_top` (defaults, end to end): tagged flits through the serial router checked for
  loss, corruption and order per source/destination pair; P-OCI flits checked for data and
  exact arrival cycle; congestion with full transmit FIFOs, held-back receivers and conflicts;
  a full-load permutation phase measuring 14 flits per 8 cycles (serial) and 14 per cycle
  (parallel).
* `tb_toci_crossbar`, `tb_poci_crossbar`: grant prediction (priority, readiness), exact
  latency, transaction spacing, full-load transactions, partial orthogonal use with T-OCI
  traffic. The `_ref` and `_n16` wrappers rerun them with the reference adder and with
  N = 16 (30 ports).
* `tb_toci_router`: the router from the PE side, with delivery-rate check.
* decoder, encoder, adder, code, counter, controller and FIFO benches compare against models
  written independently in the bench (channel sums built from the code definitions, a queue
  model, a grant predictor).

All run in well under a second each.

## Departures and own choices

* **Code assignment.** The source architecture both names a receiver-based protocol and says
  that fixed codes are allocated to all encoders. The receiver-based protocol is implemented,
  since only it lets a transmitter reach any receiver; the steering stage between encoders and
  adder follows from it and is not part of the published block diagram.
* **Idle orthogonal codes.** The published parity argument needs all orthogonal codes (or a
  suitable odd number of them) active, while idle ports send nothing. The `orth_mix`
  correction makes T-OCI decoding exact for any set of active codes; it is this design's
  addition.
* **Sum width** is log2(N)+1 bits, one more than the published log2(N), because the sum can
  reach N.
* **Pipeline depth**: encoded-data register plus one register per tree level (latency
  1 + log2 N); the reference adder is encoded-data register plus sum register.
* Flit width 8, FIFO depth 4, lowest-port-wins priority, the port-to-code map, handshake
  signal names, synchronous active-low reset and the decoder output timing are choices of this
  design; the source gives none of them.
* Not built: the processing elements and the packet format; no FPGA resource, timing or power
  figures are reproduced.
