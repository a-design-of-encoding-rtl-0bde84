# Standard-basis CDMA network-on-chip with multiplexer-based AND cells

This design is an on-chip network in which many processing elements (PEs)
send packets to each other at the same time over one shared wire. It uses
code-division multiple access (CDMA). Each sender spreads every data bit over
a short sequence of *chips* using an orthogonal spreading code. The chips of
all senders are mixed onto the wire. Each receiver pulls out its own sender's
bits by correlating the wire with the same code.

The codes are **standard-basis codes**. With `N` nodes, code `k` is `N` chips
long and has a single 1, at chip `k`. Spreading a bit `d` with code `k`
therefore gives `d` in chip slot `k` and 0 in every other slot. Because the
codes never have a 1 in the same slot, at most one sender can put a 1 on the
wire in any chip time. That has three consequences:

* Mixing needs no adder. A plain XOR of all chips is the exact sum, and it fits
  on one wire (the *binary sum*).
* Encoding and decoding are a single AND per chip. Here that AND is built as a
  2:1 multiplexer whose 0-leg is tied to logic 0 (`sb_mux_and`).
* The decoder's correlator never counts past 1, so a 1-bit register is enough.
  It accumulates by XOR.

In effect the code acts as a time slot on the shared wire. The scheduler
decides which sender gets which slot.

## Data path

```
 PE ─► network_interface ─► p2s ─► sb_encoder ─┐
 PE ─► network_interface ─► p2s ─► sb_encoder ─┼─► sb_binary_sum ─► binary_sum wire
 ...                                           ┘          │
                                                          ├─► sb_decoder ─► s2p ─► network_interface ─► PE
                                                          ├─► sb_decoder ─► s2p ─► network_interface ─► PE
                                                          ...
            network_scheduler: round-robin arbiters, code assignment,
                               2·N chip counters, frame timing
```

| Module | Role |
|---|---|
| `cdma_noc` | Top level. It holds `N_NODES` sender paths, the binary-sum combiner, `N_NODES` receiver paths and the scheduler. |
| `network_interface` | Builds a packet (data, source, destination) from the PE's request. It keeps the packet in a one-entry buffer until the packet is granted. It also hands each received flit and its source to the PE. |
| `p2s` | Loads a `FLIT_W`-bit flit and sends it LSB first, one bit per code period. |
| `sb_encoder` | Outputs `chip = data_bit AND code_word[chip_idx]` through `sb_mux_and`. The data bit drives the select line. |
| `sb_mux_and` | A 2:1 multiplexer with leg 0 tied to 0, leg 1 = `b` and select = `a`, so `z = a & b`. |
| `sb_binary_sum` | XOR of all encoder chips, giving the one-wire binary sum. |
| `sb_decoder` | Computes the result chip `binary_sum AND code_word[chip_idx]` (again with `sb_mux_and`). A 1-bit XOR accumulator collects the result chips, and the decoded bit is ready on the last chip. |
| `s2p` | Shifts the decoded bits back into a flit. |
| `chip_counter` | Counts chips 0..N-1 of one bit. Each node has two: one for its sender and one for its receiver. |
| `rr_arbiter` | Round-robin choice among the senders that want the same receiver. |
| `network_scheduler` | Runs the arbiters, assigns codes and runs the frame and the chip counters. |
| `cdma_noc_pkg` | Default sizes and the frame-phase enum. |

## Scheduling and code assignment

The network runs in **bit-synchronous frames**. Keeping every sender and
receiver chip-aligned is what keeps the codes orthogonal on the wire.

1. **Scheduling cycle (1 cycle).** Each network interface that holds a packet
   requests the packet's destination. Each receiver `j` has a round-robin
   arbiter, which picks one of the senders requesting `j`. The pointer then
   moves past the winner. The winner sees `grant` for this one cycle, and
   `grant` loads the flit into its `p2s`. Code `j` (a one-hot word with bit `j`
   set) is written to both receiver `j` and its chosen sender. Every node that
   neither sends nor receives in this frame gets the **all-zero code**. With
   that code its encoder outputs only zeros and its decoder outputs only zeros.
2. **Transfer phase (`FLIT_W × N_NODES` cycles).** Each bit lasts one code
   period of `N_NODES` chips. The chip counters of the active nodes all start
   from 0 in the same cycle, so they stay aligned. The counters of idle nodes
   stay at 0. On the last chip of each bit the sender's `p2s` advances and
   the receiver's `s2p` shifts in the decoded bit.
3. **Delivery.** In the next scheduling cycle (`rx_done`) each active
   receiver's interface registers the flit and the sender's number. It
   presents them to its PE one cycle later with a one-cycle `pe_rx_valid`.

Every receiver owns a different code, so all granted pairs (up to `N_NODES`
of them) transfer in the same frame. Contention only arises when two senders
want the same receiver. The losers keep requesting and win later in
round-robin order. While a packet waits, its interface is full and
`pe_tx_ready` is low, so the PE stalls.

### Timing at the interface

* Frame period: `1 + FLIT_W·N_NODES` cycles. This is 17 cycles at the default
  4 nodes and 4-bit flits.
* Latency from grant to `pe_rx_valid`: `FLIT_W·N_NODES + 2` cycles.
* Peak transfer: `N_NODES` flits per frame, i.e. just under one data bit per
  clock on the single wire. Standard-basis CDMA uses `N` chips per bit to
  carry `N` streams, so it carries as much as time-division on the same wire.
  Its gain is a very cheap encoder and decoder.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_NODES` | 4 | Number of nodes. This is also the code length and the number of codes. |
| `FLIT_W` | 4 | Data bits per packet flit. |

The default is the four-node network with four-bit data. The design was also
sized for 6, 8 and 16 nodes. `tb_cdma_noc_workloads` runs those three sizes.
The widths of addresses and chip indices follow from `N_NODES`
(`$clog2`).

## Where the design makes its own choices

The spreading, mixing and decoding are fully specified, so they follow the
original design closely. The design only names, or describes in a sentence,
the blocks around them: the converters, the interfaces and the scheduler.
For those blocks this RTL makes the simplest choices that work:

* **Codes come from the scheduler as one-hot words, and code = receiver
  number.** The design calls the code source a PN-sequence generator. For a
  standard-basis code that generator reduces to selecting one bit.
* **Frame protocol.** The design asks only for a bit-synchronous scheme. The
  one-cycle scheduling slot and the fixed-length frame are this RTL's own.
  Requests are sampled only in the scheduling cycle.
* **Bit order.** Flits are serialised right to left (LSB first). The
  serial-to-parallel side mirrors that order.
* **Mux wiring.** In both encoder and decoder the code chip drives leg 1 of
  the multiplexer, and the data bit or binary sum drives the select line.
  Functionally it is the same AND either way round.
* **Decoder XOR vs AND.** One high-level description says the receiver
  combines the sum with the code by XOR. The detailed decoding scheme says a
  multiplexer (AND) does it and the accumulator performs the XOR. This RTL
  follows the detailed scheme. An XOR with the code would invert the other
  senders' slots and break decoding.
* **Packets are one flit.** A packet carries 4 data bits, the source address
  and the destination address. Each network interface has a one-entry buffer
  with a valid/ready handshake. Splitting larger PE data into several flits
  is not described and is not built.
* **One bit stream per sender.** The design mentions the option of splitting
  a flit over several parallel bit streams to trade area for latency. It is
  not built.
* **Reset** is synchronous and active-low (`rst_n`). It clears every register.
* The binary-sum wire is combinational from encoders to decoders, with no link
  register.

The processing elements are not part of the RTL. Their packet interface is
the top's `pe_*` ports.

The published area, delay, power and throughput figures came from FPGA and
ASIC synthesis tools. They cannot be reproduced by simulation and are not
claimed for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_sb_mux_and`, `tb_sb_encoder`, `tb_sb_binary_sum`: exhaustive or random
  tests against a truth table or parity.
* `tb_sb_decoder`: random multi-sender chip streams. Every code, the all-zero
  code included, must return the right bit on the last chip.
* `tb_p2s`, `tb_s2p`, `tb_chip_counter`, `tb_rr_arbiter`: checks against
  reference models, with random gaps and clears.
* `tb_network_scheduler`: a reference round-robin model. It checks the grants,
  the code words, the source numbers, the frame length, `frame_done`,
  `rx_done` and all `2·N` chip counters, every cycle.
* `tb_network_interface`: the handshake, the buffering and the delivery.
* `tb_cdma_noc`: end to end at the default parameters, 30 packets per node.
  Half the traffic goes to node 0, so contention is frequent. A scoreboard
  (`noc_traffic_agent`) checks the source, the data and the exact latency of
  every delivery. It also counts parallel transfers, contended receivers,
  round-robin turns, frames with idle all-zero-code nodes and sender stalls.
  If any of these never happens, the test fails.
* `tb_cdma_noc_example`: a directed four-node run. Node 1 sends `1011` to
  node 3 while node 2 sends `0110` to node 4. The binary-sum wire is compared
  chip by chip with the expected standard-basis pattern. Then two senders
  target one receiver and must be served in consecutive frames.
* `tb_cdma_noc_workloads`: the same checks on 6-, 8- and 16-node networks
  side by side.

Assertions in the RTL check that grants are one-hot and come only in the
scheduling cycle. They also check that sender codes are one-hot or zero and
that the counters and decoders stay chip-aligned.

Running a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cdma_noc_pkg.sv \
    tb/tb_cdma_noc.sv --top-module tb_cdma_noc -Mdir obj_tb
./obj_tb/Vtb_cdma_noc
```

Replace `tb_cdma_noc` with any other testbench name. The `-Irtl -Itb` search
paths let Verilator find each module in the file of the same name.
