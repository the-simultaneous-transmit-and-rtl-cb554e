# STAR message channels: an error-correcting, self-repairing optical link in RTL

STAR ("Simultaneous Transmit And Receive") is a point-to-point message link. On every clock,
every channel sends one fixed-size 200-bit message in each direction. A message holds a
165-bit *package* (a 5-bit extension code, a 128-bit payload and a 32-bit context) and a 35-bit
error detection/correction (EDC) code. The receiver corrects single-bit errors without being
asked. When it finds an error it cannot correct, the channel repairs itself:

* it moves the traffic to other optical fibers, or to more fibers at a slower lane rate;
* it replays everything the receiver had not confirmed;
* when all four fibers of a direction have been used, a spare channel takes over.

No package is lost or duplicated along the way.

This repository is synthesizable SystemVerilog for that channel. It covers everything from the
EDC code up to a full link: two *bundle modules* (one per end), each with 16 data channels, a
task channel, a transfer-request channel and two spare channels. The optical transceivers and
fibers are outside the RTL. Their lane words are ports of the top module.

## Message format and EDC

| bits of the package | field |
|---|---|
| 164:160 | `ext`: extension code (payload format) |
| 159:32 | `payload`: 128 bits |
| 31:0 | `ctx`: context; 0 marks a null package |

The package is split into five 33-bit groups, `pkg[33g+32:33g]`. Each group gets 7 check bits
from an extended Hamming code:

* six Hamming check bits over positions 1..39, with check bit *j* at position 2^*j* and the
  data in the other positions in increasing order;
* one overall parity bit.

Group *g* of the message is `msg[40g+39:40g] = {check[6:0], data[32:0]}`. The receiver can
correct one flipped bit in each group, so up to five per message. It flags any group with two
flips as uncorrectable. The encoder (`star_edc_encoder`) is combinational. The decoder
(`star_edc_decoder`) has one register stage, and its output is valid one clock after the
message arrives.

A package whose context is 0 is *null*: it carries no data. The transmitter sends one on every
clock it has nothing else to send, so a message crosses the channel on every clock. A null
package whose payload is the fixed pattern `{4{32'h5A3C96E1}}` is a *training* message.

## Fibers and lane rates

Each channel direction has four fibers. A configuration says which fibers carry the message.
The k-th fiber in use carries message bits `[k*W +: W]`, with W = ceil(200/n):

| `fiber_cfg_e` | fibers | rate class | bits per fiber per clock |
|---|---|---|---|
| `CFG_P01` (reset) | 0,1 | `RATE_PAIR` | 100 |
| `CFG_P23` | 2,3 | pair | 100 |
| `CFG_P02` | 0,2 | pair | 100 |
| `CFG_P13` | 1,3 | pair | 100 |
| `CFG_T012` | 0,1,2 | `RATE_TRIO` | 67 |
| `CFG_T123` | 1,2,3 | trio | 67 |
| `CFG_Q` | 0..3 | `RATE_QUAD` | 50 |
| `CFG_FAIL` | none | `RATE_OFF` | direction handed to the spare |

`star_striper` and `star_merger` do the slicing. The rate class is an output that tells the
transceivers how fast to run their serial lines. Using more fibers allows a slower, more robust
line rate for the same message rate.

## Recovery protocol

This is the part that needs the most care. Each channel direction has two processors:

* the Outgoing Message Processor (OMP, `star_omp`) at the source;
* the Incoming Message Processor (IMP, `star_imp`) at the destination.

The destination returns a status word to the source, `star_status_t = {ack_seq[7:0], nack, cfg}`.
In the top module this status crosses inside `star_link` through one register per direction.
It stands for the control and status channels.

**Resend queue.** Every data package the OMP sends is first written into `star_resend_queue`.
This is a circular log of DEPTH entries with three sequence pointers:

* `ack_ptr`: everything before it is confirmed;
* `send_ptr`: the next package to send;
* `wr_ptr`: the next free entry.

When `send_ptr != wr_ptr` the queue has a *backlog*. The OMP then sends from the queue, and new
packages from the core are appended behind the backlog. When DEPTH packages are unconfirmed,
the queue is full and `tx_ready_o` drops.

**Normal operation.** The IMP counts the good data packages it delivers. It returns that count
as `ack_seq`, a cumulative acknowledge modulo 256. The OMP releases queue entries up to it.
Null and training packages are not counted.

**Error.** When the EDC pipe reports an uncorrectable group:

1. The IMP raises ER (`er_o`) and drops the message.
2. The IMP's resilience controller (`star_resilience_ctrl`) moves to the next configuration of
   the table above.
3. The IMP sends `nack` with the new configuration. After that it ignores everything until it
   has seen a clock with no message, followed by a clean training message.
4. On the nack, the OMP rewinds `send_ptr` to `ack_seq` and switches its striper to the new
   configuration.
5. The OMP then sends nothing for REPAIR_CYCLES clocks. This gap lets messages already in
   flight drain, and it marks the point where the IMP starts listening again.
6. The OMP sends N_TRAIN training messages, then replays the backlog.

Data therefore resumes with the first unconfirmed package, so the order is kept.
An error while the IMP waits for training starts the whole sequence again at the next
configuration. `retrained_o` pulses when a training message has been accepted.

**Failure and the spare.** When a receiver moves past `CFG_Q` to `CFG_FAIL`, the direction is
failed. `star_channel_group` then gives that direction of the failed channel to the group's
spare core, on both ends. Transmit and receive are handled separately.

The failed OMP does not throw its queue away. It hands the unconfirmed backlog, in order, to
the spare's OMP through its `fwd_*` port, and it treats each handed-over package as confirmed.
The spare's IMP output is then delivered in place of the failed channel's output. There is one
spare per group. A second failure in the same group stays failed.

## Channel, group, bundle, link

| module | contents |
|---|---|
| `star_channel_core` | one bidirectional channel: OMP, striper, merger, IMP and resilience controller |
| `star_channel_group` | N cores plus one spare, and the spare's transmit and receive muxes |
| `star_bundle_module` | a data group (N_DATA = 16, plus spare) and a control group (task channel, transfer-request channel, plus spare) |
| `star_payload_unpack` | decodes the two payload formats of a received package |
| `star_link` (top) | bundle module A, bundle module B, and the status return between them |

The per-channel arrays of `star_bundle_module` and `star_link` use this order:

* data 0..N_DATA-1;
* data spare;
* task;
* transfer request;
* control spare.

So the arrays have N_DATA+4 = 20 entries.

**Payload formats** (`star_payload_unpack`, `fmt_o`):

* `ext[4] = 0`: dual double.
  * Two 64-bit floats: `payload[127:64]` and `payload[63:0]`.
  * Guard bits: `ext[3:2]` for the first float and `ext[1:0]` for the second.
* `ext[4] = 1` with `ext[3:2] = 0`: a double plus an index list.
  * The float is `payload[127:64]`, with guard bits `ext[1:0]`.
  * The index list is `payload[63:0]`.
  * The top 4 bits of the index list are the object field, `obj_o`.
* Anything else: `fmt_o = 2`.

## Top-level interface and timing (`star_link`)

**Parameters:**

| parameter | default | meaning |
|---|---|---|
| `N_DATA` | 16 | data channels per bundle |
| `DEPTH` | 16 | resend queue entries |
| `REPAIR_CYCLES` | 8 | quiet clocks after a nack |
| `N_TRAIN` | 7 | training messages after the quiet clocks |

**Core side, per end (`a_*`, `b_*`):**

* `data_tx_valid_i`, `data_tx_pkg_i`, `data_tx_ready_o`: a valid/ready handshake. A package is
  taken when valid and ready are both high.
* `data_rx_valid_o`, `data_rx_pkg_o`: a one-clock strobe per delivered package, with the
  decoded format (`fmt_o`) and object field (`obj_o`).
* The task and transfer-request channels have the same signals, without the decoding.

**Fiber side:**

* `*_tx_lane_o[ch][fiber]`: 100-bit lane words.
* `*_tx_lane_en_o`: lane enables. They are set only on clocks that carry a message.
* `*_tx_rate_o`, `*_rx_rate_o`: rate classes.
* `*_rx_lane_i`, `*_rx_lane_en_i`: the lanes coming back.

A testbench or transceiver model joins `a_tx` to `b_rx` and `b_tx` to `a_rx`.

**Events:** `rx_cfg_o`, `er_o`, `corr_o`, `resend_o`, `retrained_o` per channel, and
`spare_tx_used_o[1:0]` / `spare_rx_used_o[1:0]`, where `[0]` is the data spare and `[1]` the
control spare.

**Timing.** The channel sustains one package per clock per channel and direction. Latency from
a package being accepted on one side to being delivered on the other is:

* one clock through the OMP;
* the fiber delay;
* one clock in the EDC decoder;
* one clock in the IMP.

The status takes one more clock to come back. Reset is asynchronous and active low.

## Testbenches

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Two shared pieces support them:

* `tb/star_tb_edc.sv` is a reference encoder, written independently from the Hamming definition.
* `tb/star_tb_fiber.sv` is a behavioural fiber. It delays by one clock and can corrupt single
  bits (correctable), corrupt chosen fibers (uncorrectable), or disable all pairs or trios.

`tb_star_link` runs the top at its default parameters (16 data channels per bundle) end to end.
It pushes random traffic in both directions on all channels and checks that every package
arrives exactly once and in order. It injects faults so that each mechanism happens, counts each
one, and fails if any never happened:

* corrected errors;
* ER;
* pair-to-pair moves;
* trio and quad configurations;
* data-spare and control-spare takeover;
* resends;
* retraining;
* a full resend queue;
* both payload formats.

It also checks one package per clock on a clean channel.

Simulating with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_star_link \
    rtl/star_pkg.sv rtl/*.sv tb/star_tb_edc.sv tb/star_tb_fiber.sv tb/tb_star_link.sv
./obj_dir/Vtb_star_link
```

Use the same command with another `--top-module` and its testbench file for a single block.
Verilator is two-state, so every testbench drives `rst_n` from 1 to 0 at time 1. That makes the
asynchronous resets act on a falling edge.

## Where this design departs from, or adds to, the protocol

The protocol fixes these points, and the RTL follows them:

* a 200-bit message every clock, made of a 165-bit package and 35 EDC bits in 5 × 7;
* one-bit correction and two-bit detection per 33-bit group;
* the resend queue and its backlog priority;
* ER and a report to the source;
* repair by other fibers, then more fibers at a slower rate, then the spare channel in the same
  direction;
* 16 data channels plus a spare, and task and transfer-request channels plus a spare;
* the two payload formats.

These are this design's own choices:

* The exact Hamming code, and the bit placement inside the message and the package.
* The fiber order of the ladder. The protocol gives only the order of the steps: other pairs,
  then trios, then all four.
* The cumulative acknowledge count and the status word format. The protocol says only that the
  source must keep what it sent until it is known to have arrived.
* The nack, quiet-gap and training hand-shake:
  * The protocol mentions seven training sequences per message for the transceivers' clock
    recovery.
  * Here, N_TRAIN = 7 training *messages* mark the restart instead.
  * REPAIR_CYCLES = 8 and DEPTH = 16 are assumed values.
* Null packages (context 0) filling idle clocks.
* Handing the failed channel's backlog to the spare, so that nothing is lost.
* The status return as a register inside the top, instead of messages on the control and status
  channels. The format of those messages is not specified.
* Guard-bit and index-list field placement in the payload formats.

These are not built:

* The trinary router that joins three bundles. Its routing rule and its handling of competing
  messages are not specified.
* The networks built from routers.
* The optical parts and the clock recovery circuits.
* The processing modules that produce and consume packages.
