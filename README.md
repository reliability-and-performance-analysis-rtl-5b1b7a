# Dual duplex fault-tolerant CAN 2.0A controller

Satellites use CAN buses to connect on-board data handling units. In an
SRAM-based FPGA, a particle strike can flip a flip-flop or a configuration
bit and silently corrupt a bus controller. Triple modular redundancy with
voters is the usual remedy, but one upset in the routing that feeds a
voter can still defeat it. This design uses **dual duplex with comparison
(DDwC)** instead. Four identical CAN controllers run in lock step as two
self-checking pairs. Each pair compares its two copies every clock cycle.
The first pair to disagree with itself is switched off for good, and the
other pair takes over the bus in the same cycle. If both pairs fail, the
node goes silent and never drives a dominant bit.

The RTL implements the controller and redundancy scheme described in
"Reliability and Performance Analysis of a Fault Tolerant Data Handling
Protocol for Aerospace Applications". Wherever that description leaves a
detail open, this implementation makes its own choice; each choice is
listed under [Choices and departures](#choices-and-departures).

## Structure

```
can_ddwc                      top level: two pairs, pair selector, pair comparator
├── can_dwc  (pair A)         duplex with comparison
│   ├── can_controller  x2    one complete CAN 2.0A controller each
│   │   ├── can_bit_timing    bit rate, hard sync / resync, 3-sample vote
│   │   ├── can_protocol      transfer layer (main state machine)
│   │   │   ├── can_crc15     CRC-15 generator / checker
│   │   │   ├── can_bit_stuff stuff-bit tracker, stuff error
│   │   │   ├── can_err_frame error flag + delimiter sequencer
│   │   │   ├── can_ovl_frame overload flag + delimiter sequencer
│   │   │   └── can_fault_conf TEC / REC, error active / passive / bus off
│   │   └── can_object_layer  acceptance filter, rx buffer, tx handshake
│   └── can_out_cmp           replica comparator
├── can_dwc  (pair B)         same as pair A
└── can_out_cmp               comparator between the two pairs
```

`can_pkg` holds the shared types: `can_msg_t` is a message (11-bit id, RTR,
DLC, 64 data bits with byte 0 in bits 63:56). `can_out_t` is everything one
controller drives: the bus line, host outputs, error status and one-cycle
event pulses.

## Redundancy: how the pairs work

**Lock step.** All four replicas get the same clock, reset, bus input `rx_i`
and host inputs. Each replica has its own input synchroniser, bit timing,
state and buffers. Nothing is shared except the inputs. With no faults,
the four `can_out_t` bundles are equal bit for bit in every cycle, because
the logic is deterministic and fully reset.

**Detection (`can_dwc`).** A `can_out_cmp` compares the whole bundles of the
two replicas in a pair. It is combinational, so `mismatch_o` rises in the
same cycle that a difference reaches an output. An upset in a register that
is not yet visible stays latent until it reaches an output. One example is
a bit of a message waiting to be sent. The mismatch then fires exactly when
that bit is put on the bus. A pair cannot tell which of its copies is wrong,
so it only reports. Its output is always replica 0.

**Selection (`can_ddwc`).**

| condition | drives bus and host outputs | status |
|---|---|---|
| neither pair has ever mismatched | pair A | `active_o = 0` |
| pair A mismatching now or before | pair B | `fail_o[0] = 1`, `active_o = 1` |
| both pairs mismatching now or before | pair B's bundle, with `tx` forced recessive | `fatal_o = 1` |

`fail_o` is sticky and only reset clears it. A pair that has failed never
comes back: the redundancy follows a no-repair model. The switch uses the
current-cycle mismatch as well as the sticky flag. So in the cycle where
pair A first shows a wrong bus level, pair B's (correct) level is already
on `tx_o`. The other nodes never see the corrupted bit. The top-level
testbench checks this: a data bit is flipped inside pair A during a
transmission, and the frame on the bus stays bit-exact.

**Pair comparator.** A third `can_out_cmp` compares pair A with pair B.
While both pairs are healthy, any difference between them would be a
common-mode fault that both copies in a pair share. Such a difference is
reported on `pair_diff_o`, but it does not change the selection. `diag_o`
gives the field groups that differ at each of the three comparators:
bus line, host side, error status and events.

**What is not covered.** The comparators and the selector are single points
of failure. This matches the usual assumption of a fault-free comparator in
DwC reliability models. A disconnected pair is not resynchronised, so after
one failure the node keeps working without redundancy. CAN's own checks
protect frames on the bus: CRC, stuffing, form and ACK checks. They do not
decide which pair is faulty. Bus errors never disconnect a pair, because
all four replicas see them alike.

**Measured under random upsets.** `tb_can_seu_campaign` inverts random
register bits during frames, in a DDwC node and in a plain controller.
With one upset per frame, the DDwC node delivered every frame intact.
About two thirds of those upsets disconnected a pair; the rest stayed
latent or were overwritten. The plain controller lost about a third of
its frames, and about one in ten arrived at the peer with wrong data
under a valid CRC. That happens when the pending message is hit before
the CRC is computed over it. With two or three upsets, the DDwC node
either delivered the frame intact or went fail-silent. It never passed
wrong data. The campaign puts each upset in a different register. Two
identical upsets in both copies of one pair would agree with each other,
and no comparator could see them.

## The controller

### Bit timing (`can_bit_timing`)

A bit is 16 time quanta: sync 1, propagation 5, phase 1 5, phase 2 5. A
quantum is `BRP = CLK_HZ / (BITRATE * 16)` clocks. The defaults are 16 MHz
and 250 kbit/s, which gives 4 clocks per quantum and 64 per bit. The bus is
sampled at the ends of the last three quanta of phase segment 1. A 2-of-3
majority gives the bit: two dominant samples make a dominant bit. So a
glitch as short as one quantum that hits one sample is ignored. The sample
point is 11/16 = 69 % into the bit, plus a 2-cycle input synchroniser.

A falling edge on an idle bus restarts the bit (hard sync). During a frame,
one edge per bit resynchronises. An edge before the sample point lengthens
phase 1 by up to SJW = 1 quantum. An edge in phase 2 shortens the bit. The
node ignores edges while it drives a dominant bit itself. Outputs are two
one-cycle pulses per bit: `tx_point_o` at the bit start, and `sample_o`
with the voted `bit_o`.

### Transfer layer (`can_protocol`)

The main state machine steps once per sampled bit. It uses these states:
`SYNC` (wait for 11 recessive bits after reset), `IDLE`, `ARB` (identifier +
RTR), `CTRL` (IDE, r0, DLC), `DATA`, `CRC`, `CRC_DEL`, `ACK`, `ACK_DEL`,
`EOF` (7 bits), `INTER` (3 bits), `ERR`, `OVL` and `BUSOFF`. On a `sample`
pulse it checks the bit and moves on. On the next `tx_point` it latches the
level for the following bit. A frame starts when the bus is idle and a
message is pending.

* **Stuffing.** One `can_bit_stuff` tracker watches the sampled bus bits
  from start of frame to the end of the CRC. A transmitter reads back every
  bit it sends, so this one tracker tells the transmitter when to insert a
  stuff bit, tells a receiver which bit to drop, and flags a sixth
  identical bit as a stuff error. A stuff bit that follows the last CRC
  bit is handled too.
* **CRC.** `can_crc15` uses polynomial 0x4599. It covers start of frame to
  the last data bit. The transmitter sends the register as the CRC field.
  A receiver compares the received field with it.
* **Arbitration.** The node sends recessive but reads dominant in the
  identifier/RTR field. It then drops to receiver for that frame, with no
  error, and retries its own frame afterwards. The request stays pending.
* **Errors.** A bit error is a read-back mismatch outside arbitration and
  the ACK slot. A stuff error is six identical bits. A form error is a
  dominant CRC delimiter, ACK delimiter or EOF bit, or IDE = 1. A CRC error
  means the receiver withholds its ACK and signals the error after the ACK
  delimiter. An ACK error means no dominant bit in the ACK slot. Every
  error starts `can_err_frame` on the next bit.
* **Error frame.** The node sends 6 dominant bits, or 6 recessive bits when
  error passive. It then stays recessive until the bus is recessive.
  Other nodes' flags can stretch the dominant part to 12 bits. Seven more
  recessive bits complete the 8-bit delimiter, and intermission follows.
* **Overload frame.** Same shape as an error frame, always dominant. It
  starts after the end of frame when the receive buffer overflowed. It also
  starts on a dominant bit in intermission bits 1-2, or in a receiver's
  last EOF bit.
* **Fault confinement (`can_fault_conf`).** TEC is +8 per transmit error.
  A passive node's ACK errors are not counted. TEC is -1 per frame sent.
  REC is +1 per receive error, +8 more if the bit after the node's own
  active flag is dominant, and -1 per frame received. A REC above 127 is
  set to 120 on a good frame. The node is error passive from 128
  (`PASSIVE_LIMIT`) and bus off at TEC 256 (`BUS_OFF_LIMIT`). It leaves bus
  off after `RECOVERY_SEQ` = 128 runs of 11 recessive bits.

### Object layer and host interface (`can_object_layer`)

* **Transmit.** Pulse `tx_start_i` with a `can_msg_t` on `tx_msg_i`. The
  message is latched, and `out_o.tx_busy` stays high until the frame has
  been sent and acknowledged. Then `out_o.sndok` pulses for one cycle.
  Requests while busy are ignored. Retries after errors or lost arbitration
  are automatic.
* **Receive.** A frame passes the filter when
  `(id ^ acc_code_i) & acc_mask_i == 0`: a mask bit of 1 means the
  identifier bit is compared, and an all-zero mask accepts everything. An
  accepted frame goes to `out_o.rx_msg` and sets `out_o.rx_valid` in the
  cycle after its sixth EOF bit. Pulse `rx_ack_i` after reading. A second
  accepted frame before the acknowledgement is dropped. It sets
  `out_o.rx_overrun` and requests an overload frame.
* A node never receives its own frames.

## Top-level ports (`can_ddwc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `rx_i` | in | 1 | bus level from the transceiver (1 = recessive), asynchronous |
| `tx_o` | out | 1 | bus drive to the transceiver (1 = recessive) |
| `tx_start_i`, `tx_msg_i` | in | 1, `can_msg_t` | transmit request |
| `rx_ack_i` | in | 1 | host has read `out_o.rx_msg` |
| `acc_code_i`, `acc_mask_i` | in | 11 | acceptance filter |
| `out_o` | out | `can_out_t` | selected replica's outputs (status, rx message, events) |
| `fail_o` | out | 2 | sticky pair-failed flags {B, A} |
| `active_o` | out | 1 | 0: pair A drives, 1: pair B drives |
| `fatal_o` | out | 1 | no healthy pair; bus held recessive |
| `pair_diff_o`, `diag_o` | out | 1, 12 | pair-vs-pair disagreement; field groups differing at each comparator |

A CAN transceiver chip sits between `tx_o`/`rx_i` and the bus wires. It is
outside this RTL. In simulation, the bus is the AND of all nodes' `tx`.

Parameters (all on `can_ddwc`, `can_dwc` and `can_controller`): `CLK_HZ`
(16 000 000), `BITRATE` (250 000), `PASSIVE_LIMIT` (128), `BUS_OFF_LIMIT`
(256), `RECOVERY_SEQ` (128). `CLK_HZ` must be a multiple of 16 x `BITRATE`.
Segment lengths and SJW are parameters of `can_bit_timing`.

Size after generic synthesis: about 465 flip-flop bits per controller
replica, and 1853 for the whole DDwC top level.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/can_pkg.sv tb/can_ref_pkg.sv tb/tb_can_ddwc.sv --top-module tb_can_ddwc
./obj_dir/Vtb_can_ddwc
```

Use the same command for any other `tb/tb_*.sv`. Testbenches that do not
use the reference frames do not need `tb/can_ref_pkg.sv`.

`tb/can_ref_pkg.sv` builds the exact bus bits of a frame on its own, with
no RTL. The CRC comes from polynomial long division, and a separate model
inserts the stuff bits. Bus-level checks compare against it.

| testbench | what it shows |
|---|---|
| `tb_can_ddwc` | End to end at default parameters, with a plain controller as peer. It covers frames both ways (one full of stuff bits), arbitration loss and retry, overrun with overload frame, and a bit corrupted only at the DDwC input (CRC mismatch, no ACK, error frame, retransmission). It then flips a bit in pair A (switch-over, frame on the bus stays exact) and one in pair B (fail-silent). It counts each mechanism and fails if one never occurs. |
| `tb_can_seu_campaign` | Random upset campaign: 150 frames each with one, two and three upsets. Each upset inverts one register bit in a random replica of a DDwC node, and at the same place in a plain controller, on two separate buses. The upsets land in different registers at random times during the frame. Outcomes: intact, wrong (the peer accepted a different message) or lost. The DDwC node must deliver every single-upset frame intact. With more upsets it must end each trial intact or fail-silent. It must never let wrong data through. A typical run: with one upset, DDwC 150 intact against plain 84 intact, 14 wrong, 52 lost. With three upsets, DDwC 80 intact and 70 fail-silent against plain 14 intact, 37 wrong, 99 lost. |
| `tb_can_dwc` | No mismatch in fault-free operation; a latent upset mismatches only when it reaches the bus; a counter upset mismatches at once. |
| `tb_can_controller` | Two plain controllers: bit-exact frames, timing of 64 cycles per bit, remote frames, arbitration, filtering, overrun, forced bit error with TEC/REC update, ACK errors up to error passive. |
| `tb_can_protocol` | Transfer layer with an ideal 8-cycle bit clock: transmit and receive, bus integration, CRC, stuff, form and ACK errors, arbitration loss, overload from intermission. |
| `tb_can_bit_timing` | 64-cycle bit period, sample point after hard sync, error-free sampling of senders 1.6 % slow or fast (needs resync), 3-sample vote against glitches. |
| `tb_can_crc15`, `tb_can_bit_stuff` | Against polynomial division and a run-length model, on random data. |
| `tb_can_err_frame`, `tb_can_ovl_frame` | Flag and delimiter lengths, stretching by other nodes' flags, passive flag. |
| `tb_can_fault_conf` | Random event sequences against a counting model, bus off and recovery. |
| `tb_can_object_layer`, `tb_can_out_cmp` | Handshake, filter, overrun; comparator and field-group diagnosis. |

To emulate an upset, the DDwC, DwC and campaign testbenches invert one register bit
of a replica by hierarchical assignment. The flipped state then evolves
normally, as after a real single-event upset.

## Choices and departures

The source design fixes the structure (two duplex pairs with comparators),
the layering of the controller, CAN 2.0A with 11-bit identifiers,
250 kbit/s, the four bit segments, voting over three samples, the error
detection mechanisms, the error and overload sequences (6-12 dominant bits
followed by the delimiter), and a parametric fault-confinement limit.
This implementation chose the following:

* A 16 MHz clock and a 1+5+5+5 quantum split with SJW = 1. Samples are at
  the last three quanta of phase segment 1.
  The source places the sampling between phase segments 1 and 2 without
  fixing the quanta; the three samples here end at that point.
* The error flag starts at the bit after the error is seen, and the
  overload flag at the first intermission bit, as the CAN standard
  requires. The source describes both as waiting until the frame being
  captured is over; read that way, a node would keep receiving through
  a frame it already knows is bad.
* Numbers and rules of fault confinement are those of the CAN standard,
  simplified. Only the passive-ACK exception is kept. There is no
  suspend-transmission delay for passive nodes.
* An 11-recessive-bit bus integration after reset. Extended frames
  (IDE = 1) count as form errors. A CRC error is signalled after the ACK
  delimiter.
* The host interface takes a whole message (id, RTR, DLC, 8 bytes) per
  request and returns a `sndok` pulse. Receive is a one-entry buffer with
  valid/ack and an overrun flag. The identifier filter is code/mask. The
  original design used block RAM for its buffers and, in its waveforms,
  an 8-bit data input; here the buffers are flip-flops and the message
  port is full width. This is why one controller synthesizes to about 465
  flip-flops against the original's 240.
* "Overflow" leading to an overload frame is read as a receive-buffer
  overflow. Dominant bits in intermission also cause one, as in the CAN
  standard.
* The pair-selection policy (A first, sticky disconnection, recessive bus
  on double failure) and the role of the pair-to-pair comparator
  (reporting only).
* The comparison and alternative structures (plain controller alone,
  single DwC, TMR with voters) are not provided as top levels. The plain
  controller and the DwC pair exist only as sub-blocks.
* The original evaluation injects upsets into FPGA configuration memory.
  RTL cannot model that; the testbenches flip flip-flops instead.
