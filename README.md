# A CAN protocol controller in SystemVerilog

This is the data-link part of a Controller Area Network (CAN) node, written as
synthesizable SystemVerilog. CAN is a multi-master serial bus. Every node
drives one line through an open-collector style transceiver, so the bus acts
as a wired AND: a 0 (dominant) from any node overrides a 1 (recessive).
Messages carry no address. Instead they carry an identifier that also gives
their priority. When several nodes start together, they settle access bit by
bit during the identifier, and the lower identifier wins without being
destroyed. Every node checks every frame: stuffing, form, CRC and
acknowledgement. Any node that finds a fault destroys the frame with an error
flag, and the sender retransmits it.

The controller follows the structure of the article *Logical Design of a CAN
Controller*. Its main ideas are:

* **Two blocks do the protocol work.** A *frame sequencer* handles the frame
  and does not care about timing. A *bit synchronization* block follows the
  edges on the bus and says when to drive a bit and when to sample one. A
  third block, the *host interface*, adapts the core to a CPU.
* **The receiver and the transmitter are two separate state machines.** A
  node drives a bit at the start of the bit time but only samples it near the
  end. So the transmitter always works one bit ahead of the receiver, and it
  has its own state machine and bit counter that run at the *transmission
  point*. The receiver runs at the *sample point*.
* **The bit time has two segments, not four.** The CAN specification's sync,
  propagation and phase-1 segments are merged into one segment.
* **There is a double receive buffer.** With a single buffer, the host would
  have only two bit times to read each message before the next one could
  arrive. The node would then have to send an overload frame after every
  message.

Only the standard frame format (11-bit identifier) is supported.

## Block structure

```
                 host bus (addr, wr, wdata, rdata, irq)
                               |
     +-------------------------+--------------------------+
     | can_host_if   registers, transmit buffer, status   |
     |        +------------------------------+            |
     |        | can_rx_buffer  visible|hidden|            |
     +--------+------------------------------+------------+
                               |
     +-------------------------+--------------------------+
     | can_frame_seq                                      |
     |   can_err  <---->  can_rx (sample point)           |
     |                      ^  |  state, counter, events  |
     |                      |  v                          |
     |                    can_tx (transmission point)     |
     |   (can_crc15 inside can_rx and can_tx)             |
     +-------------------------+--------------------------+
                               |  tx_point, sample_point, rx_bit
     +-------------------------+--------------------------+
     | can_bit_sync   prescaler, 2-segment bit timing,    |
     |                hard sync / resync                  |
     +----------------------------------------------------+
                     can_rx (in)    can_tx (out)
```

`can_controller` is the top. It contains exactly these blocks. `can_pkg`
holds the shared types: the receiver and transmitter state enums, the
error-state enum, and `can_frame_t`, a packed struct with `id[10:0]`, `rtr`,
`dlc[3:0]` and `data[8]`, where `data[0]` is the first byte on the bus.

## Bit timing and synchronization (`can_bit_sync`)

A prescaler divides the clock into time quanta: one TQ lasts `brp+1` clocks.
A bit has `seg1 + seg2` TQ. The first TQ of `seg1` is the synchronization
quantum.

```
 | seg1 ------------------------------ | seg2 ---------- |
 ^ tx_point (drive new bit)            ^ sample_point
   (start of seg1)                       (end of seg1)     the seg2 TQs are the
                                                           time to compute the
                                                           next bit
```

The bus input passes through two flip-flops and is looked at once per TQ. A
falling (recessive-to-dominant) edge is handled in one of two ways:

* **Hard synchronization.** This happens when the receiver says the bus is
  idle (after bus integration) or in the third intermission bit
  (`hard_sync_en`). The TQ that holds
  the edge becomes the sync TQ of a new bit.
* **Resynchronization.** This happens at most once per bit, and only if the
  last sampled bit was recessive.
  * An edge inside `seg1` is late. It lengthens `seg1` by the phase error, up
    to `sjw`.
  * An edge inside `seg2` is early. It shortens `seg2` by `sjw`. If the edge
    is within `sjw` TQ of the end of the bit, the bit ends there instead, and
    the edge TQ becomes the next bit's sync TQ.
  * A node that is itself driving dominant does not lengthen `seg1` on its
    own edge.

Because edges are seen about one TQ after they happen, the transmission point
that follows an "edge ends the bit" resync comes one TQ late. The sample
point is correct. At reset the timing is 2 clocks per TQ, `seg1` = 7 and
`seg2` = 3, which is 10 TQ or 20 clocks per bit. The protocol allows 8 to 25
TQ per bit. The registers can hold more, so keeping the setting in that range
is left to the host.

## Receiver and transmitter: two machines, one bit apart

This is the least obvious part of the design.

**Receiver (`can_rx`).** It has one state per frame field:
`IDLE ARB CTRL DATA CRC CRC_D ACK ACK_D EOF IM ERR_FL FLAG_D OVL_FL`. A
counter `cnt` gives the bit position inside the field. `state`/`cnt` name
the *next* bit to be sampled. At every sample point the receiver:

* drops stuff bits (a stuff bit must follow five equal bits),
* shifts the fields into its frame register and runs the CRC-15,
* checks the fixed-form bits,
* compares what the node drove with what it read. A recessive arbitration
  bit that reads back dominant means lost arbitration. A recessive stuff
  bit in the arbitration field that reads back dominant is a stuff error.
  Any other mismatch is a bit error,
* follows error and overload flags with their delimiters. An active flag
  lasts six bits. A passive flag is complete once six equal bits in a row
  were seen.

After reset the receiver integrates into the bus: it ignores the bus until
it has seen 11 recessive bits in a row. Only then is it idle (`bus_idle`),
and only then may the node start a frame.

It reports all of this as one-cycle pulses: `rx_valid`, `tx_ok`,
`arb_lost`, `err_det` with a 5-bit `err_code` `{ack, crc, form, stuff, bit}`,
`ovl_start`, `sof`, `dom_after_flag`, `dom8`, `err_arb_stuff` and `flag_bit_err`.

* A received frame is valid after the 6th end-of-frame bit.
* A frame this node sent is complete after the 7th.
* A CRC error is signalled after the ACK delimiter, as the protocol requires.

**Transmitter (`can_tx`).** It has the same field states, plus `TX_SOF`. One
state, `TX_EOF`, covers everything from the CRC delimiter to the second
intermission bit, because a sender drives all of those bits recessive.
`state`/`cnt` name the bit *being driven*. At each transmission point the
next bit is worked out from both machines:

| situation | bit driven |
|---|---|
| idle, receiver at the ACK slot and its CRC matched | dominant ACK |
| idle, message pending, bus idle or at the 3rd intermission bit, not suspended | start of frame |
| in a frame, five equal bits sent | complementary stuff bit (position does not advance) |
| in a frame | identifier, RTR, IDE=0, r0=0, DLC, data, then the CRC register |
| `TX_ERR_FL` | 6 dominant bits (6 recessive if error passive) |
| `TX_OVL_FL` | 6 dominant bits |
| `TX_FLAG_D` / `TX_EOF` / otherwise | recessive |

The receiver's event pulses come one cycle after the sample point. They move
the transmitter at once:

* an error moves it to `TX_ERR_FL`,
* an overload moves it to `TX_OVL_FL`,
* lost arbitration sends it back to `TX_IDLE`, and the message stays pending.

The new bit is therefore always decided in the `seg2` quanta between the
sample point and the next transmission point. The driven bit changes one
clock after `tx_point`.

Retransmission after an error or a lost arbitration needs no extra logic.
The request stays set until `tx_ok`, so the transmitter starts again at the
next third intermission bit.

**Suspend transmission.** An error-passive node that has just sent a frame,
or had an error while sending, waits 8 more bit times of idle bus before it
starts again. If another node starts a frame during that time, the wait ends
and this node receives that frame.

## Error management (`can_err`)

This block keeps the transmit and receive error counters (TEC and REC) and
the error state: active, passive (a counter above 127) or bus off (TEC above
255). It uses the main rules of the CAN specification:

* TEC goes up by 8 for each error while sending. Two errors are not
  counted: an ACK error of an error-passive sender, and a stuff error on a
  stuff bit that was sent recessive but read dominant during arbitration.
* REC goes up by 1 for each error while receiving, and by 8 for a dominant
  bit right after the node's own error flag.
* A recessive bit read during the node's own active error flag or overload
  flag is a bit error (`flag_bit_err`). It adds 8 to TEC if the node was
  sending and to REC otherwise, and a new error flag starts.
* Dominant bits that go on after a flag add 8 to TEC if the node was sending
  and to REC otherwise. This happens at the 14th dominant bit after an active
  or overload flag, at the 8th after a passive flag, and after every further
  8 dominant bits. The receiver reports each such run as a `dom8` pulse.
* A successful frame counts down by 1. When REC is above 127, a received
  frame sets it back to 120.
* Bus off ends after 128 runs of 11 recessive bits.

A bus-off node drives only recessive.

## Receive buffering and overload (`can_rx_buffer`)

The host reads the *visible* buffer and frees it with the release command.

* A frame that becomes valid while the visible buffer is free goes straight
  there.
* If the visible buffer is still unread, the frame waits in the *hidden*
  buffer, and `ovl_req` makes the receiver send overload frames after the
  end of frame. It sends at most two in a row. This delays the next frame
  until the host has read.
* On release the hidden frame moves up.
* A frame that becomes valid while both buffers are full is dropped and sets
  `overrun`.

The receiver's own shift register holds the frame in progress. So a third
frame can be on its way while two are stored.

## Host interface (`can_host_if`)

The bus is byte-wide. Writes use a strobe (`wr`); reads are combinational on
`addr`.

| addr | access | content |
|---|---|---|
| 0x00 | W | bit0 request transmission, bit1 abort request, bit2 release receive buffer |
| 0x01 | R/W1C | {bus_off, err_passive, overrun, err_seen, arb_lost_seen, tx_done, tx_pending, rx_full}; writing 1 clears bits 2..4 |
| 0x02–0x05 | RW | prescaler (TQ = value+1 clocks), seg1, seg2, SJW (1–3 TQ, 0 means 4) |
| 0x06, 0x07 | R | TEC (255 when above), REC |
| 0x08, 0x09 | RW | TX identifier[10:3]; {identifier[2:0], RTR, DLC} |
| 0x0A–0x11 | RW | TX data bytes 0..7 |
| 0x12, 0x13 | R | RX identifier[10:3]; {identifier[2:0], RTR, DLC} |
| 0x14–0x1B | R | RX data bytes 0..7 |
| 0x1C | RW | interrupt enables {err_seen, tx_done, rx_full} |

`irq` is the OR of the enabled flags. The bit-timing defaults are parameters
of `can_host_if`.

## What comes from the article and what does not

**From the article:**

* the split into host interface, frame sequencer and bit synchronization,
* the receiver / transmitter / error-management decomposition,
* the receiver's state set and its separate bit counter,
* a transmitter with its own states and counter that runs one bit ahead,
  with a combined end-of-frame state,
* the two-segment bit time with the new bit issued at the start of segment 1
  and the bus sampled at its end,
* validation at the 6th end-of-frame bit,
* the double receive buffer with overload only when both buffers are full.

**From the CAN 2.0 specification or chosen here:**

* the CRC polynomial,
* the exact checks and the error-counter rules,
* bus integration, passive error flags and suspend transmission,
* SJW handling, the input synchronizer and resync details,
* the register map and all widths,
* the reset bit timing,
* the hidden buffer being filled at validation,
* overrun handling.

**Not implemented:**

* extended (29-bit) frames,
* aborting a frame already on the bus.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_can_controller` runs three full controllers at default parameters on a
  wired-AND bus. Each runs from its own clock (10.00 / 10.03 / 9.98 ns), so
  the receivers must resynchronize. The test covers:
  * a stuffing-heavy 8-byte frame,
  * arbitration between two nodes starting in the same intermission bit,
  * the double buffer with overload frames and the hidden-to-visible move,
  * a bit error with retransmission,
  * a CRC error seen by one node only,
  * error passive (including bit errors in the node's own error flags),
    passive error flags and suspend transmission, bus off and recovery,
  * the bus held dominant after an error flag (the 14/8 dominant-bit rule),
  * 12 rounds of random traffic with one or two senders at a time,
  * the longest (25 TQ) and shortest (8 TQ) bit times, with the bit length
    measured and frames exchanged at each.

  It counts each mechanism and fails if one never happened.
* `tb_can_frame_seq`: two sequencers with ideal timing, covering
  arbitration, overload and error plus retransmission.
* `tb_can_rx`, `tb_can_tx`: bit streams and expected bits built
  independently. This includes the CRC by polynomial long division.
* `tb_can_bit_sync`, `tb_can_err`, `tb_can_rx_buffer`, `tb_can_host_if`,
  `tb_can_crc15`: unit tests.

To run one with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv rtl/can_pkg.sv \
    tb/tb_can_controller.sv --top-module tb_can_controller
./obj_dir/Vtb_can_controller
```

All modules lint cleanly apart from unused-signal warnings. Those come from
status outputs that only the testbenches observe, such as the `hard_sync`
and `resync` pulses and the transmitter state.
