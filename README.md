# A DQDB queue-arbitrated MAC in SystemVerilog

A Distributed Queue Dual Bus (DQDB, IEEE 802.6) network is made of two
one-way buses running in opposite directions. Each node attaches to both
buses through two medium access controllers (MACs), one per bus. The head
of each bus sends a steady stream of fixed 53-byte cells. A node that wants
to send waits for an *empty* cell and fills it. Fairness comes from a queue
that every node keeps in two counters and no node holds in full. A node
announces that it wants to send by setting a *request bit* in a cell on the
**other** bus, which flows towards the nodes upstream of it. Each node counts
the requests it sees. It then lets that many empty cells go by before it uses
one itself.

This RTL is one such MAC: the controller for one bus. Two instances and
their links make a node. Cells arrive one byte per clock from the physical
layer. Each cell leaves five clocks later, unchanged unless one of these
happens:

* the MAC uses the empty cell to send a segment from its segmentation and
  reassembly (SAR) unit;
* the MAC sets the cell's request bit on behalf of its partner MAC.

Meanwhile every busy cell is checked (header pattern, CRC-10). It is matched
against the node's address, or against the table of messages now being
reassembled, and copied to the SAR as twelve 32-bit words with a status.

The design follows the MAC chip built for a SONET STS-3 (155.52 Mbit/s) SMDS
interface. It has the same block structure: a DQDB block, a send block, a
receive block and a MID table block. Its cell timing, handshakes and a few
encodings are its own (see *What is this design's own*).

## The distributed queue (`dqdb_block`, Monitor FSM in `receive_block`)

Each MAC keeps three counters (`dqdb_counter`, 10 bits unless noted):

| counter | counts | up | down |
|---|---|---|---|
| request (RQ) | requests of downstream nodes not yet served | partner MAC saw a request bit on the other bus | an empty cell passes while nothing is queued here |
| count down (CD) | empty cells still to let pass before sending | loaded from RQ when a segment is queued | an empty cell passes while queued |
| bandwidth balancing (BWB, 8 bits) | cells this MAC may still send in a row | reloaded from a user constant whenever an empty cell is let pass | each cell sent |

Ten bits are enough because a node has at most one request outstanding and
at most 1024 nodes can be told apart by the 10-bit message identifier (MID).
That makes at most 1023 requests. Counters saturate at 0 and at 1023.

**Queueing a segment (DQDB-SAR FSM).** `sar_send_req` rises. On the first
clock when the Monitor FSM is not busy with a cell (`dqdb_lock` low), the FSM
does three things in one clock:

* copies RQ into CD;
* clears RQ;
* toggles `cmp_set_req_out`.

The toggle asks the partner MAC to set a request bit on the other bus. An RQ
increment that arrives in that clock is held for one clock, so it is not
lost. `queued` stays high until the send starts. The FSM re-arms when
`sar_send_req` falls.

**The Monitor FSM** decides at every cell. It latches the busy and slot-type
bits of the ACF (byte 0) in the ACF clock and decides in the next clock. Its
commands reach the counters in the clock after that; each is registered once,
so the counter update is pipelined. For an empty queue-arbitrated cell:

* nothing queued: decrement RQ if it is not zero, reload BWB;
* queued, but CD is not zero or BWB is zero: decrement CD if it is not
  zero, reload BWB;
* queued, CD zero and BWB not zero: send in this cell. `send_wake` pulses
  two clocks after the ACF and BWB is decremented.

Busy cells and pre-arbitrated slots (slot-type bit set) are ignored.

A BWB constant of *N* lets a queued MAC take at most *N* empty cells in a
row before it must let one pass. A constant of 0 blocks sending until a
non-zero value is written.

**Request bits (DQDB-QUEUE FSM).** At every cell start the FSM looks at
request bit 0 of the incoming ACF:

* Set: a node downstream on this bus wants to send on the other bus. A
  toggle on `cmp_inc_req_out` makes the partner MAC increment its RQ.
* Clear, and the partner has a pending request: `mark_req` tells the send
  block to set the bit in the outgoing copy of this cell.

**Links between partner MACs (`dqdb_link_fsm`, two instances).** The partner
MAC runs from the clock of the other bus, so each event is sent as one
toggle of a wire. The receiver synchronises the wire with two flip-flops and
detects each edge. It counts pending events (up to 15) and consumes one per
clock in which its `take` is high and its `hold` is low.

* The DQDB-MAC instance drives RQ increments. Its `take` is always high and
  its `hold` is the queueing clock.
* The DQDB-REQ instance holds bandwidth requests until a cell with a clear
  request bit passes.

An event appears as `pend` three clocks after the toggle. Events must be at
least two clocks apart; they really come at most one per cell.

## Cell layout as used

| bytes | content |
|---|---|
| 0 | ACF: bit 7 busy, bit 6 slot type (0 = queue-arbitrated), bit 0 request |
| 1-4 | NCI header, constant `FF FF F0 22` for a connectionless queue-arbitrated network (the last byte is the CRC-8 header check of the first three) |
| 5 | segment type [7:6] (COM 00, EOM 01, BOM 10, SSM 11), sequence number [5:2], MID [9:8] |
| 6 | MID [7:0] |
| 7-14 | in a BOM or SSM: 64-bit destination address |
| 51 | payload length [7:2], CRC [9:8] |
| 52 | CRC [7:0] |

Bytes 5-52 (48 bytes) are the *segment* that is exchanged with the SAR in
both directions. The CRC is CRC-10 with generator x^10+x^9+x^5+x^4+x+1. It is
computed MSB-first over the 48 segment bytes, with the CRC field taken as
zero when generating. Over a received segment the remainder is zero when the
segment is intact.

## Clock-by-clock life of a cell

Take t = 0 as the clock in which the ACF is on `rx_data` with `rx_soc` high.
Bytes follow one per clock; cells may have idle clocks between them.

| t | event |
|---|---|
| 0 | Monitor FSM and DQDB-QUEUE FSM sample the ACF; position counter restarts |
| 1 | Monitor FSM decides |
| 2 | counter commands / `send_wake` = `sar_ack` |
| 3 onwards | SAR word *k* on `sar_tx_data` during t = 3+4k .. 6+4k |
| 3 | cell byte 0 at the receive FIFO's transmit tap (stage 3) |
| 5 | ACF leaves on `tx_data`/`tx_soc` (five clocks of transit) |
| 7 | MID table read for the cell's MID |
| 8 | `mid_valid` |
| 16 | CAM result sampled (address ends at byte 14, CAM latency 2); MID entry written for an address-matched BOM; Send-To-SAR FSM woken |
| 18, 22, ... 62 | the 12 received words appear on `sar_rx_data`, one per four clocks |
| 30 onwards | MID timeout step |
| 53 | CRC of a received cell known |
| 54 | CRC of a sent segment written into the From-SAR FIFO |
| 57 | last byte of the cell leaves |

The next cell may start at t = 53. Reception of one cell (t = 16..64)
overlaps the start of the next; the pipelines are built for that.

## Sending (`send_block`, `from_sar_fifo`, `crc10`)

The SAR holds `sar_send_req` high until `sar_ack`. In the clock after the
one-clock `sar_ack` it starts putting 12 words (the segment, CRC field zero,
most significant byte first) on `sar_tx_data`. Each word is held for four
clocks. The Send FSM stores each word into the 16-byte From-SAR FIFO in the
word's second clock.

A second read port of the FIFO feeds the CRC unit one byte per clock. One
clock after the 48th byte the CRC is written into the last ten bits of the
segment while those bytes are still in the FIFO.

The output mux builds the outgoing cell from three sources:

* the incoming ACF with the busy bit set;
* the constant NCI;
* the 48 FIFO bytes.

The transmit tap sits at FIFO stage 3, and no less, so that the CRC is
inserted before the output reaches it. Cells not used for sending pass
through the same path with only `mark_req` applied.

## Receiving (`receive_block`, `receive_fifo`)

Every byte enters a 12-stage shift register, the receive FIFO. The CAM sees
`rx_data` itself and answers on `ext_addr_match` two clocks after the last
address byte. The FIFO is deep enough that the first segment word leaves it
only after that answer is known. It must satisfy `RX_DEPTH >= CAM_LATENCY +
10` if either number is changed.

The **Receive FSM** handles busy queue-arbitrated cells. It compares bytes
1-4 with the NCI constant, runs `crc10` over bytes 5-52 and samples the CAM
result. The **Send-To-SAR FSM** then moves the 12 words from the end of the
FIFO into the 32-bit output buffer, one every four clocks. At the first word
it fixes the cell's *match*:

* BOM and SSM cells: the CAM result;
* COM and EOM cells: `mid_valid` from the MID table.

`sar_status` is a packed struct {accept, match, sof, strobe}:

* `strobe`: first clock of each word;
* `sof`: first word of a cell;
* `match`: the decision above, valid on every word;
* `accept`: on the last word, match and NCI and CRC all good.

The words of every busy queue-arbitrated cell are presented. A SAR keeps a
cell only when `accept` is high on its last word.

## Tracking messages in reassembly (`mid_table`)

Only the first segment (BOM) of a message carries the destination address.
The later COM and EOM segments carry only the 10-bit MID. The table keeps
one 2-bit time stamp per MID in a single-port 1024 x 2 SRAM (`mid_sram`):
0 means inactive, 1-3 is the time stamp of the last BOM. The SRAM port is
shared by position in the cell:

* **Update (`mid_update`), first half of the cell.** The update subblock
  stores the segment type and MID, reads the entry at byte 7, and raises
  `mid_valid` if the entry is non-zero. At byte 16 it writes the current
  time stamp for a busy BOM whose address matched.
* **Timeout (`mid_timeout`), last half of the cell.** An 8-bit period
  counter is decremented each cell. When it reaches zero it is reloaded from
  the timeout constant, and the entry at a sweeping address counter is
  examined. The entry is cleared when current stamp minus entry is 2
  (mod 3), that is when the entry equals the next value of the stamp. The
  address then advances. When it wraps, the stamp steps 1 → 2 → 3 → 1.

An entry therefore lives between one and two full sweeps after its last BOM:

sweep time = 1024 × (constant + 1) cells

EOM cells do not clear the entry, because segments may arrive out of order.
After reset the table writes zeros to all 1024 entries, one per clock.
`mid_init_done` then rises. Until then no MID is valid, but cells are passed
and queued normally.

## Top-level interface (`mac_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one clock, one byte per clock; asynchronous active-low reset |
| `rx_data`, `rx_soc` | in | 8, 1 | bytes from the physical layer; `rx_soc` with the ACF |
| `tx_data`, `tx_soc` | out | 8, 1 | bytes to the physical layer, five clocks later |
| `ext_addr_match` | in | 1 | CAM answer, valid from cell byte 16 |
| `sar_send_req`, `sar_ack`, `sar_tx_data` | in, out, in | 1, 1, 32 | send handshake and segment words |
| `sar_rx_data`, `sar_status` | out | 32, 4 | received words and status |
| `cmp_set_req_in/out`, `cmp_inc_req_in/out` | in/out | 1 | toggle links to the partner MAC; inputs may be asynchronous |
| `cfg_we`, `cfg_sel`, `cfg_wdata` | in | 1, 1, 8 | write the BWB constant (`cfg_sel`=0) or MID timeout constant (1) |
| `queued`, `rq_cnt`, `cd_cnt`, `mid_init_done` | out | 1, 10, 10, 1 | status for observation |
| `scan_mode`, `scan_in`, `scan_out` | in, in, out | 1 | scan path (next section); tie `scan_mode` low in normal use |

To build a node, connect the `cmp_*_out` of each MAC to the `cmp_*_in` of
its partner. Without a partner, tie the inputs to a constant. The MAC then
never counts requests, and its own requests are not announced.

Parameters of `mac_top`:

| parameter | default | meaning |
|---|---|---|
| `RX_DEPTH` | 12 | receive FIFO depth |
| `TX_TAP` | 3 | transmit tap stage, at least 3 |
| `CAM_LATENCY` | 2 | clocks from the last address byte to a valid CAM answer |
| `FS_DEPTH` | 16 | From-SAR FIFO bytes (power of two) |
| `MID_WORDS` | 1024 | MID table entries |
| `TMO_POS` | 30 | cell byte at which the timeout step starts |
| `BWB_DEFAULT` | 8 | bandwidth balancing constant after reset |
| `TMO_DEFAULT` | 0 | timeout constant after reset |

## Scan path

For testing, every control register of the MAC can be joined into one
serial shift register. With `scan_mode` high, each clock moves every bit one
stage along the chain:

* a new bit enters from `scan_in`;
* the last stage appears on `scan_out`.

With `scan_mode` low the chain is transparent and the MAC works normally.
The mode can be switched at any clock boundary. Scanning in a vector puts
the FSMs, counters and registers into any chosen state. A full circular scan
(`scan_out` fed back to `scan_in` for one chain length) reads the whole state
out and leaves it unchanged.

The chain is 195 bits, in this order from `scan_in`:

| block | bits | contents, in chain order |
|---|---|---|
| `dqdb_block` | 56 | request counter (bit 0 first), count down counter, BWB counter, DQDB-MAC and DQDB-REQ link FSMs, DQDB-SAR FSM, DQDB-QUEUE FSM, BWB constant |
| `receive_block` | 43 | receive CRC, position counter, Monitor FSM, Receive FSM, Send-To-SAR FSM and status |
| `send_block` | 39 | send CRC, From-SAR FIFO pointers, Send FSM, output side state, `tx_soc` |
| `mid_table` | 57 | zero fill counter, update subblock, timeout period counter, timeout FSM, timeout constant, address counter, time stamp |

Inside each register, bits enter at bit 0 and leave from the top bit. So
after shifting in b0 … b194 (b0 first), the request counter holds
b194 (bit 0) … b185 (bit 9).

The data paths are not on the chain:

* the receive FIFO;
* the 32-bit SAR buffer;
* the From-SAR FIFO bytes;
* `tx_data`;
* the MID SRAM.

While scanning, the SRAM is neither read nor written. The scan inputs of the
submodules default to 0, so a submodule can be used on its own without its
scan ports connected.

## Files

`rtl/`:

| file | contents |
|---|---|
| `mac_pkg.sv` | constants, cell field positions, `cell_status_t`, `crc10_step` |
| `mac_top.sv` | the MAC |
| `dqdb_block.sv`, `dqdb_link_fsm.sv`, `dqdb_counter.sv` | distributed queue |
| `receive_block.sv`, `receive_fifo.sv` | reception, Monitor FSM |
| `send_block.sv`, `from_sar_fifo.sv`, `crc10.sv` | sending |
| `mid_table.sv`, `mid_update.sv`, `mid_timeout.sv`, `mid_sram.sv` | MID table |

`tb/`: one self-checking testbench `tb_<module>.sv` per module, plus:

| file | contents |
|---|---|
| `tb_cell_pkg.sv` | reference CRC (bit-serial LFSR), cell and segment builders |
| `cam_model.sv` | behavioural CAM holding two addresses |
| `sar_model.sv` | behavioural SAR: a send queue, and a receive side that checks each accepted segment |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. The unit testbenches compare against independent reference
models and check the clock-exact timing given above.

`tb_mac_top` runs the MACs at their default parameters. It builds a
three-node dual-bus network: six MACs, each with a CAM and a SAR model. Every
node sends multi-segment and single-segment messages to every other node.
The bus heads also inject cells with a bad CRC, a bad header and an unknown
address. The test checks that:

* every segment arrives once, intact, at its destination only;
* busy cells leaving the bus ends carry a correct header and CRC;
* bad cells are refused.

A second phase paces the bus heads at the DS3 cell rate. Each head leaves 149
idle clocks after every cell, so one cell passes every 202 clocks. Meanwhile
each node sends a 3-segment message to the next one.

After the traffic the network idles until MID entries time out. A COM on a
timed-out MID must then be refused. The test also counts queueing, sending,
request relaying, request-bit setting, RQ increments, CD passes,
bandwidth-balancing releases, MID timeouts, a constant write and scan
shifts. It fails if any of them never happens.

Before the traffic, a scan phase runs on all six MACs. It checks:

* the chain length;
* a random pattern passing through the chain unchanged;
* counter values loaded through the chain;
* a state-preserving circular scan;
* that `scan_in` is ignored when the mode is low.

The whole test runs in about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mac_pkg.sv tb/tb_cell_pkg.sv rtl/*.sv tb/cam_model.sv tb/sar_model.sv \
  tb/tb_mac_top.sv --top-module tb_mac_top -Mdir obj && ./obj/Vtb_mac_top
```

For a unit testbench, list `mac_pkg.sv`, `tb_cell_pkg.sv`, the module and
its submodules, and the testbench.

## What follows the original chip, and what is this design's own

Taken from the chip:

* the four blocks and their FSMs, and the division of labour between them;
* the three DQDB counters, their 10-bit width and when each is counted,
  loaded and cleared;
* how a send request is queued, and how request bits are relayed through the
  partner MAC;
* the bandwidth balancing counter reloaded whenever an empty cell is let
  pass;
* the 32-bit SAR and 8-bit physical-layer interfaces;
* the SAR word pace of four clocks, with the acknowledge doubling as the
  send start;
* the hardwired header constant, and CRC insertion inside the From-SAR FIFO;
* the receive FIFO sized by the address match latency, and the first
  validity decision by CAM or MID table;
* the 1024 x 2 MID table, shared between cell halves, with its zero fill,
  1-2-3 time stamps, difference-of-two timeout, timeout period constant and
  sweeping address counter;
* a scan path with a single mode input, scan input and scan output, through
  every control register and past the data paths.

This design's own choices:

* a single edge-triggered clock in place of the chip's two-phase latch
  clocking;
* the clock-exact schedule above, the FIFO depths and tap positions, and the
  CAM latency of 2;
* toggle signalling with synchronisers and event counting between partner
  MACs;
* the `sar_status` encoding, and passing all 48 segment bytes (not only the
  44-byte payload) to the SAR;
* handing only busy cells to the SAR (empty cells carry nothing for it);
* the ACF bit positions, the segment field layout and the CRC generator,
  which are the standard IEEE 802.6 ones;
* the configuration port, the default constants (BWB 8, timeout 0) and
  counter saturation;
* the reading of the timeout rule as "stamp − entry ≡ 2 (mod 3)";
* the scan chain's order and its length: 195 bits, where the chip's chain
  of latches had 188.

Not included:

* clock drivers and pads;
* the CAM, SAR and physical layer, which are outside the chip. The CAM and
  SAR exist only as testbench models.

The queue-arbitrated service alone is built. Pre-arbitrated slots and
request priorities other than 0 pass through untouched.

## Lint notes

Verilator lint reports only style warnings:

* unused constants of the shared package;
* the reset appearing both as an asynchronous reset and in the
  `disable iff` of the assertions;
* two counter values of which only the zero flag is used (BWB and the
  timeout period);
* two deliberately open outputs: `ok` of the send-side CRC unit and `crc`
  of the receive-side one.

None of these affects the circuit.
