# Burst-mode word-serial address-event receiver

This receiver delivers address-events to a two-dimensional array of cells:
binary events, each named only by the address of the cell it is meant for.
The matching transmitter reads a whole row of its own array at once. It then
sends that row's events as a **burst** on a shared address bus:

1. the row address, once;
2. one column address for each active cell of that row;
3. a terminator.

Sending the row only once lets row and column addresses share the same pads,
so half the address pads are saved without losing throughput. The receiver
turns this back into parallel activity in three ways:

* **Column addresses are decoded as they arrive.** Each decoded column is
  collected in a per-column data latch.
* **A burst is written to its row in parallel.** When the burst ends, the row
  address is decoded. The same signal selects the row and drives every
  collected column onto the column lines, so all events of the burst reach
  their cells together.
* **Writing and receiving overlap.** The row decoder acknowledges the row
  address as soon as it has latched it. The next burst is therefore received
  and its columns decoded while the previous burst is still being written.
  The two-stage column latch has enough slack to hold the new events without
  disturbing the write in progress.

The circuit is asynchronous: every block is a four-phase handshake circuit
built from C-elements and simple gates. This RTL keeps that structure gate for
gate, but evaluates it with a clock (see *How the asynchronous circuits are
modelled*).

## The link: three wires plus a bus

| signal | dir | meaning |
|---|---|---|
| `ry` | in | row request (`ari`). Rises with the row address and stays high for the whole burst. Its fall is the burst terminator. |
| `rx_n` | in | column request (`_aci`), **active low**. Pulsed low once for each column address. |
| `addr[B-1:0]` | in | shared row/column address bus. `B = max(log2 NCOLS, log2 NROWS)`. |
| `ack` | out | the single acknowledge (`ao`). |

One burst, step by step. Each step waits for the one before it.

```
addr = row;  ry  ↑            ->  ack ↑   (row address taken)
addr = col;  rx_n ↓           ->  ack ↓   (column address taken)
addr = row;  rx_n ↑           ->  ack ↑   (column handshake closed)
   ... one column pulse per active cell ...
ry ↓                          ->  ack ↓   (burst over)
```

The address is bundled data. It must be stable before the request edge that
it goes with, and stay stable until that request is acknowledged. Between
bursts the bus is free.

The array side has one four-phase handshake per cell. `ev_req[r][c]` rises
for an event. `ev_ack[r][c]` must follow it up, and later follow it down. The
request falls only after both the row select and the column line of that cell
are low again.

## Dataflow

```
           ry, rx_n, addr, ack
                  |
            +-----+------+                      column path
            | demux_u (U)|--co/ci--> decoder (column) --sel/ack--> lth
            +-----+------+            [address_latch E]            [column_buffer P
                  | ro/ri             [decode_logic, or_tree]        -> data_latch M]
            +-----+------+                                           |  vo = column lines
            | row_delay D|--go--> row_address_latch                  |
            +-----+------+                |                          |
                  | po/pi                 v                          v
                  +-------------> decoder (row) --sel--> receiver_row x NROWS
                                  eo = write request -->  (row_cell R per cell,
                                  ack <-- or_tree <------  ack_wired_or per row)
```

The `dmx` module groups U, D and the row-address latch. The bus that carries
column data to the rows is plain wiring: the column lines `vo` of `lth` run
through every row.

## What happens to one burst

1. **Row address.** `ry` rises, and the converter U passes it on as `ro`. The
   delay D raises `go`. `go` acknowledges the link (`ack` rises) and makes the
   row-address latch opaque, so the row address is kept while column
   addresses use the bus.
2. **Each column address.** U raises `co` (`= ry & ~rx_n`) to the column
   decoder. Its input stage E latches the address and raises `eo` and `lo`
   together. `lo` drops `ack` at once; E does not wait for the decoding to
   finish. The dual-rail word from E drives the one-hot decode logic. The
   selected column buffer acknowledges, and the or_tree merges its
   acknowledge back into E. The event then moves on to the column's data
   latch.
3. **End of burst.** `ry` falls. D now raises `po` to the row decoder, but
   only once that decoder's previous handshake is complete. The row decoder's
   E stage raises `eo`, which does two things:
   * it selects the row through the decode logic;
   * as `vi`, it tells every data latch that holds an event to drive its
     column line `vo`.
   Each row cell whose row select and column line are both high raises
   `ev_req`.
4. **Early release.** The row decoder's acknowledge lowers `go` in D, and that
   completes the link handshake (`ack` falls). The transmitter can begin the
   next burst while the write is still in progress.
5. **Write complete.** The first cell acknowledge raises the row's wired-OR
   acknowledge. The OR tree over the rows passes it to the row decoder's
   `ei`. E then lowers `eo`. That drops the row select and the column lines.
   The cells withdraw their requests, the recipients withdraw their
   acknowledges, and the row acknowledge clears.

## Handshake circuits

All these rules are active high. Where the original cells use active-low
nodes (`_aci`, `_gi`, `_lo`, `_ei`, `_ri`, `_ci`), the RTL uses the
complement. Only `rx_n` keeps its active-low form, at the pin.

| block | module | rules (set / clear) |
|---|---|---|
| converter U | `demux_u` | `ro = ari`, `co = ari & ~aci_n`, `ao = ri & ~ci` (all combinational) |
| row delay D | `row_delay` | `go`: set `~po & gi`, clear `po & pi`. `u = ~(go & ~gi)`. `po`: set `~u & ~pi`, clear `u` |
| decoder input E | `address_latch` | `eo = lo`: set `li & ~ei`, clear `~li & ei`. Address memory opaque while `eo`. `ent = eo & bit`, `enf = eo & ~bit` |
| column buffer P | `column_buffer` | `co`: set `~qo & ci`, clear `qo & ~ci`. `qo`: set `co & ~qi`, clear `~co & qi` |
| data latch M | `data_latch` | `bo`: set `~vi & bi`, clear `vo & ~bi`. `vo`: set `bo & vi`, clear `~bo & ~vi` |
| row cell R | `row_cell` | `po`: set `ri & ci`, clear `~ri & ~ci`. `ro = pi` |
| row acknowledge | `ack_wired_or` | `lo`: set when any cell acknowledges, clear when `~li` and no cell acknowledges |

### Why the column latch has two stages

The column latch must accept a new burst's events while it is still driving
the previous burst onto the column lines. That takes a full cycle of slack
per column, which one stage cannot give. The column buffer P finishes its
handshake with the decoder before the data latch has even acknowledged it.
The data latch M drops its acknowledge to P while its column line is still
driven. Together they can hold the event being written plus one more
for each column.

Two details matter:

* **`bo` is guarded by the global `vi`, not the local `vo`.** Suppose a cell
  that is idle in the current write used `vo` as its guard. It would capture
  the next burst's event at once and then drive it straight into the row that
  is being written. With `vi` as the guard, new events wait in the buffer
  until the write has ended.
* **The last event of a burst must reach M before the write starts.** This is
  a timing assumption of the asynchronous circuit. In this model it holds by
  construction. Take a column acknowledge that the link sees in cycle *t*.
  That event reaches the data latch by *t+3*. The write request cannot rise
  before *t+5*, even if the link side answers every acknowledge in the next
  cycle.

Because there is only one place beyond the cell being written, a column that
appears three times before the write can take the first one has nowhere to
go. The link then stalls for good. A transmitter that reads whole rows never
sends the same column twice in one burst.

### Why the decoders use dual rail

The address memory in E makes its data valid on two rails only while `eo` is
high. Between handshakes both rails are low, so every one-hot output is low.
A decoder output can therefore never glitch while the address memory is
transparent and its input changes.

## How the asynchronous circuits are modelled

Every state-holding node is one flip-flop: a C-element output, or a
staticized node such as the wired-OR acknowledge. On each clock edge its next
value is set by the node's own pull-up and pull-down guards. When neither
guard holds, the node keeps its value (`aer_pkg::prs_next`). Combinational
gates stay combinational.

So one clock is the delay of one state-holding gate. The model has the same
handshake order and the same concurrency as the circuit, and it synthesizes
as ordinary synchronous logic. It does **not** show the circuit's real timing
or any hazards below the gate level. There are two latches in the circuit,
the row-address latch and the address memory in E. Each is a register that
loads on every edge at which its control is low. The value present when the
control rises is the one kept.

Signals on the link and the cell acknowledges must be synchronous to `clk`.
`rst` is synchronous and active high. It clears every node, so every
handshake starts from its idle state and the column latch pipeline starts
empty.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NROWS` | 64 | rows of the array (`y`) |
| `NCOLS` | 64 | cells per row (`x`) |
| `B` | 6 | address width, `max(log2 NCOLS, log2 NROWS)` |

The circuit can be built for any array size. 64 × 64 is this design's own
choice of default.

## Limits and departures from the original circuit

* The clocked evaluation described above replaces the self-timed circuit.
* The burst terminator is the fall of `ry`. No reserved address value is
  decoded.
* Some inputs hang the link, as they would in the circuit:
  * a burst with no column address (the row write is never acknowledged);
  * an address at or above `NROWS` or `NCOLS` (it selects nothing);
  * a column repeated three times before a write.
* The decode logic has one AND of `log2 M` rails per output. The wired-OR row
  acknowledge is a state-holding node, not a transistor-level wired OR.
* Not included: the transmitter, the array cells that consume the events,
  pads and layout.

## Files

`rtl/`: `aer_pkg` (the set/clear helper), `demux_u`, `row_delay`,
`row_address_latch`, `dmx`, `address_latch`, `decode_logic`, `or_tree`,
`decoder`, `column_buffer`, `data_latch`, `lth`, `row_cell`, `ack_wired_or`,
`receiver_row`, `aer_receiver` (top).

`tb/`: one self-checking testbench per module, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`.

* `tb_aer_receiver` runs the top at its default size. It sends 300 bursts
  from a transmitter model that follows the link protocol. The bursts are
  sparse, dense, and repeats of the previous column set. It then checks that
  every burst appears whole, in one cycle, in its own row and in order. It
  also counts these mechanisms and fails if one never happens:
  * parallel writes;
  * column decoding during a write;
  * a row accepted during a write;
  * events held back by the `vi` guard;
  * back-pressure on the terminator.
* `tb_aer_receiver_rect` runs the same test on an 8 × 32 array with
  `B = 5`. There the row addresses are narrower than the bus.
* The unit testbenches compare each handshake cell with its set/clear rules
  under random inputs, and then walk it through a typical sequence.

To simulate, for example the top:

```
verilator --binary --timing --assert -Mdir obj rtl/aer_pkg.sv rtl/*.sv \
    tb/tb_aer_receiver.sv --top-module tb_aer_receiver
./obj/Vtb_aer_receiver
```

The top-level test builds in about half a minute and runs in under a second.
