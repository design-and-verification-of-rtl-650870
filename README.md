# 1×3 packet router

This router takes packets from one 8-bit source bus and sends each one to one of
three 8-bit client ports. A two-bit field in the packet's first byte names the
port. Each client port has a 16-entry FIFO, so a client can read at its own pace.
The source is slowed down with a `busy` signal whenever the router cannot take a
byte. Every packet carries a parity byte. The router recomputes that parity and
raises `error` on a mismatch. If a client leaves data unread for 30 cycles, its
FIFO is flushed.

The design has four kinds of block, all in `rtl/`:

| block | file | role |
|---|---|---|
| controller | `router_fsm.sv` | 8-state FSM that sequences every packet |
| register | `router_reg.sv` | byte pipeline into the FIFOs, parity check |
| synchronizer | `router_sync.sv` | port selection, write steering, `vld_out`, read time-outs |
| FIFO (×3) | `router_fifo.sv` | 16 × 9-bit output buffer per client |
| top | `router_top.sv` | structural wiring of the above |
| package | `router_pkg.sv` | sizes, state type, header length helper |

## Packet format

```
byte 0        header   [7:2] payload length L (1..63)   [1:0] port (0, 1, 2)
bytes 1..L    payload
byte L+1      parity   = header ^ payload[0] ^ ... ^ payload[L-1]
```

Port value 3 names no output. The router ignores such a header. The bit
positions of the two header fields are this design's choice. The other sizes
(1–63 payload bytes, 8-bit bytes, a parity byte at the end) are those of the
described router.

## Source interface

| signal | dir | meaning |
|---|---|---|
| `clock` | in | all logic runs on the rising edge |
| `resetn` | in | synchronous, active low |
| `pkt_valid` | in | high from the header through the last payload byte; **low while the parity byte is on the bus** |
| `data_in[7:0]` | in | packet bytes |
| `busy` | out | while high, the router does not take `data_in`; hold the byte |
| `error` | out | the last packet's parity did not match; cleared when the next packet starts loading |

The router takes the byte on `data_in` at every rising edge at which `busy` is
low. `busy` is low only while the controller is idle (DECODE_ADDRESS) or
streaming payload (LOAD_DATA). It rises in the cycle after a header is taken.
Because `busy` is decoded from the state register, a source that changes its
inputs on the falling edge can look at `busy` and know whether the byte it
presents will be taken. The top holds an assertion for this rule: a byte
offered while `busy` and `pkt_valid` are high must still be there in the next
cycle.

After the parity byte has been taken, `busy` stays high until the packet is
complete in its FIFO. When `busy` falls, `error` is valid for that packet.

## Client interface (per port x = 0, 1, 2)

| signal | dir | meaning |
|---|---|---|
| `vld_out_x` | out | FIFO x holds at least one byte (`= ~empty`) |
| `read_enb_x` | in | read one byte; ignored when the FIFO is empty |
| `data_out_x[7:0]` | out | the byte fetched by the previous cycle's `read_enb_x`; 0 when idle |

The client raises `read_enb_x` while `vld_out_x` is high. Each byte appears on
`data_out_x` one cycle later, header first and parity last. The FIFO reads the
header's length field. Once a whole packet has been read, `data_out_x` returns
to 0 in the first cycle without a read.

**Read time-out.** Suppose `vld_out_x` is high and `read_enb_x` stays low for
30 consecutive cycles. Then the synchronizer pulses `soft_reset_x` for one
cycle, and FIFO x is emptied: `vld_out_x` falls and `data_out_x` goes to 0.
Suppose the controller was still writing a packet into that FIFO. It then drops
the packet and returns to DECODE_ADDRESS. The source is not told, so any bytes
it still sends are read as the start of a new packet.

Timing of the first packet into an empty FIFO, with the header on `data_in` in
cycle 0:

```
cycle      0         1            2          3
state      DECODE    LOAD_FIRST   LOAD_DATA  LOAD_DATA
data_in    header    payload0     payload0   payload1     (payload0 held while busy)
busy       0         1            0          0
FIFO write -         -            header     payload0
vld_out_x  0         0            0          1
```

## How a byte reaches a FIFO

Nothing from `data_in` goes straight into a FIFO. The register block sits in
between. Its output `dout` is the only FIFO write data, and all three FIFOs
share it. The synchronizer turns the controller's single `write_enb_reg` into
a write enable for the selected FIFO only. The port is latched from the header
while the controller is in DECODE_ADDRESS.

The register block holds four bytes:

* **header_byte**: taken with the header. It is put on `dout` in
  LOAD_FIRST_DATA, so the header is written in the first LOAD_DATA cycle.
* **dout**: in LOAD_DATA it takes `data_in` whenever the FIFO has room. Each
  payload byte is therefore written one cycle after it was on the bus.
* **full_state_byte**: the byte taken in a LOAD_DATA cycle in which the FIFO
  was full. In that cycle the write of `dout` is refused, and the new byte must
  not be lost.
* **internal_parity / packet_parity**: the running XOR of header and payload,
  and the byte that came with `pkt_valid` low.

Each FIFO entry is 9 bits: the byte plus a header flag. The controller signals
the header with `lfd_state` one cycle before the header is written, so each
FIFO delays `lfd_state` by one register.

## The controller and back-pressure

This is the part that takes the most care. A FIFO has 16 entries and a packet
can have 65 bytes, so slow clients make FIFOs fill up in the middle of a packet.

| from | condition | to |
|---|---|---|
| DECODE_ADDRESS | `pkt_valid`, port 0–2, its FIFO empty | LOAD_FIRST_DATA |
| DECODE_ADDRESS | `pkt_valid`, port 0–2, its FIFO not empty | WAIT_TILL_EMPTY |
| WAIT_TILL_EMPTY | FIFO of the latched port empty | LOAD_FIRST_DATA |
| LOAD_FIRST_DATA | always | LOAD_DATA |
| LOAD_DATA | FIFO full | FIFO_FULL_STATE |
| LOAD_DATA | FIFO not full, `pkt_valid` low | LOAD_PARITY |
| LOAD_PARITY | always | CHECK_PARITY_ERROR |
| CHECK_PARITY_ERROR | parity write was refused | FIFO_FULL_STATE |
| CHECK_PARITY_ERROR | otherwise | DECODE_ADDRESS |
| FIFO_FULL_STATE | FIFO not full | LOAD_AFTER_FULL |
| LOAD_AFTER_FULL | `parity_done` | DECODE_ADDRESS |
| LOAD_AFTER_FULL | `low_pkt_valid` | LOAD_PARITY |
| LOAD_AFTER_FULL | otherwise | LOAD_DATA |
| any state writing a packet | `soft_reset` of its port | DECODE_ADDRESS |

| state | busy | writes | strobe |
|---|---|---|---|
| DECODE_ADDRESS | 0 | – | `detect_add` |
| LOAD_FIRST_DATA | 1 | – | `lfd_state` |
| LOAD_DATA | 0 | yes | `ld_state` |
| LOAD_PARITY | 1 | yes | – |
| FIFO_FULL_STATE | 1 | – | `full_state` |
| LOAD_AFTER_FULL | 1 | yes | `laf_state` |
| WAIT_TILL_EMPTY | 1 | – | – |
| CHECK_PARITY_ERROR | 1 | – | `rst_int_reg` |

The FIFO refuses any write while it is full, and the controller replays the
refused byte:

1. **Full during payload.** In LOAD_DATA the FIFO is full. `dout` is not
   written, and the byte on the bus goes into `full_state_byte`. The controller
   waits in FIFO_FULL_STATE with `busy` high. In LOAD_AFTER_FULL it writes the
   held `dout` and moves `full_state_byte` into `dout`. Then it continues in
   LOAD_DATA, which writes that byte.
2. **Full when the parity arrives.** The same steps happen, but
   `low_pkt_valid` is set. LOAD_AFTER_FULL then goes to LOAD_PARITY, which
   writes the parity byte.
3. **Parity write refused.** The last payload byte can fill the FIFO, so the
   write in LOAD_PARITY is refused. A flag records this. CHECK_PARITY_ERROR then
   goes to FIFO_FULL_STATE instead of idle. LOAD_AFTER_FULL writes the parity
   and, seeing `parity_done`, returns to DECODE_ADDRESS.

`parity_done` is set when the parity byte is loaded into `dout`. `error` is
computed in CHECK_PARITY_ERROR, after both parities are final.

WAIT_TILL_EMPTY keeps packets apart: a new packet starts into a FIFO only when
that FIFO is empty, so each FIFO holds the tail of at most one packet. The
header has already been taken, so the controller latches the port and waits
for that FIFO to empty. The FSM also carries an assertion that a packet is
never handled for port 3.

## Departures from the described router

* **Idle output bus.** The described router drives `data_out_x` to high
  impedance after a packet and after a time-out. Here it is driven to 0, and
  there are no tri-states in the core. A pad-level enable could be added from
  `vld_out_x` and the FIFO's packet counter.
* **Parity retry.** The described controller leaves CHECK_PARITY_ERROR for
  FIFO_FULL_STATE when the FIFO "is full". Testing the live flag there loses the
  parity byte if the client reads during LOAD_PARITY. This design instead
  tests a registered flag: "the parity write was refused".
* **Choices where the description is silent:**
  * how WAIT_TILL_EMPTY is entered and left;
  * the header bit layout;
  * ignoring port 3;
  * how long `error` is held;
  * clearing `low_pkt_valid` on DECODE_ADDRESS;
  * the one-cycle width of `soft_reset`;
  * the time-out counting 30 *consecutive* unanswered cycles, restarted by any read.
* **Packet counter.** The FIFO's packet-length counter counts down once per
  byte read, not once per clock, so a client may pause in the middle of a
  packet.

Each file's opening comment says which parts follow the described router and
which are choices made here.

## Parameters

| parameter | default | where |
|---|---|---|
| `DEPTH` | 16 | `router_fifo` entries |
| `WIDTH` | 9 | `router_fifo` entry width (byte + header flag) |
| `TIMEOUT` | 30 | `router_sync` read time-out in cycles |

`router_pkg` holds the byte width, the header field widths (2 + 6) and the
state encoding. The top uses all defaults.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_router_fifo`: a queue reference model under directed fill, overflow,
  simultaneous read/write, soft reset and 4000 random cycles. It also checks
  the header-length countdown that idles `data_out`.
* `tb_router_sync`: every address against every full pattern. The time-out
  must fire exactly at the 30th idle cycle. Then random traffic runs against a
  reference counter.
* `tb_router_fsm`: the state is recovered from the outputs, and directed
  sequences walk every transition, including the parity retry and both
  time-out cases.
* `tb_router_reg`: cycle-exact directed packets, then 300 random packets driven
  by a behavioural controller under random back-pressure. The bytes that reach
  the FIFO must be exactly the packet, and `error` must match the injected
  parity faults.
* `tb_router_top`: end to end at the default sizes. The payload lengths 4, 14
  and 16 run first, then 600 random packets of 1–63 bytes with 20% bad parity
  and three client speeds. Directed cases follow: a parity retry, a read
  time-out, a time-out that abandons a packet still being written, and a
  port-3 header. It checks every byte on every port, `error`
  after every packet, `busy` one cycle after each header, and `vld_out` three
  cycles after a header into an empty FIFO. It counts busy stalls, full FIFOs,
  LOAD_AFTER_FULL, WAIT_TILL_EMPTY, parity retries, parity errors, time-outs,
  abandoned packets and simultaneous FIFO read/write, and fails if any of them never happened.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/router_pkg.sv \
          tb/tb_router_top.sv --top tb_router_top
./obj_dir/Vtb_router_top
```

Use the same command for the other testbenches: put in the testbench file and
its `--top` name.
Verilator simulates with two states, so the testbenches reset everything they
read. All testbenches change inputs on the falling clock edge and sample
outputs there.
