# Five-port packet router (one input, four outputs)

This is a small packet switch for on-chip use. Bytes arrive on one 8-bit input
port, and each packet leaves on one of four 8-bit output ports. The header byte
of the packet names the output port. Each output port has its own 16-byte FIFO.
A producer on the input side and four consumers on the output side can therefore
run at different rates. A single controller moves each packet byte by byte into
the FIFO it is addressed to. When that FIFO fills, the controller pushes back on
the producer with `suspend_data`. It also checks a parity byte at the end of
every packet and reports a mismatch on `err`.

Together with its one input, the router has five ports. The same design with
`N_OUT = 3` is the three-output (1x3) variant, in which header address 3 is not
routed.

```
              +------------+   dout   +-------------+  data_out[0], vld_out[0]
 data_in ---->| router_reg |--------->| router_fifo |---> read_enb[0]
 packet_valid |  (data,    |    |     +-------------+
              |  parity,   |    +---->| router_fifo |---> port 1
              |  status)   |    +---->| router_fifo |---> port 2
              +------------+    +---->| router_fifo |---> port 3
                 ^  ctrl             ^ write_enb[i]  | full[i], empty[i]
              +------------+     +-----------+       |
              | fsm_router |<--->|  ff_sync  |<------+
              +------------+     +-----------+
  suspend_data <----+   fifo_full/fifo_empty of the addressed FIFO
```

## Packet format

| byte        | `packet_valid` | contents                                           |
|-------------|----------------|----------------------------------------------------|
| header      | 1              | bits [1:0]: destination port; bits [7:2]: ignored   |
| payload x n | 1              | any data, n >= 0                                    |
| parity      | 0              | XOR of the header and all payload bytes            |

The router forwards every byte, including the header and the parity byte, to the
output FIFO. A consumer therefore reads exactly the byte stream the producer
sent. Because `packet_valid` marks where the packet ends, packets may be of any
length. Header bits [7:2] are free for the producer and consumer to use, for
example as a length field. The router ignores them.

## Input handshake

The producer drives `data_in` and `packet_valid`. After each rising clock edge
at which `suspend_data` was low, the router has taken the current byte and the
producer presents the next one. While `suspend_data` is high, the producer holds
both signals. Between packets, the producer keeps `packet_valid` low. Once the
router is idle (`suspend_data` low), those idle cycles are consumed like bytes.

`suspend_data` is low in only two controller states: DECODE_ADDRESS, where the
header is taken, and LOAD_DATA, where payload and parity are taken. It is a
Moore output of the state register, so it never depends combinationally on the
inputs.

## The controller (`fsm_router`)

| state              | what happens                                                        | next                                                                 |
|--------------------|---------------------------------------------------------------------|----------------------------------------------------------------------|
| DECODE_ADDRESS     | idle. Header on `data_in` is latched with its address               | `packet_valid`: LOAD_FIRST_DATA if the addressed FIFO is empty, otherwise WAIT_TILL_EMPTY |
| WAIT_TILL_EMPTY    | hold the producer                                                   | LOAD_FIRST_DATA when the FIFO is empty                               |
| LOAD_FIRST_DATA    | header moves to `dout`                                              | LOAD_DATA                                                            |
| LOAD_DATA          | `dout` is written to the FIFO and the next byte is taken             | FIFO full: FIFO_FULL_STATE. `packet_valid` low: LOAD_PARITY           |
| LOAD_PARITY        | parity byte (in `dout`) is written                                  | FIFO full: FIFO_FULL_STATE, otherwise CHECK_PARITY_ERROR             |
| FIFO_FULL_STATE    | hold the producer until the FIFO has room                            | LOAD_AFTER_FULL                                                      |
| LOAD_AFTER_FULL    | the refused byte is written. The byte set aside moves to `dout`      | LOAD_DATA, LOAD_PARITY, or CHECK_PARITY_ERROR (see below)            |
| CHECK_PARITY_ERROR | `err` is updated. The parity and status registers are cleared        | DECODE_ADDRESS                                                       |

A packet only starts into an **empty** FIFO. A consumer therefore never finds
two packets interleaved, and a new packet to a busy port waits in
WAIT_TILL_EMPTY. Packets to other ports wait behind it too, because there is
only one input.

### Timing of an unstalled packet

For a packet with n payload bytes that is sent into an empty FIFO (here n = 2,
with header H, payload P1 and P2, and parity Q):

| cycle | state           | data_in | taken at end | FIFO write at end |
|-------|-----------------|---------|--------------|-------------------|
| 0     | DECODE_ADDRESS  | H       | H            |                   |
| 1     | LOAD_FIRST_DATA | P1      | (held)       |                   |
| 2     | LOAD_DATA       | P1      | P1           | H                 |
| 3     | LOAD_DATA       | P2      | P2           | P1                |
| 4     | LOAD_DATA       | Q (pv=0)| Q            | P2                |
| 5     | LOAD_PARITY     | next    | (held)       | Q                 |
| 6     | CHECK_PARITY_ERROR | next | (held)       |                   |
| 7     | DECODE_ADDRESS  | next    | next header  |                   |

The packet occupies the input for n + 5 cycles. The next header is taken in
cycle n + 5. `vld_out` of the destination port rises two clock edges after the
edge that took the header, and the consumer can read from then on. While the
router is still writing a packet into a FIFO, the consumer can already read
that FIFO.

### Stalls: how a full FIFO is handled

This part needs the most care. Every byte passes through the one-byte register
`dout` and is written to the FIFO one clock after it was taken. In LOAD_DATA,
`suspend_data` is low, so the router takes a new byte at every edge, even at an
edge where the FIFO turns out to be full. At such an edge:

- the write of `dout` is refused by the full FIFO, and `dout` keeps its byte;
- the byte just taken is set aside in `full_state_byte`;
- the controller goes to FIFO_FULL_STATE and raises `suspend_data`.

Once the consumer has read from the FIFO, LOAD_AFTER_FULL writes `dout` and
loads `dout` from `full_state_byte`. No byte is lost or repeated. The next state
depends on how far the packet had got:

- `low_packet_valid` = 0: the set-aside byte was payload, so go back to
  LOAD_DATA.
- `low_packet_valid` = 1 and `parity_done` = 0: the set-aside byte was the
  parity byte, so go to LOAD_PARITY to write it.
- `parity_done` = 1: the FIFO filled while LOAD_PARITY was writing the parity
  byte. LOAD_AFTER_FULL has just written it, so go straight to
  CHECK_PARITY_ERROR.

## Parity and `err` (`router_reg`)

`internal_parity` XORs in the header (in LOAD_FIRST_DATA). It then XORs in every
byte taken in LOAD_DATA while `packet_valid` is high, including a byte set
aside during a stall. The byte taken with `packet_valid` low is the packet's own
parity byte, and it is stored in `packet_parity`. In CHECK_PARITY_ERROR:

- `err` is loaded with `internal_parity != packet_parity`;
- both parity registers and the `parity_done` and `low_packet_valid` flags are
  cleared.

`err` is valid from the cycle after CHECK_PARITY_ERROR and holds until the next
packet's check. A packet with bad parity is still delivered. It is up to the
consumer or the system to discard it.

## Address steering (`ff_sync`) and output FIFOs (`router_fifo`)

- **Address latch and flags.** `ff_sync` latches header bits [1:0] in
  DECODE_ADDRESS. From the latched address it routes the controller's single
  write strobe to one FIFO, and returns that FIFO's `full` and `empty` flags to
  the controller. During DECODE_ADDRESS the flags come from the address on
  `data_in` itself, so the decision between LOAD_FIRST_DATA and
  WAIT_TILL_EMPTY is made in the same cycle as the header arrives.
- **Unrouted addresses.** An address with no FIFO (only possible with
  `N_OUT < 4`) reads as "not empty, full", and the controller ignores the
  header. The bytes that follow are then also decoded as headers, so a
  producer must not send such packets.
- **`vld_out`.** `vld_out[i]` is simply `!empty[i]`.
- **FIFO behaviour.** Each FIFO is 8 bits x 16 words with registered read
  data: `data_out[i]` shows the byte one clock after an edge with
  `read_enb[i]` and `vld_out[i]` high.
- **Blocked operations.** A write to a full FIFO is dropped, even when a read
  happens in the same cycle. A read from an empty FIFO is ignored and
  `data_out` holds its value.

## Reset

`resetn` is active low and **synchronous**. It returns the controller to
DECODE_ADDRESS, empties every FIFO (and clears its `data_out`), and clears
`dout`, `err`, the status flags and all internal registers.

## Parameters

| parameter                  | default | meaning                                   |
|----------------------------|---------|-------------------------------------------|
| `N_OUT` (router_1x5)       | 4       | number of output ports, 1..4              |
| `FIFO_DEPTH` (router_1x5)  | 16      | words per output FIFO, a power of two     |
| `ROUTER_DATA_W` (router_pkg) | 8     | byte width of all ports                   |
| `ROUTER_ADDR_W` (router_pkg) | 2     | header address bits                       |

After coarse synthesis the default router is about 160 word-level cells,
93 flip-flops and 4 x 128 bits of FIFO memory.

## Files

| file                 | contents                                                         |
|----------------------|------------------------------------------------------------------|
| `rtl/router_pkg.sv`  | widths, controller state enum, `reg_ctrl_t` strobe bundle        |
| `rtl/router_1x5.sv`  | top level: controller, registers, steering, `N_OUT` FIFOs         |
| `rtl/fsm_router.sv`  | controller                                                       |
| `rtl/router_reg.sv`  | data, parity and status registers                                |
| `rtl/ff_sync.sv`     | address latch, write steering, flag mux, `vld_out`               |
| `rtl/router_fifo.sv` | output FIFO                                                      |
| `tb/tb_*.sv`         | one self-checking testbench per module                           |

## Verification

Every testbench checks the module against values it works out by its own
means, and prints `TB_RESULT checks=N failures=M`.

- **`tb_router_1x5`** (full size, defaults unchanged) sends 600 random packets.
  Payloads are 0 to 24 bytes, about 10 % of packets have corrupted parity, and
  the destinations are random. The four consumers read at rates that change
  over time. The test compares every byte delivered on every port with what
  was sent, and checks `err` after every packet. It also checks the n + 5
  cycle occupancy and the two-edge `vld_out` delay. It requires each of these
  to occur at least once: waiting for an empty FIFO, a FIFO-full stall, each of
  the three exits of LOAD_AFTER_FULL, a full FIFO in LOAD_PARITY, a detected
  parity error, and a packet without payload.
- **`tb_router_1x3`** runs the three-output variant. It includes packets
  addressed to the unrouted port 3, and checks that they are dropped while
  every other packet arrives.
- **`tb_fsm_router`** checks the controller against a transition table.
- **`tb_router_reg`** checks the registers with directed packets and with a
  random register model.
- **`tb_ff_sync`** checks the steering logic for 4 and 3 outputs against a
  reference model.
- **`tb_router_fifo`** checks the FIFO against a queue model.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv \
    tb/tb_router_1x5.sv rtl/router_1x5.sv rtl/fsm_router.sv rtl/router_reg.sv \
    rtl/ff_sync.sv rtl/router_fifo.sv --top-module tb_router_1x5 -o sim
./obj_dir/sim
```

Simulations are two-state. The testbenches reset everything they read.

## Where this design makes its own choices

The block split is taken from the specification of a 1-input router:

- controller, data and parity registers, steering logic, and one FIFO per
  output;
- the controller's eight states and their transitions;
- the register set/clear rules;
- the 8 x 16 FIFO size.

The following are this implementation's own decisions:

- **Number of outputs.** The specification describes the router both with
  three output FIFOs and with four. The four-output, five-port form is the
  default here, and `N_OUT = 3` gives the other form.
- **Parity.** The parity is a bytewise XOR, and the parity byte travels with
  `packet_valid` low.
- **Exit of LOAD_AFTER_FULL when `parity_done` is set.** This exit goes to
  CHECK_PARITY_ERROR, because the specification leaves this case open.
- **Packet parity register.** The packet's parity byte has its own register,
  and `err` holds its value until the next check.
- **Flag mux during address decode.** During DECODE_ADDRESS the flag mux
  follows the incoming address.
- **Blocked FIFO operations.** A write to a full FIFO is refused even when a
  read happens in the same cycle.
- **No time-out.** There is no time-out or soft reset for an output that is
  never read. A consumer that stops reading stalls the input indefinitely once
  its FIFO is full and another packet for it arrives.
- **Single clock.** The whole router runs on one clock. `ff_sync` is steering
  logic, not a clock-domain synchroniser.
