# Store-and-forward packet router, one input and three outputs

This router takes byte-serial packets on a single 8-bit input. It delivers
each packet, unchanged, to the one of its three 8-bit output ports whose
address matches the packet's destination address. No packet is forwarded
until all of it has arrived and its frame check sequence (FCS) has been
verified. A corrupt packet, or one addressed to no port, never reaches an
output. It is dropped and reported on `err`. Each output has its own FIFO,
so the three outputs can be drained at the same time while the next packet
is being received. A small FSM controller sequences each packet. It stalls
the sender with `suspend_data_in` whenever the target FIFO cannot take the
whole packet.

The design is synthesizable SystemVerilog (IEEE 1800-2017). It has no
vendor primitives. The FIFOs are plain register arrays.

## Packet format

```
byte 0      byte 1      bytes 2 .. LEN+1        byte LEN+2
+--------+  +--------+  +------------------+    +--------+
|   DA   |  |  LEN   |  |  LEN data bytes  |    |  FCS   |
+--------+  +--------+  +------------------+    +--------+
```

* **DA** is the 8-bit destination address. Output port *i* answers to
  address `PORT_ADDR[i]`. By default that is *i*, so the ports answer to
  0x00, 0x01 and 0x02.
* **LEN** is the number of data bytes, 0 to 63. Only `LEN[5:0]` counts data
  bytes. Bits 7:6 are carried through and covered by the FCS, but otherwise
  ignored.
* **FCS** is one byte: the XOR of DA, LEN and every data byte. A receiver
  checks a packet by XOR-ing all of its bytes, FCS included. The result
  must be zero.

The largest packet is 66 bytes: 63 data bytes plus DA, LEN and FCS.

## Block structure

```
             +-------------------------------------------------------+
data_in ---->| router_reg            DA/LEN hold, FCS, address decode|
pkt_valid -->|    |  dest_oh, fcs_ok, addr_match     wr_byte          |
             |    v                                     |             |
suspend <----| router_fsm  ---- we/last/commit/discard ->| router_out  |--> port 0
err     <----|    ^                                      | 3 x         |--> port 1
             |    +----------------- space_ok -----------| router_fifo |--> port 2
             +-------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/router_pkg.sv` | byte type, FIFO word struct `{last, data}`, FSM state enum, FCS function, default addresses |
| `rtl/router_reg.sv` | the 8-bit register block: holds DA and LEN, keeps the running FCS, decodes DA to a one-hot port select, muxes the byte written into a FIFO |
| `rtl/router_fsm.sv` | the controller FSM: makes `suspend_data_in` and `err`, and the register and FIFO strobes |
| `rtl/router_fifo.sv` | one output FIFO with commit and discard |
| `rtl/router_out.sv` | the output block: one FIFO per port, write steering, room check |
| `rtl/router_top.sv` | the router |

## How a packet moves through the controller

The controller is a Moore FSM with eight states. A byte on `data_in` is
taken on a rising edge where `pkt_valid` is high and `suspend_data_in` is
low.

| State | `suspend_data_in` | What happens | Next |
|---|---|---|---|
| `S_DA` | 0 | take DA into the register; the FCS starts as DA | `S_LEN` |
| `S_LEN` | 0 | take LEN; fold it into the FCS | `S_WAIT` if DA matches a port, else `S_DROP` |
| `S_WAIT` | 1 | wait until the target FIFO has `LEN+3` free words | `S_HDR_DA` |
| `S_HDR_DA` | 1 | write the held DA into the FIFO | `S_HDR_LEN` |
| `S_HDR_LEN` | 1 | write the held LEN into the FIFO | `S_DATA`, or `S_FCS` if LEN = 0 |
| `S_DATA` | 0 | take LEN data bytes; write each one and fold it into the FCS | `S_FCS` |
| `S_FCS` | 0 | take the FCS byte. If it is right, write it flagged as last and commit the packet. If it is wrong, discard the packet and pulse `err` | `S_DA` |
| `S_DROP` | 0 | take and throw away LEN data bytes and the FCS, then pulse `err` | `S_DA` |

DA and LEN are taken before the router knows whether the packet fits. The
register block holds them and copies them into the FIFO once room is
confirmed. So `suspend_data_in` always rises after the LEN byte of a packet
for a known port, and stays high for at least three cycles: one in
`S_WAIT`, then the two header copies. It stays high longer only while the
FIFO lacks room. Once data starts moving, the router never stalls within a
packet. The sender may pause by lowering `pkt_valid` whenever it likes.

## Store and forward: commit and discard

This is the core of the design. Each `router_fifo` has three pointers:

* `wr_ptr` is where the next byte of the packet being received is written.
* `cm_ptr` is the end of the last committed packet. The reader sees only
  words before `cm_ptr`, so `vld_out` means `rd_ptr != cm_ptr`.
* `rd_ptr` is the next word to be read.

The FCS byte is written in the same edge as `commit`, and `cm_ptr` jumps
past it. The whole packet therefore becomes visible at once, in the cycle
after its FCS byte was taken. If the FCS is wrong, `discard` sets `wr_ptr`
back to `cm_ptr`, and the bytes already written are simply overwritten
later. Room is counted from `wr_ptr`, so it covers both read and
uncommitted words: `free = DEPTH - (wr_ptr - rd_ptr)`. Because the
controller waits for `LEN+3` free words before it writes anything, a FIFO
can never overflow in the middle of a packet. An assertion in
`router_fifo` checks this.

`DEPTH` is 128, the smallest power of two that holds a maximum-length
packet (66 words). A port whose reader stops can hold one full packet plus
smaller ones. The next packet for that port then stalls the input, and
with it traffic for every port, until the reader frees space.

## Interfaces and timing

Everything is on the rising edge of `clk`. The reset `rst_n` is synchronous
and active low. It empties the FIFOs and returns the FSM to `S_DA`.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `data_in` | in | 8 | packet byte |
| `pkt_valid` | in | 1 | `data_in` holds a byte; hold it while `suspend_data_in` is high |
| `suspend_data_in` | out | 1 | the router cannot take a byte this cycle |
| `err` | out | 1 | one-cycle pulse, one cycle after the FCS byte of a packet with a wrong FCS, or after the last byte of a packet with an unknown DA |
| `read_enb[i]` | in | 1 per port | pop the byte on `data_out[i]` (ignored when `vld_out[i]` is low) |
| `vld_out[i]` | out | 1 per port | `data_out[i]` holds a byte of a checked packet |
| `data_out[i]` | out | 8 per port | output byte. Show-ahead: valid together with `vld_out[i]` |
| `last_out[i]` | out | 1 per port | `data_out[i]` is the packet's FCS byte (its last byte) |

An output port delivers the packet exactly as it arrived, DA to FCS. The
next router or host can therefore forward or check it again.

Cycle counts, for a packet of LEN data bytes sent with no gaps into a FIFO
with room:

* The input is busy for LEN + 5 cycles: DA, LEN, three suspended cycles,
  LEN data bytes. The FCS byte takes one more.
* The first byte appears on the output in the cycle after the FCS byte is
  taken.
* A port then delivers one byte per cycle while `read_enb` is held.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NUM_PORTS` | 3 | `router_top`, `router_reg`, `router_out` | output ports, each with a FIFO |
| `DEPTH` | 128 | `router_top`, `router_out`, `router_fifo` | words per output FIFO (power of two, at least 66) |
| `PORT_ADDR` | port *i* = *i* | `router_top`, `router_reg` | 8-bit address of each port, packed `[NUM_PORTS-1:0][7:0]` |

Port addresses must be distinct. `NUM_PORTS` may be raised up to 16 with
the default addresses, or further if `PORT_ADDR` is given explicitly. A
four-output router is `router_top #(.NUM_PORTS(4))`.

## What is specified and what is chosen here

The design follows a published description of a one-input router. That
description fixes the following:

* the packet layout: DA, length, data, FCS, all 8 bits wide, with up to
  63 data bytes;
* three output ports, each with its own 8-bit address;
* the three parts: an 8-bit register block, an FSM controller, and an
  output block of three FIFOs;
* the outputs `err` and `suspend_data_in`;
* store-and-forward flow control with buffering on both sides.

The description leaves the following open. These are this design's choices:

* **FCS algorithm.** The description says only that the FCS is a check
  over header and data. Here it is a one-byte XOR. A CRC would be a
  drop-in change to `fcs_next` in `router_pkg`, provided it stays one
  byte.
* **Length range.** The description gives both "1 to 63" and "0 to 63".
  Here LEN may be 0.
* **Number of channels.** The description's title and introduction speak of
  four channels. Its architecture has three outputs and three FIFOs. The
  default follows the architecture (`NUM_PORTS = 3`). Four ports are a
  parameter change.
* **Handshakes.** The handshakes, the `pkt_valid` input, the `last_out`
  flag, `err`'s timing and causes, and the port address values are
  this design's.
* **The FSM.** The FSM's states are this design's, because the description
  does not detail them.
* **Unknown DA.** A packet whose DA matches no port is dropped, and `err`
  is pulsed.
* **Input buffering.** This is the header register. There is no separate
  input FIFO.

The description also names two things that are not built:

* **A rotating-priority arbiter.** With a single input port and
  independently read output FIFOs, nothing is shared that would need one.
* **Protocol translation** between networks. No protocol or translation
  rule is given for it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_router_reg` | held DA and LEN, FCS against an independent XOR, `fcs_ok` for right and corrupted FCS bytes, address decode for every port and for unknown addresses, the write mux |
| `tb_router_fifo` | random packets, some discarded, against a reference queue: nothing visible before commit, discard restores space, the `free` count, wrap-around (DEPTH 16) |
| `tb_router_fsm` | every control output, cycle by cycle, for normal, zero-length, 63-byte, wrong-FCS, unknown-address and LEN ≥ 64 packets; the number of suspend cycles |
| `tb_router_out` | random writes to random ports with three independent random readers; per-port data, that writes go only to the selected port, `space_ok` |
| `tb_router_top` | the router at its default parameters, described below |
| `tb_router_4ch` | the same end-to-end test with `NUM_PORTS = 4` |

`tb_router_top` is the end-to-end test:

* It sends about 2000 random packets with random `pkt_valid` gaps. Some
  have a wrong FCS, some an unknown DA, and lengths include 0 and 63.
* Three random readers drain the ports. Every output byte is compared with
  a per-port model.
* It checks that there is exactly one `err` pulse per bad packet, and that
  a packet reaches an idle port one cycle after its FCS byte.
* It then stops one reader so that the input must stall. A directed phase
  checks the room rule at its edge: a packet that exactly fills the FIFO
  is taken at once, and one a word larger waits.
* It counts the following and fails if any never happened: a wait for
  FIFO space, an FCS discard, an unknown-address drop, zero- and
  maximum-length packets, parallel reads, and input taken while outputs
  are read.

## Simulating

With Verilator 5 (two-state, `--timing`), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_router_top rtl/router_pkg.sv tb/tb_router_top.sv
./obj_dir/Vtb_router_top
```

Replace `tb_router_top` by any other testbench name to run that one. Lint
the RTL with
`verilator --lint-only -Wall -Irtl rtl/router_pkg.sv rtl/router_top.sv`.
The remaining lint warnings concern unused package constants, the unused
top bits of LEN, and the register outputs `da_q`, `fcs_q` and `state`,
which `router_top` does not consume.
