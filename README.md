# COWB: a Chip-Only-Writing Bus for a main resource and its slaves

A shared bus lets only one module talk at a time. COWB avoids that inside
one node of a network-on-chip. The node has one **main resource** (MR),
for example a processor, and N **slave resources** (SR), for example a memory
controller and a serial port. They are linked by two buses, and each bus
carries data in one direction only:

* the **MR exclusive bus**. Only the main network interface (MRNI) writes it,
  and every slave network interface (SRNI) listens;
* the **SR shared bus**. One SRNI at a time writes it, chosen first come,
  first served by an arbitration module, and only the MRNI listens.

Neither bus is ever read from by the module that drives it. A "read" is
therefore done with two writes: the MR writes a read command to a slave, and
later the slave writes the data back to the MR. Because the two directions use
separate wires, the MR can send to one slave while another slave sends to the
MR. Adding a slave costs one more network interface and one more
request/response pair on the arbiter.

All traffic travels in self-checking frames. Each receiver filters frames by
destination address and checks them with a CRC. A receiver that finds an error
asks the sender to send again.

This repository holds synthesizable SystemVerilog for the whole bus system.
That covers both kinds of network interface, the arbiter and the two buses,
with a testbench for each part and one for the whole system. The
resources themselves (processor, memory controller, serial controller) are
not part of the RTL. The top module brings out their connections.

```
            main resource                       slave resources
                 |  cmd/dat  rx                 |            |
              +--------+                   +--------+   +--------+
              |  MRNI  |                   | SRNI 0 |   | SRNI 1 |
              +--------+                   +--------+   +--------+
   MR exclusive  | tx   ^ rx                rx ^  | tx   rx ^  | tx
   bus  =========+======|=====================+  |         +   |
                        |                        |   req/gnt   |
   SR shared bus =======+========================+=====+=======+
                                                       |
                                               +---------------+
                                               |  arbitration  |
                                               +---------------+
```

## The frame

Every transfer in either direction is one frame. Bytes go out one per clock,
in this order, with multi-byte fields most significant byte first:

| field  | bytes  | content |
|--------|--------|---------|
| DA     | 2      | destination address (16 bits, up to 65536 resources) |
| SA     | 2      | source address |
| TYPE   | 1      | `01` write data, `02` read command, `03` request for sending again |
| LENGTH | 2      | number of data bytes, 1 to 2048 |
| DATA   | LENGTH | payload |
| CHECK  | 4      | CRC-32 over DA..DATA |

A frame is therefore LENGTH + 11 bytes long, at most 2059 bytes. The CHECK
field uses the Ethernet CRC-32: reflected polynomial `0xEDB88320`, preset
`0xFFFFFFFF`, and the result inverted. The field sizes and the three frame
kinds come from the protocol definition. The TYPE codes, the byte order and
the CRC polynomial are this implementation's choices.

A bus beat is the packed struct `beat_t` = `{valid, sof, data[7:0]}`. `sof`
marks the first DA byte. A frame's bytes occupy consecutive clocks. The
`sof` flag lets a receiver resynchronise after a damaged or cut-off frame.

The meaning of the payload is up to the resources. The system testbench uses
this convention: a write to the memory model carries a 2-byte address and then
the data. A read command carries a 2-byte address and a 2-byte count. The
answer to a read is an ordinary write-data frame from the slave back to the
main resource.

## Inside a network interface

`cowb_rni` is both the MRNI (`IS_MR = 1`) and the SRNI (`IS_MR = 0`).
The two differ only in which bus they listen to and write to. The MRNI writes
the exclusive bus, so it needs no arbitration. In the MRNI its
request-and-response unit grants every request at once.

```
 bus_rx -> [port reg] -> rx_ctrl --(data)--> rx_buf --> resource (rx_*)
                          |  CRC                ^ commit / abort
                          | nack_req, retx_req
                          v
 resource (cmd_*, dat_*) -> tx_ctrl --(frame)--> tx_buf
                          |  CRC     <--(read)--'
                          | want / granted
                      req_resp <--> arbitration (bus_req / bus_gnt)
                          |
                       tx beat -> [port reg, idle unless granted] -> bus_tx
```

### Receive path: nothing unchecked reaches the resource

`cowb_rx_ctrl` follows every frame on its bus. It compares the destination
address once it has both DA bytes. A frame for another resource is abandoned
at once (`ev_drop`), and the controller waits for the next `sof`. For its
own frames it reads SA, TYPE and LENGTH. It then writes each data byte into
the reception buffer while its CRC unit folds in the same bytes. Finally it
compares the four CHECK bytes with the computed value.

The reception buffer `cowb_rx_buf` holds a frame that is still arriving
apart from frames that are complete:

* Bytes of the frame in progress are written past a **commit pointer**. The
  resource reads only up to that pointer.
* On a good CHECK the controller pulses `commit`. The commit pointer moves to
  the end of the frame, and a descriptor (SA, TYPE, LENGTH) is queued.
* On a bad CHECK, or on `abort`, the write pointer goes back to the commit
  pointer. No byte of a damaged frame is ever visible to the resource.
* The resource sees a valid/ready byte stream. `rx_last` marks the last byte
  of each frame, and the frame's SA, TYPE and LENGTH are held alongside.

By default the buffer is 4096 bytes, enough for one largest frame to drain
while the next arrives. It can also hold 4 frame descriptors.

### Send path: pack fully, then ask for the bus

`cowb_tx_ctrl` takes a command (DA, TYPE, LENGTH) and LENGTH data bytes from
the resource. It writes the 7 header bytes, the data and the 4 CHECK bytes
into the sending buffer `cowb_tx_buf`. When the resource supplies a byte
every clock, packing takes LENGTH + 11 clocks. Only then does the controller
raise `want`:

* In an SRNI, `cowb_req_resp` turns `want` into the SRNI's own request wire to
  the arbiter. It reports `granted` when the response comes back.
* The controller then reads the frame out at one byte per clock.
* It drops `want` after the last byte. That fall is the release of the bus.

The shared bus is therefore never held while a resource is still producing
data. Each send port is a register. It outputs idle beats unless its
interface holds the grant, so the shared bus (`cowb_shared_bus`) is simply the
OR of all slave ports. An assertion there checks that no port without the
grant ever drives a valid beat.

A frame stays in the sending buffer after it has been sent. It is overwritten
only by the next data frame, which is what makes resending possible.

### Error recovery: request for sending again

This is the part of the design where the most is going on.

1. A receiver whose frame fails the CHECK aborts it and pulses `nack_req`
   with the frame's SA. The frame fails if:
   * its CHECK bytes disagree with the computed CRC;
   * its LENGTH is 0 or above 2048;
   * it does not fit in the reception buffer (overflow).
2. The receiver's own sending controller then builds a TYPE 3 frame. It is
   addressed to that SA, with one data byte `00`, in a separate 12-byte
   region of the sending buffer, so the last data frame stays intact. It is
   sent like any other frame (`ev_nack_sent`).
3. When a controller receives a good TYPE 3 frame, it does not pass it to the
   resource. It raises `retx_req` instead, and its sending controller sends
   its last data frame again, straight from the buffer, without packing it
   again (`ev_retx`).

When several things are waiting, a sending controller serves them in this
order: a pending request for sending again, then a resend, then a new command
from the resource. It keeps one pending entry of each kind. A second nack that
arrives before the first is served replaces the first one's address.

The scheme has limits, which come from the frame format. The format has no
sequence number and no time-out:

* If the damaged byte is in DA, the frame is simply missed. If it is in SA,
  the request for sending again goes to the wrong address. In both cases the
  frame is lost, and the resource must notice by other means.
* A resend request that arrives while a new data frame is being packed is
  ignored, because the frame it refers to is being overwritten.
* A corrupted TYPE 3 frame is itself answered with a TYPE 3 frame. The other
  side then resends its last data frame, which the receiver may already have
  accepted, so the frame arrives twice.

Overflow is handled through the same path. If a slave stops reading, a
maximum-length frame that does not fit is rejected. The MR receives the
request for sending again and keeps resending. The frame goes through as soon
as the slave has drained enough of its buffer. The system testbench runs
exactly this case with three 2048-byte frames.

## Arbitration

`cowb_arbiter` keeps a queue of requester indices in order of arrival.
Requests that arrive on the same clock join lowest index first. The head of
the queue holds the one-hot grant until its request falls. The grant is a
registered signal.

An SRNI's request rises one clock after its frame is packed. The next slave
is granted three clocks after the sending controller reads out its last byte:
one clock for that byte to pass the output register onto the bus, one for the
request to fall, and one for the queue to advance. The last byte is therefore
always on the bus under the old grant.

## Top level: `cowb_system`

| parameter     | default    | meaning |
|---------------|------------|---------|
| `N_SR`        | 2          | number of slave interfaces (two in the reference system: memory and serial) |
| `RXBUF_DEPTH` | 4096       | reception buffer bytes per interface, power of two |
| `MR_ADDR`     | `16'h0000` | address of the main interface |
| `SR_ADDR0`    | `16'h0001` | address of slave interface 0; interface i has `SR_ADDR0 + i` |

| ports | direction | meaning |
|-------|-----------|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `mr_cmd_valid/ready/da/type/len` | in/out | main resource starts a frame |
| `mr_dat_valid/ready/data` | in/out | its LENGTH data bytes |
| `mr_rx_valid/ready/data/last/sa/type/len` | out/in | frames received by the main resource |
| `sr_cmd_*`, `sr_dat_*`, `sr_rx_*` | arrays `[N_SR]` | the same for each slave resource |
| `mr_bus`, `sr_bus`, `sr_gnt` | out | the two buses and the grant, for observation |
| `ev_drop`, `ev_crc_err`, `ev_overflow`, `ev_frame_ok`, `ev_nack_sent`, `ev_retx` | out `[N_SR:0]` | one-clock event pulses per interface. Index `N_SR` is the MRNI. |

All resource-side handshakes are valid/ready. A transfer happens on a rising
edge where both are high. To send, a resource offers a command and waits for
`cmd_ready`. It then offers the LENGTH data bytes, and `dat_ready` takes them.
`cmd_ready` is low while the interface is packing or sending, or has a
request for sending again or a resend pending.

End-to-end timing, for a frame of L data bytes sent from the MR to a slave
with the data supplied every clock:

* L + 11 clocks to pack the frame;
* L + 11 clocks on the bus;
* 2 register stages, the send port and the receive port;
* then the frame becomes readable once its last CHECK byte has been checked.

The slave-to-MR direction adds the request and grant: about 3 clocks when the
bus is free.

Sizes at the defaults, per interface: a 4096 × 8 reception array and a
2071 × 8 sending array. The reception array could be made smaller, down to one
largest frame, if the resource drains quickly.

## Where this design fills gaps

The published description defines the structure, the frame format, the
address filtering, the CRC check with requests for sending again, and
first-come-first-served arbitration. These are choices made here:

* one byte per clock on both buses, with `valid` and `sof` flags;
* fields sent most significant byte first;
* TYPE codes 1/2/3;
* CRC-32 (IEEE 802.3) over DA..DATA as the CHECK field;
* addresses given by parameters;
* buffer sizes: 4096-byte reception, 2071-byte sending;
* the commit/abort reception buffer;
* the request-for-sending-again frame has one data byte;
* the reaction to a received request for sending again (resend the last data
  frame);
* overflow and bad LENGTH are treated like a CRC error;
* arbitration ties go to the lowest index, and a held request doubles as the
  release;
* the active-low asynchronous reset.

One point in the source can be read two ways. One passage has a slave request
the bus as soon as it has a read command, before its data is ready. Another
has it request the bus only once the frame is packed. This design does the
latter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/cowb_tb_pkg.sv`
holds the reference functions: a bit-serial CRC-32 written independently of
the RTL's byte-step function, and a frame builder.

| testbench | what it shows |
|-----------|---------------|
| `tb_cowb_crc32` | standard check value (`"123456789"` → `CBF43926`), random messages against the reference |
| `tb_cowb_rx_ctrl` | commit of good frames, abandon on a foreign DA, nack on a corrupted data or CHECK byte, TYPE 3 → `retx_req`, overflow, LENGTH 0, back-to-back frames |
| `tb_cowb_rx_buf` | commit/abort, nothing of an aborted frame visible, data and descriptor overflow |
| `tb_cowb_tx_ctrl` | exact frame bytes, packing time L + 11, no beat before the grant, request frame, resend, priority |
| `tb_cowb_tx_buf`, `tb_cowb_bus_port`, `tb_cowb_req_resp`, `tb_cowb_shared_bus` | the small parts |
| `tb_cowb_arbiter` | grant order against a reference arrival queue, 4 requesters |
| `tb_cowb_rni` | an MRNI and an SRNI back to back: both directions, address filter, a corrupted byte in each direction recovered exactly once |
| `tb_cowb_system` | the whole system at its default parameters (see below) |
| `tb_cowb_scale` | a four-slave system: every slave addressed separately, four answers competing for the shared bus and served in the order they asked |

`tb_cowb_system` uses a behavioural main resource, a memory model on slave 0
and a serial byte sink on slave 1. It runs these steps:

1. a write to memory, then a read back;
2. a short write to the serial slave;
3. two reads at once, so both slaves contend for the shared bus while the MR
   keeps writing on the exclusive bus;
4. one flipped bit on each bus, injected with `force`;
5. three 2048-byte frames to a stalled serial slave, which overflow its
   buffer and are then recovered.

A monitor checks that every frame on either bus takes exactly LENGTH + 11
consecutive beats. At the end, the testbench requires that each of these
happened at least once:

* a frame abandoned by the address filter;
* a CRC error at a slave and at the MR;
* a request for sending again, and a resend;
* an overflow;
* contention for the shared bus;
* both buses busy in the same clock;
* a maximum-length frame.

It finishes in well under a second of simulation time.

To run a testbench with Verilator 5 (substitute any testbench name):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cowb_pkg.sv tb/cowb_tb_pkg.sv tb/tb_cowb_system.sv \
    --top-module tb_cowb_system -o sim
./obj_dir/sim
```

## Files

* `rtl/cowb_pkg.sv`: frame constants, `beat_t`, `ftype_t`, the CRC byte step
* `rtl/cowb_system.sv`: top level
* `rtl/cowb_rni.sv`: network interface (MRNI/SRNI)
* `rtl/cowb_rx_ctrl.sv`, `rtl/cowb_rx_buf.sv`: receive path
* `rtl/cowb_tx_ctrl.sv`, `rtl/cowb_tx_buf.sv`, `rtl/cowb_req_resp.sv`: send path
* `rtl/cowb_crc32.sv`: CRC unit
* `rtl/cowb_bus_port.sv`: bus register
* `rtl/cowb_arbiter.sv`: arbitration
* `rtl/cowb_shared_bus.sv`: the SR shared bus

## Not included

* The processor, its local bus, the memory controller and the serial
  controller of the reference system. They are the resources, not part of the
  bus.
* The 2D-mesh switches and their network interfaces. The mesh is the
  surrounding network-on-chip in which such a node would sit, and its design
  is not specified.
