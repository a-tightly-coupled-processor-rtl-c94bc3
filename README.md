# NIC: a network interface with hardware message dispatch

Fine-grain parallel programs send many short messages. With a conventional
interface, most of the cost of a message is software: copying words in and
out of the interface, storing the message type, and, at the receiver,
testing for a message, extracting its type, computing the handler address
and jumping there. This design is a network interface chip that removes most
of that work with a few small hardware mechanisms:

* **Register-style interface.** The processor sees fourteen interface
  registers: five output registers `o0..o4` in which a message is composed,
  five input registers `i0..i4` that hold the current received message, and
  `CONTROL`, `STATUS`, `CODEBASE` and `MSGIP`.
* **Commands folded into ordinary accesses.** Two commands drive the
  interface. `SEND` queues the contents of `o0..o4` as a message. `NEXT`
  loads the next received message into `i0..i4`. Both are encoded in the low
  address bits of an ordinary load or store, so one access can read or
  write a register, send a message and advance to the next one.
* **Encoded type.** Every message has a 4-bit type. It comes from the
  `SEND` command itself, so no instruction is spent storing it.
* **Fast reply and forward.** A `SEND` in *reply* mode takes the two address
  words of the outgoing message from the return address in the current input
  message. A `SEND` in *forward* mode takes the two data words from it.
* **Hardware dispatch.** `MSGIP` always holds the address of the handler for
  the current situation. Dispatch is a single jump to it.
* **Boundary conditions in the handler address.** Queue-threshold and
  exception conditions are folded into `MSGIP` too, so software never polls
  for them.

The chip sits on the data-cache bus of an off-the-shelf RISC processor,
where a cache chip would be, and is reached with loads and stores into a
64 KiB window. On the other side are one outgoing and one incoming network
link. Each direction has a 16-message queue.

## Messages

A message is five 32-bit words `m0..m4` plus a 4-bit type. The upper 8 bits
of `m0` are the routing address of the destination node. In `nic_pkg` the
type is `msg_t`: `mtype` plus `w[0..4]`.

## One access: register number and commands in the address

An access whose upper 16 address bits equal `BASE` goes to the NIC. The low
bits are a command, not an offset:

| address bits | meaning |
|---|---|
| 5:2   | interface register (0-4 `o0..o4`, 5-9 `i0..i4`, 10 `CONTROL`, 11 `STATUS`, 12 `CODEBASE`, 13 `MSGIP`) |
| 10:6  | type of the message to send (only 9:6 are used; the type is 4 bits) |
| 11    | `NEXT` |
| 13:12 | 00 no send, 01 `SEND`, 10 `SEND` reply, 11 `SEND` forward |

Example: with the window's upper bits in `r1`, a load from `r1 + 0b10100111011000`
does three things: it returns `i1`, sends a reply of type 7 and loads the next
message.

The part that needs care is the **order of effects inside one access**. This
design fixes it so that the common handler idioms work in a single access:

1. A load returns the register as it was before the access.
2. A store updates its register.
3. `SEND` builds its message from the output registers *including* that
   store. For a reply or forward it also uses the *current* input registers.
4. `NEXT` then replaces `i0..i4` with the oldest queued message. If the
   input queue is empty, it marks the input registers empty.

So "store value to `o2`, `SEND` reply type 0, `NEXT`" answers the current
message with the value just stored, then moves on. That is the last access
of the remote-read handler below.

Send modes, as built (`nic_msg_compose`):

| mode    | m0 | m1 | m2 | m3 | m4 |
|---------|----|----|----|----|----|
| plain   | o0 | o1 | o2 | o3 | o4 |
| reply   | i1 | i2 | o2 | o3 | o4 |
| forward | o0 | o1 | o2 | i3 | i4 |

## MSGIP: dispatch in one jump

`MSGIP` is computed combinationally from the current state (`nic_msgip`).
There are two cases.

**Usual case:**

```
 31          14   13      12      11   8   7   0
 CODEBASE[31:14]  iafull  oafull  hid      0000_0000
```

`hid` is the handler ID:

* 15 if an exceptional condition is pending;
* otherwise 14 if the input registers hold no message;
* otherwise the message type.

`iafull` is 1 when the input queue holds more messages than its threshold.
`oafull` is the same for the output queue. Each handler therefore exists in
four versions, 256 bytes apart, one for each combination of the two bits. A
handler can then decide for itself whether a filling queue matters to it.

**Escape case:** the message is valid and of type 0, nothing is pending, and
neither queue is over its threshold. Then `MSGIP` is word `m1` of the
message, which is the handler address the message carries itself. Replies
use this: the requester names its own continuation.

Handler IDs 14 and 15 coincide with message types 14 and 15, so software
should use types 0-13 only.

A remote read takes **three NIC accesses**:

1. Load `MSGIP` and jump to it.
2. Load `i0`, the requested address, and read memory there.
3. Store the value to `o2` with `SEND` reply type 0 and `NEXT`.

The reply goes to the requester's frame and continuation, taken from `i1`
and `i2`. The end-to-end test checks this count for every request.

## Flow control and exceptions

* A full **input queue** holds off the incoming link (`rx_ready` low), so a
  slow receiver backs up into the network.
* A **`SEND` to a full output queue** does one of two things, chosen by
  `CONTROL[16]`:
  * **Stall** (`CONTROL[16]` = 1): the access is not acknowledged
    (`pb_ack` low) until there is room. Stalling is efficient but can
    deadlock a machine whose processors all stall on a clogged network.
  * **Exception** (`CONTROL[16]` = 0, the reset value): the access is
    refused as a whole, so no register is written, nothing is sent and
    `NEXT` does not happen. It is answered with `pb_fault`. `STATUS[12]` is
    set and `irq` goes high.
* A **framing error at the input port** sets `STATUS[13]`.
* While either flag is set, `MSGIP` points at handler 15. The handler reads
  `STATUS` and clears the flags by writing 1 to them.

`CONTROL`:

| bits | field | reset value |
|---|---|---|
| 4:0   | input-queue threshold | 16 (never exceeded) |
| 12:8  | output-queue threshold | 16 (never exceeded) |
| 16    | 1 = stall on a full output queue, 0 = exception | 0 |

`STATUS`:

| bits | field |
|---|---|
| 0     | input registers valid |
| 1     | iafull |
| 2     | oafull |
| 3     | any exception |
| 11:8  | current message type |
| 12    | send overflow (write 1 to clear) |
| 13    | input framing error (write 1 to clear) |
| 20:16 | input queue count |
| 28:24 | output queue count |

`i0..i4` and `MSGIP` are read-only; writes to them are ignored.

## Network links

Both links are 32 bits wide, with `valid`, `ready` and `last`. A message is
six flits:

1. `m0` first, so a router sees the routing address at once;
2. `m1..m4`;
3. a last flit carrying the type in bits 3:0.

The output port takes the next message in the same cycle as the last flit of
the current one. A busy link therefore carries a message every 6 cycles.

The input port drops a message whose `last` comes early, or whose sixth flit
lacks it. After a missing `last` it discards flits up to the next `last`. In
both cases it reports a one-cycle error.

## Processor bus timing

A request (`pb_req`, `pb_we`, `pb_addr`, `pb_wdata`) is accepted in the cycle
`pb_ack` is high. `pb_ack` is combinational, and low only while a `SEND`
stalls or for addresses outside the window. `pb_rdata` and `pb_fault` follow
one cycle later with `pb_rvalid`. Reset is asynchronous and active low.

## Modules

| file | role |
|---|---|
| `nic_pkg`          | message type, register numbers, command fields, `CONTROL`/`STATUS` bit positions |
| `nic_top`          | the chip: interface, two queues, two link ports |
| `nic_proc_if`      | interface registers, access execution, stall/exception, flags |
| `nic_cmd_decode`   | window hit and address-bit command fields |
| `nic_msg_compose`  | outgoing message for plain/reply/forward `SEND` |
| `nic_msgip`        | `MSGIP` and the two threshold bits |
| `nic_msg_fifo`     | 16-message queue (circular buffer, first-word fall-through) |
| `nic_net_out`      | message-to-flit serialiser |
| `nic_net_in`       | flit-to-message reassembly and framing check |

Parameters of `nic_top`:

* `DEPTH` (16): messages per queue. The count fields are 5 bits, so keep
  it at 31 or below.
* `BASE` (16'hFFFE): the window's upper address bits.

After synthesis the chip is about 620 flip-flop bits plus two
16 × 164-bit queue memories.

## Simulating

Every testbench is self-checking and prints a
`TB_RESULT checks=N failures=M` line. For example, the end-to-end test at the
default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Wno-WIDTHEXPAND -y rtl rtl/nic_pkg.sv tb/tb_nic_top.sv --top tb_nic_top
obj_dir/Vtb_nic_top
```

`-y rtl` lets verilator find each module in the file of the same name. The
width warnings come from the testbenches' helper tasks, which take register
numbers as `int`.

For a block test, replace the testbench and the top name:
`tb_nic_msg_fifo`, `tb_nic_cmd_decode`, `tb_nic_msgip`, `tb_nic_msg_compose`,
`tb_nic_net_out`, `tb_nic_net_in` or `tb_nic_proc_if`.

`tb_nic_top` loops the outgoing link back to the incoming one through a
buffering network model and acts as the processor:

* it sends 40 remote-read requests and serves them with the handlers above;
* it checks every reply value and every forwarded word;
* it drives each of these mechanisms at least once and counts it:
  * output-queue overflow, in exception mode and in stall mode;
  * input backpressure into the network;
  * both queue thresholds;
  * the type-0 escape dispatch;
  * the no-message handler;
  * an injected framing error.

`tb_nic_tam` runs the fine-grain message set of a dataflow-style
run-time through the chip at its default sizes:

* Send with 0, 1 and 2 data words;
* I-fetch of full and of empty array elements;
* I-store, forwarded to three deferred readers per element;
* I-allocate;
* F-allocate, which replies to the parent and starts the child;
* F-free.

Each handler uses the interface as a compiler would:

* replies use `SEND` reply;
* deferred readers are served with `SEND` forward;
* continuations dispatch directly through `MSGIP`.

The test checks that dispatch is always one access, that an I-fetch of a
full element costs two more, and that each deferred reader costs two. The
message layouts in that test are its own.

## What is this design's own

The interface's behaviour follows the architecture it implements:

* register set and message format;
* address-bit command encoding;
* send modes;
* `MSGIP` layout and cases;
* threshold bits;
* the stall-or-exception choice for a full output queue;
* 16-message queues.

These details are this design's own choices:

* **Bit layouts.** The bit positions of `CONTROL` and `STATUS`, except the
  type at `STATUS[11:8]`. Register numbers 10-13 for `CONTROL`, `STATUS`,
  `CODEBASE` and `MSGIP`.
* **Flag and reset behaviour.** Write-1-to-clear exception flags. The reset
  values.
* **Access semantics.** "Threshold exceeded" means count > threshold. A
  refused access has no effect at all. The order of effects within one
  access.
* **Bus and links.** The processor bus handshake is a generic
  request/acknowledge bus; the real cache-bus protocol of the processor is
  not modelled. The link format and framing-error rule are also this design's.
* **Type field.** The type is 4 bits; address bit 10 is ignored.
* **Forward mode.** It replaces `m3,m4` with `i3,i4`. An alternative reading
  of the architecture replaces `m2,m3` with `i2,i3`. Changing it is one
  `case` arm in `nic_msg_compose`.

## Not included

* The processor, its cache chips, main memory and the network router. This
  is the interface chip only.
* Variants with the interface registers inside the processor's register
  file or in an on-chip cache. Those need a modified processor.
* Process protection. The interface assumes a single application, or a
  network drained between time slices.
