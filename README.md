# ROD message path: PrimitiveLists between a VME host and the MasterDsp

A ROD (readout driver board) is run by a VME host. The host never drives the
board's registers one by one. It sends the board a **PrimitiveList**, a block
of 32-bit words that holds one or more commands (*primitives*). The ROD
executes the whole list on its own, reports progress while it works, and
hands back one reply message with any data that was asked for. This RTL is
the receiving side of that exchange, written as hardware:

- the host port (HPI) through which the host loads lists and fetches replies;
- the RodStatus and VmeCommand registers through which the two sides
  coordinate;
- a list handler that checks a list, runs its primitives in order and wraps
  the reply;
- a primitive executor for the primitives that act on this logic;
- the error, information and diagnostic text buffers, with their read
  handshake;
- a bridge from the register bus to the host ports of four SlaveDsps, and a
  sender that passes a PrimitiveList on to a SlaveDsp through that bridge;
- a service for SlaveDsp hardware interrupts, which fetches a slave's logged
  status data into the error buffer and clears its interrupt.

In the original system the MasterDsp does this work in software. Here the
same procedure runs in a controller, so the whole message path can be
simulated and synthesised without a processor. The handshake bits, their
order, the checks and the attribute codes are those of the protocol. The bit
positions, the PrimitiveID numbers, the sizes and the timing are this
design's own choices, since the protocol leaves them open. They all live in
`rtl/rod_msg_pkg.sv`.

## The PrimitiveList and the reply

```
word 0      ListLength          total words, header and trailer included
word 1      ListIndex           accounting number, shown in listIndex
word 2      NumberOfPrimitives
            primitive: PrimitiveLength, PrimitiveIndex, PrimitiveID, body...
            ... more primitives ...
len-2       ListLength          repeated
len-1       ListChecksum        XOR of the words before it
```

**ListChecksum** is a bitwise XOR. The *checksumWC* setting chooses which
words it covers: 0 turns checking off, 0xFFFFFFFF covers every word before
the checksum, and N covers the first N words. The input and output directions
each have their own setting, loaded by primitives 8 and 9.

The **reply** is built in the output half of the message RAM. Primitives that
return data append a *return primitive* there: length, PrimitiveIndex,
PrimitiveID, then the data. When the list ends, the handler adds a wrapper:

- word 0: reply length;
- word 1: ListIndex;
- word 2: the number of return primitives;
- then the trailer: the length again, and a checksum under the output
  checksumWC.

So the host can read word 0 first and then fetch exactly that many words.

## The handshake

Both sides see the same registers. Only the host writes VmeCommandRegister0.
Only the handler writes the list fields of RodStatusRegister0.

| step | host | ROD |
|---|---|---|
| 1 | write HPIA = 0, stream the list into HPID (autoincrement) | |
| 2 | wait for dspAck = 0, set **inListReady** | |
| 3 | | set **busy**; read header and trailer; check length bounds, header/trailer agreement, checksum |
| 4 | | on failure: word into the error buffer, exception queued, skip to step 7 |
| 5 | | show listIndex, set **executing**, run primitives; after each one show its **primIndex**; check abortListExecution between primitives |
| 6 | | clear executing; if there is reply data, wrap it and set **outListReady** |
| 7 | | set **dspAck** (always at least one cycle after outListReady) |
| 8 | note outListReady from the read that showed dspAck; clear inListReady | |
| 9 | | clear dspAck, outListReady and busy |
| 10 | if outListReady was 1: HPIA = reply base, read the length, then the rest | |

A list that fails its checks still ends with dspAck, so the host never waits
forever. It sees outListReady = 0 and an entry in the error buffer. The
assertions in `list_handler` state the two rules of the handshake: dspAck
only while busy, and outListReady never later than dspAck.

## Errors, exceptions and interrupts

The four message-system errors go into **interruptID**:

- 1 Timeout: a register access not acknowledged within TIMEOUT_CYCLES;
- 2 Bad Checksum;
- 3 Input buffer overflow: ListLength larger than the input buffer;
- 4 Output buffer overflow: a return primitive that would not fit.

Exceptions are queued (EXC_DEPTH deep) so that a second one is not lost
while the host handles the first:

- interruptID always shows the oldest entry.
- interruptIssued rises whenever a new entry reaches the head.
- The host retires the head with a rising edge of **clearException**.
- `vme_irq` is interruptIssued gated by enableInterrupts.
- interruptIssued, rodError and commandIgnored are cleared when the host
  reads RodStatusRegister1.

Every error also leaves a word in the error buffer, `{code[31:24],
detail[23:0]}`. The detail is the ListIndex for list-level errors and the
PrimitiveIndex for primitive errors. The codes are:

| code | meaning |
|---|---|
| 01 | bad checksum |
| 02 | length out of bounds |
| 03 | header and trailer lengths differ |
| 04 | primitive runs past the trailer |
| 05 | unknown PrimitiveID |
| 06 | timeout |
| 07 | output overflow |
| 08 | illegal attribute |

An unknown primitive or an illegal attribute also pulses commandIgnored.

## Register map

RodStatusRegister0 (host address 0):

| bits | field |
|---|---|
| 0 | outListReady |
| 1 | dspAck |
| 2 | busy |
| 3 | executing |
| 7:4 | listIndex |
| 27:8 | primIndex |
| 28 | primListAborted |
| 29 | errBuffNotEmpty |
| 30 | infBuffNotEmpty |
| 31 | diagBuffNotEmpty |

RodStatusRegister1 (host address 1):

| bits | field |
|---|---|
| 7:0 | nestIndex (always 0) |
| 15:8 | interruptID |
| 16 | interruptIssued |
| 17 | interruptsEnabled |
| 18 | rodError |
| 19 | commandIgnored |
| 20 | rodMode (0 COMMAND, 1 RUN) |

RodStatusRegister2 (host address 2) shows the board status input. From bit 9
down to bit 0: rodReset, readoutReset, S-LinkInitialized, rodBusy,
S-LinkXOFF, S-LinkDown, S-LinkOnOff, S-LinkTest, efbStopOutput,
routerStopOutput.

VmeCommandRegister0 (host address 3), bits 0 to 11:

| bit | field |
|---|---|
| 0 | inListReady |
| 1 | abortListExecution |
| 2 | errBuffReadRequest |
| 3 | infoBuffReadRequest |
| 4 | diagBuffReadRequest |
| 5 | resetRod |
| 6 | resetReadout |
| 7 | initializeS-Link |
| 8 | enableS-Link |
| 9 | testS-Link |
| 10 | enableInterrupts |
| 11 | clearException |

VmeCommandRegister1 (host address 4) is a plain register. Bits 5-9 of
VmeCommandRegister0 leave the top on `cmd` for the rest of the board.

From the MasterDsp side, primitives reach the registers at the byte addresses
of the ROD memory map:

| address | register | access |
|---|---|---|
| 0x01000, 0x01004, 0x01008 | RodStatusRegister0-2 | read only |
| 0x01020, 0x01024 | VmeCommandRegister0-1 | read only |
| 0x0100c, 0x01010, 0x01028, 0x0102c, 0x01030 | RESERVED_REG_0-4 | read/write |
| 0x01070 | STATUS_LED (8 bits) | read/write |

## Primitives

| ID | primitive | attributes |
|---|---|---|
| 0x005 | Reset buffer | buffer: -1 all, 1 input, 2 output, 3 config, 4 error, 5 info, 6 diag |
| 0x006 | Set Buffer Read Mode | buffer 4-6; 0 RINGBUFF, 1 LINBUFF |
| 0x007 | Set Buffer Overflow Mode | buffer 4-6; 0 NOOVERWRITE, 1 OVERWRITE |
| 0x008 | Set input checksumWC | 0 off, 0xFFFFFFFF all, N first N |
| 0x009 | Set output checksumWC | as above |
| 0x101 | Set ROD mode | 1 COMMAND, 2 RUN |
| 0x102 | Write or read register | mode (1 read, 2 write), byte address, address increment in bytes, dataStore (0xFFFFFFFF appends to the reply, otherwise a word address in the message RAM), dataLength, then the write data |
| 0x108 | Send primitive list to a SlaveDsp | SlaveDsp number 0-3, then the whole slave PrimitiveList (its first word is its length) |
| 0x10A | Set output downstream checksumWC | checksumWC for lists sent to a SlaveDsp; SlaveDsp number |
| 0x10B | Set input downstream checksumWC | checksumWC for reply lists from a SlaveDsp; SlaveDsp number |
| 0x10C | CheckOutput | 0 or 2; returns 32 walking-one words |
| 0x10D | Echo | data; 0/1 bounce here, 2 bounce through RESERVED_REG_0 |

The numeric IDs are this design's choice. The attribute orders and codes are
the protocol's. A register read or write goes out on the register bus:

- 0x01000-0x010ff: the registers above;
- 0x80000-0xfffff: a SlaveDsp host port;
- any other address: the `ext_*` port, which stands for the formatter, EFB,
  router and BOC registers held in other devices.

Every access waits for an acknowledge. After TIMEOUT_CYCLES without one, the
primitive ends with a Timeout.

## Text buffers

The error, information and diagnostic buffers are rings of TXT_DEPTH words.
A full ring follows its overflow mode:

- NOOVERWRITE drops the new word;
- OVERWRITE drops the oldest word.

Both modes set the overflow flag. The error buffer is filled by the handler.
The other two are filled through `inf_wr` and `diag_wr`.

The host reads a buffer with the handshake of the protocol:

1. The buffer raises *xxxBuffNotEmpty*.
2. The host sets *xxxBuffReadRequest*.
3. The buffer freezes and drops notEmpty.
4. The host reads the descriptor and then the words.
5. The host clears the request.
6. The pointers are updated:
   - RINGBUFF moves readPtr to writePtr;
   - LINBUFF moves both pointers back to the start.

The descriptor (words TXT_DEPTH..TXT_DEPTH+7 of the buffer's window) is
dataStart, dataEnd, readPtr, writePtr, mode, overwrite, overflow, count.
Pointers are host word addresses. writePtr names the *next* free word. That
is what makes the RINGBUFF rule leave the buffer empty.

Words that arrive while a buffer is frozen are dropped and flag overflow, as
there is no second store to hold them.

## Host port and address map

`hpi_hcntrl` selects the HPI register:

- 00: HPIC. Writing bit 1 pulses `dsp_int`. Bit 2 is HINT, which `hint_set`
  sets and a host write of 1 clears.
- 01: HPIA, the word address.
- 10: HPID with autoincrement.
- 11: HPID without autoincrement.

One access is made per cycle. Read data follow one cycle later with
`hpi_rvalid`.

Host word addresses at the default sizes:

| range | contents |
|---|---|
| 0x0000-0x03ff | input message buffer (lists are written here) |
| 0x0400-0x07ff | output message buffer (replies) |
| 0x1000-0x11ff | error buffer window |
| 0x1200-0x13ff | information buffer window |
| 0x1400-0x15ff | diagnostic buffer window |

Each buffer window holds the data words first and the descriptor from word
TXT_DEPTH of the window.

## SlaveDsp bridge

Register accesses at 0x80000-0xfffff go to the host port of a SlaveDsp:

- address bits 18:17 select the DSP (0x80000, 0xa0000, 0xc0000, 0xe0000);
- bits 16:15 drive its HCNTRL[1:0];
- bit 2 drives its HHWIL half-word select.

Data are 16 bits. One access takes a setup cycle and STROBE_CYCLES cycles of
`s_hds_n` low. The read data are sampled in the last strobe cycle. An access
to a slave that is not fitted ends at once with `slave_err`.

## Passing a list on to a SlaveDsp

Primitive 0x108 carries a complete PrimitiveList for one SlaveDsp inside its
body. The MasterDsp talks to the slave the way the host talks to the
MasterDsp, only through the slave's host port. `slave_list_sender` runs the
steps:

1. write HPIC, write HPIA with the slave's input-buffer address, and stream
   the list into HPID with autoincrement (its first word says how many
   words there are);
2. poll the slave's status word until dspAck is 0;
3. set inListReady in the slave's command word;
4. poll the status word until dspAck is 1, and note outListReady;
5. clear inListReady;
6. if outListReady was 1: write HPIC and HPIA again, read the reply length
   from the first word of the slave's output buffer, and fetch the reply.

The primitive does not finish until step 6 is over, so the MasterDsp's own
list waits for the slave. The slave's reply list is copied unchanged, with
its own header, trailer and checksum, as the data of a return primitive
(PrimitiveID 0x108) in the MasterDsp's reply.

Each 32-bit word goes over the 16-bit host port as two accesses: HHWIL 0
with bits 15:0 first, then HHWIL 1 with bits 31:16. HPIC is written as
0x00010001 to select that order. A word therefore costs roughly 16 to 20
cycles.

Each slave has its own downstream checksumWC for the list going down and for
the reply coming up, set by primitives 0x10A and 0x10B (both start at
0xFFFFFFFF, all words). Unless the value is 0, the sender does not pass on
the checksum word the host wrote. It writes in its place the XOR of the
words that its checksumWC covers. It checks the reply's last word the same
way.

Three outcomes raise an exception:

- an access that is not acknowledged, or a poll that does not see dspAck
  within MAX_POLLS reads, ends the primitive with Timeout;
- a reply longer than the space left in the output buffer is not copied and
  raises Output buffer overflow;
- a reply whose checksum does not match is dropped and raises Bad checksum.

A slave number above 3, or a slave list longer than the primitive body, is
reported as an illegal attribute, and the primitive is skipped.

After a Timeout the slave may still see inListReady set. The next transfer
to that slave starts by waiting for its dspAck to be 0.

Where the slave keeps its buffers and these two words is not given by the
protocol. Their addresses are parameters of `slave_list_sender`, with these
defaults:

- input list at word 0x0000;
- output list at word 0x0800;
- command word at 0x1000;
- status word at 0x1001.

The bits use the same positions as in the MasterDsp registers:
outListReady 0, dspAck 1, inListReady 0.

`tb/slave_dsp_model.sv` is a behavioural SlaveDsp used by the testbenches.
It runs the slave side of this exchange and answers with a short reply list.

## SlaveDsp hardware interrupts

A SlaveDsp that takes a hardware interrupt logs status data in its error
buffer and sets HINT in its HPIC. The HINT lines reach the top as
`s_hint_n` (active low). `slave_int_handler` then serves the
lowest-numbered slave that is asking:

1. it writes HPIC, then HPIA with the slave's error-buffer address;
2. it reads the word count N, then N data words (at most MAX_WORDS = 16);
3. it writes HPIC with bit 2 set, which clears HINT.

The order of these steps is the protocol's. The other details are this
design's choices, since the protocol leaves them open:

- the error buffer sits at slave word 0x1800, and its first word is N;
- the words go into the MasterDsp error buffer behind a header word
  `0x09000000 | slave`;
- HINT is HPIC bit 2, and writing a 1 there clears it.

The interrupt service and the list handler share the register bus. An
arbiter in the top holds each master's request in a one-deep slot and
serves the list handler first. A granted access is released when it is
acknowledged, or after TIMEOUT_CYCLES. Interrupt-service words wait one
cycle when the list handler is writing the error buffer at the same time.

## Parameters (rod_msg_top)

| name | default | meaning |
|---|---|---|
| MSG_WORDS | 2048 | message RAM words; half input, half output |
| TXT_DEPTH | 256 | words per text buffer |
| N_SLAVES | 4 | SlaveDsps on the bridge |
| STROBE_CYCLES | 4 | SlaveDsp data-strobe length |
| TIMEOUT_CYCLES | 1024 | register acknowledge timeout |
| EXC_DEPTH | 8 | exception queue entries |

Only N_SLAVES is given by the protocol (four SlaveDsp host ports in the
address map). The other values are this design's own choices.

## Files

| file | contents |
|---|---|
| `rtl/rod_msg_pkg.sv` | types, codes, bit positions |
| `rtl/rod_msg_top.sv` | top: wiring, host-side decode, register-bus arbiter and decode |
| `rtl/list_handler.sv` | handshake, list checks, primitive walk, reply wrapper |
| `rtl/prim_executor.sv` | one primitive at a time |
| `rtl/list_checksum.sv` | XOR engine with checksumWC |
| `rtl/rr_msg_regs.sv` | status/command registers, exception queue, reserved and LED registers |
| `rtl/msg_buffer.sv` | one text buffer |
| `rtl/hpi_port.sv` | host port |
| `rtl/slave_hpi_bridge.sv` | SlaveDsp host-port bridge |
| `rtl/slave_list_sender.sv` | passes a PrimitiveList on to a SlaveDsp |
| `rtl/slave_int_handler.sv` | serves SlaveDsp hardware interrupts |
| `rtl/dp_ram.sv` | dual-port RAM |

Each file begins with a description of its interface and timing.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/rod_msg_pkg.sv tb/tb_rod_msg_top.sv --top-module tb_rod_msg_top
./obj_dir/Vtb_rod_msg_top +verilator+rand+reset+2
```

`tb_rod_msg_top` runs the whole design at its default parameters. It acts as
the host and sends lists that cover:

- replies, ROD mode switches, register access on all three bus targets,
  CheckOutput and Echo;
- bad checksum, input overflow, timeout and output overflow, with two
  exceptions queued at once;
- abort, commandIgnored and checksumWC changes;
- text-buffer reads in both read modes, and overflow in both overflow modes;
- a list passed on to a SlaveDsp, with the slave's reply brought back, and
  the downstream checksumWC (checksum made again, bad reply dropped);
- two SlaveDsp interrupts served while a list uses the register bus, with
  the logged words read back from the error buffer.

It counts each of these mechanisms and fails if any of them never happens.
The block testbenches use smaller sizes to reach the corner cases quickly.

## What is not here

- **Stored and nested lists.** Primitives 1-4 and nestIndex need a storage
  format the protocol does not define. nestIndex reads 0.
- **Detector primitives.** Formatter and module configuration, CAL/L1A
  sequences and reading SlaveDsp data (primitive 9, whose data classes are
  still placeholders in the protocol) are not built.
  They depend on DSP software and front-end data structures. Their
  registers are reached only through `ext_*`.
- **The DSPs, SDRAM and Boot PROM.** On the slave side, only the
  testbench model runs the SlaveDsp end of the list exchange.
- **Memory test** is not built, since there is no SDRAM.
- **RESET_ROD and the S-link commands** are passed out on `cmd` without
  action.
- **Two layout choices that depart from the protocol text.**
  - The reply wrapper header sits at word 0 of the output buffer. One
    passage places the first return primitive at the first location. The
    handshake description has the host read the reply length from the first
    word, and that is followed.
  - writePtr names the next free word, not the last one written.
