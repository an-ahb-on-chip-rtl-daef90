# AHB bus tracer with real-time trace compression

A debugger that can only stop a processor sees little of what happens on a
system-on-chip bus: several masters, wait states, retries and splits go by
far faster than any external probe can follow. This design sits on an AMBA
AHB bus as a silent observer and writes a record of the bus activity into a
small on-chip trace memory. Because on-chip memory is scarce, the trace is
compressed as it is recorded, and the amount of detail is adjustable: the
same hardware can log every signal of every cycle, or only the transfers
each master completes.

The design follows the structure of the tracer described in the paper "An
AHB on Chip Bus Tracer with Real Time Compression for SoC Support": event
generation, abstraction, compression and packing, with five trace modes and
three compression mechanisms. The paper gives the structure and the
mechanisms in prose only. Every bit width, encoding, register map and packet
format here is this design's own. The section
[Departures from the paper](#departures-from-the-paper) lists what was
added or interpreted.

## Data path at a glance

```
 AHB bus ──► ahb_xfer_tracker ──► event_trigger ◄── event_regs ◄── AHB writes (HSEL0)
   │         (joins address and       │  trace_en, mode, backward
   │          data phase)             ▼
   └──────────────────────────► abstraction ──► compression ──► packer ──► trace_mem ──► data_read
                                 (one record     (codes vs.      (packets,     (1024 x 32)
                                  per traced      history)        32-bit words,
                                  event)                          buffer mgmt)
                                                     ▲               │
                                                     └─ resync_req ──┘
```

Each stage is registered, so records move at one per cycle:

| Cycle | Stage |
|---|---|
| n | The bus cycle happens. The trigger decides, combinationally, whether cycle n is traced. |
| n+1 | The abstraction record for cycle n is valid. |
| n+2 | The compressed record is valid, and its packet enters the packer's byte accumulator. |
| n+3 and later | Trace words are written to memory, one 32-bit word per cycle. |

The trigger cycle itself is always part of the trace.

## Trace modes

The five modes combine two timing levels with three signal levels. The
signals are sorted into four classes:

| Class | Contents |
|---|---|
| Program address | The address of an instruction fetch. A fetch is a read whose address lies in a programmable code region: `(HADDR & CODE_MASK) == CODE_BASE`. |
| Data address and value | The address and the `HWDATA`/`HRDATA` of every other completed transfer. |
| Access control (ACS) | `{HWRITE, HSIZE, HBURST, HMASTER}`, 11 bits. |
| Protocol control (PCS) | `{HTRANS, HREADY, HRESP, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0}`, 10 bits. |

At the bus-state level the PCS are replaced by a 4-bit bus state. The states
are listed in order of priority:

| State | Condition |
|---|---|
| ERROR, RETRY, SPLIT | HRESP says so. |
| WAIT | HREADY is low. |
| NONSEQ, SEQ, BUSY | HTRANS says so. |
| WAIT_MASTER | HTRANS is IDLE, and the observed master requests the bus without a grant. |
| IDLE | Otherwise. |

The control word of a record is 21 bits: `{ACS, PCS}`, or `{ACS, 6'b0, state}`.

| Mode | Control word recorded | When |
|---|---|---|
| FC full signal, cycle | `{ACS, PCS}` | every traced cycle |
| FT full signal, transaction | `{ACS, PCS}` | when it differs from the last one recorded |
| BC bus state, cycle | `{ACS, state}` | every traced cycle |
| BT bus state, transaction | `{ACS, state}` | when it differs from the last one recorded |
| MT master state, transaction | the ACS of the completed transfer with the current state | at each completed transfer, and when the bus state becomes IDLE or WAIT_MASTER |

In every mode, each completed transfer also gives one of the following:

- an instruction fetch gives a program address;
- any other transfer gives a data address and value.

The first traced cycle, and the first cycle after a mode change, always
records the control word.

The mode can change in the middle of a trace: an event can carry a mode of
its own (see below). The packer marks every mode change in the trace, so that
a decoder knows how to read what follows.

## Event generation

### Registers (`event_regs`)

The tracer is programmed through a write-only AHB slave port. It is selected
by `HSEL0`, has zero wait states, and always answers OKAY. The tracer drives
no response of its own: the bus fabric must return OKAY for this slave.

| Offset | Register |
|---|---|
| `0x000` | CTRL. Bit 0: arm a backward trace. Bit 1: stop. Bit 2: clear. Bits 0 to 2 are one-cycle pulses. Bits 6:4: the mode of a backward trace. |
| `0x004` | CODE_BASE. Reset value 0. |
| `0x008` | CODE_MASK. Reset value `0xF000_0000`. |
| `0x100 + 0x20*i +0x00` / `+0x04` | Event i: address value / address mask. |
| `+0x08` / `+0x0C` | Data value / data mask. |
| `+0x10` | Bits 26:16: ACS mask. Bits 10:0: ACS value. |
| `+0x14` | Bit 31: enable. Bit 30: trigger on protocol violation. Bit 29: backward. Bits 18:16: mode. Bits 15:0: depth. |

A mask bit of 1 makes that bit take part in the compare. An all-zero mask
therefore matches anything. Events are compared with completed transfers,
that is, data phases that end with HREADY high. An event with the violation
bit set ignores the compare and fires on `prot_violation` instead.

### Trigger (`event_trigger`)

```
          forward event             depth cycles
  IDLE ─────────────────► FWD ─────────────────────► DONE ──┐
   ▲  \                    │  backward event               │ arm / clear
   │   \ arm               ▼                               │
   │    └──────────► PRE ─────────► POST ── depth ──► DONE │
   └────────────────── clear (any state) ◄─────────────────┘
```

**Forward trace.** A forward event in IDLE starts a trace in the event's
mode. The trace covers the trigger cycle plus `depth` further cycles. If a
depth of 0 is given, only the trigger cycle is traced. While the trace runs,
another forward event only switches the mode; the depth count keeps going.
This is the dynamic mode change.

**Backward trace.** Writing arm to CTRL starts tracing at once, in the CTRL
mode, into a circular buffer. The first backward event then marks the target
point. After that, `depth` more cycles are traced and the trace stops. The
buffer holds whatever fitted before the target point. A backward event also
ends a running forward trace in the same way.

**Priority.** If several events match in one cycle, the lowest-numbered one
wins.

**Controls.**

- stop freezes the trace in DONE.
- clear returns to IDLE.
- `SYS_RST` restarts the whole trace path and keeps the register contents.

## Compression

The compressors code each value against history: dictionaries and previous
values. The decoder rebuilds the same history from the trace, so both sides
must restart together. See [History restarts](#history-restarts).

### Program addresses: three phases (`addr_comp`)

1. **Branch/target filter** (`bt_filter`). Instruction fetches are mostly
   sequential. A fetch is sequential if its address equals the previous
   fetch address plus `1 << HSIZE`. For each run of sequential fetches, only
   the first address (the *target*) and the last (the *branch*) are kept.
   The pair is sent when a non-sequential fetch arrives or the trace ends.
2. **Dictionary** (`dict_comp`, 16 entries, 64-bit key). Loops repeat the
   same pair, so a pair already in the dictionary is sent as its 4-bit
   index. A new pair is stored, with round-robin replacement.
3. **Slicing** (`addr_slicer`). A pair the dictionary missed is cut into
   bytes. The target is compared with the last address the slicer recorded.
   The branch is compared with its own target. Only the bytes up to the
   highest differing byte are kept, and the decoder takes the missing upper
   bytes from the reference. Example: previous `0x0000_8066`, target
   `0x0000_8020` → one byte, `0x20`.

### Data addresses and values (`data_comp`)

The data address stream and the data value stream each have their own
previous value. The difference `present − previous` is taken modulo 2^32 and
coded as a sign and a magnitude. Leading zero bytes are dropped:

| Code | Meaning | Payload |
|---|---|---|
| ZERO | Same value as before. | 0 bytes |
| POS8 / NEG8 | Magnitude up to 255. | 1 byte |
| POS16 / NEG16 | Magnitude up to 65535. | 2 bytes |
| RAW32 | Magnitude over 65535: the present value itself. | 4 bytes |

### Control word (`ctrl_comp`)

Few combinations of the control signals ever occur, and those that do
repeat. The 21-bit control word therefore goes through a 16-entry dictionary:

- on a hit, the 4-bit index is sent in a 1-byte field;
- on a miss, the 21-bit word is sent raw in 3 bytes.

### History restarts

`compression` restarts all four histories together in two cases:

- on the first record of a trace;
- on the first record after the packer reports a dropped packet (`resync_req`).

Restarting means the dictionaries are empty and the previous values are 0
for that record. The compressed record then carries `sync`, and its packet is
preceded by a mode packet. A decoder restarts its own histories whenever it
sees a sync packet.

## Trace format

The trace is a stream of bytes, stored least significant byte first in each
32-bit word. It consists of variable-length packets, each starting with a
2-byte header:

```
H0  [7:6] control code   0 none, 1 dictionary index, 2 raw
    [5:4] program code   0 none, 1 dictionary index, 2 sliced pair
    [3]   HWRITE of the data transfer
    [2]   sync: decoder histories restart before this packet
    [1]   0 record packet, 1 mode packet
    [0]   always 1
H1  [7:5] data address code   [4:2] data value code   [1:0] 0
          (0 none, 1 zero, 2 +8, 3 -8, 4 +16, 5 -16, 6 raw 32)
```

The payload follows the header, in this order, each field least significant
byte first:

| Field | Encoding |
|---|---|
| control | 1 byte index, or 3 bytes raw (21 bits used) |
| program | 1 byte index; or 1 byte `{0, tn[2:0], 0, bn[2:0]}` followed by `tn` target bytes and `bn` branch bytes |
| data address | 0, 1, 2 or 4 bytes, as its code says |
| data value | 0, 1, 2 or 4 bytes, as its code says |

Besides record packets, the stream contains two other things:

- **Mode packet.** It is the two bytes `0x03, {mode, 5'b0}`. It is written
  before the first packet in a new mode, and before every sync packet.
- **Padding.** A byte `0x00` where a header is expected is padding; skip it.
  Only the end of the trace is padded.

The longest packet is 24 bytes: a 2-byte mode packet, a 2-byte header, and
3 + 9 + 4 + 4 payload bytes.

**Decoding** goes packet by packet, from the first word:

1. Keep the same 16-entry control and program dictionaries as the encoder,
   with the same round-robin pointers.
2. Keep the last sliced address, and the previous data address and previous
   data value.
3. Read each field as described above, and update the history exactly as the
   encoder did.

The testbench package `tb/tb_trace_pkg.sv` contains a complete decoder
(`trace_decoder`) that can serve as a reference.

## Packing and the trace buffer (`packer`, `trace_mem`)

Packets enter a 32-byte accumulator. Each cycle in which it holds at least 4
bytes, one 32-bit word goes to the trace memory. The default memory is a
simple dual-port RAM of 1024 × 32 bits.

**Overflow.** A packet that does not fit into the accumulator is dropped, and
so is every later packet until the compressors have restarted their
histories. `resync_req` triggers that restart. Because every kept packet is
coded against a history the decoder also has, the trace never decodes to
wrong values. It only has gaps. `lost_packets` counts the dropped packets.

**Forward trace.** Writing stops when the memory is full (`trace_full`).

**Backward trace.** Writing wraps around, keeping the newest words
(`trace_wrapped`).

**Sync points.** A wrapped buffer has a problem: its oldest word usually
starts in the middle of a packet, and the history that the following
packets were coded against has been overwritten. A decoder cannot start
there. To fix this, a backward trace gets sync points:

1. The memory is split into 8 equal segments.
2. Each time the write pointer enters a segment, the packer raises
   `resync_req`, so the next record is coded with empty histories.
3. In a backward trace, every sync packet is aligned to a word boundary:
   0x00 padding bytes go in front of it.
4. The word address of the first sync packet in each segment is kept in a
   small table. Entering a segment clears that segment's entry.

When a wrapped trace ends, the read-out starts at the oldest sync point still
in memory. This is the first valid entry after the segment that was being
overwritten. The words before it are given up, which is at most about two
segments, or a quarter of the memory. A trace that has not wrapped starts
at word 0 as usual.

The cost is a history restart every 128 words (at the default depth), plus
up to 3 bytes of alignment padding per sync packet.

**Read-out.** When a trace ends, the last partial word is padded. The read
pointer is then set to the first word to read: word 0, or the oldest sync
point of a wrapped buffer. Once `trace_done` is high, every cycle with
`read` high returns the next word on `data_read` one cycle later.
`trace_words` gives the number of words to read. The words read always
decode from the first one.

`MEM_DEPTH` must be a power of two, and at least 16 words.

## Top level (`ahb_tracer_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_EVENTS` | 4 | Number of event registers. |
| `ADDR_DICT_ENTRIES` | 16 | Entries in the program-pair dictionary. |
| `CTRL_DICT_ENTRIES` | 16 | Entries in the control-word dictionary. |
| `MEM_DEPTH` | 1024 | Trace memory size in 32-bit words. |
| `ACC_BYTES` | 32 | Packer accumulator size in bytes. |

The decoder must use the same dictionary sizes as the hardware.

**Ports.**

- The AHB bus is observed through `HCLK`, `HRESETn`, `HADDR`, `HTRANS`,
  `HWRITE`, `HSIZE`, `HBURST`, `HMASTER`, `HWDATA`, `HRDATA`, `HREADY`,
  `HRESP`, `HBUSREQ`, `HGRANT`, `HLOCK`, `HMASTLOCK` and `HSEL0`. All of
  them are inputs.
- Other inputs:
  - `SYS_RST`: active-high restart of the tracer.
  - `prot_violation`: from an external AHB protocol checker.
  - `read`: request the next trace word.
- Outputs:
  - `data_read`: the trace word.
  - `trace_active`, `trace_done`, `trace_words`, `trace_wrapped`,
    `trace_full` and `lost_packets`.

**Size.** At the defaults, coarse synthesis gives about 2,500 word-level
cells, about 3,150 flip-flop bits and 32 Kbit of RAM.

## Departures from the paper

**Not built.**

- The AHB protocol checker that reports violations. It comes from earlier
  work and is not specified. Its flag is the `prot_violation` input.
- The traced SoC itself: processors, IP cores and the bus.

**Interpreted or added.**

- *Ports.* `HREADY` and `HRESP` are inputs, because an observer cannot drive
  the bus response. The paper's top-level symbol shows them on the output
  side.
- *Status outputs.* All status outputs are additions.
- *Instruction fetches.* The AHB bus does not flag instruction fetches, so a
  fetch is any read inside the programmable code region.
- *Event masks.* The paper's "mark field" for partial matching is read as a
  bit mask on each compared value.
- *Slicing.* The paper records "only the slice that differs". Here every byte
  up to the highest differing one is kept. With only the differing slice,
  the decoder could not rebuild an address whose lower bytes also changed.
- *Leading zeros.* Leading zeros of a data difference are removed in whole
  bytes. The sign of a negative difference is not specified in the paper;
  this design sends sign and magnitude.
- *Formats and restarts.* The trigger state machine, the meaning of depth,
  the packet format, the accumulator, the overflow policy and the history
  restarts are all this design's.

## Limitations

**Bandwidth in cycle modes.** FC and BC produce a record every cycle. With
busy traffic a record costs 3 to 5 bytes, while the memory takes 4 bytes per
cycle. Dense FC/BC traces therefore lose packets and restart their
histories. The test at the default sizes shows this:

| Trace | Traffic | Cycles traced | Packets lost |
|---|---|---|---|
| FC | light | 401 | 0 |
| switching modes | moderate | 601 | 11 |
| FC | random, every cycle | 301 | 229 |

The transaction modes FT, BT and MT record much less per cycle. A larger
accumulator only absorbs bursts. A wider memory word would raise the
sustained rate.

**A wrapped backward buffer loses its oldest part.** A wrapped buffer is read
from its oldest sync point, so up to about a quarter of the memory is not
returned. The paper itself calls real-time compression of a circular
backward trace hard to achieve. The sync points are this design's answer;
the paper does not describe one.

**Lost detail in cycle modes.** Only completed instruction fetches are
recorded, and in run form. Within a sequential run, the cycle of each
individual fetch is not recorded, and fetch data (the instruction words) is
never recorded.

**Events match completed transfers only.** An event cannot fire on an
address phase that a wait state or an error cuts short. Only the violation
input can catch such cases.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. All of them pass.

| Testbench | What it checks |
|---|---|
| `tb_dict_comp`, `tb_ctrl_comp` | Hits, indices and round-robin replacement against a reference dictionary. |
| `tb_addr_slicer`, `tb_bt_filter`, `tb_data_comp` | Codes against reference models over random and corner-case streams. |
| `tb_addr_comp`, `tb_compression` | Compressed records decoded by the reference decoder and compared with the inputs, including history restarts. |
| `tb_trace_mem` | Random reads and writes against a model array. |
| `tb_packer` | Packed records read back from memory and decoded exactly. Also covers overflow with resync and the filling forward buffer. A wrapped circular buffer is read from its oldest sync point and must decode into the newest records without gaps. |
| `tb_event_regs` | Pipelined AHB writes with wait states against a model of the register map. |
| `tb_event_trigger` | A cycle model of the trigger under random events, violations and controls. |
| `tb_abstraction` | A model of the five recording rules. |
| `tb_ahb_xfer_tracker` | Joining of address and data phases under random pipelined traffic. |
| `tb_ahb_tracer_top` | End to end at the default parameters; see below. |

`tb_ahb_tracer_top` uses a bus model that runs fetch loops, data transfers
with wait states, and register writes. It reads the trace out through
`read`/`data_read`, decodes it, and compares it with what happened on the
bus. It runs five scenarios:

1. Forward FC.
2. Dynamic mode switches BT → MT → FT.
3. Overflow under dense traffic.
4. A backward trace that wraps, ended by a protocol violation.
5. A forward trace that fills the memory.

It counts every mechanism, from trigger kinds to each compression code, and
fails if any of them never occurred. In scenario 4 the wrapped buffer is
read from its oldest sync point and decoded. In every scenario the decoded
data and program records must form an ordered subsequence of what the bus
did.

Each testbench was also run against a copy of its module with one
deliberate bug, and failed.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/tracer_pkg.sv tb/tb_trace_pkg.sv tb/tb_packer.sv --top-module tb_packer
./obj_dir/Vtb_packer
```

## Files

| Path | Contents |
|---|---|
| `rtl/tracer_pkg.sv` | Shared types: modes, bus states, record structs, event format, codes. |
| `rtl/ahb_tracer_top.sv` | Top level. |
| `rtl/ahb_xfer_tracker.sv` | Joins the AHB address and data phases. |
| `rtl/event_regs.sv`, `rtl/event_trigger.sv` | Event generation. |
| `rtl/abstraction.sv` | Signal classification and the trace modes. |
| `rtl/compression.sv` | The compression module. |
| `rtl/addr_comp.sv`, `rtl/bt_filter.sv`, `rtl/dict_comp.sv`, `rtl/addr_slicer.sv` | Program address compression. |
| `rtl/data_comp.sv` | Data address and data value compression. |
| `rtl/ctrl_comp.sv` | Control word compression. |
| `rtl/packer.sv`, `rtl/trace_mem.sv` | Packing, the buffer and the trace memory. |
| `tb/` | Testbenches and the reference decoder package. |
