# An IO-coherent AMBA 5 CHI request node for a RISC-V vector unit

A decoupled vector processing unit (VPU) is fast only if its loads and stores
reach memory quickly. If every access goes through a scalar core's memory port
and then through the network-on-chip, each access pays for two levels of
handshaking. This RTL takes the VPU's load/store unit (LSU) straight onto the
on-chip network instead. It is a **Request Node of the IO-coherent kind
(RN-I)** for an AMBA 5 CHI interconnect, so it talks directly to the L2 home
nodes.

The RN-I has no cache of its own, so it is never snooped. It turns each VPU
request into one CHI transaction. It tracks nothing more than what is needed to
send the answer back to the VPU under the VPU's own tag. The whole design is
about 700 lines of SystemVerilog. It synthesises to roughly 1,200 flip-flop bits
plus about 12 kbit of small memories (two response FIFOs and two per-tag tables).

## The two sides

### VPU side: four valid/ack channels

Every channel uses the same handshake. The sender raises `valid` with a
payload, and a transfer happens in each cycle where `valid` and `ack` are both
high. The sender must hold the payload until then. `ack` may depend
combinationally on `valid`.

| channel | direction | payload (`rni_pkg`) |
|---|---|---|
| REQ   | VPU -> RN-I | `tag[7:0]`, `opcode[1:0]` (Load=0, Write=1, WritePtl=2), `addr[55:0]`, `excl`, `attr` (0 Device, 1 Cacheable) |
| RDAT  | RN-I -> VPU | `tag`, `error`, `data[511:0]` (load response) |
| RSP   | RN-I -> VPU | `tag`, `error` (store response: "send the data now") |
| WDATA | VPU -> RN-I | `tag`, `kill`, `be[63:0]`, `data[511:0]` |

Each transfer moves one 64-byte line. The tag names the transaction from
request to response. The VPU must not reuse a tag while that tag's transaction
is still open. A request may not be both exclusive and cacheable; an assertion
in `rni_req` checks this. The VPU may set `kill` only on the data of a WritePtl. The
RN-I does not keep the opcode per tag, so it does not check this rule.

### CHI side: four channels with L-credits

The node uses four of the CHI channels:

- **TXREQ** sends the request flit.
- **RXRSP** receives DBIDResp, CompDBIDResp and Comp.
- **RXDAT** receives CompData.
- **TXDAT** sends NonCopyBackWrData or WriteDataCancel.

Each channel is a `FLITPEND`/`FLITV`/`FLIT` bundle plus a `LCRDV` wire flowing
the other way. A sender may place a flit only while it holds a link-layer credit
(L-credit). The receiver grants a credit by pulsing `LCRDV`, and one receiver
grants at most 15 credits.

Some CHI parts are left out:

- There is no snoop channel, since there is no cache to snoop.
- There is no TXRSP channel. No request asks for CompAck, and there is nothing
  else to send on it.
- Link activation (`LINKACTIVE*`) is not implemented. The links are assumed to
  be up.

Flit fields use CHI issue C widths with a 7-bit node ID and a 52-bit physical
address. The VPU's 56-bit address is truncated to its low 52 bits.

## How a transaction flows

```
        VPU LSU                          RN-I                         CHI interconnect
 REQ   ──valid/ack──▶ rni_req  ───────────────────────────── TXREQ ──▶  ReadNoSnp / ReadOnce
                         │ Excl ─▶ transaction table (per tag)         WriteNoSnp* / WriteUnique*
 RDAT  ◀─valid/ack── rni_rdat ◀─ table port b ─────────────── RXDAT ◀── CompData
 RSP   ◀─valid/ack── rni_rsp  ◀─ table port a ─────────────── RXRSP ◀── DBIDResp / CompDBIDResp / Comp
                         │ {SrcID, DBID} ─▶ write-data table (per tag)
 WDATA ──valid/ack──▶ rni_wdat ──────────────────────────── TXDAT ──▶  NonCopyBackWrData / WriteDataCancel
```

**Load.**
1. The VPU sends a Load.
2. `rni_req` sends ReadNoSnp (Device) or ReadOnce (Cacheable) with TxnID = tag.
3. The home node answers with CompData carrying TxnID = tag.
4. `rni_rdat` returns the line and an error bit to the VPU under that tag.

**Store.**
1. The VPU sends a Write or WritePtl.
2. `rni_req` sends a full or partial WriteNoSnp (Device) or WriteUnique
   (Cacheable).
3. The home node answers in one of two ways:
   - a single **CompDBIDResp**;
   - a **DBIDResp** plus a separate **Comp**, in either order.
4. `rni_rsp` acts only on the response that carries the DBID. It hands that
   response to the VPU as a store response. In the same cycle it writes the
   response's `SrcID` and `DBID` into the write-data table at the tag. A Comp
   (and any other opcode) is dropped on arrival; only its credit is returned.
5. The VPU then sends its data on WDATA with the same tag.
6. `rni_wdat` looks up the tag and sends NonCopyBackWrData with `TgtID = SrcID`
   and `TxnID = DBID`. If the VPU set `kill`, it sends **WriteDataCancel** with
   all byte enables cleared instead.

The store response is the VPU's permission to send data. It is not a
completion: the RN-I never reports Comp to the VPU.

### Opcode and memory-attribute mapping

| VPU opcode | attr | CHI request | MemAttr |
|---|---|---|---|
| Load     | 0 Device    | ReadNoSnp (0x04)        | 0b0010 |
| Load     | 1 Cacheable | ReadOnce (0x03)         | 0b0100 |
| Write    | 0 | WriteNoSnpFull (0x1D)  | 0b0010 |
| Write    | 1 | WriteUniqueFull (0x19) | 0b0100 |
| WritePtl | 0 | WriteNoSnpPtl (0x1C)   | 0b0010 |
| WritePtl | 1 | WriteUniquePtl (0x18)  | 0b0100 |

The other request fields are constant:

- Size is 64 bytes.
- Order, ExpCompAck and AllowRetry are 0.
- QoS, LPID, NS, SnpAttr, LikelyShared, ReturnNID, ReturnTxnID, PCrdType,
  Endian and TraceTag are all 0.

`TgtID` comes from an external system address map. The top exports the request
address as `sam_target_addr_o` and takes the node ID back on `sam_tgt_id_i` in
the same cycle. `SrcID` is the `src_id_i` port.

### Errors and exclusives

`rni_vpu_error` turns the CHI `RespErr` field into the VPU's single error bit:

- For a normal access, anything other than OK is an error.
- For an exclusive access, anything other than EXOK is an error. An OK answer
  to an exclusive means the exclusive failed.

The Excl bit is saved per tag when the request leaves. The response path reads
it back, because CHI responses do not carry it.

Stores need a special case. When the home node splits its answer into DBIDResp
+ Comp, the exclusive result travels on the Comp, which this design drops.
Only a CompDBIDResp is therefore read with the exclusive rule. A separate
DBIDResp is an error only for DERR or NDERR.

## Modules

| file | role |
|---|---|
| `rni_pkg.sv`        | widths, opcode enums, VPU payload and CHI flit structs |
| `rni_top.sv`        | connects the four channel modules and the shared transaction table |
| `rni_req.sv`        | VPU REQ -> CHI TXREQ: fixed fields, mapping, credit check, Excl write |
| `rni_vpu_to_chi.sv` | combinational opcode/attr -> CHI opcode/MemAttr (table above) |
| `rni_credit.sv`     | L-credit counter of a transmit channel |
| `rni_rdat.sv`       | CHI RXDAT -> VPU RDAT: two-stage receive pipeline, FIFO, credit return |
| `rni_rsp.sv`        | CHI RXRSP -> VPU RSP: same pipeline, drop/keep control, fills the write-data table |
| `rni_wdat.sv`       | VPU WDATA -> CHI TXDAT: write-data table lookup, flit build, cancel |
| `rni_fwft_fifo.sv`  | first-word fall-through FIFO used by both receive paths |
| `rni_vpu_error.sv`  | RespErr + Excl -> VPU error bit |
| `rni_lut.sv`        | per-tag table, one write port, N synchronous read ports |
| `rni_lcrd_return.sv`| hands out receive credits (initial grant and one per freed entry) |

The transaction table and the write-data table both have 256 entries, one per
8-bit tag. The transaction table is 1 bit wide (Excl) and has two read ports:
port a serves RSP and port b serves RDAT. The write-data table is 15 bits wide
(7-bit target node and 8-bit DBID) and has one read port.

## Flow control in detail

### Transmit credits (TXREQ, TXDAT)

`rni_credit` counts the credits the interconnect has granted and the RN-I has
not yet used:

- A cycle with `LCRDV` and no flit adds one.
- A cycle with a flit and no `LCRDV` removes one.
- A cycle with both, or with neither, leaves the count unchanged.

A flit may be sent only while the count is not zero. The counter is 4 bits
wide (parameter `MAX` = 15) and its reset value is 0. An assertion reports an
underflow.

- **TXREQ:** `rni_req` acknowledges the VPU and raises `TXREQFLITV` in the same
  cycle, combinationally, when `valid` and `have_credit` are both true.
  `TXREQFLITPEND` is tied high.
- **TXDAT:** `rni_wdat` acknowledges the VPU data when it holds a credit, and
  spends the credit in that cycle. The flit leaves on the next cycle, after the
  write-data table has been read. `TXDATFLITPEND` is the acknowledge, so it
  announces each flit exactly one cycle ahead.

### Receive credits (RXRSP, RXDAT)

Each receive path ends in a FIFO of `RX_FIFO_DEPTH` = 15 entries. That is one
entry per credit the RN-I may have out, so a flit the interconnect sends always
has room. The path is built as follows:

1. **Stage 1.** In the cycle a flit arrives, its TxnID (the VPU tag) addresses
   the transaction table, and the fields the path needs are registered.
2. **Stage 2.** One cycle later, those fields and the Excl bit read from the
   table are written into the FIFO.
3. **FIFO head.** The head drives the VPU channel (first-word fall-through). A
   response therefore reaches the VPU two cycles after its flit.

When the VPU acknowledges the head, the entry is popped and one credit is
returned. In RSP, a dropped flit is popped and credited at once.

`rni_lcrd_return` keeps a count of credits owed to the interconnect:

- It starts at 15 after reset.
- It sends one per cycle while the count is not zero.
- If an entry is freed in a cycle when nothing is owed, it passes that credit
  straight through.

The interconnect therefore receives the full 15 credits in the 15 cycles after
reset. Two credits are never needed in one cycle. An assertion in each receive
path checks that the FIFO never overflows.

### Latency summary

| path | cycles |
|---|---|
| VPU REQ handshake -> TXREQ flit | 0 (same cycle) |
| RXDAT flit -> RDAT valid | 2 |
| RXRSP flit -> RSP valid | 2 |
| WDATA handshake -> TXDAT flit | 1 |
| RDAT/RSP handshake -> credit returned | 0 (same cycle), or queued behind owed credits |

Peak throughput is one flit per cycle on every channel, as long as credits are
available.

## Reset and clocking

There is one clock, `clk_i`. The reset `rsn_i` is active low and synchronous. It clears the credit counters, the FIFO pointers, both tables, the
pipeline valid bits and the TXDAT output register. Two kinds of storage are
not reset: the FIFO storage and the stage-1 field registers of the receive
paths. Both are written before anything reads them.

## Where this RTL departs from, or goes beyond, its source description

The design follows a published description of this RN-I. Its block partition,
pipeline depths, FIFO size, table indexing, opcode mapping, drop rule for
responses and cancel mechanism are taken from it. The points below are this
design's own decisions: either the description is silent, or it contradicts
itself.

- **Encodings of the VPU side.** The description lists the VPU opcodes without
  values, so this design uses Load=0, Write=1, WritePtl=2. Value 3 is treated
  like Load.
- **Meaning of `attr`.** This design uses 0 = Device and 1 = Cacheable, which
  matches the opcode/MemAttr mapping table. The interface description lists the
  opposite values, and the mapping table was followed.
- **Location of `kill`.** The kill bit is on the WDATA channel, as the text
  describes the cancellation. One table places it with the store response.
- **Killed writes.** A killed write leaves as WriteDataCancel with no byte
  enables, as the description of the flit builder and its diagram specify. One
  overview passage says instead that killed data goes out under the ordinary
  write-data opcode.
- **Read opcodes.** The read requests are ReadNoSnp and ReadOnce. One diagram
  mentions ReadUnique, which the RN-I never issues.
- **Writes are called Write/WritePtl.** One passage calls them Load and LoadPtl.
- **The error rule** above, including its store-side special case, is this
  design's own. The description only says that RespErr is interpreted according
  to the exclusive flag.
- **Initial receive credits** are not described. The policy above is this
  design's own.
- **Fixed field values**, CHI opcode encodings, field widths, the node-ID width
  and the address truncation come from the CHI specification or are this
  design's own. The description only says that these fields are fixed.
- **Synchronous table reads.** Both tables are read synchronously. This is what
  makes the receive paths two stages deep and the write-data path one cycle
  late.
- **The system address map** is not part of this RTL. It is reached through the
  `sam_*` ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. All of them use
`$urandom` for stimulus and work on a two-state simulator.

| testbench | what it does |
|---|---|
| `tb_rni_vpu_to_chi` | all eight opcode/attr inputs against the table |
| `tb_rni_vpu_error`  | all eight Excl/RespErr combinations |
| `tb_rni_credit`     | random `LCRDV`/flit traffic against a reference count |
| `tb_rni_lut`        | random writes and reads on both ports against a model, incl. read-during-write |
| `tb_rni_fwft_fifo`  | random push/pop against a queue, incl. push-while-full-with-pop |
| `tb_rni_req`        | request mapping and every fixed field, send only with credit, credit starvation |
| `tb_rni_rdat`       | CompData with tags in any order, Excl from the table, back-pressure, credit accounting |
| `tb_rni_rsp`        | Comp/other opcodes dropped, store responses, write-data table writes, credits |
| `tb_rni_wdat`       | flit contents from the table, cancel, one-cycle latency, credit stalls |
| `tb_rni_top`        | end to end, at the default parameters |
| `tb_rni_multi`      | two RN-Is sharing one home node (uses `tb_vpu_pattern`) |

`tb_rni_top` connects the RN-I between two behavioural models:

- **VPU model.** It keeps a reference image of memory and issues Loads, Writes
  and partial Writes, both Device and Cacheable, some of them exclusive. It
  answers store responses with data, and sometimes kills a partial write.
- **Home-node model.** It serves requests out of order after random delays. It
  answers writes with either CompDBIDResp or DBIDResp+Comp, sometimes returns
  errors and failed exclusives, and honours the credits in both directions. It
  spreads addresses over four home-node IDs through its address map.

The test runs in two phases:

1. A store sweep followed by loads of the same lines.
2. 1,500 mixed operations, with receive and credit rates that swing between
   fast and slow. WDATA sometimes holds back its data and then sends a burst,
   one beat per cycle.

The test counts each mechanism and fails if any never happens:

- credit stalls on TXREQ and TXDAT;
- receive credits exhausted;
- back-pressure on RDAT and RSP;
- a dropped Comp;
- both write-response styles;
- WriteDataCancel;
- exclusive pass and fail;
- errors;
- all six opcode mappings.

The test needs about 16,000 cycles and makes about 28,000 checks.

`tb_rni_multi` puts two RN-Is, with node IDs 1 and 2, on one shared home-node
model. Each RN-I is driven by its own `tb_vpu_pattern`. The two patterns use
disjoint address regions and data sets, and each checks that its loads return
its own stores. The home node sends every response to the node named by the
request's SrcID. It hands out DBIDs from one pool and checks that write data
comes back from the node that received the DBID.

For the first half of the operations there is a single home node. For the
second half, the address map spreads lines over sixteen home-node IDs, and the
model answers under whichever ID a request names. The test checks that every
request carries the mapped TgtID and that write data goes to the home node that
handed out its DBID. It fails unless both nodes have requests waiting at the
home node at the same time, and unless credit stalls, exhausted receive
credits, dropped Comps and cancels all happen.

### Running a testbench with Verilator

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_rni_top \
    rtl/rni_pkg.sv $(ls rtl/*.sv | grep -v rni_pkg) tb/tb_rni_top.sv -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own `--top-module` and file.
`tb_rni_multi` also needs `tb/tb_vpu_pattern.sv`.
Put `rtl/rni_pkg.sv` first so that the package is compiled before its users.
Assertions are active unless `SYNTHESIS` is defined.

## Parameters

| parameter | default | where |
|---|---|---|
| `RX_FIFO_DEPTH` | 15 | `rni_top`: receive FIFO entries = credits granted per receive channel |
| `TX_LCRD_MAX`   | 15 | `rni_top`: largest credit count held per transmit channel |
| `TAG_W`, `DATA_W`, `VPU_ADDR_W` | 8, 512, 56 | `rni_pkg`: VPU interface widths |
| `NODEID_W`, `CHI_ADDR_W` | 7, 52 | `rni_pkg`: CHI widths |

The tables have one entry per tag, so `TAG_W` sets their depth. Changing a
width in `rni_pkg` changes every structure that uses it.
