# VCI-to-PCI 2.1 bus wrapper

This design lets a component that speaks the Virtual Component Interface
(VCI) act as an initiator on a PCI 2.1 bus. The component issues VCI request
cells (read, write, locked read) on a point-to-point request/acknowledge
channel. The wrapper queues each cell and performs it as a single-data-phase
PCI memory transaction. It then queues the outcome and hands it back as a VCI
response, strictly in request order.

The main idea is to keep **everything stored inside the wrapper in VCI
form**. One fifo holds each field of a request, and one fifo holds each field
of a response. All the PCI-specific work sits between the fifos and the PCI
pins: arbitration, phase timing, command encoding, active-low byte enables,
parity, retries and aborts. The two VCI machines stay trivial, and the
complexity sits in one place, the PCI sequencer.

```
            VCI side                     fifos (512 x field)                PCI side
  CMDVAL/CMDACK ─┐                ┌─ ADDRESS ─┐                    ┌─ REQ#/GNT#
  ADDRESS, BE,   ├─ vci_request ──┼─ BE       ├─┬─ ad_mrg ──────── AD (out)
  CMD, WDATA,EOP ┘                ├─ CMD      │ ├─ cmd_cvrt ────── C/BE#[3:0]
                                  ├─ WDATA    │ ├─ parity_gen ──── PAR
                                  └─ EOP ─────┘ └─ pci_machine ─── FRAME#, IRDY#,
  RSPVAL/RSPACK ─┐                ┌─ RERR ────┐       (ul)         TRDY#, STOP#,
  RDATA, REOP,   ├─ vci_response ─┼─ RDATA    ├──────────┘         DEVSEL#, AD (in)
  RERROR        ─┘                └─ REOP ────┘
```

The top module is `xlator`. Its PCI sequencer instance is `ul`, and that
instance's state register is `curr_state`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 32 | width of the VCI address, VCI data and the PCI AD bus |
| `PTR_W`   | 9  | fifo head/tail pointer width; each fifo has `2**PTR_W` = 512 slots |

512 slots is enough to hold a whole VCI packet: PLEN is 9 bits, so at most
511 bytes, which is 128 cells. The wrapper still works one cell at a time.
The byte-enable width is fixed at 4, one bit per byte of a 32-bit word.

All modules take their sizes from these parameters. A much smaller
configuration is also exercised: `DATA_W=2, PTR_W=2`, with 4 slots per fifo.
This is the size at which the wrapper's six liveness and safety properties
were originally model-checked, and it is small enough for formal tools.

## The PCI sequencer (`pci_machine`)

This is the part that needs the most care. It is a Moore machine: the PCI
outputs are decoded from the state register alone. It runs every request at
the head of the request fifos through exactly one PCI transaction with one
data phase.

| state | value | asserted outputs | leaves when |
|-------|-------|------------------|-------------|
| RESET      | 6 | nothing | reset is released, to IDLE |
| IDLE       | 0 | nothing | a request waits and there is room for its response, to REQ_ARB |
| REQ_ARB    | 1 | REQ# | GNT# is sampled asserted, to ADDRESS |
| ADDRESS    | 2 | FRAME#, AD = address, C/BE# = command | always after one clock, to READ_DATA or WRITE_DATA by the VCI command |
| READ_DATA  | 3 | IRDY#, C/BE# = byte enables (AD released) | the target answers (below) |
| WRITE_DATA | 4 | IRDY#, C/BE# = byte enables, AD = write data | the target answers (below) |
| READ_DONE  | 5 | nothing (turnaround) | always, to RECOVER |
| RECOVER    | 7 | nothing | always, to REQ_ARB if more work is queued, else to IDLE |

FRAME# is asserted only in the address phase. With a single data phase, the
data phase is always the last one, so FRAME# is already deasserted when IRDY#
is asserted.

In a data state, on each rising clock edge, the machine samples the target's
answer:

* **TRDY# asserted: success.** The request is popped and one response is
  pushed in the same edge. For a read, the response carries the word on AD.
  For a write, RDATA is 0. The next state is READ_DONE for a read and RECOVER
  for a write.
* **STOP# and DEVSEL# asserted, TRDY# not: retry.** Nothing is popped. The
  request stays at the fifo head, and the machine goes straight back to
  REQ_ARB to try again. This is a deliberate busy-wait: a retried transaction
  is not put aside.
* **STOP# asserted, DEVSEL# and TRDY# not: target abort.** The request is
  popped, and a response with RERROR = 1 is pushed. The next state is RECOVER.
* **Anything else: a wait state.** The machine stays.

### Why the RECOVER state exists

The fifos' `empty` and `full` flags are decoded from registered pointers.
After a pop, the flags are correct only from the next clock. A machine that
finishes a transaction and, in the same edge, decides whether to go back to
arbitration uses the *old* `empty`.

When the finished request was the last one queued, that machine starts a
PCI transaction with nothing in the fifos: a garbage transaction. This can
happen after a target abort or after a successful write. It also pushes a
response that no request asked for.

Every finished transaction therefore passes through RECOVER. By then the
flags reflect the pop. Reads already have their turnaround state, READ_DONE,
and also go through RECOVER. As a result, REQ# for the next queued request
is asserted again one clock after a write or abort completes, and two clocks
after a read completes.

A new transaction is started only when the response fifos have room. Once
TRDY# is asserted, a PCI transfer cannot be held off, so the response must
have a slot waiting.

Two assertions in the module guard these rules: an address phase needs a
queued request, and a push needs a free response slot.

## The VCI side

* `vci_request` raises CMDACK only while CMDVAL is high, the wrapper is out
  of reset and the request fifos have room. On a clock edge where CMDVAL and
  CMDACK are both high, it writes ADDRESS, BE, CMD, WDATA and EOP into the
  five request fifos. CMDACK depends combinationally on CMDVAL.
* `vci_response` raises RSPVAL whenever the response fifos hold an entry. It
  shows RERROR, RDATA and REOP from the fifo heads and pops them on RSPVAL and
  RSPACK. REOP is a copy of the EOP bit of the request being answered.
* CFIXED, CLEN (taken as 8 bits), CONTIG, PLEN and WRAP are accepted on the
  ports but not stored, because the wrapper works cell by cell.
* VCI command 10 (write) becomes PCI memory write (0111). Read (01), locked
  read (11) and no-operation (00) all become PCI memory read (0110). A locked
  read is not locked on PCI, because there is no LOCK# pin.

## PCI signalling details

* The bidirectional PCI lines are split into three parts: a driven value, an
  output enable and, for AD, an input. They are `ad_o`/`ad_oe`/`ad_i`,
  `cbe_l`/`cbe_oe` and `par`/`par_oe`. The pads that join them are outside
  this design. REQ#, FRAME# and IRDY# are always driven.
* `ad_mrg` puts the address or the write data on AD unchanged. `cmd_cvrt`
  puts the PCI command or the inverted (active-low) byte enables on C/BE#.
  Both are combinational.
* `parity_gen` registers the XOR of AD and C/BE#. PAR therefore gives even
  parity over AD, C/BE# and PAR in the clock after each address phase or
  write data clock. `par_oe` follows `ad_oe` one clock later. For read data,
  the target drives PAR.
* Only target abort is handled as a PCI error. PERR# is ignored, and SERR# is
  held deasserted. IDSEL is held low, because only memory commands are
  issued.
* Not implemented:
  * master abort (no DEVSEL# timeout);
  * the check that the bus is idle before using GNT#;
  * the rule that REQ# is released for two clocks after a retry;
  * burst transfers.

  The wrapper assumes it is the only master on the bus and that some target
  always claims its transactions.

## Timing

All logic is synchronous to `clk`. The reset `reset_l` is active low and
synchronous, and it empties all fifos. Suppose a request is acknowledged on
edge *n*, the bus is idle, and GNT# arrives in the first REQ# clock. Then
REQ# is asserted from edge *n+1*, and FRAME# is asserted in the clock that
starts at edge *n+2*. Each extra clock of grant delay adds one clock. The
data phase lasts one clock plus the target's wait states. A response can
appear on RSPVAL in the clock after the data phase ends.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_wrapper_fifo` | fill to full at 512 entries, refused push, drain, 5000 random cycles against a queue |
| `tb_vci_request`, `tb_vci_response` | handshake gating, field transfer, ordering |
| `tb_cmd_cvrt`, `tb_ad_mrg`, `tb_parity_gen` | exhaustive or random comparison with the PCI encodings |
| `tb_pci_machine` | the sequencer against a modelled arbiter, target and fifos: phase timing, retry, abort, abort and write of the last queued request, response-full stall; 3000 transactions |
| `tb_xlator` | whole wrapper at default size with `pci_target_model` (arbiter plus memory target with random retries, wait states and an abort region 0xE...); responses compared with a reference memory; fills all 512+512 slots; request-to-FRAME# latency |
| `tb_xlator_properties` | the 2-bit / 4-slot configuration against a loose random environment; checks the three liveness properties (bounded) and three safety properties listed below |

The properties checked by `tb_xlator_properties` are:

* every CMDVAL is eventually acknowledged;
* an accepted request is eventually followed by FRAME#;
* an accepted request is eventually followed by RSPVAL;
* no CMDACK without CMDVAL;
* no FRAME# without an outstanding request;
* no RSPVAL without an unanswered request.

The end-to-end tests count each mechanism and fail if one never happens. The
mechanisms are: read, write, locked read, retry, target abort, abort and
write of the last queued request, GNT# wait, target wait state, CMDACK
back-pressure, RSPVAL held, and PCI waiting on full response fifos.

Putting the RECOVER bypass back into the sequencer, so that the next state
after a write or abort is chosen from the stale `empty` flag, makes both the
sequencer test and the property test fail. It shows up as a FRAME# with no
request outstanding.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vci_pci_pkg.sv \
    tb/tb_xlator.sv --top-module tb_xlator -y rtl -y tb -o sim
./obj_dir/sim
```

Replace `tb_xlator` with any other testbench name. Every testbench runs in
well under a second.

## How far to trust it, and where it departs from the original wrapper

* The states, their outputs, and the arbitration, address and data
  transitions follow the wrapper's published state diagram. RECOVER is that
  design's documented correction of the stale-empty flaw.
* These parts are this design's own:
  * the state numbering, except that READ_DATA = 3 and WRITE_DATA = 4;
  * the response-full check;
  * the exact retry and abort decoding;
  * FRAME# being deasserted in READ_DATA;
  * the fifo full/empty scheme.
* After a read there is one extra clock compared with a machine that returns
  from READ_DONE straight to arbitration. The correction prescribes a wait
  state after READ_DONE as well, and that is what is built.
* The wrapper's properties are checked here by simulation in bounded form,
  not proven.
* PCI compliance beyond single-data-phase memory transactions with one
  master is not claimed. The items listed as not implemented under "PCI
  signalling details" would have to be added to use the wrapper on a shared
  bus.

## Files

* `rtl/vci_pci_pkg.sv`: VCI command encoding, PCI commands, sequencer states.
* `rtl/wrapper_fifo.sv`, `rtl/vci_request.sv`, `rtl/vci_response.sv`,
  `rtl/pci_machine.sv`, `rtl/parity_gen.sv`, `rtl/cmd_cvrt.sv`,
  `rtl/ad_mrg.sv`: the blocks.
* `rtl/xlator.sv`: the top, with the eight fifo instances.
* `tb/pci_target_model.sv`: a behavioural PCI arbiter and memory target,
  used only in simulation.
* `tb/tb_*.sv`: the testbenches.
