# FM3TR transmitter fabric around an embedded PowerPC405

This is the FPGA-fabric side of a small software-defined-radio transmitter
built on a Virtex-II Pro style device, where a hard PowerPC405 core sits
inside the reconfigurable logic. Bits arrive in a FIFO. Software on the
processor modulates them (minimum shift keying, MSK). The modulated I/Q
symbols go into a second FIFO. A digital up-converter (DUC) drains that FIFO
and writes pass-band samples into a third FIFO for the output.

```
 source --> FIFO 0 --> [ PowerPC405: MSK in software ] --> FIFO 1 --> DUC --> FIFO 2 --> sink
```

The design exists to compare the ways the processor can talk to the fabric.
The processor has three kinds of traffic:

* **instructions**,
* **program data** (stack and heap),
* **application data** (the modulated symbols going to FIFO 1).

Each kind can travel over one of the processor's interfaces:

| interface | what it is | property that matters |
|---|---|---|
| ISOCM / DSOCM | dedicated on-chip-memory ports to block RAM | fixed latency, no arbitration, small address range |
| PLB | 64-bit shared Processor Local Bus, arbitrated | flexible, but the instruction-side and data-side masters compete for it |
| OPB | 32-bit On-chip Peripheral Bus, reached only through a PLB-to-OPB bridge | slowest; still loads the PLB |

The RTL here contains every fabric part those configurations need. The
processor, its caches and the DUC core are not part of it.

## What is in `rtl/`

| file | block |
|---|---|
| `sdr_pkg.sv` | shared types (OCM and PLB request/response structs), bus widths, address map, `app_path_e` |
| `sdr_fabric_top.sv` | the whole fabric; parameter `APP_PATH` selects the FIFO 1 path |
| `sync_fifo.sv` | block-RAM FIFO, used for FIFO 0, 1 and 2 |
| `ocm_bram.sv` | ISOCM instruction block RAM with fixed latency |
| `dsocm_ctrl.sv` | DSOCM decoder: data block RAM, FIFO 0 read register, FIFO 1 write register, status |
| `bus_arbiter.sv` | round-robin arbiter (PLB ARB and OPB ARB) |
| `shared_bus.sv` | CoreConnect-style shared bus: arbiter, master mux, address decode, responses |
| `bus_bram_slave.sv` | block RAM on the PLB (instructions or program data) |
| `bus_fifo_slave.sv` | FIFO 1 write port on the PLB or OPB |
| `plb2opb_bridge.sv` | PLB slave that replays transfers on the OPB, 64 to 32 bits |

## The three data paths into FIFO 1

`APP_PATH` picks the hardware path for the modulated data. These are the
three implementation classes.

* **`APP_OCM` (class 1, default).** The processor writes each symbol to
  DSOCM offset `0x8004`, and `dsocm_ctrl` pushes it into FIFO 1. An OCM
  access cannot be stalled, so the software must know there is room. It
  reads the status register at `0x8008` (`{FIFO1 count, FIFO0 count}`),
  keeps a count of free words, and reads the status again only when that
  count reaches zero. A write into a full FIFO is dropped and pulses
  `fifo1_overflow`.
* **`APP_PLB` (class 2).** The processor's data-side PLB master writes to
  `0x8000_0000`. `bus_fifo_slave` pushes the word. If FIFO 1 is full, the
  slave holds back its acknowledge, so the processor stalls and no data is
  lost (`fifo1_stall`).
* **`APP_OPB` (class 3).** The processor writes to `0xC000_0000`. The PLB
  decodes the address to the bridge, which runs the transfer on the OPB
  (`opb_xfer`) to a second `bus_fifo_slave`. The PLB transfer is not
  acknowledged until the OPB transfer has completed.

Instruction and program-data placement is not a parameter. ISOCM block RAM,
DSOCM block RAM and PLB block RAM are always present, and the software
chooses by address:

* instructions at the ISOCM (`0xFFFF_C000`) or in PLB RAM (`0x0000_0000`);
* program data in DSOCM RAM (`0x4000_0000`–`0x4000_7FFF`) or in PLB RAM.

All of the document's implementations therefore map onto one of three
builds. The FIFO 1 windows of the buses not selected by `APP_PATH` are left
out of the address decode, so a stray access to one gets a bus error.

## Bus protocol (this design's simplification of CoreConnect)

The document gives only the structure of the PLB. It is 64 bits wide. Each
master has its own address, write-data and read-data connection, while the
slaves share decoupled buses. A master must win the arbiter before it
transfers. The signal-level protocol used here is this design's own, and is
much simpler than real CoreConnect.

* A master raises `req` together with `rnw`, `addr`, `be` and `wdata`, and
  holds them until it sees `ack`. Read data is valid with `ack`. `err`
  comes with `ack` when no slave claims the address.
* The arbiter is round-robin. It grants an idle bus one cycle after a
  request and holds the grant until the slave acknowledges. There is then
  one idle cycle before the next grant.
* A slave sees `s_sel` for as long as it owns the transfer. It answers with
  a one-cycle `s_ack`.
* Transfers are single-beat only. There are no bursts, no address
  pipelining and no split read/write phases.

Timing of one transfer:

* PLB block RAM: request → grant 1 cycle → acknowledge 1 cycle later → bus
  free 1 cycle after that.
* OPB path: adds the OPB's own arbitration and acknowledge for each 32-bit
  lane, plus one bridge cycle.

`contention` on the arbiter is high in every cycle in which one master waits
behind another. The top brings out the PLB arbiter's flag as
`plb_contention`. This is the effect that makes instruction fetch over the
PLB expensive.

## On-chip memory ports

Neither OCM port ever stalls. An access issued in one cycle returns its data
exactly `OCM_LATENCY` (default 2) cycles later. This fixed latency is what
the document values the OCM for.

* **ISOCM.** Each fetch returns 64 bits (two instructions) from a 16 KB
  RAM. The RAM is filled through the `iload_*` port, which stands in for
  bitstream initialisation.
* **DSOCM.** The lower 32 KB of the window decodes to a 16 KB word RAM with
  byte enables (the RAM repeats within that range). Registers start at
  offset `0x8000`:
  * `0x8000` — read pops FIFO 0 (returns 0 if FIFO 0 is empty);
  * `0x8004` — write pushes FIFO 1;
  * `0x8008` — read returns the status.

## Top-level ports and timing

`sdr_fabric_top` brings out the parts that are not built here:

* the processor's four ports, `isocm_*`, `dsocm_*`, `iplb_*` and `dplb_*`
  (structs from `sdr_pkg`);
* the DUC's connections to FIFO 1 (`duc_pop`, `duc_din`, `duc_empty`) and
  to FIFO 2 (`duc_push`, `duc_dout`, `duc_full`);
* the source (`src_*`) and sink (`sink_*`) sides;
* the block-RAM load ports (`iload_*`, `pload_*`);
* the monitor signals listed above, plus `fifo0_underflow` and
  `fifo1_level`.

Everything runs on one clock, with an asynchronous active-low reset.

FIFO words are 32 bits, `{I[15:0], Q[15:0]}`. The FIFOs are
first-word-fall-through: `dout` shows the oldest word, and a pushed word
appears there one cycle later.

## Parameters (defaults)

Only the two bus widths come from the document. Every other size is this
design's choice.

| parameter | default | note |
|---|---|---|
| `APP_PATH` | `APP_OCM` | class 1, the best-performing class in the document |
| `FIFO_DEPTH` | 512 | one 512×36 block RAM per FIFO |
| `ISOCM_DEPTH` | 2048 × 64 bit | 16 KB, the size of the processor's instruction cache, which the document says holds the whole program |
| `DSOCM_DEPTH` | 4096 × 32 bit | 16 KB |
| `PLBRAM_DEPTH` | 2048 × 64 bit | 16 KB |
| `OCM_LATENCY` | 2 | |
| PLB / OPB width | 64 / 32 | as in the document |

## How far it follows the source description, and where it departs

**From the description:**

* the FIFO 0 → processor → FIFO 1 → DUC → FIFO 2 chain;
* the three interface classes;
* the bus widths;
* an arbiter on each bus;
* the PLB-to-OPB bridge;
* block RAM on the ISOCM, the DSOCM and the PLB.

**This design's own choices:**

* all sizes, latencies, register offsets and the address map;
* the bus handshake and the round-robin policy;
* stalling a PLB/OPB write on a full FIFO;
* dropping an OCM write into a full FIFO.

**Known departures:**

* **FIFO 1 in class 1.** In the document, FIFO 1 in class 1 is a DSOCM
  block RAM whose second port the DUC reads directly. Here every class uses
  the same `sync_fifo`, and the DSOCM writes into it through a register. The
  effect for software is the same, but the software does not choose the
  addresses inside FIFO 1.
* **Where the samples come from.** The document both feeds FIFO 0 from an
  external source and speaks of samples preloaded into on-chip memory. This
  design uses the FIFO 0 source, read through the DSOCM, in every class.
* **Only one bridge direction.** The OPB-to-PLB direction is not built,
  because nothing on the OPB needs to reach the processor.
* **No caches.** The processor's instruction and data caches are not
  modelled, so cache on/off variants cannot be told apart.
* **Cycle counts.** The testbench cycle counts come from a simple processor
  model. They cannot be compared with measured numbers for the real core.
  Only their ordering is meaningful.

**Not built:**

* the PowerPC405 core;
* the MSK modulator, which is software;
* the DUC, which is a vendor core;
* the external source and sink.

## Testbenches (`tb/`)

Every block has a self-checking testbench, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The unit tests compare
the block against reference models. They cover:

* FIFO order, flags and overflow/underflow pulses;
* exact OCM latency;
* round-robin grants and bounded waiting;
* bus routing and decode errors;
* stalling on a full FIFO;
* how the bridge splits 64-bit transfers.

System-level pieces, used only by the testbenches:

* **`ppc_model.sv`** — a behavioural processor. It runs the modulation
  loop: fetch the loop body while doing the data work for one sample, pop a
  bit from FIFO 0, push and pop the phase on the stack, and store the MSK
  symbol through the selected path. It checks every instruction word and
  every stack read.
* **`duc_model.sv`** — a quarter-sample-rate mixer. It outputs
  `I·cos − Q·sin` with cos/sin taking the values 1, 0, −1, 0.
* **`sdr_system.sv`** — one complete transmitter. It checks every
  pass-band output against a reference computed from the source bits.

End-to-end runs:

* **`tb_sdr_fabric_top`** runs classes 1, 2 and 3 side by side. The DUC is
  slow at first and the source slow later, so every mechanism must occur:
  * PLB contention;
  * a PLB or OPB write stalled on a full FIFO 1;
  * OPB transfers;
  * software polling of a full FIFO 1 and of an empty FIFO 0.
* **`tb_sdr_full`** runs the top with all default parameters on 1500 bits.
  FIFO 1 fills to its full 512 words.
* **`tb_workloads`** runs the seven distinct fabric placements behind the
  document's twelve implementations, with nothing throttling them. It
  checks that the orderings measured in the document hold here: 1.b < 1.a,
  2.a < 2.b, 2.a < 2.c, 3.a < 3.b and 1.b < 2.a < 3.a. Cycles for 128
  samples with the included processor model:

| placement (instr / program data / app data) | implementations | cycles |
|---|---|---|
| ISOCM / DSOCM / OCM | 1.b | 780 |
| ISOCM / PLB / OCM | 1.a, 1.c | 1162 |
| ISOCM / DSOCM / PLB | 2.a | 1032 |
| ISOCM / PLB / PLB | 2.b | 1414 |
| PLB / DSOCM / PLB | 2.c–2.f | 1920 |
| ISOCM / DSOCM / OPB | 3.a | 1414 |
| PLB / DSOCM / OPB | 3.b, 3.c | 2304 |

To simulate with Verilator, run this from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
  rtl/sdr_pkg.sv tb/tb_workloads.sv --top-module tb_workloads -o sim
./obj_dir/sim
```

Use the same command for any other `tb_*` module. The package must be named
first.
