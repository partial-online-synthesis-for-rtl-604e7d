# A run-time configured link fabric between fine-grained accelerators

A processor with an embedded FPGA can load fine-grained reconfigurable
accelerators (FGRAs) into a row of *containers*. A complex special
instruction (SI), say a 2-D DCT or an SATD, needs several FGRAs working
together, and which FGRAs sit in which container is only decided while the
program runs: reconfiguring an FGRA takes most of a millisecond, so the
run-time system keeps whatever it can and places new FGRAs wherever a
container is free. The data paths between the FGRAs therefore cannot be fixed
at compile time.

This RTL is the coarse-grained part that solves that: a *coarse-grained
reconfigurable infrastructure* (CGRI) of one *connector* per container, joined
by a few *links* that run past all connectors. Its configuration is tiny
compared with an FPGA bitstream and is replaced every clock cycle. Run-time
software (placement and binding, not part of this RTL) decides where every
operation of the SI runs, in which connector memory word each result is kept
and over which link each transfer goes. It writes one configuration word per
cycle of the SI into an on-chip configuration memory. When the processor
issues the SI, a sequencer plays these words back one per clock.

The defaults follow the prototype the design comes from: 10 containers, 4
links, 8 words of local memory per connector, and a configuration budget of
1024 bits per cycle. This layout needs 350 bits.

```
         processor pipeline (not included)
   si_start/si_base/si_opnd      si_busy/si_done/si_result      cfg_* writes
            |                              ^                          |
            v                              |                          v
      +--------------+   word per cycle  +------------+         +------------+
      | si_sequencer |<------------------| config_mem |<--------| write port |
      +--------------+                   +------------+         +------------+
            | cfg_active (350 bits)
            v
      +---------------------------------------------------------------+
      | cgri   conn0 -- conn1 -- conn2 -- ...              -- conn9    |
      |          ||       ||       ||    link_array: l0..l3   ||       |
      +----------||-------||-------||-------------------------||-------+
              fgra_*    fgra_*   fgra_*                    fgra_*
              C0        C1       C2          ...            C9   (containers, external)
```

## What one cycle of configuration does

The configuration word is `{conn_cfg_t conn[N_CONT-1:0], glob_cfg_t g}`. The
global field is in the low bits and connector *p* sits above it at index *p*.
All types are in `rtl/cgri_pkg.sv`.

Per connector (34 bits):

| field | meaning |
|---|---|
| `lnk[s].rd_addr` | local memory word presented on read port *s* |
| `lnk[s].drive` | put that word on link *s* |
| `lnk[s].cut` | split link *s* at this connector's left boundary |
| `in_sel[i].src`, `.link` | FGRA operand *i*: `IN_LEFT`/`IN_RIGHT` = link `link` as seen from that side, `IN_LOCAL` = own read port `link` (transfer of distance 0), `IN_NONE` = 0 |
| `start` | the FGRA in this container takes its operands this cycle |
| `wr_src`, `wr_addr` | at the clock edge, write the FGRA result (`WR_FGRA`) or SI operand 0/1 (`WR_OPND0/1`) into local word `wr_addr` |

Global field (10 bits): `last` marks the SI's final word. `res_en`,
`res_conn` and `res_addr` capture one local memory word as the SI result.

Everything inside a cycle is combinational: memory read, link, operand
multiplexer, FGRA (if it is a one-cycle FGRA) and write data. Only the memory
write happens at the clock edge. So a one-cycle FGRA can finish a whole
*control step* in one clock, and the next control step reads the result from
memory. An FGRA that takes several cycles is started in one word and its
result is written by a later word. The run-time software knows the latency
of every FGRA type.

### Links and segments

A transfer from container *a* to container *b* occupies link *s* only between
*a* and *b*. With `cut` bits, one link carries several transfers in the same
cycle if their intervals do not overlap. `link_array` builds each link as two
unidirectional chains, one to the right and one to the left, instead of a
tristate bus. There is no combinational loop. At each connector the chains
deliver the word of the nearest driver on each side within the segment. Two
flags report configurations the software should never produce:

* `cfg_conflict`: two connectors drive the same segment of a link. The later
  driver wins in the direction it sends.
* `cfg_route_err`: an operand selects a link side with no driver, or a link
  number that does not exist (possible with 6 links). The operand reads 0.

### Long transfers

How far a signal gets along the links in one clock depends on technology and
frequency. Call that reach *D* containers. A transfer over distance *d* then
needs ceil(d/D) cycles. In this RTL the link chain is combinational across
all containers. A long transfer is made by keeping the same route in
ceil(d/D) consecutive configuration words and asserting `start` only in the
last one. *D* is a property of the schedule and of timing closure, not a
parameter of the RTL. The same holds when two transfers need the same link
segment in one control step: the software splits the control step into
extra cycles.

## SI handshake and timing

* Write the SI variant's *K* words anywhere in `config_mem` through `cfg_we`,
  `cfg_wentry` and `cfg_wword`/`cfg_wdata`. Each word is written 32 bits at a
  time; piece *k* holds bits 32k+31..32k.
* Pulse `si_start` for one cycle with `si_base` (the first word) and the two
  operands `si_opnd`. Only do this while `si_busy` is low. An assertion in
  `si_sequencer` checks it.
* If `si_start` is high in cycle 0, word *i* is applied in cycle 1+*i*.
  `si_busy` is high in cycles 1..K. In cycle K+1, `si_done` pulses and
  `si_result` holds the word captured by the last `res_en`. A new SI may start
  in that same cycle.
* The operands must stay valid while words that write `WR_OPND0/1` are
  applied. Normally these are the first words.
* While the fabric is idle, the applied configuration is all zeros: no writes
  and no driven links.

Container ports: `fgra_start[p]`, `fgra_opnd[p][0..1]` (combinational, valid
in the `start` cycle) and `fgra_result[p]`. A one-cycle FGRA returns its result
in the same cycle. A longer one returns it in a later cycle, which the
configuration writes.

## Files

| file | contents |
|---|---|
| `rtl/cgri_pkg.sv` | constants (32-bit words, 4 links, 8 memory words, 2 operands per FGRA), configuration types |
| `rtl/connector_mem.sv` | 8-word register file, 1 write port, 5 asynchronous read ports (4 links + result path), cleared on reset |
| `rtl/connector.sv` | one connector |
| `rtl/link_array.sv` | segmented links, conflict detection |
| `rtl/cgri.sv` | connectors plus links, result multiplexer |
| `rtl/config_mem.sv` | `DEPTH` x `W` configuration memory, 32-bit write pieces, registered read |
| `rtl/si_sequencer.sv` | invocation, per-cycle playback, result capture |
| `rtl/mgra_fabric.sv` | top: `config_mem` + `si_sequencer` + `cgri` |
| `tb/fgra_model.sv` | behavioural FGRA stand-in with a type input (used by the testbenches only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus workload tests |

Top parameters: `N_CONT` (containers, default 10, at most 32) and `CFG_DEPTH`
(configuration entries, default 256). The number of links, the memory size,
the data width and the FGRA operand count are constants in `cgri_pkg`. Change
them there; the configuration word grows with them (per connector
N_LINKS*(2+log2 MEM_WORDS) + 2*(2+log2 N_LINKS) + 3 + log2 MEM_WORDS bits,
plus 10 global bits). An elaboration-time warning reports a word over 1024
bits. 6 and 8 links have been simulated by editing the constant: with 8
links a 10-container word is 570 bits, a 20-container word 1130 bits.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog.

* `tb_connector_mem`, `tb_link_array`, `tb_connector`, `tb_cgri`,
  `tb_config_mem`, `tb_si_sequencer`: randomized checks of each module against
  reference models written independently in the testbench. Examples: link
  values are computed by finding each segment's drivers, and the sequencer's
  latency is checked to be K+1.
* `tb_mgra_fabric` runs the top at its default size. It places FGRA stand-ins
  and builds the configuration of a five-operation SI by hand. The SI is
  two operations of type T0 feeding two of type T1, which feed one of type T2.
  It runs the SI with one FGRA per type (a long transfer held for two
  cycles). It then reconfigures the containers so that two T0 FGRAs work in
  parallel, and runs the SI again, together with a program in which one link
  carries three transfers at once. Last comes a faulty program that must
  raise both error flags. Every result is checked against a reference
  computation, and every latency against K+1. The test counts, and requires,
  each of these at least once: local operands, transfers in both directions,
  several transfers on one link, a held route, pipeline stall cycles,
  back-to-back SIs, container reconfiguration, and both flags.

* `tb_binding_workload` runs the same SI on a 20-container fabric
  (`N_CONT=20`). It contains a small binder, the kind of software that would
  run on the host: First Fit binding (first container of the right type,
  scanning left to right) and Communication-Aware binding (the candidate whose
  input transfers allow the earliest start). Results go to the first free
  memory word and transfers to the first free link. The binder is run on 100
  random fabric configurations, for reaches D = 2, 6 and 10, with 2 or 4 links
  available, for both variants and with both binders: 2400 SIs in all.
  Transfers longer than D keep their route for ceil(d/D) cycles. An operation
  that finds no free link is moved to a later cycle. Each configuration
  produced is executed on the RTL and its result and latency are checked.
  The test requires that both kinds of delay occur and that no error flag
  rises. It also prints the total latency of each binder; Communication-Aware
  binding is shorter.

  A second phase of the same testbench exercises placement. It starts from
  100 random fabrics where most containers are empty or hold a replaceable
  FGRA of another SI. The FGRAs the two-T0 variant still lacks are loaded one
  at a time, each placed by one of two algorithms. Cluster Placement picks the
  candidate that gives the smallest span between the leftmost and rightmost
  container the variant uses. Connectivity Placement picks the candidate with
  the smallest sum of distance times the number of graph transfers to each
  configured FGRA. Each placed fabric is then bound (Communication-Aware,
  D = 2) and executed on the RTL. Connectivity Placement gives the shorter
  total latency: about 5% in the run with the default seed.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cgri_pkg.sv rtl/*.sv \
    tb/fgra_model.sv tb/tb_mgra_fabric.sv --top-module tb_mgra_fabric
./obj_dir/Vtb_mgra_fabric
```

## Where this RTL departs from, or adds to, what the architecture specifies

Given by the architecture: connectors with one per container, shared links
(four), 8-word local result memories, results stored in the memory of the
producing container's connector, link intervals that may share a link when
they do not overlap, a per-cycle configuration read from on-chip memory when
an SI is invoked, the 1024-bit per-cycle budget, and 10 containers.

Choices of this implementation, not specified by the architecture:

* 32-bit data, two operands and one result per FGRA, and all field
  encodings.
* Two-chain link structure, cut bits and the error flags.
* Number of memory read ports, combinational reads, and clearing on reset.
* SI operands enter by being written into a connector memory. The SI result
  leaves through a dedicated read port.
* The `last`-bit end marker, the start/busy/done handshake, and the memory
  depth and write-port format.
* Asynchronous active-low reset. The configuration memory is not reset.

Not included:

* The processor and its caches.
* The FGRAs and the partial-reconfiguration path that loads them.
* Any path from FGRAs to main memory. The host connects to the fabric at the
  memory stage as well, but no interface for that path is defined.
* The placement and binding algorithms, which are run-time software.
  `tb_binding_workload` contains simplified versions for testing only. They
  use fixed schedules for a single SI and never free memory words.
* Link counts of 6 and 8, which would require editing `cgri_pkg`.
