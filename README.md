# A hardware IS-IS routing engine

IS-IS (Intermediate System to Intermediate System) is the link-state routing
protocol that many provider networks, VPN backbones among them, use. Each
router (an "IS") finds its neighbours with hello PDUs. It advertises its
links in link state PDUs (LSPs), keeps every LSP of its area in a link
state database (LSDB), and runs Dijkstra's shortest path first (SPF)
algorithm over that database. Routers keep their databases in step with
sequence number PDUs: a complete list (CSNP) or a partial one (PSNP).

This design does all of that in synthesizable logic:

- It parses received PDUs from an octet stream.
- It keeps adjacencies.
- It keeps a level-1 and a level-2 LSDB.
- It computes the shortest path tree of each level.
- It sends its own hellos, LSPs, CSNPs and PSNPs.

The point of doing it in hardware is speed. The SPF engine finishes a
seven-node network in at most 65 clock cycles. A software Dijkstra on an
embedded processor takes tens of thousands of cycles for the same job.

The RTL is SystemVerilog (IEEE 1800-2017). The top module is `isis_system`.

## Structure

```
               +----------------------- control unit ------------------------+
ingressPacket  |  IPP  ---status--->  MP (state machine)  <---->  SPP          |
 ------------> | (parse)               |      ^                  (Dijkstra)   |
               |    |                  |      |                     ^         |  egressPacket
               |    v                  v      |                     |   EPP --+------------>
               +----|------------------|------|---------------------|----^----+
                    v                  v      |                     |    |
               +---------------------- data path ------------------------------+
               | systemInputs | muxDemux | inIIH inDB inLSP-L1 inLSP-L2 inCSNP |
               | inPSNP | egIIH egDB egLSP-L1 egLSP-L2 egCSNP egPSNP            |
               | active/standby LSDB-L1 | active/standby LSDB-L2               |
               +---------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `isis_system` | Top. Instantiates the four processors and the data path. |
| `isis_mp` | Main processor: the protocol state machine, the adjacency table and every decision. |
| `isis_ipp` | Ingress packet processor: parses PDUs into records, writes them into the ingress buffers and tells the MP what arrived. |
| `isis_spp` | Shortest path processor: Dijkstra over the active LSDB of one level. |
| `isis_epp` | Egress packet processor: turns records from the egress buffers back into PDUs. |
| `isis_datapath` | System input registers, 12 buffers, `isis_mux_demux` and two `isis_lsdb_bank`s. |
| `isis_lsdb_bank` | One level's LSDB as an active/standby pair. |
| `isis_fifo` | Record buffer (first-word fall-through, drops and counts on overflow). |
| `isis_sys_inputs` | Configuration registers, loaded during reset. |
| `isis_mux_demux` | Steers record writes to buffers; picks the egress buffer to send next. |
| `isis_pkg` | Sizes, PDU type codes, record structs, buffer and state enums. |

### Records, not packets

The buffers do not hold raw PDUs. The IPP parses every PDU into one of
three fixed-format packed structs:

- `iih_t`: a hello;
- `lsp_t`: an LSP with up to six neighbours;
- `snp_t`: a CSNP or PSNP with up to seven LSP summaries.

The EPP builds PDUs from the same structs. A buffer entry is therefore one
wide word, and the MP never touches octets.

Nodes are named by a 7-octet node ID: the 6-octet system ID followed by the
pseudonode octet. Metrics are 6-bit IS-IS narrow metrics, where 0 means "no
link". Path metrics are 10 bits wide.

## Main processor state machine

`isState` shows the state (0 IDLE, 1 Hello, 2 DB Exchange, 3 LSDB Update,
4 SPF, 5 C/P-SNP Processing). Reset enters IDLE.

| From | To | Event | Condition |
|---|---|---|---|
| IDLE | Hello | — | A hello is waiting in inIIH. |
| Hello | IDLE | adjAvailable | The sender's adjacency is already up. The hello is dropped. |
| Hello | DB Exchange | helloDone | The hello lists our system ID. The adjacency comes up and we answer. |
| Hello | Hello | — | First hello from an unknown system. It creates the adjacency and is answered with a hello naming the sender. |
| DB Exchange | LSDB Update | dbDone | Our own LSP (new sequence number) and every LSP we hold have been queued in egDB, and no LSP has arrived for `DB_QUIET` cycles. |
| LSDB Update | SPF | lspdbDone | Our LSPs and every buffered LSP (inDB, inLSP-L1, inLSP-L2) have been applied. |
| SPF | IDLE | spfDone | SPF has run on each level where we have an LSP. |
| IDLE | C/P-SNP | snpProc | A CSNP, PSNP or LSP is waiting. For the DIS this also fires when the CSNP timer expires. |
| C/P-SNP | LSDB Update | snpDone | The window ends and LSPs are waiting. |
| C/P-SNP | IDLE | snpNone | The window ends and nothing is waiting. |

In C/P-SNP Processing the two roles behave differently:

- **Designated IS** (`dis` = 1). It sends one CSNP per level listing its
  whole LSDB. It answers each PSNP by queueing the requested LSPs.
- **Regular IS.** It compares a received CSNP with its own LSDB. It sends a
  PSNP for every LSP it lacks or holds only an older copy of.

The window lasts `SNP_WINDOW` cycles and restarts on every PSNP or LSP
received.

In IDLE a hello goes out every `HELLO_PERIOD` cycles; the first one is sent
right after reset.

`mpEvents` pulses one bit per event:

| Bits | Events |
|---|---|
| 0–7 | the eight named transitions, in table order: adjAvailable, helloDone, dbDone, lspdbDone, spfDone, snpProc, snpNone, snpDone |
| 8 | CSNP queued |
| 9 | PSNP queued |
| 10 | LSP answered |
| 11 | hello queued |

## LSDB: active and standby copies

Each level has two copies of its database, and only one is active at a
time. The SPP and the MP read only the active copy, so an update never
shows them a half-written database.

The database is an adjacency matrix of 7×7 narrow metrics, plus the LSP
sequence number of each row. A node table maps node IDs to row indices. An
ID gets the next free row the first time it appears, either as an LSP
source or as a neighbour, and keeps that row.

- **Add** (remaining lifetime > 0). An LSP whose sequence number is not
  newer than the stored one is ignored. Otherwise:
  1. The source and neighbour IDs are mapped to rows, one per cycle.
  2. The new row is written into the standby copy.
  3. Every other row is copied across from the active copy, one per cycle.
  4. The two copies swap roles.

  This takes `cnt + 1 + 1 + 7 + 1` cycles, where `cnt` is the number of
  neighbours.
- **Delete** (a purge, lifetime 0). The row is zeroed in the active copy
  and cleared in the standby copy. The other rows are copied across,
  skipping the zeroed row, and the copies swap. This takes 9 cycles.

`lsdbSwaps` counts swaps per level.

## Shortest path processor

Dijkstra with a sequential selection and a parallel relaxation. Each
iteration has two phases:

1. **SELECT.** Scan the seven nodes, one per cycle, for the unvisited node
   `u` with the smallest finite distance.
2. **RELAX.** Read row `u` of the active LSDB and relax all seven links in
   the same cycle.

The first hop of a node is the node itself when `u` is the source;
otherwise it is inherited from `u`. A run takes at most N·(N+2)+2 = 65
cycles, and `spfCycles` reports the length of the last run.

Results are kept per level. To read them, drive `rtLevel` and `rtNodeId`
(combinational). The answers are:

- `rtHit`: the node is known;
- `rtReach`: the node is reachable;
- `rtDist`: the path metric;
- `rtNextHop`: the first hop's node ID.

## Interface and timing

- **Clock and reset.** One clock, `clock`. `reset` is synchronous and
  active high.
- **Configuration.** These inputs are sampled while `reset` is high:
  - `afiValue` (8 bits);
  - `areaAddress` (16 bits);
  - `systemID` (48 bits);
  - `nsel` with `nselSet`. `nsel` is used only when `nselSet` is high, otherwise the selector is 0.
  - `psnID` (8 bits, the pseudonode octet the DIS uses in its LAN ID);
  - `dis` (act as designated IS).

  `net` shows the resulting network entity title.
- **PDU streams.** Both directions carry one octet per cycle. `*Valid`
  qualifies the octet, `*Sop` marks the first octet and `*Eop` the last.
  Ingress accepts back-to-back PDUs. Egress leaves at least one idle cycle
  between PDUs and has no back-pressure.
- **PDU formats** follow the IS-IS standard (ISO/IEC 10589) octet offsets.
  - **Received:** LAN hellos (types 15/16), LSPs (18/20), CSNPs (24/25) and
    PSNPs (26/27). The IPP understands TLVs 1 (area addresses), 2 (IS
    reachability), 6 (IS neighbours) and 9 (LSP entries) and skips the rest.
    A level-1 hello from another area is dropped.
  - **Sent lengths:**
    - hellos: 33 or 41 octets;
    - LSPs: 30 + 11·n octets;
    - CSNPs: 35 + 16·n octets;
    - PSNPs: 19 + 16·n octets.
  - **Checksums** are neither checked nor generated; they are sent as 0.
- **Status outputs.**
  - `rxDropped` counts rejected PDUs.
  - `bufDrops` counts records lost to a full buffer.

### Parameters of `isis_system`

| Parameter | Default | Meaning |
|---|---|---|
| `HELLO_PERIOD` | 4096 | cycles between hellos in IDLE |
| `CSNP_PERIOD` | 8192 | cycles between CSNPs of the DIS |
| `DB_QUIET` | 256 | quiet cycles that end database exchange |
| `SNP_WINDOW` | 512 | length of the C/P-SNP window |
| `BUF_DEPTH` | 4 | records per buffer |

Network size (`N_NODES` = 7) and record sizes are in `isis_pkg`. Seven nodes
is the largest network the engine was designed for. Raising it grows the
matrix, the record widths and the SPP as N².

## What follows the original design and what does not

**Taken from the published architecture this engine is based on:**

- the I/O list;
- the split into main, ingress, shortest-path and egress processors around
  a data path;
- the six buffer classes in each direction;
- the active/standby LSDB pair per level, with its add and delete
  sequences;
- the six protocol states and the events between them;
- the 7-node network size and a hardware SPF time of roughly 160–200 cycles.
  This engine needs at most 65.

**This design's own choices:**

- The IDLE → Hello transition. The architecture implies it but does not
  draw it.
- Timer values, buffer depths, field widths and the octet framing.
- Parsed records in the buffers.
- The matrix LSDB layout.
- The SPF micro-architecture. The original reuses an SPF data path that is
  not described.
- The route query port and the status counters.
- The fixed egress priority: IIH, DB, LSP-L1, LSP-L2, CSNP, PSNP.
- The simplified database exchange. Each side sends its own LSP and
  everything it holds, then waits for quiet.

**Not implemented:**

- LSP re-flooding beyond database exchange and PSNP answers.
- LSP ageing and refresh.
- Adjacency hold timers.
- Checksums.
- Pseudonode LSPs from the DIS.
- A two-way connectivity check in SPF.
- Authentication.
- Point-to-point hellos.
- Level configuration. Both levels are always kept, and SPF runs on a level
  once this IS has an LSP there.
- Freeing node table entries. Rows of purged nodes stay allocated, with all
  metrics zero, so at most seven distinct node IDs per level can be held
  over a run. When the table is full, an LSP from a new node is dropped,
  and a new neighbour in an LSP is left out.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Reference PDUs are
built by functions in `tb/isis_tb_pkg.sv`, written independently of the RTL.

| Testbench | What it checks |
|---|---|
| `tb_isis_fifo` | Random push/pop against a queue model, plus overflow drops. |
| `tb_isis_sys_inputs` | Load during reset, nsel default, NET assembly. |
| `tb_isis_mux_demux` | One-hot steering and egress priority for all buffer patterns. |
| `tb_isis_lsdb_bank` | Random adds, stale adds and purges against a matrix model. Checks that a reader sees the old row until the swap, one swap per applied update, and the exact latencies. |
| `tb_isis_spp` | 200 random 7-node graphs against a software Dijkstra: distances, reachability, first hops. Checks that each run fits 65 cycles and stays under 200. |
| `tb_isis_ipp` | Every PDU type of both levels, DB-buffer routing during exchange, neighbour lists longer than a record holds, TLV skipping, foreign areas, bad discriminators. |
| `tb_isis_epp` | Every sent octet compared with the reference builders, for random records. |
| `tb_isis_mp` | The MP with a real data path and SPP. Records are written straight into the ingress buffers and read from the egress buffers. Runs once as a regular IS and once as DIS. Every event must occur. |
| `tb_isis_datapath` | Configuration registers, buffer routing, egress order, overflow drops, separate L1/L2 LSDB ports. |
| `tb_isis_system` | End-to-end, at default parameters (see below). |
| `tb_isis_seven_nodes` | Seven-node networks through the whole engine at default parameters (see below). |

`tb_isis_system` connects two engines on a simulated LAN:

- Y, a regular IS;
- Z, the designated IS.

The testbench itself plays X, a router behind Z, and advertises a fourth
node W. The run then goes through these steps:

1. Adjacencies come up and the databases are exchanged.
2. Z's CSNP reveals the missing LSPs of X and W. Y asks for them with a
   PSNP, Z answers, and Y computes its routes.
3. X raises its sequence number with a cheaper link, and the change reaches
   Y's routes.
4. X purges its LSP, and W becomes unreachable from Y.

Path metrics are compared with hand-computed values. Every mechanism must
happen at least once, and the run must drop no PDU. The mechanisms counted
are:

- adjacency up;
- adjacency already known;
- database exchange;
- LSDB swap;
- SPF;
- CSNP;
- PSNP;
- PSNP answered;
- the SNP window ending both ways;
- purge.

The run takes about 26 000 cycles.

`tb_isis_seven_nodes` sizes the engine's full network. It plays six routers
around one engine:

- On level 1, three of them are the engine's neighbours.
- On level 2, two of them are.

Each round draws a random topology among the six routers and sends their
LSPs with a new sequence number. Every route the engine computes is then
checked against a reference Dijkstra:

- the path metric must match;
- reachability must match;
- the first hop must start some shortest path, so ties are accepted.

The SPF run must take at most 65 cycles. There are 32 rounds per level, and
the run takes about 110 000 cycles.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    --top-module tb_isis_system rtl/isis_pkg.sv tb/isis_tb_pkg.sv \
    tb/tb_isis_system.sv -Mdir obj_sys
./obj_sys/Vtb_isis_system
```

Replace `tb_isis_system` with any other testbench name. Only
`tb_isis_ipp`, `tb_isis_epp`, `tb_isis_system` and `tb_isis_seven_nodes`
need `tb/isis_tb_pkg.sv`; leave it out for the others. Add `-Wno-fatal` if lint warnings
stop the build.
