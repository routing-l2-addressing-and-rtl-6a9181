# LUP: a single-pass lookup processor for routing, ARP and packet filtering

A software router settles a packet in several separate steps: it looks up the
route, translates the next-hop IP address into a link-layer (MAC) address,
and runs the packet filter. This engine does all three in one lookup. The
host merges the routing table, the ARP table and the filter rule list into one
structure and loads it into two kinds of memory:

* a **ternary first-match CAM**. Each row matches a destination prefix plus
  values (or don't-cares) for a few further header fields. The lowest
  matching row wins, so the CAM behaves like a large `case` statement.
* **comparison instructions in SRAM**. Each CAM row points to the root of a
  small decision diagram (an FDD, filtering decision diagram). The diagram
  settles whatever the CAM row could not settle, for example a port range.

The result of one lookup is FORWARD (with the next-hop MAC and output
interface), DROP, or HOST. HOST means the accelerator cannot handle the
packet and passes it to the host operating system.

The RTL is SystemVerilog (IEEE 1800-2017), is synthesizable, and contains no
vendor primitives.

## Lookup flow

```
 in_hdr ──► key {daddr, saddr, iif, proto} ──► tcam ──► row index
                                                            │
                                                  result memory[row]
                                          {sw, mac, oif, root address}
                                                            │
                              sw=1 ──► HOST                 │ sw=0
                                                            ▼
                                 fdd_engine: walk nodes from root
                                  TEST field∈[lo,hi] ? nxt_hi : nxt_lo
                                  TERM ──► FORWARD / DROP / HOST
```

`lup` is the top level. It handles one header at a time and steps through
five states: IDLE → CAM → RES → FDD → OUT.

| step | what happens |
|---|---|
| accept (edge 0) | header latched, CAM searched with `make_key(in_hdr)` |
| edge 1 | CAM result registered; on a miss the answer is HOST |
| edge 2 | the row's result word is read; if `sw` is set the answer is HOST, otherwise the engine starts at `root` |
| edges 3 … N+2 | one FDD node per clock; N is the number of nodes on the path, terminal included |
| edge N+3 | answer registered, `out_valid` rises |

In numbers, `out_valid` rises 1 clock after acceptance on a CAM miss, 2 clocks
after for an SW row, and N+3 clocks after for a filtered row. It stays high
until `out_ready` takes the result, and `in_ready` rises on the next clock.
The sequence is not pipelined, so throughput is one header per
(latency + 1) clocks. The CAM and the engine are each able to start a new
operation every clock. A pipelined controller could overlap lookups without
changing either of them.

## Making the tables (the host's job)

None of the three memories means anything without the host's compilation.
This step decides whether the hardware gives the same answer as the software
classifier it replaces.

1. **Routing + ARP.** Each route carries its outcome directly: either the
   next-hop MAC and interface, or SW. The table must contain a default route
   (prefix length 0), so every lookup hits.
2. **Distributing the filter.** For each route prefix, keep only the filter
   rules whose destination space overlaps that prefix. Add a more specific
   prefix where a rule needs one, copying the outcome of its longest
   covering route. The result is one decision diagram per prefix, with
   common sub-diagrams shared.
3. **CAM rows.** Write prefixes in non-increasing length. For each prefix,
   walk the CAM columns in order (source address, input interface,
   protocol). When the prefix's diagram tests a variable of that column's
   class, emit two row sets:
   * first, the rows where the variable holds, with the test written into
     the column and the diagram restricted to "true";
   * then the rows where it does not, with the column left as don't-care and
     the diagram restricted to "false". This set may split again on another
     variable of the same class.

   Row order encodes the "else". A range in a CAM column (for example source
   addresses 10.0.0.0–10.0.0.5) is split into a block of prefix rows
   (10.0.0.0/30 and 10.0.0.4/31) that all point to the same diagram.
4. **Instructions.** Write every node that is still reachable as one
   instruction. Each row's `root` gives the node where its walk begins. The
   program must be acyclic, as a decision diagram is. The engine has no step
   limit.

Each CAM row's expansion may be stopped early; the rest of the test is then
left to the instructions. Whatever cannot be placed at all can be given an SW
outcome. The answers stay correct either way, so CAM space can go to the
most frequent traffic.

`tb/tb_lup.sv` holds a complete hand-compiled example: four routes, one of
them SW, and eight filter rules turned into thirteen CAM rows and six shared
instructions. Its header comment lists the tables.

## Data formats (`rtl/lup_pkg.sv`)

| type | fields (MSB first) | bits |
|---|---|---|
| `hdr_t` | daddr 32, saddr 32, iif 4, proto 8, sport 16, dport 16 | 108 |
| `key_t` (CAM key) | daddr 32, saddr 32, iif 4, proto 8 | 76 |
| `cam_res_t` | sw 1, mac 48, oif 4, root 10 | 63 |
| `instr_t` | op 1, field 3, lo 32, hi 32, nxt_hi 10, nxt_lo 10, act 2 | 90 |

* `op`: `OP_TEST` (0) or `OP_TERM` (1).
* `field`: `F_DADDR`, `F_SADDR`, `F_IIF`, `F_PROTO`, `F_SPORT` or `F_DPORT`
  (0–5). The selected field is zero-extended to 32 bits, and the test is
  `lo <= field <= hi`. A prefix test is written as a range, and an exact
  test as `lo == hi`.
* `act`: `ACT_DROP` (0), `ACT_FORWARD` (1) or `ACT_HOST` (2).
* CAM care mask: 1 means the bit is compared, 0 means don't care. A row is
  used only if its valid flag is set. Reset clears every valid flag.

## Modules

| file | role | parameters (default) |
|---|---|---|
| `rtl/lup_pkg.sv` | shared types, widths, `make_key` | — |
| `rtl/lup.sv` | top: control, handshakes, wiring | `CAM_ROWS` (512), `IMEM_DEPTH` (1024) |
| `rtl/tcam.sv` | ternary CAM; parallel compare, lowest-index priority encoder, 1-cycle registered result | `ROWS` (512), `W` (76) |
| `rtl/sram_1r1w.sv` | synchronous RAM, read-before-write; used for the row results and the instructions | `DEPTH`, `WIDTH` |
| `rtl/cmp_unit.sv` | field select and range compare (combinational) | — |
| `rtl/fdd_engine.sv` | instruction SRAM plus the decision-diagram walker | `IMEM_DEPTH` (1024) |

Loading uses three write ports on `lup`: CAM row, row result and
instruction. Each writes one word per clock. They can be used at any time,
but tables should only change while no lookup is in flight. The memories are
not reset, so every word that can be read must be written first.

Assertions (skipped under `SYNTHESIS`) check four things:

* a header that is offered stays stable until it is accepted;
* the CAM answers one cycle after a search;
* the engine is started only when idle;
* every instruction address that is fetched lies inside the SRAM.

## What is given and what is chosen here

The following parts come from the architecture being implemented:

* a CAM plus comparison instructions doing one lookup;
* first-match row order;
* the outcome attached to each CAM row: next-hop MAC, interface and a jump
  to the FDD root;
* the SW symbol that sends a packet to the host;
* the CAM columns: destination prefix, source address, source interface,
  protocol;
* range tests expanded into prefix rows;
* instructions that may test any header field.

The following are this design's own choices:

* **Widths.** IPv4 addresses (32 bits), 4-bit interface numbers, 48-bit
  MACs, 16-bit ports.
* **Sizes.** 512 CAM rows and 1024 instructions. No sizes were given.
* **Instruction encoding.** A single range test covers prefix, exact and
  range variables. There are three terminal actions; HOST exists so a
  diagram can also give up to the host.
* **Control.** The sequential one-lookup-at-a-time controller and the
  valid/ready handshakes.
* **Misses.** A CAM miss returns HOST. With a default row loaded, a miss
  cannot occur.
* **Structure.** The simplest possible CAM: parallel match lines and a
  priority encoder. A real product would use a CAM macro or an external
  CAM chip behind the same interface.

The host-side compiler and the host operating system are outside the RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sram_1r1w` | random writes and reads against a shadow copy; read latency, hold while `re=0`, read-before-write |
| `tb_cmp_unit` | every field against random ranges, prefixes, exact values and edge cases |
| `tb_tcam` | random ternary rows with overlapping matches; first match against a reference scan; invalidation; back-to-back searches |
| `tb_fdd_engine` | random acyclic programs; action, path length and done timing (N+1 clocks) against a reference walk; header latching |
| `tb_lup` | end to end at default sizes (see below) |

`tb_lup` runs 4,000 random headers. The expected answer comes from the route
list and rule list directly (longest prefix, then first matching rule), not
from the compiled tables. The test also checks:

* the latency of every lookup;
* the next-hop MAC and interface of each forwarded packet;
* that each mechanism occurs at least once: CAM miss, SW row, a terminal at
  the root, walks of two and of three nodes, a range-block row, keys
  matching several rows, input stalls, output back-pressure, forward and
  drop.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lup_pkg.sv tb/tb_lup.sv \
          --top-module tb_lup -Mdir obj_tb_lup -o sim
./obj_tb_lup/sim +verilator+rand+reset+2
```

For another testbench, replace `tb_lup` with its name. Lint the design with
`verilator --lint-only -Wall -Irtl rtl/lup_pkg.sv rtl/lup.sv --top-module lup`.

## Limitations

* One lookup at a time; there is no pipelining across lookups.
* The engine has no protection against a cyclic program.
* Table updates are not atomic with respect to lookups in flight.
* The CAM is built from flip-flops (512 × 76 value bits and as many mask
  bits). That is fine for simulation and FPGA prototypes, but large as
  standard-cell logic.
