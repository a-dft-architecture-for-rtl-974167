# ANoC-TEST: a test wrapper architecture for networks-on-chip

A router in a network-on-chip is hard to test from outside. Its inputs come from
neighbouring routers, its outputs go to other routers, and in an asynchronous
(GALS) network there is no scan clock that could drive a classical boundary
shift register. A simple way to test the network is to send ordinary packets
through it. That misses many faults, such as arbitration faults, and when a
packet comes back wrong it does not show which router is faulty.

ANoC-TEST puts a **test wrapper** around every router. The wrapper adds no
separate test bus: it carries test vectors and results on the **network links
themselves**, which serve as high-bandwidth test access paths. Each wrapper
can do one of three things:

* stay **transparent** (normal mode), so the router works as if unwrapped;
* **apply test vectors** to its router and **collect the results**, each
  vector entering and each result leaving on any port the test asks for;
* act as a **bypass** that passes test data between two ports without touching
  its router, so that a router in the middle of the mesh can be reached from
  one test port and isolated from all the others.

A chain of small control modules (TCMs), one per wrapper, forms a
**configuration channel** that tells each wrapper what to do. A
**Generator-Analyzer-Controller (GAC)** at one corner of the mesh drives that
channel, sends the test vectors and checks what comes back.

This repository holds synthesizable SystemVerilog for the wrapper, its cells,
the TCM, the GAC and a mesh that joins them. The routers are not included.
The original architecture is built in quasi-delay-insensitive asynchronous
logic. This RTL is a **clocked, cycle-level model** of it (see
[Departures](#departures-from-the-reference-architecture)).

## Files

| file | contents |
|---|---|
| `rtl/anoc_test_pkg.sv` | constants (5 ports, 2 VCs, 34-bit flits), link and instruction types |
| `rtl/sa_buffer.sv` | one Send/Accept stage with per-VC buffering, the `Buff_R0` of a cell |
| `rtl/input_stage.sv` | wrapper cell on an input port |
| `rtl/output_stage.sv` | wrapper cell on an output port |
| `rtl/tcm.sv` | Test Control Module |
| `rtl/anoc_test_wrapper.sv` | wrapper: 5 input cells, 5 output cells, 1 TCM |
| `rtl/gac_unit.sv` | Generator-Analyzer-Controller |
| `rtl/anoc_test_top.sv` | mesh of wrappers + GAC (default 2 x 2) |
| `tb/anoc_node_model.sv` | behavioural router used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a 20-node mesh test |

## The link: Send/Accept with virtual channels

Every link carries `data[33:0]` and, for each of the `k = 2` virtual channels
(VCs), a `send[i]` wire forward and an `accept[i]` wire back. In the RTL the
forward half is the struct `sa_fwd_t {data, send}` and the backward half is a
`vc_t`. The rule is:

> a sender may raise `send[i]` in a cycle only if the receiver raised
> `accept[i]` in the previous cycle.

So `accept[i]` is a promise: "a flit on VC i next cycle will be taken". Only one
VC uses the data bus in a cycle. The VCs are priority levels, and VC 0 wins
when two are ready. A wrapper never alters a flit's data or its VC.

`sa_buffer` is the basic stage. It registers the receiver's accept. It raises its
own accept when, counting the flit that may arrive and the flit that may leave
in this cycle, it still has room. With two flits per VC it passes **one flit per
cycle** with **one cycle of latency**. Assertions in `sa_buffer` check the
accept rule and the one-VC-per-cycle rule on every input.

## The wrapper

```
                 bypass crossbar (input p -> output q)
        +-------------------------------------------------+
net in  |  input cell p --Buff_R0--> node input p          |
 -----> |      |  ^ ring of input cells (p -> p+1 mod 5)   |
        |      v  |                                        |
        |  output cell q <--Buff_R0-- node output q        |  net out
        |      ring of output cells (q -> q+1 mod 5) ----> | ------>
        |  TCM: CTRL<0..4>, configuration channel in/out   |
        +-------------------------------------------------+
```

Ports are numbered 0 local (network interface), 1 north, 2 east, 3 south, 4 west.

**Input cell** (`input_stage`), one per port. Its modes:

| mode | path | name of the operation |
|---|---|---|
| `IN_NORMAL` | network -> node, plain wires | transparent |
| `IN_LOAD`, src `NET` | network -> Buff_R0 -> node | update + load |
| `IN_LOAD`, src `PREV` | previous input cell -> Buff_R0 -> node | shift + load |
| `IN_SHIFT`, src `NET` | network -> Buff_R0 -> next input cell | update + shift |
| `IN_SHIFT`, src `PREV` | previous -> Buff_R0 -> next | shift |
| `IN_BYPASS`, `sel = q` | network -> bypass stage -> output cell q | bypass |

**Output cell** (`output_stage`), one per port:

| mode | path | name of the operation |
|---|---|---|
| `OUT_NORMAL` | node -> network, plain wires | transparent |
| `OUT_EXPORT`, src `NODE` | node -> Buff_R0 -> network | withdraw + export |
| `OUT_EXPORT`, src `PREV` | previous output cell -> Buff_R0 -> network | shift + export |
| `OUT_SHIFT`, src `NODE` | node -> Buff_R0 -> next output cell | withdraw + shift |
| `OUT_SHIFT`, src `PREV` | previous -> Buff_R0 -> next | shift |
| `OUT_BYPASS`, `sel = p` | bypass stage of input cell p -> network | bypass |

The two rings let a vector that enters on port `a` reach node input `b`, and
let a result taken from node output `c` leave on port `d`. An example, used in
the testbenches, is a node test whose vectors and results both use the west
port. West input is in update+load. The node routes west to east. The east
output cell withdraws and shifts, the south output cell shifts, and the west
output cell exports.

Bypasses also reach things other than routers. A west->local bypass and a
local->west bypass send test data through the network interface and the IP
behind a wrapper while the router stays idle. Every path that crosses a link
between two wrappers also tests that link.

A cell in a test mode accepts nothing from the sources it did not select and
sends nothing to the destinations it did not select. In particular, a router
whose input cells are all in bypass receives no flit.

**Latency in test mode.** Each Buff_R0, ring hop and bypass hop is one register
stage, so a path of H stages delivers `n` vectors in `n + H - 1` cycles after
the first one is sent. Normal mode adds no stage.

## The instruction word and the TCM

Each wrapper obeys one 61-bit `instr_t`:

| bits | field |
|---|---|
| 60 | `bypass_flag`: take this TCM out of the configuration chain |
| 12p+11 .. 12p+10 | input cell p: mode (0 normal, 1 load, 2 shift, 3 bypass) |
| 12p+9 | input cell p: source (0 network, 1 previous cell) |
| 12p+8 .. 12p+6 | input cell p: bypass target output port |
| 12p+5 .. 12p+4 | output cell p: mode (0 normal, 1 export, 2 shift, 3 bypass) |
| 12p+3 | output cell p: source (0 node, 1 previous cell) |
| 12p+2 .. 12p+0 | output cell p: bypass source input port |

An all-zero word is "transparent, in chain". Reset leaves every wrapper in this
state.

The `tcm` holds two copies of the word:

* the **configuration register** is a stage of the configuration channel. Each
  word sent on the channel moves one TCM down the chain, and the word the last
  TCM pushes out returns to the GAC. Send and accept cross a TCM within the
  same cycle, so the whole chain shifts once per transfer. After `M`
  transfers into an `M`-TCM chain, the **first** TCM holds the **last** word
  sent.
* the **updated instruction register** copies the configuration register on
  the global `inst_update` strobe. Only this copy drives the cells, so the
  shifting never disturbs a running test.

When the updated word has `bypass_flag` set, a multiplexer wires the channel
input straight to the channel output. That TCM is skipped by later shifts and
keeps its instruction. A typical test therefore runs in two steps. First, a
full-length shift configures every wrapper: the routers that are not under
test are made bypasses or left transparent, and their flags are set. Second,
later sessions shift only the words of the routers under test. Only reset
clears the flags and gives the full chain back.

While `test_enable` is low, a TCM accepts no word and drives the transparent
control to every cell, whatever its registers hold.

## The GAC

`gac_unit` runs a session on each `start` pulse:

1. raises `test_enable`, which stays high until reset;
2. sends `cfg_len` words, `cfg_word[0]` first, on the configuration channel. The
   words returning from the end of the chain are stored in `readback[]`;
3. pulses `inst_update` for one cycle;
4. sends `num_vec` test flits on VC `vec_vc`. Payload n is step n of a 32-bit
   LFSR (x^32 + x^22 + x^2 + x + 1) started from `seed`. Bit 33 marks the first
   flit and bit 32 the last;
5. accepts every returning flit and compares it, data and VC, with the same
   sequence generated again. It counts `rx_count` and `err_count`, measures
   `cycles` from the first flit sent to the last flit received, and pulses
   `done`.

`num_vec = 0` gives a session that only configures (and reads back). The
analyzer assumes the path under test returns the vectors unchanged and in
order, which holds for a router that only moves flits. A router test that
changes flits needs a different comparison.

## The mesh (`anoc_test_top`)

`MESH_X x MESH_Y` wrappers (default 2 x 2). Wrapper `c` sits in row
`y = c / MESH_X`. Even rows run left to right and odd rows right to left, so
the configuration chain `GAC -> 0 -> 1 -> ... -> NW-1 -> GAC` snakes through the
mesh. For 2 x 2: 0 bottom left, 1 bottom right, 2 top right, 3 top left.
North of `(x,y)` faces south of `(x,y+1)`; east of `(x,y)` faces west of
`(x+1,y)`. The GAC's test link is the west port of wrapper 0.

Because the routers are not part of this RTL, the top brings out, per wrapper
and port:

* `node_in_*` / `node_out_*`: the links between wrapper and router;
* `edge_in_*` / `edge_out_*`: the links of ports that face no neighbour and
  are not the GAC port, i.e. the local ports towards the network interfaces and
  the outer ports of the mesh. Entries for ports that face a neighbour are
  ignored (inputs) or driven to zero (outputs).

The host side of the GAC (`start`, `cfg_*`, `num_vec`, `vec_vc`, `seed` and
the results) is brought out as plain ports.

## Departures from the reference architecture

* **Clocked instead of QDI.** The original wrapper is asynchronous: 4-phase
  return-to-zero channels with 1-of-4 encoded data. Here every channel is a
  clocked Send/Accept link and every channel stage is one register stage. The
  flit-level protocol and the operations are the same; the circuit style,
  timing and area are not.
* **Bypass has a register.** The bypass channel is described as "direct". Here
  it passes through one register stage in the input cell. Without it, bypass
  channels chained around a ring of wrappers would form a combinational loop.
  It costs one cycle per bypassed wrapper, not throughput.
* **Own encodings and depths.** The instruction layout, the cell-ring order, the
  port numbering, the Buff_R0 depth (2 flits per VC) and the VC priority order
  (VC 0 highest) are this design's choices.
* **GAC vectors.** The reference test generator reads vectors and
  configurations from files. Here an on-chip GAC uses an LFSR and checks the
  results against the same sequence.
* **Not built:** the routers, the network interfaces and the IP cores; the
  optional direct TCM inputs drawn in the wrapper figure; comparing the
  responses of several routers tested in parallel (the wrappers can be
  configured for it, but the GAC analyzes one result stream).
* **Reconfiguration** of a cell is only safe while its links are idle; the
  RTL does not drain or flush buffers on `inst_update`.

## How far it has been checked

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|---|---|
| `tb_sa_buffer` | full-rate streaming, random traffic on both VCs with random back-pressure, VC priority |
| `tb_input_stage` | every mode and source, each bypass target; 32 flits in 33 cycles on buffered paths; normal mode combinational |
| `tb_output_stage` | every mode and source, each bypass source, back-pressure |
| `tb_tcm` | three chained TCMs: shift order, read-back, update, bypass flag, disable |
| `tb_gac_unit` | config words, read-back, update pulse, LFSR vectors, error counting, 1 vector/cycle |
| `tb_anoc_test_wrapper` | wrapper + router model: normal, node test, shift-to-port, bypass, TCM bypass |
| `tb_anoc_test_top` | 2 x 2 mesh at default parameters: normal traffic; node 1 tested through wrapper 0's bypass; a second session over the shortened chain; read-back; after a reset, the resource on wrapper 0's local port tested through a west<->local bypass; counts of every mechanism |
| `tb_anoc_test_mesh20` | 5 x 4 mesh: the far corner router tested through three bypassed wrappers, 500 vectors in 511 cycles |

In all of them the path under test streams one vector per cycle. At 250 MHz
with a 32-bit payload this is the 1 Gbyte/s per test path stated for the
original. No timing analysis has been done, so that clock rate is not shown.

Nothing here has been checked against a real ANoC router or on silicon. The
router model forwards flits over a fixed route table.

## Simulating

With Verilator 5 (run from the repository root):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/anoc_test_pkg.sv tb/tb_anoc_test_top.sv --top-module tb_anoc_test_top
./obj_dir/Vtb_anoc_test_top
```

Replace `tb_anoc_test_top` by any other testbench name. Each one ends with a
`TB_RESULT` line and has a cycle watchdog.

## Changing it

* Mesh size: `anoc_test_top #(.MESH_X(..), .MESH_Y(..))`. The chain length and
  the GAC's `NW` follow.
* Number of VCs, ports or the flit width: `NVC`, `NPORTS`, `FLIT_W` in
  `anoc_test_pkg`. The instruction layout follows, because `SEL_W` is
  derived. The mesh wiring assumes ports 1..4 are the four compass directions.
* Buffer depth: the `DEPTH` parameter of `sa_buffer` (2 is the smallest that
  keeps one flit per cycle).
