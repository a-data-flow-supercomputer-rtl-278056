# A static data flow supercomputer in SystemVerilog

This is RTL for a static data flow machine. The machine has no program counter. A program is a
graph of *instruction cells*, loaded into processing elements before the run. A cell fires as soon
as its operands have arrived and the cells that consume its result have acknowledged the previous
result. Throughput comes from many cells working at once, and from streams of values flowing
through one copy of the code in pipeline fashion. The target machine has 256 processing elements,
128 floating point adders, 96 multipliers and 32 array memory modules. Three packet routing
networks join them into one ring. The machine was sized to run a global weather model about
twenty times faster than a conventional supercomputer of the early 1980s.

Everything in `rtl/` is synthesizable SystemVerilog-2017. The top, `dfs_top`, defaults to the
full machine.

## The machine

```
            RN1 (256,256): result and signal packets
   +--------------------------------------------------------------+
   v                                                              |
  PE x256 --> RN2 (8,8) x32 --+--> ADD x4 per RN2 ----------------+
  (cells)                     +--> MUL x3 per RN2 ----------------+
                              +--> RN3 (32,32) --> AM x32 --------+
```

| unit | count | role |
|---|---|---|
| processing element (PE) | 256 | holds 1024 instruction cells; detects enabled cells; executes simple instructions itself |
| ADD unit | 128 | floating point add and subtract; also forwards results of PE-executed instructions |
| MUL unit | 96 | floating point multiply |
| array memory (AM) | 32 x 64K words | INDEX, READ, WRITE on the structured data |
| RN2 | 32 x (8,8), 12 routers each | operation packets from 8 PEs to their cluster's units |
| RN3 | (32,32), 80 routers | array operation packets to the module that holds the address |
| RN1 | (256,256), 1024 routers | result and signal packets from every unit back to the PEs |

The cluster structure is derived from the unit counts. 256 PEs behind (8,8) networks make 32
RN2s. Each RN2 has eight outputs: 4 ADD (128/32), 3 MUL (96/32) and one link into RN3, which has
32 inputs. Every cluster thus produces 8 unit outputs, 256 in all, and these are exactly the 256
inputs of RN1. RN1 input `8c+u` is unit `u` of cluster `c`: u = 0..3 ADD, 4..6 MUL, 7 array memory.

## Instruction cells and the firing rule

This is the part that needs the most care, because correctness of a data flow program depends on
it.

A cell (`instr_t` in `dfs_pkg`) holds:

* the opcode;
* two operand fields, each either a loaded constant (`konst`) or filled by arriving packets;
* an optional Boolean **control** operand (`gated` cells and MERGE);
* **signals needed**, a counter, and two reload values, **reset T** and **reset F**;
* up to six **destinations**. A destination names a PE, a cell, and an operand number: 0 for the
  first operand, 1 for the second, 2 for the control operand, 3 for a *signal*. It also carries a
  gate tag (always, T or F) and a host flag.

Two kinds of packets reach a cell. A *result packet* fills an operand field. A *signal packet*
lowers signals needed by one. A cell is enabled when signals needed is zero and every operand it
uses is present. MERGE is the exception: it needs the control operand plus the data operand that
the control selects (first if true, second if false). The other data operand may already be there
and stays untouched.

When a cell fires:

* its consumed operands are cleared (constants stay);
* signals needed is reloaded with reset T, or with reset F if the cell is gated and its control
  is false;
* each destination tagged T or F is used only if the tag matches the control value;
* a result packet goes to every result destination, and a signal packet goes to every signal
  destination. Signal destinations are how a cell tells its producers that their values were
  consumed.

So a cell whose result goes to five cells has a reset value of five, and each of those five cells
lists a signal arc back to it. The cell cannot fire again, and overwrite values still in flight,
until all five have fired. Programs must obey this discipline. The PE asserts that a signal never
arrives while signals needed is already zero.

## Processing element

`processing_element` has two stages.

**Input stage.** It accepts one packet per cycle. In priority order the source is the loop-back
path (results of this PE's own cells sent to its own cells), then RN1, then the host. The stage
updates one field of the addressed cell and tests the enable rule on the updated state. If the
cell is now enabled and not already queued, the stage pushes it onto a ready FIFO. The FIFO has
one entry per cell, so it cannot overflow, and the input stage never blocks except on the host
port. This is what keeps the ring of PE, networks and units free of deadlock: a PE always drains
RN1.

**Fire stage.** The cell at the head of the ready queue fires in the cycle it gets there, as long
as the operation-packet register and the loop-back fan-out are both free.

* ADD, SUB, MUL, INDEX, READ and WRITE leave as one *operation packet*: the opcode, both operands
  and the gate-filtered destination list. ADD/SUB go to one of the cluster's four ADD units and
  MUL to one of its three MUL units, each chosen round-robin. INDEX, READ and WRITE go to RN2
  output 7, with the array module number taken from the address.
* ID, MERGE, IADD, ISUB, IEQ, ILT, FLT, AND, OR and NOT are computed in the PE. Destinations in
  the same PE are served by the loop-back fan-out without touching any network. If other
  destinations remain, they go as one ID operation packet to an ADD unit, which re-emits the value
  to them through RN1.

Timing: a packet that enables a cell at clock edge *t* puts the cell on the queue at *t*. The
operation packet is then offered from *t+1* and taken at *t+2* when RN2 is free.

## Functional units and array memory

Every unit takes an operation packet, computes one value, and then sends one packet per listed
destination, one per cycle (`dest_fanout`). The first packet leaves one cycle after the operation
is taken (two cycles for array memory, whose read is synchronous). Units are not pipelined: the
next operation is taken after the last packet of the previous one has left. The target rates are
below one operation per microsecond per unit, so this is enough.

* `fp_add` and `fp_mul` use IEEE-754 binary32 and round to nearest, ties to even. Subnormal
  inputs and results are flushed to zero, overflow gives infinity, and invalid operations give a
  quiet NaN.
* `array_memory` addresses are `{module[4:0], word[15:0]}` in a 32-bit word. INDEX returns
  pointer + index, READ returns the word, and WRITE stores `b` and also returns it, so later cells
  can wait for the write to finish.

## Routing networks

`routing_network #(N, W, DEST_LSB)` is an omega network of log2(N) stages of N/2 `router2x2`.
Before each stage the lines are perfectly shuffled. Stage *s* steers by destination bit
log2(N)-1-*s*, so a packet arrives at the output numbered by its destination field
`pkt[DEST_LSB +: log2 N]`. Each router has a one-packet register per output and a round-robin
pointer per output for conflicts. There is one cycle per stage when the path is free. Packets from
one source to one destination keep their order, because each such pair has a single path. Links
use valid/ready: a packet moves when both are high and must stay stable while it waits.

## Host interface

Loading is done by the program loader, which is outside this RTL. `dfs_top` offers:

* **Load port**: `load_valid`, `load_pe`, `load_cell`, `load_instr`, `load_op1`, `load_op2` write
  one cell per cycle and clear its dynamic state.
* **Injection**: `host_in_*` delivers a result or signal packet to the PE named in it. This is how
  a computation is started and its input streams are fed.
* **Results**: a destination with the host flag set travels through the machine like any other.
  When it reaches the named PE, it leaves on that PE's `host_out_*` port. A host that feeds a
  pipelined program takes part in the signal protocol: it waits for signals before sending the
  next input, and it signals each result back.
* `n_*` outputs count firings, gated firings, merges, signals and router conflicts in each cycle.

## Where this departs from the original design, and what is this design's own

* **Field layouts.** The design's own: opcode encoding, six destinations per cell, 8-bit PE and
  10-bit cell numbers, the address split, and Booleans as nonzero words. The original budgets four
  32-bit words per cell in a 4K-word PE memory. That budget gives the 1024 cells per PE used here,
  but the cell state here is wider than 128 bits.
* **Links are parallel.** The original suggests sending each packet as eight 16-bit bytes at
  8 MHz. Here a whole packet moves in one transfer.
* **Network wiring and router internals** are not given by the original beyond the stage and
  router counts. The omega wiring, router buffering and arbitration are choices of this design.
* **Forwarding of PE-computed results to other PEs** goes through an ADD unit as an ID packet. The
  original lists such "miscellaneous" packets in its traffic budget but gives them no path.
* **INDEX runs in the array memory module** that holds the block. WRITE returns its value.
* **Number format** is IEEE binary32. The original only says "floating point".
* **Not built**: the compiler and loader (software), error values of the source language, and
  byte-serial link hardware.

## Programming it: streams, gates and FIFOs

The testbenches carry three complete programs, which show how code for this machine is written.

**Selecting from a stream.** To build `X[i] = 0.5*(A[i-1]+A[i+1])` for an array that arrives as
a stream `A[0] .. A[m+1]`, with `X[0]` and `X[m+1]` copied, one cell fans `A` out to three gated
ID cells. Each ID cell gets its own Boolean control stream:

| control stream | passes on | elements it lets through | role |
|---|---|---|---|
| `T..TFF` | true | `A[0] .. A[m-1]` | left neighbour |
| `FFT..T` | true | `A[2] .. A[m+1]` | right neighbour |
| `FT..TF` | false | `A[0]`, `A[m+1]` | boundary values |

A gated ID cell that passes on true has reset T = 1 and reset F = 0. When the control is false,
the value is dropped, and no acknowledgement is awaited. The two neighbour arms meet at an ADD,
then a MUL by the constant 0.5. A MERGE steered by `FT..TF` puts the interior results and the
boundary copies back into one ordered stream.

**Equal path lengths.** The neighbour arms and the boundary arm reach the ADD and the MERGE at
different depths. Cascades of ID cells (four on one arm, two on another) act as FIFOs that let
the arms run without stalling each other. The program stays correct for any amount of buffering,
because the signal protocol never lets a value be overwritten. Too little buffering costs
throughput. If the buffering is far too little, a fan-out cell waits for an acknowledgement that
can only come after its own next value, and the program deadlocks.

**Two levels: the LaPlace relaxation.** One pass of a 2-D relaxation (each interior point becomes
the mean of its four neighbours) nests the same pattern. The outer level selects rows `i-1`, `i`
and `i+1` from the stream with gated ID cells. Their controls are `T^(mA) F^(2A)`,
`F^A T^(mA) F^A` and `F^(2A) T^(mA)`, for `m` interior rows of `A` elements. ID cascades of `4A`
and `2A` cells buffer two rows and one row. The inner level is the one-dimensional program above,
extended to two ADD levels and a MUL by 0.25. A final MERGE puts the boundary rows back. Control
streams would come from small counter programs; in the testbench, the host supplies them and
feeds each result array back in as the next input.

**Reset counts and signal arcs** are mechanical. A cell's reset T counts its result destinations
tagged always or T, and reset F counts those tagged always or F. Every consumer lists a signal
arc back to each producer of its operands. For a MERGE, the arc to the first operand's producer
is tagged T and the arc to the second's is tagged F, because only the selected producer's value
is consumed. `tb_dfs_laplace` derives all of this from a list of data arcs, and is a convenient
starting point for writing other programs.

## Sizing against the weather model

The original's numbers for one time step of the weather model, checked against the defaults:

* data base: 37 x 144 x 87 = 463,536 words. Array memory is 32 x 64K = 2,097,152 words.
* instruction cells: about 89,800. The PEs hold 256 x 1024 = 262,144.
* packet rate for a 5 s time step: 225 M operation packets/s, or 0.88 M/s per PE. Each PE here can
  issue one operation packet per cycle, and each unit can emit one packet per cycle. So even a
  clock of a few MHz would cover the rate, if the networks keep up under real traffic; that last
  point has not been simulated.
* instruction processing time, from enable until every result and signal packet has been
  delivered: the model's 400 µs interval between grid points allows up to 200 µs, because a cell
  can fire again only after its consumers have fired. On an idle machine an FU instruction takes
  about 20 cycles: 2 in the PE, 3 RN2 stages, 1 in the unit, up to 5 for further destinations,
  8 RN1 stages and 1 at the target. That is well inside the limit at any clock above a fraction
  of a MHz. Queueing under load comes on top of that figure.

## Files

| file | contents |
|---|---|
| `rtl/dfs_pkg.sv` | constants, opcodes, `dest_t`, `res_pkt_t`, `op_pkt_t`, `instr_t` |
| `rtl/dfs_top.sv` | the whole machine |
| `rtl/processing_element.sv`, `rtl/sync_fifo.sv` | PE and its ready queue |
| `rtl/add_unit.sv`, `rtl/mul_unit.sv`, `rtl/fp_add.sv`, `rtl/fp_mul.sv` | functional units |
| `rtl/array_memory.sv` | array memory module |
| `rtl/dest_fanout.sv` | value + destination list -> packet stream |
| `rtl/routing_network.sv`, `rtl/router2x2.sv` | networks |
| `tb/tb_*.sv` | self-checking testbenches; each prints `TB_RESULT checks=N failures=M` |
| `tb/fp_ref_pkg.sv`, `tb/net_tester.sv` | floating point reference model; network traffic checker |

## Simulating

Each testbench is self-checking. Build one with Verilator 5, listing the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dfs_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/net_tester.sv tb/tb_dfs_top.sv \
  --top-module tb_dfs_top -o sim && ./obj_dir/sim
```

* `tb_dfs_top` runs the machine at 16 PEs (two clusters) with 40 items per stream. It runs three
  programs: a pipelined `0.25*((A+B)+(C+D))` spread over four PEs; a conditional
  `(i==0) ? x : 0.5*y` built from an integer test, gated ID cells and a MERGE, with its multiply in
  another PE; and an array memory buffer (INDEX, WRITE, then READ back). It checks every result,
  the host's signal credits, and the exact number of FU and local firings. It also requires gated
  firings, merges on both arms, signals and network contention to have occurred.
* `tb_dfs_forall` runs the one-dimensional stream program above on six arrays of 16 elements, with
  its 12 cells on 12 PEs. The host delivers each element straight to the three selector cells. The
  testbench checks every element and the host's credits, and reports the steady-state rate, which
  is about 22 cycles per element. The rate is limited by the host, which
  injects one packet per cycle and must feed four control streams and three data copies per
  element.
* `tb_dfs_laplace` runs three relaxation passes over a 5 x 6 array, using 74 cells placed
  round-robin on all 16 PEs. It checks every element of every pass, the number of merges, and
  the number of functional unit firings.
* The largest configuration simulated end to end is 16 PEs in two clusters, with a (16,16) RN1,
  (8,8) RN2s, a (2,2) RN3, 64 cells per PE and 1K words per array memory. The full 256-PE default
  passes lint and elaboration. Verilator, however, flattens it into about 150 MB of C++, so a
  full-size simulation build takes hours. The unit testbenches run the routing network at N = 8
  and 32, and the array memory at its full 64K words.
* The unit testbenches check, among other things, the FP results against a double-precision
  reference, network delivery and ordering under random back-pressure, and the PE firing rules.
