# Parallel route setting for Benes and three-stage Clos switches

A rearrangeable switch such as a Benes network can connect any permutation of
its inputs to its outputs. Before it can do so, something must choose, for
every 2x2 switching element (SE), whether it stays *bar* (straight) or goes
*cross* (swapped). The classic way to do this is the looping algorithm: walk
around each cycle of the permutation, alternating upper and lower
sub-networks. Done in software, this takes time O(N log N).

This RTL does the looping algorithm's work in hardware and in parallel. Each
SE of a splitting column gets its own processing element (PE). All PEs of a
sub-network share a set of buses. Each PE finds its two "neighbours" (the PEs
whose address pairs are linked to its own) in one clock, and the whole cycle
structure of the permutation then follows from those links. In the same way,
the route of a three-stage Clos network C(n, n, r) is set by viewing each
n x n input switch as a small Benes front end.

Two switching systems are built. They stand side by side in `clos_network_top`:

| system | switch body | control unit | default size | start-to-done |
|---|---|---|---|---|
| Benes | `benes_switch` | `benes_pcu` | N = 32 | 5(log2 N - 1) + 1 = 21 clocks |
| Clos | `clos_switch` | `clos_pcu` | C(4,4,2), N = 8 | 5 log2 n + 1 = 11 clocks |

## Addresses and the switch body

A request is a destination address per input: `a_in[i]` = output wanted by
input i. `v_in[i]` = 0 marks an idle input, so partial permutations are
allowed. An SE's control bit (SCB) is 0 for bar and 1 for cross.

`benes_switch` has 2 log2 N - 1 columns of N/2 SEs. It uses the usual
recursive wiring:

- **Splitting columns.** SE row h of a splitting column at depth k belongs to
  sub-network s = h / (M/2), where M = N / 2^k. Its upper outlet goes to the
  upper half-size network and its lower outlet to the lower one.
- **Centre column.** It pairs neighbouring positions.
- **Merging columns.** They mirror the splitting columns.

`clos_pkg` holds the position arithmetic, `split_in_pos` and `split_out_pos`.

## Division: how one column is set

A splitting column divides the addresses of its sub-network into two halves.
The upper half goes through the upper sub-network and the lower half through
the lower one. The two addresses of a pair must never end up on the same
side. This is the hard part of the design. Each `pe_group` does it for one
sub-network in five clocks:

1. **Initialise** (clock 1). Every PE loads its two addresses. It then drives,
   on its own bus, the *region of interest* of both addresses: the bits above
   the bit being decided. Two addresses share a region of interest exactly
   when they are the two outputs of one SE further on. Such addresses must go
   to different sub-networks.
2. **Neighbour search** (clock 2). Every PE compares each of its addresses
   with every other bus. The match found is its neighbour on that inlet. The
   PE records the neighbour's number, which inlet matched, and a link flag
   `fs`:
   - `fs` = 1 ("not equal") if both addresses sit on the same inlet position
     (both upper or both lower). Then the two SEs must take opposite states.
   - `fs` = 0 ("equal") otherwise.

   A PE whose own two addresses share a region of interest links to itself.
3. **Representative selection** (clock 3). The links form cycles. For a
   partial permutation they can also form open chains. Every cycle or chain
   needs exactly one PE whose state is fixed arbitrarily. The representative
   is the PE with the largest *extended suffix* {end flag, PE number}. The end
   flag is set for a PE with only one neighbour. This makes an end of an open
   chain win over interior PEs, so that the state spreads along the whole
   chain from one end.
4. **Status propagation** (clock 4). The representative is set bar. Every
   other PE takes the XOR of the link flags along the path from its
   representative.
5. **Terminate** (clock 5). Each PE swaps its address pair through its own
   2x2 switch according to its state. The upper outlets form the next upper
   sub-permutation and the lower outlets the lower one.

`div_columns` chains log2 N - 1 such columns. Column k holds 2^k groups. Each
column's done pulse starts the next column.

### Why there is no ring of gates

In the original scheme, phases 3 and 4 run asynchronously:
- a tournament among the PEs of a cycle finds the representative;
- a ring of inverting and non-inverting gates, broken at the representative,
  spreads the states.

Both are combinational loops in a synchronous design. `link_fabric` computes
the same two results with an acyclic pointer-doubling network. It models the
links as a successor function on (PE, inlet) states and runs log2 P + 1
doubling levels. This gives:
- the maximum extended suffix reachable around each cycle or chain, which
  marks the representative;
- the XOR of the link flags up to the representative, which gives each PE's
  state.

Each phase still takes one clock, so the five-clock column of the original is
kept. The critical path grows as log P. This cost is the price of avoiding the
loop. Timing closure at large N is not studied here.

## Destination-tag part

After the last division column, every sub-network is 2x2. Destination-tag
routing then sets the rest:
- the centre column uses address bit n-1 (n = log2 N);
- each merging column uses the next lower bit, down to bit 0 in the last
  column.

Each `dtr_pe` takes its decision from the address on its upper inlet. If that
inlet is idle, it takes the inverted decision of the lower inlet. If both are
idle, it stays bar. This part is combinational. Its results are registered
once, one clock after the last division column. `benes_pcu` also outputs the
addresses as they leave the last column (`a_out[j] == j` for every valid one)
and the representative flags of every division column.

## Clos networks

`clos_switch` is C(n, n, r):
- r input crossbars of n x n;
- n middle crossbars of r x r;
- r output crossbars of n x n.

Every crossbar (`xbs`) is a grid of 2x2 elements:
- a set crosspoint turns the row signal down into its column;
- the others pass it straight through.

The grid's unused top and right ports are brought out but unused.

`clos_pcu` views each n x n input switch as log2 n columns of virtual 2x2 SEs
and runs that many division columns. After them, each request has been given
a middle switch number: its upper/lower choice at every column, first column
most significant. Each middle switch then carries at most one request per
input switch and at most one per output switch. The settings follow directly:
- input switch: the request is traced back through the virtual SEs to its
  input line;
- middle switch: input switch x is connected to output switch `dst / n`;
- output switch: the middle switch is connected to output `dst % n`.

## Interfaces and timing

Both control units share one handshake:
- `start` is sampled together with `a_in` and `v_in`;
- `busy` is high until `done` pulses for one clock;
- the switch settings are valid from `done` and hold until the next request.

A `start` while busy is ignored. An assertion in `div_columns` checks this.
Only one permutation is processed at a time, so the control unit is not
pipelined across permutations. Reset is synchronous and active low (`rst_n`).
The data path through either switch body is combinational. The data width
`W` defaults to 8.

## Where this departs from the original scheme

- Phases 3 and 4 use synchronous pointer doubling, not an asynchronous
  tournament and gate ring. This gives the same results in the same number of
  clocks (see above).
- Both addresses of a PE go onto its bus at the same time, not one after the
  other.
- There is no pipelining of successive permutations through the column
  stages.
- For partial permutations, only the extended-suffix method is built, not
  the alternative that loops idle inputs back.
- The original gives only the function of destination-tag routing. The gates
  of `dtr_pe` are this design's own.
- The Clos control unit divides for log2 n columns and then sets the middle
  and output stages directly. The original describes its iteration count as
  log2 N - 1. The two agree for C(4,4,2), the only size it spells out.
- Defaults: N = 32 is the largest Benes size built in hardware in the
  original work, and C(4,4,2) is its worked Clos example. W = 8 is an
  arbitrary choice, since the original switches single signals.
- Not built: the optical switch fabrics whose idle crossbar ports are reused
  as extra inlets and outlets (bidirectional and unidirectional modified
  crossbars, the Clos and two-stage networks made of them). They are
  described only structurally, with no control logic.

## Verification

Each testbench checks its module against values worked out independently and
prints a `TB_RESULT` line. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_se2x2` | bar and cross routing |
| `tb_xbs` | a 4 x 5 crossbar against a crosspoint model, including the idle ports |
| `tb_benes_switch` | N = 8 and 16 against a recursive model of the wiring; all-bar is the identity; every setting gives a permutation |
| `tb_pe_group` | hand-worked examples (8 inputs, including a partial permutation whose representative must be a chain end); random full and partial permutations against a sequential reference of the division (`tb_model_pkg::split_ref`); the 5-clock latency |
| `tb_dtr_pe` | all inputs exhaustively |
| `tb_benes_pcu` | N = 16: latency, that every route is conflict-free, and that a start while busy is ignored |
| `tb_clos_switch`, `tb_clos_pcu` | C(4,4,2) and C(4,4,4): every input reaches its output; one crosspoint per row and column; latency 11 clocks |
| `tb_clos_network_top` | both systems at the default sizes, 300 random requests each |

`tb_clos_network_top` counts every mechanism: full and partial permutations,
columns with several cycles, open chains, self-paired SEs, cross states from
destination tags, start while busy, and Clos full and partial permutations. It
fails any mechanism that never occurred.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_clos_network_top rtl/clos_pkg.sv tb/tb_model_pkg.sv \
        tb/tb_clos_network_top.sv
    ./obj_dir/Vtb_clos_network_top

Sizes are set by parameters: `N` for the Benes system, and `NSW` (n) and
`RSW` (r) for the Clos system. All must be powers of two. The simulated sizes
are Benes N = 8, 16 and 32, and Clos C(4,4,2) and C(4,4,4). Larger sizes
(N = 64 to 128 for Benes, up to C(8,8,8) for Clos) elaborate from the same RTL,
but they take many minutes to compile and have not been verified in
simulation. Treat them as untested.
