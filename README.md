# Circular BIST with state skipping

Circular built-in self-test turns the flip-flops of a sequential circuit into
one long ring. During test, each flip-flop loads the XOR of its normal
next-state input and the output of the flip-flop before it in the ring. Each
clock cycle the ring does two jobs at once:

- it compacts the circuit's response, like a signature register;
- its contents become the next test pattern, like a pattern generator.

This costs very little hardware. The drawback is that the ring is an
autonomous state machine whose state graph is fixed by the circuit. From a
given seed it can fall into a short *limit cycle* and repeat the same few
patterns. Faults whose detecting states lie in another part of the graph are
then never reached.

*State skipping* fixes this with a little decode logic in the ring's
interconnect. When the ring reaches a chosen state, a few chain inputs are
inverted, so the next state is one picked at design time. That state can
leave a limit cycle, break a correlation, or match a test cube for a
hard-to-detect fault. Every state before the skip stays the same. The extra
XORs sit only on the ring path, never between the combinational logic and
its flip-flop in functional mode. So functional timing is not changed.

This repository holds synthesizable SystemVerilog for the ring of cells, the
skip decode logic, and a small single-session test controller. The circuit's
own combinational logic stays outside the top level, connected through ports.

## The BIST cell (`rtl/bist_cell.sv`)

All cells share two control bits, T1 and T2. With Q_prev the output of the
preceding cell, the cell's next state is

    D = (Z & T1) ^ (T2 & (Q_prev ^ (skip & T1)))

| T1 T2 | mode   | flip-flop loads          |
|-------|--------|--------------------------|
| 0 0   | Reset  | 0                        |
| 0 1   | Shift  | Q_prev                   |
| 1 0   | Normal | Z (functional operation) |
| 1 1   | BIST   | Z ^ Q_prev ^ skip        |

The skip input is gated by T1, so skipping acts only in BIST mode. Shift mode
stays a pure shift register, and Normal mode ignores the ring completely.
`cbist_pkg::mode_e` names the four encodings.

## The state skipping logic (`rtl/skip_decode.sv`)

The skip logic has `NUM_SKIP` entries. Each one is a *decoding cube* over the
ring state plus a set of cells to invert:

- `CARE[k]` marks the state bits the cube looks at.
- `VALUE[k]` gives the value each of those bits must have (0 means an
  inverted literal).
- `FLIP[k]` marks the cells whose chain input is inverted when cube k
  matches.

In hardware, each cube is one AND gate. Its output fans out to one extra XOR
in the chain path of each flipped cell. If several cubes flip the same cell,
their effects combine by XOR. Bit i-1 of every vector belongs to cell i.

The default is a 4-cell ring with one cube, Q3 & Q4, which inverts the inputs
of cells 2 and 3. Here is a worked step, with states written Q1 Q2 Q3 Q4:

- The ring is in 1011, and the functional inputs are Z1..Z4 = 0101.
- Without skipping, BIST mode would go to 1000.
- Q3 = Q4 = 1, so the cube matches. Cells 2 and 3 are inverted, and the ring
  goes to **1110**.

A description of this example in prose gives the target as 1100, which would
mean inverting cell 2 only. The gate-level drawing of the same example
inverts cells 2 and 3, and this design follows the drawing. Set
`FLIP = {4'b0010}` to get the 1100 version.

### Choosing the cubes (done offline, not in hardware)

The cubes come from an iterative procedure that uses fault simulation and
ATPG. None of it is hardware:

1. Fault-simulate the ring's state sequence until the last *m* states have
   detected no new fault.
2. Take the ATPG test cubes of the faults still undetected. Find the pair of
   test cube *c* and recent state *s* that are closest in Hamming distance.
3. Add a cube that decodes the state just before *s*. Let it flip the bits in
   which *s* differs from *c*, so the ring jumps to a state that matches *c*.
   The sequence up to *s* is unchanged, so no earlier detection is lost.
4. Repeat until the fault coverage is high enough.

A larger *m* adds less skip logic but gives longer tests. A smaller *m* does
the opposite. The result is a list of (state, flip set) pairs. Such a list
maps directly onto `CARE`/`VALUE`/`FLIP`: use a cube that matches the whole
preceding state, or fewer bits of it if no other reachable state matches
them. Tools that minimize the cubes are not part of this repository.

## The ring (`rtl/circular_chain.sv`)

`circular_chain` connects N cells into a ring (cell i is fed by cell i-1, and
cell 1 by cell N) and adds `skip_decode`. It also has one part that is not in
the published structure: a 2:1 selector in front of cell 1's chain input.
While `scan_sel` is high, cell 1 takes `scan_in` instead of Q_N. This lets N
Shift cycles load any seed. While `scan_sel` is low, Shift mode rotates the
ring, so the signature can be read serially from Q_N and ends up back in
place.

## One test session (`rtl/bist_controller.sv`)

Circular BIST needs only one test session. The controller steps through:

| phase  | mode   | cycles   | notes                                              |
|--------|--------|----------|----------------------------------------------------|
| IDLE   | Normal | -        | functional operation; `start` is sampled here      |
| CLEAR  | Reset  | 1        | ring to 0                                          |
| LOAD   | Shift  | N        | ring opened; seed shifted in `seed[N-1]` first     |
| RUN    | BIST   | TEST_LEN | one test pattern per cycle, skips applied          |
| UNLOAD | Shift  | N        | ring closed; `sig_out` = Q_N, bit N-1 first        |

When UNLOAD ends, the controller returns to IDLE and `done` pulses for one
cycle. In the `done` cycle the ring again holds the signature, and the next
clock edge loads functional data. A session takes 2N + TEST_LEN + 1 cycles
from the edge that samples `start` to `done`. A `start` that arrives during a
session is ignored. The seed is captured together with `start`. The
controller has an asynchronous active-low reset. The ring flip-flops have no
reset pin: they are cleared through Reset mode.

This sequence, the seed loading, and the signature unloading are choices of
this design. The source only requires a single session and the four modes.
Comparing the signature with a known-good value is left to the user.
Two assertions in the controller check that `done` follows the unload
phase and that seed loading follows the clear cycle.

## Top level (`rtl/cbist_top.sv`)

| parameter | default     | meaning                                      |
|-----------|-------------|----------------------------------------------|
| N         | 4           | ring length (number of circuit flip-flops)   |
| NUM_SKIP  | 1           | number of decoding cubes                     |
| CARE      | `{4'b1100}` | cared-for state bits per cube (Q3, Q4)       |
| VALUE     | `{4'b1100}` | required values                              |
| FLIP      | `{4'b0110}` | cells inverted per cube (2 and 3)            |
| TEST_LEN  | 50000       | BIST cycles per session                      |

Ports:

- Inputs: `clk`, `rst_n`, `start`, `seed[N-1:0]`, and `z[N-1:0]` from the
  circuit's combinational logic.
- Outputs: `q[N-1:0]` to that logic; `mode` ({T1,T2}); `skip_hit` (which
  cubes match now); `sig_out`, `sig_valid`, `busy`, `done`.

To put the design around a real circuit, follow these steps:

1. Set N to the circuit's flip-flop count.
2. Order the flip-flops in the ring. Avoid register adjacency, meaning a
   flip-flop whose Z depends on its ring predecessor.
3. Wire the combinational logic from `q` to `z`.
4. Fill in `CARE`/`VALUE`/`FLIP` with the cubes from the procedure above.

The defaults reproduce the 4-cell example above. The 50,000-cycle test length
is the longest test that was evaluated.

### Sizes that were evaluated

The technique was evaluated on ISCAS 89 benchmark circuits, with rings of 17
to 700 cells (s298: 17, s208: 18, s344/s382/s526: 24, s510: 25, s1196: 32,
s420: 34, s641: 54, s1423: 91, s5378: 199, s9234: 247, s13207: 700). Tests
ran up to 50,000 patterns, and skip logic of 0 to 1366 extra literals was
added. All of these need only a larger N and their own cube lists. The
counter width follows from TEST_LEN. The benchmark netlists and their cube
lists are not reproduced here, so the default build runs none of them.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench            | what it checks                                                                                                     |
|----------------------|--------------------------------------------------------------------------------------------------------------------|
| `bist_cell_tb`       | all 32 input combinations against the mode table                                                                   |
| `skip_decode_tb`     | the default cube over all 16 states; an 8-bit, 3-cube case with inverted literals and cancelling flips over all 256 states |
| `circular_chain_tb`  | the 1011 → 1110 step; Shift mode ignoring the skip; 3000 random cycles against a reference model                  |
| `bist_controller_tb` | mode sequence, seed bit order, busy/done, ignored restart, session length                                         |
| `cbist_top_tb`       | whole design at default parameters (see below)                                                                     |
| `cbist_top_chain18_tb` | 18-cell ring, 3 cubes, one 5584-cycle session (ring size and test length of the smallest evaluated benchmark) against a model; counts distinct patterns with and without skipping |
| `cbist_top_chain700_tb` | 700-cell ring, 4 cubes, one 44,000-cycle session (largest evaluated ring size and its test length) against a model; the stand-in logic maps the all-zero state to itself, and the plain ring reaches only 3 distinct patterns while the skipping ring reaches 44,000 |

`cbist_top_tb` runs the design at its default parameters. A small
combinational function stands in for the circuit. The testbench checks
Normal-mode operation. It then runs two complete 50,000-cycle sessions and
checks every ring state and every signature bit against a model. It counts
each mechanism: Normal, Reset, seed shift, BIST, skip, signature shift, and
done. It also runs the model without skipping, and shows that the plain ring
is stuck in a limit cycle while the skipping ring reaches states the plain
one never visits.

To simulate with Verilator (5.x), from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl rtl/cbist_pkg.sv \
        tb/cbist_top_tb.sv --top-module cbist_top_tb
    ./obj_dir/Vcbist_top_tb

Use the same command with any other testbench name. Each one runs in about
a second; the 700-cell one takes about ten seconds to build.

## Limits and departures

- The circuit under test is not included. It connects through `z` and `q`.
- The seed-load selector, the controller's phase sequence, and serial
  signature unloading are additions of this design.
- The cube-selection procedure is software and is not provided. The cube
  lists for the evaluated circuits are not known, so only the 4-cell example
  is configured.
- The 4-cell example follows its gate drawing (1011 → 1110), not the prose
  version (→ 1100); see above.
- The parallel-BIST scheme (separate LFSR and MISR) that the technique was
  compared against is not part of this design.
