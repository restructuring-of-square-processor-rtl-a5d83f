# Self-repairing processor arrays with a built-in neural repair controller

A large two-dimensional processor array, such as an image-processing mesh
built on one wafer, will nearly always have a few defective elements. This
design adds spare elements plus a small circuit on the same die. The circuit
works out by itself how to reconnect the array around the defects, so the
array keeps its full logical size. Finding a reconnection is a matching
problem: every defect must get its own spare, and each spare can serve only
one defect. Here a Hopfield-style neural network solves it. The network is a
grid of binary neurons, one small group per processor, joined by fixed
inhibitory connections. From any starting point it settles into a state that
encodes a legal reconnection, whenever one exists.

Two reconnection schemes are built. They stand side by side in the top module
`bisr_top`:

* **Direct Substitution (DS).** An M x N array gets one spare row (row 0) and
  one spare column (column 0). A defective element (i, j) is replaced either
  by spare (i, 0) of its row ("horizontal") or by spare (0, j) of its column
  ("vertical"). The payload is an image array: each element holds one pixel
  and repeatedly replaces it by the majority of itself and its four
  neighbours.
* **Window Substitution (WS).** An (M+1) x (N+1) grid of identical elements
  provides an M x N logical array. Each element may take any logical position
  inside a p x q window at its upper left. This gives more freedom than DS,
  so more defect patterns can be repaired. The default window is 2 x 2; 2 x 3
  and 3 x 3 are parameters.

Defaults: M = N = 8, P = Q = 2, A = 3, B = 4, TIMEOUT = 65536 cycles.

## Repair as a neural network (the part to read first)

### DS network

Each regular element (i, j), with 1 <= i <= M and 1 <= j <= N, owns two
neurons:

* V[i][j] = "replace me by the spare of my column"
* H[i][j] = "replace me by the spare of my row"

The connections are fixed. Only the enables depend on the defect pattern:

| connection | weight | meaning |
|---|---|---|
| V to every V of the same column, itself included | -A | one column spare, at most one user |
| H to every H of the same row, itself included | -A | one row spare, at most one user |
| V[i][j] and H[i][j] of one element | -B | a defect uses one spare, not two |
| bias on both neurons of a defective element | A + B/2 | defects want a spare |

A neuron is enabled only if its element is defective and the spare it would
use works. A neuron fires when its influence (bias plus weighted firing
neighbours) is positive. It stops when the influence is negative, and holds
when it is zero.

With 2A > B > 0 the stable states are exactly the maximal matchings:

* An uncovered defect sees influence B/2 > 0, so it grabs a free spare.
* A covered defect sees 0 and holds.
* Two defects sharing one spare each see B/2 - A < 0.
* A defect with both neurons on sees B/2 - B < 0.

A maximal matching that is not complete is a dead end. The network must back
out of it at random. In this digital version a random term in [-B/2, +B/2] is
added to the influence of the neuron being evaluated.

* An uncovered defect can then steal a spare that is already used (this needs
  noise > A - B/2).
* The element it displaced becomes uncovered and looks for another spare.
* A complete matching can never be disturbed, because every neuron in it sees
  at most 0 + B/2 - B/2.

The network is asynchronous: one neuron, chosen by a 32-bit LFSR, is evaluated
per clock. The controller declares success when every defect has exactly one
firing neuron and no row or column spare is used twice. Patterns that cannot
be repaired never settle, so a time-out ends the run with `fail`.

### WS network

Each physical element (i, j) owns p*q neurons. Neuron k means "move to
logical position (i + k/q - p + 1, j - q + 1 + k mod q)". The window is
numbered row-major, and the element's own index is its bottom-right corner.
Moves that leave the logical array have no neuron. A faulty element's neurons
are disabled.

* -A joins two different neurons of one element (one move per element).
* -B joins all neurons whose moves land on the same position, the neuron's own
  feedback included (one element per position).
* Every neuron has bias B.

So a neuron sees B - B·(moves onto its position) - A·(other moves of its
element):

* An empty position pulls its candidates in.
* A filled position holds.
* An element that is pulled into two moves drops one, and that starts a new
  search.

Here the random choice is in the schedule. Each cycle, exactly one neuron
whose threshold rule asks for a change is picked uniformly and switched.
Picking a neuron whose rule says "keep" would change nothing, so this is the
same random-order network with its idle cycles removed. Success is every
logical position held once; otherwise the run times out.

### Controller protocol (both networks)

* Apply the fault map (`*_fault`, [M:0][N:0]; DS ignores (0,0)).
* Pulse `*_repair_start` for one cycle. The state goes NN_LOAD, then NN_RUN.
* Wait for `*_repair_done` or `*_repair_fail`. `*_repair_cycles` gives the
  length of the run.
* DS additionally takes an initial assignment (`ds_init_v`, `ds_init_h`). The
  search may start from any partial assignment. Use zeros when there is none.
* The neuron states are the outputs (`ds_sub_v`/`ds_sub_h`, `ws_move`). They
  drive the interconnect directly.
* Changing the fault map needs a new start.

Runs seen in simulation:

| pattern | result |
|---|---|
| 4 x 4 DS, 7 defects, one faulty spare | repaired in 618 cycles |
| 16 x 16 DS, 9 defects, from a given partial assignment | repaired in 904 cycles |
| 120 random 8 x 8 DS patterns | all 97 repairable ones repaired; all 23 others timed out |
| random WS 8 x 8 patterns, 2 x 2 window | all repaired |
| random WS 8 x 8 patterns, 2 x 3 and 3 x 3 windows | 1 to 2 time-outs in 34 patterns, on arrays with 15 or 16 faulty elements |
| 32 random 16 x 16 DS patterns, 2 to 32 defects | every repairable pattern but one repaired (one time-out at 20 defects with a 50000-cycle limit) |
| 16 random 16 x 16 WS patterns, 2 x 2 window, 1 to 16 faults | all repaired |

The 2 x 3 and 3 x 3 windows were simulated at 8 x 8 only. At 16 x 16 they
simulate too slowly for a routine regression run.

The randomised search has no guaranteed run time. A pattern that can be
repaired may still occasionally time out. Callers should treat `fail` as
"not repaired", not as "provably unrepairable".

## Interconnect

**DS** (`ds_switch_fabric`). This is a functional model of the per-element
switch boxes, built as multiplexers controlled by the neuron outputs.

* For every logical position it selects the element that holds it: the
  regular element, or spare (i,0) if H[i][j] fires, or spare (0,j) if
  V[i][j] fires.
* Each element, regular or spare, receives the pixels of its four logical
  neighbours and the load data of the position it serves.
* Neighbours beyond the array edge read 0.
* It is purely combinational. The element outputs are registers, so there is
  no combinational loop.

**WS** (`ws_cell`, `bisr_ws_array`). Each element has:

* two pq:1 input multiplexers (west, north);
* two 1:pq output demultiplexers (east, south);
* both steered by its one-hot move.

Between each pair of adjacent logical positions there is one net. Every
demultiplexer line that can drive that link joins the net as a wired-OR, and
non-selected lines drive 0. After repair each net has exactly one active
driver. The edge nets are the array's ports (`ws_west_in`, `ws_north_in`,
`ws_east_out`, `ws_south_out`).

## Processing elements and data ports

**DS** (`maj_pe`, 80 elements):

* `ds_load` writes `ds_pix_in`, indexed by logical position.
* Each `ds_step` cycle runs one majority-vote step: the result is 1 when at
  least 3 of the 5 pixels are 1.
* `ds_pix_out` is the logical image.

**WS** (`ws_cell`, 81 elements). No processing function is defined for this
scheme, so a small systolic payload exercises the links:

* `ws_shift` shifts values in from the west edge along each logical row.
* `ws_step` makes every element pass on west + own value to the east and
  north + own value to the south.
* After M+N+2 steps, each east output is the row's west input plus its row
  sum, and each south output is the column's input plus its column sum.

All data operations are meaningful only after `*_repair_done`. There is one
clock, and the reset is synchronous and active-low.

## Module map

| module | role |
|---|---|
| `bisr_pkg` | shared types (influence, controller state), window arithmetic |
| `bisr_lfsr` | 32-bit Galois LFSR, STEPS shifts per clock |
| `hopfield_neuron` | binary threshold neuron with enable, preset, update strobe |
| `ds_neural_cell` | V/H neuron pair of one DS element, its sums and disable logic |
| `ds_neural_net` | DS controller: 2MN neurons, random schedule, done/time-out |
| `ds_switch_fabric` | DS bypass multiplexers |
| `maj_pe` | majority-vote pixel element |
| `bisr_ds_array` | DS array: net, fabric, 64 regular and 16 spare elements |
| `ws_neural_net` | WS controller: p·q neurons per element, done/time-out |
| `ws_cell` | WS element with its multiplexers and demultiplexers |
| `bisr_ws_array` | WS array: net, 81 cells, wired-OR link nets |
| `bisr_top` | both arrays side by side |

## Where this design departs from, or adds to, the scheme it implements

* **Digital emulation of an analog network.** The original network sums
  currents in continuous time, and its random back-tracking comes from the
  circuit's dynamics. This design uses integer influences and one update per
  clock. The DS noise term and the WS "pick among neurons that want to
  change" schedule are this design's own ways of providing the randomness.
* **Explicit completion test.** The analog network simply stops changing.
  Here the controller checks the matching and raises `done`.
* **Weights.** The scheme only requires A > B/2 > 0, with B normally a
  little larger than A (DS), and B > A > 0 (WS). A = 3 and B = 4 are this
  design's choice. DS elaboration stops with an error unless A < B < 2A and B
  is even (so that B/2 is an integer); WS elaboration unless B > A > 0.
* **Time-out length** (65536 cycles) is chosen. The DS controller in the
  end-to-end test gives up after exactly 65535 run cycles.
* **Load port, zero edge pixels, WS payload and data width** (W = 8) are
  choices of this design.
* **Not modelled:** the transistor-level neuron and synapse circuits, and the
  fault diagnosis that produces the fault map, which is an input here.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself; a watchdog catches
hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_bisr_top rtl/bisr_pkg.sv tb/tb_bisr_top.sv -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_bisr_top` | both arrays at default size, end to end (see below) |
| `tb_ds_neural_net` | 4 x 4 and 16 x 16 examples; 120 random 8 x 8 patterns checked against an augmenting-path matcher |
| `tb_ws_neural_net` | WS networks at 4 x 4/2 x 2 and 8 x 8 with 2 x 2, 2 x 3 and 3 x 3 windows; random patterns against a reference matcher; uses `ws_nn_harness` |
| `tb_survival_16x16` | survival rate per defect count on 16 x 16 arrays, DS (2 to 32 defects) and WS with 2 x 2 windows, next to the exact matcher's rate |
| `tb_bisr_ds_array` | repair followed by majority-vote steps on an array with stuck-at-1 defective elements, against a software model |
| `tb_bisr_ws_array` | repair followed by shift/step traffic through the moved elements |
| others | exhaustive or random tests of each leaf module |

`tb_bisr_top` runs everything at default parameters, in a few seconds. It
counts each mechanism and fails if one never happens:

* horizontal and vertical substitution;
* a disabled neuron due to a faulty spare;
* back-tracking in both networks;
* time-out on unrepairable patterns in both networks;
* element moves;
* vote, shift and step operations.

To change the size, override M, N (and P, Q for WS) on `bisr_top` or on one
array. The controllers' logic grows as M·N (DS) and M·N·P·Q (WS).
