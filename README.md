# Cyclic 0-1 sorters from 2×2 switches

A *0-1 sorter* takes N packets, each tagged with an activity bit (1 =
active, 0 = idle). It moves the active packets to the top N outputs without
reordering them, which makes it a concentrator. A *compressor* (cyclic 0-1
sorter) does more: the active packets go to a run of circularly consecutive
outputs that starts at any chosen address D. The k-th active packet, counted
from the top, leaves on output (D + k) mod N. Used as a distributor, a
compressor spreads packets evenly over a bank of output buffers: each time
slot starts where the previous one stopped.

This RTL builds two such compressors out of small switching elements, and
the logic that steers them:

* a **16-port baseline-swap compressor**. It is built from *iterative
  cells*, 2×2 switches steered by a one-bit *running parity*. A closed-form
  circuit computes every initial running parity from D. A time-slot
  controller adds an *input-fairness* mode.
* a **384-port 2X-network compressor**. Its switching modules are
  themselves smaller compressors: 24×24 and 16×16 networks. It is steered
  by a serial running sum in the first stage and a simple x / x+1 rule in
  the second.

All routing is combinational. `compressor_top` puts both side by side and
registers their outputs once per clock cycle (one clock = one time slot).

## The iterative cell (`iterative_cell`)

Each 2×2 cell has two packets in, two out, and a running-parity input
`rp_in`. The running parity is the number of active packets above the cell
in its stage, plus an initial value, mod 2. The rule:

| inputs active | result                                              |
|---------------|-----------------------------------------------------|
| only one      | it leaves on output `rp_in` (0 = upper, 1 = lower)  |
| both          | cross if `rp_in` = 1, bar if `rp_in` = 0            |
| none          | cross if `rp_in` = 0                                |

In gates this is `bar = act0 ^ rp_in` and `rp_out = rp_in ^ act0 ^ act1`.
The two-idle case is this design's reading. With it, idle packets are
compressed too, in reverse order: the r-th idle packet leaves on output
(D − 1 − r) mod N. The network is therefore always a full permutation, and
the fairness mode depends on this property.

## The baseline-swap network (`baseline_swap_network`)

The recursive construction of an N-input compressor is:

1. a front-end stage of N/2 iterative cells on input pairs (2c, 2c+1). Their
   running parity ripples from the top cell to the bottom one.
2. output 0 of cell c goes to input c of an upper N/2-input compressor;
   output 1 goes to input c of a lower one.
3. the upper compressor drives the even outputs and the lower one the odd
   outputs.

Consecutive active packets therefore alternate between the two halves.
Unfolded, this is a baseline network of log2 N stages. Stage s holds 2^s
independent chains of N/2^(s+1) cells, and each chain has its own initial
running parity RP(s, j). The nested even/odd interleaving collapses into a
single final **swap exchange**: output port p of the last stage goes to
network output bitreverse(p).

Signals at the output of stage s live in the generate block `g_stage[s]`;
stage s+1 reads them from there.

The network also gives an out-band output `next_start` (D'), so that it can
serve as a module of a larger 2X-network (see below). Bit s of D' is the
parity that leaves the bottom cell of the last chain of stage s. With
parities set up for start D, this equals (D + number of active inputs) mod N.

## Initial running parities (`rp_init`)

This is the least obvious part of the design. For the network to compress
to start address D, chain j of stage i needs the right initial parity
RP(i, j). The parities follow from splitting D recursively:

* the front-end parity is d0, the LSB of D;
* the lower (odd-output) half must start at G = D >> 1;
* the upper (even-output) half must start at F = (D >> 1) + d0 (mod N/2).
  If the first packet went to the odd side (d0 = 1), the second packet must
  take the next address, so the carry moves into the upper half.

Unrolled, every RP(i, j) becomes a left-to-right expression in the bits
d0 … di, built only from AND, OR and XOR. `rp_init` generates these
expressions directly from the constant indices, with no recursion in
hardware. Write j as i bits j(i−1) … j0, MSB first, and let l be the length
of its leading run of ones:

```
i = 0            : RP = d0
l = i (all ones) : RP = di
otherwise        : skip the zero j(i-1-l); start with d_l; for x = l .. i-2
                   append d(x+1) joined by OR if j(i-x-2) = 0, AND if it is 1;
                   finally XOR di.
```

Two examples (evaluated left to right): RP(4,10) = ((d1 ∧ d2) ∨ d3) ⊕ d4,
and RP(6,3) = (((((d0 ∨ d1) ∨ d2) ∨ d3) ∧ d4) ∧ d5) ⊕ d6. In the j index,
bit j(i−1) chooses the half at the first split (0 = upper/even), so RP(s, j)
drives chain j of stage s from the top. The vector bit is (2^s − 1) + j.
D = 0 gives all-zero parities, which is the plain 0-1 sorter.

## Compressor and fairness control (`baseline_swap_compressor`, `fairness_ctrl`)

`baseline_swap_compressor` connects `rp_init` to the network through an
optional complement of every parity (`invert`). Complementing the parities
swaps the roles of active and idle packets. The idle packets are then
compressed from D upward, and the active ones fill D−1, D−2, … with the
last active input first. Every parity in the chains is then inverted too,
so the compressor inverts D' back. D' then counts the idle packets:
(D + idle count) mod N.

A 0-1 sorter favours its upper inputs: when more packets arrive than the
outputs in use can take (for example, only the first 8 of 16 outputs are
served), the lower inputs lose. In `MODE_FAIR`, `fairness_ctrl` alternates
two kinds of time slot:

| slot | start address D                      | parities   | active packets land on     |
|------|--------------------------------------|------------|----------------------------|
| A    | 0                                    | as computed| 0 … k−1, first input first |
| B    | k = number of active inputs (mod 16) | inverted   | 0 … k−1, last input first  |

Both slots concentrate at the top, but precedence swaps from slot to slot.
In `MODE_CYCLIC`, the controller passes the external `bs_d_start` through
unchanged, which gives a cyclic 0-1 sorter (D = 0 gives a plain sorter).
The slot register resets to A and stays at A while in cyclic mode.

## 2X-networks (`compressor_leaf`, `compressor_2x`, `compressor_2x_nested`)

An (m, n) 2X-network has m·n ports and is built as follows:

* a first stage of n modules, each m×m;
* a second stage of m modules, each n×n;
* output j of first-stage module i feeds input i of second-stage module j;
* a final exchange that undoes this: output b of second-stage module a is
  network output b·m + a.

If every module is a compressor, the control is, with D = x·m + y:

* **first stage, serial:** module 0 gets y. Module i+1 gets
  (y + k0 + … + ki) mod m, where kp is the number of active inputs of module
  p. Each module computes this running sum itself (`next_start`).
* **second stage, independent:** module i gets x if i ≥ y, otherwise
  (x + 1) mod n.
* **out-band output:** D' = ((x + k') mod n)·m + (y + Σk) mod m, where k'
  is the number of packets entering the last second-stage module. This
  equals (D + number of active inputs) mod m·n: the start address for the
  next module or the next slot.

`compressor_leaf` is a generic m×m compressor with that interface. It finds
each packet's destination with a prefix count and drives each output from a
select. `compressor_2x` is a (6, 4) 24-port network of leaves.
`compressor_2x_nested` is the 384-port network: a first stage of sixteen
(6, 4) 24-port networks and a second stage of twenty-four (4, 4) 16-port
networks. The baseline-swap network is the special case in which m = 2 at
every level, with an iterative cell as a 2×2 compressor whose `next_start`
is the running parity.

## Top level (`compressor_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock (one edge per slot), synchronous active-low reset |
| `bs_mode` | in | `MODE_CYCLIC` / `MODE_FAIR` (`sorter_pkg::ctrl_mode_e`) |
| `bs_d_start[3:0]` | in | start address in cyclic mode |
| `bs_in_act[15:0]`, `bs_in_data[16][W]` | in | packets of the slot |
| `bs_out_act`, `bs_out_data` | out | routed packets, one cycle later |
| `bs_slot`, `bs_count` | out | slot kind and active count of that slot |
| `bs_next_start[3:0]` | out | D' of that slot; in cyclic mode, the next slot's start |
| `x_d_start[8:0]` | in | start address D of the 384-port network |
| `x_in_act[383:0]`, `x_in_data[384][W]` | in | packets |
| `x_out_act`, `x_out_data`, `x_next_start` | out | routed packets and D', one cycle later |

Parameters: `LOG_N` = 4 (16 ports), `M1, M2, N1, N2` = 6, 4, 4, 4 (384
ports) and payload width `W` = 8. The payload width is this design's choice;
the payload only rides along with its activity bit. The RTL is written for
any `LOG_N` ≥ 1, and for 2X factors of 2 or more on both sides.

To build a distributor, feed `x_next_start` back into `x_d_start` (or, in
cyclic mode, `bs_next_start` into `bs_d_start`), as the top-level testbench
does.

## How far to trust it, and where it departs

* Every routing result is checked against a reference model that knows
  only the definition of a compressor. The checks cover exhaustive start
  addresses, both polarities, random and corner patterns (empty, full,
  wrap-around), and the worked examples: the 24-port D = 20 case, the
  16-port D = 11 case, the 8-port reverse-control case and the two RP
  expressions. The 8-port (2, 4) and (4, 2) 2X-networks are checked over
  every pattern and start address. The explicit parity formulas are also checked against the
  recursive split for every D at 16 ports, and for random D at 128 ports.
* Each block's testbench also fails against a deliberately broken copy of
  its block.
* The gate circuit of the iterative cell is derived from its switching rule;
  the two-idle state is this design's choice (see above).
* The insides of an arbitrary m×m module (such as 6×6) are not given, so
  `compressor_leaf` is a functional prefix-count design, not a network of
  2×2 cells.
* Each initial parity is written as its own expression. Parities of later
  stages could reuse those of earlier stages to save gates; this RTL leaves
  any such sharing to synthesis.
* The running-parity chains ripple through up to N/2 cells per stage, in a
  single cycle. No training sequence and no tree-based parity distribution
  are built to deal with skew within a stage.
* The registers at the top and the reset behaviour are additions; the
  networks themselves are combinational.
* `d_start` values at or above the port count are not checked.

## Simulating

Every file holds one module or package. The testbenches in `tb/` print
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sorter_pkg.sv tb/tb_ref_pkg.sv tb/tb_compressor_top.sv \
    --top-module tb_compressor_top
./obj_dir/Vtb_compressor_top
```

`tb_compressor_top` runs the whole design at its default sizes for 400
slots (about half a minute). It counts each mechanism: plain sort, cyclic
start, wrap-around, slots A and B, a slot B in which a lower input wins an
output it loses in slot A, full and empty slots, and start addresses taken
from D' on both sides. Block testbenches: `tb_iterative_cell`, `tb_rp_init`,
`tb_baseline_swap_network`, `tb_baseline_swap_compressor`,
`tb_fairness_ctrl`, `tb_compressor_leaf`, `tb_compressor_2x`,
`tb_compressor_2x_nested`. The shared reference model is
`tb/tb_ref_pkg.sv`.
