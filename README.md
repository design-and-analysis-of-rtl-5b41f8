# Braun array multiplier with a Ladner-Fischer final adder

An unsigned N x N array multiplier (default 4 x 4) is split into two parts.
The first part adds the partial products in carry-save form, so no carry has
to travel sideways. The second part is a single carry-propagate addition at
the end. A textbook Braun multiplier uses a ripple-carry adder for that last
addition, and its delay grows linearly with N. Here the ripple-carry adder is
replaced by a Ladner-Fischer parallel prefix adder, whose carries settle in
about log2(N) cell delays. Everything else is the ordinary Braun array.

The whole multiplier is combinational: no clock, no registers, no handshake.
Apply `x` and `y`, and `p = x * y` is valid one array delay later.

```
          x[3:0]
            |
  y[0] -> [stage 1: AND row + carry-save row] -> p[0]
            |  sum / carry vectors (3 + 3 bits)
  y[1] -> [stage 2: AND row + carry-save row] -> p[1]
            |
  y[2] -> [stage 3: AND row + carry-save row] -> p[2]
            |
  y[3] -> [stage 4: AND row + carry-save row] -> p[3]
            |  two 3-bit vectors, weights 2^4 .. 2^6
      [3-bit Ladner-Fischer prefix adder, cin = 0]
            |
          p[7:4]   (p[7] is the adder's carry-out)
```

## Modules

| module | file | role |
|---|---|---|
| `braun_lf_multiplier` | `rtl/braun_lf_multiplier.sv` | top: N stages chained, then the prefix adder |
| `csa_stage` | `rtl/csa_stage.sv` | one stage: N AND gates and N-1 full adders |
| `ladner_fischer_adder` | `rtl/ladner_fischer_adder.sv` | WIDTH-bit prefix adder with carry-in |
| `full_adder` | `rtl/full_adder.sv` | one-bit full adder cell |

Parameters: `braun_lf_multiplier.N` (default 4, any N >= 2),
`csa_stage.N` (default 4, N >= 2), `ladner_fischer_adder.WIDTH` (default 3,
WIDTH >= 1). The multiplier sets its stages to `N` and its adder to
`WIDTH = N - 1`.

## How the carry-save stages keep their books

This is the part that is easiest to get wrong when changing the code.

Between stages, the partial result is held as two (N-1)-bit vectors, `s` and
`c`. Bit i of both vectors has the weight of column i of the *next* stage,
which is weight 2^(k+i) for stage k (counting from 0). Stage k works like
this:

1. It forms `pp[i] = x[i] & y[k]`, of weight 2^(k+i).
2. For i = 0 .. N-2 a full adder adds `pp[i]`, `s_in[i]` and `c_in[i]`. Its
   sum has the weight of column i. Its carry has the weight of column i+1.
3. The sum of column 0 has nothing more to come and leaves as product bit
   `p[k]`.
4. The outgoing sum vector is the column sums shifted down one place,
   `s_out[i] = sum[i+1]`. Its top bit is `pp[N-1]`: nothing of that weight has
   arrived yet, so this partial product needs no adder.
5. The outgoing carry vector keeps its index, `c_out[i] = carry[i]`: a carry
   out of column i has weight 2^(k+i+1), and that is column i of stage k+1.

Every stage therefore conserves the weighted sum

    p_bit + 2 * (s_out + c_out) = (x if y_bit else 0) + s_in + c_in

and the testbench of `csa_stage` checks exactly this identity.

The first stage gets all-zero vectors. Its adders then just pass the partial
products through, and synthesis removes them. A hand-drawn Braun array leaves
them out; they are kept here so that all N stages are the same module, as in
the four identical stage blocks of the published block diagram. After the
last stage, `s` and `c` hold the weights 2^N .. 2^(2N-2). Their sum is
`p[2N-1:N]`.

## The Ladner-Fischer prefix adder

The adder computes `{cout, sum} = a + b + cin` in three steps:

* **Bitwise step.** Propagate `p_i = a_i ^ b_i` and generate `g_i = a_i & b_i`.
* **Prefix tree.** Pairs (G, P) are merged with the carry operator
  `(G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo)`. That is one OR and two AND
  gates per cell.
* **Sum step.** `sum_i = p_i ^ carry_i`.

The carry-in is handled as an extra tree position below bit 0, with
generate `cin` and propagate 0. So tree node j (j = 0 .. WIDTH) covers
`{bit j-1 .. bit 0, cin}`. Its final G is the carry into bit j, and node
WIDTH gives `cout`.

The tree has the minimum-depth Ladner-Fischer shape. At level l, every node
whose index has bit l set merges with the last node of the aligned block of
2^l nodes just below it. Nodes without bit l set pass through unchanged.
That gives ceil(log2(WIDTH+1)) levels. For the default WIDTH = 3 (nodes
0..3):

```
node:     3(b2)   2(b1)   1(b0)   0(cin)
level 0:  3<-2            1<-0
level 1:  3<-1    2<-1
```

Node 3 carries `cout`. Nodes 1, 2 and 3 give the carries into bits 0, 1
and 2.

In this shape, the fan-out of a node doubles from one level to the next.
Other prefix trees trade depth for fan-out. Kogge-Stone keeps fan-out at 2
but needs more cells. Brent-Kung needs fewer cells but about twice the
depth. Either could replace the tree loop without touching the rest of the
multiplier. Those variants are not included here.

## What comes from the published design and what does not

Taken from it:
* An unsigned 4 x 4 Braun array.
* Four stages, each taking one multiplier bit and producing one product
  bit.
* A parallel prefix adder in place of the ripple-carry adder in the last
  stage.
* The 3-bit Ladner-Fischer adder with a carry-in.
* The propagate/generate/sum equations and the one-OR-two-AND carry cell.

Choices made here:
* **Product width.** The product is 2N = 8 bits wide. The block diagram
  names eight outputs, P0..P7, although its legend calls the product
  7 bits. An 8-bit output is the only width that holds 15 x 15.
* **Stage internals.** The cells inside a stage follow the classic Braun
  arrangement described above. The published description does not detail
  them.
* **Prefix tree shape.** The exact placement of nodes in the prefix tree is
  the standard minimum-depth Ladner-Fischer form.
* **Final adder carry-in.** The final adder's carry-in is tied to 0.
* **Timing.** There are no pipeline registers. The design was published as
  a combinational circuit and characterised by propagation delay only.

Not reproduced: the published results are transistor-level power, delay
and power-delay figures for a 130 nm process. RTL says nothing about them.
The 4 x 4 multiplier synthesises to about 50 generic gates: roughly 24
AND, 9 OR and 17 XOR cells after coarse synthesis.

## Verification

Each testbench checks its block against plain integer arithmetic. At the
end it prints `TB_RESULT checks=<n> failures=<m>`. It also has a watchdog
that fails the run if the test hangs.

| testbench | what it covers |
|---|---|
| `tb/tb_ladner_fischer_adder.sv` | exhaustive at WIDTH 1, 3 and 8; 20000 random plus corner cases at WIDTH 16; full-width carry propagation counted |
| `tb/tb_csa_stage.sv` | exhaustive at N = 4 (2048 input sets), random at N = 7; weighted-sum identity plus every output bit |
| `tb/tb_braun_lf_multiplier.sv` | default 4 x 4, all 256 operand pairs (see below) |
| `tb/tb_braun_lf_multiplier_sizes.sv` | N = 2 exhaustive, N = 8 exhaustive (65536 pairs), N = 16 random plus corner cases |

`tb_braun_lf_multiplier` leaves the multiplier at its defaults. Besides the
products, it computes for itself which sum and carry vectors reach the
prefix adder. It then counts how often:
* each stage emits a 1;
* the prefix adder produces a carry-out;
* a carry generated in one bit must propagate through the next;
* the carry vector entering the adder is non-zero.

The run fails if any of these never happens.

All of these tests pass. Each one also fails when a single deliberate fault
is put into its block. The faults tried were:
* a wrong operand in a prefix cell;
* the product bit taken before the column-0 adder;
* the final carry-in tied to 1.

Run a test with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv --top-module tb_braun_lf_multiplier \
          tb/tb_braun_lf_multiplier.sv
./obj_dir/Vtb_braun_lf_multiplier
```

Lint a module on its own with
`verilator --lint-only -Wall -Irtl -y rtl rtl/braun_lf_multiplier.sv`.
