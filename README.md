# Eight-operand adder on the FPGA fast carry chain

Adding many numbers at once is done best in two phases. First a carry-save
tree reduces the operands to two vectors. No carry crosses the word in this phase.
Then one carry-propagate adder turns the pair into a binary sum. The classic
tree is made of full adders (3:2 counters). Mapped directly onto an FPGA, such a
tree puts every full adder into LUTs and ignores the dedicated carry chain. The
carry chain is the fastest routing in the fabric.

This design builds its tree from a four-operand unit that uses the carry chain
on purpose. A four-operand carry-save adder normally has two rows of full
adders. Here the first row stays a row of full adders. It compresses three operands into a sum
row and a carry row. The second row is replaced by an ordinary ripple
addition of that sum row and the fourth operand, and that addition runs on the
fast carry chain. Two such units and a third one, one bit wider, form an
eight-operand tree. A final adder, also on the carry chain, gives the sum.

The RTL is generic SystemVerilog. The carry chain is written as logic, not as a
vendor primitive, so it simulates and synthesizes anywhere. An FPGA synthesis
tool may or may not map it back onto the chain.

## Structure

```
mo_add8_top            pipeline registers, valid bits, reset
├── mo_add8_tree       8 operands (N bits) -> carry-save pair (N+2 bits each)
│   ├── csa4_cc  N     operands a[0..3]
│   ├── csa4_cc  N     operands a[4..7]
│   └── csa4_cc  N+1   the four first-level vectors
│       ├── csa3_row   row of full_adder cells on we[0], we[1], we[2]
│       └── carry4 x ceil(width/4)   chain adding the row's sum bits and we[3]
└── cpa      N+2       final carry-propagate adder on carry4 segments
mo_add_pkg             shared constants (segment size 4, operand counts)
```

## The carry-chain four-operand unit (`csa4_cc`)

This unit is the core of the design, and the one place where the arithmetic
is not obvious.

For each bit `i`:

1. A full adder takes `we[0][i]`, `we[1][i]` and `we[2][i]`. It gives the sum
   bit `fs[i]` and the carry `c[i]`. The carry has weight 2^(i+1) and leaves the
   unit directly, as the carry vector.
2. One LUT forms the propagate bit `p[i] = fs[i] ^ we[3][i]`.
3. The carry-chain multiplexer of bit `i` is selected by `p[i]`:
   - If `p[i]` is 1, it passes the carry coming from bit `i-1`.
   - Otherwise it passes `we[3][i]`. When `p = 0`, the two addends are equal,
     so each of them is the generated carry.
4. The chain XOR gives `s[i] = p[i] ^ carry_in(i)`.

The chain's carry into bit 0 is the input `d`. Its carry out of bit N-1 is
`s[N]`. So:

```
we[0] + we[1] + we[2] + we[3] + d  =  s + 2*c
s : N+1 bits  (chain sum, MSB = chain carry out)
c : N bits    (full-adder carries; as a vector of weight 2^i it is {c, 1'b0})
```

Both carry-save vectors are N+1 bits wide. That is what lets the units stack
into a tree.

The delay is one LUT level plus a ripple along the chain. On an FPGA the chain
is much faster per bit than general routing. In an ASIC this unit would be
slower than a two-row full-adder CSA, because the ripple grows with N.

`carry4` is one 4-bit segment of the chain: four multiplexer/XOR pairs. Its
ports are named after the pins of the FPGA primitive (`ci`, `di`, `sel`, `o`,
`co`). Longer chains are built by feeding `co[3]` into the next segment's `ci`.
`cpa` uses the same segments with `sel = a ^ b` and `di = a`.

## The eight-operand tree (`mo_add8_tree`)

```
a[0..3] -> csa4_cc (N)   -> S1 (N+1), C1 = {c1, 0} (N+1)
a[4..7] -> csa4_cc (N)   -> S2 (N+1), C2 = {c2, 0} (N+1)
{C1, S1, C2, S2} -> csa4_cc (N+1) -> s4 (N+2), c4 = {c, 0} (N+2)
```

`S2` goes onto the second-level chain. The other three vectors go into its
full-adder row. All three chain carry inputs are tied to 0. The tree's result
satisfies `a[0] + ... + a[7] = s4 + c4`. The LSB of `c4` is always 0. Because `C1` and `C2` both end in 0 and both enter
the same full-adder row, bit 1 of `c4` is always 0 as well. The true
sum needs N+3 bits and never overflows.

## Pipeline and interface (`mo_add8_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous, active-low; clears all registers |
| `in_valid` | in | 1 | `a` holds an operand set this cycle |
| `a` | in | 8 x N | operands, unsigned |
| `cs_valid` | out | 1 | `s_cs`, `c_cs` valid |
| `s_cs`, `c_cs` | out | N+2 | registered carry-save pair of the tree |
| `out_valid` | out | 1 | `sum` valid |
| `sum` | out | N+3 | `a[0] + ... + a[7]` |

The design has three register stages:

1. The input register.
2. The register on the carry-save pair, after the tree.
3. The register on the sum, after the final adder.

An operand set that is sampled with `in_valid` on one rising edge has these latencies:

- `cs_valid` is high after two more rising edges.
- `out_valid` is high after three more rising edges.

The design accepts one set per cycle. It never stalls and has no back-pressure. Operands are
unsigned. For two's-complement inputs, sign-extend them and keep the low bits
of the result.

Parameter: `N` (default 16, operand width). Every module takes its width as a
parameter. `csa4_cc` defaults to 16, `csa3_row` to 5 and `cpa` to 18.

## What comes from the source design and what does not

These parts follow the published design:

- the two-layer structure of the carry-chain unit, with one full-adder row and a
  ripple chain that adds the fourth operand;
- the multiplexer/XOR form of the chain and its 4-bit segments;
- the port names `we`, `d`, `s` and `c`;
- the output widths: an N+1-bit `s` and an N-bit `c`;
- the two-level eight-operand tree, with widths N, N+1 and N+2;
- the 16-bit default of the eight-operand adder.

These are choices of this implementation:

- Register placement, valid bits and reset. The reference gives flip-flop counts
  and clock periods but does not say where the registers are. As a result the
  register counts do not match its figures, for example 448 flip-flops for the
  16-bit eight-operand adder.
- The final carry-propagate adder (`cpa`). The reference describes two-phase
  addition but stops the tree at the carry-save pair. That pair is still
  available on `s_cs`/`c_cs`.
- Which operand of each unit drives the chain, and the order of the
  second-level inputs. The operands are interchangeable.
- Chain carry inputs tied to 0 inside the tree.
- Segment count. The 17-bit second-level unit uses five 4-bit segments, so the
  tree has 13 in total. The reference reports 12 for this size.

Not built:

- the two-row full-adder four-operand CSA and the adder made of two binary
  adders in series. These are the ASIC forms that the carry-chain unit replaces.
- the HLS-generated adders that the reference compares against.
- FPGA I/O and clock buffers. These are left to the implementation tools.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_full_adder`: checks all 8 input combinations.
- `tb_csa3_row`: checks all 2^15 operand triples at 5 bits. It checks sums and
  carries column by column, and `s + 2c` as a whole.
- `tb_carry4`: checks all 512 combinations of `ci`, `di` and `sel`. Every output
  is compared with `a + b + ci`, where `a = di` and `b = di ^ sel`.
- `tb_csa4_cc`: runs the unit at widths 4, 5, 8, 16 and 32, side by side, with
  corner-case and random operands. It checks three things, each against a
  reference written separately:
  - the carry row is the bitwise majority of the first three operands;
  - the chain sum equals `(we0^we1^we2) + we3 + d`;
  - `s + 2c` equals the total.
  It also requires that chain carry-outs and carries crossing segment
  boundaries occur.
- `tb_cpa`: runs the 18-bit adder with random operands and the full-ripple
  corner cases.
- `tb_mo_add8_tree`: runs the 16-bit tree with all-ones, one-hot and 20,000
  random operand sets.
- `tb_mo_add8_top`: runs the whole design at its default width, N = 16. It sends
  5,000 random operand sets, plus the all-ones and all-zeros sets, mostly back
  to back with random idle cycles. A scoreboard checks every `s_cs + c_cs` and
  every `sum`. It also checks the exact latencies of 2 and 3 cycles and the
  state after reset. It counts the following events and fails if any of them
  never occurs:
  - carry-outs of the first-level and second-level chains;
  - the final carry-out;
  - segment-boundary carries;
  - back-to-back sets;
  - idle cycles.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mo_add_pkg.sv \
          tb/tb_mo_add8_top.sv --top-module tb_mo_add8_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run a different one. Each testbench
simulates in about a second once it is built.

Lint reports that the zero-padding bits at the top of the last chain segment
in `csa4_cc` and `cpa` are unused. This is intended: the chain is always a whole
number of 4-bit segments.

## Changing the design

- Operand width: set `N` on `mo_add8_top`. All internal widths follow.
- More operands: the units compose the same way. Each level of units adds one
  bit to both vectors. A 16-operand tree, for example, is four N-bit units,
  then two (N+1)-bit units, then one (N+2)-bit unit.
- Lower latency: the carry-save and output registers can be removed. The tree
  and the adder are purely combinational.
