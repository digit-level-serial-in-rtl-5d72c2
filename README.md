# Digit-level serial-in parallel-out multipliers with a Brent-Kung adder

A serial-in parallel-out (SIPO) multiplier holds one operand, B, in parallel. The
other operand, A, arrives a few bits at a time. With a digit of W bits per clock,
an N-bit product takes ceil(N/W) cycles. In each cycle the multiplier ANDs the digit
with B and adds the result into flip-flop accumulators. When the last digit has been
taken, the whole product sits in those flip-flops and is read out in parallel.

The speed of such a multiplier depends on the adder inside its accumulation loop. This
design uses a **Brent-Kung parallel-prefix adder** there. Its carry chain has
2·log2(N)−1 cell levels instead of N, and it uses few prefix cells and little wiring.

The RTL contains two multipliers built on this scheme:

| multiplier | module | arithmetic | default size | cycles per product |
|---|---|---|---|---|
| integer | `sipo_bk_multiplier` | unsigned integers; partial products summed by Brent-Kung adders | 16 × 16 → 32 bits, 4-bit digits | 4 |
| redundant basis | `rb_sipo_multiplier` | symmetric redundant-basis product over GF(2), carry-free | n = 19 (9 independent coordinates), 4-bit digits | 3 |

`dl_sipo_top` places the two side by side on one clock and reset. Each has its own
ports.

## The Brent-Kung adder (`bk_adder`)

The adder is combinational. It works in three stages.

1. **Pre-processing.** Each bit gets a propagate and a generate:
   `P_i = A_i ^ B_i`, `G_i = A_i & B_i`. The carry input is folded into bit 0:
   `G_0 = A_0 & B_0 | P_0 & cin`.
2. **Carry generation.** A prefix tree merges neighbouring groups of bits. A merge
   computes `G = G_hi | P_hi & G_lo`, plus `P = P_hi & P_lo` where that is still
   needed.
   - A **black cell** (`bk_black_cell`, three gates) produces both G and P.
   - A **gray cell** (`bk_gray_cell`, two gates) produces only G. It is used wherever
     the merged group reaches bit 0: that G is already the final carry, and no later
     cell needs its P.
3. **Post-processing.** `sum_i = P_i ^ c_i`. The carry into bit i+1 is the group
   generate of bits i..0.

The tree has the Brent-Kung shape. Let PW be WIDTH rounded up to a power of two.

- **Up-sweep**, levels l = 0 … log2(PW)−1. At level l, each position i with
  (i+1) mod 2^(l+1) = 0 merges with position i − 2^l. After level l, position
  2^(l+1)−1 holds the final carry of bits 2^(l+1)−1..0.
- **Down-sweep**, levels l = log2(PW)−2 … 0. At level l, each position i with
  (i+1) mod 2^(l+1) = 2^l, other than the first such position, merges with
  position i − 2^l, which is already final. This fills in every remaining carry.

The RTL builds one generate block per tree level (`st[s]`), each with its own G and P
vectors. Widths that are not a power of two are padded inside the tree with
G = P = 0. The default WIDTH is 32. The testbench also checks 8, 13 and 16 bits.

Cell count at 32 bits: 26 black and 31 gray cells over 9 levels.

## Integer multiplier (`sipo_bk_multiplier`)

```
        b_in ──► B shift register (2N bits, moves W left per digit)
                        │
a_digit[t] ──► AND ─────┴── row t = a_digit[t] ? B << t : 0      (t = 0..W-1)
                        │
   acc ──► BK adder ──► BK adder ──► … (W adders, 2N bits each) ──► acc
```

- B is held in a 2N-bit register that shifts W places left after each digit. The W
  partial-product rows of digit j therefore already carry the weight j·W, and no
  barrel shifter is needed.
- The rows are added to the accumulator one after the other, by a chain of W
  Brent-Kung adders. This chain is a multi-operand adder that completes within one
  clock.
- The 2N-bit accumulator cannot overflow. An assertion checks this.
- At the defaults (N = 16, W = 4) each adder is the 32-bit Brent-Kung adder.
- Operands are unsigned.

## Redundant-basis multiplier (`rb_sipo_multiplier`)

**Representation.** Let n = 2m+1, and let β be an n-th root of unity. In a redundant
representation, a finite-field element is the vector of its n coefficients on
β^0 … β^(n−1). Multiplication is the cyclic convolution

    c_k = XOR over i of (a_i AND b_((k − i) mod n))

and needs no modular reduction. Squaring is only a permutation of the coordinates.

This multiplier uses the **symmetric** form: x_0 = 0 and x_i = x_(n−i). Only the m
coordinates x_1 … x_m are independent, and the product is again symmetric. Pairing
each a_i with a_(n−i) turns the convolution into

    c_k = XOR over i = 1..m of a_i AND (b_(k−i) XOR b_(k+i))        k = 1..m

So every output coordinate takes two AND products for each coordinate of A.

**Datapath**, from top to bottom:

- **Circular shift register.** n bits, loaded with all coordinates of B and rotated
  W places left per digit. In digit t it holds r[x] = b_((x − t·W) mod n).
- **Wire expansion.** W(n−1) wires, with no logic. Output c_(k+1) and digit
  position j (A coordinate i = t·W + j + 1) need b_(k+1−i) and b_(k+1+i).
  - b_(k+1−i) is r[(k − j) mod n].
  - Because B is symmetric, b_(k+1+i) = b_(−(k+1+i)), which is r[(−k−j−2) mod n].
  - So both taps are fixed wires from a register that rotates in one direction
    only. This is the point of the symmetric form.
- **Modules.** There are m = (n−1)/2 modules, one per output coordinate.
  - Each module has W structures.
  - A structure holds two AND gates, driven by the two taps and the digit bit
    a_digit[j].
  - Each AND gate feeds its own accumulation unit: an XOR gate into a flip-flop,
    whose output loops back to the XOR.
  - In all, W·m structures with W(n−1) AND gates and W(n−1) flip-flops.
- **XOR network.** Adds the 2W accumulator outputs of each module into its output
  coordinate.

**Ports.**

- `b_in`: all n coordinates of B. An assertion checks that it is symmetric.
- `a_digit`: W independent coordinates of A per digit.
- `product`: the m independent coordinates c_1 … c_m. Bit k of `product` is
  c_(k+1).

At the default n = 19 there are m = 9 coordinates. That is the field GF(2^9), since 2
is primitive modulo 19. With W = 4 a product takes 3 digits, and the top three
positions of the last digit are ignored. Elements are converted to and from the
symmetric form outside this design.

## Handshake and timing (both multipliers)

- `rst_n`: synchronous and active low. It clears the state, the operand register and
  the accumulators.
- `load`: a one-cycle pulse. It captures `b_in`, clears the accumulators and enters
  RUN. A load during RUN abandons the multiplication in progress and starts a new
  one.
- `ready`: high in RUN.
- Digits: on every rising edge with `digit_valid && ready`, the next digit of A
  (lowest digit first) is accumulated. A cycle with `digit_valid` low is a stall, and
  nothing changes.
- `done`: rises on the edge that takes digit ceil(N/W)−1. `product` is valid while
  `done` is high and stays until the next `load`. Digits offered while `done` is high
  are ignored.
- Latency: without stalls, `done` is high ceil(N/W) cycles after the load cycle
  (ceil(m/W) for the redundant-basis multiplier). That is 4 cycles for the integer
  multiplier and 3 for the redundant-basis one. A
  new `load` may follow in the very next cycle.

The state type (`SIPO_IDLE`, `SIPO_RUN`, `SIPO_DONE`) is in `sipo_pkg`.

## What is specified and what is chosen here

Specified by the architecture this RTL implements:

- the three adder stages and their equations;
- the black and gray cells, with gray cells for the final carries;
- adder sizes of 8, 16 and 32 bits, with 32 as the final one;
- the symmetric redundant-basis datapath: n-bit circular shift register, wire
  expansion with W(n−1) outputs, (n−1)/2 modules of 2W AND gates, per-gate
  XOR/flip-flop accumulation and the bottom XOR network;
- digit-serial input of A, parallel output.

Chosen by this design:

- how the Brent-Kung adder is placed inside a multiplier. The integer multiplier with
  its chain of adders is this design's own construction;
- the operand sizes (N = 16 integer, n = 19 redundant basis) and the digit size
  W = 4;
- the exact wire-expansion taps. They are derived from the symmetric convolution
  above;
- the load/ready/done handshake, synchronous reset, lowest-digit-first order and
  restart on load;
- the carry input of the adder;
- how the two multipliers relate at the top level. They are simply placed side by
  side.

## Files

| file | contents |
|---|---|
| `rtl/sipo_pkg.sv` | state type shared by the multipliers |
| `rtl/bk_black_cell.sv`, `rtl/bk_gray_cell.sv` | prefix cells |
| `rtl/bk_adder.sv` | Brent-Kung adder, parameter `WIDTH` (32) |
| `rtl/sipo_bk_multiplier.sv` | integer SIPO multiplier, `N` (16), `W` (4) |
| `rtl/rb_sipo_multiplier.sv` | redundant-basis SIPO multiplier, `N` (19), `W` (4) |
| `rtl/dl_sipo_top.sv` | top level, `INT_N`, `INT_W`, `RB_N`, `RB_W` |
| `tb/tb_*.sv` | one self-checking testbench per module above (not for the cells) |

## Verification

Each testbench compares against values it computes itself and prints
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.

- `tb_bk_adder`: corner cases, a single carry chain started from every bit, and 5,000
  random additions. It runs at 8, 13, 16 and 32 bits against `a + b + cin`.
- `tb_sipo_bk_multiplier` and `tb_rb_sipo_multiplier`: about 2,000 multiplications
  each, half of them with random stalls. The redundant-basis reference expands
  random operands to symmetric form and convolves all n coordinates. Checks cover the product, the latency
  without stalls, `ready` and `done`, and holding the result after `done`.
- `tb_dl_sipo_top`: runs both multipliers concurrently at the default parameters,
  1,500 operations each. It counts stalls, restarts, back-to-back loads, digits
  ignored after `done`, non-zero padding on the last redundant-basis digit, and
  timed operations. Any of these that never happens counts as a failure.

All four pass. Each has also been shown to fail on a deliberately broken copy of its
module.

To simulate, for example the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/sipo_pkg.sv \
        tb/tb_dl_sipo_top.sv --top-module tb_dl_sipo_top
    ./obj_dir/Vtb_dl_sipo_top

Lint a module with `verilator --lint-only -Wall -y rtl rtl/sipo_pkg.sv rtl/<module>.sv`.
One warning remains in `bk_adder`: the P vector of the last tree level is unused,
because gray cells make no propagate.

## Limits

- The integer multiplier's W chained 32-bit adders form one combinational path.
  Nothing here pipelines it. Its clock rate has not been evaluated: no synthesis to
  a technology or timing analysis was done.
- The adder's power, delay and area advantages are properties of its structure. They
  were not measured on this RTL.
- Signed integer operands and conversion of finite-field elements to or from a
  redundant representation are outside this design.
