# Majority-gate binary adder with a two-bits-per-gate carry chain

This is an N-bit binary adder (64 bits by default) built only from
three-input majority gates and inverters: the two primitives that
quantum-dot cellular automata (QCA) provide directly. In QCA every majority
gate on a path costs delay, so the design keeps the carry chain short. It
adds **one majority gate per two bit positions**. The worst-case path of an
N-bit addition is N/2 + 3 majority gates plus one inverter: 35 gates and one
inverter for 64 bits.

The RTL describes the gate netlist as plain, synthesizable, combinational
SystemVerilog. Each majority gate is an instance of `maj3`, so the code
follows the gate-level structure one to one and gate counts and depths can
be read off it.

## The majority gate

`M(a, b, c) = a·b + b·c + a·c`. Tying one input to a constant gives the
two-input gates:

* `M(a, b, 0) = a AND b`
* `M(a, b, 1) = a OR b`

The carry of a full adder is itself a majority: `c_out = M(a, b, c_in)`.

## Carry network (`carry_block`)

### The 2-bit module (`two_bit_module`)

Each module handles the bit pair (i, i+1) with six majority gates:

| signal  | gate                          | meaning                                             |
|---------|-------------------------------|-----------------------------------------------------|
| `p_i`   | `M(a_i, b_i, 1)`              | propagate of bit i                                  |
| `g_i`   | `M(a_i, b_i, 0)`              | generate of bit i                                   |
| `x`     | `M(a_i+1, b_i+1, p_i)`        | carry out of bit i+1 if the carry into bit i is 1   |
| `y`     | `M(a_i+1, b_i+1, g_i)`        | carry out of bit i+1 if the carry into bit i is 0   |
| `c_i+2` | `M(x, y, c_i)`                | carry into bit i+2                                  |
| `c_i+1` | `M(p_i, g_i, c_i)`            | carry into bit i+1 (off the chain)                  |

This module is the key to the speed. `x` and `y` depend on the operands
only, so they settle in parallel everywhere in the adder. Once the carry
`c_i` arrives, one gate chooses between them. The choice is a majority
gate because `y` implies `x`:

* if `x = y`, the result is that common value;
* if `x = 1` and `y = 0`, the result is `c_i`.

So a carry moves two bit positions per gate. The odd carry `c_i+1` is
formed from the same `c_i` beside the chain, not in series with it.

### Least significant pair (`lsb_module`)

The adder has no carry input (carry-in is 0), so bit 0 needs no propagate
signal and its module is reduced to two gates:

* `g_0 = M(a_0, b_0, 0)`
* `c_1 = g_0`
* `c_2 = M(a_1, b_1, g_0)`

### Cascade

`carry_block` uses one `lsb_module` for bits 0 and 1, then N/2 − 1
`two_bit_module`s. Each module takes its `c_i` from `c_i+2` of the module
below. The block outputs:

* `c[1..N]`, where `c[N]` is the carry out;
* `pe[k]` and `ge[k]`, the propagate and generate of each even bit 2k. The
  sum network reuses them.

## Sum network (`sum_block`)

Each sum bit uses one inverter on its own carry out, `c_i+1`, and two
majority gates. The form depends on the position:

* **odd bit i:** `s_i = M(~c_i+1, c_i, M(~c_i+1, a_i, b_i))`
* **even bit i ≥ 2:** `s_i = M(~c_i+1, p_i, M(~c_i+1, g_i, c_i))`
* **bit 0:** `s_0 = M(~c_1, 0, M(~c_1, a_0, b_0))`

Why the odd form works:

* If `a_i = b_i`, the inner gate returns `a_i` and the outer one returns
  `c_i`.
* If `a_i ≠ b_i`, then `c_i+1 = c_i`, and both gates return `~c_i`.

The even form is the same argument with `(p_i, g_i)` in place of
`(a_i, b_i)`. Even cells reuse p and g from the carry block, so they need
no operand gates of their own. As a result, `sum_block` reads only the odd
operand bits and bit 0. Lint tools report the even operand bits as unused.

## Critical path

The slowest case is a carry generated in bit 0 (`a_0 = b_0 = 1`) and
propagated through every higher position (`a_i ≠ b_i`). It passes:

* 2 gates in `lsb_module` to reach `c_2`;
* 1 gate in each of the (N−2)/2 further modules to reach `c_N` (N/2 + 1
  gates in all);
* 1 inverter and 2 gates in the top sum cell.

That makes N/2 + 3 majority gates and one inverter. The RTL is zero-delay,
so this depth comes from the structure and is not measured in simulation.
The testbenches check this input pattern functionally. The end-to-end test
counts how many times it occurs and fails if it never does.

## What is modelled and what is not

* **Clocking.** QCA circuits are driven by four clock phases applied to
  zones of cells, and each zone acts like a latch. A physical layout is
  therefore pipelined. The zone assignment depends on the cell layout,
  which is not part of this RTL. The adder here is the combinational
  function of the gate netlist, with no clock and no reset.
* **Cells.** The four-dot QCA cell and the wires made of cells have no RTL
  counterpart. A wire here is a net.
* **Carry out.** `cout` (= `c_N`) is brought out as a port. The carry
  network produces it anyway.
* **Gate inputs in the sum cells.** The position of each signal within a
  sum cell is this design's choice. The inputs of each cell (the operands,
  or p and g, plus the two carries) are fixed, and the choice is the
  assignment that gives a correct sum. Bit 0 uses the odd-bit form with
  `a_0`, `b_0` and carry-in 0, because p_0 is not formed.
* **Width.** N must be even and at least 4. An elaboration-time assertion
  checks this.

## Modules

| module           | role                                               | parameters |
|------------------|----------------------------------------------------|------------|
| `qca_adder`      | top: `{cout, s} = a + b`                           | `N = 64`   |
| `carry_block`    | all carries, plus p and g of the even bits         | `N = 64`   |
| `sum_block`      | all sum bits                                       | `N = 64`   |
| `two_bit_module` | six-gate carry module for bits i, i+1              | –          |
| `lsb_module`     | two-gate carry module for bits 0, 1                | –          |
| `maj3`           | three-input majority gate                          | –          |

Top-level ports: `a[N-1:0]`, `b[N-1:0]` (inputs), `s[N-1:0]`, `cout`
(outputs).

Gate count for N = 64: 2 (lsb) + 6 × 31 (modules) + 2 × 64 (sum) = 316
majority gates and 64 inverters.

## Testbenches

Each testbench checks against values it computes independently from
integer addition. Each prints `TB_RESULT checks=<n> failures=<n>`. A
watchdog ends any run that hangs.

| testbench             | what it does                                                                                   |
|-----------------------|------------------------------------------------------------------------------------------------|
| `tb_maj3`             | all 8 input combinations                                                                       |
| `tb_lsb_module`       | all 16 combinations of two 2-bit operands                                                      |
| `tb_two_bit_module`   | all 32 combinations, including the carry in                                                    |
| `tb_carry_block`      | N = 64: every carry, p and g, on corner cases and 2000 random pairs                            |
| `tb_sum_block`        | N = 64: fed with ideal carries, checks the sum                                                 |
| `tb_qca_adder`        | end to end at the default N = 64; counts full-length ripples, carry outs and carry-free sums |
| `tb_qca_adder_widths` | 4 bits exhaustively; 8, 16, 32 and 128 bits on corner cases and random pairs (helper `adder_width_check`) |

To run one with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_qca_adder tb/tb_qca_adder.sv
./obj_dir/Vtb_qca_adder
```

To change the width, override `N` on `qca_adder`, for example
`qca_adder #(.N(32))`. Any even N ≥ 4 gives a correct adder with a
worst-case depth of N/2 + 3 gates.
