# Residue-to-binary converter for the moduli set {2P+1, 2P, 2P−1}

This is a combinational converter from a residue number system (RNS) to binary. It takes the three residues of a number X,

* x1 = X mod m1, with m1 = 2P+1
* x2 = X mod m2, with m2 = 2P
* x3 = X mod m3, with m3 = 2P−1

and returns X in [0, M), where M = m1·m2·m3. The three moduli are pairwise coprime for every P ≥ 2. Note that they are 2·P, not powers of two.

A textbook Chinese-remainder converter needs reductions modulo M and modulo several moduli. This design needs neither. Only one term is reduced, modulo m3. That reduction, the odd-parity half-modulus term and the final mod-M fix all happen in a single corrective addition, made before the last multiplication. The product terms use radix-8 Booth multipliers. Every carry-propagate adder is a parallel-prefix adder.

## The arithmetic

Because m2 ≡ −1 (mod m1), and m2 ≡ 1 and m1 ≡ 2 (mod m3), the value can be written as

    X = m2·(x2 − x1) + x2 + m1·m2·k        (then + M if this is negative)

    k = | (x1 + x3)/2 − x2 |_m3            when x1 + x3 is even
    k = | (m3 + x1 + x3)/2 − x2 |_m3       when x1 + x3 is odd

You can check each modulus directly:
* **mod m2:** the expression leaves x2.
* **mod m1:** −(x2 − x1) + x2 = x1.
* **mod m3:** (x2 − x1) + x2 + 2k = x3.

The sum before the fix lies in (−M, M), so at most one +M is ever needed. It can be negative only when k = 0 and x1 > x2. In that case raising k from 0 to m3 adds exactly m1·m2·m3 = M. The converter therefore never reduces modulo M: it produces a corrected term k′ ∈ [0, m3] and multiplies that by m1·m2.

## The correction step

This is the least obvious part of the design. Adder B computes the doubled provisional sum

    T = x1 + x3 − 2·x2        T ∈ [−2·m3, 2·m3]

Working with 2·S avoids halving a possibly odd number. T[0] is the parity of x1+x3. Adding m3 to T adds m3/2 to S, so the odd case's extra m3/2 becomes one more correction constant. Adder C then computes T + c. The result is always even and lies in [0, 2·m3]. Dropping its LSB gives k′.

The correction c is one of five constants: −m3, 0, m3, 2m3 and 3m3. The comparator picks it from the parity of T, from T compared with −m3, 0 and +m3, and from the sign of adder A (x1 > x2):

| parity of T | condition                 | c     | resulting k′                 |
|-------------|---------------------------|-------|------------------------------|
| even        | T < 0                     | +2m3  | T/2 + m3                     |
| even        | T = 0 and x1 > x2         | +2m3  | m3 (this is the +M fix)      |
| even        | otherwise                 | 0     | T/2                          |
| odd         | T < −m3                   | +3m3  | (T + m3)/2 + m3              |
| odd         | T > m3                    | −m3   | (T + m3)/2 − m3              |
| odd         | otherwise                 | +m3   | (T + m3)/2                   |

Three boundary cases need no extra hardware:
* **Even T = 2·m3.** It only occurs for x2 = 0, x1 = 2P, x3 = 2P−2. Strict reduction would give k = 0, but here x1 > x2, so k′ = m3 is what the +M fix needs anyway. The even case never needs −2m3.
* **Odd T = m3.** It always has x1 > x2, so the plain +m3 already gives k′ = m3.
* **Odd T = −m3.** It gives k = 0 but never has x1 > x2, so no +M is needed there.

With these, the five constants cover every valid input. The end-to-end testbench shows that each row of the table and each of the three ways k′ = m3 arises actually occurs.

## Datapath

Everything is combinational (`rtl/rns_reverse_converter.sv`):

```
x1, x2     -> adder A:  A = x2 - x1  --------------> m2 MAC:   p1 = m2*A + x2 --+
                           | sign(A)                                            |
x1, x2, x3 -> adder B:  T -+-> comparator -> mux (c)                            +-> adder D: X = p1 + p2
                           |                   |                                |
                           +-----------> adder C: k' = (T + c) >> 1             |
                                               +--> m1m2 MAC: p2 = m1*m2*k' ----+
```

| file | role |
|------|------|
| `rns_pkg.sv` | `corr_sel_e`, the mux select type, and width functions `res_width(P)` and `out_width(P)` |
| `prefix_adder.sv` | Sklansky parallel-prefix adder with carry in; the CPA used everywhere |
| `csa_3to2.sv` | row of full adders (3:2 carry-save) |
| `adder_a.sv` | A = x2 − x1 on WR+1 bits, plus its sign |
| `adder_b.sv` | T = x1 + x3 − 2·x2: one CSA, then a prefix CPA with carry in 1 |
| `corr_comparator.sv` | the selection rule in the table above |
| `corr_mux.sv` | the constants −m3, 0, m3, 2m3, 3m3 |
| `adder_c.sv` | T + c; drops the LSB to give k′ |
| `booth_r8_mac.sv` | radix-8 Booth multiplier with an addend, p = x·y + z |
| `adder_d.sv` | two-input prefix adder, X = p1 + p2 |

**The multipliers.** The variable operand (A, or k′ with a zero sign bit) is Booth recoded into radix-8 digits in {−4…4}. The constant m2 or m1·m2 is the multiplicand, and its hard multiple 3× comes from a prefix adder. A negative digit inverts its row and puts a 1 at the row's weight in a separate correction row. The rows are reduced by a chain of 3:2 compressors and summed by one prefix adder.

For the m2 product the addend port carries x2, so adder D needs only two inputs. The m1·m2 multiplier has addend 0. At the default P both recoded operands are 9 bits wide, so each multiplier has exactly three partial products.

## Parameters, widths and timing

The top has one parameter, `P` (default 127). Everything else is derived from it.

| quantity | formula | P = 127 |
|----------|---------|---------|
| moduli | 2P+1, 2P, 2P−1 | 255, 254, 253 |
| M | m1·m2·m3 | 16 386 810 |
| residue ports x1, x2, x3 | `res_width(P)` = bits for 2P | 8 |
| output x | `out_width(P)` = bits for M−1 | 24 |
| A, Booth operand of the m2 multiplier | WR+1 (signed) | 9 |
| T, adders B and C | WR+3 (signed) | 11 |
| k′ | WR | 8 |
| partial products per multiplier | ceil((WR+1)/3) | 3 |

The design has no clock and no reset. The output is valid one combinational path delay after the inputs settle.

Inputs must be valid residues: x1 ≤ 2P, x2 ≤ 2P−1 and x3 ≤ 2P−2. Otherwise the output is undefined. For valid inputs, an immediate assertion in the top checks that adder C's result is even and lies in [0, 2·m3].

To change P, override the parameter: `rns_reverse_converter #(.P(20))`. P must be at least 2. For P above 127 the multipliers simply get more partial products; no other change is needed.

## What is the design's own choice

These points are not fixed by the converter's description and were chosen here:

* **P = 127.** No value of P is given. 127 is the largest P with 8-bit residues, and it gives the three partial products per multiplier that the structure is built around.
* **The correction table.** It was derived from the conversion equations, including the three boundary cases, and matches the five correction constants of the block diagram.
* **Adder and reduction structures.** The Sklansky prefix tree, the Booth row format and the linear CSA chain are choices made here. The products are ordinary integer products, with no modular reduction inside the multipliers.
* **No pipeline registers.**
* **Adder D has two inputs.** The x2 term that the block diagram feeds into adder D is added inside the m2 multiplier. The description allows this as an option.

Gate-level results (cell count, area, power, slack) and a layout exist for the original design. They depend on a P and a cell library that are not known here, and this RTL does not reproduce them.

## Testbenches

Each testbench in `tb/` is self-checking. Each ends by printing `TB_RESULT checks=N failures=F`, and each has a clock-count watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rns_reverse_converter_full` | default P = 127, every X in [0, M): 16.4 M conversions, about 40 s |
| `tb_rns_reverse_converter` | P = 20 and P = 3, every X; counts every correction kind and every +M path |
| `tb_prefix_adder` | 16-bit corner and random cases; 7-bit exhaustive |
| `tb_booth_r8_mac` | both multiplier shapes, every 9-bit y, extreme and random x; checks three partial products |
| `tb_adder_a` | exhaustive over 8-bit pairs |
| `tb_adder_b` | exhaustive at 5 bits; corners and random at 8 bits |
| `tb_corr_comparator` | every residue triple at P = 20, against a number-theoretic reference |
| `tb_corr_mux` | every select at two values of m3 |
| `tb_adder_c` | every T with every correction at m3 = 253 |
| `tb_adder_d` | random and corner sums at the default widths |

Expected values come from the `%` and `*` operators on integers, never from the RTL itself. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv \
    tb/tb_rns_reverse_converter_full.sv --top-module tb_rns_reverse_converter_full
./obj_dir/Vtb_rns_reverse_converter_full
```

Replace the testbench name to run any of the others. Lint with `verilator --lint-only -Wall -Irtl rtl/rns_pkg.sv rtl/<module>.sv`. The remaining warnings are about unused carry-out pins and unused high bits of adder sums and carry-save rows, which the datapath does not need.
