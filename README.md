# 4x4-bit Vedic multiplier

This is a combinational unsigned 4x4-bit multiplier built with the *Urdhva
Tiryagbhyam* ("vertically and crosswise") rule of Vedic arithmetic. A plain
array multiplier adds four shifted partial-product rows. This design instead
treats each 4-bit operand as two 2-bit digits. It forms all four digit
products at the same time in small 2x2 multipliers, then adds them with 4-bit
ripple carry adders. The structure was conceived for a transistor-level,
low-power implementation, where every gate is a Modified Gate Diffusion Input
(MGDI) cell. The RTL here describes the same gate network at logic level and
leaves the transistor style to the implementation.

## The arithmetic

Split the operands into 2-bit halves, `a = aH·4 + aL` and `b = bH·4 + bL`.
Then

```
a·b = aH·bH·16  +  (aH·bL + aL·bH)·4  +  aL·bL
       vertical        crosswise          vertical
```

Each of the four digit products is at most 9, so it fits in 4 bits.

## Structure of `vedic_mul4`

```
            aL*bL      aL*bH      aH*bL      aH*bH
             m0         m1         m2         m3
             |           \         /          |
   s[1:0] <--+ m0[1:0]    adder A (4 bit)     |
             |            t1, c1              |
             +- m0[3:2] --> adder B           |
                 (0-padded) t2, c2            |
   s[3:2] <------------- t2[1:0]              |
                       c1, c2 -> half adder   |
                                  hc, hs      |
            {hc, hs, t2[3:2]} ---> adder C <--+
                                  |
   s[7:4] <-----------------------+
```

- **m0** (weight 1) gives the two lowest product bits directly. Nothing else
  reaches these bit positions.
- **Adder A** adds the crosswise pair `m2 + m1` into `t1`, with carry `c1`.
- **Adder B** adds `t1` and the upper half of `m0`, zero-extended to 4 bits.
  Its low two sum bits are `s[3:2]`. Its carry is `c2`.
- **The half adder** merges `c1` and `c2`. Both carries have weight 64.
- **Adder C** adds `m3` to `{hc, hs, t2[3:2]}`. That second operand holds
  what is left of the middle sum, aligned to bit 4 of the product. Its sum
  is `s[7:4]`.

Some of these paths can never fire, because of the value ranges:

- `c1` is set only for `a = b = 15`, where the crosswise sum is 18.
- `c1` and `c2` are never 1 together, so `hc` is always 0.
- A product never exceeds 225, so adder C never carries out. Its carry-out
  is left unconnected.

These gates are kept anyway, because the structure calls for them. A
synthesis tool will remove them.

## Building blocks

| Module | What it is |
|---|---|
| `vedic_mul4` | Top level: four `vedic_mul2`, three `rca4` and one `half_adder` |
| `vedic_mul2` | 2x2 Urdhva multiplier. It uses four AND gates. `a0b0` is `p[0]`. A half adder sums the crosswise products `a0b1` and `a1b0` into `p[1]`. A second half adder adds that carry to `a1b1`, giving `p[2]` and `p[3]` |
| `rca4` | Ripple carry adder made of `full_adder` cells. It has a `WIDTH` parameter (default 4) and a carry input |
| `full_adder` | Two XOR gates and one 2:1 multiplexer. `p = a^b`, `sum = p^cin`, `cout = p ? cin : a` |
| `half_adder` | XOR for the sum, AND for the carry |

### Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a` | in | 4 | multiplicand |
| `b` | in | 4 | multiplier |
| `s` | out | 8 | product `a*b` |

None of the modules has a clock or a reset. The product settles one
combinational delay after an input changes. The longest path goes through a
2x2 multiplier, adder A, adder B, the half adder and the carry chain of
adder C.

## What comes from the original design and what does not

These parts follow the original design:

- the decomposition into four 2x2 Urdhva multipliers, three 4-bit ripple
  carry adders and a half adder
- which digit pair each multiplier takes
- where each group of product bits is taken from
- the zero padding in front of adder B
- the gate content of the 2x2 multiplier: AND gates and two half adders
- the gate list of the full adder: two XORs and a MUX

These are choices made in this RTL:

- **Full-adder multiplexer wiring.** Only "two XOR and a MUX" is given. The
  propagate-select form above is the one arrangement that makes a full adder
  from exactly those gates.
- **Half-adder insides.** Only the name is given. It is built as XOR/AND.
- **Bit order at adder C's second input.** The diagram does not number its
  arrows. The order was fixed by the weight of each signal.
- **Carry inputs.** The adders have a carry input, tied to 0.
- **Operand labels.** One 2x2 multiplier is labelled with the wrong operand
  bits in the original diagram. It is wired here as `aH*bL`, which both the
  arithmetic and a second, coarser diagram of the same design require.

These things are outside this RTL:

- **The transistor-level MGDI cells.** An MGDI cell is one PMOS and one NMOS.
  It has a common gate input G and source inputs P and N. Its bulks are tied
  to the supply and ground.
- **The power, delay and area comparison** of MGDI against static CMOS in a
  90 nm process. Those figures belong to a transistor netlist, and RTL cannot
  reproduce them.
- **The baseline CMOS full adder.** It is built from two half adders and an
  OR gate. The design compares against it and does not use it. It computes
  the same function.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints a
`TB_RESULT checks=N failures=M` line and has a watchdog timeout.

| Testbench | What it checks |
|---|---|
| `tb_half_adder` | all inputs, exhaustively |
| `tb_full_adder` | all inputs, exhaustively |
| `tb_rca4` | all 512 input cases, and that a carry ripples through all four bits at least once |
| `tb_vedic_mul2` | all 16 operand pairs |
| `tb_vedic_mul4` | see below |

`tb_vedic_mul4` is the end-to-end test. It runs the top level at its only
size. All 256 operand pairs are applied twice: once in ascending order and
once in a `$urandom` shuffle. Every product is compared with `a*b`. The test
also works out from the operands how often each of these happened:

- the crosswise adder carried out
- the middle adder carried out
- the half adder received a carry
- the high adder received middle-sum bits

A mechanism that never happens counts as a failure.

To run it with Verilator 5:

```
verilator --binary --timing --top-module tb_vedic_mul4 -y rtl -y tb +libext+.sv tb/tb_vedic_mul4.sv
./obj_dir/Vtb_vedic_mul4
```

The other testbenches build the same way. Substitute the testbench name.
