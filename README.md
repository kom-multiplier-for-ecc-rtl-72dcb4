# Karatsuba-Ofman GF(p) multiplier

Elliptic-curve cryptography spends most of its time multiplying large field
elements. This design multiplies two 191-bit elements of a prime field GF(p):
it forms the full 382-bit integer product with a recursive Karatsuba-Ofman
(KOM) multiplier and then reduces that product modulo p.

The point of Karatsuba-Ofman is to replace the four half-size products of
schoolbook multiplication with three. Applied recursively down to one-bit
products, a W-bit multiplication needs about W^1.58 one-bit multipliers
instead of W^2. The price is extra additions and subtractions at each level.

## The Karatsuba-Ofman recursion (`kom_mult`)

Write each W-bit operand as a high half and a low half of H = ceil(W/2) bits:

    A = AH*2^H + AL        B = BH*2^H + BL

Then

    Z1 = AH*BH
    Z2 = AL*BL
    Z3 = (AH+AL)*(BH+BL)
    A*B = Z1*2^(2H) + (Z3 - Z1 - Z2)*2^H + Z2

`Z3 - Z1 - Z2` equals `AH*BL + AL*BH`, so three H-bit multiplications replace
four. Each of the three is another `kom_mult` instance of width H. The
recursion ends at `LEAF_W` bits, where the product is formed directly. With the
default `LEAF_W = 1` every leaf is a one-bit multiplier, i.e. an AND gate. All
the shifts are by constant amounts, so they cost only wiring.

Two details are where most of the care went.

**Odd widths.** When W is odd, the high half has only W-H bits. It is padded
with one zero above its top bit so that both halves are H bits wide. For
W = 191 the widths per level are 191, 96, 48, 24, 12, 6, 3, 2 and 1. That
gives eight levels of splitting and 3^8 = 6561 one-bit leaves.

**The carry of the sums.** `AH+AL` and `BH+BL` are H+1 bits wide. Recursing on
H+1 bits would never shrink a 2- or 3-bit multiplier to one bit. So each sum is
split into its carry bit and its low H bits: `sa = cA*2^H + sA`, and likewise
`sb`. Only `sA*sB` goes to a recursive H-bit multiplier. The rest is added
under the control of the carry bits:

    Z3 = sA*sB + (cA*sB + cB*sA)*2^H + cA*cB*2^(2H)

The module is purely combinational and has no pipeline registers. Its depth
grows with the number of recursion levels.

## Reduction modulo p (`mod_reduce`)

The 2W-bit product is reduced by restoring binary long division, one product
bit per clock, most significant bit first. The remainder `r` always stays below
the modulus `m`. Each clock computes `t = 2r + next_bit` and subtracts `m` when
`t >= m`. Because `t < 2m`, one (W+1)-bit subtractor does both the comparison
and the subtraction: the borrow bit decides. After 2W clocks, `r = x mod m`.

This method is a deliberate minimum. It works for any modulus given at run
time and costs one adder. It is also slow: 382 clocks for W = 191. A
fixed-prime design would normally use a special-form reduction instead. That
is the block to replace if throughput matters.

## Top level (`kom_modmul`) and timing

```
a, b, modulus --> [operand registers] --> kom_mult --> product (2W)
                                                  \--> mod_reduce --> result (W)
```

| State (`kom_pkg::kom_state_e`) | Clocks | What happens |
|---|---|---|
| `KOM_IDLE` | - | waits for `start`; then registers `a`, `b` and `modulus` |
| `KOM_MUL` | 1 | the combinational product settles; it is registered to `product` and the reduction starts |
| `KOM_REDUCE` | 2W | `mod_reduce` runs; when it finishes, `done` pulses |

- `done` rises 2W + 2 clock edges after the edge that sampled `start`. That is
  384 clocks for W = 191.
- `busy` is high from the cycle after `start` until `done`. A `start` seen
  while `busy` is high is ignored.
- `product` (a*b) and `result` (a*b mod modulus) stay valid from `done` until
  the next accepted `start`.
- Reset is asynchronous and active low.
- The modulus must be nonzero. An assertion checks this.
- Operands should be field elements, i.e. below the modulus. Any W-bit values
  still give a correct `a*b mod modulus`.

The single-cycle `KOM_MUL` state assumes the combinational multiplier settles
within one clock. At 191 bits this is a long path. In an FPGA or ASIC flow,
either give it a multicycle constraint or add pipeline registers inside
`kom_mult`.

| Parameter | Default | Where |
|---|---|---|
| `W` | 191 (`kom_pkg::KOM_FIELD_BITS`) | `kom_modmul`, `kom_mult`, `mod_reduce` |
| `LEAF_W` | 1 (`kom_pkg::KOM_LEAF_BITS`) | `kom_mult`; raise it to stop the recursion earlier and use direct small multipliers |

## How far it follows the method, and where it departs

These parts follow the Karatsuba-Ofman algorithm as published for this
multiplier:

- the split into halves and the three-product identity;
- recursion down to one-bit multipliers;
- zero-padding of odd widths;
- the 191-bit field size;
- an 8-bit configuration, which is tested exhaustively.

These are this design's own choices:

- the carry split of the middle product;
- placing the padding zero above the MSB instead of below the LSB (the result
  is the same);
- the bit-serial reduction;
- the modulus taken as an input port;
- the operand registers, the handshake and the latency.

The published description of the 8-bit case speaks of four 4x4
sub-multipliers. This RTL uses three sub-multipliers at every level, because
that is what the Karatsuba-Ofman algorithm computes.

No particular prime is built in. The compared literature uses 163-, 191- and
233-bit fields, several of them binary fields GF(2^m). This design computes
integer products reduced modulo a prime, not carry-less products for GF(2^m).

The ALU of an elliptic-curve processor that would use this multiplier is not
included. Only the multiplier is specified.

## Verification

Each testbench checks its results against the simulator's own `*` and `%`
operators and prints `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb/tb_kom_mult.sv` | all 65,536 pairs at 8 bits; 3,003 random and corner pairs at 17 bits (odd width); 3,005 at 191 bits; counts how often the top-level sums carried |
| `tb/tb_mod_reduce.sv` | 191-bit and 13-bit reducers with random and corner dividends and moduli; checks the 2W-clock latency and that a start while busy is ignored |
| `tb/tb_kom_modmul.sv` | the top at its default 191 bits: 44 operations including (p-1)^2 mod p; checks product, result, the 384-clock latency and `busy`; fails if the carry correction, a nonzero padded high half, an ignored start or a real reduction never occurred |

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_kom_modmul rtl/kom_pkg.sv tb/tb_kom_modmul.sv
./obj_dir/Vtb_kom_modmul
```

Compiling the 191-bit recursion takes less than a minute. The simulations take
seconds.

When `kom_mult` is linted on its own as the top module, Verilator reports three
undriven nets. Verilator does not elaborate a top module that instantiates
itself, so it misses those drivers. The nets are driven, and the warning does
not appear when `kom_mult` sits under `kom_modmul`.

## Files

- `rtl/kom_pkg.sv`: field width, leaf width and the sequencer state type
- `rtl/kom_mult.sv`: recursive combinational Karatsuba-Ofman multiplier
- `rtl/mod_reduce.sv`: bit-serial reduction modulo a run-time modulus
- `rtl/kom_modmul.sv`: top level, the GF(p) modular multiplier
- `tb/tb_*.sv`: the self-checking testbenches described above
