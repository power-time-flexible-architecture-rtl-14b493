# Power-time flexible GF(2^m) elliptic curve point processor

Elliptic curve cryptography over binary fields spends almost all of its time in
field multiplications. Most point-multiplication hardware saves area by using one
bit-serial multiplier. This processor goes the other way and uses parallelism at
two levels:

* **Algorithm level.** Three multipliers work at once on the independent
  multiplications of a point doubling and a point addition. A doubling followed
  by an addition then takes 12 multiplication steps. That is the length of their
  two critical paths (5 and 7 multiplications), so a fourth multiplier would not
  help.
* **Arithmetic level.** Each multiplier is digit serial-parallel. One operand is
  used whole, the other D bits per clock, so a product takes M = ceil(m/D)
  cycles where a serial-serial multiplier needs about M².

The work per point operation is the same as on a sequential machine, but it
needs far fewer clock cycles. For a required latency the clock (and with it the
supply voltage) can therefore be lowered, and dynamic power grows roughly with
f·V², i.e. about f³. The same hardware can also run flat out for speed. For the
lowest power it can drop to a single multiplier. A power management unit keeps
unused multipliers, and register bits above the application's field size, from
switching.

The processor computes point doubling, point addition and scalar
multiplication nP on

    y² + xy = x³ + a·x² + b      over GF(2^m),  m ≤ K (K = 163 by default)

in Jacobian projective coordinates, so it never needs a field inversion.

## Point arithmetic

A point (x, y) is held as (X, Y, Z) with x = X/Z², y = Y/Z³. With
c = b^(1/4) (held in a register; c = b^(2^(m-2))):

Doubling, 2(X1,Y1,Z1). Ten multiplications, squarings included; the critical path is 5:

    Z3 = X1·Z1²
    X3 = (X1 + c·Z1²)⁴
    L  = Z3 + X1² + Y1·Z1
    Y3 = X1⁴·Z3 + L·X3

Addition, (X1,Y1,Z1) + (X2,Y2,Z2). Twenty multiplications; the critical path is 7:

    l1 = X1·Z2²    l2 = X2·Z1²    l3 = l1 + l2
    l4 = Y1·Z2³    l5 = Y2·Z1³    l6 = l4 + l5
    l7 = Z1·l3     l8 = l6·X2 + l7·Y2
    Z3 = l7·Z2     l9 = l6 + Z3
    X3 = a·Z3² + l6·l9 + l3³
    Y3 = l9·X3 + l8·l7²

The formulas use the constant c, not b. `(X1 + b·Z1²)⁴` would not give the
doubled point in these coordinates.

The special cases are not detected: P = ±Q, and an operand at infinity. In scalar
multiplication by the binary method they do not occur as long as n is below the
order of P. n = 0 is handled: it returns Z = 0.

## The 12-step schedule

Most of the design's thinking is in the schedule (`rtl/ucode_rom.sv`). Each
microinstruction step does two things:

1. It starts up to three multiplications, one per multiplier. Their operands are
   any registers.
2. After the multiplications, it performs up to three register writes. Each write
   is `dst = (XOR of any of the three products) ^ (optionally one register)`.

The second part is the **multiply-add**. Sums such as `l6·X2 + l7·Y2` or
`a·Z3² + l6·l9 + l3³` go from the multipliers through a bit-parallel XOR into
the register file in the same step. No product is stored only to be fetched
back for an addition.

The two products that depend only on the second point, Z2² and Z2³, are moved
into free slots of doubling steps 3 and 4. These slots are *conditional*: they
run only when an addition follows the doubling. Without that move the first
addition step could start only two products. With it, a doubling followed by an
addition fills the 12 steps like this:

| step | multiplier 0 | multiplier 1 | multiplier 2 | writes |
|---|---|---|---|---|
| D1 | Z1·Z1 | X1·X1 | Y1·Z1 | T0=Z1², T1=X1², T2=X1²+Y1Z1 |
| D2 | c·Z1² | X1·Z1² | – | T3=X1+cZ1², Z=Z3, T2=L |
| D3 | T3² | (X1²)² | [Z2·Z2] | T3, T1=X1⁴, [U=Z2²] |
| D4 | T3² | X1⁴·Z3 | [Z2·U] | X=X3, T1=X1⁴Z3, [W=Z2³] |
| D5 | L·X3 | – | – | Y = L·X3 + T1 |
| A1 | Z1·Z1 | X1·U | Y1·W | T0=Z1², T1=l1, T2=l4 |
| A2 | X2·Z1² | Z1·Z1² | – | T3=l3=P0+l1, T4=Z1³ |
| A3 | Z1·l3 | l3·l3 | Y2·Z1³ | T5=l7, T1=l3², T2=l6=P2+l4 |
| A4 | l7·Z2 | l6·X2 | l7·Y2 | Z=Z3, T4=l8=P1+P2, T6=l9=P0+l6 |
| A5 | Z3·Z3 | l7·l7 | l3·l3² | T0=Z3², T5=l7², T3=l3³ |
| A6 | a·Z3² | l6·l9 | l8·l7² | X = P0+P1+l3³, T7 = P2 |
| A7 | l9·X3 | – | – | Y = P0 + T7 |

All three multipliers are busy in 8 of the 12 steps, two in 2 steps and one in 2
steps: 30 multiplications in all. The additions fall out of the formulas: the
doubling needs four K-bit XORs and the addition seven, and each of them is
absorbed into a write. Operands are read at the start of a step and
all writes land at its end, so a step may overwrite a register it reads. A
standalone addition first runs `PRE` (U = Z2², W = Z2³, 2 steps). Two more
helpers exist: `INIT` copies P into Q, and `INF` clears Q.

Register map (`ecc_pkg`): X, Y, Z = working point and result; PX, PY, PZ = second
point or base point; A = a; C = b^(1/4); U, W = Z2², Z2³; T0…T7 = intermediates.

## Datapath

* `gf2m_dsmul` is the digit serial-parallel multiplier, MSB first. In each clock
  it repeats D times: `acc = acc·x mod f; if (bit) acc ^= a`. So a clock does
  `acc·x^D + a·digit`. The field degree m and the polynomial
  f = x^m + r are inputs. Any m ≤ K works, and the cycle count shrinks to
  ceil(m/D). A `start` pulse loads the operands. `done` rises after the start
  cycle plus ceil(m/D) digit cycles. The product stays valid until the next start.
* `gf2m_madd` is the write-back adder: one level of XOR gates, K bits wide. There
  are three of them, one per write port.
* `ecc_regfile` holds 18 × K flip-flops. It has nine read ports (two operands per
  multiplier and one addend per write port), three write ports and a host port.
  Each register is split into D-bit digit groups with separate write enables.
  Gated groups read as zero.
* Three product registers hold the products of a step when it runs on one
  multiplier.

## Power management

`power_mgmt` produces three kinds of enable:

* **Multiplier clock enables.** A multiplier is enabled only in cycles where it
  starts or runs a multiplication. While disabled, none of its registers changes,
  so its logic does not switch. In single mode, multipliers 1 and 2 are never
  enabled.
* **Conditional slots.** A conditional slot (Z2², Z2³ in a doubling with no
  addition after it) is dropped, and its multiplier stays idle.
* **Word-length gating.** Digit groups that lie wholly at or above bit m get no
  write enable. This covers the register file and the operand and accumulator
  registers of the multipliers. On a K = 163 processor running GF(2^113), 6 of
  the 21 groups of every register stay unclocked. Gated groups are masked to
  zero where they are read, so values left in them by an earlier, longer word
  length do no harm.

Gating is written as clock enables on the registers, which synthesis maps onto
integrated clock-gating cells. It is not written as gated clock nets. The
`mult_active` output shows the multiplier enables.

## Sequencing and timing

`ecc_ctrl` accepts a command while `cmd_ready` is high:

| cmd_op | operation | microprograms |
|---|---|---|
| 0 | Q = 2Q | DBL |
| 1 | Q = Q + P | PRE, ADD |
| 2 | Q = nP | INIT, then for each lower bit of n: DBL, plus ADD if the bit is 1 (INF if n = 0) |

`cmd_single` selects the mode for the command:

* **Triple mode.** All live slots of a step start together. Write-back happens in
  the cycle the last multiplier reports done. A step takes **M + 2** cycles
  (M = ceil(m/D)). A step with no products (INIT, INF) takes 2.
* **Single mode.** The live slots run one after another on multiplier 0, each
  into its product register, and then one write cycle follows. A step with l
  live slots takes l·(M + 2) + (3 − l) + 2 cycles.

Each microprogram costs one more cycle to sequence. From the cycle with
`cmd_valid` to the cycle with `done`:

* a doubling takes 5(M+2) + 3 cycles (118 at m = 163, D = 8);
* an addition with PRE takes 9(M+2) + 4 (211);
* nP takes `1 + (programs + 1) + Σ step cycles`. For a 163-bit n with half its
  bits set, that is about 162·115 + 81·161 ≈ 31,700 cycles in triple mode.

## Using it

1. While `cmd_ready` is high, write registers through `host_we/host_addr/host_wdata`.
   Load A = a, C = b^(1/4), the second point (PX, PY, PZ) and, for doubling or
   addition, the working point (X, Y, Z). For nP give the base point with PZ = 1,
   or any Z.
2. Set `field_m` and `field_r` (for example m = 163,
   r = x⁷+x⁶+x³+1). Keep them stable during a command. Write data is masked to m bits.
3. Pulse `cmd_valid` with `cmd_op`, `cmd_scalar` and `cmd_single`.
4. When `done` pulses, read X, Y, Z through `host_raddr/host_rdata`. The affine
   result is x = X/Z², y = Y/Z³, and that inversion is left to the host.

Reset (`rst_n`) is synchronous and active low, and clears every register.

Parameters: `K` (processor word length, 163) and `D` (digit size, 8) on
`ecc_top`, `gf2m_dsmul`, `ecc_regfile` and `power_mgmt`. The number of
multipliers (3) and the register map are fixed in `ecc_pkg`, because the
microprograms are written for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference arithmetic (`tb/gf_ref_pkg.sv`)
is written independently of the RTL. It multiplies LSB first, inverts by
Fermat's theorem, and does point arithmetic in affine coordinates with one
inversion per operation.

| testbench | what it checks |
|---|---|
| `tb_gf2m_dsmul` | random products at m = 163, 113, 100; the latency; freezing with `ce` = 0 |
| `tb_gf2m_madd` | every selection with and without the addend |
| `tb_ecc_regfile` | all ports against a shadow copy; port priority; digit gating |
| `tb_power_mgmt` | all gating rules in both modes; digit enables for several m |
| `tb_ucode_rom` | runs the microprograms in software and compares them with affine doubling and addition; step counts 5/7; 10/20 products; the 8/2/2 utilisation; no double writes |
| `tb_ecc_ctrl` | program order for random scalars against the binary method; conditional work only before additions; single-mode issue order; latencies |
| `tb_power_time` | the same 163-bit nP on three and on one multiplier. Three multipliers take 31,595 cycles and one takes 77,464, a 2.45× speed-up. Both do the same 70,400 multiplier-active cycles. A doubling plus addition takes 12 steps. The same nP in GF(2^113) takes 17,317 cycles |
| `tb_ecc_top` | at the default size: doubling, addition, nP with random 163-bit n, nP on one multiplier, nP in GF(2^113), n = 0 and 1, all latencies; also counts that every mechanism acted |

The whole-design test, `tb_ecc_top`, runs at the default parameters in a few
seconds. To run a testbench with plain Verilator:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/ecc_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecc_top.sv --top-module tb_ecc_top
    ./obj_dir/Vtb_ecc_top

The random curves in the tests are made by picking x, y and a at random and
solving for b. The tests therefore need no curve tables, but they do not use
the standard curves.

## What is this design's own

The architecture fixes the following:

* three digit serial-parallel multipliers;
* multiply-add in one instruction;
* a bit-parallel adder;
* a power management unit for idle multipliers and short word lengths;
* the projective formulas;
* the 12-step bound with 8/2/2 utilisation;
* a fall-back to one multiplier.

These are this design's own choices:

* K = 163 and D = 8;
* the MSB-first multiplier form;
* the register file, its size and ports;
* the microinstruction format and the schedule above;
* the command interface and host port, and the cycle timing;
* gating by clock enables at D-bit granularity;
* the product registers for single mode.

Not built:

* a two-multiplier configuration, which the architecture only compares with;
* the clock and supply-voltage scaling that turns fewer cycles into lower power,
  which is outside the logic;
* conversion back to affine coordinates.
