# Three-core Co-Z ECC engine

This is an elliptic-curve scalar-multiplication engine for short Weierstrass
curves `y^2 = x^3 + a*x + b` over any prime field of up to 528 bits. The
curve, the field prime and the base point are loaded at run time, so one
engine serves NIST P-224/256/384/521, secp256k1, the Brainpool curves or any
other Weierstrass curve of that size. The engine computes `k*P` with the
**Co-Z Montgomery ladder**. This ladder does the same sequence of operations
for every scalar bit, which makes it resistant to timing and simple
power analysis. The work of each ladder step is spread over **three
Montgomery multiplication cores** that run in lock-step.

Besides `k*P` the engine does point addition, on-curve checks of input
points and of results (against fault attacks), and modular multiplication, addition, subtraction and inversion
(e.g. modulo the group order, for ECDSA). The protocol itself (ECDH,
ECDSA) runs on a host processor that drives the engine's ports.

At the default size (528-bit datapath, three cores) a P-256 scalar
multiplication takes 127,864 cycles and a P-521 one 259,039 cycles.

## Contents

- [Structure](#structure)
- [Montgomery cores and the q·p'·P table](#montgomery-cores-and-the-qpp-table)
- [Rounds: how three cores share one memory](#rounds-how-three-cores-share-one-memory)
- [The Co-Z ladder](#the-co-z-ladder)
- [Other programs](#other-programs)
- [Host interface](#host-interface)
- [Performance](#performance)
- [Departures, limits and open points](#departures-limits-and-open-points)
- [Simulating](#simulating)
- [Changing the design](#changing-the-design)

## Structure

```
              host ports (cmd, modulus, scalar, pool read/write)
                 |
        +--------v---------+    setup_start/done   +-------------+
        |  ecc_controller  |---------------------->| setup_unit  |--> p, R^2 mod p
        |  command FSM     |                       | p', table   |
        |  + program ROMs: |                       +------+------+
        |  diff_adder      |                              | table writes
        |  xyz_recovery    |  round (op,a,b,d) x 3 +------v------+
        |  group_addition  |---------------------->| round_exec  |<--> qpp_pool
        |  element_check   |<----------------------| 3 x         |     256 entries
        |  misc_programs   |  done, zero flags     | mont_core   |
        |  mod_inverse     |                       | MUX / deMUX |
        +--------+---------+                       +------+------+
                 | constants on the write bus             | 2 reads, 1 write
                 +------------------------------->+-------v-------+
                                                  | memory_pool   |
                                                  | 64 x 528 bits |
                                                  +---------------+
```

| file | role |
|---|---|
| `ecc_pkg.sv` | round format, operation codes, register map, commands |
| `mont_core.sv` | one Montgomery multiplier (base 2^8) that also adds and subtracts modulo p |
| `qpp_pool.sv` | table of `((t*p') mod 256)*p` for t = 0..255, one read port per core |
| `setup_unit.sv` | latches the modulus, computes `p'`, fills the table, computes `R^2 mod p` |
| `memory_pool.sv` | 2-read/1-write memory for all big integers |
| `round_exec.sv` | runs one round: fetch operands, start cores, save results, zero flags |
| `diff_adder.sv` | ladder step (ROM of 11 rounds) |
| `xyz_recovery.sv` | full (X, Y, Z) of the result from the ladder state (10 rounds) |
| `group_addition.sv` | affine P + Q to projective (9 rounds) |
| `element_check.sv` | on-curve tests of the input (4 rounds) and of the result (5 rounds), zero flag as verdict |
| `misc_programs.sv` | domain conversions, ladder start, modular mul/add/sub |
| `mod_inverse.sv` | sequencer for `x^(m-2) mod m` |
| `ecc_controller.sv` | command FSM that chains the above |
| `ecc_top.sv` | top level; shares the pool ports between host, controller and executor |

The structure follows the reference architecture: a pool of big-integer
registers, several Montgomery cores connected to it through a MUX/deMUX, a
table that replaces the second multiplier of each core, a controller that
addresses the pool and can put constants directly on its write bus, and a
zero comparator on each core's output. The round format, the register map,
the command set and all schedules except the recovery are this design's own.

## Montgomery cores and the q·p'·P table

All field arithmetic is done in the Montgomery domain with `R = 2^528`. A
core computes `MM(A, B) = A*B*R^-1 mod p` digit-serially in base `d = 2^8`.
In each of its 66 cycles it handles one digit `a_i` of A:

```
L   = C + a_i * B                 (528 x 8-bit multiplier)
q_i = L mod 256                   (low digit)
C   = (L + T[q_i]) / 256          T[t] = ((t * p') mod 256) * p,  p' = -p^-1 mod 256
```

The usual algorithm multiplies `q_i*p'` and then `q_i*p'*P` at run time,
which needs a second wide multiplier. Here p is fixed for the life of a
setup and the digit is only 8 bits, so all 256 possible values
`((t*p') mod 256)*p` are stored in a table (`qpp_pool`) when the modulus is
loaded. Each core then needs only one 528×8 multiplier and an adder.
Folding `p'` into the table index means the core looks the table up
with the raw low digit of `L`. After 66 cycles `C < 2p`, and a final
conditional subtraction (combinational, on the result port) gives
`C mod p`.

The same core does `A + B mod p` and `A - B mod p` in a single cycle.

`setup_unit` builds everything that depends on p. It computes `p'` by
Newton iteration on the low digit and writes the 256 table entries
`((t*p') mod 256)*p`, one per cycle. It then computes
`R^2 mod p` by 1056 modular doublings of 1. A setup takes 1,399 cycles
counted at the engine's command interface.

## Rounds: how three cores share one memory

Every program is a list of **rounds**. A round gives each core one
operation (`NOP`, `MUL`, `ADD` or `SUB`), two source registers and a
destination register (`ecc_pkg::round_t`). `round_exec` runs a round in
four phases:

1. **Fetch** – one cycle per core: both read ports of the pool are pointed
   at that core's two sources. With the memory's one-cycle read latency this
   phase lasts `NCORES + 1` cycles.
2. **Start** – all cores with an operation start in the same cycle.
3. **Wait** – until every core is idle. A multiplication round lasts as long as
   one multiplication (66 cycles). An addition round lasts one cycle.
4. **Save** – two cycles per core: the result is selected onto the write
   bus and compared with zero, then written. An idle core keeps its time
   slot, so a round's length does not depend on what is in it.

A round that contains a multiplication takes 80 cycles from start to done;
an addition-only round takes 14. All reads of a round happen before any of
its writes, so a round may overwrite one of its own sources. This property
is used throughout, e.g. for the in-place ladder update.

The fetch/save overhead (4 + 6 cycles for three cores) is why more cores do
not pay off: it grows linearly with the number of cores while a
multiplication stays at 66 cycles. Three cores is the configuration built
here.

Each core's result passes a **zero comparator** during save. The flags of the
last round go to the controller, which uses core 0's flag as the verdict of
the on-curve checks. The flags are also exported on `zero_flags`.

## The Co-Z ladder

The Montgomery ladder keeps two points `R0, R1` with `R1 - R0 = P`. For each
scalar bit it adds one into the other and doubles the other. The co-Z
variant used here stores both points with one shared Z. It keeps only their
X coordinates and never stores Z itself. Instead it carries three
Z-weighted constants:

```
state:  X1, X2,  T_P = x_P*Z,  T_a = a*Z^2,  T_b = 4b*Z^3

U   = (X1 - X2)^2
V   = 4*X2*(X2^2 + T_a) + T_b
W   = U*V
X1' = V*[(X1 + X2)*(X1^2 + X2^2 - U + 2*T_a) + T_b] - T_P*W      (R_add)
X2' = U*[(X2^2 - T_a)^2 - 2*X2*T_b]                              (R_double)
T_P' = T_P*W,  T_a' = T_a*W^2,  T_b' = T_b*W^3
```

Because `a` and `b` are carried as `T_a`, `T_b`, the formulas work for any
curve parameters. The scalar bit only decides **which pool register plays
X1 and which X2**: for bit 1, `S0` is added to and `S1` doubled, and for bit 0
the other way round. The controller changes only the register addresses
given to the cores, so every step issues the same operations in the same
rounds and takes the same 80/14-cycle pattern.

The step needs 15 multiplications. Its longest chain of dependent
multiplications is five, so three cores can at best finish it in five
multiplication rounds. `diff_adder` reaches that bound: five multiplication
rounds with all three cores busy, plus six short addition rounds (11 rounds,
about 484 cycles plus controller overhead per bit; 495 measured):

| step | kind | core 0 | core 1 | core 2 |
|---|---|---|---|---|
| 0 | add | X1−X2 | 2·X2 | X1+X2 |
| 1 | mul | X2² | U=(X1−X2)² | X1² |
| 2 | add | X2²−Ta | X2²+Ta | 4·X2 |
| 3 | mul | 4X2·(X2²+Ta) | (X2²−Ta)² | 2X2·Tb |
| 4 | add | X2²+2Ta | X1²−U | V |
| 5 | add | X1²+X2²−U+2Ta | (X2²−Ta)²−2X2·Tb | – |
| 6 | mul | W=U·V | (X1+X2)·(…) | X2' |
| 7 | add | (X1+X2)·(…)+Tb | – | – |
| 8 | mul | W·Tb | W² | V·(…) |
| 9 | mul | Ta' | Tb' | TP' |
| 10 | add | X1' | – | – |

**Start.** The classic ladder starts from `R0 = O`, which has no co-Z form.
Here the top scalar bit must be 1. The ladder starts from `R0 = P`, `R1 = 2P`
and processes the remaining `kbits - 1` bits. The common Z is chosen as
`Z = 4*y_P^2`, so that `X(2P) = (x^2 - a)^2 - 8*b*x` needs no division
(program `PG_LADDER_INIT`, 6 rounds).

**Recovery.** After the last bit, `xyz_recovery` rebuilds the projective
point from `X1 = S0`, `X2 = S1`, the T values and the affine base point:

```
X' = 4*y_P * x_P * T_P^2 * X1
Y' = x_P^3 * [T_b + 2*(T_P*X1 + T_a)*(X1 + T_P) - 2*X2*(X1 - T_P)^2]
Z' = 4*y_P * T_P^3
```

This takes five multiplication rounds on three cores (10 rounds in total).
The results are converted out of the Montgomery domain and left in QX, QY,
QZ, with `x = QX/QZ` and `y = QY/QZ`.

## Other programs

- **On-curve checks** (`element_check`): the input check computes
  `y^2 - a*x - x^3 - b`. The zero flag of the last round is the verdict. A
  scalar multiplication always runs this check first. If the point is not
  on the curve the command stops with `error = 1` after a few hundred
  cycles, before any ladder step. After the recovery, the output check
  evaluates `Y^2*Z - X^3 - a*X*Z^2 - b*Z^3` on the projective result while
  it is still in the Montgomery domain (5 rounds, 339 cycles). Every term
  has the same degree, so the Montgomery factors cancel and no division is
  needed. A fault injected into the ladder state (for example a flipped
  bit in S0 or S1) moves the recovered point off the curve. The command
  then ends with `error = 1`, and QX/QY/QZ must not be used.
- **Point addition** (`group_addition`): affine P + Q in homogeneous
  coordinates with both Z = 1 (`u = yQ - yP`, `v = xQ - xP`,
  `A = u^2 - v^3 - 2*v^2*xP`, `X = v*A`, `Y = u*(v^2*xP - A) - v^3*yP`,
  `Z = v^3`). This is 5 multiplication rounds. P = ±Q is not handled.
- **Modular inverse** (`mod_inverse`): `x^(m-2) mod m` by a Montgomery
  ladder over all 528 exponent bits. Each round does one product and one
  square on two cores. There are 530 rounds in total (42,933 cycles), and
  the count does not depend on the operand or the exponent. The modulus
  must be prime (the field prime or the group order).
- **Helpers** (`misc_programs`): `R mod p`, conversion of inputs into the
  Montgomery domain (multiply by `R^2`) and of outputs out of it (multiply
  by plain 1), `4b`, ladder start, modular multiply `MM(MM(A, R^2), B)`,
  add and subtract.

## Host interface

`ecc_top` ports: `cmd_valid`/`cmd` (accepted when `busy` is low), `modulus`,
`scalar`, `kbits`, a pool write port (`host_we`, `host_waddr`, `host_wdata`),
a pool read port (`host_raddr` → `host_rdata` one cycle later), and `busy`,
`done` (one-cycle pulse), `error`, `zero_flags`. The host may use the pool
ports only while `busy` is low.

| command | inputs (pool registers, plain integers < modulus) | result |
|---|---|---|
| `CMD_SETUP` | `modulus` port | table, `p'`, constants 0, 1, `R^2`, `R` |
| `CMD_SCALAR_MUL` | XP, YP, A, B; `scalar`, `kbits` (bit `kbits-1` = 1) | QX, QY, QZ, or `error` (input or result not on the curve) |
| `CMD_POINT_ADD` | XP, YP, XQ, YQ (A, B not needed) | QX, QY, QZ |
| `CMD_CHECK` | XP, YP, A, B | `error` = not on the curve |
| `CMD_MOD_MUL/ADD/SUB` | OPA, OPB | RES |
| `CMD_MOD_INV` | OPA | RES = OPA^-1 |

Register addresses are in `ecc_pkg` (`RG_XP = 4`, `RG_YP = 5`, `RG_A = 6`,
`RG_B = 7`, `RG_XQ = 9`, `RG_YQ = 10`, `RG_QX..QZ = 16..18`,
`RG_OPA/OPB/RES = 19/20/21`). Commands convert their inputs into the
Montgomery domain in place, so the host must write the inputs again before
each command. Switching between the field prime and the group order takes a
new `CMD_SETUP` (1,399 cycles).

Reset (`rst_n`, active low, asynchronous) clears all control state. Pool and
table contents are not reset; `CMD_SETUP` must run first.

## Performance

Cycle counts for one scalar multiplication with a scalar as long as the
group order. They are measured in simulation at the default size, from
command to `done`, with the on-curve check, ladder start, recovery and
conversions and both on-curve checks included. The counts depend only on `kbits`: each extra bit
costs 495 cycles.

| curve | scalar bits | cycles | reference 3-core 528-bit implementation |
|---|---|---|---|
| NIST P-224 | 224 | 112,024 | 138,041 |
| NIST P-256 / secp256k1 | 256 | 127,864 | 157,273 |
| NIST P-384 | 384 | 191,224 | 233,683 |
| Brainpool P512r1 | 512 | 254,584 | 311,129 |
| NIST P-521 | 521 | 259,039 | 316,538 |

The same engine built with `NW = 264` (for fields up to 256 bits; a
multiplication then takes 33 cycles and a multiplication round 47) needs
74,635 cycles for P-224 and 85,195 for P-256/secp256k1. The reference
3-core 264-bit implementation needs 92,402 and 105,298.

The reference figures do not break down where their cycles go, so the
comparison is only a sanity check. Both grow linearly with the scalar length.
There are 5 multiplication rounds per bit, so at ~80 cycles each the step
is bounded below by about 400 cycles per bit.

Storage at the default size: the pool holds 64 × 528 bits, and the table
256 × 536 bits (read by all three cores; an FPGA would use one copy per
core).

## Departures, limits and open points

- **Ladder-step schedule.** The round placement in `diff_adder` is derived
  here from the operation graph of the step. It has the minimum five
  multiplication rounds for three cores, but it is not claimed to be the
  reference's placement. The recovery schedule follows the reference's
  three-core schedule.
- **Ladder start** from `(P, 2P)` with `Z = 4y^2`, and the rule that the top
  scalar bit is 1, are this design's. To multiply by a scalar with leading
  zero bits, give its true bit length in `kbits` (this leaks the length) or
  add a multiple of the group order first (the usual fixed-length trick).
- **Inverse** by Fermat exponentiation; the reference does not say which
  method it uses.
- **Point addition** does not handle doubling or `P = -Q`, and the result
  for `Q = O` is undefined.
- Only the **three-core** configuration is built. `NW` can be changed, but a
  different `NCORES` needs new schedules for every program. 5- and 12-core
  variants are not provided.
- `kbits = 1` (k = 1) skips the ladder entirely; the testbenches do not
  cover it.
- Batch inversion is not provided.

## Simulating

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<m>`. `tb_ecc_pkg.sv` holds the reference
arithmetic (plain wide-integer modular arithmetic, affine point addition, a
round interpreter used to test the program ROMs without the datapath) and
the P-256 parameters.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecc_pkg.sv tb/tb_ecc_pkg.sv rtl/*.sv tb/tb_ecc_top.sv \
    --top-module tb_ecc_top -o tb_ecc_top
./obj_dir/tb_ecc_top
```

| testbench | what it runs |
|---|---|
| `tb_ecc_top` | the full-size engine end to end on P-256: setup, two 256-bit `k*G` (equal cycle counts), `3*G`, on-curve check pass/fail, rejected scalar multiplication, a bit flipped in the ladder state halfway through (caught by the output check), `G + 2G`, setup with the group order, mul/add/sub/inverse modulo n, zero flag; counts ladder steps with bit 0 and bit 1, constant writes, rejections, zero flags, idle-core rounds and inverse rounds |
| `tb_ecc_workloads` | full-size `k*P` on the P-224, secp256k1, P-384, Brainpool P512r1 and P-521 fields (points generated on the fly), cycle counts |
| `tb_ecc_workloads_264` | the same on the engine built with `NW = 264`, for the P-224 and secp256k1 fields |
| `tb_ecc_controller` | controller against models of the datapath: constants, short scalars, round counts, abort, point add, modular ops |
| `tb_round_exec` | rounds on the real pool and table against the interpreter, 80/14-cycle timing, a round overwriting its own source, zero flags |
| `tb_mont_core` | random operands for P-256's prime and a random odd 528-bit modulus, 66-cycle multiplication |
| `tb_setup_unit`, `tb_qpp_pool`, `tb_memory_pool` | table contents, `p'`, `R^2`, port behaviour |
| `tb_diff_adder`, `tb_xyz_recovery`, `tb_group_addition`, `tb_element_check`, `tb_misc_programs`, `tb_mod_inverse` | each program on the interpreter against the formulas above |

The two full-size testbenches run in about 10 s (`tb_ecc_top`) and
2.5 min (`tb_ecc_workloads`) after a build of about 2 minutes.

## Changing the design

- **Field size**: `ecc_top #(.NW(...))`. A multiplication takes `NW/8`
  cycles. The testbenches use 528-bit numbers and P-256 data, so for
  `NW < 256` they need new test data.
- **Digit size**: `DW` is a parameter of the core, table and setup, but
  the table has `2^DW` entries, so 8 is the practical choice.
- **Pool size**: `ecc_pkg::NREG`/`ADDR_W`. The programs use registers 0–46.
- **Programs** are plain `case` tables of rounds in the ROM modules. A new
  schedule must keep every round's sources independent of its own
  destinations, except where read-before-write is intended.
