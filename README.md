# GF(2^191) elliptic curve point multiplier

This is a coprocessor that computes the scalar multiple mP of a point P on
the binary elliptic curve y^2 + xy = x^3 + a2·x^2 + a6 over GF(2^191). The
field is in polynomial basis with f(x) = x^191 + x^9 + 1. The scalar m is a
191-bit integer. The work is the public-key core of ECDH or ECDSA.

The design has three ideas:

* **Point multiplication** is left-to-right double-and-add. Each bit of m
  after the leading 1 costs one point doubling, plus one point addition of
  P if the bit is 1.
* **Hybrid coordinates.** The running point is kept in Jacobian coordinates
  (x = X/Z², y = Y/Z³), so no step needs a field inversion. The fixed point
  P stays affine, which makes the addition cheaper. One Fermat inversion at
  the end converts the result back to affine.
* **A generic datapath with a hierarchical controller.** Four bit-serial
  LFSR multipliers, two squarers, two adders, a register and a dual-port
  operand memory share a single operand bus. A main controller runs the
  scalar loop and starts three sub-controllers: point doubling, point
  addition and conversion to affine. Each sub-controller is a fixed list of
  bus transfers. You can change the multipliers (for example their digit
  size) without touching any controller.

## Operation

| step | unit | what happens |
|---|---|---|
| load | host | writes PX, PY and a2 to memory words 0, 1 and 2, and m to address 32 |
| start | host | writes 1 to address 33 |
| scan | MCU | shifts m left until its leading 1 has left the register, one clock per bit |
| init | MCU | sets (X, Y, Z) = (PX, PY, 1) with five bus transfers |
| loop | MCU → PDU, PAU | for each remaining bit, a doubling and, if the bit is 1, an addition |
| convert | MCU → PCU | x = X/Z², y = Y/Z³, written to memory words 6 and 7 |
| finish | host | status bit 1 (done) is set and `irq_done` pulses; the host reads words 6 and 7 |

If m = 0, the run ends at once and status bit 2 marks the result as the
point at infinity. The scalar register is shifted in place, so it reads 0
after a run. Load m again before each run.

## The datapath and its transfers

Every arithmetic unit has operand registers and an output register.

| unit | count | latency | starts when |
|---|---|---|---|
| LFSR multiplier | 4 | ceil(191 / MUL_D) clocks: 191 for bit-serial | operand B is loaded |
| squarer | 2 | 1 clock | its operand is loaded |
| adder | 2 | 1 clock | operand B is loaded |

Each output register holds its value until the unit's next start. So a
result can feed other units straight from the unit, without a trip through
memory.

A single multiplexer drives the operand bus. Its inputs are:

* memory port B;
* the register;
* the eight unit outputs;
* the constant 1, needed to set Z = 1.

The bus feeds every operand register, the register and the memory write
port. In one clock, exactly one value moves from one source to one
destination. This move is a *transfer* (`ecc_pkg::xfer_t`):

```
src  : S_RAM(addr) | S_REG | S_MUL(i) | S_SQR(i) | S_ADD(i) | S_ONE
dst  : D_RAM(addr) | D_REG | D_MULA(i) | D_MULB(i) | D_SQR(i) | D_ADDA(i) | D_ADDB(i)
```

The datapath **interlocks** transfers. A transfer is accepted
(`xfer_accept`) only when two things hold:

* its source unit has finished: it is not busy;
* its destination unit is free.

Until then the transfer waits and the controller holds it. So a schedule is
only an order of transfers, not a timetable. The same lists run correctly
with any multiplier latency. The one memory-to-memory copy goes through the
register, because port B has a single address.

Memory reads are combinational, so a memory-to-unit transfer takes one
clock. The host uses memory port A, which is independent of port B. The
host can therefore read and write spare words (14 to 31) while a
multiplication runs.

Memory map (191-bit words):

| word | content |
|---|---|
| 0, 1 | PX, PY: the affine base point |
| 2 | a2: the curve coefficient (a6 is never needed) |
| 3, 4, 5 | X, Y, Z: the Jacobian accumulator |
| 6, 7 | x, y of the result mP |
| 8–13 | scratch for the PAU and PCU |

## Point doubling (PDU)

The doubling uses 6 multiplications, 4 squarings and 4 additions:

```
S1 = Z²        M1 = Z·Y        S2 = X²        Z' = M2 = X·S1
A1 = M1 + S2   S3 = S2²        A2 = M2 + A1   S4 = M2²
M3 = S3·Z'     M4 = A2·A1      m1 = S4·a2     X' = A3 = M4 + m1
M5 = A2·X'     Y' = A4 = M5 + M3
```

Why it works: the affine doubling has λ = x + y/x = (X² + YZ)/(X·Z²).
With Z' = X·Z², this means A1 = λ·Z' and A2 = (λ + 1)·Z'. Then
X' = A1·A2 + a2·Z'² = (λ² + λ + a2)·Z'² = x'·Z'². Likewise
Y' = X⁴·Z' + A2·X' = (x² + (λ + 1)·x')·Z'³ = y'·Z'³. These are the affine
doubling formulas in Jacobian form.

The schedule is a list of 27 transfers on four multipliers. The three
multiplication levels on the critical path (M1/M2, then M3/M4/m1, then M5)
set the time: **597 clocks** per doubling with bit-serial multipliers.

## Point addition (PAU)

P is affine, so U0 = X and S0 = Y need no work. The formulas are:

```
W = X + PX·Z²      R = Y + PY·Z³      L = Z·W   (= Z')
T = R + L          V = R·PX + L·PY
X' = T·R + W³ + a2·L²                 Y' = T·X' + V·L²
```

This is 11 multiplications, 3 squarings and 8 additions, scheduled as 45
transfers. The critical path has four multiplication levels: **799 clocks**
per addition.

The unit does not handle the exceptional cases: accumulator at infinity,
equal to P, or equal to −P. With left-to-right double-and-add they cannot
occur when m is below the order of P.

## Conversion (PCU)

Z⁻¹ = Z^(2^191 − 2) is computed by Fermat's theorem with an Itoh–Tsujii
addition chain. Let y_k = Z^(2^k − 1). Each step computes
y_(i+j) = y_i^(2^j)·y_j along the chain

```
1 → 2 → 3 → 5 → 10 → 20 → 40 → 80 → 85 → 95 → 190,   Z⁻¹ = y_190²
```

This takes 10 multiplications and 190 squarings. A run of squarings is one
table entry repeated: the squarer's output goes back to its own input, one
squaring per two clocks.

Then the unit computes Zi² and Zi³ = Zi·Zi². The products x = X·Zi² and
y = Y·Zi³ run in parallel on two multipliers. The conversion takes
**2705 clocks**. The chain is specific to n = 191.

## Performance

All figures are measured in simulation with bit-serial multipliers. The
reference is a 20 ns FPGA prototype with the same unit mix, which reported
183,742 clocks for the point multiplication and 2,482 for the conversion
(3.72 ms in total).

| operation | clocks |
|---|---|
| doubling | 597 |
| addition | 799 |
| conversion | 2705 |
| mP for a 191-bit m with 95 one bits, including the leading-zero scan and conversion | 191,820 |

At 20 ns, the 191,820 clocks come to 3.84 ms.

With `MUL_D = 8` (24-clock multiplications), the same run takes 31,834
clocks. With `MUL_D = 191` (one-clock multiplications), it takes 11,502.
Bus transfers then dominate the time. The controller is the same in all
three cases.

## Parameters

`ecc_coproc` has these parameters:

* `N` (191): the field degree.
* `POLY`: the low terms of f(x), here x^9 + 1.
* `MUL_D` (1): bits per clock in each multiplier.
* `DEPTH` (32): the number of operand memory words.

The PCU's inversion chain assumes N = 191. Elaboration stops with an error
for any other N. Supporting another field size needs a new chain in
`pcu.sv`. The PDU and PAU lists do not depend on N.

Unit counts are fixed at 4/2/2 in `ecc_pkg`. The hand schedules name
specific units, so the counts cannot be parameters.

## Departures and choices

These points are this design's own choices, not taken from the reference
architecture:

* The transfer encoding, the interlock and the constant-1 input of the bus
  multiplexer.
* The addition formulas and all three schedules. The schedules here are
  hand-made; the reference derived its own with an LP-based scheduler.
* The host register map and the `irq_done` output.
* Combinational memory reads.
* The 32-word memory depth.
* An asynchronous active-low reset.

Two points where the reference is not self-consistent, and how they were
resolved:

* **Coordinate system.** The reference names its main point representation
  affine/López-Dahab (x = X/Z, y = Y/Z²). Its doubling graph, its operation
  counts and its conversion unit are Jacobian (x = X/Z², y = Y/Z³). This
  design is Jacobian throughout.
* **Field size.** The reference says the point units need no change for
  another key length. Its inversion sequence, however, is given for
  GF(2^191) only. Here the PCU is specific to N = 191.

The reference also evaluates other configurations. None of them is
implemented here:

* 1, 2, 3 or 5 multipliers;
* the Montgomery ladder;
* affine/López-Dahab coordinates;
* addition-subtraction chains;
* a parallel Massey–Omura normal-basis multiplier.

## Files and simulation

Each file in `rtl/` starts with a description of its module:

* `ecc_pkg.sv`: field constants, memory map, transfer type.
* `ecc_coproc.sv`: the top level.
* `host_if.sv`: the host interface.
* `acu.sv`, `mcu.sv`, `pdu.sv`, `pau.sv`, `pcu.sv`: the controller.
* `ecc_datapath.sv`, `dp_ram.sv`, `lfsr_mul.sv`, `gf_sqr.sv`, `gf_add.sv`:
  the datapath.

Files in `tb/`:

* `ecc_ref_pkg.sv` is an independent reference model. It does field
  multiplication, inversion by the extended Euclidean algorithm, and affine
  point arithmetic.
* Each `tb_<module>.sv` checks one module.
* `tb_ecc_coproc.sv` runs the whole coprocessor at full size. It covers
  m = 0, 1, 2, 3, 11, a 20-bit m and a 191-bit m, plus host access during a
  run.
* `tb_ecc_coproc_d8.sv` repeats that test with 8-bit-digit multipliers.
* `tb_ecc_coproc_par.sv` repeats it with one-clock multipliers.

Every testbench prints `TB_RESULT checks=… failures=…`. To run one:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_coproc.sv \
    --top-module tb_ecc_coproc -o sim
./obj_dir/sim
```

Replace `tb_ecc_coproc` with any other testbench name to run that one.

The full-size end-to-end run takes about one second.
