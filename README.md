# A 2-bit-per-stage ripple adder in QCA clock-zone form

In quantum-dot cellular automata (QCA) the only native logic gates are the
inverter and the three-input majority gate, M(a,b,c) = ab + ac + bc, and every
majority gate on a path costs one clock phase, because the circuit is divided
into clock zones that each hold their value like a latch. A conventional
ripple-carry adder therefore spends two cascaded majority gates, two phases,
for every two bit positions the carry crosses.

This adder halves that. Its building block is a 2-bit module that moves the
carry across two bit positions through a single majority gate. Everything
that does not depend on the incoming carry is computed ahead of it. The
result keeps the ripple structure and its short wires, but its worst-case
path is N/2 + 3 majority gates and one inverter. The RTL here models the
adder gate for gate and zone for zone. One clock edge stands for one QCA
clock phase, and one register stage for one clock zone. The cycle-level
timing therefore matches that of the QCA circuit: 36 phases (nine four-phase
clock cycles) for 64 bits.

## The 2-bit module

For bit positions i and i+1 with propagate p(i) = a(i) + b(i) and generate
g(i) = a(i)·b(i), the lookahead carry is

    c(i+2) = g(i+1) + p(i+1)·g(i) + p(i+1)·p(i)·c(i)

which can be rewritten with majority gates only:

    c(i+2) = M( M(a(i+1), b(i+1), g(i)),  M(a(i+1), b(i+1), p(i)),  c(i) )
    c(i+1) = M( p(i), g(i), c(i) )

Why this works: if a(i+1) = b(i+1) the two inner gates both equal that bit,
which is the carry. If exactly one of them is 1, the inner gates pass g(i)
and p(i), and M(g, p, c) = g + p·c, because g implies p. The two inner gates
do not depend on c(i), so only the outer gate lies on the carry path.

In `qca_mod2` this becomes three clock zones:

| zone | gates                                    | needs       |
|------|------------------------------------------|-------------|
| 1    | p(i) = M(a,b,1), g(i) = M(a,b,0)         | operands    |
| 2    | M(a(i+1),b(i+1),g(i)), M(a(i+1),b(i+1),p(i)) | zone 1  |
| 3    | c(i+1), c(i+2)                           | zone 2, c(i)|

The operands must therefore reach a module two phases before its carry, and
the carries leave one phase after the carry arrives.

The least significant module (`qca_mod2_lsb`) has no carry-in: the adder
fixes c0 = 0. It needs no p0, and reduces to c1 = g0 and c2 = M(a1, b1, g0).
That takes two zones.

## The pipeline and its phase budget

`qca_adder` is an input acquisition zone, then the carry chain
(`qca_carry_chain`), then the sum block (`qca_sum_block`):

    phase 1            register A, B
    phases 2-3         g0, then c2 (LSB module)
    phases 4..N/2+2    one phase per remaining 2-bit module (N/2 - 1 of them)
    phases N/2+3..+4   sum bits (two majority gates and an inverter)

Latency is N/2 + 4 phases:

| N  | phases | QCA cycles |
|----|--------|------------|
| 8  | 8      | 2          |
| 16 | 12     | 3          |
| 32 | 20     | 5          |
| 64 | 36     | 9          |

`qca_pkg::adder_latency_phases(N)` computes this latency.

Since the carry reaches module k only k phases after module 1, the chain
delays module k's operands by k-1 zones, so that they arrive just ahead of
its carry. It also holds each module's carries until the last module is done,
so that all carries of one addition leave the chain in the same clock. In a
QCA layout these delays are wire lengths; here they are `qca_wire_delay`
shift registers. Operands travel alongside the carries to the sum block.
Because every stage is a register, a new addition can start on every clock.
The RTL does not require the one-per-four-phases spacing that a QCA layout
needs between data waves.

## Sum bits

Each sum bit uses the standard QCA full-adder form:

    t(i) = M(a(i), b(i), ~c(i))          zone 1
    s(i) = M(~c(i+1), c(i), t(i))        zone 2

The carry-out c(N) is passed along as `sum[N]`, so the result bus is N+1 bits
wide.

## Interface of `qca_adder`

| port      | dir | width | meaning                                             |
|-----------|-----|-------|-----------------------------------------------------|
| clk       | in  | 1     | one edge per QCA clock phase                        |
| rst_n     | in  | 1     | asynchronous, active low; clears the valid flags only |
| in_valid  | in  | 1     | A and B hold an operation this clock                |
| a, b      | in  | N     | operands                                            |
| out_valid | out | 1     | `sum` holds a result                                |
| sum       | out | N+1   | {carry-out, A+B}                                    |

An operation applied with `in_valid` before clock edge t has its result on
`sum` with `out_valid` high right after edge t + N/2 + 3. That is the
(N/2 + 4)-th register stage, counting the acquisition stage. The parameter
`N` must be even and defaults to 64.

## Where this departs from, or adds to, the QCA circuit

- The equations for the 2-bit modules, c0 = 0, the carry-out in the sum bus
  and the phase budget all come from the QCA design. The 32- and 64-bit
  latencies of 5 and 9 cycles are reproduced exactly.
- The exact zone for each gate, the skew and de-skew delay lines, and the
  sum-bit equations are reconstructions. They are consistent with the stated
  gate counts and phase counts, but the cell layouts are not reproduced.
- Whole-word output alignment is an assumption. All sum bits of one addition
  appear in the same clock.
- Added for use as RTL: `in_valid`/`out_valid` and the reset of the valid
  pipeline. The data registers are not reset.
- The four-phase QCA clock itself is not modelled. It becomes the single
  clock `clk`.
- Not modelled: area, cell counts, wire crossovers, polarisation and
  temperature behaviour. These are properties of the QCA cell layout.

## Files

| file | content |
|------|---------|
| `rtl/qca_pkg.sv` | majority function, latency formula |
| `rtl/qca_maj3.sv` | majority gate |
| `rtl/qca_wire_delay.sv` | multi-zone wire (shift register) |
| `rtl/qca_mod2_lsb.sv` | least significant 2-bit module |
| `rtl/qca_mod2.sv` | 2-bit basic module |
| `rtl/qca_carry_chain.sv` | N/2 modules with operand skew and carry de-skew |
| `rtl/qca_sum_block.sv` | N sum bits |
| `rtl/qca_adder.sv` | top: acquisition zone, carry chain, sum block, valid pipeline |

Each block has a self-checking testbench `tb/tb_<module>.sv`, and all of them
print `TB_RESULT checks=... failures=...` at the end:

- `tb_qca_adder` runs the 64-bit default. It covers worst-case ripple (all
  ones plus one), carry-out, back-to-back operations, idle gaps, and a reset
  with operations in flight. It also checks the 36-phase latency.
- `tb_qca_adder_widths` runs 8, 16, 32 and 64 bits side by side and checks
  each latency.

To simulate, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/qca_pkg.sv \
        tb/tb_qca_adder.sv --top-module tb_qca_adder
    ./obj_dir/Vtb_qca_adder

To change the width, override `N` on `qca_adder`. The latency follows
automatically.
