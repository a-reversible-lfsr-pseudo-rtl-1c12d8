# Reversible LFSR pseudo-random pattern generator

A linear feedback shift register (LFSR) is the usual source of test patterns for built-in
self-test: a chain of flip-flops whose first stage is fed with the XOR of some later
stages. With a primitive characteristic polynomial an N-stage register steps through all
2^N - 1 non-zero states before it repeats.

This design builds that generator out of **reversible logic only**. A reversible gate maps
its inputs to its outputs one-to-one, so it has as many outputs as inputs and never
discards information. That rules out the ordinary building blocks. A signal cannot simply
fan out. An inverter is a gate on a line. A storage element has no reset pin and must be
made from gates plus a feedback line. Every piece here is built from one kind of gate,
the *controlled XOR*: a target line is inverted when all of its control lines are 1, and
the control lines pass through unchanged. Outputs that the circuit does not need are
*garbage lines*. They are brought out as ports so that nothing is hidden.

The default configuration is a 4-stage generator with characteristic polynomial
phi(x) = x^4 + x + 1. From the seed Q0 = 1 it produces the 15-vector sequence shown below.

## The reversible D latch (`rev_d_latch`)

This is the part that needs the most explanation. The latch has four lines: Qn (the
stored value, fed back), D, CLK and a constant 0. Three controlled-XOR gates act on them
in order:

| gate | target | controls | line value afterwards |
|------|--------|----------|-----------------------|
| 1 | D line | Qn, CLK | D' = Qn·CLK ⊕ D |
| 2 | Qn line | D', CLK | Qn+1 = Qn ⊕ D'·CLK = Qn·CLK ⊕ D·CLK ⊕ Qn |
| 3 | 0 line | Qn+1 | copy of Qn+1 |

Qn+1 = Qn·CLK ⊕ D·CLK ⊕ Qn simplifies to `CLK ? D : Qn`, which is a latch that is open
while CLK = 1. The copy on the former 0 line is routed back to the Qn input, and this loop
is what stores the bit. The outputs are:

- line 1: Qn+1, the latch output `q`;
- line 2: Qn·CLK ⊕ D, the `garbage` output. It is 0 while the latch is open and equals D
  while it holds;
- line 3: CLK, passed on as `clk_out`.

**How the loop is written.** A literal wire from the copy line back to the Qn input
would be a zero-delay combinational cycle. Instead, the RTL closes the loop through an
`always_latch` that is enabled while CLK = 1. This changes nothing functionally. While
CLK = 0 the cascade gives Qn back unchanged, so holding the value is exactly what the
loop does. While CLK = 1 the cascade's output is D whatever Qn is, so the stored value is
taken from the cascade evaluated with CLK = 1. The gate functions are in
`rev_lfsr_pkg::latch_cascade`, and the outputs are computed from the stored value by the
same function. Synthesis therefore infers one latch per `rev_d_latch`. An assertion checks
that the copy line always equals line 1.

## The master-slave flip-flop and the clock line (`rev_dff`)

A flip-flop is two latches in series. The master latch is clocked by the CLK line. A
controlled XOR with no controls, which is an inverter, then turns the line into CLK̄, and
the slave latch is clocked by CLK̄. A second inverter turns the line back into CLK, and it
continues to the next flip-flop. The clock is a line that passes through every stage,
like any other reversible line.

The master is open while clk = 1 and the slave while clk = 0, so **the flip-flop takes D
at the falling edge of clk**. Its output changes only after that edge, never at the
rising edge. Each flip-flop has two garbage outputs, one from each latch.

## The feedback line and the polynomial convention (`rev_lfsr_feedback`)

The stages are numbered in shift order, Q0 → Q1 → … → Q(N-1), and the feedback drives
D of Q0. The polynomial coefficients count from the other end. Write the characteristic
polynomial as phi(x) = phi_N x^N + … + phi_1 x + phi_0. Then

    new Q0 = XOR over i < N of  phi_i · Q(N-1-i)

So phi_0 selects the last stage, phi_1 the second-to-last, and so on. The parameter `POLY`
holds phi_N..phi_0, with bit i = phi_i, and phi_N must be 1. For x^4 + x + 1
(`POLY = 5'b10011`) this gives **Q0 ← Q3 ⊕ Q2**.

In reversible form the feedback is a single line. It leaves the last stage carrying
Q(N-1), and one controlled XOR per further tap adds that stage's output onto it. The
pattern outputs `q` are copies of the flip-flop outputs, made by controlled XORs onto
constant-0 lines, because a line cannot fan out.

## The generator (`rev_lfsr`, top level)

N `rev_dff` stages are chained through their D inputs and their clock line, and the
feedback line closes the ring. One new vector appears per clock period, just after each
falling edge.

Default sequence from the seed 0001 (written Q3Q2Q1Q0, so Q0 = 1). Columns are Q0 Q1 Q2 Q3:

    1000 0100 0010 1001 1100 0110 1011 0101
    1010 1101 1110 1111 0111 0011 0001 | 1000 (repeats)

**Seed loading is an addition of this design.** The original circuit starts from a seed but
does not show how the seed is loaded. Here, while `seed_load` = 1, every flip-flop's D input
takes `seed[i]` instead of its shift input, so one clock period with `seed_load` high sets
the register to `seed`. This selector is ordinary logic in front of the reversible
netlist. Nothing else is reset, and the register's value is random until the first load.
An all-zero seed stays all-zero, as in any XOR LFSR.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock line; vectors change after each falling edge |
| `seed_load` | in | 1 | 1: load `seed` at the next falling edge |
| `seed` | in | N | seed, bit i goes to Qi |
| `q` | out | N | pattern, bit i = Qi |
| `clk_out` | out | 1 | clock line after the last stage |
| `garbage` | out | 2N | line-2 outputs of each stage's master (bit 2i) and slave (bit 2i+1) latches |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | number of stages |
| `POLY` | `5'b10011` (x^4 + x + 1) | phi_N..phi_0; must be N+1 bits wide with bit N set |

Other lengths need both parameters. Some primitive trinomials that work (from standard
tables): N = 5 with x^5 + x^2 + 1 (`6'b100101`), N = 36 with x^36 + x^11 + 1
(`37'h10_0000_0801`), and N = 41 with x^41 + x^3 + 1 (`42'h200_0000_0009`).

## Where this RTL departs from, or adds to, the original design

- **Seed-load selector**: added, as described above.
- **Latch loop**: closed through `always_latch` rather than a literal wire. The behaviour
  is the same, but it is written so that tools see a latch, not a cycle.
- **Only the external-XOR form** is built. An internal-XOR register with XOR gates
  between the stages is a textbook alternative and is not part of this design. Neither is
  a conventional, non-reversible LFSR, which is the comparison point.
- **Lint and synthesis warnings**: tools report a latch in every `rev_d_latch`, which is
  intended. They also report a combinational loop through the ring of latches in
  `rev_lfsr`. That loop is the shift-and-feedback ring itself. It is always cut in
  operation, because a master latch and the slave latch feeding it are never open at the
  same time.
- **Not modelled**: gate-count or quantum-cost figures, and any electrical or timing
  behaviour. The RTL is zero-delay and functional.
- **Period at N = 5**: the 5-stage generator repeats after 31 vectors, the full 2^5 - 1.
  A run of 15 vectors is simply the first half of that period.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`.

- `tb_rev_d_latch`: random D and CLK changes. Checks q (transparent or holding), the
  garbage line and the clock pass-through against the latch equations.
- `tb_rev_dff`: random D changes in both clock phases. Checks that q changes only after
  falling edges, that the rising edge and D changes leave it alone, and the values of
  both garbage lines.
- `tb_rev_lfsr_feedback`: all input values for a 4-stage (x^4+x+1) and a 5-stage
  (x^5+x^2+1) instance. The expected taps are written out by hand.
- `tb_rev_lfsr`: the default 4-stage generator end to end, with default parameters. It
  checks the 16-row sequence above, the period of exactly 15 with 15 distinct non-zero
  states, all 15 non-zero seeds against an independently written next-state rule, the
  all-zero lock-up, and that nothing changes at the rising edge. It also counts seed loads,
  feedback steps that inject a 1, steps that inject a 0, and full-period wrap-arounds, and
  fails if any of them never happens.
- `tb_rev_lfsr_lengths`: 5-, 36- and 41-stage generators side by side. It checks the full
  31-vector period at N = 5, 850 distinct vectors at N = 36 and 2550 at N = 41, each step
  against a reference rule computed from the polynomial.

## Files and simulation

    rtl/rev_lfsr_pkg.sv        default N and POLY, latch line struct, gate functions
    rtl/rev_d_latch.sv         reversible D latch
    rtl/rev_dff.sv             master-slave flip-flop, clock-line inverters
    rtl/rev_lfsr_feedback.sv   feedback line and output copies
    rtl/rev_lfsr.sv            top level
    tb/tb_*.sv                 testbenches

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rev_lfsr \
        -y rtl -y tb +libext+.sv rtl/rev_lfsr_pkg.sv tb/tb_rev_lfsr.sv
    ./obj_dir/Vtb_rev_lfsr

Use the same command with the other testbench names. Verilator prints an `UNOPTFLAT`
warning for the latch ring. It is expected and does not affect the results;
`-Wno-fatal` keeps it from stopping the build. In a testbench, avoid changing a design
input after a `#0` delay: Verilator 5 may then not re-evaluate the latch outputs in the
same time step. Use a delay of at least one time unit.
