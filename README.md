# A 4-bit pipelined adder in efficient charge recovery logic (ECRL)

This design is a small adder built for very low power. It uses two ideas:

- **Bit-level pipelining.** A 4-bit adder is cut into four stages, one per
  bit. Each stage adds one bit of the operands and passes its carry to the
  next stage through a flip-flop. The adder takes a new pair of operands on
  every clock and returns each sum three clocks later. The critical path is
  one full adder plus a flip-flop, whatever the width.
- **Adiabatic gates.** Every gate is an ECRL gate. It is powered by a ramped
  AC supply, the *power clock* `Vpc`, instead of a DC rail. During the falling
  ramp the charge on the gate's outputs goes back to the supply instead of to
  ground. Each ECRL gate is differential: a cross-coupled PMOS pair sits on
  `Vpc`, and an NMOS network pulls one of two output nodes low. The gate
  therefore always gives a true output and a complement output.

This RTL models the logic of that circuit: the gates, the flip-flops, the full
adder and the pipeline. It also keeps the one behaviour of the power clock that
logic can see: outputs go blank in the recover phase. The transistor-level
gains in delay and power that motivate the circuit cannot be seen in RTL.

## The pipeline (`ecrl_pipelined_csa`)

```
          stage 0        stage 1        stage 2        stage 3
a0,b0 -> FA0 ---------> [ff] -> [ff] -> [ff] ---------------------> s0
          |c
         [ff]
a1,b1 -> [ff] -------> FA1 --> [ff] -> [ff] ----------------------> s1
                        |c
                       [ff]
a2,b2 -> [ff] -> [ff] -------> FA2 --> [ff] ----------------------> s2
                                |c
                               [ff]
a3,b3 -> [ff] -> [ff] -> [ff] -------> FA3 -----------------------> s3, cout
```

Bit *i* is added in stage *i*, in the *i*-th clock after its operands
arrived:

| bit | operand flip-flops (a and b each) | carry flip-flop into it | sum flip-flops after it |
|-----|-----------------------------------|-------------------------|-------------------------|
| 0   | 0                                 | none (carry in = 0)     | 3                       |
| 1   | 1                                 | 1                       | 2                       |
| 2   | 2                                 | 1                       | 1                       |
| 3   | 3                                 | 1                       | 0 (s3 and cout direct)  |

That is 21 flip-flops and 4 full adders. The carry of bit *i* is computed in
clock *i* and registered. It arrives at bit *i+1* in clock *i+1*, together with
that bit's delayed operands. The sum skew is undone on the way out: every bit
of one result leaves in the same clock.

**Timing.** Operands present at rising edge *k* produce `{cout, s}` after edge
*k+2*, the third rising edge counting edge *k*. This gives a latency
of `WIDTH-1` = 3 clocks and one result per clock. `s3` and `cout` come straight
from the last full adder. The output therefore settles one full-adder delay
after that edge. There is no reset. The first three results after power-up are
meaningless, and the flip-flops start undefined.

The two operands are added with a rippling carry. In the published work this
circuit is called a carry save adder. Its structure, though, is the pipelined
ripple adder shown above. It has two operands, and each carry goes to the next
bit. There is no third operand and no separate saved-carry output.

`WIDTH` (default 4) generalises the structure. Bit *i* gets *i* input
flip-flops per operand and `WIDTH-1-i` output flip-flops. The latency is
`WIDTH-1`.

## The power clock in this model

The real `Vpc` is a ramp of 3.3 V peak at 1 MHz. Here it is one input bit,
`vpc`:

| `vpc` | phase          | every ECRL gate output         | flip-flops           |
|-------|----------------|--------------------------------|----------------------|
| 1     | evaluate/hold  | true rail = f(x), complement = !f(x) | capture on `clk` rising |
| 0     | recover        | both rails 0                   | hold their bit       |

Both rails at 0 means "no value". The flip-flop is built as a set/reset pair
fed by `d` and `d bar`. When neither rail is high it has nothing to capture,
so a clock edge in the recover phase leaves it unchanged. The result is that
**clock edges while `vpc` = 0 freeze the whole pipeline.** While frozen, `s`
and `cout` read 0. When `vpc` returns to 1 the outputs show the held results
again, and the pipeline continues where it stopped. For correct operation, put
the rising edges of `clk` in the `vpc` = 1 phase. Edges in the recover phase
are harmless stalls, not errors.

The rule that each rail pair holds exactly one high rail in the evaluate phase
is checked by immediate assertions in `ecrl_full_adder` and `ecrl_dff`.

## The gates

`ecrl_pkg` defines `rail_t`, a packed pair `{t, f}` for true and complement.
It also defines `ecrl_drive(vpc, value)`, which every gate uses to drive its
pair.

| module          | function                        | transistor topology it models |
|-----------------|---------------------------------|-------------------------------|
| `ecrl_buf_inv`  | t = in, f = !in                 | cross-coupled PMOS on Vpc, one NMOS on each side (IN, IN bar) |
| `ecrl_and_nand` | t = a & b, f = !(a & b)         | series NMOS a, b on one side; a bar, b bar on the other |
| `ecrl_xor_xnor` | t = a ^ b, f = !(a ^ b)         | crossed NMOS network on a, a bar, b, b bar |
| `ecrl_full_adder` | sum = a^b^c, carry = NAND(NAND(a^b, c), NAND(a, b)) | two XOR/XNOR and three AND/NAND gates |
| `ecrl_dff`      | rising-edge D flip-flop         | buffer/inverter on D, NAND set/reset, NAND storage |

In the transistor circuits the gates take both an input and its complement.
These models take single-rail inputs and form the complement inside. In the
full adder all five gates share one power-clock phase. A real multi-level ECRL
circuit often uses phase-shifted power clocks, which this model does not
represent.

## Where this RTL departs from the circuit it models

- **Flip-flop triggering.** The published flip-flop schematic is a
  clock-gated NAND latch, which is level-sensitive. Its description calls it
  edge triggered. The RTL uses a rising-edge flip-flop, because the pipeline
  needs edge-triggered registers.
- **"Carry save" name.** As explained above, the structure is a pipelined
  ripple adder. The RTL follows the structure.
- **Power clock as one bit.** The analog ramp, its amplitude and frequency,
  and the charge recovery itself are not modelled. The power-clock generator
  is not part of the RTL: `vpc` is a top-level input.
- **No reset** exists in the circuit, and none was added.
- **Not included:** the two static-CMOS versions the ECRL adder is compared
  with. One is the non-pipelined adder of half and full adders. The other is
  the static-CMOS pipelined adder, whose logic is the same as this design.

## Files

| file | contents |
|------|----------|
| `rtl/ecrl_pkg.sv` | `rail_t`, `ecrl_drive`, `rail_valid` |
| `rtl/ecrl_buf_inv.sv`, `rtl/ecrl_and_nand.sv`, `rtl/ecrl_xor_xnor.sv` | ECRL gates |
| `rtl/ecrl_full_adder.sv` | full adder from ECRL gates |
| `rtl/ecrl_dff.sv` | ECRL D flip-flop |
| `rtl/ecrl_pipelined_csa.sv` | the pipelined adder (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It also
has a watchdog that ends the run with a failure if it hangs. For example, to run
the whole adder:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ecrl_pkg.sv tb/tb_ecrl_pipelined_csa.sv --top-module tb_ecrl_pipelined_csa
./obj_dir/Vtb_ecrl_pipelined_csa
```

`tb_ecrl_pipelined_csa` runs the adder at its default width. It checks the
following:

- A single `0xF + 0x1` among zeros gives `0x10` exactly 3 clocks later.
- All 256 operand pairs, back to back, give the right sums one per clock.
- 5000 random pairs, with about one clock in five in the recover phase, give
  the right sums. Outputs read 0 while frozen, and no result is lost or
  repeated across a freeze.

It counts how often a carry out was produced, how often a carry rippled
through all four bits, how many clocks were frozen, and how many results
followed a freeze. It fails if any of these never happened. The gate and
full-adder testbenches are exhaustive over inputs and power-clock phase. The
flip-flop testbench checks edge capture, glitches between edges, and holding
across the recover phase.
