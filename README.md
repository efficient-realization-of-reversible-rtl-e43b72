# Reversible 4-bit Gray-to-binary converter

A Gray code word is turned back into binary by a running XOR from the most
significant bit down: each binary bit is the parity of all Gray bits at and
above its position. This design builds that conversion for 4 bits out of
**reversible gates**, meaning gates whose output vector fixes the input vector
uniquely. With reversible gates the cost is counted differently from ordinary
logic:

- **gate count**: the number of reversible gates;
- **constant inputs**: gate inputs tied to 0 or 1 so that the gate computes
  the wanted function;
- **garbage outputs**: gate outputs that only keep the circuit reversible
  and are not used;
- **quantum cost**: the number of 1x1 and 2x2 primitive gates needed to
  build the circuit.

The converter here uses two gates, an NG1 and a Feynman gate. It has no
constant inputs and no garbage outputs, and its quantum cost is 3. Earlier
designs needed either five Feynman gates, two constant inputs and three
garbage outputs, or an NG1 followed by an NG2.

## The two gates

| gate | size | outputs |
|------|------|---------|
| Feynman (controlled NOT), `feynman_gate` | 2x2 | P = A, Q = A ^ B |
| NG1, `ng1_gate` | 3x3 | P = A, Q = A ^ B, R = A ^ B ^ C |

NG1 already *is* a 3-bit Gray-to-binary converter. Its outputs are the running
XOR of its inputs, and it is one-to-one. Its inverse is the 3-bit
binary-to-Gray map (A = P, B = P ^ Q, C = Q ^ R). The Feynman gate is its own
inverse.

## How the converter is wired (`rev_gray2bin`)

```
 a ──┬─────────┬───────────────────────── p = a
 b ──┤   NG1   ├───────────────────────── q = a^b
 c ──┴─────────┴── a^b^c ──┬─────────┬─── r = a^b^c
                           │ Feynman │
 d ────────────────────────┴─────────┴─── s = a^b^c^d
```

The key point is how the fourth bit is added without extra cost. NG1's third
output, a^b^c, is both the binary bit `r` and the control input of the
Feynman gate. A Feynman gate passes its control input through unchanged, so
its first output gives `r`, and its second output gives `s` = a^b^c^d. NG1's
first two outputs are `p` and `q`. So every gate output is a primary output
(no garbage), and every gate input is a Gray bit (no constants). Gray code
goes in on 4 lines and binary comes out on 4 lines, and the whole circuit is
a bijection.

In a CMOS netlist, a pass-through output is just a wire. So the circuit
synthesises to three 2-input XORs in a chain: a → q → r → s.

Ports: `a b c d` are the Gray bits, with `a` as the MSB. `p q r s` are the
binary bits, with `p` as the MSB. All ports are 1 bit wide. There is no
clock and no reset: the converter is purely combinational, and its outputs
follow its inputs after three XOR delays.

`rev_gray2bin` contains one immediate assertion. It re-encodes the output to
Gray code (p, p^q, q^r, r^s) and checks that the result equals the input. A
simulator that evaluates assertions stops on the first wrong conversion.
Synthesis ignores the assertion.

## What follows the published design and what does not

Taken from the published design:

- the gates used (NG1 and Feynman);
- their equations;
- the wiring, including which NG1 output drives which Feynman input;
- the port names A–D and P–S;
- the test vector A=1 B=1 C=1 D=0 → P=1 Q=0 R=1 S=1. This vector is taken
  from the published simulation waveform.

Choices made in this implementation:

- **Bit significance.** A is the MSB and S the LSB. This follows from
  P = A and from S being the parity of all four inputs.
- **Width and interface.** The width is fixed at 4, with scalar ports. No
  other width is described.
- **Structure details.** The RTL writes NG1's R as Q ^ C rather than as
  three separate XORs. The two forms are logically identical.
- **Self-check.** The self-check assertion in `rev_gray2bin` is an addition.

Not built:

- the earlier converters that the design is compared with;
- the other gates in the usual catalogue of reversible gates: the Feynman
  double gate, the Toffoli gate and NG2. The converter does not use them.

Quantum cost is a property of the reversible (for example quantum)
implementation. It cannot be seen in this RTL. Likewise, the RTL does not
stop a synthesis tool from merging the gates into plain XOR logic. The RTL
captures the logical structure and behaviour of the reversible circuit. It
is not a reversible-technology netlist.

## Files

| file | content |
|------|---------|
| `rtl/feynman_gate.sv` | 2x2 Feynman gate |
| `rtl/ng1_gate.sv` | 3x3 NG1 gate |
| `rtl/rev_gray2bin.sv` | the converter (top) |
| `tb/tb_feynman_gate.sv` | all 4 inputs, self-inverse check, bijection check |
| `tb/tb_ng1_gate.sv` | all 8 inputs, inverse check, bijection check |
| `tb/tb_rev_gray2bin.sv` | end-to-end test of the converter |

The end-to-end test runs these checks:

1. It applies the waveform vector.
2. It applies all 16 Gray words and compares the outputs with a reference
   computed by the bit-serial recurrence.
3. It checks that the 16 outputs are all different.
4. It walks a Gray counter through 16 steps and checks that the binary
   output counts up by one, including the wrap from 15 to 0.

The test counts how often each of these checks was exercised and fails if
any never was.

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
          --top-module tb_rev_gray2bin tb/tb_rev_gray2bin.sv
./obj_dir/Vtb_rev_gray2bin
```

Substitute `tb_ng1_gate` or `tb_feynman_gate` to test the gates alone. To
lint the RTL, run `verilator --lint-only -Wall -y rtl rtl/rev_gray2bin.sv`.
