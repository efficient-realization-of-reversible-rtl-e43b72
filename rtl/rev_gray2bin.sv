// rev_gray2bin -- 4-bit reversible Gray-to-binary code converter.
//
// A 4-bit Gray code word {a,b,c,d} (a is the MSB) is turned into the
// binary word {p,q,r,s} with two reversible gates and nothing else:
//
//   a ---+---------------------------------------- p = a
//   b ---| NG1 |---------------------------------- q = a^b
//   c ---+-----+-- a^b^c --+---------+------------ r = a^b^c
//                          | Feynman |
//   d ---------------------+---------+------------ s = a^b^c^d
//
// The NG1 gate yields the top three binary bits directly. Its third output
// is the control input of a Feynman gate whose target is d, so the Feynman
// gate passes a^b^c on as r and produces the LSB s. Every gate output is a
// primary output and every primary input is a data bit: the circuit needs
// no constant inputs and leaves no garbage outputs. It has 4 inputs and 4
// outputs and is a bijection, so it is reversible as a whole.
//
// Interface: four 1-bit Gray inputs, four 1-bit binary outputs, named as in
// the gate-level drawing of the converter (A..D in, P..S out). Purely
// combinational: no clock, no reset; the critical path is three XORs
// (a -> q -> r -> s). Output p is a plain wire from input a, because the
// NG1 gate passes its first input through (P = A); the same holds for the
// Feynman gate's first output, so r and the NG1 third output are one net.
//
// The gate choice, the wiring and the port names follow the published
// proposed design. The immediate assertion below is this implementation's
// own: it re-encodes the output to Gray code and checks that it equals the
// input, which is the defining property of the converter.
module rev_gray2bin (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  // NG1 third output, routed into the Feynman gate's control input.
  logic ng1_r;

  ng1_gate u_ng1 (
    .a (a),
    .b (b),
    .c (c),
    .p (p),
    .q (q),
    .r (ng1_r)
  );

  feynman_gate u_fg (
    .a (ng1_r),
    .b (d),
    .p (r),
    .q (s)
  );

  // Binary-to-Gray of the output must give back the input.
  always_comb begin
    assert ({p, p ^ q, q ^ r, r ^ s} == {a, b, c, d})
      else $error("rev_gray2bin: output %b%b%b%b is not the binary of Gray %b%b%b%b",
                  p, q, r, s, a, b, c, d);
  end

endmodule
