// ng1_gate -- 3x3 reversible NG1 gate.
//
// Outputs: p = a, q = a ^ b, r = a ^ b ^ c. Each output is the running XOR
// (prefix parity) of the inputs from a downwards, which is exactly the
// Gray-to-binary recurrence for three bits. The mapping is one-to-one; its
// inverse is the three-bit binary-to-Gray mapping (a = p, b = p ^ q,
// c = q ^ r).
//
// Interface: three 1-bit inputs, three 1-bit outputs. Purely
// combinational; no clock, no reset. Output p is a plain wire from a, as
// the gate definition requires.
//
// The equations are those of the published NG1 gate. The running-XOR form
// (r computed from q rather than from a, b, c separately) is this
// implementation's choice and is logically identical.
module ng1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = q ^ c;
  end

endmodule
