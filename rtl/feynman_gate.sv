// feynman_gate -- 2x2 reversible Feynman gate (controlled NOT).
//
// The first input is passed through unchanged (p = a) and the second is
// XORed with it (q = a ^ b). The mapping (a,b) -> (p,q) is one-to-one, and
// the gate is its own inverse: feeding (p,q) back in returns (a,b).
//
// Interface: two 1-bit inputs, two 1-bit outputs. Purely combinational; no
// clock, no reset, outputs follow the inputs in the same delta cycle.
// Output p is a plain wire from a, as the gate definition requires.
//
// The equations are the standard Feynman gate definition. Port names follow
// the A/B -> P/Q labels of the gate's usual box symbol.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
