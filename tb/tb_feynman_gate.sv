// tb_feynman_gate -- self-checking testbench for feynman_gate.
//
// Applies all four input combinations and compares p, q with the gate
// definition (p = a, q = a XOR b) written here as a truth table. A second
// instance is fed the first one's outputs to check that the gate is its own
// inverse, and the four output pairs are checked to be all different
// (the gate is a bijection). A time-based watchdog ends a hung run.
`timescale 1ns/1ps
module tb_feynman_gate;

  logic a, b, p, q;
  logic p2, q2;
  int checks = 0;
  int failures = 0;
  bit [3:0] seen;

  // Expected {p,q} indexed by {a,b}.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a),  .b(b),  .p(p),  .q(q));
  feynman_gate dut2 (.a(p),  .b(q),  .p(p2), .q(q2));

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check($sformatf("out a=%b b=%b", a, b), {p, q}, EXP[i]);
      check($sformatf("inverse a=%b b=%b", a, b), {p2, q2}, {a, b});
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen != 4'hF) begin
      failures++;
      $display("FAIL: outputs not one-to-one, seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
