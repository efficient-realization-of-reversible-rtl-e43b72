// tb_ng1_gate -- self-checking testbench for ng1_gate.
//
// Applies all eight input combinations and compares p, q, r with a truth
// table of the NG1 definition (p = a, q = a^b, r = a^b^c) written out by
// hand below. It also checks that the outputs, re-encoded as
// (p, p^q, q^r), give back the inputs, and that the eight output words are
// all different (the gate is reversible). A time-based watchdog ends a
// hung run.
`timescale 1ns/1ps
module tb_ng1_gate;

  logic a, b, c, p, q, r;
  int checks = 0;
  int failures = 0;
  bit [7:0] seen;

  // Expected {p,q,r} indexed by {a,b,c}.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                     3'b111, 3'b110, 3'b100, 3'b101};

  ng1_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check($sformatf("out abc=%b%b%b", a, b, c), {p, q, r}, EXP[i]);
      check($sformatf("inverse abc=%b%b%b", a, b, c), {p, p ^ q, q ^ r}, {a, b, c});
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin
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
