// tb_rev_gray2bin -- end-to-end testbench for the 4-bit reversible
// Gray-to-binary converter, run with the converter at its defaults.
//
// 1. The vector marked by the cursor of the converter's reference waveform
//    (A=1 B=1 C=1 D=0 -> P=1 Q=0 R=1 S=1) is applied first.
// 2. All 16 Gray code words are applied, in Gray-count order and then in
//    plain binary order, and the output is compared with a reference
//    computed here by the bit-serial recurrence bin[i] = bin[i+1] ^ gray[i].
// 3. The 16 output words must all be different: the converter is a
//    bijection on 4 bits, i.e. it needs no constant input and produces no
//    garbage output.
// 4. Walking a Gray counter must make the binary output count up by one at
//    each step, wrapping from 15 to 0.
// Each mechanism (every input code seen, each step of the counting walk,
// the wrap-around) is counted, and one that never happened is a failure.
// A time-based watchdog ends a hung run.
`timescale 1ns/1ps
module tb_rev_gray2bin;

  logic a, b, c, d;
  logic p, q, r, s;
  int checks = 0;
  int failures = 0;
  int code_hits [16];
  int count_steps = 0;
  int wraps = 0;
  bit [15:0] out_seen;

  rev_gray2bin dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  function automatic logic [3:0] ref_bin(input logic [3:0] g);
    logic [3:0] res;
    res[3] = g[3];
    for (int i = 2; i >= 0; i--) res[i] = res[i+1] ^ g[i];
    return res;
  endfunction

  task automatic apply(input logic [3:0] g);
    {a, b, c, d} = g;
    #1;
    code_hits[g]++;
    checks++;
    if ({p, q, r, s} !== ref_bin(g)) begin
      failures++;
      $display("FAIL gray=%b: got %b%b%b%b expected %b", g, p, q, r, s, ref_bin(g));
    end
  endtask

  initial begin
    logic [3:0] prev;
    out_seen = '0;
    foreach (code_hits[i]) code_hits[i] = 0;

    // Cursor vector of the reference waveform.
    apply(4'b1110);
    checks++;
    if ({p, q, r, s} !== 4'b1011) begin
      failures++;
      $display("FAIL waveform vector: got %b%b%b%b expected 1011", p, q, r, s);
    end

    // Binary order over all Gray words; collect outputs for the bijection check.
    for (int i = 0; i < 16; i++) begin
      apply(4'(i));
      out_seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (out_seen != 16'hFFFF) begin
      failures++;
      $display("FAIL: converter is not one-to-one, outputs seen=%b", out_seen);
    end

    // Gray-counter walk: the binary output must step by +1 each time.
    apply(4'b0000);
    prev = {p, q, r, s};
    for (int n = 1; n <= 16; n++) begin
      logic [3:0] g;
      g = 4'(n) ^ (4'(n) >> 1);  // Gray code of n (mod 16)
      apply(g);
      checks++;
      if ({p, q, r, s} !== 4'(prev + 4'd1)) begin
        failures++;
        $display("FAIL count step %0d: %b -> %b%b%b%b", n, prev, p, q, r, s);
      end else begin
        count_steps++;
        if (prev == 4'hF) wraps++;
      end
      prev = {p, q, r, s};
    end

    // Coverage of the mechanisms exercised above.
    foreach (code_hits[i]) begin
      checks++;
      if (code_hits[i] == 0) begin
        failures++;
        $display("FAIL: Gray code %0d never applied", i);
      end
    end
    checks++;
    if (count_steps != 16) begin
      failures++;
      $display("FAIL: only %0d of 16 counting steps correct", count_steps);
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: wrap-around 15 -> 0 never seen");
    end
    $display("codes applied: all 16; counting steps=%0d wraps=%0d", count_steps, wraps);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
