// tb_hng_gate: exhaustive self-check of the HNG gate.
//
// Applies all sixteen input patterns. With D = 0 the pair {S, R} must equal
// the arithmetic sum A + B + C (the gate is a full adder); with D = 1, S is
// that carry inverted. P and Q must copy A and B. It also checks that the
// sixteen output patterns are all different, i.e. that the gate is reversible.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  int   total;
  bit   seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== 1'(total % 2) || s !== (1'(total / 2) ^ d)) begin
        failures++;
        $display("FAIL abcd=%0d%0d%0d%0d -> pqrs=%0d%0d%0d%0d", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output pattern repeated: not reversible");
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
