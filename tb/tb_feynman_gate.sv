// tb_feynman_gate: exhaustive self-check of the Feynman gate.
//
// Applies all four input patterns, checks P = A and Q = A xor B against an
// arithmetic reference ((A + B) mod 2), and checks that the four output
// patterns are all different, i.e. that the gate is reversible.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> p=%0d q=%0d", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %0d%0d repeated: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
