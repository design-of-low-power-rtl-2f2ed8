// tb_peres_gate: exhaustive self-check of the Peres gate.
//
// Applies all eight input patterns and checks P = A, Q = A xor B and R = AB xor C against arithmetic
// references (XOR as a sum mod 2, AND as a product). It also checks that the
// eight output patterns are all different, i.e. that the gate is reversible.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2) || r !== 1'((int'(a) * int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> p=%0d q=%0d r=%0d", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %0d%0d%0d repeated: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
