// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier.
//
// For all 16 operand pairs it compares s with the integer product a * b and
// checks that the product together with the six garbage outputs is different
// for every input pair, i.e. that no information is lost in the gate network.
// It also checks the garbage outputs that are plain operand copies
// (TG2.Q = b0, TG3.Q = a0, TG4.P = a1, TG4.Q = b1).
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] s;
  logic [5:0] g;
  int checks = 0, failures = 0;
  bit seen [logic [9:0]];

  vedic_2x2 dut (.a(a), .b(b), .s(s), .garbage(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (s !== 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, s);
      end
      checks++;
      if (g[3:0] !== {b[1], a[1], a[0], b[0]}) begin
        failures++;
        $display("FAIL garbage copies %b for a=%0d b=%0d", g[3:0], a, b);
      end
      checks++;
      if (seen.exists({s, g})) begin
        failures++;
        $display("FAIL outputs repeat for a=%0d b=%0d: information lost", a, b);
      end
      seen[{s, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
