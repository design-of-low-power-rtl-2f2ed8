// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier.
//
// For all 256 operand pairs it compares f with the integer product a * b,
// checks that the final adder's carry out (garbage bit 49) stays 0, and that
// product plus garbage differ for every input pair (no information lost).
// It also counts, from a reference model of the crosswise sums, how often
// each of the two middle carries (ca1 from m1 + m2, ca2 from adding m0's high
// half) is set, and fails if either never happens or both happen at once.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] f;
  logic [49:0] g;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0;
  bit seen [logic [57:0]];

  vedic_4x4 dut (.a(a), .b(b), .f(f), .garbage(g));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, m1, m2, mid, ca1, ca2;
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (f !== 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, f);
      end
      checks++;
      if (g[49] !== 1'b0) begin
        failures++;
        $display("FAIL final carry set for %0d * %0d", a, b);
      end
      checks++;
      if (seen.exists({f, g})) begin
        failures++;
        $display("FAIL outputs repeat for a=%0d b=%0d", a, b);
      end
      seen[{f, g}] = 1'b1;

      m0  = int'(a[1:0]) * int'(b[1:0]);
      m1  = int'(a[3:2]) * int'(b[1:0]);
      m2  = int'(a[1:0]) * int'(b[3:2]);
      mid = m1 + m2;
      ca1 = mid / 16;
      ca2 = ((mid % 16) + m0 / 4) / 16;
      n_ca1 += ca1;
      n_ca2 += ca2;
      checks++;
      if (ca1 + ca2 > 1) failures++;
    end
    $display("ca1 events=%0d ca2 events=%0d", n_ca1, n_ca2);
    checks++;
    if (n_ca1 == 0) failures++;
    checks++;
    if (n_ca2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
