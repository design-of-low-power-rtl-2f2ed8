// tb_vedic_8x8: end-to-end self-check of the 8x8 reversible Vedic multiplier.
//
// Runs the top at its default configuration over all 65,536 operand pairs
// and compares the 16-bit product with the integer product a * b. It also
//  - applies directed vectors first: 6 * 3 = 18 (the small worked example of
//    the vertical-and-crosswise method), 10h * 41h, 8Fh * 9Fh (a case where
//    only the second middle carry ca2 fires) and FFh * FFh;
//  - checks that the final adder's carry out (garbage bit 249) stays 0;
//  - checks that product plus garbage is different for every operand pair,
//    i.e. that the reversible network loses no information;
//  - counts from a reference model of the crosswise sums how often each
//    middle carry fires (ca1 from m1 + m2, ca2 from adding m0's high nibble),
//    how often the top byte is used, and fails if any of these never happens
//    or if ca1 and ca2 ever fire together.
module tb_vedic_8x8;
  logic [7:0]   a, b;
  logic [15:0]  s;
  logic [249:0] g;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_hi = 0;
  bit seen [logic [265:0]];

  vedic_8x8 dut (.a(a), .b(b), .s(s), .garbage(g));

  task automatic apply(int av, int bv, bit record);
    int m0, m1, m2, mid, ca1, ca2;
    a = 8'(av);
    b = 8'(bv);
    #1;
    checks++;
    if (s !== 16'(av * bv)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d (expected %0d)", av, bv, s, av * bv);
    end
    checks++;
    if (g[249] !== 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL final carry set for %0d * %0d", av, bv);
    end
    if (record) begin
      checks++;
      if (seen.exists({s, g})) begin
        failures++;
        if (failures < 10) $display("FAIL outputs repeat for %0d * %0d", av, bv);
      end
      seen[{s, g}] = 1'b1;

      m0  = (av % 16) * (bv % 16);
      m1  = (av / 16) * (bv % 16);
      m2  = (av % 16) * (bv / 16);
      mid = m1 + m2;
      ca1 = mid / 256;
      ca2 = ((mid % 256) + m0 / 16) / 256;
      n_ca1 += ca1;
      n_ca2 += ca2;
      if (s[15:8] != 0) n_hi++;
      checks++;
      if (ca1 + ca2 > 1) failures++;
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(6, 3, 1'b0);
    checks++;
    if (s !== 16'd18) failures++;
    apply(8'h10, 8'h41, 1'b0);
    apply(8'h8F, 8'h9F, 1'b0);
    apply(8'hFF, 8'hFF, 1'b0);

    for (int av = 0; av < 256; av++)
      for (int bv = 0; bv < 256; bv++)
        apply(av, bv, 1'b1);

    $display("ca1 events=%0d ca2 events=%0d nonzero high byte=%0d", n_ca1, n_ca2, n_hi);
    checks++;
    if (n_ca1 == 0) failures++;
    checks++;
    if (n_ca2 == 0) failures++;
    checks++;
    if (n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
