// tb_rev_rca: exhaustive self-check of the HNG ripple carry adder.
//
// Runs the 8-bit adder (default width) over all 2^17 combinations of a, b
// and cin, and a 4-bit instance over all 2^9, comparing {cout, sum} with the
// integer sum a + b + cin and the garbage outputs with the operand copies the
// HNG gates pass through. One directed vector, 10h + 41h = 51h, is checked
// first. Counts how often the carry out fires and how often cin is used;
// a mechanism that never happened counts as a failure.
module tb_rev_rca;
  logic [7:0]  a8, b8, sum8;
  logic        cin8, cout8;
  logic [15:0] g8;
  logic [3:0]  a4, b4, sum4;
  logic        cin4, cout4;
  logic [7:0]  g4;
  int checks = 0, failures = 0;
  int n_cout = 0, n_cin = 0;

  rev_rca dut8 (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8), .garbage(g8));
  rev_rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4), .garbage(g4));

  function automatic logic [15:0] interleave8(logic [7:0] x, logic [7:0] y);
    logic [15:0] v;
    for (int i = 0; i < 8; i++) begin
      v[2*i]   = x[i];
      v[2*i+1] = y[i];
    end
    return v;
  endfunction

  task automatic check8(int av, int bv, int cv);
    int expected;
    a8 = 8'(av); b8 = 8'(bv); cin8 = 1'(cv);
    #1;
    expected = av + bv + cv;
    checks++;
    if ({cout8, sum8} !== 9'(expected) || g8 !== interleave8(a8, b8)) begin
      failures++;
      if (failures < 10)
        $display("FAIL8 %0d + %0d + %0d -> cout=%0d sum=%0d", av, bv, cv, cout8, sum8);
    end
    if (cout8) n_cout++;
    if (cv != 0) n_cin++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check8(8'h10, 8'h41, 0);
    checks++;
    if (sum8 !== 8'h51) failures++;

    for (int av = 0; av < 256; av++)
      for (int bv = 0; bv < 256; bv++)
        for (int cv = 0; cv < 2; cv++)
          check8(av, bv, cv);

    for (int i = 0; i < 512; i++) begin
      {a4, b4, cin4} = 9'(i);
      #1;
      checks++;
      if ({cout4, sum4} !== 5'(int'(a4) + int'(b4) + int'(cin4))
          || g4 !== {b4[3], a4[3], b4[2], a4[2], b4[1], a4[1], b4[0], a4[0]}) begin
        failures++;
        $display("FAIL4 %0d + %0d + %0d -> cout=%0d sum=%0d", a4, b4, cin4, cout4, sum4);
      end
    end

    $display("carry out events=%0d, carry in used=%0d", n_cout, n_cin);
    checks++;
    if (n_cout == 0) failures++;
    checks++;
    if (n_cin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
