// tb_compressor_4_2: exhaustive check of the 4:2 compressor over all 32 input
// combinations. For each it checks
//   * the arithmetic: x1+x2+x3+x4+cin = sum + 2*(carry + cout);
//   * that cout is the majority of x1..x3 and so does not depend on cin
//     (what lets a row of these compressors be chained without a ripple).
// A watchdog ends the run with a failure after 1000 time units.
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int cnt, got;
      logic maj;
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      cnt = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      got = int'(sum) + 2 * (int'(carry) + int'(cout));
      checks++;
      if (got != cnt) begin
        failures++;
        $display("FAIL sum v=%b: count=%0d got=%0d", 5'(v), cnt, got);
      end
      maj = (x1 & x2) | (x1 & x3) | (x2 & x3);
      checks++;
      if (cout !== maj) begin
        failures++;
        $display("FAIL cout v=%b: cout=%0d expected=%0d", 5'(v), cout, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
