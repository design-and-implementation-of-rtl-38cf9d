// tb_compressor_3_2: exhaustive check of the 3:2 compressor. All eight input
// combinations are applied; sum and carry are compared with the bit count of
// the inputs (sum = count mod 2, carry = count / 2). A watchdog ends the run
// with a failure if it does not finish within 1000 time units.
module tb_compressor_3_2;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int cnt;
      {a, b, c} = 3'(v);
      #1;
      cnt = int'(a) + int'(b) + int'(c);
      checks++;
      if (sum !== cnt[0] || carry !== cnt[1]) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d: sum=%0d carry=%0d", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
