// tb_half_adder: exhaustive check of the half adder against the bit count of
// its two inputs. A watchdog ends the run with a failure after 1000 time units.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int cnt;
      {a, b} = 2'(v);
      #1;
      cnt = int'(a) + int'(b);
      checks++;
      if (sum !== cnt[0] || carry !== cnt[1]) begin
        failures++;
        $display("FAIL a=%0d b=%0d: sum=%0d carry=%0d", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
