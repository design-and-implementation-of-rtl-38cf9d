// tb_compressor_7_2: exhaustive check of the 7:2 compressor over all 512
// combinations of x1..x7, cin1 and cin2. For each it checks
//   * the arithmetic: sum(x) + cin1 + cin2 = sum + 2*carry + 2*cout1 + 4*cout2;
//   * that cout1 and cout2 do not depend on the carry-ins (they are compared
//     with the values seen for the same x with both carry-ins at zero).
// A watchdog ends the run with a failure after 10000 time units.
module tb_compressor_7_2;
  logic [7:1] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  logic [1:0] co_ref [128];
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2),
                      .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // cin pairs in order 00, 01, 10, 11 so that the 00 reference comes first.
    for (int ci = 0; ci < 4; ci++) begin
      for (int xv = 0; xv < 128; xv++) begin
        int cnt, got;
        x = 7'(xv);
        {cin1, cin2} = 2'(ci);
        #1;
        cnt = $countones(x) + int'(cin1) + int'(cin2);
        got = int'(sum) + 2 * int'(carry) + 2 * int'(cout1) + 4 * int'(cout2);
        checks++;
        if (got != cnt) begin
          failures++;
          $display("FAIL x=%b cin=%b: count=%0d got=%0d", x, 2'(ci), cnt, got);
        end
        if (ci == 0) begin
          co_ref[xv] = {cout2, cout1};
        end else begin
          checks++;
          if ({cout2, cout1} !== co_ref[xv]) begin
            failures++;
            $display("FAIL x=%b cin=%b: couts depend on carry-ins", x, 2'(ci));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
