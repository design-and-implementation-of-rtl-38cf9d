// tb_urdhva_pp: exhaustive check of the partial-product generator over all
// 65536 operand pairs. For each pair it checks
//   * every bit of the 15 columns against a[k-i] & b[i], worked out here from
//     the column index, and that bits above a column's height are zero;
//   * that the column counts, weighted by 2^k, add up to a * b.
// A watchdog ends the run with a failure after 100000 time units.
module tb_urdhva_pp;
  import vedic_pkg::*;
  operand_t a, b;
  pp_cols_t pp;
  int checks = 0, failures = 0;

  urdhva_pp dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 256; bv++) begin
        int total;
        pp_cols_t exp_pp;
        a = 8'(av);
        b = 8'(bv);
        #1;
        exp_pp = '0;
        total = 0;
        for (int i = 0; i < 8; i++) begin
          for (int jj = 0; jj < 8; jj++) begin
            // product a[jj]*b[i] lands in column k = i + jj at position
            // i - (k > 7 ? k - 7 : 0)
            int k, pos;
            k = i + jj;
            pos = i - ((k > 7) ? k - 7 : 0);
            exp_pp[k][pos] = a[jj] & b[i];
          end
        end
        for (int k = 0; k < 15; k++) total += $countones(pp[k]) << k;
        checks++;
        if (pp !== exp_pp) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: column bits differ", av, bv);
        end
        checks++;
        if (total != av * bv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: weighted sum %0d", av, bv, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
