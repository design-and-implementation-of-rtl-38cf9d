// tb_vedic_mul8: end-to-end test of the 8x8 multiplier at its full size. All
// 65536 operand pairs are applied and p is compared with a * b. The design is
// combinational, so each result is read one time unit after its operands.
// It counts how often each mechanism of the datapath took part and fails if
// one never did:
//   * the 7:2 compressors' cout1 chain and cout2 chain (first stage),
//   * the 4:2 compressors' lateral cout in the first stage,
//   * column 7's leftover eighth product,
//   * the second stage's 4:2 cout chain,
//   * the top product bit P15.
// Watchdog: 200,000 time units.
module tb_vedic_mul8;
  import vedic_pkg::*;
  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;
  int n_co1 = 0, n_co2 = 0, n_co42 = 0, n_extra = 0, n_s2cout = 0, n_p15 = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count(input string what, input int n);
    $display("%s: %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 256; bv++) begin
        a = 8'(av);
        b = 8'(bv);
        #1;
        checks++;
        if (int'(p) != av * bv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: p=%0d", av, bv, p);
        end
        if (dut.u_s1.co1 != 0) n_co1++;
        if (dut.u_s1.co2 != 0) n_co2++;
        if (dut.u_s1.co42_3 || dut.u_s1.co42_12 || dut.u_s1.co42_13) n_co42++;
        if (dut.rows.extra7) n_extra++;
        if (dut.u_s2.u != 0) n_s2cout++;
        if (p[15]) n_p15++;
      end
    end
    count("stage-1 7:2 cout1 set", n_co1);
    count("stage-1 7:2 cout2 set", n_co2);
    count("stage-1 4:2 cout set", n_co42);
    count("column-7 leftover product set", n_extra);
    count("stage-2 4:2 cout set", n_s2cout);
    count("P15 set", n_p15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
