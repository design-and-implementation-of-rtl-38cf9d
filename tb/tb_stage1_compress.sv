// tb_stage1_compress: checks the first compression stage on random partial-
// product matrices (each column filled with random bits up to its height,
// zero above), plus the all-zero and all-one matrices. For each it checks
//   * row_a + row_b + extra7*2^7 equals the weighted bit count of the matrix,
//     computed here column by column;
//   * row_a[15], row_b[0] and row_b[2] are zero, as the second stage expects.
// It also counts how often the lateral carries of the 7:2 compressors were
// set and fails if either chain never carried. Watchdog: 1,000,000 time units.
module tb_stage1_compress;
  import vedic_pkg::*;
  localparam int NVEC = 200000;
  pp_cols_t pp;
  s1_rows_t rows;
  int checks = 0, failures = 0;
  int n_co1 = 0, n_co2 = 0, n_extra = 0;

  stage1_compress dut (.pp(pp), .rows(rows));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int total, got;
    #1;
    total = 0;
    for (int k = 0; k < 15; k++) total += $countones(pp[k]) << k;
    got = int'(rows.row_a) + int'(rows.row_b) + (int'(rows.extra7) << 7);
    checks++;
    if (got != total) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h: rows add to %0d, matrix %0d", pp, got, total);
    end
    checks++;
    if (rows.row_a[15] || rows.row_b[0] || rows.row_b[2]) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h: unused row bit set", pp);
    end
    if (dut.co1 != 0) n_co1++;
    if (dut.co2 != 0) n_co2++;
    if (rows.extra7) n_extra++;
  endtask

  initial begin
    pp = '0;
    check_one();
    for (int k = 0; k < 15; k++)
      for (int j = 0; j < 8; j++) pp[k][j] = (j < int'(col_height(k)));
    check_one();
    for (int n = 0; n < NVEC; n++) begin
      pp = '0;
      for (int k = 0; k < 15; k++)
        for (int j = 0; j < int'(col_height(k)); j++) pp[k][j] = 1'($urandom);
      check_one();
    end
    $display("7:2 cout1 set in %0d vectors, cout2 in %0d, column-7 leftover in %0d",
             n_co1, n_co2, n_extra);
    checks++;
    if (n_co1 == 0 || n_co2 == 0 || n_extra == 0) begin
      failures++;
      $display("FAIL a lateral carry or the leftover bit never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
