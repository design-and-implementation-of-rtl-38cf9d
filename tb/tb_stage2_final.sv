// tb_stage2_final: checks the second stage on random inputs of the form the
// first stage produces: two 16-bit rows with row_a[15], row_b[0] and row_b[2]
// zero, a leftover bit of weight 2^7, and a total below 2^16 (inputs over that
// are drawn again). The product p must equal that total. Also counts how often
// the second carry chain of the 4:2 compressors (cout) was set and fails if it
// never was. Watchdog: 1,000,000 time units.
module tb_stage2_final;
  import vedic_pkg::*;
  localparam int NVEC = 200000;
  s1_rows_t rows;
  product_t p;
  int checks = 0, failures = 0;
  int n_cout = 0;

  stage2_final dut (.rows(rows), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    while (n < NVEC) begin
      int total;
      logic [15:0] ra, rb;
      logic e;
      ra = 16'($urandom);
      rb = 16'($urandom);
      e  = 1'($urandom);
      // Bias half the draws toward small values so the top columns vary too.
      if (n % 2 == 1) begin
        ra = ra >> ($urandom % 16);
        rb = rb >> ($urandom % 16);
      end
      ra[15] = 1'b0;
      rb[0]  = 1'b0;
      rb[2]  = 1'b0;
      total = int'(ra) + int'(rb) + (int'(e) << 7);
      if (total < 65536) begin
        rows.row_a  = ra;
        rows.row_b  = rb;
        rows.extra7 = e;
        #1;
        checks++;
        if (int'(p) != total) begin
          failures++;
          if (failures < 10) $display("FAIL ra=%h rb=%h e=%0d: p=%0d expected %0d", ra, rb, e, p, total);
        end
        if (dut.u[15:9] != 0) n_cout++;
        n++;
      end
    end
    $display("4:2 cout chain set in %0d vectors", n_cout);
    checks++;
    if (n_cout == 0) begin
      failures++;
      $display("FAIL the 4:2 cout chain never carried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
