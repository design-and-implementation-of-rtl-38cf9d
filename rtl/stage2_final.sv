// stage2_final: second of the multiplier's two stages. It adds the two rows
// left by the first stage, plus column 7's leftover product, into the 16-bit
// product.
//
//   column 0      row_a[0] is P0 (nothing else has that weight).
//   column 1      half adder on row_a[1], row_b[1].
//   column 2      half adder on row_a[2] and the carry from column 1
//                 (row_b[2] is always zero).
//   columns 3..6  3:2 compressors on row_a, row_b and the running carry.
//   column 7      4:2 compressor on row_a[7], row_b[7], extra7 and the running
//                 carry. From here up two carries run: the 4:2 carry and cout.
//   columns 8..14 4:2 compressors on row_a, row_b and the two carries of the
//                 column below (the 4:2 carry as x3, the cout as cin).
//   column 15     P15 is the XOR of row_b[15] and the two carries. The product
//                 of two 8-bit numbers is below 2^16, so at most one of the
//                 three is set and no carry leaves column 15.
//
// Half adders and compressors are the building blocks the document names for
// this stage; the column-by-column arrangement is this design's own.
// Interface: rows (vedic_pkg::s1_rows_t) in, p (vedic_pkg::product_t) out.
// The inputs must satisfy stage1_compress's invariant (row_a[15], row_b[0],
// row_b[2] zero, total below 2^16). Purely combinational.
module stage2_final
  import vedic_pkg::*;
(
  input  s1_rows_t rows,
  output product_t p
);

  product_t     ra;
  product_t     rb;
  logic [7:2]   rc;   // running carry into columns 2..7
  logic [15:8]  t;    // 4:2 carry into columns 8..15
  logic [15:8]  u;    // 4:2 cout into columns 8..15

  assign ra = rows.row_a;
  assign rb = rows.row_b;

  assign p[0] = ra[0];

  half_adder u_c1 (.a(ra[1]), .b(rb[1]), .sum(p[1]), .carry(rc[2]));
  half_adder u_c2 (.a(ra[2]), .b(rc[2]), .sum(p[2]), .carry(rc[3]));

  for (genvar k = 3; k <= 6; k++) begin : g_c32
    compressor_3_2 u_fa (.a(ra[k]), .b(rb[k]), .c(rc[k]), .sum(p[k]), .carry(rc[k+1]));
  end

  compressor_4_2 u_c7 (
    .x1(ra[7]), .x2(rb[7]), .x3(rows.extra7), .x4(rc[7]), .cin(1'b0),
    .sum(p[7]), .carry(t[8]), .cout(u[8])
  );

  for (genvar k = 8; k <= 14; k++) begin : g_c42
    compressor_4_2 u_c42 (
      .x1(ra[k]), .x2(rb[k]), .x3(t[k]), .x4(1'b0), .cin(u[k]),
      .sum(p[k]), .carry(t[k+1]), .cout(u[k+1])
    );
  end

  assign p[15] = rb[15] ^ t[15] ^ u[15];

  // Bits that the first stage never sets; this stage does not add them.
  always_comb begin
    assert (ra[15] == 1'b0 && rb[0] == 1'b0 && rb[2] == 1'b0)
      else $error("stage2_final: row bit set that the first stage never drives");
  end

endmodule
