// stage1_compress: first of the multiplier's two parallel stages. Every
// partial-product column is compressed at the same time by one compressor,
// chosen by how many bits the column holds once the lateral carries from the
// columns below are counted:
//
//   column  products  lateral carries in        compressor   leftover
//     0        1      -                         none (wire)  -
//     1        2      -                         none (wires) -
//     2        3      -                         3:2          -
//     3        4      -                         4:2          -
//     4        5      4:2 cout of col 3         7:2          -
//     5        6      cout1 of col 4            7:2          -
//     6        7      cout1 col 5, cout2 col 4  7:2          -
//     7        8      cout1 col 6, cout2 col 5  7:2          1 product
//    8..11   7..4     cout1 k-1, cout2 k-2      7:2          -
//    12        3      cout1 col 11 (as x4),     4:2          -
//                     cout2 col 10 (as cin)
//    13        2      cout2 col 11, 4:2 cout 12 4:2          -
//    14        1      4:2 cout of col 13        half adder   -
//
// The lateral carries (couts) of the 4:2 and 7:2 compressors never depend on
// their carry-ins, so nothing ripples across this stage: its depth is one
// 7:2 compressor. Each compressor's sum stays in its column (row_a) and its
// carry moves one column up (row_b). Columns 0 and 1 pass their products
// through unchanged. Column 7 has eight products and two lateral carries, one
// more than a 7:2 compressor takes; its eighth product (A0*B7) is handed on as
// extra7. Which compressor sits in which column is this design's own
// arrangement of the document's 3:2, 4:2 and 7:2 compressors.
//
// Invariant: row_a + row_b + extra7*2^7 equals the weighted sum of the
// matrix. row_a[15], row_b[0] and row_b[2] are always zero.
// Interface: pp (vedic_pkg::pp_cols_t) in, rows (vedic_pkg::s1_rows_t) out.
// Purely combinational.
module stage1_compress
  import vedic_pkg::*;
(
  input  pp_cols_t pp,
  output s1_rows_t rows
);

  // Lateral carries of the 7:2 compressors in columns 4..11, and of the 4:2
  // compressors in columns 3, 12 and 13.
  logic [11:4] co1;
  logic [11:4] co2;
  logic        co42_3;
  logic        co42_12;
  logic        co42_13;

  product_t row_a;
  product_t row_b;

  // Columns 0 and 1: no compression.
  assign row_a[0]  = pp[0][0];
  assign row_b[0]  = 1'b0;
  assign row_a[1]  = pp[1][0];
  assign row_b[1]  = pp[1][1];
  assign row_b[2]  = 1'b0;
  assign row_a[15] = 1'b0;

  // Column 2: three products.
  compressor_3_2 u_c2 (
    .a(pp[2][0]), .b(pp[2][1]), .c(pp[2][2]),
    .sum(row_a[2]), .carry(row_b[3])
  );

  // Column 3: four products.
  compressor_4_2 u_c3 (
    .x1(pp[3][0]), .x2(pp[3][1]), .x3(pp[3][2]), .x4(pp[3][3]), .cin(1'b0),
    .sum(row_a[3]), .carry(row_b[4]), .cout(co42_3)
  );

  // Columns 4..11: 7:2 compressors with both lateral carry chains.
  for (genvar k = 4; k <= 11; k++) begin : g_c72
    logic [7:1] x;
    logic       cin1;
    logic       cin2;

    // Up to seven products of the column; unused inputs are zero.
    always_comb begin
      x = '0;
      for (int unsigned j = 0; j < 7; j++) begin
        if (j < col_height(k)) x[j+1] = pp[k][j];
      end
    end

    if (k == 4) begin : g_cin
      assign cin1 = co42_3;
      assign cin2 = 1'b0;
    end else if (k == 5) begin : g_cin
      assign cin1 = co1[k-1];
      assign cin2 = 1'b0;
    end else begin : g_cin
      assign cin1 = co1[k-1];
      assign cin2 = co2[k-2];
    end

    compressor_7_2 u_c72 (
      .x(x), .cin1(cin1), .cin2(cin2),
      .sum(row_a[k]), .carry(row_b[k+1]), .cout1(co1[k]), .cout2(co2[k])
    );
  end

  // Column 7's eighth product.
  assign rows.extra7 = pp[7][7];

  // Column 12: three products, cout1 of column 11 and cout2 of column 10.
  compressor_4_2 u_c12 (
    .x1(pp[12][0]), .x2(pp[12][1]), .x3(pp[12][2]), .x4(co1[11]), .cin(co2[10]),
    .sum(row_a[12]), .carry(row_b[13]), .cout(co42_12)
  );

  // Column 13: two products, cout2 of column 11 and the 4:2 cout of column 12.
  compressor_4_2 u_c13 (
    .x1(pp[13][0]), .x2(pp[13][1]), .x3(co2[11]), .x4(1'b0), .cin(co42_12),
    .sum(row_a[13]), .carry(row_b[14]), .cout(co42_13)
  );

  // Column 14: one product and the 4:2 cout of column 13.
  half_adder u_c14 (
    .a(pp[14][0]), .b(co42_13),
    .sum(row_a[14]), .carry(row_b[15])
  );

  assign rows.row_a = row_a;
  assign rows.row_b = row_b;

endmodule
