// vedic_mul8: 8x8 unsigned multiplier on the Urdhva Tiryakbhyam ("vertically
// and crosswise") method, with compressors in place of the usual full and
// half adders.
//
// Datapath, all combinational:
//   urdhva_pp        forms all 64 one-bit products at once and groups them
//                    into the 15 product columns (heights 1..8..1).
//   stage1_compress  first parallel stage: one 3:2, 4:2 or 7:2 compressor per
//                    column, with carry-independent lateral carries, reduces
//                    the matrix to two rows and one leftover bit.
//   stage2_final     second stage: half adders, 3:2 and 4:2 compressors add
//                    the rows into the product.
// The operand width, the method and the compressor types follow the
// document; the column assignment of the compressors is this design's own.
//
// Interface: a, b (8 bits, unsigned) in; p = a * b (16 bits) out. No clock or
// reset; the result is valid one combinational delay after the operands.
module vedic_mul8
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);

  pp_cols_t pp;
  s1_rows_t rows;

  urdhva_pp       u_pp (.a(a), .b(b), .pp(pp));
  stage1_compress u_s1 (.pp(pp), .rows(rows));
  stage2_final    u_s2 (.rows(rows), .p(p));

endmodule
