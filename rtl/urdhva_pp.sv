// urdhva_pp: partial-product generator of the Urdhva Tiryakbhyam
// ("vertically and crosswise") method for two 8-bit operands.
//
// Step k of the method (k = 0..14) multiplies every pair of operand bits whose
// indices add up to k: A0*B0 for k = 0, A1*B0 and A0*B1 for k = 1, up to
// A7*B7 for k = 14. Each one-bit product is an AND gate, and all 64 are formed
// at once. The output groups them by column: bit j of column k is
// a[k-i] & b[i] with i = j + max(0, k-7), so within a column the terms run
// from (A_k * B_0) toward (A_0 * B_k), in the order the column equations list
// them. Bits above a column's height are tied to zero.
//
// Interface: a, b in; pp (vedic_pkg::pp_cols_t, 15 columns of 8 bits) out.
// Purely combinational.
module urdhva_pp
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output pp_cols_t pp
);

  always_comb begin
    pp = '0;
    for (int unsigned k = 0; k < NCOL; k++) begin
      for (int unsigned j = 0; j < col_height(k); j++) begin
        pp[k][j] = a[k - col_first_b(k) - j] & b[col_first_b(k) + j];
      end
    end
  end

endmodule
