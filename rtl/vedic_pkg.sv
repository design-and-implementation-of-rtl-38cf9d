// vedic_pkg: sizes and types shared by the 8x8 compressor-based Urdhva
// Tiryakbhyam ("vertically and crosswise") multiplier.
//
// The multiplier works on the partial-product matrix one product column at a
// time. Column k (0..14) holds every a[k-i] & b[i] whose indices sum to k, so
// the column heights are 1,2,..,8,..,2,1. pp_cols_t keeps that matrix as 15
// columns of up to 8 bits, bit j of column k being a[k-i] & b[i] with
// i = j + max(0, k-7); bits above the column height are zero.
//
// s1_rows_t is what the first compression stage hands to the second: two
// weight-aligned rows plus one leftover bit of weight 2^7 (column 7 is the only
// column whose eight products plus incoming carries exceed one 7:2 compressor).
// The 8-bit operand width is the document's; the matrix layout is this
// design's own.
package vedic_pkg;

  localparam int unsigned N    = 8;          // operand width
  localparam int unsigned PW   = 2 * N;      // product width
  localparam int unsigned NCOL = 2 * N - 1;  // partial-product columns

  typedef logic [N-1:0]            operand_t;
  typedef logic [PW-1:0]           product_t;
  typedef logic [NCOL-1:0][N-1:0]  pp_cols_t;

  typedef struct packed {
    product_t row_a;   // one bit per column, weight 2^k
    product_t row_b;   // one bit per column, weight 2^k
    logic     extra7;  // leftover partial product of column 7, weight 2^7
  } s1_rows_t;

  // Number of partial products in column k.
  function automatic int unsigned col_height(int unsigned k);
    return (k < N) ? k + 1 : 2 * N - 1 - k;
  endfunction

  // Index of the b operand bit used by bit j of column k.
  function automatic int unsigned col_first_b(int unsigned k);
    return (k < N) ? 0 : k - (N - 1);
  endfunction

endpackage
