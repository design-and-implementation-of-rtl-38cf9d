// compressor_4_2: adds four bits of one column and a carry-in from the column
// below:  x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
//
// Built, as in the document, from two 3:2 compressors. The first adds x1..x3
// and its carry leaves as cout; the second adds that sum, x4 and cin, giving
// sum and carry. cout therefore never depends on cin, so a row of these
// compressors can be chained column to column (cout of column k into cin of
// column k+1) without a carry ripple through the row.
//
// Ports: sum has the column's weight, carry and cout both the next column's.
// Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s0;

  compressor_3_2 u_fa0 (.a(x1), .b(x2), .c(x3),  .sum(s0),  .carry(cout));
  compressor_3_2 u_fa1 (.a(s0), .b(x4), .c(cin), .sum(sum), .carry(carry));

endmodule
