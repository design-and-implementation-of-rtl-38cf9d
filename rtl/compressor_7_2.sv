// compressor_7_2: adds seven bits of one column and two carry-ins:
//   x[1..7] + cin1 + cin2 = sum + 2*carry + 2*cout1 + 4*cout2.
//
// Five 3:2 compressors, as the document specifies. FA1 and FA2 add x1..x3 and
// x4..x6; FA3 adds their sums and x7; FA4 adds the three carries of FA1..FA3,
// giving cout1 (weight 2) and cout2 (weight 4); FA5 adds FA3's sum and the two
// carry-ins, giving sum and carry. The couts depend on x only, never on the
// carry-ins, so in a row of 7:2 compressors cout1 of column k feeds cin1 of
// column k+1 and cout2 of column k feeds cin2 of column k+2 with no ripple.
// The wiring of the five 3:2 compressors is this design's reading of the
// classic 7:2 arrangement.
//
// x[1] is x1 ... x[7] is x7. Combinational.
module compressor_7_2 (
  input  logic [7:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);

  logic s1, c1, s2, c2, s3, c3;

  compressor_3_2 u_fa1 (.a(x[1]), .b(x[2]), .c(x[3]), .sum(s1),    .carry(c1));
  compressor_3_2 u_fa2 (.a(x[4]), .b(x[5]), .c(x[6]), .sum(s2),    .carry(c2));
  compressor_3_2 u_fa3 (.a(s1),   .b(s2),   .c(x[7]), .sum(s3),    .carry(c3));
  compressor_3_2 u_fa4 (.a(c1),   .b(c2),   .c(c3),   .sum(cout1), .carry(cout2));
  compressor_3_2 u_fa5 (.a(s3),   .b(cin1), .c(cin2), .sum(sum),   .carry(carry));

endmodule
