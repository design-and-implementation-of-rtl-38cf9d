// compressor_3_2: the 3:2 compressor (a full adder) used everywhere in the
// multiplier. It adds three bits of equal weight: a + b + c = sum + 2*carry.
//
// Gate level: sum is the XOR of the three inputs; carry is (a AND b) OR
// (c AND (a XOR b)), sharing the a^b term with the sum path. This is the
// document's 3:2 compressor; the exact gate choice is the usual XOR/AND/OR form.
//
// Purely combinational, no clock or reset.
module compressor_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ab_x;

  assign ab_x  = a ^ b;
  assign sum   = ab_x ^ c;
  assign carry = (a & b) | (c & ab_x);

endmodule
