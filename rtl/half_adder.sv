// half_adder: adds two bits, a + b = sum + 2*carry. The multiplier uses it at
// the ends of the matrix, where a column holds only two bits. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
