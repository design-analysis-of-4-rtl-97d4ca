// Exact 4:2 compressor. Adds five bits of one weight (x1..x4 and cin) into
// sum (same weight) and two bits of double weight, carry and cout, so that
// x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
//
// Built from two full adders chained as in the usual textbook structure: the
// first adds x1, x2, x3 and gives cout; the second adds its sum, x4 and cin
// and gives sum and carry. cout does not depend on cin, so a row of these
// compressors has no carry ripple through more than one column. This gives
//   sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
//   carry = (x1^x2^x3^x4) ? cin : x4
//   cout  = (x1^x2) ? x3 : x1
// Combinational, no clock.
module comp42_exact (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .sum(sum), .carry(carry));
endmodule
