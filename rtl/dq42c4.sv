// Dual-quality 4:2 compressor, structure 4 (DQ4), the most accurate one.
//
// In exact mode (exact = 1) it behaves as the exact 4:2 compressor:
// x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout). In approximate mode
// (exact = 0): carry = x1 x2 + x3 x4 (two ANDs and an OR), sum =
// (x1 ^ x2) | (x3 ^ x4) (a NAND of the two first-level XNORs), cout is driven
// 0 and cin is ignored. With cin = 0 the approximate value differs from
// x1 + x2 + x3 + x4 for 5 of the 16 input patterns (31.25 %): the four
// patterns with one bit in each pair (result 1 instead of 2) and all ones
// (result 2 instead of 4).
//
// The gate structure and the 31.25 % error rate follow the published
// structure; the grounded cout buffer is read from its schematic. A 2:1
// multiplexer per output stands in for the tri-state output buffers; power
// gating is not modelled. Combinational.
module dq42c4 (
  input  logic exact,   // 1: exact mode, 0: approximate mode
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic sum_e, carry_e, cout_e;   // exact part (approximate + supplementary)
  logic sum_a, carry_a, cout_a;   // approximate part alone

  comp42_exact u_exact (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(sum_e), .carry(carry_e), .cout(cout_e)
  );

  // Approximate part.
  logic xn12, xn34;
  assign xn12    = ~(x1 ^ x2);
  assign xn34    = ~(x3 ^ x4);
  assign sum_a   = ~(xn12 & xn34);
  assign carry_a = (x1 & x2) | (x3 & x4);
  assign cout_a  = 1'b0;

  // Output selection, standing in for the tri-state output buffers.
  assign sum   = exact ? sum_e   : sum_a;
  assign carry = exact ? carry_e : carry_a;
  assign cout  = exact ? cout_e  : cout_a;
endmodule
