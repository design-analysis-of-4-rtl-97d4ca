// Dual-quality 4:2 compressor, structure 2 (DQ2).
//
// In exact mode (exact = 1) it behaves as the exact 4:2 compressor:
// x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout). In approximate mode
// (exact = 0) all three outputs are wires: sum = x1, carry = x4, cout = x3;
// x2 and cin are ignored. With cin = 0 the approximate value x1 + 2*x3 + 2*x4
// differs from x1 + x2 + x3 + x4 for 10 of the 16 input patterns (62.5 %).
//
// The approximate wiring and the error rate follow the published structure.
// A 2:1 multiplexer per output stands in for the tri-state output buffers;
// power gating of the exact part is not modelled. Combinational.
module dq42c2 (
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

  // Approximate part: wires only.
  assign sum_a   = x1;
  assign carry_a = x4;
  assign cout_a  = x3;

  // Output selection, standing in for the tri-state output buffers.
  assign sum   = exact ? sum_e   : sum_a;
  assign carry = exact ? carry_e : carry_a;
  assign cout  = exact ? cout_e  : cout_a;
endmodule
