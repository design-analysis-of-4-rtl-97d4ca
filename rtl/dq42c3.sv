// Dual-quality 4:2 compressor, structure 3 (DQ3).
//
// In exact mode (exact = 1) it behaves as the exact 4:2 compressor:
// x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout). In approximate mode
// (exact = 0): carry = x4, cout is not used and is driven 0, cin is ignored,
// and sum comes from a NAND of the two first-level XNORs,
// sum = (x1 ^ x2) | (x3 ^ x4), so a single 1 among x1..x4 is never lost.
// With cin = 0 the approximate value differs from x1 + x2 + x3 + x4 for 8 of
// the 16 input patterns (50 %).
//
// The carry = x4 wire, the unused cout and the NAND gate that only the
// approximate mode uses are read from the published schematic; the exact
// function of that NAND's inputs is this design's reading of it. A 2:1
// multiplexer per output stands in for the tri-state output buffers; power
// gating is not modelled. Combinational.
module dq42c3 (
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

  // Approximate part: the first-level pair gates feed a NAND that only the
  // approximate mode uses.
  logic xn12, xn34;
  assign xn12    = ~(x1 ^ x2);
  assign xn34    = ~(x3 ^ x4);
  assign sum_a   = ~(xn12 & xn34);
  assign carry_a = x4;
  assign cout_a  = 1'b0;

  // Output selection, standing in for the tri-state output buffers.
  assign sum   = exact ? sum_e   : sum_a;
  assign carry = exact ? carry_e : carry_a;
  assign cout  = exact ? cout_e  : cout_a;
endmodule
