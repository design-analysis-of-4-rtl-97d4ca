// One-bit full adder: sum = a ^ b ^ c, carry = majority(a, b, c).
// Purely combinational. Two of these make the exact 4:2 compressor (the
// first adds x1..x3, the second adds that sum, x4 and the carry input); the
// reduction tree also uses it to absorb carries in columns of three bits.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic ab;
  assign ab    = a ^ b;
  assign sum   = ab ^ c;
  assign carry = ab ? c : a;
endmodule
