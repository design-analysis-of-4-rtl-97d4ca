// One-bit half adder: sum = a ^ b, carry = a & b. Combinational. Used by the
// reduction tree in columns where two bits have to be summed so that the C
// row stays free for an incoming carry.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
