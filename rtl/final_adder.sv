// Carry-propagate adder that turns the last two rows of the reduction tree
// into the product: sum = (a + b) mod 2^W. Combinational. The adder
// architecture is left to synthesis (a ripple-carry chain on an FPGA).
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  assign sum = a + b;
endmodule
