// Partial-product generator of an unsigned N x N multiplier: an AND array.
// Row j is the multiplicand a gated by multiplier bit b[j] and shifted left
// by j places, in a row 2N bits wide: pp[j] = (b[j] ? a : 0) << j. These N
// rows are the dots of the multiplier's dot diagram. Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  always_comb begin
    for (int j = 0; j < N; j++)
      pp[j] = (2*N)'(a & {N{b[j]}}) << j;
  end
endmodule
