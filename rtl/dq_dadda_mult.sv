// Accuracy-configurable unsigned N x N multiplier built from dual-quality
// 4:2 compressors.
//
// The N partial-product rows of an AND array are reduced by a tree of 4:2
// compressors: each level takes the rows four at a time and turns each group
// into two rows (reduce_group), halving the row count, until two rows are
// left; a carry-propagate adder then gives the 2N-bit product p. An 8x8
// multiplier thus has two compressor levels (8 -> 4 -> 2 rows), a 16x16 one
// three, a 32x32 one four.
//
// Every compressor in a column below N (the low half of the product) has
// structure LSB_TYPE and follows exact_lsb; every compressor in columns N and
// above has structure MSB_TYPE and follows exact_msb. With both mode inputs
// at 1 the product is exact, p = a * b. With a mode input at 0 that half's
// compressors switch to their cheaper approximate logic and p is only close
// to a * b. The defaults, DQ1 in the low half and DQ4 in the high half, are
// the mixed configuration; other published configurations are reached by
// parameter (for example LSB_TYPE = MSB_TYPE = DQ_C3).
//
// Timing: fully combinational, no clock or reset; a new p follows every
// change of a, b or the mode inputs. N must be a power of two from 4 to 32.
//
// The compressor structures, the AND-array/compressor-tree/final-adder
// organisation, the two compressor levels of the 8x8 case and the LSB/MSB
// assignment of compressor types follow the published design. Where the
// boundary between the LSB and MSB halves lies, the column-by-column
// placement rule of the tree and the unsigned operands are this design's
// choices.
module dq_dadda_mult
  import dq_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter dq_type_e    LSB_TYPE = DQ_C1,
  parameter dq_type_e    MSB_TYPE = DQ_C4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           exact_lsb,   // 1: low-half compressors exact
  input  logic           exact_msb,   // 1: high-half compressors exact
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;
  localparam int unsigned L = $clog2(N) - 1;   // compressor levels

  // Partial products, then the rows leaving each level (g_lvl[l].nrow).
  logic [W-1:0] pp [N];

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned R = N >> l;   // rows entering this level
    logic [W-1:0] nrow [R/2];
    for (genvar g = 0; g < R / 4; g++) begin : g_grp
      localparam mask4_t MG = {level_mask(N, l, 4*g+3), level_mask(N, l, 4*g+2),
                               level_mask(N, l, 4*g+1), level_mask(N, l, 4*g)};
      logic [W-1:0] gin [4];
      for (genvar k = 0; k < 4; k++) begin : g_in
        if (l == 0) begin : g_pp
          assign gin[k] = pp[4*g+k];
        end else begin : g_prev
          assign gin[k] = g_lvl[l-1].nrow[4*g+k];
        end
      end
      reduce_group #(
        .W(W), .M(MG), .SPLIT(N), .LSB_TYPE(LSB_TYPE), .MSB_TYPE(MSB_TYPE)
      ) u_grp (
        .r(gin), .exact_lsb(exact_lsb), .exact_msb(exact_msb),
        .s(nrow[2*g]), .c(nrow[2*g+1])
      );
    end
  end

  final_adder #(.W(W)) u_cpa (.a(g_lvl[L-1].nrow[0]), .b(g_lvl[L-1].nrow[1]), .sum(p));
endmodule
