// One reduction step of the multiplier's compressor tree: four rows of bits
// (r[0..3], each W bits, bit i of weight 2^i) are reduced to two rows, s and
// c, with s + c = r[0] + r[1] + r[2] + r[3] (mod 2^W) whenever every
// compressor is in exact mode.
//
// M gives, per row, which bit positions can be non-zero; bits outside M are
// ignored. From M the column plan in dq_pkg decides what each column holds:
//  - three or four bits: a 4:2 compressor; the bits present go, in row order,
//    to x1, x2, x3, x4 (missing ones 0); cin is the cout of the compressor in
//    the column below, if there is one; sum goes to s[i], carry to c[i+1] and
//    cout to the next column's cin;
//  - otherwise, if nothing from the column below has to be absorbed, the (at
//    most two) bits are wired to s[i] and c[i];
//  - otherwise a half or full adder (or a wire) sums the bits and the
//    incoming cout into s[i] and c[i+1].
// Compressors in columns below SPLIT are of structure LSB_TYPE and follow
// exact_lsb; the others are MSB_TYPE and follow exact_msb. Adders are always
// exact. Carries out of the top column are dropped. Combinational.
//
// Using 4:2 compressors where three or four bits meet and half adders where
// two bits would collide with a carry follows the 8x8 dot diagram; the exact
// placement rule and the LSB/MSB split at a column are this design's choice.
module reduce_group
  import dq_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter mask4_t      M        = {4{mask_t'(16'hFFFF)}},
  parameter int unsigned SPLIT    = W / 2,
  parameter dq_type_e    LSB_TYPE = DQ_C1,
  parameter dq_type_e    MSB_TYPE = DQ_C4
) (
  input  logic [W-1:0] r [4],
  input  logic         exact_lsb,
  input  logic         exact_msb,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0] cout_w;   // cout_w[i]: cout arriving at column i
  logic [W:0] cnext;    // cnext[i]: carry into c[i] produced by column i-1
  logic [W-1:0] csame;  // csame[i]: second bit of a wired column

  assign cout_w[0] = 1'b0;
  assign cnext[0]  = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    localparam col_kind_e  KIND = col_kind(M, W, i);
    localparam logic [1:0] ST   = col_state(M, W, i);
    localparam int         NB   = col_count(M, i);
    localparam int         P0   = nth_row(M, i, 0);
    localparam int         P1   = nth_row(M, i, 1);
    localparam int         P2   = nth_row(M, i, 2);
    localparam int         P3   = nth_row(M, i, 3);

    // The column's operands: present bits in row order, then the incoming
    // cout when one arrives.
    logic [3:0] v;
    always_comb begin
      v = '0;
      if (P0 >= 0) v[0] = r[P0 < 0 ? 0 : P0][i];
      if (P1 >= 0) v[1] = r[P1 < 0 ? 0 : P1][i];
      if (P2 >= 0) v[2] = r[P2 < 0 ? 0 : P2][i];
      if (P3 >= 0) v[3] = r[P3 < 0 ? 0 : P3][i];
      if (ST[0] && KIND != COL_COMP) v[NB > 3 ? 3 : NB] = cout_w[i];
    end

    if (KIND == COL_COMP) begin : g_comp
      localparam dq_type_e TYPE = (i < SPLIT) ? LSB_TYPE : MSB_TYPE;
      logic mode;
      assign mode = (i < SPLIT) ? exact_lsb : exact_msb;
      dq42_cell #(.TYPE(TYPE)) u_cmp (
        .exact(mode),
        .x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]),
        .cin(ST[0] ? cout_w[i] : 1'b0),
        .sum(s[i]), .carry(cnext[i+1]), .cout(cout_w[i+1])
      );
      assign csame[i] = 1'b0;
    end else if (KIND == COL_FA) begin : g_fa
      full_adder u_fa (.a(v[0]), .b(v[1]), .c(v[2]), .sum(s[i]), .carry(cnext[i+1]));
      assign csame[i]    = 1'b0;
      assign cout_w[i+1] = 1'b0;
    end else if (KIND == COL_HA) begin : g_ha
      half_adder u_ha (.a(v[0]), .b(v[1]), .sum(s[i]), .carry(cnext[i+1]));
      assign csame[i]    = 1'b0;
      assign cout_w[i+1] = 1'b0;
    end else if (KIND == COL_ONE) begin : g_one
      assign s[i]        = v[0];
      assign csame[i]    = 1'b0;
      assign cnext[i+1]  = 1'b0;
      assign cout_w[i+1] = 1'b0;
    end else if (KIND == COL_PASS) begin : g_pass
      assign s[i]        = v[0];
      assign csame[i]    = v[1];
      assign cnext[i+1]  = 1'b0;
      assign cout_w[i+1] = 1'b0;
    end else begin : g_none
      assign s[i]        = 1'b0;
      assign csame[i]    = 1'b0;
      assign cnext[i+1]  = 1'b0;
      assign cout_w[i+1] = 1'b0;
    end
  end

  // The plan never fills c[i] from both its own column and the one below.
  assign c = csame | cnext[W-1:0];

  logic unused_top;
  assign unused_top = cnext[W] ^ cout_w[W];
endmodule
