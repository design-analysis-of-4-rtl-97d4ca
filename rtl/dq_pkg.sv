// Shared types and elaboration-time planning functions for the dual-quality
// (exact/approximate) 4:2 compressor multipliers.
//
// dq_type_e selects which compressor structure sits in a column: the plain
// exact 4:2 compressor or one of the four dual-quality structures DQ1..DQ4.
//
// The planning functions decide, for a group of four partial-product rows,
// what each bit column holds: a 4:2 compressor where three or four bits meet,
// a half or full adder where an incoming carry has to be absorbed, or plain
// wires where the column already fits into two output rows. They also give
// the occupancy masks of the two output rows, so that the next reduction
// level can be planned in turn. Everything here is evaluated at elaboration;
// nothing of it becomes hardware by itself.
//
// The rule (four rows into two, column by column, carries rippling to the
// next column) is this design's own reading of the dot diagram of an 8x8
// Dadda multiplier built from 4:2 compressors.
package dq_pkg;

  typedef enum logic [2:0] {
    DQ_EXACT = 3'd0,   // exact 4:2 compressor only, no approximate mode
    DQ_C1    = 3'd1,
    DQ_C2    = 3'd2,
    DQ_C3    = 3'd3,
    DQ_C4    = 3'd4
  } dq_type_e;

  // What one column of a reduction group contains.
  typedef enum logic [2:0] {
    COL_NONE = 3'd0,   // no bit at all
    COL_PASS = 3'd1,   // up to two bits wired straight to the S and C rows
    COL_ONE  = 3'd2,   // one bit wired to the S row (C row taken by a carry)
    COL_HA   = 3'd3,   // half adder
    COL_FA   = 3'd4,   // full adder
    COL_COMP = 3'd5    // 4:2 compressor
  } col_kind_e;

  // Largest product width the masks can describe (32x32 multiplier).
  localparam int MAXW = 64;
  // Largest number of partial-product rows.
  localparam int MAXR = 32;

  typedef logic [MAXW-1:0] mask_t;
  typedef logic [3:0][MAXW-1:0] mask4_t;

  function automatic int col_count(mask4_t m, int col);
    int n = 0;
    for (int r = 0; r < 4; r++) if (m[r][col]) n++;
    return n;
  endfunction

  // Row (0..3) of the k-th present bit in a column, or -1.
  function automatic int nth_row(mask4_t m, int col, int k);
    int n = 0;
    for (int r = 0; r < 4; r++) begin
      if (m[r][col]) begin
        if (n == k) return r;
        n++;
      end
    end
    return -1;
  endfunction

  // Column plan state at the start of column col: bit 0 = a compressor in
  // column col-1 sends its Cout here, bit 1 = the C row bit of column col is
  // already taken by a carry from column col-1.
  function automatic logic [1:0] col_state(mask4_t m, int w, int col);
    logic cin_v = 1'b0;
    logic c_occ = 1'b0;
    for (int i = 0; i < col && i < w; i++) begin
      int n = col_count(m, i);
      if (n >= 3) begin
        cin_v = 1'b1;
        c_occ = 1'b1;
      end else if (!c_occ) begin
        cin_v = 1'b0;
        c_occ = 1'b0;
      end else begin
        c_occ = ((n + int'(cin_v)) >= 2);
        cin_v = 1'b0;
      end
    end
    return {c_occ, cin_v};
  endfunction

  function automatic col_kind_e col_kind(mask4_t m, int w, int col);
    logic [1:0] st = col_state(m, w, col);
    int n = col_count(m, col);
    int t = n + int'(st[0]);
    if (n >= 3) return COL_COMP;
    if (!st[1]) return (n == 0) ? COL_NONE : COL_PASS;
    case (t)
      0: return COL_NONE;
      1: return COL_ONE;
      2: return COL_HA;
      default: return COL_FA;
    endcase
  endfunction

  // Occupancy of the two output rows of a group: [0] = S row, [1] = C row.
  function automatic logic [1:0][MAXW-1:0] group_out_masks(mask4_t m, int w);
    logic [1:0][MAXW-1:0] o = '0;
    for (int i = 0; i < w; i++) begin
      int n = col_count(m, i);
      case (col_kind(m, w, i))
        COL_PASS: begin
          o[0][i] = 1'b1;
          if (n == 2) o[1][i] = 1'b1;
        end
        COL_ONE: o[0][i] = 1'b1;
        COL_HA, COL_FA, COL_COMP: begin
          o[0][i] = 1'b1;
          if (i + 1 < w) o[1][i+1] = 1'b1;
        end
        default: ;
      endcase
    end
    return o;
  endfunction

  // Occupancy mask of row `row` at reduction level `lvl` of an n x n
  // multiplier. Level 0 holds the n partial-product rows, row j shifted by
  // j; each level halves the number of rows.
  function automatic mask_t level_mask(int n, int lvl, int row);
    logic [MAXR-1:0][MAXW-1:0] cur = '0;
    logic [MAXR-1:0][MAXW-1:0] nxt;
    int rows = n;
    for (int j = 0; j < n; j++)
      cur[j] = ((mask_t'(1) << n) - mask_t'(1)) << j;
    for (int l = 0; l < lvl; l++) begin
      nxt = '0;
      for (int g = 0; g < rows / 4; g++) begin
        logic [1:0][MAXW-1:0] o;
        o = group_out_masks({cur[4*g+3], cur[4*g+2], cur[4*g+1], cur[4*g]}, 2 * n);
        nxt[2*g]   = o[0];
        nxt[2*g+1] = o[1];
      end
      cur  = nxt;
      rows = rows / 2;
    end
    return cur[row];
  endfunction

endpackage
