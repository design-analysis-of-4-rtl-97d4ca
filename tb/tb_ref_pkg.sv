// Reference model for the testbenches: a bit-level software model of the
// configurable compressor-tree multiplier, written from the arithmetic
// definitions of the compressors rather than from the RTL's gate structure.
//
// ref_mult(n, a, b, lsb_type, msb_type, exact_lsb, exact_msb) forms the n
// shifted partial-product rows, then reduces them four rows at a time, column
// by column from the least significant one: a column with three or four bits
// goes through a 4:2 compressor (bits in row order on x1..x4, cin from the
// compressor below); otherwise its bits are kept as they are when no carry
// arrives from below, or summed by an exact adder when one does. Compressor
// types are coded 0 = exact only, 1..4 = DQ1..DQ4.
package tb_ref_pkg;

  localparam int MW = 64;

  // Returns {cout, carry, sum} of one compressor.
  function automatic logic [2:0] ref_comp(int t, logic ex, logic x1, logic x2,
                                          logic x3, logic x4, logic cin);
    int tot;
    logic s, c, co;
    if (t == 0 || ex) begin
      tot = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      s   = tot[0];
      co  = (x1 ^ x2) ? x3 : x1;               // the first full adder's carry
      c   = logic'((tot >> 1) - int'(co));
      return {co, c, s};
    end
    case (t)
      1: return {1'b0, x4, x1};
      2: return {x3, x4, x1};
      3: return {1'b0, x4, (x1 ^ x2) | (x3 ^ x4)};
      default: return {1'b0, (x1 & x2) | (x3 & x4), (x1 ^ x2) | (x3 ^ x4)};
    endcase
  endfunction

  function automatic logic [MW-1:0] ref_mult(int n, logic [31:0] a, logic [31:0] b,
                                             int lsb_t, int msb_t,
                                             logic ex_lsb, logic ex_msb);
    logic [MW-1:0] val [32];
    logic [MW-1:0] pre [32];
    logic [MW-1:0] nval [32];
    logic [MW-1:0] npre [32];
    logic [MW-1:0] res;
    int rows = n;
    int w = 2 * n;
    for (int j = 0; j < 32; j++) begin
      val[j] = '0;
      pre[j] = '0;
    end
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++) begin
        pre[j][i+j] = 1'b1;
        val[j][i+j] = a[i] & b[j];
      end
    while (rows > 2) begin
      for (int j = 0; j < 32; j++) begin
        nval[j] = '0;
        npre[j] = '0;
      end
      for (int g = 0; g < rows / 4; g++) begin
        logic cin_v = 1'b0, cin = 1'b0, c_occ = 1'b0;
        for (int i = 0; i < w; i++) begin
          logic bits [4];
          int nb = 0;
          for (int k = 0; k < 4; k++) bits[k] = 1'b0;
          for (int r = 0; r < 4; r++)
            if (pre[4*g+r][i]) begin
              bits[nb] = val[4*g+r][i];
              nb++;
            end
          if (nb >= 3) begin
            logic [2:0] o;
            logic lsb = (i < n);
            o = ref_comp(lsb ? lsb_t : msb_t, lsb ? ex_lsb : ex_msb,
                         bits[0], bits[1], bits[2], bits[3], cin_v ? cin : 1'b0);
            nval[2*g][i] = o[0]; npre[2*g][i] = 1'b1;
            if (i + 1 < w) begin
              nval[2*g+1][i+1] = o[1]; npre[2*g+1][i+1] = 1'b1;
            end
            cin = o[2]; cin_v = 1'b1; c_occ = 1'b1;
          end else if (!c_occ) begin
            if (nb >= 1) begin nval[2*g][i] = bits[0]; npre[2*g][i] = 1'b1; end
            if (nb == 2) begin nval[2*g+1][i] = bits[1]; npre[2*g+1][i] = 1'b1; end
            cin_v = 1'b0; c_occ = 1'b0;
          end else begin
            int tot = int'(bits[0]) + int'(bits[1]) + int'(cin_v & cin);
            int cnt = nb + int'(cin_v);
            if (cnt >= 1) begin nval[2*g][i] = tot[0]; npre[2*g][i] = 1'b1; end
            if (cnt >= 2 && i + 1 < w) begin
              nval[2*g+1][i+1] = tot[1]; npre[2*g+1][i+1] = 1'b1;
            end
            c_occ = (cnt >= 2); cin_v = 1'b0;
          end
        end
      end
      for (int j = 0; j < 32; j++) begin
        val[j] = nval[j];
        pre[j] = npre[j];
      end
      rows = rows / 2;
    end
    res = val[0] + val[1];
    if (w < MW) res = res & ((MW'(1) << w) - MW'(1));
    return res;
  endfunction

endpackage
