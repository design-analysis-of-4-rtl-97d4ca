// Testbench of one 4-row reduction group, planned with the occupancy of the
// first four partial-product rows of an 8x8 multiplier (rows shifted by
// 0..3 in a 16-bit field), so that the group holds wired columns, half or
// full adders and 4:2 compressors (DQ1 below column 8, DQ4 above).
//
// With both modes exact, s + c must equal the sum of the four rows for 3000
// random row contents. With only the high half approximate, the low eight
// bits of s and c must be those of the exact case (nothing travels down the
// columns) and the high bits must differ for some inputs; likewise, with
// only the low half approximate, the result must differ from the exact one
// for some inputs. Bits outside the occupancy masks are driven with random
// values and must have no effect.
module tb_reduce_group;
  import dq_pkg::*;

  localparam int W = 16;
  localparam mask4_t M = {level_mask(8, 0, 3), level_mask(8, 0, 2),
                          level_mask(8, 0, 1), level_mask(8, 0, 0)};

  logic [W-1:0] r [4];
  logic         exact_lsb, exact_msb;
  logic [W-1:0] s, c;
  int checks = 0, failures = 0;
  int n_hi_diff = 0, n_lo_diff = 0;

  reduce_group #(.W(W), .M(M), .SPLIT(8), .LSB_TYPE(DQ_C1), .MSB_TYPE(DQ_C4)) dut (
    .r, .exact_lsb, .exact_msb, .s, .c
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [W-1:0] v [4];
      logic [W-1:0] noise [4];
      logic [W-1:0] want, s_ex, c_ex;
      want = '0;
      for (int j = 0; j < 4; j++) begin
        v[j]     = W'($urandom) & M[j][W-1:0];
        noise[j] = W'($urandom) & ~M[j][W-1:0];
        r[j]     = v[j] | noise[j];
        want    += v[j];
      end
      exact_lsb = 1'b1; exact_msb = 1'b1;
      #1;
      s_ex = s; c_ex = c;
      checks++;
      if (W'(s + c) != want) begin
        failures++;
        $display("FAIL exact: s + c = %h, expected %h", W'(s + c), want);
      end
      exact_msb = 1'b0;
      #1;
      checks++;
      if (s[7:0] != s_ex[7:0] || c[7:0] != c_ex[7:0]) begin
        failures++;
        $display("FAIL high-half approximation changed the low half");
      end
      if (s[W-1:8] != s_ex[W-1:8] || c[W-1:8] != c_ex[W-1:8]) n_hi_diff++;
      exact_msb = 1'b1; exact_lsb = 1'b0;
      #1;
      if (s != s_ex || c != c_ex) n_lo_diff++;
    end
    checks += 2;
    if (n_hi_diff == 0) begin
      failures++;
      $display("FAIL high-half approximation never changed the result");
    end
    if (n_lo_diff == 0) begin
      failures++;
      $display("FAIL low-half approximation never changed the result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
