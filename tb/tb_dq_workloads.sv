// Workload testbench: the multiplier sizes and configurations that the
// design is evaluated with.
//
//  - 16x16 and 32x32 multipliers (default compressor types) in exact mode:
//    products of corner operands, of the operand pairs 9712345 x 125698,
//    612673 x 239119 and 6709 x 9896 (32-bit case), and of random operands,
//    against a * b; in the three approximate settings, against the bit-level
//    reference model.
//  - The four 8x8 configurations: (1) DQ1 throughout, high half exact, low
//    half approximate; (2) the same with DQ3; (3) the same with DQ4;
//    (4) DQ4 in the high half and DQ1 in the low half, both approximate.
//    Each is run on every operand pair and compared with the reference
//    model; its error rate and mean relative error are printed.
//  - An 8x8 multiplier built only from plain exact compressors (DQ_EXACT),
//    the conventional exact baseline, against a * b for every pair.
module tb_dq_workloads;
  import dq_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  // ---- 16x16 and 32x32 ----
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic        exl, exm;

  dq_dadda_mult #(.N(16)) u_m16 (.a(a16), .b(b16), .exact_lsb(exl), .exact_msb(exm), .p(p16));
  dq_dadda_mult #(.N(32)) u_m32 (.a(a32), .b(b32), .exact_lsb(exl), .exact_msb(exm), .p(p32));

  // ---- the four 8x8 configurations ----
  logic [7:0]  a8, b8;
  logic [15:0] q [4];
  dq_dadda_mult #(.N(8), .LSB_TYPE(DQ_C1), .MSB_TYPE(DQ_C1)) u_c1 (
    .a(a8), .b(b8), .exact_lsb(1'b0), .exact_msb(1'b1), .p(q[0]));
  dq_dadda_mult #(.N(8), .LSB_TYPE(DQ_C3), .MSB_TYPE(DQ_C3)) u_c3 (
    .a(a8), .b(b8), .exact_lsb(1'b0), .exact_msb(1'b1), .p(q[1]));
  dq_dadda_mult #(.N(8), .LSB_TYPE(DQ_C4), .MSB_TYPE(DQ_C4)) u_c4 (
    .a(a8), .b(b8), .exact_lsb(1'b0), .exact_msb(1'b1), .p(q[2]));
  dq_dadda_mult #(.N(8), .LSB_TYPE(DQ_C1), .MSB_TYPE(DQ_C4)) u_mix (
    .a(a8), .b(b8), .exact_lsb(1'b0), .exact_msb(1'b0), .p(q[3]));
  // Conventional exact multiplier: plain exact compressors, mode inputs
  // have no effect.
  logic [15:0] q_ex;
  dq_dadda_mult #(.N(8), .LSB_TYPE(DQ_EXACT), .MSB_TYPE(DQ_EXACT)) u_ex (
    .a(a8), .b(b8), .exact_lsb(1'b0), .exact_msb(1'b0), .p(q_ex));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_wide(input logic [31:0] ta, input logic [31:0] tb_);
    for (int m = 0; m < 4; m++) begin
      logic [63:0] w16, w32;
      a16 = ta[15:0]; b16 = tb_[15:0];
      a32 = ta;       b32 = tb_;
      {exm, exl} = 2'(m);
      #1;
      if (m == 3) begin
        w16 = 64'(a16) * 64'(b16);
        w32 = 64'(a32) * 64'(b32);
      end else begin
        w16 = ref_mult(16, 32'(a16), 32'(b16), 1, 4, exl, exm);
        w32 = ref_mult(32, a32, b32, 1, 4, exl, exm);
      end
      checks += 2;
      if (64'(p16) != w16) begin
        failures++;
        $display("FAIL 16x16 %0d*%0d mode=%0d: %0d, expected %0d", a16, b16, m, p16, w16);
      end
      if (p32 != w32) begin
        failures++;
        $display("FAIL 32x32 %0d*%0d mode=%0d: %0d, expected %0d", a32, b32, m, p32, w32);
      end
    end
  endtask

  initial begin
    int   ndiff [4];
    real  rel [4];
    int   tlsb [4] = '{1, 3, 4, 1};
    int   tmsb [4] = '{1, 3, 4, 4};
    logic elsb [4] = '{1'b0, 1'b0, 1'b0, 1'b0};
    logic emsb [4] = '{1'b1, 1'b1, 1'b1, 1'b0};
    string names [4] = '{"DQ1 high exact / DQ1 low approx",
                         "DQ3 high exact / DQ3 low approx",
                         "DQ4 high exact / DQ4 low approx",
                         "DQ4 high approx / DQ1 low approx"};

    run_wide(32'd9712345, 32'd125698);
    run_wide(32'd612673, 32'd239119);
    run_wide(32'd6709, 32'd9896);
    run_wide('0, '0);
    run_wide('1, '1);
    run_wide('1, 32'd1);
    for (int k = 0; k < 400; k++) run_wide($urandom, $urandom);

    for (int c = 0; c < 4; c++) begin
      ndiff[c] = 0;
      rel[c] = 0.0;
    end
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a8 = 8'(ia); b8 = 8'(ib);
        #1;
        checks++;
        if (q_ex != 16'(ia * ib)) begin
          failures++;
          $display("FAIL exact-only multiplier %0d*%0d: %0d", ia, ib, q_ex);
        end
        for (int c = 0; c < 4; c++) begin
          logic [15:0] w;
          w = 16'(ref_mult(8, 32'(ia), 32'(ib), tlsb[c], tmsb[c], elsb[c], emsb[c]));
          checks++;
          if (q[c] != w) begin
            failures++;
            if (failures < 10)
              $display("FAIL %s %0d*%0d: %0d, expected %0d", names[c], ia, ib, q[c], w);
          end
          if (q[c] != 16'(ia * ib)) begin
            ndiff[c]++;
            rel[c] += ((q[c] > 16'(ia * ib)) ? real'(q[c]) - real'(ia * ib)
                                             : real'(ia * ib) - real'(q[c])) / real'(ia * ib);
          end
        end
      end
    end
    for (int c = 0; c < 4; c++) begin
      $display("8x8 %s: %0d of 65536 products differ (%.2f %%), mean relative error %.5f",
               names[c], ndiff[c], 100.0 * ndiff[c] / 65536.0, rel[c] / 65536.0);
      checks++;
      if (ndiff[c] == 0) begin
        failures++;
        $display("FAIL configuration %0d never approximated", c + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
