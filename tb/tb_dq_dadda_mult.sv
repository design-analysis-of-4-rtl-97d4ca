// End-to-end testbench of the configurable multiplier at its default size
// and configuration (8x8, DQ1 in the low half, DQ4 in the high half).
//
// For every one of the 65,536 operand pairs it applies the four mode
// settings in turn (both halves exact, low half approximate, high half
// approximate, both approximate) and checks p: against a * b in exact mode,
// against the bit-level reference model in the approximate modes. It counts
// how often each approximate mode actually changed the product and how often
// a switch from an approximate mode back to exact restored a * b in the same
// step; a mode that never did so counts as a failure. It also prints the
// error rate and mean relative error of each approximate mode. The design is
// combinational: each vector is held for 1 time unit.
module tb_dq_dadda_mult;
  import tb_ref_pkg::*;

  localparam int N = 8;

  logic [N-1:0]   a, b;
  logic           exact_lsb, exact_msb;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int n_diff [4];
  int n_restore = 0;
  real rel_err [4];

  dq_dadda_mult dut (.a, .b, .exact_lsb, .exact_msb, .p);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [1:0] mode, input logic [N-1:0] ta,
                       input logic [N-1:0] tb_);
    logic [2*N-1:0] exp_p;
    logic [2*N-1:0] prod;
    a = ta; b = tb_;
    exact_lsb = mode[0];
    exact_msb = mode[1];
    #1;
    prod = (2*N)'(ta) * (2*N)'(tb_);
    if (mode == 2'b11) exp_p = prod;
    else exp_p = (2*N)'(ref_mult(N, 32'(ta), 32'(tb_), 1, 4, mode[0], mode[1]));
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d mode=%b p=%0d expected=%0d", ta, tb_, mode, p, exp_p);
    end
    if (mode != 2'b11 && p != prod) begin
      n_diff[mode]++;
      rel_err[mode] += ((real'(p) > real'(prod)) ? real'(p) - real'(prod)
                                                  : real'(prod) - real'(p)) / real'(prod);
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin
      n_diff[m] = 0;
      rel_err[m] = 0.0;
    end
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        apply(2'b00, N'(ia), N'(ib));
        apply(2'b01, N'(ia), N'(ib));
        apply(2'b10, N'(ia), N'(ib));
        // Mode switch: back to exact from the approximate setting just used.
        begin
          logic [2*N-1:0] p_prev;
          p_prev = p;
          apply(2'b11, N'(ia), N'(ib));
          if (p_prev != p) n_restore++;
        end
      end
    end
    for (int m = 0; m < 3; m++) begin
      $display("mode exact_msb=%0d exact_lsb=%0d: %0d of 65536 products differ (%.2f %%), mean relative error %.5f",
               m[1], m[0], n_diff[m], 100.0 * n_diff[m] / 65536.0, rel_err[m] / 65536.0);
      checks++;
      if (n_diff[m] == 0) begin
        failures++;
        $display("FAIL approximate mode %0d never changed a product", m);
      end
    end
    checks++;
    if (n_restore == 0) begin
      failures++;
      $display("FAIL switching back to exact mode never changed the product");
    end
    $display("mode switches back to exact that restored a*b: %0d", n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
