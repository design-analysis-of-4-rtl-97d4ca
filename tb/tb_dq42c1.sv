// Exhaustive testbench of dual-quality 4:2 compressor structure 1.
//
// Exact mode: for all 32 input patterns sum + 2 * (carry + cout) must equal
// x1 + x2 + x3 + x4 + cin. Approximate mode: each output is compared with
// its expected function, sum = x1, carry = x4, cout = 0, for all 32 patterns, and the number of
// patterns with cin = 0 whose approximate value differs from
// x1 + x2 + x3 + x4 must be 10 of 16 (62.5 %). Each pattern is then applied
// once more in exact mode to check that switching back restores the exact
// value.
module tb_dq42c1;
  logic exact, x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  int n_err = 0;

  dq42c1 dut (.exact, .x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int tot;
      logic es, ec, eo;
      {x1, x2, x3, x4, cin} = 5'(v);
      tot = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      exact = 1'b1;
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != tot) begin
        failures++;
        $display("FAIL exact inputs=%05b", v[4:0]);
      end
      exact = 1'b0;
      #1;
      es = x1; ec = x4; eo = 1'b0;
      checks++;
      if ({sum, carry, cout} != {es, ec, eo}) begin
        failures++;
        $display("FAIL approximate inputs=%05b got %b%b%b expected %b%b%b",
                 v[4:0], sum, carry, cout, es, ec, eo);
      end
      if (!cin && (int'(sum) + 2 * (int'(carry) + int'(cout)) != tot)) n_err++;
      exact = 1'b1;
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != tot) begin
        failures++;
        $display("FAIL switch back to exact inputs=%05b", v[4:0]);
      end
    end
    checks++;
    if (n_err != 10) begin
      failures++;
      $display("FAIL approximate error count %0d of 16, expected 10", n_err);
    end
    $display("approximate mode: %0d of 16 patterns (cin = 0) in error", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
