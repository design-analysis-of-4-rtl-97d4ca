// Exhaustive testbench of the exact 4:2 compressor: for all 32 input
// patterns, sum + 2 * (carry + cout) must equal x1 + x2 + x3 + x4 + cin, sum
// must be the parity of the five inputs, and cout must not depend on cin
// (it is checked against the majority of x1, x2, x3).
module tb_comp42_exact;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  comp42_exact dut (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int tot, got;
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      tot = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      got = int'(sum) + 2 * (int'(carry) + int'(cout));
      checks += 3;
      if (got != tot) begin
        failures++;
        $display("FAIL inputs=%05b value %0d, expected %0d", v[4:0], got, tot);
      end
      if (sum != tot[0]) begin
        failures++;
        $display("FAIL inputs=%05b sum=%b", v[4:0], sum);
      end
      if (cout != ((int'(x1) + int'(x2) + int'(x3)) >= 2)) begin
        failures++;
        $display("FAIL inputs=%05b cout=%b", v[4:0], cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
