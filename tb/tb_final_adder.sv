// Testbench of the final carry-propagate adder at W = 16: corner values
// (carry through every bit, wrap-around) and 2000 random pairs against the
// integer sum modulo 2^16.
module tb_final_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.a, .b, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned ta, input int unsigned tb_);
    int unsigned want;
    a = W'(ta); b = W'(tb_);
    #1;
    want = (ta + tb_) % (1 << W);
    checks++;
    if (32'(sum) != want) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", ta, tb_, sum, want);
    end
  endtask

  initial begin
    check(0, 0);
    check(16'hFFFF, 1);
    check(16'hFFFF, 16'hFFFF);
    check(16'h7FFF, 16'h0001);
    for (int k = 0; k < 2000; k++) check($urandom % (1 << W), $urandom % (1 << W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
