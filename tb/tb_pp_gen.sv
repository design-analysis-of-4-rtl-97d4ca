// Testbench of the partial-product generator at N = 8: corner operands and
// 2000 random pairs. Every row must be a & {8{b[j]}} shifted by j, and the
// rows must add up to a * b.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a, .b, .pp);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic [2*N-1:0] total = '0;
    a = ta; b = tb_;
    #1;
    for (int j = 0; j < N; j++) begin
      logic [2*N-1:0] want = '0;
      for (int i = 0; i < N; i++) want[i+j] = ta[i] & tb_[j];
      checks++;
      if (pp[j] != want) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d = %h, expected %h", ta, tb_, j, pp[j], want);
      end
      total += pp[j];
    end
    checks++;
    if (total != (2*N)'(ta) * (2*N)'(tb_)) begin
      failures++;
      $display("FAIL a=%h b=%h rows sum to %h", ta, tb_, total);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check(8'hA5, 8'h5A);
    for (int k = 0; k < 2000; k++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
