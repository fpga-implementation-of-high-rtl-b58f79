// tb_ut_mult2: exhaustive check of the 2x2 Urdhva-Tiryag cell. All 16
// operand pairs are applied and the 4-bit product is compared with integer
// multiplication. A watchdog ends the run with a failure if it hangs.
module tb_ut_mult2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  ut_mult2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
