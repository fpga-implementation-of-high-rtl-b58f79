// tb_ut_mult: exhaustive check of the Urdhva-Tiryag multiplier. The default
// 4x4 instance and an 8x8 instance (built from four 4x4 ones) get every
// operand pair; the product must equal integer multiplication. The 4x4 pass
// also confirms that the merged middle-column carry (c1 or c2 of the second
// level) occurs, which the OR gate is there for. A watchdog ends the run with
// a failure if it hangs.
module tb_ut_mult;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;
  int carry_cases = 0;

  ut_mult          dut4 (.a(a4), .b(b4), .p(p4));
  ut_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int q0, q1, q2;
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 != 8'(i * j)) begin
          failures++;
          $display("FAIL N=4 %0d * %0d -> %0d", i, j, p4);
        end
        q0 = (i % 4) * (j % 4);
        q1 = (i / 4) * (j % 4);
        q2 = (i % 4) * (j / 4);
        if (q1 + q2 + q0 / 4 >= 16) carry_cases++;
      end
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 != 16'(i * j)) begin
          failures++;
          $display("FAIL N=8 %0d * %0d -> %0d", i, j, p8);
        end
      end
    end
    checks++;
    if (carry_cases == 0) begin
      failures++;
      $display("FAIL middle-column carry never exercised");
    end
    $display("middle-column carry cases: %0d", carry_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
