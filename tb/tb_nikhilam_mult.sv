// tb_nikhilam_mult: checks the Nikhilam multiplier. First the worked example
// 14 * 15 = 210 (deficits 2 and 1, cross difference 13, deficit product 2),
// then every operand pair for N = 4 (default) and N = 8. The product must
// equal integer multiplication, zero operands included. A watchdog ends the
// run with a failure if it hangs.
module tb_nikhilam_mult;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  nikhilam_mult          dut4 (.a(a4), .b(b4), .p(p4));
  nikhilam_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    a4 = 4'd14; b4 = 4'd15;
    #1;
    checks++;
    if (p4 != 8'b1101_0010) begin
      failures++;
      $display("FAIL example 14 * 15 -> %0d", p4);
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 != 8'(i * j)) begin
          failures++;
          $display("FAIL N=4 %0d * %0d -> %0d", i, j, p4);
        end
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
