// tb_twos_lut: checks the 2's complement table for N = 4 (default) and N = 8
// over every input: x + y must be 0 modulo 2^N. A watchdog ends the run with a
// failure if it hangs.
module tb_twos_lut;
  logic [3:0] x4, y4;
  logic [7:0] x8, y8;
  int checks = 0, failures = 0;

  twos_lut          dut4 (.x(x4), .y(y4));
  twos_lut #(.N(8)) dut8 (.x(x8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = '0;
    for (int i = 0; i < 16; i++) begin
      x4 = 4'(i);
      #1;
      checks++;
      if (4'(int'(y4) + i) != 4'd0) begin
        failures++;
        $display("FAIL N=4 x=%0d -> %0d", i, y4);
      end
    end
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      checks++;
      if (8'(int'(y8) + i) != 8'd0) begin
        failures++;
        $display("FAIL N=8 x=%0d -> %0d", i, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
