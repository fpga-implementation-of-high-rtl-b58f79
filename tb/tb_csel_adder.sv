// tb_csel_adder: checks the carry select adder against integer addition.
// The default 4-bit adder (two 2-bit blocks) gets every operand pair with both
// carry-in values. A second instance, 9 bits wide in blocks of 4 (so the last
// block is short), gets 20000 random operand sets. {cout, sum} must equal
// a + b + cin. A watchdog ends the run with a failure if it hangs.
module tb_csel_adder;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [8:0] a9, b9, s9;
  logic       ci9, co9;
  int checks = 0, failures = 0;

  csel_adder dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  csel_adder #(.W(9), .BLK(4)) dut9 (.a(a9), .b(b9), .cin(ci9), .sum(s9), .cout(co9));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a9 = '0; b9 = '0; ci9 = 1'b0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} != 5'(i + j + c)) begin
            failures++;
            $display("FAIL W=4 %0d + %0d + %0d -> %0d", i, j, c, {co4, s4});
          end
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int x, y, c;
      x = int'($urandom_range(511));
      y = int'($urandom_range(511));
      c = int'($urandom_range(1));
      a9 = 9'(x); b9 = 9'(y); ci9 = 1'(c);
      #1;
      checks++;
      if ({co9, s9} != 10'(x + y + c)) begin
        failures++;
        $display("FAIL W=9 %0d + %0d + %0d -> %0d", x, y, c, {co9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
