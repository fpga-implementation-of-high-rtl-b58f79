// tb_vedic_top: end-to-end test of both multipliers at the default width
// (4x4 bits, no parameter overrides).
//
// 1. The three published test vectors: 15 * 15 = 225 and 13 * 2 = 26 on the
//    Urdhva-Tiryag multiplier, 14 * 15 = 210 on the Nikhilam multiplier.
// 2. Every operand pair on both multipliers at once (the Urdhva-Tiryag one
//    with the pair swapped), each product checked against integer
//    multiplication and the two products against each other.
// 3. Coverage: the reference model below recomputes the intermediate values
//    of both datapaths and counts how often each mechanism was used:
//      - a carry out of the first middle-column adder (c1),
//      - a carry out of the second middle-column adder (c2),
//      - the carry select path of an adder taking its "carry in = 1" result,
//      - a Nikhilam deficit product of 16 or more (high half nonzero),
//      - a negative cross difference (a < deficit of b),
//      - the high-half addition wrapping modulo 16,
//      - the zero-operand override.
//    A mechanism that never happened counts as a failure.
// A watchdog ends the run with a failure if it hangs.
module tb_vedic_top;
  logic [3:0] ut_a, ut_b, nik_a, nik_b;
  logic [7:0] ut_p, nik_p;
  int checks = 0, failures = 0;

  int n_c1 = 0, n_c2 = 0, n_csel1 = 0;
  int n_qhi = 0, n_neg = 0, n_wrap = 0, n_zero = 0;

  vedic_top dut (
    .ut_a(ut_a), .ut_b(ut_b), .ut_p(ut_p),
    .nik_a(nik_a), .nik_b(nik_b), .nik_p(nik_p)
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s : %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published vectors.
    ut_a = 4'b1111; ut_b = 4'b1111; nik_a = 4'b1110; nik_b = 4'b1111;
    #1;
    check("UT 15*15", int'(ut_p), int'(8'b1110_0001));
    check("Nikhilam 14*15", int'(nik_p), int'(8'b1101_0010));
    ut_a = 4'b1101; ut_b = 4'b0010;
    #1;
    check("UT 13*2", int'(ut_p), int'(8'b0001_1010));

    // Exhaustive sweep with coverage of the internal mechanisms.
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int q0, q1, q2, s1, da, db, q, diff;
        // The UT multiplier gets the operands swapped, so that a product
        // taken from the wrong inputs cannot match by accident.
        ut_a = 4'(j); ut_b = 4'(i); nik_a = 4'(i); nik_b = 4'(j);
        #1;
        check($sformatf("UT %0d*%0d", j, i), int'(ut_p), i * j);
        check($sformatf("Nikhilam %0d*%0d", i, j), int'(nik_p), i * j);
        check($sformatf("UT vs Nikhilam %0d*%0d", i, j), int'(ut_p), int'(nik_p));

        // Urdhva-Tiryag intermediates.
        q0 = (j % 4) * (i % 4);
        q1 = (j / 4) * (i % 4);
        q2 = (j % 4) * (i / 4);
        s1 = (q1 + q2) % 16;
        if (q1 + q2 >= 16) n_c1++;
        if (s1 + q0 / 4 >= 16) n_c2++;
        if ((q1 % 4) + (q2 % 4) >= 4) n_csel1++;

        // Nikhilam intermediates.
        if (i == 0 || j == 0) begin
          n_zero++;
        end else begin
          da = 16 - i;
          db = 16 - j;
          q = da * db;
          diff = i - db;
          if (q >= 16) n_qhi++;
          if (diff < 0) n_neg++;
          if ((diff + 16) % 16 + q / 16 >= 16) n_wrap++;
        end
      end
    end

    need("UT middle carry c1", n_c1);
    need("UT middle carry c2", n_c2);
    need("UT carry-select cin=1 path", n_csel1);
    need("Nikhilam deficit product>=16", n_qhi);
    need("Nikhilam negative cross diff", n_neg);
    need("Nikhilam high-half wrap", n_wrap);
    need("Nikhilam zero override", n_zero);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
