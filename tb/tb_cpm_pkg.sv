// tb_cpm_pkg - self-checking test of the coefficient encoding functions.
//
// Checks the worked example coefficient 2645 (0.0000101001010101 with 16 fraction
// bits) against the published decomposition: CSD digits at 11, 9, 6, 4, 2, 0,
// three x2 subexpressions, PFP shift at the leading digit 11, span 9, one MSB
// term and two LSB terms, and adder widths of 11 / 16 bits (the 21-bit final
// adder is one below the printed bound of 22). Then, for many random
// coefficients, the CSD digits must be canonic and sum to the coefficient, the
// terms must sum to the coefficient, and the MSB/LSB split must respect the
// half-span rule. Finally the default lowpass set must be symmetric with a DC
// gain of about 2**WC.
module tb_cpm_pkg;
  import cpm_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint term_value(plan_t pl);
    longint v;
    longint m;
    v = 0;
    for (int i = 0; i < int'(pl.n); i++) begin
      m = (pl.t[i].op == OP_X1) ? 1 : (pl.t[i].op == OP_X2) ? 5 : 3;
      m = m <<< pl.t[i].lsb;
      v = pl.t[i].neg ? v - m : v + m;
    end
    return v;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    plan_t pl;
    int    c;
    longint s;
    int    top_max;
    int    m;
    int    sum;

    // Worked example
    for (int p = 0; p < 16; p++) begin
      int exp_d;
      exp_d = (p == 11 || p == 9 || p == 6 || p == 4 || p == 2 || p == 0) ? 1 : 0;
      check(csd_digit(2645, p) == exp_d, $sformatf("csd digit %0d of 2645", p));
    end
    pl = plan(2645);
    check(pl.n == 3, "2645: three terms");
    check(pl.t[0].op == OP_X2 && pl.t[1].op == OP_X2 && pl.t[2].op == OP_X2, "2645: all x2");
    check(pl.t[0].lsb == 9 && pl.t[1].lsb == 4 && pl.t[2].lsb == 0, "2645: term weights");
    check(pl.shift == 11, "2645: PFP shift at digit 11");
    check(pl.span == 9, "2645: span M = 9");
    check(pl.n_msb == 1, "2645: one MSB term");
    check(term_shift(pl, 1) == 4 && term_shift(pl, 2) == 0, "2645: LSB half shifts 4, 0");
    check(stage_width(pl, 8, 0) == 11, "2645: MSB sum 11 bits");
    check(stage_width(pl, 8, 2) == 16, "2645: LSB adder 16 bits");
    check(comb_width(pl, 8) == 21, "2645: final adder 21 bits");
    check(adder_count(pl) == 2, "2645: two adders");

    // [1 0 -1] and negated patterns
    pl = plan(3);
    check(pl.n == 1 && pl.t[0].op == OP_X3 && !pl.t[0].neg, "3 = x3");
    pl = plan(-5);
    check(pl.n == 1 && pl.t[0].op == OP_X2 && pl.t[0].neg, "-5 = -x2");
    pl = plan(-3);
    check(pl.n == 1 && pl.t[0].op == OP_X3 && pl.t[0].neg, "-3 = -x3");
    pl = plan(7);
    check(pl.n == 2 && pl.t[0].op == OP_X1 && pl.t[1].op == OP_X1 && pl.t[1].neg, "7 = 8 - 1");
    pl = plan(0);
    check(pl.n == 0, "0 has no terms");

    // Random coefficients
    for (int r = 0; r < 3000; r++) begin
      c = int'($urandom_range(0, 2 * 65535)) - 65535;
      s = 0;
      for (int p = 0; p < 34; p++) begin
        s += longint'(csd_digit(c, p)) <<< p;
        if (p > 0 && csd_digit(c, p) != 0 && csd_digit(c, p - 1) != 0)
          check(0, $sformatf("adjacent CSD digits in %0d", c));
      end
      check(s == longint'(c), $sformatf("CSD sum of %0d", c));
      pl = plan(c);
      check(term_value(pl) == longint'(c), $sformatf("term sum of %0d", c));
      if (pl.n != 0) begin
        top_max = int'(pl.t[0].top);
        m = int'(pl.span);
        for (int i = 0; i < int'(pl.n); i++)
          check((2 * (top_max - int'(pl.t[i].top)) > m) == (i >= int'(pl.n_msb)),
                $sformatf("partition of %0d term %0d", c, i));
      end
    end

    // Default lowpass set
    sum = 0;
    for (int k = 0; k < 260; k++) begin
      c = lowpass_coef(260, k, 16, 30.25e3 / 34.02e6, proto_dc_gain(260, 30.25e3 / 34.02e6));
      sum += c;
      check(c == lowpass_coef(260, 259 - k, 16, 30.25e3 / 34.02e6,
                              proto_dc_gain(260, 30.25e3 / 34.02e6)), "lowpass symmetry");
    end
    check(sum > 65536 - 260 && sum < 65536 + 260, $sformatf("lowpass DC gain %0d", sum));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
