// tb_cpm_multiplier - self-checking test of the partitioned constant multiplier.
//
// Builds one multiplier for each of a set of coefficients (the worked example
// 2645, patterns that use x1, x2 and x3 with both signs, zero, the extremes of a
// 16-bit coefficient and a few with long spans) and drives every 8-bit input. Each
// product must equal x1 * COEF computed with a plain multiplication. The adder
// widths built for the worked example are checked as well.
module tb_cpm_multiplier;
  localparam int WX = 8;
  localparam int WC = 16;
  localparam int PW = WX + WC + 1;
  localparam int NC = 14;
  localparam int COEFS [NC] = '{2645, 3, -5, 7, 0, 65535, -65535, 43690, -21845,
                                 1, 32768, 40961, -12973, 27307};

  int checks = 0;
  int failures = 0;

  logic signed [WX-1:0] x1;
  logic signed [WX+2:0] x2;
  logic signed [WX+2:0] x3;
  logic signed [PW-1:0] p [NC];

  cs_generator #(.WX(WX)) u_cs (.x1(x1), .x2(x2), .x3(x3));

  for (genvar i = 0; i < NC; i++) begin : g_dut
    cpm_multiplier #(.WX(WX), .WC(WC), .COEF(COEFS[i]), .PW(PW)) dut (
      .x1(x1), .x2(x2), .x3(x3), .p(p[i])
    );
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint expd;
    // Adder widths of the worked example (COEFS[0] = 2645, 8-bit input): the
    // subexpression adder 11 bits, the LSB-half adder 16 bits, the final adder 21.
    checks += 3;
    if ($bits(x2) != 11) begin failures++; $display("FAIL: x2 adder width %0d", $bits(x2)); end
    if ($bits(g_dut[0].dut.g_term[2].g_on.ps) != 16) begin
      failures++; $display("FAIL: LSB-half adder width %0d", $bits(g_dut[0].dut.g_term[2].g_on.ps));
    end
    if ($bits(g_dut[0].dut.g_comb.sum) != 21) begin
      failures++; $display("FAIL: final adder width %0d", $bits(g_dut[0].dut.g_comb.sum));
    end
    for (int v = -128; v < 128; v++) begin
      x1 = WX'(v);
      #1;
      for (int i = 0; i < NC; i++) begin
        expd = longint'(v) * longint'(COEFS[i]);
        checks++;
        if (longint'(p[i]) != expd) begin
          failures++;
          $display("FAIL: %0d * %0d = %0d, got %0d", v, COEFS[i], expd, p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
