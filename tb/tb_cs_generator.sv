// tb_cs_generator - exhaustive self-checking test of the shared subexpression
// adders: for every 8-bit input, x2 must be 5*x1 and x3 must be 3*x1.
module tb_cs_generator;
  int checks = 0;
  int failures = 0;

  logic signed [7:0]  x1;
  logic signed [10:0] x2;
  logic signed [10:0] x3;

  cs_generator #(.WX(8)) dut (.x1(x1), .x2(x2), .x3(x3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int v = -128; v < 128; v++) begin
      x1 = 8'(v);
      #1;
      checks += 2;
      if (int'(x2) != 5 * v) begin
        failures++;
        $display("FAIL: x2(%0d) = %0d", v, x2);
      end
      if (int'(x3) != 3 * v) begin
        failures++;
        $display("FAIL: x3(%0d) = %0d", v, x3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
