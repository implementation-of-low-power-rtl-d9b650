// tb_tap_delay_line - self-checking test of the transposed delay/adder line.
//
// Drives random products into an 8-tap line with in_valid toggling randomly and
// compares the output with a reference that keeps the last 8 product vectors and
// forms y[n] = sum_k p_k[n-k]. Checks the one-clock latency of y_valid and that
// the line holds still while in_valid is low.
module tb_tap_delay_line;
  localparam int N  = 8;
  localparam int PW = 12;
  localparam int AW = PW + $clog2(N);

  int checks = 0;
  int failures = 0;
  int stalls = 0;

  logic                 clk = 0;
  logic                 rst_n;
  logic                 in_valid;
  logic signed [PW-1:0] p [N];
  logic signed [AW-1:0] y;
  logic                 y_valid;

  // history[m][k]: product k of the m-th most recent accepted sample
  int history [N][N];
  int nacc;

  tap_delay_line #(.N(N), .PW(PW), .ACC_W(AW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .p(p), .y(y), .y_valid(y_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y();
    int s;
    s = 0;
    for (int k = 0; k < N; k++) s += history[k][k];
    return s;
  endfunction

  initial begin : main
    bit v;
    rst_n = 0;
    in_valid = 0;
    for (int k = 0; k < N; k++) p[k] = '0;
    for (int m = 0; m < N; m++) for (int k = 0; k < N; k++) history[m][k] = 0;
    nacc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      v = ($urandom_range(0, 3) != 0);
      in_valid = v;
      for (int k = 0; k < N; k++) p[k] = PW'($urandom);
      @(posedge clk);
      if (v) begin
        for (int m = N - 1; m > 0; m--) history[m] = history[m-1];
        for (int k = 0; k < N; k++) history[0][k] = int'(p[k]);
        nacc++;
      end else begin
        stalls++;
      end
      #1;
      checks++;
      if (y_valid != v) begin
        failures++;
        $display("FAIL: y_valid %0b expected %0b", y_valid, v);
      end
      checks++;
      if (int'(y) != ref_y()) begin
        failures++;
        $display("FAIL: cycle %0d y=%0d expected %0d", cyc, y, ref_y());
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: in_valid never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
