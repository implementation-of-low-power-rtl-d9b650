// tb_cpm_channel_filter - end-to-end self-checking test of the channel filter at
// its default size.
//
// The reference model forms y[n] = sum_k c_k x[n-k] with plain multiplications,
// using the coefficient values the filter is built for. The stimulus is an
// impulse (which reads out every coefficient through the multiplier block), a
// full-scale negative step, and random samples with random idle cycles
// (in_valid low). Every output is compared and its one-clock latency checked.
// The test also counts how often each mechanism of the multiplier block is used
// by the built coefficients (x1, x2 and x3 operands, subtracted operands, taps
// split into two sub-coefficients) and how often the input stalls; one that never
// happens is a failure.
module tb_cpm_channel_filter;
  import cpm_pkg::*;

  localparam int  N     = 1180;
  localparam int  WX    = 8;
  localparam int  WC    = 16;
  localparam real FC    = 30.25e3 / 34.02e6;
  localparam int  ACC_W = WX + WC + 1 + $clog2(N);

  int checks = 0;
  int failures = 0;

  logic                    clk = 0;
  logic                    rst_n;
  logic                    in_valid;
  logic signed [WX-1:0]    x_in;
  logic signed [ACC_W-1:0] y_out;
  logic                    y_valid;

  int     coef [N];
  int     xh [N];       // xh[m]: m-th most recent accepted sample
  longint expd;
  int     n_x1, n_x2, n_x3, n_neg, n_split, n_stall, n_samples;

  cpm_channel_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .y_out(y_out), .y_valid(y_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s;
    s = 0;
    for (int k = 0; k < N; k++) s += longint'(coef[k]) * longint'(xh[k]);
    return s;
  endfunction

  task automatic send(bit v, int x);
    in_valid = v;
    x_in     = WX'(x);
    @(posedge clk);
    if (v) begin
      for (int m = N - 1; m > 0; m--) xh[m] = xh[m-1];
      xh[0] = x;
      n_samples++;
    end else begin
      n_stall++;
    end
    #1;
    checks++;
    if (y_valid != v) begin
      failures++;
      $display("FAIL: y_valid=%0b expected %0b", y_valid, v);
    end
    expd = ref_y();
    checks++;
    if (longint'(y_out) != expd) begin
      failures++;
      if (failures < 10) $display("FAIL: sample %0d y=%0d expected %0d", n_samples, y_out, expd);
    end
  endtask

  initial begin : main
    plan_t pl;
    real   g;
    g = proto_dc_gain(N, FC);
    n_x1 = 0; n_x2 = 0; n_x3 = 0; n_neg = 0; n_split = 0; n_stall = 0; n_samples = 0;
    for (int k = 0; k < N; k++) begin
      coef[k] = lowpass_coef(N, k, WC, FC, g);
      xh[k] = 0;
      pl = plan(coef[k]);
      for (int i = 0; i < int'(pl.n); i++) begin
        if (pl.t[i].op == OP_X1) n_x1++;
        if (pl.t[i].op == OP_X2) n_x2++;
        if (pl.t[i].op == OP_X3) n_x3++;
        if (pl.t[i].neg) n_neg++;
      end
      if (pl.n_msb != pl.n) n_split++;
    end

    rst_n = 0;
    in_valid = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // impulse: the output reads out 127 * c_k
    send(1, 127);
    for (int k = 1; k < N + 2; k++) send(1, 0);
    // negative full-scale step
    for (int k = 0; k < N + 2; k++) send(1, -128);
    // random samples with idle cycles
    for (int k = 0; k < 2 * N; k++) send($urandom_range(0, 4) != 0, int'($urandom_range(0, 255)) - 128);

    $display("mechanisms: x1 terms %0d, x2 terms %0d, x3 terms %0d, subtracted %0d, split taps %0d, stalls %0d",
             n_x1, n_x2, n_x3, n_neg, n_split, n_stall);
    checks += 6;
    if (n_x1 == 0)    begin failures++; $display("FAIL: no x1 operand used"); end
    if (n_x2 == 0)    begin failures++; $display("FAIL: no x2 subexpression used"); end
    if (n_x3 == 0)    begin failures++; $display("FAIL: no x3 subexpression used"); end
    if (n_neg == 0)   begin failures++; $display("FAIL: no subtracted operand"); end
    if (n_split == 0) begin failures++; $display("FAIL: no partitioned tap"); end
    if (n_stall == 0) begin failures++; $display("FAIL: no idle input cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
