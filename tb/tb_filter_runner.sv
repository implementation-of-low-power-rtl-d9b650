// tb_filter_runner - drives one cpm_channel_filter of a given size and checks it.
//
// Used by tb_cpm_filter_workloads to run several filter configurations side by
// side. The stimulus is an impulse (every coefficient is read out), a negative
// full-scale step and random samples with random idle cycles; every output is
// compared with a plain multiply-accumulate reference of the same coefficients.
// Results are reported through the checks/failures outputs once done is high.
module tb_filter_runner
  import cpm_pkg::*;
#(
  parameter int  N    = 260,
  parameter int  WC   = 16,
  parameter real FC   = 30.25e3 / 34.02e6,
  parameter int  SEED = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WX    = 8;
  localparam int ACC_W = WX + WC + 1 + $clog2(N);

  logic                    rst_n;
  logic                    in_valid;
  logic signed [WX-1:0]    x_in;
  logic signed [ACC_W-1:0] y_out;
  logic                    y_valid;

  int     coef [N];
  int     xh [N];
  longint expd;

  cpm_channel_filter #(.N_TAPS(N), .WX(WX), .WC(WC), .FC(FC)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .y_out(y_out), .y_valid(y_valid)
  );

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
    end
    #1;
    checks++;
    if (y_valid != v) failures++;
    expd = ref_y();
    checks++;
    if (longint'(y_out) != expd) begin
      failures++;
      if (failures < 5) $display("FAIL: N=%0d WC=%0d y=%0d expected %0d", N, WC, y_out, expd);
    end
  endtask

  initial begin : main
    real g;
    int  r;
    g = proto_dc_gain(N, FC);
    r = $urandom(SEED);
    done = 0;
    checks = 0;
    failures = 0;
    for (int k = 0; k < N; k++) begin
      coef[k] = lowpass_coef(N, k, WC, FC, g);
      xh[k] = 0;
    end
    rst_n = 0;
    in_valid = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send(1, 127);
    for (int k = 1; k < N + 2; k++) send(1, 0);
    for (int k = 0; k < N + 2; k++) send(1, -128);
    for (int k = 0; k < N; k++) send($urandom_range(0, 4) != 0, int'($urandom_range(0, 255)) - 128);
    done = 1;
  end
endmodule
