// tap_delay_line - the delay/adder line of a transposed-form FIR filter.
//
// Tap k of the filter adds its product p[k] to the value that tap k+1 held one
// sample earlier and stores the sum (delay - structural adder - delay, as in the
// usual transposed tap drawing). The register of tap 0 is the filter output:
//   y[n] = sum_k p_k[n-k]   where p_k[m] is the product of tap k for sample m.
// Each register is ACC_W bits wide; the default adds ceil(log2 N) guard bits to a
// product of PW bits, following the accumulation width used in the energy model
// of the method (Wc + Wx + ceil(log2 N)), plus a sign bit.
//
// Interface: p[k] are the N signed products of the current sample, valid with
// in_valid. A register advances only when in_valid is high (one input sample per
// enabled clock). y is the registered output; y_valid is in_valid delayed by one.
// Timing: one clock from a sample to the output that includes it; one adder
// between registers. Reset (active low, synchronous) clears all registers.
// The delay-adder-delay tap is the method's; the enable, the reset and the
// guard-bit sizing are this design's own choices.
module tap_delay_line #(
  parameter int N     = 260,             // number of taps
  parameter int PW    = 25,              // product width
  parameter int ACC_W = PW + $clog2(N)   // register width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [PW-1:0]    p [N],
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);

  logic signed [ACC_W-1:0] r [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) r[k] <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < N - 1; k++) r[k] <= ACC_W'(p[k]) + r[k+1];
        r[N-1] <= ACC_W'(p[N-1]);
      end
    end
  end

  assign y = r[0];

endmodule
