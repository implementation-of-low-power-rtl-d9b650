// cpm_channel_filter - higher order FIR channel filter with a coefficient-
// partitioned multiplier block.
//
// The filter is in transposed form: every input sample x1 is multiplied by all N
// coefficients at once, and the products enter a delay/adder line
// (tap_delay_line). Because all multiplications share one input, the block of
// multipliers is built as a multiple-constant multiplier: cs_generator forms the
// two shared subexpressions x2 = 5*x1 and x3 = 3*x1 once, and each tap's
// cpm_multiplier adds shifted copies of x1, x2 and x3 chosen by the coefficient's
// encoding (cpm_pkg): CSD digits, paired into [1 0 1] / [1 0 -1] subexpressions,
// measured from the leading digit (pseudo floating point) and split into an MSB
// and an LSB sub-coefficient that are summed separately in narrow adders.
//
// Coefficients: tap k is cpm_pkg::lowpass_coef(N_TAPS, k, WC, FC, gain), a
// Hamming-windowed sinc with cutoff FC (cycles per sample), unity gain at DC,
// rounded to WC fractional bits. The default FC is the D-AMPS channel filter's
// transition band centre, 30.25 kHz at a 34.02 MHz sample rate. The window design
// stands in for the optimised filters of the method, whose coefficients are not
// published; any other set can be used by changing lowpass_coef.
//
// Interface: x_in is a signed WX-bit sample, taken when in_valid is high. y_out is
// the exact sum of products, a signed ACC_W-bit value with WC fractional bits;
// y_valid marks it. Timing: one sample per enabled clock, output one clock after
// the sample; reset is synchronous and active low.
module cpm_channel_filter
  import cpm_pkg::*;
#(
  parameter int  N_TAPS = 1180,                  // filter length (largest D-AMPS filter)
  parameter int  WX     = 8,                     // input sample width
  parameter int  WC     = 16,                    // coefficient wordlength
  parameter real FC     = 30.25e3 / 34.02e6,     // cutoff, cycles per sample
  parameter int  PW     = WX + WC + 1,           // product width
  parameter int  ACC_W  = PW + $clog2(N_TAPS)    // output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WX-1:0]    x_in,
  output logic signed [ACC_W-1:0] y_out,
  output logic                    y_valid
);

  localparam real DC_GAIN = proto_dc_gain(N_TAPS, FC);

  logic signed [WX+2:0] x2;
  logic signed [WX+2:0] x3;
  logic signed [PW-1:0] prod [N_TAPS];

  cs_generator #(.WX(WX)) u_cs (
    .x1 (x_in),
    .x2 (x2),
    .x3 (x3)
  );

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    localparam int COEF = lowpass_coef(N_TAPS, k, WC, FC, DC_GAIN);
    cpm_multiplier #(
      .WX   (WX),
      .WC   (WC),
      .COEF (COEF),
      .PW   (PW)
    ) u_mult (
      .x1 (x_in),
      .x2 (x2),
      .x3 (x3),
      .p  (prod[k])
    );
  end

  tap_delay_line #(
    .N     (N_TAPS),
    .PW    (PW),
    .ACC_W (ACC_W)
  ) u_line (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .p        (prod),
    .y        (y_out),
    .y_valid  (y_valid)
  );

endmodule
