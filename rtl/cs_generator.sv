// cs_generator - the shared subexpression adders of the multiplier block.
//
// A transposed-form FIR filter multiplies one input sample by every coefficient
// at once, so subexpressions of the coefficients can be formed once and shared by
// all taps. This block forms the two 3-digit subexpressions used by the encoding
// in cpm_pkg:
//   x2 = x1 + x1>>2  (CSD pattern [1 0 1]),  built here as 4*x1 + x1 = 5*x1
//   x3 = x1 - x1>>2  (CSD pattern [1 0 -1]), built here as 4*x1 - x1 = 3*x1
// The ">>2" of the fractional notation becomes a left shift of the other operand
// in integer notation; the weight of the least significant bit is the caller's
// business. Each adder is WX+3 bits wide (11 bits for an 8-bit input), which is
// the adder A1 of the published worked example. The [1 0 -1] adder is the same
// method applied to the second pattern the encoding step names.
//
// Interface: x1 is a signed WX-bit sample; x2 and x3 are signed WX+3-bit results.
// Timing: purely combinational, one adder delay.
module cs_generator #(
  parameter int unsigned WX = 8   // input sample width
) (
  input  logic signed [WX-1:0] x1,
  output logic signed [WX+2:0] x2,
  output logic signed [WX+2:0] x3
);

  logic signed [WX+2:0] x1_ext;
  logic signed [WX+2:0] x1_sh2;

  assign x1_ext = (WX+3)'(x1);
  assign x1_sh2 = x1_ext <<< 2;

  always_comb begin
    x2 = x1_sh2 + x1_ext;
    x3 = x1_sh2 - x1_ext;
  end

endmodule
