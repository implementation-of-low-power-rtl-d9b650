// cpm_multiplier - constant-coefficient multiplier of one filter tap, built with
// common subexpressions and coefficient partitioning.
//
// The coefficient COEF (an integer: the real coefficient times 2**WC) is encoded
// during elaboration by cpm_pkg::plan into signed, shifted operands taken from
// x1, x2 = 5*x1 and x3 = 3*x1. The operands are split into an MSB and an LSB
// sub-coefficient. Each sub-coefficient is summed by its own chain of adders on
// its own scale, so the adders only span the bits of that half. The LSB sum is
// then aligned to the MSB sum by one final adder, and the result is moved to the
// coefficient's absolute weight. All shifts are wiring. This is the structure of
// the published worked example: for COEF = 2645 (0.0000101001010101 with WC = 16)
// and an 8-bit input it builds one LSB-half adder of 16 bits (x2 + x2 shifted by
// 4) and a final adder of 21 bits, against the printed bound of 22.
//
// Interface: x1 (signed WX bits) and the shared x2, x3 (signed WX+3 bits) from
// cs_generator; p = x1 * COEF exactly, signed PW bits. PW must hold WX+WC+1 bits
// for any |COEF| < 2**WC.
// Inputs a coefficient does not need (x3 when it has no [1 0 -1] pair, say) are
// left unused, which lint reports.
// Timing: combinational; the longest path is the longer group chain plus the
// final adder.
module cpm_multiplier
  import cpm_pkg::*;
#(
  parameter int          WX   = 8,      // input sample width
  parameter int          WC   = 16,     // coefficient wordlength (fraction bits)
  parameter int          COEF = 2645,   // the worked example's coefficient
  parameter int          PW   = WX + WC + 1
) (
  input  logic signed [WX-1:0] x1,
  input  logic signed [WX+2:0] x2,
  input  logic signed [WX+2:0] x3,
  output logic signed [PW-1:0] p
);

  localparam plan_t PL    = plan(COEF);
  localparam int    NT    = int'(PL.n);
  localparam int    NM    = int'(PL.n_msb);
  localparam int    WCOMB = comb_width(PL, WX);

  if (COEF >= (1 <<< WC) || COEF <= -(1 <<< WC)) begin : g_range_check
    $error("cpm_multiplier: COEF does not fit WC bits");
  end

  // One generate block per term: the partial sum of its group after this term.
  for (genvar i = 0; i < MAXT; i++) begin : g_term
    if (i < NT) begin : g_on
      localparam op_e OP  = PL.t[i].op;
      localparam int  OW  = op_width(OP, WX);
      localparam int  SH  = term_shift(PL, i);
      localparam int  W   = stage_width(PL, WX, i);
      localparam bit  NEG = PL.t[i].neg;

      logic signed [OW-1:0] opnd;
      logic signed [W-1:0]  opx;
      logic signed [W-1:0]  ps;

      if (OP == OP_X1) begin : g_x1
        assign opnd = OW'(x1);
      end else if (OP == OP_X2) begin : g_x2
        assign opnd = OW'(x2);
      end else begin : g_x3
        assign opnd = OW'(x3);
      end
      assign opx = W'(opnd) <<< SH;

      if (first_of_group(PL, i)) begin : g_first
        assign ps = NEG ? -opx : opx;
      end else begin : g_add
        logic signed [W-1:0] prev;
        assign prev = W'(g_term[i-1].g_on.ps);
        assign ps   = NEG ? prev - opx : prev + opx;
      end
    end
  end

  if (NT == 0) begin : g_zero
    assign p = '0;
  end else if (NM == NT) begin : g_msb_only
    assign p = PW'(g_term[NT-1].g_on.ps) <<< PL.l_msb;
  end else begin : g_comb
    localparam int ALIGN = int'(PL.l_msb) - int'(PL.l_lsb);
    logic signed [WCOMB-1:0] msb_al;
    logic signed [WCOMB-1:0] lsb_ext;
    logic signed [WCOMB-1:0] sum;
    assign msb_al  = WCOMB'(g_term[NM-1].g_on.ps) <<< ALIGN;
    assign lsb_ext = WCOMB'(g_term[NT-1].g_on.ps);
    assign sum     = msb_al + lsb_ext;
    assign p       = PW'(sum) <<< PL.l_lsb;
  end

endmodule
