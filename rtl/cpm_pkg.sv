// cpm_pkg - design-time coefficient encoding for coefficient-partitioned
// constant multipliers, plus the reference lowpass prototype of the channel filter.
//
// Nothing in this package is clocked logic: its functions run while a design is
// elaborated and decide the shape of the adder network of every tap.
//
// Encoding of one coefficient h (an integer, h = h_real * 2**WC):
//   1. Canonic signed digit (CSD) recoding: digits in {-1,0,+1}, no two adjacent
//      digits non-zero.
//   2. Common subexpressions: scanning from the most significant digit, a non-zero
//      digit d[p] whose neighbour two places down d[p-2] is also non-zero becomes
//      one operand: the pattern [1 0 1] (or its negation) uses x2 = 4*x1 + x1, the
//      pattern [1 0 -1] (or its negation) uses x3 = 4*x1 - x1. A digit without a
//      partner stays a plain x1 operand. Every operand is a "term" with a sign, a
//      source (x1, x2 or x3) and the bit position of its least significant weight.
//   3. Pseudo floating point: the terms are measured from the leading one of the
//      coefficient. The distance of a term's top digit from the leading digit is
//      its relative shift s; the largest s is the span M.
//   4. Partitioning: terms with 2*s <= M form the MSB sub-coefficient, the others
//      the LSB sub-coefficient. Each sub-coefficient is summed on its own scale
//      (relative to its own least significant term), so its adders only need the
//      width of the sub-coefficient's own span; the two sums are then aligned and
//      added by one final adder, and the result is shifted to the coefficient's
//      absolute scale (wiring only).
//
// Adder widths follow the usual rule for adding signed numbers: the sum of two
// aligned operands needs one bit more than the wider of them. For an 8-bit input
// this gives 11 bits for the subexpression adders and, for the worked example
// coefficient 2645 (binary 0000101001010101), 16 bits for the LSB-half adder and
// 21 bits for the final adder.
//
// The design follows the published coefficient-partitioning method in steps 1-4.
// Own choices: the greedy top-down pairing of digits in step 2, the 2*s <= M rule
// for splitting an odd span, signed (two's complement) data and coefficients,
// and the Hamming-windowed sinc used as the default coefficient set.
package cpm_pkg;

  // Largest number of terms one coefficient can produce (a 31-digit CSD word has
  // at most 16 non-zero digits).
  localparam int unsigned MAXT = 16;

  typedef enum logic [1:0] {
    OP_X1 = 2'd0,   // x1             (plain input)
    OP_X2 = 2'd1,   // x2 = 4*x1 + x1 (CS [1 0 1])
    OP_X3 = 2'd2    // x3 = 4*x1 - x1 (CS [1 0 -1])
  } op_e;

  typedef struct packed {
    op_e        op;    // operand source
    logic       neg;   // subtract instead of add
    logic [5:0] lsb;   // weight 2**lsb of the operand's least significant digit
    logic [5:0] top;   // position of the operand's most significant digit
    logic       lsb_grp; // 1: LSB sub-coefficient, 0: MSB sub-coefficient
  } term_t;

  typedef struct packed {
    term_t [MAXT-1:0] t;      // terms, most significant first
    logic  [4:0]      n;      // number of terms
    logic  [4:0]      n_msb;  // terms 0 .. n_msb-1 form the MSB group
    logic  [5:0]      shift;  // PFP shift: position of the leading digit
    logic  [5:0]      span;   // PFP span M (largest relative shift)
    logic  [5:0]      l_msb;  // least significant weight of the MSB group
    logic  [5:0]      l_lsb;  // least significant weight of the LSB group
  } plan_t;

  // CSD digit p (0 = least significant) of coefficient c.
  function automatic int csd_digit(int c, int p);
    longint x;
    int d;
    x = longint'(c);
    d = 0;
    for (int i = 0; i <= p; i++) begin
      if (x[0]) begin
        d = (x[1:0] == 2'b01) ? 1 : -1;
        x = x - longint'(d);
      end else begin
        d = 0;
      end
      x = x >>> 1;
    end
    return d;
  endfunction

  // Full encoding of coefficient c (steps 1-4 above).
  function automatic plan_t plan(int c);
    int    d [34];
    plan_t pl;
    int    n;
    int    top_max;
    int    m;
    pl = '0;
    for (int p = 0; p < 34; p++) d[p] = csd_digit(c, p);
    n = 0;
    for (int p = 33; p >= 0; p--) begin
      if (d[p] != 0) begin
        if (p >= 2 && d[p-2] != 0) begin
          pl.t[n].op  = (d[p] == d[p-2]) ? OP_X2 : OP_X3;
          pl.t[n].lsb = 6'(p - 2);
          d[p-2] = 0;
        end else begin
          pl.t[n].op  = OP_X1;
          pl.t[n].lsb = 6'(p);
        end
        pl.t[n].neg = (d[p] < 0);
        pl.t[n].top = 6'(p);
        n++;
      end
    end
    pl.n = 5'(n);
    if (n == 0) return pl;
    top_max  = int'(pl.t[0].top);
    m        = top_max - int'(pl.t[n-1].top);
    pl.shift = 6'(top_max);
    pl.span  = 6'(m);
    pl.n_msb = 5'(n);
    for (int i = 0; i < n; i++) begin
      pl.t[i].lsb_grp = (2 * (top_max - int'(pl.t[i].top)) > m);
      if (pl.t[i].lsb_grp && int'(pl.n_msb) == n) pl.n_msb = 5'(i);
    end
    pl.l_msb = pl.t[int'(pl.n_msb) - 1].lsb;
    pl.l_lsb = pl.t[n-1].lsb;
    return pl;
  endfunction

  // Width of an operand: x1 is WX bits, x2 and x3 are WX+3 bits.
  function automatic int op_width(op_e op, int wx);
    return (op == OP_X1) ? wx : wx + 3;
  endfunction

  // Shift of term i inside its own group (relative to the group's lowest weight).
  function automatic int term_shift(plan_t pl, int i);
    int base;
    base = pl.t[i].lsb_grp ? int'(pl.l_lsb) : int'(pl.l_msb);
    return int'(pl.t[i].lsb) - base;
  endfunction

  // 1 when term i opens its group (no adder in front of it).
  function automatic bit first_of_group(plan_t pl, int i);
    return (i == 0) || (i == int'(pl.n_msb));
  endfunction

  // Width of the partial sum after term i has been added in its group's chain.
  function automatic int stage_width(plan_t pl, int wx, int i);
    int w;
    int wo;
    w = 0;
    for (int k = 0; k <= i; k++) begin
      wo = op_width(pl.t[k].op, wx) + term_shift(pl, k);
      if (first_of_group(pl, k)) w = wo + (pl.t[k].neg ? 1 : 0);
      else                       w = ((w > wo) ? w : wo) + 1;
    end
    return w;
  endfunction

  // Width of the final adder that joins the MSB and LSB sub-coefficient sums
  // (0 when the LSB group is empty and no final adder exists).
  function automatic int comb_width(plan_t pl, int wx);
    int wm;
    int wl;
    if (pl.n_msb == pl.n || pl.n == 0) return 0;
    wm = stage_width(pl, wx, int'(pl.n_msb) - 1) + int'(pl.l_msb) - int'(pl.l_lsb);
    wl = stage_width(pl, wx, int'(pl.n) - 1);
    return ((wm > wl) ? wm : wl) + 1;
  endfunction

  // Number of two-operand adders a coefficient needs in its multiplier (the
  // shared subexpression adders not counted).
  function automatic int adder_count(plan_t pl);
    int a;
    a = 0;
    for (int i = 0; i < int'(pl.n); i++) begin
      if (!first_of_group(pl, i) || pl.t[i].neg) a++;
    end
    if (comb_width(pl, 8) != 0) a++;
    return a;
  endfunction

  // ---------------------------------------------------------------------------
  // Default coefficient set: Hamming-windowed sinc lowpass, cutoff fc (cycles per
  // sample), scaled for unity gain at DC and rounded to WC fractional bits.
  // Pure real arithmetic so that it can run during elaboration in any tool.
  // ---------------------------------------------------------------------------
  localparam real PI = 3.14159265358979323846;

  function automatic real sin_r(real x);
    real y;
    real t;
    real s;
    int  k;
    k = int'(x / (2.0 * PI));
    y = x - real'(k) * 2.0 * PI;
    t = y;
    s = y;
    for (int i = 1; i < 14; i++) begin
      t = -t * y * y / real'((2 * i) * (2 * i + 1));
      s = s + t;
    end
    return s;
  endfunction

  function automatic real cos_r(real x);
    return sin_r(x + PI / 2.0);
  endfunction

  // Unscaled windowed-sinc tap k of an n-tap filter.
  function automatic real proto_tap(int n, int k, real fc);
    real m;
    real a;
    real h;
    m = real'(k) - real'(n - 1) / 2.0;
    a = 2.0 * PI * fc * m;
    if (m == 0.0) h = 2.0 * fc;
    else          h = sin_r(a) / (PI * m);
    if (n > 1) h = h * (0.54 - 0.46 * cos_r(2.0 * PI * real'(k) / real'(n - 1)));
    return h;
  endfunction

  // Gain at DC of the unscaled prototype.
  function automatic real proto_dc_gain(int n, real fc);
    real g;
    g = 0.0;
    for (int k = 0; k < n; k++) g = g + proto_tap(n, k, fc);
    return g;
  endfunction

  // Quantised coefficient k: round(h_k / dc_gain * 2**wc).
  function automatic int lowpass_coef(int n, int k, int wc, real fc, real dc_gain);
    real v;
    v = proto_tap(n, k, fc) / dc_gain * (2.0 ** wc);
    return int'(v);
  endfunction

endpackage
