// fp_mul: combinational IEEE-754 single-precision multiplier, p = a * b.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. Subnormal inputs are read as zero and
// results below the smallest normal number are flushed to a signed zero.
// Results above the largest finite number become infinity; a NaN input, or
// zero times infinity, gives the quiet NaN 7fc00000.
// The document only says the processing element performs "floating point
// operations"; the single-precision format, flushing of subnormals and the
// purely combinational form are choices of this design.
module fp_mul
  import solver_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);
  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, rnd;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    sa = a[31]; sb = b[31]; sp = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    a_zero = (ea == 8'd0); b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (ea == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 23'd0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    prod = ma * mb;
    exp_s = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd    = guard && (sticky || mant[0]);
    mant_r = {1'b0, mant} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      p = 32'h7fc0_0000;
    else if (a_inf || b_inf)
      p = {sp, 8'hff, 23'd0};
    else if (a_zero || b_zero || exp_s <= 11'sd0)
      p = {sp, 31'd0};
    else if (exp_s >= 11'sd255)
      p = {sp, 8'hff, 23'd0};
    else
      p = {sp, exp_s[7:0], mant_r[22:0]};
  end
endmodule
