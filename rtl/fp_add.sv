// fp_add: combinational IEEE-754 single-precision adder/subtractor.
//
// s = a + b, or a - b when sub is 1. The operand of larger magnitude is
// aligned first; the smaller significand is shifted right with guard, round
// and sticky bits kept, the significands are added or subtracted, the result
// is normalised with a leading-zero count and rounded to nearest, ties to
// even. Subnormal inputs are read as zero and subnormal results are flushed
// to zero. An exact cancellation gives +0. Infinities and NaNs follow
// IEEE-754 (inf - inf is the quiet NaN 7fc00000).
// The document only names "floating point operations"; the format and the
// combinational form are this design's choice.
module fp_add
  import solver_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t s
);
  logic        sa, sb, sbig, ssml;
  logic [7:0]  ea, eb, ebig, esml;
  logic [22:0] fa, fb;
  logic [26:0] mbig, msml, msh;
  logic [7:0]  d;
  logic        stk;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [9:0] exp_s;
  logic        rnd;
  logic [24:0] mant_r;
  logic        a_inf, b_inf, a_nan, b_nan, swap;

  always_comb begin
    sa = a[31]; sb = b[31] ^ sub;
    ea = a[30:23]; eb = b[30:23];
    fa = a[22:0];  fb = b[22:0];
    a_nan = (ea == 8'hff) && (fa != 23'd0);
    b_nan = (eb == 8'hff) && (fb != 23'd0);
    a_inf = (ea == 8'hff) && (fa == 23'd0);
    b_inf = (eb == 8'hff) && (fb == 23'd0);
    swap = {eb, fb} > {ea, fa};
    if (swap) begin
      sbig = sb; ebig = eb; mbig = (eb == 0) ? 27'd0 : {1'b1, fb, 3'b000};
      ssml = sa; esml = ea; msml = (ea == 0) ? 27'd0 : {1'b1, fa, 3'b000};
    end else begin
      sbig = sa; ebig = ea; mbig = (ea == 0) ? 27'd0 : {1'b1, fa, 3'b000};
      ssml = sb; esml = eb; msml = (eb == 0) ? 27'd0 : {1'b1, fb, 3'b000};
    end
    d = ebig - esml;
    if (d >= 8'd27) begin
      msh = 27'd0;
      stk = (msml != 27'd0);
    end else begin
      msh = msml >> d;
      stk = ((msh << d) != msml);
    end
    msh[0] = msh[0] | stk;
    if (sbig == ssml) sum = {1'b0, mbig} + {1'b0, msh};
    else              sum = {1'b0, mbig} - {1'b0, msh};
    exp_s = $signed({2'b00, ebig});
    lz = 5'd0;
    norm = sum[26:0];
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      norm  = sum[26:0] << lz;
      exp_s = exp_s - $signed({5'd0, lz});
    end
    rnd    = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r = {1'b0, norm[26:3]} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 10'sd1;
    end
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      s = 32'h7fc0_0000;
    else if (a_inf)
      s = {sa, 8'hff, 23'd0};
    else if (b_inf)
      s = {sb, 8'hff, 23'd0};
    else if (sum == 28'd0)
      s = 32'd0;
    else if (exp_s <= 10'sd0)
      s = {sbig, 31'd0};
    else if (exp_s >= 10'sd255)
      s = {sbig, 8'hff, 23'd0};
    else
      s = {sbig, exp_s[7:0], mant_r[22:0]};
  end
endmodule
