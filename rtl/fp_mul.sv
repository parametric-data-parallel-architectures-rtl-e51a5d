// fp_mul: combinational IEEE-754 binary32 multiplier.
//
// First floating-point execute stage of a vector lane. The 24x24-bit
// significand product (in [1,4)) is normalised by at most one position,
// rounded to nearest-even with guard and sticky bits, and the exponent is
// adjusted; a carry out of rounding renormalises. Subnormal inputs count as
// zero and results below the normal range flush to signed zero (the design's
// choice; the rounding and subnormal policies are not specified for the
// accelerator). Overflow gives infinity; NaN or inf*0 gives the quiet NaN
// 0x7FC00000. Purely combinational: the lane registers around it.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  import vcop_pkg::*;

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [23:0] mant;         // normalised significand before rounding
  logic        guard, sticky, rnd_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_u; // unbiased+bias, wide for range checks

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (fa == '0); ib = (eb == 8'hFF) && (fb == '0);
    na = (ea == 8'hFF) && (fa != '0); nb = (eb == 8'hFF) && (fb != '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_u = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_u  = exp_u + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd_up = guard && (sticky || mant[0]);
    mant_r = {1'b0, mant} + {24'd0, rnd_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_u  = exp_u + 11'sd1;
    end

    if (na || nb || (ia && zb) || (ib && za))
      y = FP_QNAN;
    else if (ia || ib)
      y = {sy, 8'hFF, 23'd0};
    else if (za || zb)
      y = {sy, 31'd0};
    else if (exp_u >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (exp_u <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_u[7:0], mant_r[22:0]};
  end
endmodule
