// fp_add: combinational IEEE-754 binary32 adder/subtractor.
//
// Second floating-point execute stage of a vector lane. Operands are
// ordered by magnitude, the smaller significand is shifted right into a
// 27-bit field (hidden bit, 23 fraction bits, guard, round and a sticky bit
// that ORs everything shifted further out), the two are added or
// subtracted, the sum is normalised (one right shift on carry, or a left
// shift by the leading-zero count) and rounded to nearest-even. Subnormal
// inputs count as zero and results below the normal range flush to zero;
// both are this design's choice. Overflow gives infinity, inf-inf and NaN
// inputs give the quiet NaN 0x7FC00000. An exact zero sum is +0 unless both
// addends are -0. `sub` selects a-b.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  import vcop_pkg::*;

  logic        sa, sb, sx, sy_s;
  logic [7:0]  ea, eb, ex, ey;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic        swap;
  logic [26:0] mx, my, my_sh;
  logic [7:0]  d;
  logic [27:0] sum;
  logic [26:0] nrm;
  logic [4:0]  lz;
  logic signed [10:0] e_r;
  logic        rnd_up;
  logic [24:0] mant_r;
  logic        found;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31] ^ sub; eb = b[30:23]; fb = b[22:0];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (fa == '0); ib = (eb == 8'hFF) && (fb == '0);
    na = (ea == 8'hFF) && (fa != '0); nb = (eb == 8'hFF) && (fb != '0);

    // Larger magnitude first.
    swap = {eb, fb} > {ea, fa};
    sx   = swap ? sb : sa;
    ex   = swap ? eb : ea;
    ey   = swap ? ea : eb;
    mx   = swap ? {1'b1, fb, 3'b000} : {1'b1, fa, 3'b000};
    my   = swap ? {1'b1, fa, 3'b000} : {1'b1, fb, 3'b000};
    d    = ex - ey;

    // Alignment with sticky.
    if (d >= 8'd27) begin
      my_sh = 27'd1;                       // only the sticky bit survives
    end else begin
      my_sh = my >> d;
      if ((my & ((27'd1 << d) - 27'd1)) != 27'd0) my_sh[0] = 1'b1;
    end

    if (sa == sb) sum = {1'b0, mx} + {1'b0, my_sh};
    else          sum = {1'b0, mx} - {1'b0, my_sh};

    // Normalise.
    e_r = $signed({3'b000, ex});
    lz  = '0;
    found = 1'b0;
    nrm = '0;
    if (sum[27]) begin
      nrm = sum[27:1];
      nrm[0] = sum[1] | sum[0];
      e_r = e_r + 11'sd1;
    end else begin
      found = 1'b0;
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      nrm = sum[26:0] << lz;
      e_r = e_r - $signed({6'd0, lz});
    end

    // Round to nearest even: [26:3] significand, [2] guard, [1:0] round/sticky.
    rnd_up = nrm[2] && ((|nrm[1:0]) || nrm[3]);
    mant_r = {1'b0, nrm[26:3]} + {24'd0, rnd_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_r    = e_r + 11'sd1;
    end

    sy_s = sx;
    if (na || nb || (ia && ib && (sa != sb)))
      y = FP_QNAN;
    else if (ia)
      y = {sa, 8'hFF, 23'd0};
    else if (ib)
      y = {sb, 8'hFF, 23'd0};
    else if (za && zb)
      y = {sa & sb, 31'd0};
    else if (za)
      y = {sb, eb, fb};
    else if (zb)
      y = a;
    else if (sum == 28'd0)
      y = 32'd0;
    else if (e_r >= 11'sd255)
      y = {sy_s, 8'hFF, 23'd0};
    else if (e_r <= 11'sd0)
      y = {sy_s, 31'd0};
    else
      y = {sy_s, e_r[7:0], mant_r[22:0]};
  end
endmodule
