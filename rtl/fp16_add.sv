// fp16_add: one IEEE 754 binary16 adder, the adder element of the Merge Unit
// (the MU holds VLEN of them, one per vector lane).
//
// How it works: the operands are ordered by magnitude, the smaller
// significand is aligned to the larger one with 14 extra low bits plus a
// sticky bit, the two are added or subtracted, a leading-one search
// normalises the sum, and the result is rounded to nearest-even. Subnormal
// inputs are read as zero and results below the smallest normal number are
// flushed to a signed zero; overflow gives +/-inf, a NaN result is the
// canonical quiet NaN 16'h7e00, and inf - inf is NaN. An exact zero sum is
// +0 unless both operands are -0.
//
// Interface and timing: purely combinational, a, b -> s.
//
// The document names FP16 data and the adders of the MU; the rounding mode,
// flush-to-zero and the NaN encoding are this implementation's choices.
module fp16_add (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s
);

  logic        sa, sb, sx, sy;
  logic [4:0]  ea, eb, ex, ey;
  logic [9:0]  ma, mb, mx, my;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [4:0]  d;
  logic [24:0] xs, ys_full, ys;
  logic        ys_sticky;
  logic [25:0] sum, norm;
  int          lead;
  logic [10:0] sig;
  logic [11:0] sig_r;
  logic        guard, sticky, round_up;
  logic signed [7:0] exp_n;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'h1f) && (ma == 10'd0);
    b_inf  = (eb == 5'h1f) && (mb == 10'd0);
    a_nan  = (ea == 5'h1f) && (ma != 10'd0);
    b_nan  = (eb == 5'h1f) && (mb != 10'd0);

    // x is the operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      {sx, ex, mx} = a; {sy, ey, my} = b;
    end else begin
      {sx, ex, mx} = b; {sy, ey, my} = a;
    end
    d       = ex - ey;
    xs      = {1'b1, mx, 14'd0};
    ys_full = {1'b1, my, 14'd0};
    if (d >= 5'd25) begin
      ys        = 25'd0;
      ys_sticky = 1'b1;
    end else begin
      ys        = ys_full >> d;
      ys_sticky = |(ys_full & ((25'd1 << d) - 25'd1));
    end
    ys[0] = ys[0] | ys_sticky;

    if (sx == sy) sum = {1'b0, xs} + {1'b0, ys};
    else          sum = {1'b0, xs} - {1'b0, ys};

    lead = 0;
    for (int i = 0; i < 26; i++)
      if (sum[i]) lead = i;
    norm  = sum << (25 - lead);
    exp_n = $signed({3'b000, ex}) + 8'(lead) - 8'sd24;
    sig    = norm[25:15];
    guard  = norm[14];
    sticky = |norm[13:0];
    round_up = guard & (sticky | sig[0]);
    sig_r  = {1'b0, sig} + {11'd0, round_up};
    if (sig_r[11]) begin
      sig_r = sig_r >> 1;
      exp_n = exp_n + 8'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      s = 16'h7e00;
    else if (a_inf)
      s = {sa, 5'h1f, 10'd0};
    else if (b_inf)
      s = {sb, 5'h1f, 10'd0};
    else if (a_zero && b_zero)
      s = {sa & sb, 15'd0};
    else if (b_zero)
      s = a;
    else if (a_zero)
      s = b;
    else if (sum == 26'd0)
      s = 16'h0000;
    else if (exp_n >= 8'sd31)
      s = {sx, 5'h1f, 10'd0};
    else if (exp_n <= 8'sd0)
      s = {sx, 15'd0};
    else
      s = {sx, exp_n[4:0], sig_r[9:0]};
  end

endmodule
