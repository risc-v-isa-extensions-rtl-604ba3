// fp16_mul: one IEEE 754 binary16 multiplier, the multiplier element of the
// Partial Sum Unit (the PSU holds VLEN of them, one per vector lane).
//
// How it works: the two 11-bit significands (hidden bit included) are
// multiplied into a 22-bit product, normalised by at most one position,
// rounded to nearest-even using a guard bit and a sticky bit, and the biased
// exponent ea + eb - 15 is checked for overflow (result +/-inf) and underflow.
// Subnormal inputs are read as zero and results below the smallest normal
// number are flushed to a signed zero (flush-to-zero); a NaN result is the
// canonical quiet NaN 16'h7e00. Infinity times zero gives NaN.
//
// Interface and timing: purely combinational, a, b -> p.
//
// The document names FP16 operands and the multipliers of the PSU; the
// rounding mode, the flush-to-zero treatment of subnormals and the NaN
// encoding are this implementation's choices.
module fp16_mul (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] p
);

  logic        sa, sb, sp;
  logic [4:0]  ea, eb;
  logic [9:0]  ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [21:0] prod, norm;
  logic [10:0] sig;
  logic [11:0] sig_r;
  logic        guard, sticky, round_up;
  logic signed [7:0] exp_n;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sp     = sa ^ sb;
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'h1f) && (ma == 10'd0);
    b_inf  = (eb == 5'h1f) && (mb == 10'd0);
    a_nan  = (ea == 5'h1f) && (ma != 10'd0);
    b_nan  = (eb == 5'h1f) && (mb != 10'd0);

    prod   = {1'b1, ma} * {1'b1, mb};
    norm   = prod[21] ? prod : {prod[20:0], 1'b0};
    exp_n  = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 8'sd15
           + (prod[21] ? 8'sd1 : 8'sd0);
    sig    = norm[21:11];
    guard  = norm[10];
    sticky = |norm[9:0];
    round_up = guard & (sticky | sig[0]);
    sig_r  = {1'b0, sig} + {11'd0, round_up};
    if (sig_r[11]) begin
      sig_r = sig_r >> 1;
      exp_n = exp_n + 8'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf))
      p = 16'h7e00;
    else if (a_inf || b_inf)
      p = {sp, 5'h1f, 10'd0};
    else if (a_zero || b_zero)
      p = {sp, 15'd0};
    else if (exp_n >= 8'sd31)
      p = {sp, 5'h1f, 10'd0};
    else if (exp_n <= 8'sd0)
      p = {sp, 15'd0};
    else
      p = {sp, exp_n[4:0], sig_r[9:0]};
  end

endmodule
