// tb_fp16_ref_pkg: reference FP16 arithmetic for the testbenches, written
// independently of the RTL. Operands are converted to real (the product or
// sum of two binary16 numbers is exact in double precision), and the exact
// result is rounded to binary16 with round-to-nearest-even. The same
// flush-to-zero convention as the RTL is applied: subnormal inputs read as
// zero, results below 2^-14 after rounding become a signed zero.
package tb_fp16_ref_pkg;

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_nan(input logic [15:0] h);
    return (h[14:10] == 5'h1f) && (h[9:0] != 0);
  endfunction
  function automatic bit is_inf(input logic [15:0] h);
    return (h[14:10] == 5'h1f) && (h[9:0] == 0);
  endfunction
  function automatic bit is_zero(input logic [15:0] h);
    return h[14:10] == 5'd0;
  endfunction

  function automatic real to_real(input logic [15:0] h);
    real m;
    if (is_zero(h)) return 0.0;
    m = (1024.0 + real'(h[9:0])) * pow2(int'(h[14:10]) - 25);
    return h[15] ? -m : m;
  endfunction

  // Round a nonzero real to binary16 (RNE, flush-to-zero, overflow to inf).
  function automatic logic [15:0] from_real(input real x);
    bit  s = (x < 0.0);
    real ax = s ? -x : x;
    int  e = 0;
    real sig, fr;
    longint r;
    while (ax >= pow2(e + 1)) e++;
    while (ax < pow2(e)) e--;
    sig = ax / pow2(e - 10);          // in [1024, 2048)
    r   = longint'($floor(sig));
    fr  = sig - real'(r);
    if (fr > 0.5 || (fr == 0.5 && r[0])) r++;
    if (r == 2048) begin r = 1024; e++; end
    if (e + 15 >= 31) return {s, 5'h1f, 10'd0};
    if (e + 15 <= 0)  return {s, 15'd0};
    return {s, 5'(e + 15), r[9:0]};
  endfunction

  function automatic logic [15:0] mul(input logic [15:0] a, input logic [15:0] b);
    bit sp = a[15] ^ b[15];
    if (is_nan(a) || is_nan(b)) return 16'h7e00;
    if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) return 16'h7e00;
    if (is_inf(a) || is_inf(b)) return {sp, 5'h1f, 10'd0};
    if (is_zero(a) || is_zero(b)) return {sp, 15'd0};
    return from_real(to_real(a) * to_real(b));
  endfunction

  function automatic logic [15:0] add(input logic [15:0] a, input logic [15:0] b);
    real r;
    if (is_nan(a) || is_nan(b)) return 16'h7e00;
    if (is_inf(a) && is_inf(b)) return (a[15] == b[15]) ? a : 16'h7e00;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[15] & b[15], 15'd0};
    if (is_zero(b)) return a;
    if (is_zero(a)) return b;
    r = to_real(a) + to_real(b);
    if (r == 0.0) return 16'h0000;
    return from_real(r);
  endfunction

  // Random FP16 value with a bias towards moderate exponents and specials.
  function automatic logic [15:0] rand_h();
    int k = $urandom_range(0, 99);
    logic [15:0] h = 16'($urandom);
    if (k < 3)  return {h[15], 5'h1f, 10'd0};         // inf
    if (k < 5)  return {h[15], 5'h1f, h[9:0] | 10'd1}; // NaN
    if (k < 8)  return {h[15], 15'd0};                 // zero
    if (k < 10) return {h[15], 5'd0, h[9:0]};          // subnormal
    if (k < 60) return {h[15], 5'($urandom_range(10, 20)), h[9:0]};
    return h;
  endfunction

endpackage
