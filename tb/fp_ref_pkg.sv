// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// The reference computes in double precision (real), where the product of two
// single-precision numbers and the sum of two with exponents less than 29
// apart are exact, then rounds the double to single precision, nearest even.
// It follows the same conventions as the hardware: subnormal inputs read as
// zero, results below the normal range become signed zero, invalid operations
// give 0x7fc00000, and an exact cancellation gives +0.
package fp_ref_pkg;

  function automatic logic [31:0] round_to_single(real r);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [52:0] m53;
    logic [24:0] m;
    logic        g, st;
    b   = $realtobits(r);
    s   = b[63];
    if (b[62:52] == 11'd0) return {s, 31'd0};
    if (b[62:52] == 11'h7ff) return (b[51:0] == 0) ? {s, 8'hff, 23'd0} : 32'h7fc0_0000;
    e   = int'(b[62:52]) - 1023 + 127;
    m53 = {1'b1, b[51:0]};
    m   = {1'b0, m53[52:29]};
    g   = m53[28];
    st  = |m53[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic real to_real(logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic is_nan(logic [31:0] f);
    return (f[30:23] == 8'hff) && (f[22:0] != 0);
  endfunction

  function automatic logic is_inf(logic [31:0] f);
    return (f[30:23] == 8'hff) && (f[22:0] == 0);
  endfunction

  function automatic logic is_zero(logic [31:0] f);
    return f[30:23] == 8'd0;
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a)))
      return 32'h7fc0_0000;
    if (is_inf(a) || is_inf(b)) return {s, 8'hff, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    return round_to_single(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    real r;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && (a[31] != b[31])))
      return 32'h7fc0_0000;
    if (is_inf(a)) return {a[31], 8'hff, 23'd0};
    if (is_inf(b)) return {b[31], 8'hff, 23'd0};
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    r = to_real(a) + to_real(b);
    if (r == 0.0) return 32'd0;
    return round_to_single(r);
  endfunction

  // random normal number with exponent field in [emin, emax]
  function automatic logic [31:0] rand_float(int emin, int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom_range(0, emax - emin)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // random probability-like value in [2^-20, 1)
  function automatic logic [31:0] rand_prob();
    logic [31:0] f;
    f = rand_float(107, 126);
    f[31] = 1'b0;
    return f;
  endfunction

endpackage
