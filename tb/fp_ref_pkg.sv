// fp_ref_pkg: reference single-precision arithmetic for the testbenches,
// computed with the simulator's double-precision reals and rounded to
// float independently of the RTL operators.
//
// A float product is exact in double; a float sum rounded first to double
// and then to float is still correctly rounded, because double carries
// more than twice the float precision plus two bits. Rounding is to
// nearest, ties to even. As in the RTL, subnormal operands count as zero
// and results below the normal range are flushed to a signed zero.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] mant;
    logic        guard, sticky;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e      = int'(d[62:52]) - 1023 + 127;
    mant   = {2'b01, d[51:29]};
    guard  = d[28];
    sticky = |d[27:0];
    if (guard && (sticky || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), mant[22:0]};
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    real s;
    s = f2r(a) + f2r(b);
    // An exact cancellation of nonzero values is +0 in round-to-nearest.
    return r2f(s);
  endfunction

  // A random float with a random sign, exponent near 2^0 (+-span) and a
  // random fraction.
  function automatic logic [31:0] rand_f32(int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Coefficients of one mode in the exact (impulse-invariant) form of the
  // damped oscillator, sampled at fs: for frequency f_hz, 60 dB decay time
  // tau, input weight u_in and output weight u_out,
  //   c1 = 2 cos(wT) exp(-sT),  c2 = -exp(-2sT),
  //   c3 = T^2 exp(-sT) u_in,   w  = u_out,   s = 3 ln(10) / tau.
  function automatic logic [127:0] mode_coefs(real f_hz, real tau, real u_in,
                                              real u_out, real fs);
    real t, s, wt, c1, c2, c3;
    t  = 1.0 / fs;
    s  = 3.0 * $ln(10.0) / tau;
    wt = 2.0 * 3.14159265358979 * f_hz * t;
    c1 = 2.0 * $cos(wt) * $exp(-s * t);
    c2 = -$exp(-2.0 * s * t);
    c3 = t * t * $exp(-s * t) * u_in;
    return {r2f(c1), r2f(c2), r2f(c3), r2f(u_out)};
  endfunction

  // A random mode: 20 Hz to 20 kHz, decay 0.5 s to 8 s, weights in
  // [-1, 1], the input weight scaled by gain.
  function automatic logic [127:0] random_mode(real gain);
    real f, tau, ui, uo;
    f   = 20.0 + 19980.0 * (real'($urandom_range(1000000, 0)) / 1000000.0);
    tau = 0.5 + 7.5 * (real'($urandom_range(1000, 0)) / 1000.0);
    ui  = (real'($urandom_range(2000, 0)) / 1000.0) - 1.0;
    uo  = (real'($urandom_range(2000, 0)) / 1000.0) - 1.0;
    return mode_coefs(f, tau, gain * ui, uo, 48000.0);
  endfunction

  // Reference for one unrolled step: returns {uNext, new accumulator}.
  function automatic logic [63:0] step(logic [127:0] coef, logic [31:0] u,
                                       logic [31:0] up, logic [31:0] x,
                                       logic [31:0] acc);
    logic [31:0] un;
    un = fadd(fadd(fmul(coef[127:96], u), fmul(coef[95:64], up)),
              fmul(coef[63:32], x));
    return {un, fadd(acc, fmul(un, coef[31:0]))};
  endfunction

endpackage
