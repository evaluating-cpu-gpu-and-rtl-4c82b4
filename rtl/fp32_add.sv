// fp32_add: combinational IEEE-754 single-precision adder.
//
// The operand of larger magnitude is taken as the reference; the other
// significand is shifted right to its exponent, keeping a guard, a round
// and a sticky bit. The sum or difference is renormalised (one place right
// after a carry, or left by the leading-zero count after a cancellation)
// and rounded to nearest, ties to even. Three extra bits are enough for a
// correctly rounded result: a cancellation of more than one place only
// happens when the exponents differ by at most one, and then nothing has
// been shifted out.
// Simplifications, chosen here as in fp32_mul: subnormals count as zero
// and subnormal results are flushed to zero; overflow gives infinity; NaN
// is not produced. An exact cancellation gives +0; (-0) + (-0) gives -0.
// Float arithmetic follows the design this processor reproduces; the
// operator itself is this design's own.
//
// Interface: a, b -> y, purely combinational (no clock).
module fp32_add
  import modal_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        a_zero, b_zero, swap;
  fp32_t       op_hi, op_lo;
  logic [7:0]  eb_big, eb_small, d;
  logic [26:0] m_big, m_small, m_shift;
  logic        sticky_sh;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic signed [10:0] exp;
  logic        sub, sign;
  logic [24:0] mant_r;
  logic        guard, sticky, rnd;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    swap   = (b[30:0] > a[30:0]);
    op_hi    = swap ? b : a;
    op_lo  = swap ? a : b;
    eb_big   = op_hi[30:23];
    eb_small = op_lo[30:23];
    d        = eb_big - eb_small;
    m_big    = {1'b1, op_hi[22:0], 3'b000};
    m_small  = {1'b1, op_lo[22:0], 3'b000};
    sub      = op_hi[31] ^ op_lo[31];
    sign     = op_hi[31];

    // Align the smaller operand, folding the bits shifted out into the
    // sticky (least significant) bit.
    if (d >= 8'd27) begin
      m_shift   = 27'd1;
      sticky_sh = 1'b1;
    end else begin
      m_shift   = m_small >> d;
      sticky_sh = 1'b0;
      for (int i = 0; i < 27; i++) begin
        if (i < int'(d) && m_small[i]) sticky_sh = 1'b1;
      end
      m_shift[0] = m_shift[0] | sticky_sh;
    end

    exp  = $signed({3'b000, eb_big});
    norm = '0;
    lz   = '0;
    if (sub) begin
      sum = {1'b0, m_big} - {1'b0, m_shift};
      // Leading-zero count of the 27-bit difference.
      found = 1'b0;
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm = sum[26:0] << lz;
      exp  = exp - $signed({6'd0, lz});
    end else begin
      sum = {1'b0, m_big} + {1'b0, m_shift};
      found = 1'b1;
      if (sum[27]) begin
        norm = {sum[27:2], sum[1] | sum[0]};
        exp  = exp + 11'sd1;
      end else begin
        norm = sum[26:0];
      end
    end

    guard  = norm[2];
    sticky = norm[1] | norm[0];
    rnd    = guard & (sticky | norm[3]);
    mant_r = {1'b0, norm[26:3]} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 11'sd1;
    end

    if (a_zero && b_zero) begin
      y = {a[31] & b[31], 31'd0};
    end else if (b_zero) begin
      y = a;
    end else if (a_zero) begin
      y = b;
    end else if (eb_big == 8'hFF) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (sub && !found) begin
      y = FP32_ZERO;
    end else if (exp >= 11'sd255) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (exp <= 11'sd0) begin
      y = {sign, 31'd0};
    end else begin
      y = {sign, exp[7:0], mant_r[22:0]};
    end
  end

endmodule
