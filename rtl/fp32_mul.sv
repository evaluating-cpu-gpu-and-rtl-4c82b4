// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// The product of the two 24-bit significands (hidden bit included) is
// formed exactly in 48 bits, normalised by at most one place and rounded to
// nearest, ties to even. The processor keeps its arithmetic in float, as
// the design it follows does; the exact operator is this design's own
// choice, since the original was produced by a high-level synthesis tool.
// Simplifications, chosen here: subnormal inputs count as zero and results
// that would be subnormal are flushed to a signed zero (after rounding with
// an unbounded exponent); an exponent overflow gives infinity; NaN inputs
// are not told apart from infinity. Audio signals of a decaying resonator
// stay far from both ends of the float range.
//
// Interface: a, b -> y, purely combinational (no clock).
module fp32_mul
  import modal_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sign;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, rnd;
  logic [24:0] mant_r;
  logic signed [10:0] exp;

  always_comb begin
    sign   = a[31] ^ b[31];
    ea     = a[30:23];
    eb     = b[30:23];
    prod   = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp    = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp    = exp + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 11'sd1;
    end

    if (ea == 8'd0 || eb == 8'd0) begin
      y = {sign, 31'd0};
    end else if (ea == 8'hFF || eb == 8'hFF || exp >= 11'sd255) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (exp <= 11'sd0) begin
      y = {sign, 31'd0};
    end else begin
      y = {sign, exp[7:0], mant_r[22:0]};
    end
  end

endmodule
