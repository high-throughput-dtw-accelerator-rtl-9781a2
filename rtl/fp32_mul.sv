// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// Multiplies the two 24-bit significands (hidden one included) into a
// 48-bit product, normalises by at most one position, and rounds to nearest,
// ties to even. The exponent is the sum of the biased exponents less the bias.
//
// Simplifications of this design, as in fp32_add: subnormal inputs are read
// as zero, subnormal results are flushed to zero, every NaN result is the
// quiet NaN 0x7FC00000 (Inf * 0 included). In the distance unit both inputs
// are the same difference, so the product is a square and never negative.
//
// Timing: purely combinational.
module fp32_mul
  import dtw_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic sgn;
  logic [47:0] prod;
  logic [23:0] mant;
  logic g, s, round_up;
  logic [24:0] mant_rnd;
  logic signed [10:0] e_sum;

  always_comb begin
    a_zero = (a.exp == 8'h00);
    b_zero = (b.exp == 8'h00);
    a_inf  = (a.exp == 8'hFF) && (a.man == '0);
    b_inf  = (b.exp == 8'hFF) && (b.man == '0);
    a_nan  = (a.exp == 8'hFF) && (a.man != '0);
    b_nan  = (b.exp == 8'hFF) && (b.man != '0);
    sgn    = a.sign ^ b.sign;

    prod  = {24'd0, 1'b1, a.man} * {24'd0, 1'b1, b.man};
    e_sum = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 11'sd127;

    if (prod[47]) begin
      mant  = prod[47:24];
      g     = prod[23];
      s     = |prod[22:0];
      e_sum = e_sum + 11'sd1;
    end else begin
      mant  = prod[46:23];
      g     = prod[22];
      s     = |prod[21:0];
    end
    round_up = g && (s || mant[0]);
    mant_rnd = {1'b0, mant} + {24'd0, round_up};
    if (mant_rnd[24]) begin
      mant_rnd = mant_rnd >> 1;
      e_sum    = e_sum + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
    end else if (a_inf || b_inf) begin
      y = FP_POS_INF;
      y.sign = sgn;
    end else if (a_zero || b_zero) begin
      y = FP_POS_ZERO;
      y.sign = sgn;
    end else if (e_sum >= 11'sd255) begin
      y = FP_POS_INF;
      y.sign = sgn;
    end else if (e_sum <= 11'sd0) begin
      y = FP_POS_ZERO;
      y.sign = sgn;
    end else begin
      y.sign = sgn;
      y.exp  = e_sum[7:0];
      y.man  = mant_rnd[22:0];
    end
  end

endmodule
