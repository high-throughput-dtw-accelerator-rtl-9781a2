// fp32_add: combinational IEEE-754 single-precision adder.
//
// Computes y = a + b, or a - b when `sub` is set (the sign of b is flipped).
// The larger-magnitude operand is kept, the smaller one is shifted right by
// the exponent difference with three extra bits (guard, round and a sticky
// bit that collects everything shifted further). The significands are then
// added or subtracted, the sum is normalised with a leading-zero count and
// rounded to nearest, ties to even.
//
// Simplifications of this design: subnormal inputs are read as zero and
// subnormal results are flushed to zero; every NaN result is the quiet NaN
// 0x7FC00000. Overflow gives a correctly signed infinity, Inf - Inf gives NaN.
// The DTW datapath only ever sees normal numbers, zero and +Inf.
//
// Timing: purely combinational; the instantiating units place the pipeline
// registers around it.
module fp32_add
  import dtw_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  fp32_t bb;
  logic  a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  // Operands after the swap: big has the larger magnitude.
  fp32_t big, sml;
  logic [7:0]  ediff;
  logic [26:0] m_big, m_sml, m_sml_sh;
  logic        sticky;
  logic [27:0] sum;
  logic        eff_sub;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [9:0] e_norm;
  logic [23:0] mant;
  logic        g, r, s, round_up;
  logic [24:0] mant_rnd;
  logic signed [9:0] e_fin;

  always_comb begin
    bb      = b;
    bb.sign = b.sign ^ sub;

    a_zero = (a.exp == 8'h00);
    b_zero = (bb.exp == 8'h00);
    a_inf  = (a.exp == 8'hFF) && (a.man == '0);
    b_inf  = (bb.exp == 8'hFF) && (bb.man == '0);
    a_nan  = (a.exp == 8'hFF) && (a.man != '0);
    b_nan  = (bb.exp == 8'hFF) && (bb.man != '0);

    if ({a.exp, a.man} >= {bb.exp, bb.man}) begin
      big = a;
      sml = bb;
    end else begin
      big = bb;
      sml = a;
    end

    ediff   = big.exp - sml.exp;
    m_big   = {1'b1, big.man, 3'b000};
    m_sml   = {1'b1, sml.man, 3'b000};
    eff_sub = big.sign ^ sml.sign;

    // Alignment shift with sticky collection.
    if (ediff >= 8'd27) begin
      m_sml_sh = 27'd0;
      sticky   = 1'b1;
    end else begin
      m_sml_sh = m_sml >> ediff;
      sticky   = |(m_sml & ((27'd1 << ediff) - 27'd1));
    end
    m_sml_sh[0] = m_sml_sh[0] | sticky;

    sum = eff_sub ? ({1'b0, m_big} - {1'b0, m_sml_sh})
                  : ({1'b0, m_big} + {1'b0, m_sml_sh});

    // Normalise: bit 26 is the hidden-one position.
    lz = 5'd0;
    for (int k = 26; k >= 0; k--) begin
      if (sum[k]) begin
        lz = 5'(26 - k);
        break;
      end
    end

    if (sum[27]) begin
      norm   = {sum[27:2], sum[1] | sum[0]};
      e_norm = $signed({2'b00, big.exp}) + 10'sd1;
    end else begin
      norm   = sum[26:0] << lz;
      e_norm = $signed({2'b00, big.exp}) - $signed({5'd0, lz});
    end

    // Round to nearest, ties to even.
    mant     = norm[26:3];
    g        = norm[2];
    r        = norm[1];
    s        = norm[0];
    round_up = g && (r || s || mant[0]);
    mant_rnd = {1'b0, mant} + {24'd0, round_up};
    e_fin    = e_norm;
    if (mant_rnd[24]) begin
      mant_rnd = mant_rnd >> 1;
      e_fin    = e_norm + 10'sd1;
    end

    // Result selection.
    if (a_nan || b_nan || (a_inf && b_inf && (a.sign != bb.sign))) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = a;
    end else if (b_inf) begin
      y = bb;
    end else if (a_zero && b_zero) begin
      y = FP_POS_ZERO;
      y.sign = a.sign & bb.sign;
    end else if (a_zero) begin
      y = bb;
    end else if (b_zero) begin
      y = a;
    end else if (sum == 28'd0) begin
      y = FP_POS_ZERO;
    end else if (e_fin >= 10'sd255) begin
      y = FP_POS_INF;
      y.sign = big.sign;
    end else if (e_fin <= 10'sd0) begin
      y = FP_POS_ZERO;
      y.sign = big.sign;
    end else begin
      y.sign = big.sign;
      y.exp  = e_fin[7:0];
      y.man  = mant_rnd[22:0];
    end
  end

endmodule
