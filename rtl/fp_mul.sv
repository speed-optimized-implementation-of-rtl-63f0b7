// Single-precision (IEEE-754 binary32) floating-point multiplier, 2-stage pipeline.
//
// Stage 1 unpacks both operands, multiplies the 24-bit significands (hidden one
// included) into a 48-bit product and adds the exponents. Stage 2 normalises the
// product (it lies in [1,4)), rounds to nearest with ties to even and packs the
// result. Subnormal operands are read as zero and subnormal results are flushed
// to zero; infinities and NaNs are propagated (a NaN result is the quiet NaN
// 0x7FC00000). The accelerator's arithmetic is single-precision floating point
// as in the design it implements; pipelining, rounding and the flush-to-zero
// treatment are this implementation's choices.
//
// Interface: y = a*b appears FP_MUL_LAT (2) clock cycles after a and b are
// presented. The unit accepts a new operand pair every cycle and has no reset;
// the caller tracks validity.
module fp_mul
  import chirplet_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  localparam fp32_t QNAN = 32'h7FC0_0000;

  // ---------------- stage 1: unpack and multiply significands
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod_c;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    prod_c = {1'b1, a[22:0]} * {1'b1, b[22:0]};
  end

  logic              s1_sign, s1_zero, s1_inf, s1_nan;
  logic signed [9:0] s1_exp;
  logic [47:0]       s1_prod;

  always_ff @(posedge clk) begin
    s1_sign <= a[31] ^ b[31];
    s1_nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    s1_inf  <= a_inf || b_inf;
    s1_zero <= a_zero || b_zero;
    s1_exp  <= $signed({2'b00, a[30:23]}) + $signed({2'b00, b[30:23]}) - 10'sd127;
    s1_prod <= prod_c;
  end

  // ---------------- stage 2: normalise, round, pack
  logic [22:0]       frac;
  logic              guard, sticky, round_up;
  logic [23:0]       frac_r;
  logic signed [9:0] exp_n;
  fp32_t             y_c;

  always_comb begin
    if (s1_prod[47]) begin
      frac   = s1_prod[46:24];
      guard  = s1_prod[23];
      sticky = |s1_prod[22:0];
      exp_n  = s1_exp + 10'sd1;
    end else begin
      frac   = s1_prod[45:23];
      guard  = s1_prod[22];
      sticky = |s1_prod[21:0];
      exp_n  = s1_exp;
    end
    round_up = guard && (sticky || frac[0]);
    frac_r   = {1'b0, frac} + {23'd0, round_up};
    if (frac_r[23]) exp_n = exp_n + 10'sd1;   // rounding carried into the hidden bit

    if (s1_nan)                 y_c = QNAN;
    else if (s1_inf)            y_c = {s1_sign, 8'hFF, 23'd0};
    else if (s1_zero)           y_c = {s1_sign, 31'd0};
    else if (exp_n >= 10'sd255) y_c = {s1_sign, 8'hFF, 23'd0};
    else if (exp_n <= 10'sd0)   y_c = {s1_sign, 31'd0};
    else                        y_c = {s1_sign, exp_n[7:0], frac_r[22:0]};
  end

  always_ff @(posedge clk) y <= y_c;

endmodule
