// Single-precision (IEEE-754 binary32) floating-point adder, 2-stage pipeline.
//
// Stage 1 unpacks the operands, orders them by magnitude, aligns the smaller
// significand to the larger one with guard, round and sticky bits, and adds or
// subtracts the aligned significands. Stage 2 counts leading zeros, normalises,
// rounds to nearest with ties to even and packs the result. Subnormal operands
// are read as zero and subnormal results are flushed to zero; infinities and
// NaNs are propagated (quiet NaN 0x7FC00000, also for inf + -inf). An exact
// zero sum is +0 unless both operands are -0. Floating-point addition is what
// the accelerator's arithmetic uses; the pipeline split, rounding and
// flush-to-zero choice belong to this implementation.
//
// Interface: y = a+b appears FP_ADD_LAT (2) clock cycles after a and b are
// presented; a new operand pair every cycle; no reset, the caller tracks
// validity.
module fp_add
  import chirplet_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  localparam fp32_t QNAN = 32'h7FC0_0000;

  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    logic       found;
    n = 5'd27;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found && v[i]) begin
        n = 5'(26 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  // ---------------- stage 1: order, align, add
  logic        a_inf, b_inf, a_nan, b_nan, swap;
  fp32_t       op_big, op_sml;
  logic [23:0] m_big, m_small;
  logic [7:0]  diff;
  logic [26:0] small_ext, small_sh;
  logic        sh_sticky;
  logic [27:0] sum_c;
  logic        sub;

  always_comb begin
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);

    swap  = (b[30:0] > a[30:0]);
    op_big   = swap ? b : a;
    op_sml = swap ? a : b;
    m_big   = (op_big[30:23]   == 8'd0) ? 24'd0 : {1'b1, op_big[22:0]};
    m_small = (op_sml[30:23] == 8'd0) ? 24'd0 : {1'b1, op_sml[22:0]};
    diff    = op_big[30:23] - op_sml[30:23];

    small_ext = {m_small, 3'b000};
    if (diff >= 8'd27) begin
      small_sh  = 27'd0;
      sh_sticky = |m_small;
    end else begin
      small_sh  = small_ext >> diff;
      sh_sticky = |(small_ext & ((27'd1 << diff) - 27'd1));
    end
    small_sh[0] = small_sh[0] | sh_sticky;

    sub   = op_big[31] ^ op_sml[31];
    sum_c = sub ? ({1'b0, m_big, 3'b000} - {1'b0, small_sh})
                : ({1'b0, m_big, 3'b000} + {1'b0, small_sh});
  end

  logic        s1_sign, s1_nan, s1_inf, s1_inf_sign, s1_zero_sign;
  logic [7:0]  s1_exp;
  logic [27:0] s1_sum;

  always_ff @(posedge clk) begin
    s1_nan       <= a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]));
    s1_inf       <= a_inf || b_inf;
    s1_inf_sign  <= a_inf ? a[31] : b[31];
    s1_zero_sign <= a[31] && b[31];
    s1_sign      <= op_big[31];
    s1_exp       <= op_big[30:23];
    s1_sum       <= sum_c;
  end

  // ---------------- stage 2: normalise, round, pack
  logic [4:0]        lz;
  logic [26:0]       norm;
  logic signed [9:0] exp_n;
  logic [22:0]       mant_r;
  logic              guard, sticky, round_up;
  fp32_t             y_c;

  always_comb begin
    lz = lzc27(s1_sum[26:0]);
    if (s1_sum[27]) begin
      norm  = {s1_sum[27:2], s1_sum[1] | s1_sum[0]};
      exp_n = $signed({2'b00, s1_exp}) + 10'sd1;
    end else begin
      norm  = s1_sum[26:0] << lz;
      exp_n = $signed({2'b00, s1_exp}) - $signed({5'd0, lz});
    end
    guard    = norm[2];
    sticky   = |norm[1:0];
    round_up = guard && (sticky || norm[3]);
    mant_r   = norm[25:3] + {22'd0, round_up};
    if (round_up && (norm[26:3] == 24'hFF_FFFF)) begin
      mant_r = 23'd0;
      exp_n  = exp_n + 10'sd1;
    end

    if (s1_nan)                 y_c = QNAN;
    else if (s1_inf)            y_c = {s1_inf_sign, 8'hFF, 23'd0};
    else if (s1_sum == 28'd0)   y_c = {s1_zero_sign, 31'd0};
    else if (exp_n >= 10'sd255) y_c = {s1_sign, 8'hFF, 23'd0};
    else if (exp_n <= 10'sd0)   y_c = {s1_sign, 31'd0};
    else                        y_c = {s1_sign, exp_n[7:0], mant_r};
  end

  always_ff @(posedge clk) y <= y_c;

endmodule
