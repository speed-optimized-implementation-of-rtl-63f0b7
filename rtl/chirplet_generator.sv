// One pipelined chirplet generator: one complex sample per clock.
//
// For sample index n = group*NUM_GEN + LANE it computes
//   dt  = n*tstep - tau
//   u   = alpha1*dt^2                      (Gaussian argument)
//   p   = phi + fc*dt + alpha2*dt^2        (phase in cycles)
//   out = beta * exp(-u) * (cos(2*pi*p) + j*sin(2*pi*p))
// The arguments are built with single-precision floating-point multipliers and
// adders; the two exponentials are then approximated by table look-up: exp(-u)
// from a 65536-entry Gaussian table and cos/sin from a 65536-entry one-period
// sine table read at two addresses. beta is converted once to fixed point and
// the envelope, the amplitude and the cos/sin values are multiplied in fixed
// point. The output is Q1.15 real and imaginary parts, rounded and saturated.
//
// Pipeline (cycle numbers after the index enters):
//   0-2  t = n*tstep            (index converted to float exactly)
//   2-4  dt = t - tau
//   4-6  dt^2, fc*dt
//   6-8  alpha1*dt^2, alpha2*dt^2, phi+fc*dt
//   8-10 p = (phi+fc*dt) + alpha2*dt^2;  envelope: table address (9),
//        exp(-u) (10), beta*exp(-u) (11), aligned (12)
//   10-12 sine-table address (11), sin/cos (12)
//   13   output register
// so the latency is GEN_LAT = 13 cycles, and one more cycle for the sequencer
// register in front gives the 14 cycles from valid input pulse to first output
// that the implemented design reports. Throughput is one sample per clock.
//
// Follows the design: the split into Gaussian and chirp factors, floating-point
// argument generation, table look-up with 65536 entries, the sine table for
// both components, 16+16-bit complex samples and the 14-cycle latency. This
// implementation's choices: the envelope is exp(-alpha1*dt^2) with alpha1 > 0,
// phi is in cycles, the Gaussian table spans u in [0,16), the time of each
// sample is formed as n*tstep from the integer index, and the stage split above.
//
// The parameters must be held stable while samples are in flight. in_lane_ok
// travels with the sample so a partly filled last group can be marked.
module chirplet_generator
  import chirplet_pkg::*;
#(
  parameter int unsigned LANE       = 0,
  parameter int unsigned NUM_GEN    = 8,
  parameter int unsigned GROUP_W    = 13,  // group index width; GROUP_W+log2(NUM_GEN) <= 24
  parameter int unsigned LUT_ADDR_W = 16,
  parameter int unsigned EXP_U_FRAC = 12   // Gaussian table step is 2^-EXP_U_FRAC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  chirplet_params_t   params,
  input  logic               in_valid,
  input  logic [GROUP_W-1:0] in_group,
  input  logic               in_lane_ok,
  input  logic               in_last,
  output logic               out_valid,
  output logic               out_lane_ok,
  output logic               out_last,
  output cplx16_t            out_sample
);

  localparam int unsigned IDX_W = 24;

  // ---------------- control pipeline
  logic [GEN_LAT-1:0] vld_sr, ok_sr, last_sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_sr  <= '0;
      ok_sr   <= '0;
      last_sr <= '0;
    end else begin
      vld_sr  <= {vld_sr[GEN_LAT-2:0],  in_valid};
      ok_sr   <= {ok_sr[GEN_LAT-2:0],   in_lane_ok};
      last_sr <= {last_sr[GEN_LAT-2:0], in_last};
    end
  end

  assign out_valid   = vld_sr[GEN_LAT-1];
  assign out_lane_ok = ok_sr[GEN_LAT-1];
  assign out_last    = last_sr[GEN_LAT-1];

  // ---------------- floating-point argument generation
  logic [IDX_W-1:0] n_idx;
  fp32_t n_f, t_f, dt_f, dt2_f, fdt_f, u_f, a2_f, pf_f, ph_f, neg_tau;

  assign n_idx   = IDX_W'(in_group) * IDX_W'(NUM_GEN) + IDX_W'(LANE);
  assign neg_tau = {~params.tau[31], params.tau[30:0]};

  int_to_fp #(.W(IDX_W)) u_n2f (.n(n_idx), .y(n_f));

  fp_mul u_mul_t   (.clk, .a(n_f),          .b(params.tstep), .y(t_f));   // 0-2
  fp_add u_add_dt  (.clk, .a(t_f),          .b(neg_tau),      .y(dt_f));  // 2-4
  fp_mul u_mul_dt2 (.clk, .a(dt_f),         .b(dt_f),         .y(dt2_f)); // 4-6
  fp_mul u_mul_fdt (.clk, .a(params.fc),    .b(dt_f),         .y(fdt_f)); // 4-6
  fp_mul u_mul_u   (.clk, .a(params.alpha1),.b(dt2_f),        .y(u_f));   // 6-8
  fp_mul u_mul_a2  (.clk, .a(params.alpha2),.b(dt2_f),        .y(a2_f));  // 6-8
  fp_add u_add_pf  (.clk, .a(params.phi),   .b(fdt_f),        .y(pf_f));  // 6-8
  fp_add u_add_ph  (.clk, .a(pf_f),         .b(a2_f),         .y(ph_f));  // 8-10

  // ---------------- Gaussian envelope path
  logic [LUT_ADDR_W-1:0] env_addr_c, env_addr;
  logic [15:0]           env;
  logic signed [17:0]    beta_fix;      // beta with 16 fraction bits, |beta| < 2
  logic signed [34:0]    benv_prod;
  logic signed [18:0]    benv, benv_d;  // beta*exp(-u), 16 fraction bits

  fp_to_fixed #(.W(LUT_ADDR_W), .FRAC(EXP_U_FRAC), .WRAP(1'b0), .UNSIGNED_SAT(1'b1))
    u_env_addr (.x(u_f), .y(env_addr_c));
  fp_to_fixed #(.W(18), .FRAC(16), .WRAP(1'b0), .UNSIGNED_SAT(1'b0))
    u_beta_fix (.x(params.beta), .y(beta_fix));

  always_ff @(posedge clk) env_addr <= env_addr_c;                        // 9

  exp_lut #(.ADDR_W(LUT_ADDR_W), .DATA_W(16), .U_FRAC(EXP_U_FRAC))
    u_exp_lut (.clk, .addr(env_addr), .dout(env));                          // 10

  assign benv_prod = $signed({1'b0, env}) * beta_fix;

  always_ff @(posedge clk) begin
    benv   <= 19'((benv_prod + 35'sd32768) >>> 16);                        // 11
    benv_d <= benv;                                                        // 12
  end

  // ---------------- chirp path
  logic [LUT_ADDR_W-1:0]     ph_addr_c, ph_addr;
  logic signed [15:0]        sin_v, cos_v;

  fp_to_fixed #(.W(LUT_ADDR_W), .FRAC(LUT_ADDR_W), .WRAP(1'b1), .UNSIGNED_SAT(1'b0))
    u_ph_addr (.x(ph_f), .y(ph_addr_c));

  always_ff @(posedge clk) ph_addr <= ph_addr_c;                          // 11

  sine_lut #(.ADDR_W(LUT_ADDR_W), .DATA_W(16))
    u_sine_lut (.clk, .addr(ph_addr), .sin_out(sin_v), .cos_out(cos_v));   // 12

  // ---------------- output: beta*exp(-u) * (cos + j sin), Q1.15
  function automatic logic signed [15:0] round_sat(input logic signed [34:0] p);
    logic signed [34:0] r;
    r = (p + 35'sd32768) >>> 16;
    if (r > 35'sd32767)       return 16'sh7FFF;
    else if (r < -35'sd32768) return 16'sh8000;
    else                      return 16'(r);
  endfunction

  logic signed [34:0] re_prod, im_prod;
  assign re_prod = benv_d * cos_v;
  assign im_prod = benv_d * sin_v;

  always_ff @(posedge clk) begin                                          // 13
    out_sample.re <= round_sat(re_prod);
    out_sample.im <= round_sat(im_prod);
  end

endmodule
