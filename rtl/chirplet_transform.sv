// Chirplet transform accelerator (programmable-logic side of the FCD system).
//
// The fast chirplet decomposition runs its parameter search in software on the
// processor; for every trial parameter set it needs the chirplet transform value
// CT = sum_n f[n] * conj(psi[n]) of the measured signal f against a chirplet psi
// generated from the trial parameters. This block does both halves in hardware:
//   * parallel_chirplet_gen turns the seven float parameters into a 512-sample
//     complex chirplet, 8 samples per clock (78 cycles from ct_start);
//   * xcorr_center holds the reference signal and, once the chirplet has been
//     written into its estimate buffer, forms the centre-point correlation and
//     its squared magnitude in 23 more cycles.
// ct_mode selects what a ct_start does: 0 = generate only (the chirplet leaves
// on the gen_* bus, e.g. towards a DMA engine); 1 = generate and correlate
// (the chirplet still appears on the gen_* bus). The reference signal is loaded
// through ref_wr_* (8 samples per clock, row address in units of 8 samples) and
// stays until overwritten, so many trial chirplets can be scored against it.
//
// Timing with the defaults, mode 1: ct_start in cycle 0, chirplet groups in
// cycles 14..77, correlator start in cycle 78, ct_valid in cycle 101. busy is
// high from the cycle after ct_start until the operation has finished; a
// ct_start while busy is ignored.
//
// Follows the design: the chirplet transform split into chirplet generation and
// centre-point correlation on the programmable logic, 8 generators, 512 samples
// and the wide generator bus towards the processor side. This implementation's
// choices: plain ports in place of the processor bus and DMA, the two-mode
// control and the hand-over from generator to correlator.
module chirplet_transform
  import chirplet_pkg::*;
#(
  parameter int unsigned NUM_GEN    = 8,
  parameter int unsigned N_SAMPLES  = 512,
  parameter int unsigned LUT_ADDR_W = 16,
  parameter int unsigned XC_LANES   = 64,
  localparam int unsigned NS_W      = 16,
  localparam int unsigned GROUP_W   = NS_W - $clog2(NUM_GEN) + 1,
  localparam int unsigned WA_W      = $clog2(N_SAMPLES / NUM_GEN),
  localparam int unsigned ACC_W     = 33 + $clog2(N_SAMPLES),
  localparam int unsigned MAG_W     = 2 * ACC_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // operation
  input  chirplet_params_t        params,
  input  logic                    ct_start,
  input  logic                    ct_mode,
  output logic                    busy,
  // reference signal load
  input  logic                    ref_wr_en,
  input  logic [WA_W-1:0]         ref_wr_addr,
  input  cplx16_t                 ref_wr_data [NUM_GEN],
  // generated chirplet bus
  output logic                    gen_valid,
  output logic [NUM_GEN-1:0]      gen_lane_valid,
  output logic [GROUP_W-1:0]      gen_index,
  output cplx16_t                 gen_samples [NUM_GEN],
  output logic                    gen_last,
  // chirplet transform result
  output logic                    ct_valid,
  output logic signed [ACC_W-1:0] ct_re,
  output logic signed [ACC_W-1:0] ct_im,
  output logic [MAG_W-1:0]        ct_mag2
);

  logic gen_busy, xc_busy, gen_start, xc_start, mode_q;

  assign gen_start = ct_start && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q   <= 1'b0;
      xc_start <= 1'b0;
    end else begin
      if (gen_start) mode_q <= ct_mode;
      xc_start <= gen_last && mode_q;
    end
  end

  assign busy = gen_busy || xc_busy || xc_start;

  parallel_chirplet_gen #(
    .NUM_GEN(NUM_GEN), .LUT_ADDR_W(LUT_ADDR_W), .NS_W(NS_W)
  ) u_gen (
    .clk, .rst_n,
    .start         (gen_start),
    .params,
    .num_samples   (NS_W'(N_SAMPLES)),
    .busy          (gen_busy),
    .out_valid     (gen_valid),
    .out_lane_valid(gen_lane_valid),
    .out_group     (gen_index),
    .out_samples   (gen_samples),
    .out_last      (gen_last)
  );

  xcorr_center #(
    .N(N_SAMPLES), .LANES(XC_LANES), .WR_LANES(NUM_GEN)
  ) u_xcorr (
    .clk, .rst_n,
    .ref_wr_en,
    .ref_wr_addr,
    .ref_wr_lane_en({NUM_GEN{1'b1}}),
    .ref_wr_data,
    .est_wr_en     (gen_valid && mode_q),
    .est_wr_addr   (gen_index[WA_W-1:0]),
    .est_wr_lane_en(gen_lane_valid),
    .est_wr_data   (gen_samples),
    .start         (xc_start),
    .busy          (xc_busy),
    .result_valid  (ct_valid),
    .ct_re,
    .ct_im,
    .ct_mag2
  );

endmodule
