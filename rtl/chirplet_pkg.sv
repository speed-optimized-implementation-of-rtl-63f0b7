// Shared types and constants of the chirplet transform accelerator.
//
// Chirplet parameters travel as IEEE-754 single-precision words so that the
// processor side can write them without any fixed-point scaling. Samples are
// complex numbers with a 16-bit real and a 16-bit imaginary part in Q1.15.
// The parameter set, the sample format and the 32-bit float type are shared by
// the generators, the correlator and the top level; the field order of the
// parameter struct is this design's own choice.
package chirplet_pkg;

  typedef logic [31:0] fp32_t;

  // The six chirplet parameters of C(t) = beta*exp(-alpha1*(t-tau)^2 +
  // j*2*pi*(phi + fc*(t-tau) + alpha2*(t-tau)^2)) plus the sample period.
  // phi is in cycles (turns), fc in Hz, alpha1 and alpha2 in 1/s^2, tau and
  // tstep in seconds.
  typedef struct packed {
    fp32_t beta;
    fp32_t tau;
    fp32_t alpha1;
    fp32_t phi;
    fp32_t fc;
    fp32_t alpha2;
    fp32_t tstep;
  } chirplet_params_t;

  localparam int unsigned SAMPLE_W = 16;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx16_t;

  // Pipeline depth of the floating-point operators.
  localparam int unsigned FP_MUL_LAT = 2;
  localparam int unsigned FP_ADD_LAT = 2;

  // Latency of one chirplet generator, from a group index entering it to the
  // sample leaving it: five floating-point steps (n*tstep, -tau, squares,
  // coefficient products, phase sum) plus table address, table read and the
  // output product. The shared sequencer register in front of the generators
  // adds one more cycle, giving 14 from the valid input pulse.
  localparam int unsigned GEN_LAT = 3 * FP_MUL_LAT + 2 * FP_ADD_LAT + 3;

endpackage
