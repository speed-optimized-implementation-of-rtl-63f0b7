// End-to-end testbench of chirplet_transform at its default size
// (8 generators, 512 samples, 65536-entry tables, 64 correlator lanes).
//
// The reference signal is a chirplet computed in double precision and rounded
// to Q1.15 (true centre frequency 5 MHz, the 100 MHz test parameters
// otherwise). The testbench then does what the processor side of the
// decomposition does in one estimation step: it sweeps the centre frequency of
// the trial chirplet from 3 to 7 MHz, runs a generate-and-correlate operation
// for each and picks the largest |CT|^2, which must be at 5 MHz. For every
// operation it checks
//   * each generated sample against a double-precision chirplet,
//   * CT re/im/|CT|^2 against sums formed from the samples seen on the bus,
//   * timing: first group 14 cycles and ct_valid 101 cycles after ct_start.
// It also runs a generate-only operation (no ct_valid may appear), a ct_start
// while busy (ignored), and reloads the reference with a different signal.
// Each of these mechanisms is counted, and one that never happened is a
// failure.
module tb_chirplet_transform;
  import chirplet_pkg::*;
  import tb_fp_pkg::*;

  localparam int NG = 8, N = 512, ACC_W = 42, MAG_W = 85, GW = 14;
  localparam real TOL = 8.0;

  logic             clk = 1'b0, rst_n = 1'b0;
  chirplet_params_t params;
  logic             ct_start = 1'b0, ct_mode = 1'b0, busy;
  logic             ref_wr_en = 1'b0;
  logic [5:0]       ref_wr_addr = '0;
  cplx16_t          ref_wr_data [NG];
  logic             gen_valid, gen_last;
  logic [NG-1:0]    gen_lane_valid;
  logic [GW-1:0]    gen_index;
  cplx16_t          gen_samples [NG];
  logic             ct_valid;
  logic signed [ACC_W-1:0] ct_re, ct_im;
  logic [MAG_W-1:0] ct_mag2;

  int     checks = 0, failures = 0;
  longint cycle = 0, start_cyc = 0, first_cyc = -1, ct_cyc = -1;
  int     n_mode0 = 0, n_mode1 = 0, n_ignored = 0, n_reload = 0, n_peak = 0;
  int     ct_count = 0;
  real    max_err = 0.0;

  cplx16_t ref_m [N];
  cplx16_t got [N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  chirplet_transform dut (.*);

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus monitor
  always @(posedge clk) begin
    if (rst_n && ct_start && !busy) start_cyc <= cycle;
    if (rst_n && gen_valid) begin
      if (first_cyc < 0) first_cyc <= cycle;
      for (int k = 0; k < NG; k++)
        if (gen_lane_valid[k]) got[int'(gen_index) * NG + k] = gen_samples[k];
    end
    if (rst_n && ct_valid) begin
      ct_cyc <= cycle;
      ct_count++;
    end
  end

  function automatic chirplet_params_t test_params(input real fc, input real tau);
    chirplet_params_t p;
    p.beta   = real_to_fp32(0.25);
    p.tau    = real_to_fp32(tau);
    p.alpha1 = real_to_fp32(1.0e12);
    p.phi    = real_to_fp32(0.75);
    p.fc     = real_to_fp32(fc);
    p.alpha2 = real_to_fp32(1.0e12);
    p.tstep  = real_to_fp32(1.0e-8);
    return p;
  endfunction

  // reference = rounded double-precision chirplet (optionally two echoes)
  task automatic load_reference(input chirplet_params_t p, input real scale);
    real re, im;
    for (int n = 0; n < N; n++) begin
      chirp_ref(p.beta, p.tau, p.alpha1, p.phi, p.fc, p.alpha2, p.tstep, n, re, im);
      ref_m[n].re = 16'($rtoi($floor(re * scale * 32768.0 + 0.5)));
      ref_m[n].im = 16'($rtoi($floor(im * scale * 32768.0 + 0.5)));
    end
    for (int r = 0; r < N / NG; r++) begin
      @(negedge clk);
      ref_wr_en = 1'b1;
      ref_wr_addr = 6'(r);
      for (int l = 0; l < NG; l++) ref_wr_data[l] = ref_m[r * NG + l];
    end
    @(negedge clk);
    ref_wr_en = 1'b0;
  endtask

  // one operation; returns |CT|^2 (0 in generate-only mode)
  task automatic operate(input chirplet_params_t p, input logic mode, input bit poke,
                         output logic [MAG_W-1:0] mag);
    real re, im, er, ei;
    longint sr, si;
    logic signed [MAG_W-1:0] wr, wi;
    int ct_before;
    ct_before = ct_count;
    first_cyc = -1;
    params = p;
    @(negedge clk);
    ct_start = 1'b1;
    ct_mode  = mode;
    @(negedge clk);
    ct_start = 1'b0;
    if (poke) begin
      repeat (30) @(negedge clk);
      ct_start = 1'b1;
      ct_mode  = ~mode;
      @(negedge clk);
      ct_start = 1'b0;
      n_ignored++;
    end
    while (busy) @(negedge clk);
    repeat (30) @(negedge clk);
    // generated samples
    for (int n = 0; n < N; n++) begin
      chirp_ref(p.beta, p.tau, p.alpha1, p.phi, p.fc, p.alpha2, p.tstep, n, re, im);
      er = real'(got[n].re) - re * 32768.0;
      ei = real'(got[n].im) - im * 32768.0;
      if (er < 0.0) er = -er;
      if (ei < 0.0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      checks++;
      if (er > TOL || ei > TOL) fail($sformatf("sample %0d off by (%f,%f)", n, er, ei));
    end
    checks++;
    if (first_cyc - start_cyc != 14) fail($sformatf("first group after %0d cycles", first_cyc - start_cyc));
    mag = '0;
    if (mode) begin
      n_mode1++;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        sr += longint'(ref_m[n].re) * longint'(got[n].re) + longint'(ref_m[n].im) * longint'(got[n].im);
        si += longint'(ref_m[n].im) * longint'(got[n].re) - longint'(ref_m[n].re) * longint'(got[n].im);
      end
      wr = MAG_W'(sr); wi = MAG_W'(si);
      checks += 5;
      if (ct_count != ct_before + 1) fail($sformatf("%0d results for one operation", ct_count - ct_before));
      if (longint'(ct_re) != sr) fail($sformatf("ct_re %0d expected %0d", ct_re, sr));
      if (longint'(ct_im) != si) fail($sformatf("ct_im %0d expected %0d", ct_im, si));
      if (ct_mag2 != MAG_W'(wr * wr) + MAG_W'(wi * wi)) fail("ct_mag2");
      if (ct_cyc - start_cyc != 101) fail($sformatf("ct_valid after %0d cycles, expected 101", ct_cyc - start_cyc));
      mag = ct_mag2;
    end else begin
      n_mode0++;
      checks++;
      if (ct_count != ct_before) fail("generate-only operation produced a result");
    end
  endtask

  initial begin
    logic [MAG_W-1:0] m, best;
    real best_fc, fc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    load_reference(test_params(5.0e6, 2.56e-6), 1.0);
    n_reload++;

    // generate only
    operate(test_params(5.0e6, 2.56e-6), 1'b0, 1'b0, m);

    // centre-frequency sweep (one estimation step of the decomposition)
    best = '0; best_fc = 0.0;
    for (int i = 0; i < 5; i++) begin
      fc = 3.0e6 + real'(i) * 1.0e6;
      operate(test_params(fc, 2.56e-6), 1'b1, i == 2, m);
      if (m > best) begin best = m; best_fc = fc; end
    end
    checks++;
    if (best_fc != 5.0e6) fail($sformatf("peak at %f Hz, expected 5 MHz", best_fc));
    else n_peak++;
    $display("fc sweep: largest |CT|^2 at %0.1f MHz; first group after %0d cycles, result after %0d cycles",
             best_fc / 1.0e6, first_cyc - start_cyc, ct_cyc - start_cyc);

    // new reference: echo arriving later, twice the amplitude
    load_reference(test_params(5.0e6, 3.2e-6), 2.0);
    n_reload++;
    operate(test_params(5.0e6, 3.2e-6), 1'b1, 1'b0, m);

    checks += 5;
    if (n_mode0 == 0)   fail("generate-only mode never ran");
    if (n_mode1 == 0)   fail("generate-and-correlate mode never ran");
    if (n_ignored == 0) fail("no start while busy");
    if (n_reload < 2)   fail("reference never reloaded");
    if (n_peak == 0)    fail("peak search never succeeded");
    $display("mechanisms: generate-only %0d, generate+correlate %0d, ignored starts %0d, reference loads %0d, peak found %0d",
             n_mode0, n_mode1, n_ignored, n_reload, n_peak);
    $display("largest sample error %f steps of 2^-15", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
