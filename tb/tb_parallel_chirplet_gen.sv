// Self-checking testbench of parallel_chirplet_gen at its default size
// (8 generators, 65536-entry tables).
//
// 1. The 512-sample test chirplet (100 MHz sampling, tau = 2.56 us,
//    alpha1 = alpha2 = 1e12, fc = 5 MHz, phi = 0.75, beta = 0.25): every sample
//    is compared with a double-precision chirplet, the group index must count
//    0..63, the first group must leave 14 cycles after the start pulse and the
//    whole chirplet must take 78 cycles; a second start while busy must be
//    ignored.
// 2. A 20-sample chirplet with other parameters: the last group must be partly
//    filled (lanes 0-3 valid) and flagged last.
// 3. A start with num_samples = 0 must do nothing.
module tb_parallel_chirplet_gen;
  import chirplet_pkg::*;
  import tb_fp_pkg::*;

  localparam int NG = 8;
  localparam int GW = 14;
  localparam real TOL = 8.0;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  chirplet_params_t params;
  logic [15:0]      num_samples = '0;
  logic             busy, out_valid, out_last;
  logic [NG-1:0]    out_lane_valid;
  logic [GW-1:0]    out_group;
  cplx16_t          out_samples [NG];
  int               checks = 0, failures = 0;
  longint           cycle = 0, start_cyc = -1, first_cyc = -1, last_cyc = -1;
  int               groups_seen = 0, exp_group = 0;
  logic [NG-1:0]    last_mask;
  real              max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  parallel_chirplet_gen dut (
    .clk, .rst_n, .start, .params, .num_samples, .busy, .out_valid,
    .out_lane_valid, .out_group, .out_samples, .out_last);

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    real re, im, er, ei;
    if (rst_n && start && !busy) start_cyc <= cycle;
    if (rst_n && out_valid) begin
      if (first_cyc < 0) first_cyc <= cycle;
      if (out_last) last_cyc <= cycle;
      last_mask <= out_lane_valid;
      groups_seen++;
      checks++;
      if (int'(out_group) != exp_group) fail($sformatf("group %0d, expected %0d", out_group, exp_group));
      for (int k = 0; k < NG; k++) begin
        if (out_lane_valid[k]) begin
          chirp_ref(params.beta, params.tau, params.alpha1, params.phi, params.fc,
                    params.alpha2, params.tstep, exp_group * NG + k, re, im);
          er = real'(out_samples[k].re) - re * 32768.0;
          ei = real'(out_samples[k].im) - im * 32768.0;
          if (er < 0.0) er = -er;
          if (ei < 0.0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          checks++;
          if (er > TOL || ei > TOL)
            fail($sformatf("sample %0d: got (%0d,%0d) exp (%f,%f)", exp_group * NG + k,
                           out_samples[k].re, out_samples[k].im, re * 32768.0, im * 32768.0));
        end
      end
      exp_group++;
    end
  end

  task automatic run(input int n);
    exp_group = 0; groups_seen = 0; first_cyc = -1; last_cyc = -1;
    @(negedge clk);
    num_samples = 16'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // a start while busy must be ignored
    repeat (5) @(negedge clk);
    if (n > 0) begin
      checks++;
      if (!busy) fail("not busy during generation");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    params.beta   = real_to_fp32(0.25);
    params.tau    = real_to_fp32(2.56e-6);
    params.alpha1 = real_to_fp32(1.0e12);
    params.phi    = real_to_fp32(0.75);
    params.fc     = real_to_fp32(5.0e6);
    params.alpha2 = real_to_fp32(1.0e12);
    params.tstep  = real_to_fp32(1.0e-8);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run(512);
    checks += 4;
    if (groups_seen != 64) fail($sformatf("%0d groups, expected 64", groups_seen));
    if (first_cyc - start_cyc != 14) fail($sformatf("latency %0d, expected 14", first_cyc - start_cyc));
    if (last_cyc - start_cyc + 1 != 78) fail($sformatf("%0d cycles for 512 samples, expected 78", last_cyc - start_cyc + 1));
    if (last_mask != '1) fail("last group of 512 not full");
    $display("512 samples: first group after %0d cycles, all after %0d cycles, largest error %f",
             first_cyc - start_cyc, last_cyc - start_cyc + 1, max_err);

    params.beta   = real_to_fp32(-0.6);
    params.tau    = real_to_fp32(9.0e-8);
    params.alpha1 = real_to_fp32(2.0e13);
    params.phi    = real_to_fp32(0.1);
    params.fc     = real_to_fp32(1.2e7);
    params.alpha2 = real_to_fp32(5.0e12);
    run(20);
    checks += 3;
    if (groups_seen != 3) fail($sformatf("%0d groups, expected 3", groups_seen));
    if (last_mask != 8'h0F) fail($sformatf("last lanes %b, expected 00001111", last_mask));
    if (first_cyc - start_cyc != 14) fail("latency of short chirplet");

    run(0);
    checks++;
    if (groups_seen != 0) fail("num_samples = 0 produced output");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
