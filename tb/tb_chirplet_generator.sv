// Self-checking testbench of chirplet_generator (one generator, lane 3 of 8).
//
// Runs three bursts: the 100 MHz / 5 MHz test chirplet (tau = 2.56 us,
// alpha1 = alpha2 = 1e12, phi = 0.75, beta = 0.25) for 64 groups back to
// back, the same with idle cycles between groups, and a second parameter set
// with a larger amplitude and a negative sweep. Every sample is compared with
// a double-precision chirplet (tb_fp_pkg::chirp_ref) to within TOL steps of
// Q1.15; the valid, lane and last flags are checked, and the latency from an
// index entering to its sample leaving must be GEN_LAT = 13 cycles.
module tb_chirplet_generator;
  import chirplet_pkg::*;
  import tb_fp_pkg::*;

  localparam int LANE = 3, NG = 8, GW = 14;
  localparam real TOL = 8.0;

  logic             clk = 1'b0, rst_n = 1'b0;
  chirplet_params_t params;
  logic             in_valid = 1'b0, in_lane_ok = 1'b0, in_last = 1'b0;
  logic [GW-1:0]    in_group = '0;
  logic             out_valid, out_lane_ok, out_last;
  cplx16_t          out_sample;
  int               checks = 0, failures = 0;
  longint           cycle = 0;
  real              max_err = 0.0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  chirplet_generator #(.LANE(LANE), .NUM_GEN(NG), .GROUP_W(GW)) dut (
    .clk, .rst_n, .params, .in_valid, .in_group, .in_lane_ok, .in_last,
    .out_valid, .out_lane_ok, .out_last, .out_sample);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue record: group and cycle of each index sent
  int     sent_grp [$];
  longint sent_cyc [$];
  logic   sent_last [$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      sent_grp.push_back(int'(in_group));
      sent_cyc.push_back(cycle);
      sent_last.push_back(in_last);
    end
  end

  always @(posedge clk) begin
    real    re, im, er, ei;
    int     g;
    longint c;
    logic   l;
    if (rst_n && out_valid) begin
      if (sent_grp.size() == 0) begin
        failures++;
        $display("output without input");
      end else begin
        g = sent_grp.pop_front();
        c = sent_cyc.pop_front();
        l = sent_last.pop_front();
        chirp_ref(params.beta, params.tau, params.alpha1, params.phi, params.fc,
                  params.alpha2, params.tstep, g * NG + LANE, re, im);
        er = real'(out_sample.re) - re * 32768.0;
        ei = real'(out_sample.im) - im * 32768.0;
        checks += 4;
        if (er > max_err) max_err = er;
        if (-er > max_err) max_err = -er;
        if (ei > max_err) max_err = ei;
        if (-ei > max_err) max_err = -ei;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 10)
            $display("group %0d: got (%0d,%0d) exp (%f,%f)", g, out_sample.re, out_sample.im,
                     re * 32768.0, im * 32768.0);
        end
        if (cycle - c != longint'(GEN_LAT)) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - c, GEN_LAT);
        end
        if (out_last !== l || out_lane_ok !== 1'b1) begin
          failures++;
          $display("flags wrong at group %0d", g);
        end
      end
    end
  end

  task automatic burst(input int groups, input int gap);
    for (int g = 0; g < groups; g++) begin
      @(negedge clk);
      in_valid   = 1'b1;
      in_group   = GW'(g);
      in_lane_ok = 1'b1;
      in_last    = (g == groups - 1);
      if (gap > 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    repeat (GEN_LAT + 4) @(negedge clk);
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
    burst(64, 0);
    burst(64, 3);
    params.beta   = real_to_fp32(0.9);
    params.tau    = real_to_fp32(1.5e-6);
    params.alpha1 = real_to_fp32(4.0e12);
    params.phi    = real_to_fp32(-0.3);
    params.fc     = real_to_fp32(7.5e6);
    params.alpha2 = real_to_fp32(-2.0e12);
    burst(64, 0);
    checks++;
    if (sent_grp.size() != 0) begin
      failures++;
      $display("%0d samples never came out", sent_grp.size());
    end
    $display("largest error %f steps of 2^-15", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
