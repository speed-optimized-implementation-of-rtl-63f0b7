// Self-checking testbench of xcorr_center at its default size (512 samples,
// 64 lanes, 8-sample writes).
//
// Loads the reference and estimate buffers through their 8-lane write ports,
// starts the correlator and compares re, im and re^2+im^2 with sums computed in
// the testbench with wide integers. Cases: random signals, full-scale signals
// (all -32768, the largest possible sums), a partial rewrite using lane enables
// (the disabled lanes must keep their old data) and a start while busy, which
// must be ignored. The result must arrive exactly 23 cycles after start.
module tb_xcorr_center;
  import chirplet_pkg::*;

  localparam int N = 512, WL = 8, ACC_W = 42, MAG_W = 85;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_wr_en = 0, est_wr_en = 0, start = 0;
  logic [5:0] ref_wr_addr = '0, est_wr_addr = '0;
  logic [WL-1:0] ref_wr_lane_en = '0, est_wr_lane_en = '0;
  cplx16_t ref_wr_data [WL], est_wr_data [WL];
  logic busy, result_valid;
  logic signed [ACC_W-1:0] ct_re, ct_im;
  logic [MAG_W-1:0] ct_mag2;
  int checks = 0, failures = 0;
  longint cycle = 0, start_cyc = 0, res_cyc = 0;

  cplx16_t ref_m [N], est_m [N];   // testbench copy of the buffers

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  xcorr_center dut (.*);

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && start && !busy) start_cyc <= cycle;
    if (rst_n && result_valid) res_cyc <= cycle;
  end

  // mode 0: random, 1: full scale -32768
  task automatic load(input int mode, input logic [WL-1:0] mask);
    for (int r = 0; r < N / WL; r++) begin
      @(negedge clk);
      ref_wr_en = 1; est_wr_en = 1;
      ref_wr_addr = 6'(r); est_wr_addr = 6'(r);
      ref_wr_lane_en = mask; est_wr_lane_en = mask;
      for (int l = 0; l < WL; l++) begin
        if (mode == 1) begin
          ref_wr_data[l] = '{re: -16'sd32768, im: -16'sd32768};
          est_wr_data[l] = '{re: -16'sd32768, im: 16'sd32767};
        end else begin
          ref_wr_data[l] = cplx16_t'($urandom);
          est_wr_data[l] = cplx16_t'($urandom);
        end
        if (mask[l]) begin
          ref_m[r * WL + l] = ref_wr_data[l];
          est_m[r * WL + l] = est_wr_data[l];
        end
      end
    end
    @(negedge clk);
    ref_wr_en = 0; est_wr_en = 0;
  endtask

  task automatic correlate(input bit poke_busy);
    longint sr, si;
    logic [MAG_W-1:0] mag;
    logic signed [MAG_W-1:0] wr, wi;
    sr = 0; si = 0;
    for (int n = 0; n < N; n++) begin
      sr += longint'(ref_m[n].re) * longint'(est_m[n].re) + longint'(ref_m[n].im) * longint'(est_m[n].im);
      si += longint'(ref_m[n].im) * longint'(est_m[n].re) - longint'(ref_m[n].re) * longint'(est_m[n].im);
    end
    wr = MAG_W'(sr); wi = MAG_W'(si);
    mag = MAG_W'(wr * wr) + MAG_W'(wi * wi);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    if (poke_busy) begin
      repeat (4) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
    end
    while (!result_valid) @(negedge clk);
    @(posedge clk);
    #1;
    checks += 4;
    if (longint'(ct_re) != sr) fail($sformatf("re %0d, expected %0d", ct_re, sr));
    if (longint'(ct_im) != si) fail($sformatf("im %0d, expected %0d", ct_im, si));
    if (ct_mag2 != mag) fail("squared magnitude");
    if (res_cyc - start_cyc != 23) fail($sformatf("latency %0d, expected 23", res_cyc - start_cyc));
    repeat (3) @(negedge clk);
    checks++;
    if (busy || result_valid) fail("busy or valid after the result");
    if (poke_busy) repeat (30) @(negedge clk);
    checks++;
    if (result_valid) fail("start while busy was not ignored");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0, '1);  correlate(0);
    load(0, '1);  correlate(1);
    load(1, '1);  correlate(0);
    load(0, 8'b1010_0110); correlate(0);
    $display("latency %0d cycles", res_cyc - start_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
