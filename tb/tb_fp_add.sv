// Self-checking testbench of fp_add.
//
// Random operand pairs and directed cases (zeros, infinities, NaN, inf - inf,
// exact cancellation, overflow, far-apart exponents, rounding ties) are pushed
// in one per clock. Each result is compared, FP_ADD_LAT cycles later, with the
// sum computed in double precision and rounded to single by tb_fp_pkg. Random
// pairs keep their exponents within 28 of each other so that the double sum is
// exact; far-apart cases are directed. The latency is checked by the alignment.
module tb_fp_add;
  import chirplet_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_add dut (.clk, .a, .b, .y);

  localparam int NDIR = 12;
  fp32_t da [NDIR] = '{32'h0000_0000, 32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000, 32'h7F7F_FFFF,
                       32'h3F80_0000, 32'h4049_0FDB, 32'h8000_0000, 32'h3F80_0000, 32'h4B80_0000,
                       32'h0080_0001, 32'h3F80_0000};
  fp32_t db [NDIR] = '{32'h0000_0000, 32'hFF80_0000, 32'h3F80_0000, 32'h3F80_0000, 32'h7F7F_FFFF,
                       32'h3380_0000, 32'hC049_0FDB, 32'h8000_0000, 32'h2F80_0000, 32'h3F80_0000,
                       32'h8080_0000, 32'hB380_0000};

  function automatic fp32_t model(fp32_t x, fp32_t z);
    logic xn, zn, xi, zi;
    real  r;
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0); zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0); zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    if (xn || zn || (xi && zi && x[31] != z[31])) return 32'h7FC0_0000;
    if (xi) return x;
    if (zi) return z;
    r = fp32_to_real(x) + fp32_to_real(z);
    if (r == 0.0) return {x[31] & z[31], 31'd0};
    return real_to_fp32(r);
  endfunction

  function automatic fp32_t near(fp32_t x);
    int e;
    e = int'(x[30:23]) - 28 + int'($urandom % 57);
    if (e < 1) e = 1;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  localparam int TOTAL = NDIR + 20000;
  fp32_t expv [TOTAL];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    a = 0; b = 0;
    for (int i = 0; i < TOTAL + FP_ADD_LAT; i++) begin
      if (i < NDIR) begin
        a = da[i]; b = db[i];
      end else if (i < TOTAL) begin
        a = rand_fp32(1, 254);
        b = near(a);
        if (i % 4 == 0) b = {~a[31], a[30:2], 2'($urandom)};   // heavy cancellation
      end
      if (i < TOTAL) expv[i] = model(a, b);
      @(posedge clk);
      #1;
      k = i - (FP_ADD_LAT - 1);
      if (k >= 0 && k < TOTAL) begin
        checks++;
        if (y !== expv[k]) begin
          failures++;
          if (failures < 10) $display("mismatch %0d: got %h exp %h", k, y, expv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
