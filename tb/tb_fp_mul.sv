// Self-checking testbench of fp_mul.
//
// Random operand pairs over a wide exponent range and a set of directed cases
// (zeros, infinities, NaN, overflow, underflow, rounding ties) are pushed in one
// per clock. Each result is compared, FP_MUL_LAT cycles later, with the product
// computed in double precision (exact for two singles) and rounded to single
// by tb_fp_pkg. The latency is checked by the alignment itself.
module tb_fp_mul;
  import chirplet_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_mul dut (.clk, .a, .b, .y);

  localparam int NDIR = 10;
  fp32_t da [NDIR] = '{32'h0000_0000, 32'h7F80_0000, 32'h7F80_0000, 32'h7FC0_0000, 32'h7F00_0000,
                       32'h0080_0000, 32'h3F80_0001, 32'hBF80_0000, 32'h3FC0_0000, 32'h4049_0FDB};
  fp32_t db [NDIR] = '{32'h4120_0000, 32'h4000_0000, 32'h0000_0000, 32'h3F80_0000, 32'h7F00_0000,
                       32'h0080_0000, 32'h3F7F_FFFF, 32'h8000_0000, 32'h3FC0_0000, 32'hC2C8_0000};

  function automatic fp32_t model(fp32_t x, fp32_t z);
    logic xn, zn, xi, zi, x0, z0;
    x0 = (x[30:23] == 0); z0 = (z[30:23] == 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0); zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0); zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    if (xn || zn || (xi && z0) || (zi && x0)) return 32'h7FC0_0000;
    if (xi || zi) return {x[31] ^ z[31], 8'hFF, 23'd0};
    if (x0 || z0) return {x[31] ^ z[31], 31'd0};
    return real_to_fp32(fp32_to_real(x) * fp32_to_real(z)) | {x[31] ^ z[31], 31'd0};
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
    for (int i = 0; i < TOTAL + FP_MUL_LAT; i++) begin
      if (i < NDIR) begin
        a = da[i]; b = db[i];
      end else if (i < TOTAL) begin
        if (i % 3 == 0) begin a = rand_fp32(100, 154); b = rand_fp32(100, 154); end
        else            begin a = rand_fp32(1, 254);   b = rand_fp32(1, 254);   end
      end
      if (i < TOTAL) expv[i] = model(a, b);
      @(posedge clk);
      #1;
      k = i - (FP_MUL_LAT - 1);
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
