// Self-checking testbench of sine_lut.
//
// Reads random addresses and the four quadrant points, one per clock, and
// checks both outputs one cycle later against 32767*sin(2*pi*a/65536) and
// 32767*cos(2*pi*a/65536) computed in double precision (within one step).
module tb_sine_lut;
  logic               clk = 1'b0;
  logic [15:0]        addr;
  logic signed [15:0] s_o, c_o;
  int                 checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_lut dut (.clk, .addr, .sin_out(s_o), .cos_out(c_o));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, rs, rc;
    pi = 3.14159265358979323846;
    for (int i = 0; i < 20000; i++) begin
      addr = (i < 4) ? 16'(i * 16384) : 16'($urandom);
      @(posedge clk);
      #1;
      rs = 32767.0 * $sin(2.0 * pi * real'(addr) / 65536.0);
      rc = 32767.0 * $cos(2.0 * pi * real'(addr) / 65536.0);
      checks += 2;
      if (real'(s_o) - rs > 1.0 || rs - real'(s_o) > 1.0) begin
        failures++;
        if (failures < 10) $display("sin addr %0d: got %0d exp %f", addr, s_o, rs);
      end
      if (real'(c_o) - rc > 1.0 || rc - real'(c_o) > 1.0) begin
        failures++;
        if (failures < 10) $display("cos addr %0d: got %0d exp %f", addr, c_o, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
