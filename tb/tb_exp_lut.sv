// Self-checking testbench of exp_lut.
//
// Reads every 7th address plus both ends of the table, one per clock, and
// checks each entry, one cycle after its address, against exp(-addr/4096)*2^16
// computed in double precision (at most one step off, and the first entry
// limited to 65535). Also checks that the table decreases monotonically.
module tb_exp_lut;
  logic        clk = 1'b0;
  logic [15:0] addr, dout, prev;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_lut dut (.clk, .addr, .dout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, err;
    int  a;
    prev = 16'hFFFF;
    for (a = 0; a < 65536 + 7; a += 7) begin
      addr = (a > 65535) ? 16'hFFFF : 16'(a);
      @(posedge clk);
      #1;
      ref_v = $exp(-real'(addr) / 4096.0) * 65536.0;
      if (ref_v > 65535.0) ref_v = 65535.0;
      err = real'(dout) - ref_v;
      checks++;
      if (err > 1.0 || err < -1.0) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d exp %f", addr, dout, ref_v);
      end
      checks++;
      if (dout > prev) begin
        failures++;
        if (failures < 10) $display("not monotonic at %0d", addr);
      end
      prev = dout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
