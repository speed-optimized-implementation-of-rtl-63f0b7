// Self-checking testbench of sample_buffer (512 samples, 8-lane writes,
// 64-lane reads).
//
// Fills the buffer with random samples, rewrites random rows with random lane
// enables, and reads every 64-sample row back, comparing each lane one cycle
// after its address with a testbench copy of the contents. A read issued in
// the same cycle as a write to another row must not be disturbed.
module tb_sample_buffer;
  import chirplet_pkg::*;

  localparam int N = 512, WL = 8, RL = 64;

  logic          clk = 1'b0;
  logic          wr_en = 1'b0;
  logic [5:0]    wr_addr = '0;
  logic [WL-1:0] wr_lane_en = '0;
  cplx16_t       wr_data [WL];
  logic [2:0]    rd_addr = '0;
  cplx16_t       rd_data [RL];
  cplx16_t       model [N];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(input int r, input logic [WL-1:0] m);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = 6'(r); wr_lane_en = m;
    for (int l = 0; l < WL; l++) begin
      wr_data[l] = cplx16_t'($urandom);
      if (m[l]) model[r * WL + l] = wr_data[l];
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < N / RL; r++) begin
      @(negedge clk);
      rd_addr = 3'(r);
      // keep writing into another row, away from the one being read
      wr_en = 1'b1; wr_addr = 6'(((r + 4) % 8) * 8 + 3); wr_lane_en = '1;
      for (int l = 0; l < WL; l++) begin
        wr_data[l] = cplx16_t'($urandom);
        model[int'(wr_addr) * WL + l] = wr_data[l];
      end
      @(posedge clk);
      #1;
      for (int l = 0; l < RL; l++) begin
        checks++;
        if (rd_data[l] !== model[r * RL + l]) begin
          failures++;
          if (failures < 10) $display("row %0d lane %0d: got %h exp %h", r, l, rd_data[l], model[r * RL + l]);
        end
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    for (int r = 0; r < N / WL; r++) write_row(r, '1);
    @(negedge clk);
    wr_en = 1'b0;
    read_all();
    for (int i = 0; i < 100; i++) write_row(int'($urandom % 64), WL'($urandom));
    @(negedge clk);
    wr_en = 1'b0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
