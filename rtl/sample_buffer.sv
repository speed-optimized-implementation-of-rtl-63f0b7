// Signal buffer of the centre-point correlator: narrow writes, wide reads.
//
// Holds DEPTH complex Q1.15 samples. The write side takes WR_LANES consecutive
// samples per clock at row wr_addr (sample index wr_addr*WR_LANES + lane), each
// lane with its own enable, which matches the output bus of the parallel
// chirplet generator. The read side returns RD_LANES consecutive samples of row
// rd_addr (sample index rd_addr*RD_LANES + lane) one clock after the address,
// through a registered output as a block RAM would. The correlator reads a whole
// 512-sample signal in DEPTH/RD_LANES clocks.
//
// The correlator stores its signals in block RAM in the design this implements;
// the port widths and the one-cycle read are this implementation's choices. The
// contents are not reset: a signal must be written before it is used.
module sample_buffer
  import chirplet_pkg::*;
#(
  parameter int unsigned DEPTH    = 512,
  parameter int unsigned WR_LANES = 8,
  parameter int unsigned RD_LANES = 64,
  localparam int unsigned WA_W    = $clog2(DEPTH / WR_LANES),
  localparam int unsigned RA_W    = (DEPTH / RD_LANES > 1) ? $clog2(DEPTH / RD_LANES) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [WA_W-1:0]     wr_addr,
  input  logic [WR_LANES-1:0] wr_lane_en,
  input  cplx16_t             wr_data [WR_LANES],
  input  logic [RA_W-1:0]     rd_addr,
  output cplx16_t             rd_data [RD_LANES]
);

  cplx16_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int l = 0; l < int'(WR_LANES); l++)
        if (wr_lane_en[l]) mem[int'(wr_addr) * int'(WR_LANES) + l] <= wr_data[l];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(RD_LANES); l++)
      rd_data[l] <= mem[int'(rd_addr) * int'(RD_LANES) + l];
  end

endmodule
