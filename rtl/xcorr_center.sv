// Centre-point cross-correlator: the chirplet-transform value of one estimate.
//
// Computes the zero-lag point of the cross-correlation of the reference signal
// f (the measured echo) with the estimated chirplet psi,
//   CT = sum_n f[n] * conj(psi[n]),   re = sum(a*c + b*d),  im = sum(b*c - a*d)
// with f = a + jb and psi = c + jd, and its squared magnitude re^2 + im^2, which
// the parameter search on the processor side maximises. Only the centre point of
// the correlation is formed, not the whole correlation.
//
// Both signals sit in sample_buffer instances written WR_LANES samples per clock.
// After start, one row of LANES samples of each is read per clock; each lane has
// four multipliers (4*64 = 256 in all) and a lane adder; a registered binary
// adder tree reduces the lanes and an accumulator adds the N/LANES rows.
// Cycle budget from the start pulse (cycle 0), defaults N = 512, LANES = 64:
//   1 row address, 2 buffer read, 3 operand registers, 4 products,
//   5 lane sums, 6-11 adder tree (log2 LANES levels), 12-19 accumulation of the
//   8 rows, 20-22 squaring and sum, 23 result registers and result_valid.
// So the result arrives 23 cycles after start, as in the implemented design.
// Full precision is kept throughout: ACC_W = 33 + log2(N) bits for re and im.
// busy is high from the cycle after start until result_valid; a start while
// busy is ignored. Neither buffer may be written while its rows are being read
// (cycles 1 to N/LANES after start); an assertion checks this.
//
// Follows the design: a centre-point correlation of 512 samples finished 23
// clock cycles after the signals are loaded. This implementation's choices:
// complex reference input, 64 lanes (which gives the 256 multipliers of the
// implemented design at four per complex product), the pipeline split above,
// the squared-magnitude output and full-precision widths.
module xcorr_center
  import chirplet_pkg::*;
#(
  parameter int unsigned N        = 512,
  parameter int unsigned LANES    = 64,
  parameter int unsigned WR_LANES = 8,
  localparam int unsigned ROWS    = N / LANES,
  localparam int unsigned LOG2L   = $clog2(LANES),
  localparam int unsigned WA_W    = $clog2(N / WR_LANES),
  localparam int unsigned RA_W    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned ACC_W   = 33 + $clog2(N),
  localparam int unsigned MAG_W   = 2 * ACC_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // reference (measured) signal write port
  input  logic                    ref_wr_en,
  input  logic [WA_W-1:0]         ref_wr_addr,
  input  logic [WR_LANES-1:0]     ref_wr_lane_en,
  input  cplx16_t                 ref_wr_data [WR_LANES],
  // estimated chirplet write port
  input  logic                    est_wr_en,
  input  logic [WA_W-1:0]         est_wr_addr,
  input  logic [WR_LANES-1:0]     est_wr_lane_en,
  input  cplx16_t                 est_wr_data [WR_LANES],
  // control and result
  input  logic                    start,
  output logic                    busy,
  output logic                    result_valid,
  output logic signed [ACC_W-1:0] ct_re,
  output logic signed [ACC_W-1:0] ct_im,
  output logic [MAG_W-1:0]        ct_mag2
);

  // ---------------- row sequencer (cycle 1)
  logic [RA_W-1:0] row_q;
  logic            rd_vld_q, rd_first_q, rd_last_q, running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running    <= 1'b0;
      rd_vld_q   <= 1'b0;
      rd_first_q <= 1'b0;
      rd_last_q  <= 1'b0;
      row_q      <= '0;
    end else if (!running && !busy && start) begin
      running    <= (ROWS > 1);
      rd_vld_q   <= 1'b1;
      rd_first_q <= 1'b1;
      rd_last_q  <= (ROWS == 1);
      row_q      <= '0;
    end else if (running) begin
      row_q      <= row_q + 1'b1;
      rd_vld_q   <= 1'b1;
      rd_first_q <= 1'b0;
      rd_last_q  <= (32'(row_q) + 32'd1 == 32'(ROWS - 1));
      running    <= (32'(row_q) + 32'd1 != 32'(ROWS - 1));
    end else begin
      rd_vld_q   <= 1'b0;
      rd_first_q <= 1'b0;
      rd_last_q  <= 1'b0;
    end
  end

  // ---------------- buffers (cycle 2)
  cplx16_t ref_row [LANES];
  cplx16_t est_row [LANES];

  sample_buffer #(.DEPTH(N), .WR_LANES(WR_LANES), .RD_LANES(LANES)) u_ref_buf (
    .clk, .wr_en(ref_wr_en), .wr_addr(ref_wr_addr), .wr_lane_en(ref_wr_lane_en),
    .wr_data(ref_wr_data), .rd_addr(row_q), .rd_data(ref_row));

  sample_buffer #(.DEPTH(N), .WR_LANES(WR_LANES), .RD_LANES(LANES)) u_est_buf (
    .clk, .wr_en(est_wr_en), .wr_addr(est_wr_addr), .wr_lane_en(est_wr_lane_en),
    .wr_data(est_wr_data), .rd_addr(row_q), .rd_data(est_row));

  // ---------------- per-lane complex multiply (cycles 3-5)
  cplx16_t            ref_op [LANES];
  cplx16_t            est_op [LANES];
  logic signed [31:0] p_ac [LANES], p_bd [LANES], p_bc [LANES], p_ad [LANES];

  localparam int unsigned NODES = 2 * LANES - 1;
  logic signed [ACC_W-1:0] node_re [NODES];   // node i has children 2i+1, 2i+2
  logic signed [ACC_W-1:0] node_im [NODES];

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(LANES); l++) begin
      ref_op[l] <= ref_row[l];                                            // 3
      est_op[l] <= est_row[l];
      p_ac[l]   <= ref_op[l].re * est_op[l].re;                           // 4
      p_bd[l]   <= ref_op[l].im * est_op[l].im;
      p_bc[l]   <= ref_op[l].im * est_op[l].re;
      p_ad[l]   <= ref_op[l].re * est_op[l].im;
      node_re[LANES - 1 + l] <= ACC_W'(p_ac[l]) + ACC_W'(p_bd[l]);        // 5
      node_im[LANES - 1 + l] <= ACC_W'(p_bc[l]) - ACC_W'(p_ad[l]);
    end
    // adder tree, one level per clock (cycles 6 .. 5+LOG2L)
    for (int i = 0; i < int'(LANES) - 1; i++) begin
      node_re[i] <= node_re[2 * i + 1] + node_re[2 * i + 2];
      node_im[i] <= node_im[2 * i + 1] + node_im[2 * i + 2];
    end
  end

  // flags travelling with the rows: cycle 2 .. 5+LOG2L
  localparam int unsigned FL_LEN = 4 + LOG2L;
  logic [FL_LEN-1:0] fl_vld, fl_first, fl_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fl_vld   <= '0;
      fl_first <= '0;
      fl_last  <= '0;
    end else begin
      fl_vld   <= {fl_vld[FL_LEN-2:0],   rd_vld_q};
      fl_first <= {fl_first[FL_LEN-2:0], rd_first_q};
      fl_last  <= {fl_last[FL_LEN-2:0],  rd_last_q};
    end
  end

  // ---------------- row accumulation (cycles 12 .. 11+ROWS)
  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic                    acc_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_re   <= '0;
      acc_im   <= '0;
      acc_done <= 1'b0;
    end else begin
      acc_done <= fl_vld[FL_LEN-1] && fl_last[FL_LEN-1];
      if (fl_vld[FL_LEN-1]) begin
        acc_re <= fl_first[FL_LEN-1] ? node_re[0] : acc_re + node_re[0];
        acc_im <= fl_first[FL_LEN-1] ? node_im[0] : acc_im + node_im[0];
      end
    end
  end

  // ---------------- squared magnitude and result (cycles 20-23)
  logic signed [ACC_W-1:0] m_re, m_im, h_re, h_im, h2_re, h2_im;
  logic [MAG_W-2:0]        sq_re, sq_im;
  logic [MAG_W-1:0]        mag_s;
  logic [2:0]              m_vld;

  always_ff @(posedge clk) begin
    m_re  <= acc_re;                                                      // 20
    m_im  <= acc_im;
    sq_re <= (MAG_W-1)'(m_re * m_re);                                     // 21
    sq_im <= (MAG_W-1)'(m_im * m_im);
    h_re  <= m_re;
    h_im  <= m_im;
    mag_s <= MAG_W'(sq_re) + MAG_W'(sq_im);                               // 22
    h2_re <= h_re;
    h2_im <= h_im;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_vld        <= '0;
      result_valid <= 1'b0;
      ct_re        <= '0;
      ct_im        <= '0;
      ct_mag2      <= '0;
    end else begin
      m_vld        <= {m_vld[1:0], acc_done};
      result_valid <= m_vld[2];                                           // 23
      if (m_vld[2]) begin
        ct_re   <= h2_re;
        ct_im   <= h2_im;
        ct_mag2 <= mag_s;
      end
    end
  end

  assign busy = running || rd_vld_q || (|fl_vld) || acc_done || (|m_vld);

  // The buffers must not change while their rows are being read.
  always_ff @(posedge clk) begin
    if (rst_n && (running || rd_vld_q)) begin
      assert (!ref_wr_en && !est_wr_en)
        else $error("signal buffer written while the correlator reads it");
    end
  end

endmodule
