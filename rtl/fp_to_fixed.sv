// Single-precision float to fixed-point conversion (combinational).
//
// Computes round(x * 2^FRAC) (ties away from zero) as a W-bit two's complement
// number. With WRAP = 1 the result is taken modulo 2^W, which is what a table
// address over one period needs: the fractional part of a phase measured in
// cycles becomes a sine-table address. With WRAP = 0 the result saturates; with
// UNSIGNED_SAT = 1 it additionally saturates to [0, 2^W-1], which is used for
// the Gaussian-table address. Subnormals read as zero; NaN and infinity
// saturate (or give 0 when wrapping). How the float arguments are turned into
// table addresses is not specified by the design this implements; this module
// is the simplest converter that does it.
module fp_to_fixed
  import chirplet_pkg::*;
#(
  parameter int unsigned W            = 16,
  parameter int unsigned FRAC         = 16,
  parameter bit          WRAP         = 1'b1,
  parameter bit          UNSIGNED_SAT = 1'b0
) (
  input  fp32_t        x,
  output logic [W-1:0] y
);

  localparam int unsigned MW = 64;   // magnitude working width

  logic                  sign, special, big;
  logic [23:0]           m;
  int                    s;           // left-shift amount of the 24-bit significand
  logic [MW-1:0]         mag;
  logic [W-1:0]          val;         // two's complement result, low W bits
  logic [MW-1:0]         max_pos;
  logic [W-1:0]          min_neg;

  always_comb begin
    sign    = x[31];
    special = (x[30:23] == 8'hFF);
    m       = (x[30:23] == 8'd0) ? 24'd0 : {1'b1, x[22:0]};
    s       = int'(x[30:23]) - 150 + int'(FRAC);
    big     = 1'b0;
    mag     = '0;
    if (special) begin
      big = 1'b1;
    end else if (s >= 0) begin
      if (s > MW - 25) big = 1'b1;
      else             mag = MW'(m) << s;
    end else if (s >= -25) begin
      mag = (MW'(m) + (MW'(1) << (-s - 1))) >> (-s);
    end
    val = sign ? W'(~mag + MW'(1)) : W'(mag);

    if (UNSIGNED_SAT) begin
      max_pos = (MW'(1) << W) - MW'(1);
      min_neg = '0;
    end else begin
      max_pos = (MW'(1) << (W - 1)) - MW'(1);
      min_neg = W'(~max_pos);                   // -2^(W-1)
    end

    if (WRAP) begin
      y = big ? '0 : val;   // upper bits of val are dropped by the wrap
    end else if (big || (!sign && mag > max_pos)) begin
      y = sign ? min_neg : max_pos[W-1:0];
    end else if (sign && UNSIGNED_SAT) begin
      y = '0;
    end else if (sign && mag > (max_pos + MW'(1))) begin
      y = min_neg;
    end else begin
      y = val;
    end
  end

endmodule
