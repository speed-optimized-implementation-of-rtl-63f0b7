// Unsigned integer to single-precision float conversion (combinational).
//
// Converts a sample index into the float time base of a chirplet generator.
// The index is at most 24 bits wide, so every value is represented exactly and
// no rounding is needed: the position of the leading one gives the exponent and
// the bits below it, shifted up to the top, the fraction. Zero maps to +0.
// This converter is this implementation's way of forming t = n*tstep exactly
// for every sample; the design it implements states only that the generator
// works in floating point.
module int_to_fp
  import chirplet_pkg::*;
#(
  parameter int unsigned W = 24   // index width, at most 24 for exact results
) (
  input  logic [W-1:0] n,
  output fp32_t        y
);

  logic [4:0]  msb;
  logic [23:0] ext;
  logic [22:0] sh;

  always_comb begin
    msb = 5'd0;
    for (int i = 0; i < W; i++) begin
      if (n[i]) msb = 5'(i);
    end
    ext = 24'(n);
    sh  = 23'(ext << (5'd23 - msb));
    if (n == '0) y = 32'd0;
    else         y = {1'b0, 8'(8'd127 + {3'd0, msb}), sh};
  end

endmodule
