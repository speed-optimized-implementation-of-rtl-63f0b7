// Gaussian-envelope look-up table: dout = exp(-u), u = addr / 2^U_FRAC.
//
// The envelope exp(-alpha1*(t-tau)^2) of a chirplet is approximated by reading
// this table at the address formed from alpha1*(t-tau)^2. With the default
// 65536 entries and U_FRAC = 12 the table spans u in [0, 16) in steps of 1/4096;
// exp(-16) is below one output step, so larger arguments are clamped to the last
// entry by the address converter. Entries are unsigned with 16 fraction bits,
// round(exp(-u) * 2^16) limited to 2^16-1 (the entry for u = 0).
//
// The table length follows the design this implements; the covered range, the
// entry format and the one-cycle registered read (block-RAM style) are this
// implementation's choices. The contents are computed at elaboration start from
// the formula above, so no data file is needed.
module exp_lut #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned U_FRAC = 12
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  // round(exp(-i / 2^U_FRAC) * 2^DATA_W), limited to the largest code
  function automatic logic [DATA_W-1:0] entry(input int i);
    real v, full;
    full = real'((64'd1 << DATA_W) - 64'd1);
    v = $exp(-real'(i) / real'(64'd1 << U_FRAC)) * real'(64'd1 << DATA_W);
    v = $floor(v + 0.5);
    if (v > full) v = full;
    return DATA_W'($rtoi(v));
  endfunction

  logic [DATA_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = entry(i);
  end

  always_ff @(posedge clk) dout <= rom[addr];

endmodule
