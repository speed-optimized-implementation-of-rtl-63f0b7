// One-period sine look-up table with two read ports for sin and cos.
//
// The chirp factor exp(j*2*pi*p) of a chirplet is split by Euler's identity
// into cos(2*pi*p) + j*sin(2*pi*p). The address is the fractional part of the
// phase p (in cycles) scaled to 2^ADDR_W; the sine is read at the address and
// the cosine at the address plus a quarter period, so one table serves both.
// Entries are signed Q1.15: round(32767 * sin(2*pi*i / 2^ADDR_W)).
//
// The use of a sine table and its 65536-entry length follow the design this
// implements; the shared two-port arrangement, the entry format and the
// one-cycle registered read are this implementation's choices. The contents are
// computed at elaboration start from the formula above.
module sine_lut #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] sin_out,
  output logic signed [DATA_W-1:0] cos_out
);

  localparam int unsigned DEPTH   = 1 << ADDR_W;
  localparam logic [ADDR_W-1:0] QUARTER = ADDR_W'(DEPTH / 4);

  // round((2^(DATA_W-1) - 1) * sin(2*pi*i / DEPTH))
  function automatic logic signed [DATA_W-1:0] entry(input int i);
    real v;
    v = real'((64'd1 << (DATA_W - 1)) - 64'd1)
        * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH));
    return DATA_W'($rtoi($floor(v + 0.5)));
  endfunction

  logic signed [DATA_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = entry(i);
  end

  logic [ADDR_W-1:0] addr_cos;
  assign addr_cos = addr + QUARTER;

  always_ff @(posedge clk) begin
    sin_out <= rom[addr];
    cos_out <= rom[addr_cos];
  end

endmodule
