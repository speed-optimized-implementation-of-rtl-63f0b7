// Testbench helpers: exact conversions between real and IEEE-754 single.
//
// real_to_fp32 rounds a double to the nearest single (ties to even) by
// scaling with powers of two, which is exact in double precision, and flushes
// results below the normal range to zero as the design's operators do.
// fp32_to_real is exact. chirp_ref computes a chirplet sample in double
// precision. These give reference values that do not depend on the design's
// own operators or tables.
package tb_fp_pkg;

  function automatic real fp32_to_real(input logic [31:0] b);
    real m;
    int  e;
    if (b[30:23] == 8'd0) return 0.0;
    m = real'({1'b1, b[22:0]});
    e = int'(b[30:23]) - 150;
    m = m * (2.0 ** e);
    return b[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real_to_fp32(input real r);
    logic        s;
    real         a, mi, rem;
    int          e, ee;
    longint      q;
    if (r == 0.0) return 32'd0;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    a   = a * 8388608.0;            // 2^23, exact
    mi  = $floor(a);
    rem = a - mi;
    q   = longint'(mi);
    if (rem > 0.5 || (rem == 0.5 && q[0])) q++;
    if (q == 64'd16777216) begin q = 64'd8388608; e++; end
    ee = e + 127;
    if (ee >= 255) return {s, 8'hFF, 23'd0};
    if (ee <= 0)   return {s, 31'd0};
    return {s, 8'(ee), q[22:0]};
  endfunction

  // Random normal single with exponent field in [emin, emax].
  function automatic logic [31:0] rand_fp32(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // Double-precision chirplet sample n of
  //   beta*exp(-alpha1*dt^2)*exp(j*2*pi*(phi + fc*dt + alpha2*dt^2)),
  // dt = n*tstep - tau, phi in cycles; parameters given as singles.
  function automatic void chirp_ref(input logic [31:0] beta, tau, alpha1, phi, fc, alpha2, tstep,
                                    input int n, output real re, output real im);
    real dt, env, ph, pi;
    pi  = 3.14159265358979323846;
    dt  = real'(n) * fp32_to_real(tstep) - fp32_to_real(tau);
    env = fp32_to_real(beta) * $exp(-fp32_to_real(alpha1) * dt * dt);
    ph  = fp32_to_real(phi) + fp32_to_real(fc) * dt + fp32_to_real(alpha2) * dt * dt;
    re  = env * $cos(2.0 * pi * ph);
    im  = env * $sin(2.0 * pi * ph);
  endfunction

endpackage
