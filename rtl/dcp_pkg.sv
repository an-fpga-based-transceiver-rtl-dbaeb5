// dcp_pkg: constants and helper functions shared by the transceiver blocks.
//
// The sine tables of the synthesizer and the polar-to-rectangular converter
// are computed at elaboration time by sine_lut(), an integer-only Taylor
// series evaluated in Q30 fixed point, so no table file is needed:
//   sine_lut(k, n, a) = round(a * sin(2*pi*k / 2**n)).
// sat() clips a wide signed value to a narrower signed width, and
// mag_est() is the cheap magnitude estimate 7/8 * (max + min/2) used by the
// AGC and the compressor.
package dcp_pkg;

  localparam longint ONE_Q30 = 64'sd1 << 30;
  // pi/2 in Q30
  localparam longint HALF_PI_Q30 = 64'sd1686629713;

  // round(amp * sin(2*pi*k / 2**n_log2)); n_log2 >= 2
  function automatic int sine_lut(int k, int n_log2, int amp);
    longint quarter, r, x, x2, t, s, v;
    logic [1:0] q;
    quarter = 64'sd1 << (n_log2 - 2);
    q = 2'((k >> (n_log2 - 2)) & 3);
    r = longint'(k) & (quarter - 1);
    if (q[0]) r = quarter - r;                 // sin(pi/2 + x) = sin(pi/2 - x)
    x = (HALF_PI_Q30 * r) / quarter;           // angle in Q30, 0 .. pi/2
    x2 = (x * x) >>> 30;
    t = ONE_Q30;
    t = ONE_Q30 - ((x2 * t) >>> 30) / 110;
    t = ONE_Q30 - ((x2 * t) >>> 30) / 72;
    t = ONE_Q30 - ((x2 * t) >>> 30) / 42;
    t = ONE_Q30 - ((x2 * t) >>> 30) / 20;
    t = ONE_Q30 - ((x2 * t) >>> 30) / 6;
    s = (x * t) >>> 30;                        // sin(x) in Q30
    v = (s * amp + (64'sd1 << 29)) >>> 30;
    if (q[1]) v = -v;
    return int'(v);
  endfunction

  // 7/8 * (max(|a|,|b|) + min(|a|,|b|)/2) of two unsigned magnitudes
  function automatic logic [8:0] mag_est(logic [7:0] a, logic [7:0] b);
    logic [8:0] big, sml, s;
    big   = (a > b) ? {1'b0, a} : {1'b0, b};
    sml   = (a > b) ? {1'b0, b} : {1'b0, a};
    s = big + (sml >> 1);
    return s - (s >> 3);
  endfunction

endpackage
