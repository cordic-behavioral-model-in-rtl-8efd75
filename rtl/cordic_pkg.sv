// cordic_pkg: shared constants and elaboration-time table functions for the
// iterative CORDIC rotator.
//
// Number format: signed two's complement, WIDTH bits, FRAC fraction bits.
// The default is 32 bits with 29 fraction bits (Q2.29): bit 31 is the sign,
// bits 30..29 the integer part and bits 28..0 the fraction, so 1.0 is
// 32'h2000_0000 and 0.5 is 32'h1000_0000. That range (-4 .. +4) holds the
// inputs, the CORDIC gain growth (about 1.647) and angles up to +/- pi.
//
// The two tables of the algorithm are not stored as literal numbers; they are
// computed from their definitions when the design is elaborated:
//   atan table   A(k) = round(atan(2^-k) * 2^FRAC)
//   gain table   P(i) = round(prod_{m=0..i} 1/sqrt(1 + 2^-2m) * 2^FRAC)
// Rounding is to the nearest LSB. The table lengths (60 angles, 33 gain
// products) follow the original behavioural model; past its angle table that
// model halves the last angle once per extra iteration, which
// cordic_atan_rom reproduces.
package cordic_pkg;

  // Default word format and iteration count.
  localparam int unsigned CORDIC_WIDTH = 32;
  localparam int unsigned CORDIC_FRAC  = 29;
  localparam int unsigned CORDIC_ITERS = 10;

  // Sizes of the two tables.
  localparam int unsigned ANGLE_TABLE_LEN = 60;
  localparam int unsigned KPROD_TABLE_LEN = 33;

  // Round a real to the nearest integer (halves away from zero).
  function automatic longint round_real(input real r);
    if (r >= 0.0) return longint'($floor(r + 0.5));
    else          return -longint'($floor(-r + 0.5));
  endfunction

  // atan(2^-k) in fixed point with frac fraction bits.
  function automatic longint atan_fixed(input int unsigned k, input int unsigned frac);
    return round_real($atan(2.0 ** (-real'(k))) * (2.0 ** real'(frac)));
  endfunction

  // Product of the first (i+1) micro-rotation scale factors, 1/sqrt(1+2^-2m)
  // for m = 0..i, in fixed point with frac fraction bits. Its limit for large
  // i is 1/K = 0.6072529350...
  function automatic longint kprod_fixed(input int unsigned i, input int unsigned frac);
    real p;
    p = 1.0;
    for (int unsigned m = 0; m <= i; m++)
      p = p / $sqrt(1.0 + 2.0 ** (-2.0 * real'(m)));
    return round_real(p * (2.0 ** real'(frac)));
  endfunction

endpackage
