// cordic_ref_pkg: reference model used by the CORDIC testbenches.
//
// A bit-exact model of the rotation-mode CORDIC in the default 32-bit format
// with 29 fraction bits, written with plain 32-bit int arithmetic (which wraps
// the same way the hardware does), plus real-number conversions. Its angle
// table is derived here again from atan(2^-k); the testbenches also compare a
// few entries with hand-computed constants.
package cordic_ref_pkg;

  localparam real SCALE = 536870912.0;  // 2^29

  function automatic int to_fix(input real r);
    real s;
    s = r * SCALE;
    if (s >= 0.0) return int'($floor(s + 0.5));
    else          return -int'($floor(-s + 0.5));
  endfunction

  function automatic real absr(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic real to_real(input int v);
    return real'(v) / SCALE;
  endfunction

  function automatic int ref_angle(input int k);
    if (k < 60) return to_fix($atan(2.0 ** (-real'(k))));
    else        return ref_angle(59) >>> (k - 59);
  endfunction

  typedef struct {
    int x;
    int y;
    int z;
  } vec_t;

  // One micro-rotation with shift k.
  function automatic vec_t ref_step(input vec_t v, input int k);
    vec_t r;
    int a;
    a = ref_angle(k);
    if (v.z >= 0) begin
      r.x = v.x - (v.y >>> k);
      r.y = v.y + (v.x >>> k);
      r.z = v.z - a;
    end else begin
      r.x = v.x + (v.y >>> k);
      r.y = v.y - (v.x >>> k);
      r.z = v.z + a;
    end
    return r;
  endfunction

  // n micro-rotations, shifts 0 .. n-1.
  function automatic vec_t ref_cordic(input vec_t v, input int n);
    vec_t r;
    r = v;
    for (int k = 0; k < n; k++) r = ref_step(r, k);
    return r;
  endfunction

  // 1/K(n) = prod_{m<n} 1/sqrt(1+2^-2m), as a real.
  function automatic real ref_kprod(input int n);
    real p;
    p = 1.0;
    for (int m = 0; m < n; m++) p = p / $sqrt(1.0 + 2.0 ** (-2.0 * real'(m)));
    return p;
  endfunction

endpackage
