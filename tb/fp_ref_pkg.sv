// fp_ref_pkg: reference helpers for the floating-point testbenches.
//
// Converts between IEEE-754 single-precision bit patterns and real values by
// decoding the fields directly, and compares a result with a real reference
// value within a relative tolerance (the units truncate, so a result may lie
// up to about one unit in the last place below the exact value).
package fp_ref_pkg;

  function automatic real fp2real(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // Exact single-precision pattern of a small integer value (|v| < 2^24).
  function automatic logic [31:0] int2fp(input int v);
    logic [31:0] r;
    int unsigned mag;
    int          msb;
    if (v == 0) return 32'd0;
    mag = (v < 0) ? -v : v;
    msb = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) msb = i;
    r[31]    = (v < 0);
    r[30:23] = 8'(127 + msb);
    r[22:0]  = 23'((mag << (23 - msb)) & 32'h7F_FFFF);
    return r;
  endfunction

  function automatic bit close(input logic [31:0] got, input real ref_v);
    real g, diff, tol;
    g    = fp2real(got);
    diff = g - ref_v;
    if (diff < 0.0) diff = -diff;
    tol  = (ref_v < 0.0 ? -ref_v : ref_v) * (2.0 ** -21);
    return diff <= tol;
  endfunction

  // Random normal operand with an exponent field in [lo, hi].
  function automatic logic [31:0] rand_fp(input int lo, input int hi);
    logic [31:0] r;
    r[31]    = 1'($urandom);
    r[30:23] = 8'(lo + ($urandom % (hi - lo + 1)));
    r[22:0]  = 23'($urandom);
    return r;
  endfunction

endpackage
