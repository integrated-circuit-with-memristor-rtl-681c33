// fp_ref_pkg: reference floating-point helpers for the testbenches.
//
// Converts between IEEE 754 single-precision bit patterns and the
// simulator's double-precision real, independently of the design's FPU:
// f2r widens a float exactly (subnormals read as zero, like the design);
// r2f rounds a real to the nearest float, ties to even, flushing results
// below the normal range to zero. Sums and products of two floats are exact
// in double precision, so r2f(f2r(a) op f2r(b)) is the correctly rounded
// single-precision result the FPU must reproduce bit for bit.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [24:0] mant;
    logic        grd, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    mant = {2'b01, d[51:29]};
    grd  = d[28];
    st   = |d[27:0];
    if (grd && (st || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], mant[22:0]};
  endfunction

  // Random normal float with biased exponent in [emin, emax].
  function automatic logic [31:0] rand_float(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // Distance in units in the last place between two floats of equal sign.
  function automatic longint ulp_dist(input logic [31:0] a, input logic [31:0] b);
    longint d;
    d = longint'(a[30:0]) - longint'(b[30:0]);
    if (a[31] != b[31]) return longint'(a[30:0]) + longint'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

endpackage
