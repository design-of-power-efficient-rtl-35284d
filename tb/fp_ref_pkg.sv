// fp_ref_pkg: reference conversions between binary32 bit patterns and
// real numbers, used by the testbenches to work out expected results
// independently of the RTL. Conversion to binary32 rounds to nearest even
// and flushes results below the normal range to zero, like the RTL.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [28:0] low;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]};
    low = d[28:0];
    if (low[28] && (low[27:0] != 0 || m[0])) m = m + 1;
    if (m[23]) begin m = 0; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Distance in units in the last place between two finite binary32 values
  // of the same sign.
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1 << 30;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

  // Random normal binary32 with exponent in [emin, emax] (unbiased).
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
