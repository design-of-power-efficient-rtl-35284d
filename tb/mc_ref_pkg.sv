// mc_ref_pkg: software reference of one Monte Carlo path, used by the
// path, datapath and top-level testbenches. It steps the same four LFSRs
// as the hardware random generator, forms the same Gaussian samples
// (bit exact), and evaluates the payoff max(e^(drift + vsqrdt*V) - K1, 0)
// with binary32 rounding after the multiply and the add (which the
// hardware rounds the same way) and double-precision exp. The running sum
// is kept in double. It also counts how often the payoff was zero
// (negative difference) and positive.
package mc_ref_pkg;
  import fp_ref_pkg::*;

  // Operating point of the design's test run: S0 = 90, K = 100, r = 0.1,
  // sigma = 0.25, t = 2.
  localparam logic [31:0] K1_C     = 32'h3F8E38E4;  // K/S0     = 1.111
  localparam logic [31:0] DRIFT_C  = 32'h3E0CCCCD;  // (r-s^2/2)t = 0.1375
  localparam logic [31:0] VSQRDT_C = 32'h3EB504F3;  // sigma*sqrt(t) = 0.353553
  localparam real         S0_R     = 90.0;
  localparam real         EXPRT_R  = 1.221403;      // e^(r t)

  class path_model;
    logic [22:0] s [4];
    real         sum;
    int          n_zero, n_pos;

    function new(input logic [22:0] seeds [4]);
      s = seeds;
      sum = 0.0;
      n_zero = 0;
      n_pos = 0;
    endfunction

    static function logic [22:0] step(input logic [22:0] q);
      return (q >> 1) ^ ({23{q[0]}} & 23'h420000);
    endfunction

    function logic [31:0] next_rnd();
      logic [24:0] t;
      for (int i = 0; i < 4; i++) s[i] = step(s[i]);
      t = 25'(s[0]) + 25'(s[1]) + 25'(s[2]) + 25'(s[3]);
      return r2f((f2r({9'b0_1000_0000, t[24:2]}) - 3.0) * 3.5);
    endfunction

    // draw one sample and accumulate its payoff
    function void sample(input logic [31:0] vsqrdt, input logic [31:0] drift,
                         input logic [31:0] k1);
      logic [31:0] vs, arg;
      real d;
      vs  = r2f(f2r(next_rnd()) * f2r(vsqrdt));
      arg = r2f(f2r(vs) + f2r(drift));
      d   = f2r(r2f($exp(f2r(arg)))) - f2r(k1);
      if (d < 0.0) n_zero++;
      else begin
        n_pos++;
        sum += f2r(r2f(d));
      end
    endfunction
  endclass

  // relative difference of a binary32 result from a real reference
  function automatic real rel_err(input logic [31:0] got, input real want);
    real g;
    g = f2r(got);
    if (want == 0.0) return (g == 0.0) ? 0.0 : 1.0;
    return (g - want) / want < 0 ? (want - g) / want : (g - want) / want;
  endfunction

endpackage
