// fp32_pkg: types, constants and helper functions shared by the binary32
// arithmetic units of the option-pricing accelerator.
//
// The units work on IEEE-754 binary32 words. Subnormal numbers are not
// supported, as in the arithmetic library the design was built around:
// a subnormal input is read as zero and a result below the normal range
// is flushed to zero. Rounding is round-to-nearest-even.
//
// round_pack() is the common back end of every unit: it takes a sign, a
// biased exponent (wide and signed, so that overflow and underflow can be
// seen) and a 26-bit significand {1.f[22:0], guard, sticky} whose leading
// one is at bit 25, rounds it and packs the binary32 result.
package fp32_pkg;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  localparam logic [31:0] FP_ZERO = 32'h0000_0000;
  localparam logic [31:0] FP_ONE  = 32'h3F80_0000;
  localparam logic [31:0] FP_INF  = 32'h7F80_0000;
  localparam logic [31:0] FP_NAN  = 32'h7FC0_0000;

  // Exponent width used inside the units, wide enough for any sum or
  // difference of two biased exponents.
  localparam int EW = 12;

  function automatic logic is_zero(input fp32_t a);
    return a.exp == 8'd0;
  endfunction

  function automatic logic is_inf(input fp32_t a);
    return a.exp == 8'hFF && a.frac == 23'd0;
  endfunction

  function automatic logic is_nan(input fp32_t a);
    return a.exp == 8'hFF && a.frac != 23'd0;
  endfunction

  // Hidden one prepended: 1.f as a 24-bit integer (0 for zero/subnormal).
  function automatic logic [23:0] mant(input fp32_t a);
    return is_zero(a) ? 24'd0 : {1'b1, a.frac};
  endfunction

  // Round to nearest even and pack. sig[25] is the leading one, sig[24:2]
  // the fraction, sig[1] the guard bit and sig[0] the sticky bit.
  function automatic fp32_t round_pack(input logic sign,
                                       input logic signed [EW-1:0] bexp,
                                       input logic [25:0] sig);
    logic [24:0] m;
    logic        inc;
    logic signed [EW-1:0] e;
    fp32_t r;
    inc = sig[1] & (sig[0] | sig[2]);
    m   = {1'b0, sig[25:2]} + 25'(inc);
    e   = bexp;
    if (m[24]) begin
      m = m >> 1;
      e = e + EW'(1);
    end
    if (e >= EW'(255)) begin
      r = fp32_t'({sign, 8'hFF, 23'd0});
    end else if (e <= EW'(0)) begin
      r = fp32_t'({sign, 31'd0});
    end else begin
      r.sign = sign;
      r.exp  = e[7:0];
      r.frac = m[22:0];
    end
    return r;
  endfunction

  // Number of leading zeros of a 64-bit word (64 for zero).
  function automatic logic [6:0] lzc64(input logic [63:0] v);
    logic [6:0] n;
    n = 7'd64;
    for (int i = 0; i < 64; i++) begin
      if (v[i]) n = 7'(63 - i);
    end
    return n;
  endfunction

endpackage
