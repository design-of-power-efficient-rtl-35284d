// fp_add: binary32 floating-point adder, Z = X + Y, latency 2 cycles, one
// new operation per cycle.
//
// Stage 1 aligns both significands to the larger exponent in a 50-bit
// field (24 significand bits and 26 bits below them, the bits shifted out
// further collapsed into a sticky bit), applies the signs and adds them as
// two's-complement numbers. Stage 2 takes the magnitude, counts leading
// zeros, normalises, rounds to nearest even and packs. Because every bit
// lost in the alignment lies far below the rounding point whenever a
// cancellation can shift the result left, the result is correctly
// rounded. Subnormals are read and written as zero.
//
// Port names and the latency of 2 follow the unit the design was specified
// with; the internal organisation is this design's.
module fp_add
  import fp32_pkg::*;
(
  input  logic        CLK,
  input  logic [31:0] X,
  input  logic [31:0] Y,
  output logic [31:0] Z
);

  fp32_t x, y;
  assign x = fp32_t'(X);
  assign y = fp32_t'(Y);

  // Align a significand to exponent emax: 50-bit field, sticky in bit 0.
  function automatic logic [49:0] align(input logic [23:0] m, input logic [7:0] e,
                                        input logic [7:0] emax);
    logic [99:0] wide;
    logic [7:0]  d;
    d    = emax - e;
    wide = {m, 76'd0} >> d;
    return {wide[99:51], wide[50] | (|wide[49:0])};
  endfunction

  // ---- stage 1 ----
  logic [7:0]         emax;
  logic signed [51:0] ax, ay;
  logic signed [51:0] s1_sum;
  logic [7:0]         s1_emax;
  logic               s1_nan, s1_inf, s1_inf_sign;

  always_comb begin
    emax = (x.exp > y.exp) ? x.exp : y.exp;
    ax   = 52'(align(mant(x), x.exp, emax));
    ay   = 52'(align(mant(y), y.exp, emax));
    if (x.sign) ax = -ax;
    if (y.sign) ay = -ay;
  end

  always_ff @(posedge CLK) begin
    s1_sum      <= ax + ay;
    s1_emax     <= emax;
    s1_nan      <= is_nan(x) || is_nan(y) ||
                   (is_inf(x) && is_inf(y) && (x.sign != y.sign));
    s1_inf      <= is_inf(x) || is_inf(y);
    s1_inf_sign <= is_inf(x) ? x.sign : y.sign;
  end

  // ---- stage 2 ----
  logic [63:0] mag, norm;
  logic [6:0]  lz;
  logic        sign;
  fp32_t       rounded;

  always_comb begin
    sign = s1_sum[51];
    mag  = {12'd0, sign ? 52'(-s1_sum) : 52'(s1_sum)};
    lz   = lzc64(mag);
    norm = mag << lz;
    // leading one of mag at bit 63-lz; bit 49 carries the weight of emax
    rounded = round_pack(sign, EW'(s1_emax) + EW'(14) - EW'(lz),
                         {norm[63:39], |norm[38:0]});
  end

  always_ff @(posedge CLK) begin
    if (s1_nan)           Z <= FP_NAN;
    else if (s1_inf)      Z <= {s1_inf_sign, FP_INF[30:0]};
    else if (mag == 64'd0) Z <= FP_ZERO;
    else                  Z <= rounded;
  end

endmodule
