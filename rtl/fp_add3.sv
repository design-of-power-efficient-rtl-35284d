// fp_add3: three-input binary32 adder, R = X + Y + Z, latency 2 cycles,
// one new operation per cycle. Used in the adder tree that sums the
// results of parallel Monte Carlo paths.
//
// It works like fp_add with one more operand: stage 1 aligns the three
// significands to the largest exponent in 50-bit fields with sticky bits
// and adds them as two's-complement numbers in 53 bits; stage 2
// normalises, rounds to nearest even once and packs. The single rounding
// makes the result at least as accurate as two chained 2-input additions.
// Subnormals are read and written as zero.
//
// Port names and the latency of 2 follow the unit the design was specified
// with; the internal organisation is this design's.
module fp_add3
  import fp32_pkg::*;
(
  input  logic        CLK,
  input  logic [31:0] X,
  input  logic [31:0] Y,
  input  logic [31:0] Z,
  output logic [31:0] R
);

  fp32_t op [3];
  assign op[0] = fp32_t'(X);
  assign op[1] = fp32_t'(Y);
  assign op[2] = fp32_t'(Z);

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
  logic signed [52:0] sum;
  logic               any_nan, any_pinf, any_ninf;
  logic signed [52:0] s1_sum;
  logic [7:0]         s1_emax;
  logic               s1_nan, s1_inf, s1_inf_sign;

  always_comb begin
    emax     = 8'd0;
    sum      = '0;
    any_nan  = 1'b0;
    any_pinf = 1'b0;
    any_ninf = 1'b0;
    for (int i = 0; i < 3; i++) begin
      if (op[i].exp > emax) emax = op[i].exp;
      any_nan  = any_nan  | is_nan(op[i]);
      any_pinf = any_pinf | (is_inf(op[i]) & ~op[i].sign);
      any_ninf = any_ninf | (is_inf(op[i]) &  op[i].sign);
    end
    for (int i = 0; i < 3; i++) begin
      if (op[i].sign) sum = sum - 53'(align(mant(op[i]), op[i].exp, emax));
      else            sum = sum + 53'(align(mant(op[i]), op[i].exp, emax));
    end
  end

  always_ff @(posedge CLK) begin
    s1_sum      <= sum;
    s1_emax     <= emax;
    s1_nan      <= any_nan | (any_pinf & any_ninf);
    s1_inf      <= any_pinf | any_ninf;
    s1_inf_sign <= any_ninf;
  end

  // ---- stage 2 ----
  logic [63:0] mag, norm;
  logic [6:0]  lz;
  logic        sign;
  fp32_t       rounded;

  always_comb begin
    sign = s1_sum[52];
    mag  = {11'd0, sign ? 53'(-s1_sum) : 53'(s1_sum)};
    lz   = lzc64(mag);
    norm = mag << lz;
    rounded = round_pack(sign, EW'(s1_emax) + EW'(14) - EW'(lz),
                         {norm[63:39], |norm[38:0]});
  end

  always_ff @(posedge CLK) begin
    if (s1_nan)            R <= FP_NAN;
    else if (s1_inf)       R <= {s1_inf_sign, FP_INF[30:0]};
    else if (mag == 64'd0) R <= FP_ZERO;
    else                   R <= rounded;
  end

endmodule
