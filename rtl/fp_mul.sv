// fp_mul: binary32 floating-point multiplier, Z = X * Y, latency 2 cycles,
// one new operation per cycle.
//
// Stage 1 multiplies the two 24-bit significands, adds the exponents and
// classifies the operands (zero, infinity, NaN). Stage 2 normalises the
// 48-bit product by at most one place, rounds to nearest even and packs
// the result, handling overflow to infinity and underflow to zero.
// Subnormal inputs are read as zero (see fp32_pkg).
//
// The port names (CLK, X, Y, Z) and the latency of 2 follow the unit the
// design was specified with; the internal organisation is this design's.
module fp_mul
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

  // ---- stage 1 ----
  logic [47:0]          s1_prod;
  logic signed [EW-1:0] s1_exp;
  logic                 s1_sign, s1_nan, s1_inf, s1_zero;

  always_ff @(posedge CLK) begin
    s1_prod <= mant(x) * mant(y);
    s1_exp  <= EW'(x.exp) + EW'(y.exp) - EW'(127);
    s1_sign <= x.sign ^ y.sign;
    s1_nan  <= is_nan(x) || is_nan(y) ||
               (is_inf(x) && is_zero(y)) || (is_zero(x) && is_inf(y));
    s1_inf  <= is_inf(x) || is_inf(y);
    s1_zero <= is_zero(x) || is_zero(y);
  end

  // ---- stage 2 ----
  logic [25:0] sig;
  logic signed [EW-1:0] bexp;
  fp32_t rounded;

  always_comb begin
    if (s1_prod[47]) begin
      sig  = {s1_prod[47:24], s1_prod[23], |s1_prod[22:0]};
      bexp = s1_exp + EW'(1);
    end else begin
      sig  = {s1_prod[46:23], s1_prod[22], |s1_prod[21:0]};
      bexp = s1_exp;
    end
    rounded = round_pack(s1_sign, bexp, sig);
  end

  always_ff @(posedge CLK) begin
    if (s1_nan)       Z <= FP_NAN;
    else if (s1_inf)  Z <= {s1_sign, FP_INF[30:0]};
    else if (s1_zero) Z <= {s1_sign, 31'd0};
    else              Z <= rounded;
  end

endmodule
