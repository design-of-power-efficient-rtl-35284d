// fp_exp: binary32 exponential, R = e^X, latency 3 cycles, one new
// operation per cycle.
//
// The unit evaluates e^x = 2^y with y = x * log2(e), in three steps that
// are also its three pipeline stages:
//   1. range reduction: X is converted to a signed fixed-point number with
//      32 fraction bits and multiplied by log2(e) (Q1.32 constant), giving
//      y = k + f with integer k and fraction f in [0,1);
//   2. polynomial evaluation: f = i/256 + g with i the top 8 bits of f and
//      g < 2^-8; 2^(i/256) is read from a 256-entry table and
//      2^g = e^t, t = g*ln2, is approximated by 1 + t + t^2/2;
//   3. reconstruction: the table value and the polynomial are multiplied,
//      the product is normalised and rounded, and k becomes the exponent.
// The table entries round(2^(i/256) * 2^32) are computed at elaboration by
// a Taylor series in 128-bit integer arithmetic (exp2_entry below).
// The result is within about one unit in the last place of e^x.
// |X| >= 128, results above the binary32 range and results below the
// normal range give infinity or zero; NaN gives NaN; zero gives 1.0.
//
// Port names (CLK, X, R) and the latency of 3 follow the unit the design
// was specified with, as does its structure (range reduction, table-based
// polynomial evaluation, reconstruction); table size, polynomial degree
// and word widths are this design's choice.
module fp_exp
  import fp32_pkg::*;
(
  input  logic        CLK,
  input  logic [31:0] X,
  output logic [31:0] R
);

  localparam logic [32:0] LOG2E_Q32 = 33'h1_7154_7653;   // log2(e) * 2^32
  localparam logic [31:0] LN2_Q32   = 32'hB172_17F8;     // ln(2)  * 2^32
  localparam logic [63:0] LN2_Q60   = 64'h0B17_217F_7D1C_F780; // ln(2) * 2^60

  // round(2^(i/256) * 2^32), from the series of e^z, z = i*ln2/256, in Q.60
  function automatic logic [33:0] exp2_entry(input int i);
    logic [127:0] zz, term, acc;
    zz   = (128'(LN2_Q60) * 128'(i)) >> 8;
    term = 128'(1) << 60;
    acc  = term;
    for (int n = 1; n < 24; n++) begin
      term = ((term * zz) >> 60) / 128'(n);
      acc  = acc + term;
    end
    return 34'((acc + (128'(1) << 27)) >> 28);
  endfunction

  typedef logic [33:0] table_t [256];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = exp2_entry(i);
    return t;
  endfunction

  localparam table_t EXP2_TABLE = make_table();

  fp32_t x;
  assign x = fp32_t'(X);

  // ---- stage 1: range reduction ----
  logic signed [EW-1:0] e_unb;
  logic [39:0]          xmag;
  logic signed [40:0]   xfix;
  logic signed [74:0]   yprod;
  logic signed [42:0]   s1_y;      // y in Q.32
  logic                 s1_nan, s1_pinf, s1_zero_out, s1_one;

  always_comb begin
    e_unb = EW'(x.exp) - EW'(127);
    xmag = '0;
    if (!is_zero(x)) begin
      if (e_unb + 9 >= 0) xmag = 40'(mant(x)) << (e_unb + 9);
      else                xmag = 40'(mant(x)) >> (-(e_unb + 9));
    end
    xfix  = x.sign ? -41'(xmag) : 41'(xmag);
    yprod = 75'(xfix) * $signed({1'b0, LOG2E_Q32});
  end

  always_ff @(posedge CLK) begin
    s1_y        <= 43'(yprod >>> 32);
    s1_nan      <= is_nan(x);
    // |x| >= 128 (infinity included): overflow or underflow for sure
    s1_pinf     <= !is_nan(x) && !x.sign && (e_unb >= 7);
    s1_zero_out <= !is_nan(x) &&  x.sign && (e_unb >= 7);
    s1_one      <= is_zero(x) || (e_unb < -32);
  end

  // ---- stage 2: table and polynomial ----
  logic [7:0]  idx;
  logic [23:0] g;
  logic [55:0] tprod;
  logic [31:0] t;
  logic [63:0] t2;
  logic signed [EW-1:0] s2_k;
  logic [33:0] s2_tab;
  logic [32:0] s2_poly;
  logic        s2_nan, s2_pinf, s2_zero_out, s2_one;

  always_comb begin
    idx   = s1_y[31:24];
    g     = s1_y[23:0];
    tprod = 56'(g) * 56'(LN2_Q32);
    t     = 32'(tprod >> 32);           // g*ln2 in Q.32, below 2^24
    t2    = 64'(t) * 64'(t);
  end

  always_ff @(posedge CLK) begin
    s2_k        <= EW'($signed(s1_y[42:32]));
    s2_tab      <= EXP2_TABLE[idx];
    s2_poly     <= 33'h1_0000_0000 + 33'(t) + 33'(t2 >> 33);
    s2_nan      <= s1_nan;
    s2_pinf     <= s1_pinf;
    s2_zero_out <= s1_zero_out;
    s2_one      <= s1_one;
  end

  // ---- stage 3: reconstruction ----
  logic [65:0] prod;        // Q2.64
  logic [25:0] sig;
  logic signed [EW-1:0] bexp;
  fp32_t rounded;

  always_comb begin
    prod = 66'(s2_tab) * 66'(s2_poly);
    if (prod[65]) begin
      sig  = {prod[65:41], |prod[40:0]};
      bexp = s2_k + EW'(128);
    end else begin
      sig  = {prod[64:40], |prod[39:0]};
      bexp = s2_k + EW'(127);
    end
    rounded = round_pack(1'b0, bexp, sig);
  end

  always_ff @(posedge CLK) begin
    if (s2_nan)           R <= FP_NAN;
    else if (s2_pinf)     R <= FP_INF;
    else if (s2_zero_out) R <= FP_ZERO;
    else if (s2_one)      R <= FP_ONE;
    else                  R <= rounded;
  end

endmodule
