// fp_acc: binary32 accumulator built from a long fixed-point accumulator
// (LongAcc) followed by a conversion back to binary32 (LongAcc2FP).
//
// LongAcc: each input X is shifted, according to its exponent, into the
// position it has in a WA = MSB_A - LSB_A + 1 = 64-bit two's-complement
// fixed-point word whose least significant bit weighs 2^LSB_A. A negative
// input is one's-complemented and its sign enters the adder as carry-in,
// which together negate it. The adder adds it to the accumulator register
// every cycle, so the sum is exact (apart from input bits below 2^LSB_A,
// which are truncated) and independent of the order of the inputs.
// Inputs whose exponent exceeds MAX_MSB_X are not added and raise the
// sticky flag XOverflow; inputs entirely below 2^LSB_A raise XUnderflow.
// newDataset starts a new sum with the current X and clears both flags.
//
// LongAcc2FP: the accumulator is made positive (two's complement), its
// leading one is found, it is shifted to normalise and rounded to nearest
// even into data_out.
//
// Timing: X is registered after shifting (cycle 1), accumulated (cycle 2)
// and converted (cycle 3): data_out includes an input 3 cycles after it
// was applied. `ready` rises when the first sample of a data set has
// reached data_out and stays high until reset.
//
// The two-part structure, the one's complement with carry-in, the 64-bit
// fixed-point sum, the ports and the latency of 3 follow the design. The
// split MAX_MSB_X = 3, MSB_A = 23, LSB_A = -40 is this design's choice:
// inputs up to 16, sums up to 2^23, resolution 2^-40.
module fp_acc
  import fp32_pkg::*;
#(
  parameter int MAX_MSB_X = 3,
  parameter int MSB_A     = 23,
  parameter int LSB_A     = -40,
  localparam int WA       = MSB_A - LSB_A + 1
) (
  input  logic        CLK,
  input  logic        rst,
  input  logic [31:0] X,
  input  logic        newDataset,
  output logic [31:0] data_out,
  output logic        XOverflow,
  output logic        XUnderflow,
  output logic        ready
);

  fp32_t x;
  assign x = fp32_t'(X);

  // ---- LongAcc: input shifter and one's complement ----
  logic signed [EW-1:0] e_unb;
  logic signed [EW-1:0] pos;       // position of the significand's LSB
  logic [WA-1:0]        shifted;
  logic                 ovf, unf;

  always_comb begin
    e_unb   = EW'(x.exp) - EW'(127);
    pos     = e_unb - EW'(23) - EW'(LSB_A);
    ovf     = !is_zero(x) && (e_unb > EW'(MAX_MSB_X));
    unf     = !is_zero(x) && (e_unb < EW'(LSB_A));
    shifted = '0;
    if (!is_zero(x) && !ovf && !unf) begin
      if (pos >= 0) shifted = WA'(mant(x)) << pos;
      else          shifted = WA'(mant(x)) >> (-pos);
    end
  end

  logic [WA-1:0] s1_x;
  logic          s1_cin, s1_new, s1_ovf, s1_unf;

  always_ff @(posedge CLK) begin
    s1_x   <= (x.sign && shifted != '0) ? ~shifted : shifted;
    s1_cin <= x.sign && shifted != '0;
    s1_new <= newDataset;
    s1_ovf <= ovf;
    s1_unf <= unf;
  end

  // ---- LongAcc: accumulator ----
  logic [WA-1:0] acc;
  logic          acc_new, ovf_flag, unf_flag;

  always_ff @(posedge CLK) begin
    if (rst) begin
      acc      <= '0;
      acc_new  <= 1'b0;
      ovf_flag <= 1'b0;
      unf_flag <= 1'b0;
    end else begin
      acc      <= (s1_new ? '0 : acc) + s1_x + WA'(s1_cin);
      acc_new  <= s1_new;
      ovf_flag <= (s1_new ? 1'b0 : ovf_flag) | s1_ovf;
      unf_flag <= (s1_new ? 1'b0 : unf_flag) | s1_unf;
    end
  end

  // ---- LongAcc2FP: two's complement, LZC + shifter, rounding ----
  logic          sign;
  logic [63:0]   mag, norm;
  logic [6:0]    lz;
  fp32_t         rounded;

  always_comb begin
    sign = acc[WA-1];
    mag  = 64'(sign ? -acc : acc);
    lz   = lzc64(mag);
    norm = mag << lz;
    // leading one at bit 63-lz, weighing 2^(63-lz+LSB_A)
    rounded = round_pack(sign, EW'(63 + LSB_A + 127) - EW'(lz),
                         {norm[63:39], |norm[38:0]});
  end

  always_ff @(posedge CLK) begin
    if (rst) begin
      data_out   <= FP_ZERO;
      XOverflow  <= 1'b0;
      XUnderflow <= 1'b0;
      ready      <= 1'b0;
    end else begin
      data_out   <= (mag == 64'd0) ? FP_ZERO : rounded;
      XOverflow  <= ovf_flag;
      XUnderflow <= unf_flag;
      ready      <= ready | acc_new;
    end
  end

endmodule
