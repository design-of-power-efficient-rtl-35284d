// rnd_gen: Gaussian pseudo-random number generator producing one binary32
// sample per enabled cycle, with mean about 0 and variance about 1.1.
//
// Four 23-bit LFSRs give four uniform integers. Their average (an adder
// tree 23 -> 24 -> 25 bits and a shift right by 2) is, by the central
// limit theorem, roughly bell shaped. The 23-bit average is used as the
// fraction of a binary32 number whose exponent is fixed at 1, i.e. a
// value in [2,4): this keeps the numbers away from zero, so no subnormal
// can appear. A floating-point adder then subtracts 3.0 (range [-1,1))
// and a floating-point multiplier scales by 3.5 (range [-3.5,3.5)).
//
// Timing: `en` high in cycle c steps the LFSRs at the end of cycle c and
// the corresponding sample is on `rnd` in cycle c+8 (LFSR 1, adder tree 2,
// fraction packing 1, FP adder 2, FP multiplier 2). The datapath behind
// the LFSRs runs every cycle; only the LFSRs are gated by `en`.
// `load` writes the four seeds.
//
// Structure, widths, constants 3.0 and 3.5 and the latency of 8 follow the
// design; the split of the latency over the stages is this design's.
module rnd_gen
  import fp32_pkg::*;
#(
  parameter logic [31:0] OFFSET = 32'hC040_0000,  // -3.0
  parameter logic [31:0] EXPAND = 32'h4060_0000   //  3.5
) (
  input  logic        clk,
  input  logic        load,
  input  logic [22:0] seeds [4],
  input  logic        en,
  output logic [31:0] rnd
);

  logic [22:0] lfsr_q [4];

  for (genvar i = 0; i < 4; i++) begin : g_lfsr
    lfsr23 u_lfsr (.clk(clk), .load(load), .seed(seeds[i]), .en(en), .q(lfsr_q[i]));
  end

  // averaging adder tree
  logic [23:0] sum01, sum23;
  logic [24:0] sum;
  logic [31:0] frac_fp;   // binary32 in [2,4)

  always_ff @(posedge clk) begin
    sum01   <= 24'(lfsr_q[0]) + 24'(lfsr_q[1]);
    sum23   <= 24'(lfsr_q[2]) + 24'(lfsr_q[3]);
    sum     <= 25'(sum01) + 25'(sum23);
    frac_fp <= {1'b0, 8'h80, sum[24:2]};       // int2fraction
  end

  logic [31:0] centred;

  fp_add u_offset (.CLK(clk), .X(frac_fp), .Y(OFFSET), .Z(centred));
  fp_mul u_expand (.CLK(clk), .X(centred), .Y(EXPAND), .Z(rnd));

endmodule
