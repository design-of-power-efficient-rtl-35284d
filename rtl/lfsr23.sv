// lfsr23: 23-bit Galois linear feedback shift register, the uniform random
// source of the Gaussian random number generator.
//
// Each enabled cycle the register shifts right by one; when the bit
// shifted out is 1 the feedback mask 0x420000 (bits 22 and 17) is XORed
// in. This is the characteristic polynomial x^23 + x^18 + 1, which is
// primitive, so any non-zero seed gives a sequence of period 2^23 - 1.
// `load` writes `seed` (a zero seed would lock the register at zero, so
// it is replaced by 1). The output is the register itself: a new value is
// visible the cycle after `en` was high.
//
// Width, period, shift direction and feedback mask follow the design; the
// load port is this design's way of setting the seeds.
module lfsr23 #(
  parameter int          W    = 23,
  parameter logic [W-1:0] MASK = W'(23'h42_0000)
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (load)    q <= (seed == '0) ? W'(1) : seed;
    else if (en) q <= (q >> 1) ^ (q[0] ? MASK : '0);
  end

endmodule
