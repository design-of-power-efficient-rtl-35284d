// mc_path: one Monte Carlo path of the option-pricing pipeline. Every
// issued cycle it draws one Gaussian sample V and adds
//     max(e^(drift + vsqrdt*V) - K1, 0)
// to its running sum, i.e. the loop body of the option-pricing algorithm
// with the strike normalised by the spot price (K1 = K/S0).
//
// The chain is: rnd_gen -> fp_mul (x vsqrdt) -> fp_add (+ drift) ->
// fp_exp -> fp_add (- K1) -> sign multiplexer -> fp_acc. The multiplexer
// passes zero instead of the difference when the difference is negative
// (its sign bit is 1) and when the sample was not issued, so that only
// the issued samples with a positive payoff are summed.
//
// Timing: fully pipelined, one sample per cycle. A sample issued in cycle
// c reaches the accumulator input in cycle c + PATH_TO_ACC (17) and is
// included in `sum` from cycle c + PATH_LAT (20). `first` marks the first
// issued sample of a run and starts a new sum. The random generator only
// advances on issued cycles; `load` writes its four seeds.
//
// The chain of operators and the zero/sign multiplexer follow the design.
// The valid pipeline that gates unissued samples, and the constant
// -K1 being formed by flipping the sign bit of K1, are this design's.
module mc_path
  import asp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [22:0] seeds [4],
  input  logic        issue,
  input  logic        first,
  input  logic [31:0] vsqrdt,
  input  logic [31:0] drift,
  input  logic [31:0] k1,
  output logic [31:0] sum,
  output logic        ready,
  output logic        x_overflow,
  output logic        x_underflow
);

  logic [31:0] v, vs, arg, st, diff, payoff;

  rnd_gen u_rnd   (.clk(clk), .load(load), .seeds(seeds), .en(issue), .rnd(v));
  fp_mul  u_mul   (.CLK(clk), .X(v),   .Y(vsqrdt), .Z(vs));
  fp_add  u_drift (.CLK(clk), .X(vs),  .Y(drift),  .Z(arg));
  fp_exp  u_exp   (.CLK(clk), .X(arg), .R(st));
  fp_add  u_k1    (.CLK(clk), .X(st),  .Y({~k1[31], k1[30:0]}), .Z(diff));

  // issue and first, delayed to the accumulator input
  logic [PATH_TO_ACC-1:0] valid_sr, first_sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_sr <= '0;
      first_sr <= '0;
    end else begin
      valid_sr <= {valid_sr[PATH_TO_ACC-2:0], issue};
      first_sr <= {first_sr[PATH_TO_ACC-2:0], issue & first};
    end
  end

  // sign multiplexer: 1 -> zero, 0 -> difference
  assign payoff = (diff[31] || !valid_sr[PATH_TO_ACC-1]) ? 32'h0 : diff;

  fp_acc u_acc (.CLK(clk), .rst(rst), .X(payoff), .newDataset(first_sr[PATH_TO_ACC-1]),
                .data_out(sum), .XOverflow(x_overflow), .XUnderflow(x_underflow),
                .ready(ready));

endmodule
