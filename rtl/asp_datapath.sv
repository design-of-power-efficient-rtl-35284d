// asp_datapath: the datapath of the option-pricing processor. N_PATHS
// identical Monte Carlo paths (mc_path) run in lock step, each with its
// own four random seeds; an adder tree sums their partial sums, and a
// final multiplier scales the total by `final_c` (S0 * e^(r t) / n in the
// algorithm, computed by the host together with K1, drift and vsqrdt).
//
// Timing: a sample issued in cycle c is included in `z` from cycle
// c + asp_pkg::datapath_lat(N_PATHS) (26 for 4 paths, 22 for 1 path).
// `ready` is high when every path has a valid sum; the overflow/underflow
// flags are those of the path accumulators, ORed.
//
// The structure (replicated paths, adder tree, one final multiplier)
// follows the design; the default of 4 paths is its largest configuration
// that was built.
module asp_datapath
  import asp_pkg::*;
#(
  parameter int N_PATHS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [22:0] seeds [N_PATHS][4],
  input  logic        issue,
  input  logic        first,
  input  logic [31:0] vsqrdt,
  input  logic [31:0] drift,
  input  logic [31:0] k1,
  input  logic [31:0] final_c,
  output logic [31:0] z,
  output logic        ready,
  output logic        x_overflow,
  output logic        x_underflow
);

  logic [31:0]        sums [N_PATHS];
  logic [N_PATHS-1:0] rdy, ovf, unf;

  for (genvar p = 0; p < N_PATHS; p++) begin : g_path
    mc_path u_path (.clk(clk), .rst(rst), .load(load), .seeds(seeds[p]),
                    .issue(issue), .first(first), .vsqrdt(vsqrdt), .drift(drift),
                    .k1(k1), .sum(sums[p]), .ready(rdy[p]),
                    .x_overflow(ovf[p]), .x_underflow(unf[p]));
  end

  logic [31:0] total;

  fp_adder_tree #(.N(N_PATHS)) u_tree (.clk(clk), .in(sums), .out(total));
  fp_mul u_final (.CLK(clk), .X(total), .Y(final_c), .Z(z));

  assign ready       = &rdy;
  assign x_overflow  = |ovf;
  assign x_underflow = |unf;

endmodule
